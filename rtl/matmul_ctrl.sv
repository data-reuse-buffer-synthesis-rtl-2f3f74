// matmul_ctrl: loop controller of the matrix multiplication designs,
// Q[i][j] = sum_k A[i][k] * B[k][j] over N x N matrices, loop order i, j, k,
// one iteration per cycle. With TRIANGULAR = 1, A is upper triangular and
// the inner loop runs k = i..N-1 only. For each array it raises the buffer
// controls of the current iteration, i.e. the iteration domains found by
// the reuse analysis:
//   A[i][k]: first use (nshift, read A) when j = 0, reuse (lshift) otherwise;
//            still needed later (rbpush) when j < N-1
//   B[k][j]: first use when i = 0, reuse otherwise; still needed later when
//            k > i (the next i row reads k >= i+1 only)
//   Q[i][j]: cleared by the loop body at the first k (`q_first`), stored to
//            memory at the last k (`q_store`)
// Outputs are combinational from the counters; `done` pulses after the last
// iteration. Addresses are row-major.
module matmul_ctrl #(
  parameter int unsigned N          = 100,
  parameter bit          TRIANGULAR = 1'b0,
  localparam int unsigned IW        = $clog2(N),
  localparam int unsigned AW        = $clog2(N * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          a_nshift,
  output logic          a_lshift,
  output logic          a_rbpush,
  output logic [AW-1:0] a_addr,
  output logic          b_nshift,
  output logic          b_lshift,
  output logic          b_rbpush,
  output logic [AW-1:0] b_addr,
  output logic          q_first,
  output logic          q_store,
  output logic [AW-1:0] q_addr
);
  logic [IW-1:0] i, j, k, k0;
  logic last_k, last_j, last_i;

  assign k0       = TRIANGULAR ? i : '0;
  assign last_k   = (k == IW'(N - 1));
  assign last_j   = (j == IW'(N - 1));
  assign last_i   = (i == IW'(N - 1));

  assign a_nshift = busy && (j == '0);
  assign a_lshift = busy && (j != '0);
  assign a_rbpush = busy && !last_j;
  assign a_addr   = AW'(i) * AW'(N) + AW'(k);
  assign b_nshift = busy && (i == '0);
  assign b_lshift = busy && (i != '0);
  assign b_rbpush = busy && (k > i);
  assign b_addr   = AW'(k) * AW'(N) + AW'(j);
  assign q_first  = busy && (k == k0);
  assign q_store  = busy && last_k;
  assign q_addr   = AW'(i) * AW'(N) + AW'(j);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; i <= '0; j <= '0; k <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; i <= '0; j <= '0; k <= '0;
        end
      end else if (!last_k) begin
        k <= k + 1'b1;
      end else if (!last_j) begin
        j <= j + 1'b1; k <= k0;
      end else if (!last_i) begin
        i <= i + 1'b1; j <= '0; k <= TRIANGULAR ? i + 1'b1 : '0;
      end else begin
        busy <= 1'b0; done <= 1'b1;
      end
    end
  end
endmodule
