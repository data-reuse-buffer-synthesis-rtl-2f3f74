// sobel_tri_ctrl: loop controller of the triangular Sobel design, whose
// execute domain is 1 <= r <= N-2, 1 <= c <= r-1 on an N x N image. The
// union of the 3x3 windows makes data row i hold L(i) pixels, columns
// 0..L(i)-1, with L(0) = 0 and L(i) = min(i+2, N-1) otherwise. Each control
// signal is the inverse projection of that data domain through one tap's
// access function, c = i2 - 1 in all cases:
//   fetch (head P[r+1][c+1]):  -1 <= c <= L(r+1)-2
//   pop4  (tap P[r][c+1]):     -1 <= c <= L(r)-2
//   pop6  (tap P[r-1][c+1]):   -1 <= c <= L(r-1)-2
// The controller walks r = 0..N-2 (row r = -1 is empty) and in each row
// c = -1..L(r+1)-2, the widest of the three; execute is raised inside the
// triangle. One iteration per cycle, no idle cycles. Pops of data that no
// later iteration reads (the last two data rows at taps 4 and 6) fall after
// the last execution and are left out. Interface and timing as in
// sobel_rect_ctrl: outputs are combinational from the counters, `done`
// pulses after the last iteration.
module sobel_tri_ctrl #(
  parameter int unsigned N   = 100,
  localparam int unsigned AW = $clog2(N * N),
  localparam int unsigned IW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          fetch,
  output logic [AW-1:0] fetch_addr,
  output logic          pop4,
  output logic          pop6,
  output logic          exec,
  output logic [AW-1:0] q_addr
);
  logic [IW-1:0] r, fc;      // fc = c + 1
  logic [IW-1:0] len_dn, len_0, len_up, row_last;
  logic          last_col, last_row;

  // Number of pixels of data row i in the data domain.
  function automatic logic [IW-1:0] row_len(input int i);
    if (i <= 0)                 return '0;
    else if (i + 2 > int'(N) - 1) return IW'(N - 1);
    else                        return IW'(i + 2);
  endfunction

  always_comb begin
    len_dn   = row_len(int'(r) + 1);
    len_0    = row_len(int'(r));
    len_up   = row_len(int'(r) - 1);
    row_last = len_dn - 1'b1;
  end

  assign last_col   = (fc == row_last);
  assign last_row   = (r == IW'(N - 2));
  assign fetch      = busy;
  assign fetch_addr = AW'(r + 1'b1) * AW'(N) + AW'(fc);
  assign pop4       = busy && (fc < len_0);
  assign pop6       = busy && (fc < len_up);
  assign exec       = busy && (r >= 1) && (fc >= 2) && (fc <= r);
  assign q_addr     = AW'(r) * AW'(N) + AW'(fc - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; r <= '0; fc <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; r <= '0; fc <= '0;
        end
      end else if (last_col) begin
        fc <= '0;
        if (last_row) begin
          busy <= 1'b0; done <= 1'b1;
        end else begin
          r <= r + 1'b1;
        end
      end else begin
        fc <= fc + 1'b1;
      end
    end
  end
endmodule
