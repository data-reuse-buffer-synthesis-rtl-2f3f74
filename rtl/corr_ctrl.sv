// corr_ctrl: loop controller of the correlation design, for (i < NI) for
// (j < NJ) using A[i+j] and B[j], one iteration per cycle. Buffer controls:
//   A[i+j]: fetched (nshift) when i = 0 or j = NJ-1, i.e. at its first use;
//           reused (lshift) otherwise, with constant distance NJ-1
//   B[j]:   fetched when i = 0, reused otherwise, constant distance NJ
// `first` and `last` mark j = 0 and j = NJ-1 for the loop body, `idx` is i.
// Outputs are combinational from the counters; `done` pulses after the
// last iteration.
module corr_ctrl #(
  parameter int unsigned NI  = 1000,
  parameter int unsigned NJ  = 13,
  localparam int unsigned IW = $clog2(NI),
  localparam int unsigned JW = $clog2(NJ),
  localparam int unsigned AW = $clog2(NI + NJ - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          a_nshift,
  output logic          a_lshift,
  output logic [AW-1:0] a_addr,
  output logic          b_nshift,
  output logic          b_lshift,
  output logic [JW-1:0] b_addr,
  output logic          first,
  output logic          last,
  output logic [IW-1:0] idx
);
  logic [IW-1:0] i;
  logic [JW-1:0] j;
  logic          last_i;

  assign last     = (j == JW'(NJ - 1));
  assign last_i   = (i == IW'(NI - 1));
  assign first    = busy && (j == '0);
  assign a_nshift = busy && ((i == '0) || last);
  assign a_lshift = busy && !((i == '0) || last);
  assign a_addr   = AW'(i) + AW'(j);
  assign b_nshift = busy && (i == '0);
  assign b_lshift = busy && (i != '0);
  assign b_addr   = j;
  assign idx      = i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; i <= '0; j <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; i <= '0; j <= '0;
        end
      end else if (!last) begin
        j <= j + 1'b1;
      end else begin
        j <= '0;
        if (last_i) begin
          busy <= 1'b0; done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end
endmodule
