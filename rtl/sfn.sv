// sfn ("suspend first n"): lets a pulse train through except its first N
// pulses. It sits on the push input of a FIFO in a variable-distance reuse
// chain: the push follows the upstream fetch or pop, but the first N of
// them only move start-up garbage out of the N shift-register stages between
// the two FIFOs and must not be pushed. A saturating counter of N+1 states;
// `pulse_o` is combinational from `pulse_i`. `clr` restarts the count for a
// new frame.
module sfn #(
  parameter int unsigned N = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic pulse_i,
  output logic pulse_o
);
  localparam int unsigned CW = $clog2(N + 1) + 1;
  logic [CW-1:0] cnt;
  logic          passed;
  assign passed  = (cnt == CW'(N));
  assign pulse_o = pulse_i && passed;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (clr)                cnt <= '0;
    else if (pulse_i && !passed) cnt <= cnt + 1'b1;
  end
endmodule
