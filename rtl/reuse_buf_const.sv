// reuse_buf_const: single-access-function reuse buffer for a constant reuse
// distance DIST (all references to the array share one access function,
// e.g. A[i][k] in matrix multiplication). The word used in the current
// iteration sits in the `data` (active data) register. Each iteration shifts
// once: with `nshift` the active register takes a word fetched from memory
// (first use), with `lshift` it takes the word coming back round the loop
// (reuse). Either way the old active word enters a shift register of
// DIST-1 words whose output feeds back to the input multiplexer, so a word
// comes back exactly DIST iterations after it was last used; the word that
// falls off the loop on `nshift` is one that is never used again.
// For DIST = 1 the loop vanishes and the buffer is one register.
// `nshift` and `lshift` are never high together; `data` is valid the cycle
// after the shift.
module reuse_buf_const #(
  parameter int unsigned W          = 16,
  parameter int unsigned DIST       = 100,
  parameter int unsigned RAM_THRESH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         nshift,
  input  logic         lshift,
  input  logic [W-1:0] mem_data,
  output logic [W-1:0] data
);
  logic [W-1:0] active, loop_out;

  if (DIST > 1) begin : g_loop
    shift_reg #(.W(W), .DEPTH(DIST - 1), .RAM_THRESH(RAM_THRESH)) u_sr (
      .clk, .rst_n, .shift(nshift || lshift), .din(active), .dout(loop_out));
  end else begin : g_noloop
    assign loop_out = active;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      active <= '0;
    else if (nshift) active <= mem_data;
    else if (lshift) active <= loop_out;
  end

  assign data = active;

  a_one_shift: assert property (@(posedge clk) disable iff (!rst_n) !(nshift && lshift));
endmodule
