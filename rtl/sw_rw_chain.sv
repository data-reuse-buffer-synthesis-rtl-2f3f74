// sw_rw_chain: sliding-window reuse chain with constant distances whose
// taps may also be written by the datapath, for arrays that are read and
// modified in a stencil loop. It is sw_chain (tap registers separated by
// DIST[k]-1 word shift registers) with a multiplexer in front of every tap
// register: when `we[k]` is high the datapath's `wdata[k]` replaces the word
// at tap k, and that modified word is what travels on downstream. In the
// pipelined loop the write of one iteration falls in the same cycle as the
// shift of the next, so the word leaving tap k is `cur[k]`, the tap value
// with this cycle's write applied. Each array element passes every tap in
// order, so later taps see earlier modifications exactly as the sequential
// loop would. `cur` also serves the write-back: the controller stores
// cur[last write tap] to memory once an element has had its last write.
// A shift without a new word (the tail of the loop, pushing the last
// written elements up to the last write tap) simply shifts `din` in, which
// is then don't-care.
module sw_rw_chain #(
  parameter int unsigned W          = 8,
  parameter int unsigned NTAPS      = 8,
  parameter int unsigned DIST [NTAPS-1] = '{1, 1, 98, 2, 98, 1, 1},
  parameter int unsigned RAM_THRESH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  input  logic         we    [NTAPS],
  input  logic [W-1:0] wdata [NTAPS],
  output logic [W-1:0] taps  [NTAPS],
  output logic [W-1:0] cur   [NTAPS]
);
  logic [W-1:0] tap_q [NTAPS];

  for (genvar k = 0; k < int'(NTAPS); k++) begin : g_cur
    assign cur[k] = we[k] ? wdata[k] : tap_q[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     tap_q[0] <= '0;
    else if (shift) tap_q[0] <= din;
    else            tap_q[0] <= cur[0];
  end

  for (genvar k = 0; k < int'(NTAPS) - 1; k++) begin : g_seg
    logic [W-1:0] nxt;
    if (DIST[k] == 1) begin : g_direct
      assign nxt = cur[k];
    end else begin : g_sr
      shift_reg #(.W(W), .DEPTH(DIST[k] - 1), .RAM_THRESH(RAM_THRESH)) u_sr (
        .clk, .rst_n, .shift, .din(cur[k]), .dout(nxt));
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     tap_q[k+1] <= '0;
      else if (shift) tap_q[k+1] <= nxt;
      else            tap_q[k+1] <= cur[k+1];
    end
  end

  assign taps = tap_q;
endmodule
