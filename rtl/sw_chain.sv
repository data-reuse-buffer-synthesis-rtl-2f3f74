// sw_chain: read-only sliding-window reuse buffer with constant reuse
// distances (the template for stencil accesses). The reuse chain of array
// references maps one-to-one onto a chain of tap registers; between tap k and
// tap k+1 lies a delay of DIST[k] shifts, made of the tap register itself
// plus a shift_reg of DIST[k]-1 words (RAM based above RAM_THRESH words).
// On every cycle with `shift` high (one fetched word on `din`) all stages
// move together, so tap k+1 always holds the word that tap k held DIST[k]
// shifts earlier. Tap 0 is the head of the chain, fed from memory.
// The defaults are the Sobel chain for a 100-column image
// (1, 1, cols-2, 2, cols-2, 1, 1). `taps` is valid one cycle after a shift.
module sw_chain #(
  parameter int unsigned W          = 8,
  parameter int unsigned NTAPS      = 8,
  parameter int unsigned DIST [NTAPS-1] = '{1, 1, 98, 2, 98, 1, 1},
  parameter int unsigned RAM_THRESH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [NTAPS]
);
  logic [W-1:0] tap_q [NTAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     tap_q[0] <= '0;
    else if (shift) tap_q[0] <= din;
  end

  for (genvar k = 0; k < int'(NTAPS) - 1; k++) begin : g_seg
    logic [W-1:0] nxt;
    if (DIST[k] == 1) begin : g_direct
      assign nxt = tap_q[k];
    end else begin : g_sr
      shift_reg #(.W(W), .DEPTH(DIST[k] - 1), .RAM_THRESH(RAM_THRESH)) u_sr (
        .clk, .rst_n, .shift, .din(tap_q[k]), .dout(nxt));
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     tap_q[k+1] <= '0;
      else if (shift) tap_q[k+1] <= nxt;
    end
  end

  assign taps = tap_q;
endmodule
