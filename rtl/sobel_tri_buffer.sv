// sobel_tri_buffer: reuse chain of the triangular Sobel filter, where the
// rows of the data domain have different lengths and the two long reuse
// distances vary. The chain keeps the eight taps of the rectangular design
// but splits into three shift-register segments joined by two FIFOs:
//   segment A  taps 1-3 (P[r+1][c+1], P[r+1][c], P[r+1][c-1]), shifts on fetch
//   FIFO 3->4
//   segment B  tap 4 (P[r][c+1]), one inner stage, tap 5 (P[r][c-1]),
//              shifts on pop4
//   FIFO 5->6
//   segment C  taps 6-8 (P[r-1][c+1], P[r-1][c], P[r-1][c-1]), shifts on pop6
// All stages of a segment shift together with the pop (or fetch) that feeds
// it. A FIFO is pushed with the word leaving the upstream segment whenever
// that segment shifts, except for the first three shifts, which only flush
// start-up contents out of its three stages (sfn blocks). The FIFOs bypass a
// word pushed and popped in the same cycle. FIFO_DEPTH is the occupancy
// bound: for an N x N image both FIFOs peak at N-4 words (96 for N = 100),
// found by counting pushes minus pops over the loop nest.
// `clr` restarts the push suppression and empties the FIFOs for a new frame.
// `taps` is valid one cycle after the shifts.
module sobel_tri_buffer
  import rb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 96
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       fetch,
  input  pix_t       din,
  input  logic       pop4,
  input  logic       pop6,
  output sobel_win_t taps,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] level34,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] level56
);
  pix_t segA [3], segB [3], segC [3];
  pix_t f34_out, f56_out;
  logic push34, push56;

  sfn #(.N(3)) u_sf34 (.clk, .rst_n, .clr, .pulse_i(fetch), .pulse_o(push34));
  sfn #(.N(3)) u_sf56 (.clk, .rst_n, .clr, .pulse_i(pop4),  .pulse_o(push56));

  rb_fifo #(.W(PIX_W), .DEPTH(FIFO_DEPTH)) u_f34 (
    .clk, .rst_n, .clr, .push(push34), .din(segA[2]), .pop(pop4),
    .dout(f34_out), .empty(), .level(level34));
  rb_fifo #(.W(PIX_W), .DEPTH(FIFO_DEPTH)) u_f56 (
    .clk, .rst_n, .clr, .push(push56), .din(segB[2]), .pop(pop6),
    .dout(f56_out), .empty(), .level(level56));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      segA <= '{default: '0}; segB <= '{default: '0}; segC <= '{default: '0};
    end else begin
      if (fetch) segA <= '{din,     segA[0], segA[1]};
      if (pop4)  segB <= '{f34_out, segB[0], segB[1]};
      if (pop6)  segC <= '{f56_out, segC[0], segC[1]};
    end
  end

  assign taps = '{p_dd: segA[0], p_d0: segA[1], p_dm: segA[2],
                  p_0d: segB[0], p_0m: segB[2],
                  p_ud: segC[0], p_u0: segC[1], p_um: segC[2]};
endmodule
