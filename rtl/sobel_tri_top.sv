// sobel_tri_top: generated design for the triangular Sobel edge detector on
// an N x N image of 8-bit pixels (N = 100 in the evaluation): outputs are
// computed only for 1 <= r <= N-2, 1 <= c <= r-1. The reuse distances between
// the rows of the window vary with r, so the reuse chain carries two FIFOs
// (sobel_tri_buffer) and the loop controller drives fetch, pop4, pop6 and
// execute separately (sobel_tri_ctrl). Every pixel of the data domain is
// read exactly once and one iteration runs per cycle; for N = 100 that is
// 5145 iterations, and with the three-stage pipeline (memory read, buffer
// shift, datapath) the last result is written 5148 cycles after `start`.
// Memory interface and timing as in sobel_rect_top; the image is stored
// row-major with N pixels per row. `level34`/`level56` expose the FIFO
// occupancies for observation.
module sobel_tri_top
  import rb_pkg::*;
#(
  parameter int unsigned N          = 100,
  parameter int unsigned FIFO_DEPTH = N - 4,
  localparam int unsigned AW        = $clog2(N * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  pix_t          rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pix_t          wr_data,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] level34,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] level56
);
  logic          c_busy, c_done, c_fetch, c_pop4, c_pop6, c_exec;
  logic [AW-1:0] c_faddr, c_qaddr;
  logic          fetch_d1, pop4_d1, pop6_d1, exec_d1, exec_d2;
  logic          done_d1, done_d2;
  logic [AW-1:0] qaddr_d1, qaddr_d2, qaddr_d3;
  sobel_win_t    win;
  logic          q_valid;

  sobel_tri_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy(c_busy), .done(c_done), .fetch(c_fetch),
    .fetch_addr(c_faddr), .pop4(c_pop4), .pop6(c_pop6), .exec(c_exec),
    .q_addr(c_qaddr));

  assign rd_en   = c_fetch;
  assign rd_addr = c_faddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_d1 <= 1'b0; pop4_d1 <= 1'b0; pop6_d1 <= 1'b0;
      exec_d1 <= 1'b0; exec_d2 <= 1'b0; done_d1 <= 1'b0; done_d2 <= 1'b0;
      qaddr_d1 <= '0; qaddr_d2 <= '0; qaddr_d3 <= '0;
    end else begin
      fetch_d1 <= c_fetch; pop4_d1 <= c_pop4; pop6_d1 <= c_pop6;
      exec_d1  <= c_exec;  exec_d2 <= exec_d1;
      qaddr_d1 <= c_qaddr; qaddr_d2 <= qaddr_d1; qaddr_d3 <= qaddr_d2;
      done_d1  <= c_done;  done_d2 <= done_d1;
    end
  end

  sobel_tri_buffer #(.FIFO_DEPTH(FIFO_DEPTH)) u_buf (
    .clk, .rst_n, .clr(start && !c_busy), .fetch(fetch_d1), .din(rd_data),
    .pop4(pop4_d1), .pop6(pop6_d1), .taps(win), .level34, .level56);

  sobel_datapath u_dp (.clk, .rst_n, .exec(exec_d2), .win, .q(wr_data),
                       .q_valid);

  assign wr_en   = q_valid;
  assign wr_addr = qaddr_d3;
  assign busy    = c_busy || fetch_d1 || exec_d2 || q_valid;
  assign done    = done_d2;
endmodule
