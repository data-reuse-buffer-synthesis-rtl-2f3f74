// reuse_top: the six generated accelerators of the evaluation, side by
// side, each with its own start/done and its own external-memory ports.
// They share nothing but the clock and reset; each is a complete instance of
// the proposed architecture (loop controller, data reuse buffers, datapath):
//   sr_*  rectangular Sobel edge detector, 100 x 100 image, constant-distance
//         sliding-window chain
//   st_*  triangular Sobel edge detector, 100 x 100 image, sliding-window
//         chain with two FIFOs for the variable distances
//   rw_*  modified Sobel that also increments P[r+1][c-1] and P[r][c-1],
//         100 x 100 image, sliding-window chain with write taps; `rw_pw_*`
//         writes the modified pixels back
//   co_*  correlation of a 1012-sample signal with a 13-sample pulse,
//         constant-distance single-access-function buffers
//   mm_*  100 x 100 matrix multiplication, constant-distance buffers
//   mt_*  100 x 100 matrix multiplication with upper-triangular A,
//         variable-distance buffers
// Every memory port reads with a one-cycle latency; see each design for
// its timing.
module reuse_top
  import rb_pkg::*;
#(
  parameter int unsigned SOBEL_N = 100,
  parameter int unsigned CORR_NI = 1000,
  parameter int unsigned CORR_NJ = 13,
  parameter int unsigned MM_N    = 100,
  localparam int unsigned SAW    = $clog2(SOBEL_N * SOBEL_N),
  localparam int unsigned CAW    = $clog2(CORR_NI + CORR_NJ - 1),
  localparam int unsigned CJW    = $clog2(CORR_NJ),
  localparam int unsigned CIW    = $clog2(CORR_NI),
  localparam int unsigned MAW    = $clog2(MM_N * MM_N),
  localparam int unsigned FLW    = $clog2(SOBEL_N - 3)
) (
  input  logic           clk,
  input  logic           rst_n,
  // rectangular Sobel
  input  logic           sr_start,
  output logic           sr_busy,
  output logic           sr_done,
  output logic           sr_rd_en,
  output logic [SAW-1:0] sr_rd_addr,
  input  pix_t           sr_rd_data,
  output logic           sr_wr_en,
  output logic [SAW-1:0] sr_wr_addr,
  output pix_t           sr_wr_data,
  // triangular Sobel
  input  logic           st_start,
  output logic           st_busy,
  output logic           st_done,
  output logic           st_rd_en,
  output logic [SAW-1:0] st_rd_addr,
  input  pix_t           st_rd_data,
  output logic           st_wr_en,
  output logic [SAW-1:0] st_wr_addr,
  output pix_t           st_wr_data,
  output logic [FLW-1:0] st_level34,
  output logic [FLW-1:0] st_level56,
  // read/write Sobel
  input  logic           rw_start,
  output logic           rw_busy,
  output logic           rw_done,
  output logic           rw_rd_en,
  output logic [SAW-1:0] rw_rd_addr,
  input  pix_t           rw_rd_data,
  output logic           rw_wr_en,
  output logic [SAW-1:0] rw_wr_addr,
  output pix_t           rw_wr_data,
  output logic           rw_pw_en,
  output logic [SAW-1:0] rw_pw_addr,
  output pix_t           rw_pw_data,
  // correlation
  input  logic           co_start,
  output logic           co_busy,
  output logic           co_done,
  output logic           co_a_rd_en,
  output logic [CAW-1:0] co_a_rd_addr,
  input  logic [7:0]     co_a_rd_data,
  output logic           co_b_rd_en,
  output logic [CJW-1:0] co_b_rd_addr,
  input  logic [7:0]     co_b_rd_data,
  output logic [23:0]    co_max_corr,
  output logic [CIW-1:0] co_max_index,
  // rectangular matrix multiplication
  input  logic           mm_start,
  output logic           mm_busy,
  output logic           mm_done,
  output logic           mm_a_rd_en,
  output logic [MAW-1:0] mm_a_rd_addr,
  input  logic [15:0]    mm_a_rd_data,
  output logic           mm_b_rd_en,
  output logic [MAW-1:0] mm_b_rd_addr,
  input  logic [15:0]    mm_b_rd_data,
  output logic           mm_q_wr_en,
  output logic [MAW-1:0] mm_q_wr_addr,
  output logic [39:0]    mm_q_wr_data,
  // triangular matrix multiplication
  input  logic           mt_start,
  output logic           mt_busy,
  output logic           mt_done,
  output logic           mt_a_rd_en,
  output logic [MAW-1:0] mt_a_rd_addr,
  input  logic [15:0]    mt_a_rd_data,
  output logic           mt_b_rd_en,
  output logic [MAW-1:0] mt_b_rd_addr,
  input  logic [15:0]    mt_b_rd_data,
  output logic           mt_q_wr_en,
  output logic [MAW-1:0] mt_q_wr_addr,
  output logic [39:0]    mt_q_wr_data
);
  sobel_rect_top #(.ROWS(SOBEL_N), .COLS(SOBEL_N)) u_sobel_rect (
    .clk, .rst_n, .start(sr_start), .busy(sr_busy), .done(sr_done),
    .rd_en(sr_rd_en), .rd_addr(sr_rd_addr), .rd_data(sr_rd_data),
    .wr_en(sr_wr_en), .wr_addr(sr_wr_addr), .wr_data(sr_wr_data));

  sobel_tri_top #(.N(SOBEL_N)) u_sobel_tri (
    .clk, .rst_n, .start(st_start), .busy(st_busy), .done(st_done),
    .rd_en(st_rd_en), .rd_addr(st_rd_addr), .rd_data(st_rd_data),
    .wr_en(st_wr_en), .wr_addr(st_wr_addr), .wr_data(st_wr_data),
    .level34(st_level34), .level56(st_level56));

  sobel_rw_top #(.ROWS(SOBEL_N), .COLS(SOBEL_N)) u_sobel_rw (
    .clk, .rst_n, .start(rw_start), .busy(rw_busy), .done(rw_done),
    .rd_en(rw_rd_en), .rd_addr(rw_rd_addr), .rd_data(rw_rd_data),
    .wr_en(rw_wr_en), .wr_addr(rw_wr_addr), .wr_data(rw_wr_data),
    .pw_en(rw_pw_en), .pw_addr(rw_pw_addr), .pw_data(rw_pw_data));

  corr_top #(.NI(CORR_NI), .NJ(CORR_NJ), .DW(8), .CW(24)) u_corr (
    .clk, .rst_n, .start(co_start), .busy(co_busy), .done(co_done),
    .a_rd_en(co_a_rd_en), .a_rd_addr(co_a_rd_addr), .a_rd_data(co_a_rd_data),
    .b_rd_en(co_b_rd_en), .b_rd_addr(co_b_rd_addr), .b_rd_data(co_b_rd_data),
    .max_corr(co_max_corr), .max_index(co_max_index));

  matmul_top #(.N(MM_N), .TRIANGULAR(1'b0), .DW(16), .QW(40)) u_matmul (
    .clk, .rst_n, .start(mm_start), .busy(mm_busy), .done(mm_done),
    .a_rd_en(mm_a_rd_en), .a_rd_addr(mm_a_rd_addr), .a_rd_data(mm_a_rd_data),
    .b_rd_en(mm_b_rd_en), .b_rd_addr(mm_b_rd_addr), .b_rd_data(mm_b_rd_data),
    .q_wr_en(mm_q_wr_en), .q_wr_addr(mm_q_wr_addr), .q_wr_data(mm_q_wr_data));

  matmul_top #(.N(MM_N), .TRIANGULAR(1'b1), .DW(16), .QW(40)) u_matmul_tri (
    .clk, .rst_n, .start(mt_start), .busy(mt_busy), .done(mt_done),
    .a_rd_en(mt_a_rd_en), .a_rd_addr(mt_a_rd_addr), .a_rd_data(mt_a_rd_data),
    .b_rd_en(mt_b_rd_en), .b_rd_addr(mt_b_rd_addr), .b_rd_data(mt_b_rd_data),
    .q_wr_en(mt_q_wr_en), .q_wr_addr(mt_q_wr_addr), .q_wr_data(mt_q_wr_data));
endmodule
