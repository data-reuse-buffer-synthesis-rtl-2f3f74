// sobel_rect_top: generated design for the rectangular Sobel edge detector,
// 8-bit pixels, ROWS x COLS image (100 x 100 in the evaluation). Three parts
// as in the proposed architecture: the loop controller walks the extended
// iteration domain, a sliding-window reuse chain (distances 1, 1, COLS-2, 2,
// COLS-2, 1, 1; the two long ones RAM based) holds every pixel from its first
// to its last use, and the datapath computes one output per iteration.
// Every pixel is read from memory exactly once, one per cycle.
// Memory interface: `rd_en`/`rd_addr` read the input image from a synchronous
// memory that returns `rd_data` one cycle later; results leave through
// `wr_en`/`wr_addr`/`wr_data` (Q[r][c], row-major). Pipeline: iteration in
// cycle t, pixel arrives and shifts in t+1, datapath in t+2, write in t+3.
// A frame of ROWS*COLS iterations therefore takes ROWS*COLS + 3 cycles from
// `start` to the last write; `done` pulses with the last write.
module sobel_rect_top
  import rb_pkg::*;
#(
  parameter int unsigned ROWS       = 100,
  parameter int unsigned COLS       = 100,
  parameter int unsigned RAM_THRESH = 16,
  localparam int unsigned AW        = $clog2(ROWS * COLS)
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
  output pix_t          wr_data
);
  localparam int unsigned DIST [7] = '{1, 1, COLS - 2, 2, COLS - 2, 1, 1};

  logic          c_busy, c_done, c_fetch, c_exec;
  logic [AW-1:0] c_faddr, c_qaddr;
  logic          fetch_d1, exec_d1, exec_d2, done_d1, done_d2;
  logic [AW-1:0] qaddr_d1, qaddr_d2, qaddr_d3;
  pix_t          taps [8];
  sobel_win_t    win;
  logic          q_valid;

  sobel_rect_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n, .start, .busy(c_busy), .done(c_done), .fetch(c_fetch),
    .fetch_addr(c_faddr), .exec(c_exec), .q_addr(c_qaddr));

  assign rd_en   = c_fetch;
  assign rd_addr = c_faddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_d1 <= 1'b0; exec_d1 <= 1'b0; exec_d2 <= 1'b0;
      done_d1 <= 1'b0; done_d2 <= 1'b0;
      qaddr_d1 <= '0; qaddr_d2 <= '0; qaddr_d3 <= '0;
    end else begin
      fetch_d1 <= c_fetch;
      exec_d1  <= c_exec;   exec_d2  <= exec_d1;
      qaddr_d1 <= c_qaddr;  qaddr_d2 <= qaddr_d1;  qaddr_d3 <= qaddr_d2;
      done_d1  <= c_done;   done_d2  <= done_d1;
    end
  end

  sw_chain #(.W(PIX_W), .NTAPS(8), .DIST(DIST), .RAM_THRESH(RAM_THRESH)) u_buf (
    .clk, .rst_n, .shift(fetch_d1), .din(rd_data), .taps);

  assign win = '{p_dd: taps[0], p_d0: taps[1], p_dm: taps[2], p_0d: taps[3],
                 p_0m: taps[4], p_ud: taps[5], p_u0: taps[6], p_um: taps[7]};

  sobel_datapath u_dp (.clk, .rst_n, .exec(exec_d2), .win, .q(wr_data),
                       .q_valid);

  assign wr_en   = q_valid;
  assign wr_addr = qaddr_d3;
  assign busy    = c_busy || fetch_d1 || exec_d2 || q_valid;
  assign done    = done_d2;
endmodule
