// sobel_rw_top: sliding-window design with writes, for the modified Sobel
// filter of the read/write example: each iteration (r, c) computes
// Q[r][c] from the 3x3 window of P and then increments P[r+1][c-1] and
// P[r][c-1] (mod 256). The increment is this design's own choice of loop
// body; the method only names which two pixels are modified.
// How it works: the reuse chain is sw_rw_chain with the Sobel distances
// (1, 1, COLS-2, 2, COLS-2, 1, 1). Taps 2 (P[r+1][c-1]) and 4 (P[r][c-1])
// are write taps; the datapath's modified value replaces the tap word and
// travels on, so later taps see it as the sequential loop would. Tap 4 is
// the last write tap: modified pixels are written back to memory straight
// from it (not from the end of the chain). The controller runs one extra
// row of shifts without reads so the last image row, which is only written
// at tap 2, still reaches tap 4 (write iteration domain).
// Interface: `rd_*` read P from a synchronous memory (data one cycle after
// `rd_en`); `wr_*` write Q[r][c]; `pw_*` write modified P words back. The
// P read and P write ports may be two ports of one memory: every pixel is
// read more than COLS cycles before it is written back.
// Timing: iteration in cycle t, pixel shifts in at the end of t+1, the
// datapath reads the taps and writes taps 2/4 in t+2, Q and P writes in
// t+3. A frame takes (ROWS+1)*COLS iterations, (ROWS+1)*COLS + 3 cycles
// from `start` to the last write; `done` pulses with the last write.
module sobel_rw_top
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
  output pix_t          wr_data,
  output logic          pw_en,
  output logic [AW-1:0] pw_addr,
  output pix_t          pw_data
);
  localparam int unsigned DIST [7] = '{1, 1, COLS - 2, 2, COLS - 2, 1, 1};

  logic          c_busy, c_done, c_shift, c_fetch, c_exec, c_store;
  logic [AW-1:0] c_faddr, c_qaddr, c_saddr;
  logic          shift_d1, exec_d1, exec_d2, store_d1, store_d2;
  logic          done_d1, done_d2;
  logic [AW-1:0] qaddr_d1, qaddr_d2, qaddr_d3, saddr_d1, saddr_d2;
  pix_t          taps [8];
  pix_t          cur  [8];
  logic          we   [8];
  pix_t          wdata [8];
  sobel_win_t    win;
  logic          q_valid;

  sobel_rw_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n, .start, .busy(c_busy), .done(c_done), .shift(c_shift),
    .fetch(c_fetch), .fetch_addr(c_faddr), .exec(c_exec), .q_addr(c_qaddr),
    .store(c_store), .store_addr(c_saddr));

  assign rd_en   = c_fetch;
  assign rd_addr = c_faddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_d1 <= 1'b0; exec_d1 <= 1'b0; exec_d2 <= 1'b0;
      store_d1 <= 1'b0; store_d2 <= 1'b0; done_d1 <= 1'b0; done_d2 <= 1'b0;
      qaddr_d1 <= '0; qaddr_d2 <= '0; qaddr_d3 <= '0;
      saddr_d1 <= '0; saddr_d2 <= '0;
    end else begin
      shift_d1 <= c_shift;
      exec_d1  <= c_exec;   exec_d2  <= exec_d1;
      store_d1 <= c_store;  store_d2 <= store_d1;
      qaddr_d1 <= c_qaddr;  qaddr_d2 <= qaddr_d1;  qaddr_d3 <= qaddr_d2;
      saddr_d1 <= c_saddr;  saddr_d2 <= saddr_d1;
      done_d1  <= c_done;   done_d2  <= done_d1;
    end
  end

  // Loop body writes, in the datapath stage: P[r+1][c-1]++ and P[r][c-1]++.
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      we[k]    = 1'b0;
      wdata[k] = taps[k];
    end
    we[2]    = exec_d2;
    wdata[2] = taps[2] + 1'b1;
    we[4]    = exec_d2;
    wdata[4] = taps[4] + 1'b1;
  end

  sw_rw_chain #(.W(PIX_W), .NTAPS(8), .DIST(DIST), .RAM_THRESH(RAM_THRESH))
    u_buf (.clk, .rst_n, .shift(shift_d1), .din(rd_data), .we, .wdata,
           .taps, .cur);

  // Q is computed from the window as it was before this iteration's writes.
  assign win = '{p_dd: taps[0], p_d0: taps[1], p_dm: taps[2], p_0d: taps[3],
                 p_0m: taps[4], p_ud: taps[5], p_u0: taps[6], p_um: taps[7]};

  sobel_datapath u_dp (.clk, .rst_n, .exec(exec_d2), .win, .q(wr_data),
                       .q_valid);

  assign wr_en   = q_valid;
  assign wr_addr = qaddr_d3;

  // Write-back from the last write tap, including this cycle's write.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pw_en <= 1'b0; pw_addr <= '0; pw_data <= '0;
    end else begin
      pw_en   <= store_d2;
      pw_addr <= saddr_d2;
      pw_data <= cur[4];
    end
  end

  assign busy = c_busy || shift_d1 || exec_d2 || q_valid || pw_en;
  assign done = done_d2;
endmodule
