// tb_sobel_rect_top: runs one 100 x 100 frame through the rectangular Sobel
// design. A random image sits in a synchronous memory model (one-cycle read
// latency). Checks: every written pixel against a direct Sobel computation
// of the image, every output of the 98 x 98 interior written exactly once,
// every input pixel read exactly once, one iteration per cycle (last write
// ROWS*COLS + 3 cycles after start) and a second frame after the first.
`timescale 1ns/1ps
module tb_sobel_rect_top;
  import rb_pkg::*;
  import sobel_ref_pkg::*;
  localparam int unsigned ROWS = 100, COLS = 100;
  localparam int unsigned AW = $clog2(ROWS * COLS);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  pix_t rd_data, wr_data;
  int checks = 0, failures = 0;
  byte unsigned img [ROWS*COLS];
  int rd_count [ROWS*COLS], wr_count [ROWS*COLS];
  int cycle = 0, t_start = 0, t_last_wr = 0;

  function automatic int sobel_at(int r, int c);
    win3_t p;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        p[dr+1][dc+1] = int'(img[(r+dr)*COLS + (c+dc)]);
    return sobel_ref(p);
  endfunction

  sobel_rect_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      rd_data <= img[rd_addr];
      rd_count[rd_addr]++;
    end
    if (wr_en) begin
      int r, c;
      r = int'(wr_addr) / COLS; c = int'(wr_addr) % COLS;
      wr_count[wr_addr]++;
      t_last_wr <= cycle;
      checks++;
      if (r < 1 || r > ROWS-2 || c < 1 || c > COLS-2) begin
        failures++; $display("FAIL: write outside interior at %0d,%0d", r, c);
      end else if (int'(wr_data) != sobel_at(r, c)) begin
        failures++;
        if (failures < 10) $display("FAIL: Q[%0d][%0d]=%0d expected %0d", r, c, wr_data, sobel_at(r, c));
      end
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int seed_mode);
    for (int i = 0; i < int'(ROWS*COLS); i++) begin
      img[i] = (seed_mode == 0) ? byte'($urandom_range(0, 255))
                                : byte'(((i % COLS) * 7 + (i / COLS) * 3) % 256);
      rd_count[i] = 0; wr_count[i] = 0;
    end
    @(negedge clk); start = 1; t_start = cycle; @(negedge clk); start = 0;
    wait (done); @(posedge clk); @(negedge clk);
    checks++;
    if (t_last_wr - t_start != int'(ROWS*COLS) + 3) begin
      failures++; $display("FAIL: latency %0d, expected %0d", t_last_wr - t_start, ROWS*COLS + 3);
    end
    for (int i = 0; i < int'(ROWS*COLS); i++) begin
      int r = i / COLS, c = i % COLS;
      bit inner = (r >= 1 && r <= ROWS-2 && c >= 1 && c <= COLS-2);
      checks++;
      if (rd_count[i] != 1) begin failures++; $display("FAIL: pixel %0d read %0d times", i, rd_count[i]); end
      checks++;
      if (wr_count[i] != (inner ? 1 : 0)) begin failures++; $display("FAIL: output %0d written %0d times", i, wr_count[i]); end
    end
    $display("frame done: latency %0d cycles", t_last_wr - t_start);
  endtask

  initial begin

    rd_data = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run_frame(0);
    run_frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
