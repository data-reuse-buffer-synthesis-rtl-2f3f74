// tb_sobel_rw_top: runs 100 x 100 frames through the read/write Sobel
// design. P sits in one synchronous memory model that serves both the read
// port and the write-back port (reads see the old word). The expected
// result comes from executing the loop sequentially: for r = 1..ROWS-2,
// c = 1..COLS-2 compute Q[r][c] from the current P, then P[r+1][c-1]++ and
// P[r][c-1]++. Checks: every Q write against the reference, every Q and
// every P word written exactly once where it should be and nowhere else,
// the final P memory equal to the reference, every pixel read once and
// before it is written back, and the frame latency of (ROWS+1)*COLS + 3
// cycles. Two frames (random, then a ramp with wrap-around values).
`timescale 1ns/1ps
module tb_sobel_rw_top;
  import rb_pkg::*;
  import sobel_ref_pkg::*;
  localparam int unsigned ROWS = 100, COLS = 100;
  localparam int unsigned AW = $clog2(ROWS * COLS);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, wr_en, pw_en;
  logic [AW-1:0] rd_addr, wr_addr, pw_addr;
  pix_t rd_data, wr_data, pw_data;
  int checks = 0, failures = 0;
  byte unsigned pmem [ROWS*COLS];
  byte unsigned pref [ROWS*COLS];
  int qexp [ROWS*COLS];
  int rd_count [ROWS*COLS], wr_count [ROWS*COLS], pw_count [ROWS*COLS];
  int cycle = 0, t_start = 0, t_last_wr = 0;

  sobel_rw_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      rd_data <= pmem[rd_addr];
      rd_count[rd_addr]++;
      checks++;
      if (pw_count[rd_addr] != 0) begin
        failures++; $display("FAIL: pixel %0d read after write-back", rd_addr);
      end
    end
    if (pw_en) begin
      int r, c;
      r = int'(pw_addr) / COLS; c = int'(pw_addr) % COLS;
      pmem[pw_addr] <= pw_data;
      pw_count[pw_addr]++;
      t_last_wr <= cycle;
      checks++;
      if (r < 1 || c > COLS-3) begin
        failures++; $display("FAIL: P write-back outside write domain at %0d,%0d", r, c);
      end
    end
    if (wr_en) begin
      int r, c;
      r = int'(wr_addr) / COLS; c = int'(wr_addr) % COLS;
      wr_count[wr_addr]++;
      t_last_wr <= cycle;
      checks++;
      if (r < 1 || r > ROWS-2 || c < 1 || c > COLS-2) begin
        failures++; $display("FAIL: Q write outside interior at %0d,%0d", r, c);
      end else if (int'(wr_data) != qexp[wr_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL: Q[%0d][%0d]=%0d expected %0d", r, c, wr_data, qexp[wr_addr]);
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

  task automatic reference();
    win3_t p;
    for (int i = 0; i < int'(ROWS*COLS); i++) begin
      pref[i] = pmem[i]; qexp[i] = -1;
    end
    for (int r = 1; r <= int'(ROWS) - 2; r++)
      for (int c = 1; c <= int'(COLS) - 2; c++) begin
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            p[dr+1][dc+1] = int'(pref[(r+dr)*COLS + (c+dc)]);
        qexp[r*COLS + c] = sobel_ref(p);
        pref[(r+1)*COLS + c-1] = pref[(r+1)*COLS + c-1] + 8'd1;
        pref[r*COLS + c-1]     = pref[r*COLS + c-1] + 8'd1;
      end
  endtask

  task automatic run_frame(input int seed_mode);
    int bad;
    for (int i = 0; i < int'(ROWS*COLS); i++) begin
      pmem[i] = (seed_mode == 0) ? byte'($urandom_range(0, 255))
                                 : byte'(250 + (i % COLS) + (i / COLS));
      rd_count[i] = 0; wr_count[i] = 0; pw_count[i] = 0;
    end
    reference();
    @(negedge clk); start = 1; t_start = cycle; @(negedge clk); start = 0;
    wait (done); @(posedge clk); @(negedge clk);
    checks++;
    if (t_last_wr - t_start != int'((ROWS+1)*COLS) + 3) begin
      failures++; $display("FAIL: latency %0d, expected %0d", t_last_wr - t_start, (ROWS+1)*COLS + 3);
    end
    bad = 0;
    for (int i = 0; i < int'(ROWS*COLS); i++) begin
      int r, c;
      bit inner, wdom;
      r = i / COLS; c = i % COLS;
      inner = (r >= 1 && r <= ROWS-2 && c >= 1 && c <= COLS-2);
      wdom  = (r >= 1 && c <= COLS-3);
      checks++;
      if (rd_count[i] != 1) begin failures++; $display("FAIL: pixel %0d read %0d times", i, rd_count[i]); end
      checks++;
      if (wr_count[i] != (inner ? 1 : 0)) begin failures++; $display("FAIL: Q %0d written %0d times", i, wr_count[i]); end
      checks++;
      if (pw_count[i] != (wdom ? 1 : 0)) begin failures++; $display("FAIL: P %0d written back %0d times", i, pw_count[i]); end
      checks++;
      if (pmem[i] != pref[i]) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL: P[%0d][%0d]=%0d expected %0d", r, c, pmem[i], pref[i]);
      end
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
