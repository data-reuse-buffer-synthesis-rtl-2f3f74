// tb_corr_top: runs the correlation design (NI = 1000 offsets, NJ = 13 taps)
// on a random signal with the pulse planted at a known offset, then on a
// second random signal. Checks the maximum |correlation| and its offset
// against a direct computation, that every sample of A and B is read
// exactly once (1012 + 13 reads), and that the run takes NI*NJ iterations
// (done pulses NI*NJ + 2 cycles after start).
`timescale 1ns/1ps
module tb_corr_top;
  localparam int unsigned NI = 1000, NJ = 13, DW = 8, CW = 24;
  localparam int unsigned IW = $clog2(NI), JW = $clog2(NJ), AW = $clog2(NI + NJ - 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, a_rd_en, b_rd_en;
  logic [AW-1:0] a_rd_addr;
  logic [JW-1:0] b_rd_addr;
  logic [DW-1:0] a_rd_data, b_rd_data;
  logic [CW-1:0] max_corr;
  logic [IW-1:0] max_index;
  int checks = 0, failures = 0, cycle = 0, t_done = 0;
  logic signed [DW-1:0] A [NI+NJ-1], B [NJ];
  int a_cnt [NI+NJ-1], b_cnt [NJ];

  corr_top #(.NI(NI), .NJ(NJ)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    if (a_rd_en) begin a_rd_data <= A[a_rd_addr]; a_cnt[a_rd_addr]++; end
    if (b_rd_en) begin b_rd_data <= B[b_rd_addr]; b_cnt[b_rd_addr]++; end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int plant);
    int best = 0, best_i = 0, t_start;
    for (int j = 0; j < int'(NJ); j++) begin B[j] = DW'($urandom); b_cnt[j] = 0; end
    for (int n = 0; n < int'(NI+NJ-1); n++) begin A[n] = DW'($urandom_range(0, 31)) - 8'sd16; a_cnt[n] = 0; end
    if (plant >= 0) for (int j = 0; j < int'(NJ); j++) A[plant + j] = B[j];
    for (int i = 0; i < int'(NI); i++) begin
      int c = 0;
      for (int j = 0; j < int'(NJ); j++) c += int'(A[i+j]) * int'(B[j]);
      if (c < 0) c = -c;
      if (c > best) begin best = c; best_i = i; end
    end
    @(negedge clk); t_start = cycle; start = 1; @(negedge clk); start = 0;
    wait (done); t_done = cycle;
    @(negedge clk);
    checks += 3;
    if (int'(max_corr) != best) begin failures++; $display("FAIL: max %0d, expected %0d", max_corr, best); end
    if (int'(max_index) != best_i) begin failures++; $display("FAIL: index %0d, expected %0d", max_index, best_i); end
    if (t_done - t_start != int'(NI*NJ) + 2) begin failures++; $display("FAIL: latency %0d", t_done - t_start); end
    if (plant >= 0) begin
      checks++;
      if (int'(max_index) != plant) begin failures++; $display("FAIL: planted pulse at %0d not found", plant); end
    end
    for (int n = 0; n < int'(NI+NJ-1); n++) begin
      checks++; if (a_cnt[n] != 1) begin failures++; $display("FAIL: A[%0d] read %0d times", n, a_cnt[n]); end
    end
    for (int j = 0; j < int'(NJ); j++) begin
      checks++; if (b_cnt[j] != 1) begin failures++; $display("FAIL: B[%0d] read %0d times", j, b_cnt[j]); end
    end
    $display("run: max %0d at %0d, latency %0d cycles", max_corr, max_index, t_done - t_start);
  endtask

  initial begin
    a_rd_data = '0; b_rd_data = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(617);
    run(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
