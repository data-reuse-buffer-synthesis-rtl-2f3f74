// tb_reuse_top: end-to-end run of all six accelerators at their full
// evaluation sizes, started together. Each has its own memory model with a
// one-cycle read latency. Checks every output against a direct computation
// in this testbench, the cycle count of each run, and that each mechanism
// of the reuse buffers actually happened, counted from the memory traffic:
//   prefetch    Sobel iterations that only fill the chain (reads without
//               a result)
//   fifo        the triangular Sobel FIFOs holding words
//   reuse       iterations served from a reuse buffer instead of memory
//               (correlation, both matrix products)
//   store       Q elements written back once after their last update
//   write tap   pixels modified inside the read/write Sobel chain and
//               written back from its last write tap
//   shift only  read/write Sobel iterations that shift the chain without
//               a memory read, to bring the last row to the write tap
`timescale 1ns/1ps
module tb_reuse_top;
  import rb_pkg::*;
  import sobel_ref_pkg::*;
  localparam int unsigned SN = 100, NI = 1000, NJ = 13, MN = 100;

  logic clk = 0, rst_n = 0;
  logic sr_start = 0, st_start = 0, co_start = 0, mm_start = 0, mt_start = 0;
  logic sr_busy, sr_done, sr_rd_en, sr_wr_en, st_busy, st_done, st_rd_en, st_wr_en;
  logic [13:0] sr_rd_addr, sr_wr_addr, st_rd_addr, st_wr_addr;
  pix_t sr_rd_data, sr_wr_data, st_rd_data, st_wr_data;
  logic [6:0] st_level34, st_level56;
  logic rw_start = 0, rw_busy, rw_done, rw_rd_en, rw_wr_en, rw_pw_en;
  logic [13:0] rw_rd_addr, rw_wr_addr, rw_pw_addr;
  pix_t rw_rd_data, rw_wr_data, rw_pw_data;
  logic co_busy, co_done, co_a_rd_en, co_b_rd_en;
  logic [9:0] co_a_rd_addr;
  logic [3:0] co_b_rd_addr;
  logic [7:0] co_a_rd_data, co_b_rd_data;
  logic [23:0] co_max_corr;
  logic [9:0] co_max_index;
  logic mm_busy, mm_done, mm_a_rd_en, mm_b_rd_en, mm_q_wr_en;
  logic mt_busy, mt_done, mt_a_rd_en, mt_b_rd_en, mt_q_wr_en;
  logic [13:0] mm_a_rd_addr, mm_b_rd_addr, mm_q_wr_addr, mt_a_rd_addr, mt_b_rd_addr, mt_q_wr_addr;
  logic [15:0] mm_a_rd_data, mm_b_rd_data, mt_a_rd_data, mt_b_rd_data;
  logic [39:0] mm_q_wr_data, mt_q_wr_data;

  reuse_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  byte unsigned img [SN*SN];
  byte unsigned rwmem [SN*SN], rwref [SN*SN];
  int rwq [SN*SN];
  int rw_rd = 0, rw_wr = 0, rw_pw = 0, rw_mod = 0, t_rw = 0;
  logic signed [7:0] ca [NI+NJ-1], cb [NJ];
  logic signed [15:0] ma [MN*MN], mb [MN*MN];
  // traffic counters
  int sr_rd = 0, sr_wr = 0, st_rd = 0, st_wr = 0, co_rd = 0, mm_rd = 0, mt_rd = 0;
  int mm_st = 0, mt_st = 0, st_fifo_max = 0;
  int t_sr = 0, t_st = 0, t_co = 0, t_mm = 0, t_mt = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int sobel_at(int r, int c);
    win3_t p;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        p[dr+1][dc+1] = int'(img[(r+dr)*SN + (c+dc)]);
    return sobel_ref(p);
  endfunction

  function automatic logic signed [39:0] mm_ref(int i, int j, bit is_tri);
    logic signed [39:0] s = 0;
    for (int k = is_tri ? i : 0; k < int'(MN); k++) s += 40'(ma[i*MN+k] * mb[k*MN+j]);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sr_rd_en) begin sr_rd_data <= img[sr_rd_addr]; sr_rd++; end
    if (st_rd_en) begin st_rd_data <= img[st_rd_addr]; st_rd++; end
    if (co_a_rd_en) begin co_a_rd_data <= ca[co_a_rd_addr]; co_rd++; end
    if (co_b_rd_en) begin co_b_rd_data <= cb[co_b_rd_addr]; co_rd++; end
    if (mm_a_rd_en) begin mm_a_rd_data <= ma[mm_a_rd_addr]; mm_rd++; end
    if (mm_b_rd_en) begin mm_b_rd_data <= mb[mm_b_rd_addr]; mm_rd++; end
    if (mt_a_rd_en) begin mt_a_rd_data <= ma[mt_a_rd_addr]; mt_rd++; end
    if (mt_b_rd_en) begin mt_b_rd_data <= mb[mt_b_rd_addr]; mt_rd++; end
    if (rw_rd_en) begin rw_rd_data <= rwmem[rw_rd_addr]; rw_rd++; end
    if (rw_pw_en) begin
      rwmem[rw_pw_addr] <= rw_pw_data; rw_pw++; t_rw = cycle;
      if (rw_pw_data != img[rw_pw_addr]) rw_mod++;
    end
    if (rw_wr_en) begin
      rw_wr++; t_rw = cycle;
      check(int'(rw_wr_data) == rwq[rw_wr_addr], "read/write Sobel output");
    end
    if (int'(st_level34) > st_fifo_max) st_fifo_max = int'(st_level34);
    if (int'(st_level56) > st_fifo_max) st_fifo_max = int'(st_level56);
    if (sr_wr_en) begin
      sr_wr++; t_sr = cycle;
      check(int'(sr_wr_data) == sobel_at(int'(sr_wr_addr) / SN, int'(sr_wr_addr) % SN), "rect Sobel output");
    end
    if (st_wr_en) begin
      st_wr++; t_st = cycle;
      check(int'(st_wr_data) == sobel_at(int'(st_wr_addr) / SN, int'(st_wr_addr) % SN), "tri Sobel output");
    end
    if (mm_q_wr_en) begin
      mm_st++; t_mm = cycle;
      check(mm_q_wr_data == mm_ref(int'(mm_q_wr_addr) / MN, int'(mm_q_wr_addr) % MN, 0), "matmul Q");
    end
    if (mt_q_wr_en) begin
      mt_st++; t_mt = cycle;
      check(mt_q_wr_data == mm_ref(int'(mt_q_wr_addr) / MN, int'(mt_q_wr_addr) % MN, 1), "tri matmul Q");
    end
    if (co_done) t_co = cycle;
  end

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, best_i, t0;
    best = 0; best_i = 0;
    for (int i = 0; i < int'(SN*SN); i++) img[i] = byte'($urandom);
    // read/write Sobel: sequential loop as reference
    for (int i = 0; i < int'(SN*SN); i++) begin rwmem[i] = img[i]; rwref[i] = img[i]; rwq[i] = -1; end
    for (int r = 1; r <= int'(SN) - 2; r++)
      for (int c = 1; c <= int'(SN) - 2; c++) begin
        win3_t p;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            p[dr+1][dc+1] = int'(rwref[(r+dr)*SN + (c+dc)]);
        rwq[r*SN + c] = sobel_ref(p);
        rwref[(r+1)*SN + c-1] = rwref[(r+1)*SN + c-1] + 8'd1;
        rwref[r*SN + c-1]     = rwref[r*SN + c-1] + 8'd1;
      end
    for (int j = 0; j < int'(NJ); j++) cb[j] = 8'($urandom);
    for (int n = 0; n < int'(NI+NJ-1); n++) ca[n] = 8'($urandom_range(0, 63)) - 8'sd32;
    for (int i = 0; i < int'(MN*MN); i++) begin
      ma[i] = 16'($urandom); mb[i] = 16'($urandom);
      if ((i % MN) < (i / MN)) ma[i] = '0;
    end
    for (int i = 0; i < int'(NI); i++) begin
      int c;
      c = 0;
      for (int j = 0; j < int'(NJ); j++) c += int'(ca[i+j]) * int'(cb[j]);
      if (c < 0) c = -c;
      if (c > best) begin best = c; best_i = i; end
    end
    {sr_rd_data, st_rd_data, rw_rd_data, co_a_rd_data, co_b_rd_data} = '0;
    {mm_a_rd_data, mm_b_rd_data, mt_a_rd_data, mt_b_rd_data} = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    t0 = cycle; {sr_start, st_start, rw_start, co_start, mm_start, mt_start} = '1;
    @(negedge clk);
    {sr_start, st_start, rw_start, co_start, mm_start, mt_start} = '0;
    wait (!sr_busy && !st_busy && !rw_busy && !co_busy && !mm_busy && !mt_busy);
    repeat (2) @(negedge clk);

    check(co_max_corr == 24'(best) && co_max_index == 10'(best_i), $sformatf("correlation maximum %0d@%0d, expected %0d@%0d", co_max_corr, co_max_index, best, best_i));
    check(sr_wr == 98*98 && t_sr - t0 == 10000 + 3, "rect Sobel count/latency");
    check(st_wr == 98*97/2 && t_st - t0 == 5145 + 3, "tri Sobel count/latency");
    check(rw_wr == 98*98 && t_rw - t0 == 10100 + 3, "read/write Sobel count/latency");
    check(rw_rd == 10000 && rw_pw == 99*98, "read/write Sobel reads and write-backs");
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < int'(SN*SN); i++) if (rwmem[i] != rwref[i]) bad++;
      check(bad == 0, $sformatf("read/write Sobel P memory, %0d words wrong", bad));
    end
    check(t_co - t0 == 13000 + 2, "correlation latency");
    check(mm_st == 10000 && t_mm - t0 == 1000000 + 2, "matmul count/latency");
    check(mt_st == 10000 && t_mt - t0 == 505000 + 2, "tri matmul count/latency");
    check(sr_rd == 10000 && st_rd == 5145, "Sobel pixel reads");
    check(co_rd == 1012 + 13 && mm_rd == 20000 && mt_rd == 15050, "single-access-function reads");

    // mechanism counts
    $display("prefetch iterations: rect %0d, tri %0d", sr_rd - sr_wr, st_rd - st_wr);
    $display("tri Sobel FIFO peak occupancy: %0d", st_fifo_max);
    $display("reuse buffer hits: corr %0d, matmul %0d, tri matmul %0d",
             2*13000 - co_rd, 2*1000000 - mm_rd, 2*505000 - mt_rd);
    $display("Q stores: matmul %0d, tri matmul %0d", mm_st, mt_st);
    $display("read/write Sobel: %0d write-backs, %0d of them modified words, %0d shift-only iterations",
             rw_pw, rw_mod, (t_rw - t0 - 3) - rw_rd);
    check(rw_mod > 0 && (t_rw - t0 - 3) - rw_rd == 100, "write taps and shift-only iterations happened");
    check(sr_rd - sr_wr > 0 && st_rd - st_wr > 0, "prefetch happened");
    check(st_fifo_max > 0, "FIFO storage used");
    check(2*13000 - co_rd > 0 && 2*1000000 - mm_rd > 0 && 2*505000 - mt_rd > 0, "reuse happened");
    check(mm_st > 0 && mt_st > 0, "stores happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
