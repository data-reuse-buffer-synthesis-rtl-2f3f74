// tb_sobel_tri_top: runs two 100 x 100 frames through the triangular Sobel
// design (outputs for 1 <= r <= 98, 1 <= c <= r-1). Checks every written
// pixel against a direct Sobel computation, that every output of the
// triangle is written exactly once, that exactly the pixels of the data
// domain (row i holds columns 0..L(i)-1, L(0) = 0, L(i) = min(i+2, 99)) are
// read, each once, that the frame takes 5145 iterations + 3 pipeline cycles,
// and that both reuse FIFOs filled up to exactly the N-4 words the domain
// analysis predicts (an overflow would trip the FIFO assertions).
`timescale 1ns/1ps
module tb_sobel_tri_top;
  import rb_pkg::*;
  import sobel_ref_pkg::*;
  localparam int unsigned N = 100;
  localparam int unsigned AW = $clog2(N * N);

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  pix_t rd_data, wr_data;
  logic [$clog2(N+1)-1:0] level34, level56;
  int checks = 0, failures = 0;
  byte unsigned img [N*N];
  int rd_count [N*N], wr_count [N*N];
  int cycle = 0, t_start = 0, t_last_wr = 0;
  int max34 = 0, max56 = 0;

  function automatic int sobel_at(int r, int c);
    win3_t p;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        p[dr+1][dc+1] = int'(img[(r+dr)*N + (c+dc)]);
    return sobel_ref(p);
  endfunction

  function automatic int row_len(int i);
    if (i <= 0) return 0;
    return (i + 2 > N - 1) ? N - 1 : i + 2;
  endfunction

  sobel_tri_top #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n) begin
    if (int'(level34) > max34) max34 = int'(level34);
    if (int'(level56) > max56) max56 = int'(level56);
    if (rd_en) begin
      rd_data <= img[rd_addr];
      rd_count[rd_addr]++;
    end
    if (wr_en) begin
      int r, c;
      r = int'(wr_addr) / N; c = int'(wr_addr) % N;
      wr_count[wr_addr]++;
      t_last_wr <= cycle;
      checks++;
      if (r < 1 || r > N-2 || c < 1 || c > r-1) begin
        failures++; $display("FAIL: write outside triangle at %0d,%0d", r, c);
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

  task automatic run_frame();
    int iters = 0;
    for (int i = 0; i < int'(N*N); i++) begin
      img[i] = byte'($urandom_range(0, 255));
      rd_count[i] = 0; wr_count[i] = 0;
    end
    for (int i = 0; i < int'(N); i++) iters += row_len(i);
    @(negedge clk); start = 1; t_start = cycle; @(negedge clk); start = 0;
    wait (done); @(posedge clk); @(negedge clk);
    checks++;
    if (t_last_wr - t_start != iters + 3) begin
      failures++; $display("FAIL: latency %0d, expected %0d", t_last_wr - t_start, iters + 3);
    end
    for (int i = 0; i < int'(N*N); i++) begin
      int r = i / N, c = i % N;
      bit inner = (r >= 1 && r <= N-2 && c >= 1 && c <= r-1);
      bit in_dd = (c < row_len(r));
      checks++;
      if (rd_count[i] != (in_dd ? 1 : 0)) begin failures++; $display("FAIL: pixel %0d,%0d read %0d times", r, c, rd_count[i]); end
      checks++;
      if (wr_count[i] != (inner ? 1 : 0)) begin failures++; $display("FAIL: output %0d,%0d written %0d times", r, c, wr_count[i]); end
    end
    $display("frame done: %0d iterations, latency %0d cycles, FIFO max %0d/%0d",
             iters, t_last_wr - t_start, max34, max56);
  endtask

  initial begin
    rd_data = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    run_frame();
    run_frame();
    checks++;
    // The occupancy bound from the domain analysis is N-4 words.
    if (max34 != int'(N) - 4 || max56 != int'(N) - 4) begin
      failures++; $display("FAIL: FIFO occupancy %0d/%0d", max34, max56);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
