// tb_sobel_tri_buffer: feeds the triangular Sobel reuse chain for an
// N = 12 image with control signals derived here from the data domain (see
// tb_sobel_tri_ctrl), one iteration per cycle, and checks after every
// execute iteration that all eight taps show the right neighbours of
// P[r][c]. Two frames, separated by `clr`.
`timescale 1ns/1ps
module tb_sobel_tri_buffer;
  import rb_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0, clr = 0, fetch = 0, pop4 = 0, pop6 = 0;
  pix_t din = '0;
  sobel_win_t taps;
  logic [$clog2(N-3)-1:0] level34, level56;
  pix_t img [N][N];
  bit dd [N][N];
  int checks = 0, failures = 0;

  sobel_tri_buffer #(.FIFO_DEPTH(N-4)) dut (.*);
  always #5 clk = ~clk;

  function automatic bit in_dd(int i1, int i2);
    if (i1 < 0 || i1 >= N || i2 < 0 || i2 >= N) return 0;
    return dd[i1][i2];
  endfunction

  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 1; r <= N-2; r++)
      for (int c = 1; c <= r-1; c++)
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) dd[r+dr][c+dc] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      foreach (img[a, b]) img[a][b] = pix_t'($urandom);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      for (int r = -1; r <= N-1; r++)
        for (int c = -1; c <= N-1; c++) begin
          automatic bit ex = (r >= 1 && r <= N-2 && c >= 1 && c <= r-1);
          if (!in_dd(r+1, c+1)) continue;
          fetch = 1; din = img[r+1][c+1];
          pop4 = in_dd(r, c+1); pop6 = in_dd(r-1, c+1);
          @(negedge clk);
          {fetch, pop4, pop6} = '0;
          if (ex) begin
            checks++;
            if (taps.p_dd != img[r+1][c+1] || taps.p_d0 != img[r+1][c] || taps.p_dm != img[r+1][c-1] ||
                taps.p_0d != img[r][c+1]   || taps.p_0m != img[r][c-1]   ||
                taps.p_ud != img[r-1][c+1] || taps.p_u0 != img[r-1][c] || taps.p_um != img[r-1][c-1]) begin
              failures++; $display("FAIL window at r=%0d c=%0d", r, c);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
