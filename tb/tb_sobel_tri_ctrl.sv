// tb_sobel_tri_ctrl: runs the triangular controller for N = 9 and checks it
// against control domains computed here from first principles: the data
// domain is the union of the 3x3 windows of the execute domain
// 1 <= r <= N-2, 1 <= c <= r-1; an iteration (r, c) fetches when
// P[r+1][c+1] is in it, pops tap 4 when P[r][c+1] is, pops tap 6 when
// P[r-1][c+1] is. The iterations walked must be exactly those with a fetch,
// in lexicographic order, and every execute iteration must be among them.
`timescale 1ns/1ps
module tb_sobel_tri_ctrl;
  localparam int N = 9;
  localparam int AW = $clog2(N * N);
  logic clk = 0, rst_n = 0, start = 0, busy, done, fetch, pop4, pop6, exec;
  logic [AW-1:0] fetch_addr, q_addr;
  bit dd [N][N];
  int checks = 0, failures = 0, n_exec = 0;
  sobel_tri_ctrl #(.N(N)) dut (.*);
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
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int r = -1; r <= N-1; r++)
      for (int c = -1; c <= N-1; c++) begin
        automatic bit ex = (r >= 1 && r <= N-2 && c >= 1 && c <= r-1);
        if (!in_dd(r+1, c+1)) begin
          if (ex) begin failures++; $display("FAIL: exec outside fetch domain"); end
          continue;
        end
        checks++;
        if (!busy || !fetch || int'(fetch_addr) != (r+1)*N + (c+1) || exec != ex ||
            pop4 != in_dd(r, c+1) || pop6 != in_dd(r-1, c+1) ||
            (ex && int'(q_addr) != r*N + c)) begin
          failures++;
          $display("FAIL r=%0d c=%0d addr=%0d exec=%0d pop4=%0d pop6=%0d", r, c, fetch_addr, exec, pop4, pop6);
        end
        n_exec += ex;
        @(negedge clk);
      end
    checks++; if (!done || busy) begin failures++; $display("FAIL done"); end
    checks++; if (n_exec != (N-2)*(N-3)/2) begin failures++; $display("FAIL exec count %0d", n_exec); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
