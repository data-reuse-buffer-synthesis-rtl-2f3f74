// tb_reuse_buf_var: replays the access streams of an upper-triangular
// matrix product with N = 8 (loops i, j, k >= i): A[i][k] (nshift at j = 0,
// rbpush while j < N-1) and B[k][j] (nshift at i = 0, rbpush while k > i).
// Both have variable reuse distances. The active word one cycle after each
// iteration must equal memory[element]; iterations follow back to back, as
// in the pipelined designs.
`timescale 1ns/1ps
module tb_reuse_buf_var;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, clr = 0;
  logic an = 0, al = 0, ap = 0, bn = 0, bl = 0, bp = 0;
  logic [15:0] amd = '0, bmd = '0, adata, bdata;
  logic [$clog2(N)-1:0] alevel;
  logic [$clog2(N*N)-1:0] blevel;
  logic [15:0] amem [N*N], bmem [N*N];
  int checks = 0, failures = 0, expa [$], expb [$], maxb = 0;

  reuse_buf_var #(.W(16), .MAXDEPTH(N-1)) u_a (
    .clk, .rst_n, .clr, .nshift(an), .lshift(al), .rbpush(ap), .mem_data(amd),
    .data(adata), .level(alevel));
  reuse_buf_var #(.W(16), .MAXDEPTH(N*N-1)) u_b (
    .clk, .rst_n, .clr, .nshift(bn), .lshift(bl), .rbpush(bp), .mem_data(bmd),
    .data(bdata), .level(blevel));

  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // checker: one cycle after each iteration
  always @(negedge clk) if (rst_n) begin
    if (int'(blevel) > maxb) maxb = int'(blevel);
  end
  initial begin
    foreach (amem[n]) amem[n] = 16'($urandom);
    foreach (bmem[n]) bmem[n] = 16'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        for (int k = i; k < N; k++) begin
          an = (j == 0); al = !an; ap = (j < N-1);
          bn = (i == 0); bl = !bn; bp = (k > i);
          amd = an ? amem[i*N+k] : 16'hdead;
          bmd = bn ? bmem[k*N+j] : 16'hbeef;
          @(negedge clk);
          checks += 2;
          if (adata != amem[i*N+k]) begin failures++; $display("FAIL A %0d %0d %0d", i, j, k); end
          if (bdata != bmem[k*N+j]) begin failures++; $display("FAIL B %0d %0d %0d", i, j, k); end
        end
    {an, al, ap, bn, bl, bp} = '0;
    checks++;
    if (maxb == 0) begin failures++; $display("FAIL: B FIFO never used"); end
    $display("B FIFO peak %0d words", maxb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
