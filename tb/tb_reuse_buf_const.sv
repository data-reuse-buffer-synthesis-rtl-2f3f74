// tb_reuse_buf_const: replays the access stream of A[i+j] in a correlation
// with 6 taps (reuse distance 5) and of B[j] (distance 6), with idle cycles
// in between. nshift is raised at an element's first use, lshift otherwise;
// the active word one cycle later must equal memory[element]. Also checks
// that only first uses read memory (NI+NJ-1 and NJ reads).
`timescale 1ns/1ps
module tb_reuse_buf_const;
  localparam int NI = 40, NJ = 6;
  logic clk = 0, rst_n = 0;
  logic an = 0, al = 0, bn = 0, bl = 0;
  logic [15:0] amd = '0, bmd = '0, adata, bdata;
  logic [15:0] amem [NI+NJ-1], bmem [NJ];
  int checks = 0, failures = 0, areads = 0, breads = 0;

  reuse_buf_const #(.W(16), .DIST(NJ-1), .RAM_THRESH(16)) u_a (
    .clk, .rst_n, .nshift(an), .lshift(al), .mem_data(amd), .data(adata));
  reuse_buf_const #(.W(16), .DIST(NJ), .RAM_THRESH(2)) u_b (
    .clk, .rst_n, .nshift(bn), .lshift(bl), .mem_data(bmd), .data(bdata));

  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (amem[n]) amem[n] = 16'($urandom);
    foreach (bmem[n]) bmem[n] = 16'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NI; i++)
      for (int j = 0; j < NJ; j++) begin
        @(negedge clk);
        an = (i == 0) || (j == NJ-1); al = !an;
        bn = (i == 0);                bl = !bn;
        amd = an ? amem[i+j] : 16'hdead; bmd = bn ? bmem[j] : 16'hbeef;
        areads += an; breads += bn;
        @(negedge clk);
        {an, al, bn, bl} = '0;
        checks += 2;
        if (adata != amem[i+j]) begin failures++; $display("FAIL A i=%0d j=%0d", i, j); end
        if (bdata != bmem[j])   begin failures++; $display("FAIL B i=%0d j=%0d", i, j); end
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // idle cycle
      end
    checks++;
    if (areads != NI+NJ-1 || breads != NJ) begin failures++; $display("FAIL reads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
