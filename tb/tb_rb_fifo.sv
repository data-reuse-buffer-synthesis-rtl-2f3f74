// tb_rb_fifo: random pushes and pops against a queue model, including pops
// of a word pushed in the same cycle into an empty FIFO (bypass) and runs
// up to full. Checks the output word before every pop and the level.
`timescale 1ns/1ps
module tb_rb_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0, empty;
  logic [7:0] din = '0, dout;
  logic [3:0] level;
  logic [7:0] q [$];
  int checks = 0, failures = 0, bypasses = 0, fulls = 0;

  rb_fifo #(.W(8), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      din  = 8'($urandom);
      push = (q.size() < D) && ($urandom_range(0, 1) == 1);
      pop  = (q.size() > 0 || push) && ($urandom_range(0, 2) != 0);
      if (t % 400 < 40) pop = 0;                       // let it fill
      if (push) q.push_back(din);
      #1;
      checks++;
      if (int'(level) + (push ? 1 : 0) != q.size()) begin failures++; $display("FAIL level t=%0d", t); end
      if (pop) begin
        checks++;
        if (q.size() == 1 && push && level == 0) bypasses++;
        if (dout != q[0]) begin failures++; $display("FAIL data t=%0d %0h vs %0h", t, dout, q[0]); end
        void'(q.pop_front());
      end
      if (q.size() == D) fulls++;
    end
    @(negedge clk); push = 0; pop = 0; clr = 1; @(negedge clk); clr = 0; q.delete();
    checks++; if (!empty) begin failures++; $display("FAIL clr"); end
    checks++; if (bypasses == 0 || fulls == 0) begin failures++; $display("FAIL: bypass %0d full %0d", bypasses, fulls); end
    $display("bypasses %0d, full %0d times", bypasses, fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
