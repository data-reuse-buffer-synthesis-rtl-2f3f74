// tb_sfn: sends irregular pulse trains through a suspend-first-3 block and
// checks that exactly the first three pulses after reset or `clr` are
// blocked and all later ones pass in the same cycle.
`timescale 1ns/1ps
module tb_sfn;
  logic clk = 0, rst_n = 0, clr = 0, pulse_i = 0, pulse_o;
  int checks = 0, failures = 0;
  sfn #(.N(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      automatic int seen = 0;
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        pulse_i = ($urandom_range(0, 2) == 0);
        #1;
        checks++;
        if (pulse_o != (pulse_i && seen >= 3)) begin failures++; $display("FAIL run %0d t %0d", run, t); end
        if (pulse_i) seen++;
      end
      @(negedge clk); pulse_i = 0; clr = 1; @(negedge clk); clr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
