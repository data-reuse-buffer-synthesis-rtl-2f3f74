// tb_shift_reg: drives a register-based (depth 5) and a RAM-based (depth 40)
// delay line with the same random shift pattern and checks that each output
// equals the word that entered DEPTH shifts earlier, after the line is full.
`timescale 1ns/1ps
module tb_shift_reg;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = '0, dout_r, dout_m;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  shift_reg #(.W(8), .DEPTH(5),  .RAM_THRESH(16)) u_reg (.clk, .rst_n, .shift, .din, .dout(dout_r));
  shift_reg #(.W(8), .DEPTH(40), .RAM_THRESH(16)) u_ram (.clk, .rst_n, .shift, .din, .dout(dout_m));

  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // outputs reflect the history before this cycle's shift
      if (hist.size() >= 5)  begin checks++; if (dout_r != hist[hist.size()-5])  begin failures++; $display("FAIL reg t=%0d", t); end end
      if (hist.size() >= 40) begin checks++; if (dout_m != hist[hist.size()-40]) begin failures++; $display("FAIL ram t=%0d", t); end end
      shift = ($urandom_range(0, 3) != 0);
      din   = 8'($urandom);
      if (shift) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
