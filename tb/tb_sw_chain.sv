// tb_sw_chain: a four-tap chain with distances 1, 3 and 20 (the last one
// RAM based at threshold 16) under a random shift pattern. After every shift
// tap k must hold the word that entered at tap 0 (distance sum up to k)
// shifts earlier.
`timescale 1ns/1ps
module tb_sw_chain;
  localparam int unsigned DIST [3] = '{1, 3, 20};
  localparam int POS [4] = '{0, 1, 4, 24};
  logic clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = '0;
  logic [7:0] taps [4];
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  sw_chain #(.W(8), .NTAPS(4), .DIST(DIST), .RAM_THRESH(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++)
        if (hist.size() > POS[k]) begin
          checks++;
          if (taps[k] != hist[hist.size()-1-POS[k]]) begin failures++; $display("FAIL t=%0d tap %0d", t, k); end
        end
      shift = ($urandom_range(0, 4) != 0);
      din = 8'($urandom);
      if (shift) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
