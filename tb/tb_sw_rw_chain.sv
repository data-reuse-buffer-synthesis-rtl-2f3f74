// tb_sw_rw_chain: a four-tap read/write chain with distances 1, 3 and 20
// (the last one RAM based at threshold 16) under random shifts and random
// writes at every tap. The model is the chain as a plain array of word
// positions, tap k at position 0, 1, 4, 24: writes replace the word at a
// tap, then a shift moves every word one position on. Each cycle every
// filled tap must match the model, and `cur` must show the written word.
`timescale 1ns/1ps
module tb_sw_rw_chain;
  localparam int unsigned DIST [3] = '{1, 3, 20};
  localparam int POS [4] = '{0, 1, 4, 24};
  logic clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = '0;
  logic       we    [4];
  logic [7:0] wdata [4];
  logic [7:0] taps  [4];
  logic [7:0] cur   [4];
  logic [7:0] m [25];
  int filled = 0;
  int checks = 0, failures = 0;

  sw_rw_chain #(.W(8), .NTAPS(4), .DIST(DIST), .RAM_THRESH(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 4; k++) begin we[k] = 0; wdata[k] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++)
        if (filled > POS[k]) begin
          checks++;
          if (taps[k] != m[POS[k]]) begin failures++; $display("FAIL t=%0d tap %0d", t, k); end
        end
      for (int k = 0; k < 4; k++) begin
        we[k]    = (filled > POS[k]) && ($urandom_range(0, 3) == 0);
        wdata[k] = 8'($urandom);
        if (we[k]) m[POS[k]] = wdata[k];
      end
      #1;
      for (int k = 0; k < 4; k++)
        if (filled > POS[k]) begin
          checks++;
          if (cur[k] != m[POS[k]]) begin failures++; $display("FAIL t=%0d cur %0d", t, k); end
        end
      shift = ($urandom_range(0, 4) != 0);
      din = 8'($urandom);
      if (shift) begin
        for (int p = 24; p > 0; p--) m[p] = m[p-1];
        m[0] = din;
        filled++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
