// tb_sobel_rw_ctrl: runs the read/write Sobel controller for a 5 x 7 image
// and compares every cycle with the domains worked out here: r = -1..4,
// c = -1..5 in lexicographic order; a shift in every iteration; a fetch of
// P[r+1][c+1] for r <= 3 only (row r = 4 shifts without reading);
// execution for 1 <= r <= 3, 1 <= c <= 5; a write-back of P[r][c-1] for
// 1 <= r <= 4, 1 <= c <= 5; done right after the 42nd iteration.
`timescale 1ns/1ps
module tb_sobel_rw_ctrl;
  localparam int R = 5, C = 7;
  localparam int AW = $clog2(R * C);
  logic clk = 0, rst_n = 0, start = 0, busy, done, shift, fetch, exec, store;
  logic [AW-1:0] fetch_addr, q_addr, store_addr;
  int checks = 0, failures = 0;
  sobel_rw_ctrl #(.ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); checks++;
      if (busy || shift || fetch || exec || store) begin failures++; $display("FAIL idle"); end
      start = 1; @(negedge clk); start = 0;
      for (int r = -1; r <= R-1; r++)
        for (int c = -1; c <= C-2; c++) begin
          automatic bit fe = (r <= R-2);
          automatic bit ex = (r >= 1 && r <= R-2 && c >= 1 && c <= C-2);
          automatic bit st = (r >= 1 && c >= 1);
          checks++;
          if (!busy || !shift || fetch != fe || (fe && int'(fetch_addr) != (r+1)*C + (c+1)) ||
              exec != ex || (ex && int'(q_addr) != r*C + c) ||
              store != st || (st && int'(store_addr) != r*C + c - 1)) begin
            failures++;
            $display("FAIL r=%0d c=%0d fetch=%0d exec=%0d store=%0d addr=%0d", r, c, fetch, exec, store, store_addr);
          end
          @(negedge clk);
        end
      checks++; if (!done || busy) begin failures++; $display("FAIL done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
