// tb_sobel_rect_ctrl: runs the rectangular controller for a 5 x 7 image and
// compares every cycle with the extended iteration domain worked out here:
// r = -1..3, c = -1..5 in lexicographic order, a fetch of P[r+1][c+1] in
// each, execution only for 1 <= r <= 3, 1 <= c <= 5, done right after the
// 35th iteration, and nothing while idle.
`timescale 1ns/1ps
module tb_sobel_rect_ctrl;
  localparam int R = 5, C = 7;
  localparam int AW = $clog2(R * C);
  logic clk = 0, rst_n = 0, start = 0, busy, done, fetch, exec;
  logic [AW-1:0] fetch_addr, q_addr;
  int checks = 0, failures = 0;
  sobel_rect_ctrl #(.ROWS(R), .COLS(C)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); checks++; if (busy || fetch || exec) begin failures++; $display("FAIL idle"); end
      start = 1; @(negedge clk); start = 0;
      for (int r = -1; r <= R-2; r++)
        for (int c = -1; c <= C-2; c++) begin
          automatic bit ex = (r >= 1 && r <= R-2 && c >= 1 && c <= C-2);
          checks++;
          if (!busy || !fetch || int'(fetch_addr) != (r+1)*C + (c+1) || exec != ex ||
              (ex && int'(q_addr) != r*C + c)) begin
            failures++; $display("FAIL r=%0d c=%0d fetch_addr=%0d exec=%0d", r, c, fetch_addr, exec);
          end
          @(negedge clk);
        end
      checks++; if (!done || busy) begin failures++; $display("FAIL done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
