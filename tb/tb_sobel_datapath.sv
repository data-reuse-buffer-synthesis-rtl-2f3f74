// tb_sobel_datapath: random and extreme windows through the Sobel loop body;
// checks the registered result one cycle later against the reference model
// (including saturation at 255) and that q_valid follows exec.
`timescale 1ns/1ps
module tb_sobel_datapath;
  import rb_pkg::*;
  import sobel_ref_pkg::*;
  logic clk = 0, rst_n = 0, exec = 0, q_valid;
  sobel_win_t win;
  pix_t q;
  int checks = 0, failures = 0;
  sobel_datapath dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    win3_t p;
    int exp_q;
    win = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++)
        p[a][b] = (t % 5 == 0) ? ((b == 2) ? 255 : 0) : $urandom_range(0, (t % 3 == 0) ? 20 : 255);
      win = '{p_dd: pix_t'(p[2][2]), p_d0: pix_t'(p[2][1]), p_dm: pix_t'(p[2][0]),
              p_0d: pix_t'(p[1][2]), p_0m: pix_t'(p[1][0]),
              p_ud: pix_t'(p[0][2]), p_u0: pix_t'(p[0][1]), p_um: pix_t'(p[0][0])};
      exec = (t % 7 != 3);
      exp_q = sobel_ref(p);
      @(negedge clk);
      checks++;
      if (q_valid != exec) begin failures++; $display("FAIL valid t=%0d", t); end
      if (exec) begin
        checks++;
        if (int'(q) != exp_q) begin failures++; $display("FAIL t=%0d q=%0d exp %0d", t, q, exp_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
