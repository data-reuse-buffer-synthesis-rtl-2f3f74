// tb_matmul_top: multiplies random 100 x 100 matrices with the rectangular
// design and, in a second instance, with the upper-triangular design (A is
// zero below the diagonal and those elements must never be read). Checks
// every Q element against a direct product computed here, that each Q
// element is written exactly once, that each needed A and B element is read
// exactly once (30000 and 25050 memory accesses in total) and that the run
// takes one iteration per cycle (last write iterations + 2 cycles after
// start).
`timescale 1ns/1ps
module tb_matmul_top;
  localparam int unsigned N = 100, DW = 16, QW = 40;
  localparam int unsigned AW = $clog2(N * N);

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0, cycle = 0;
  logic signed [DW-1:0] A [N*N], B [N*N];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Two instances: g[0] rectangular, g[1] triangular.
  for (genvar t = 0; t < 2; t++) begin : g
    logic busy, done, a_rd_en, b_rd_en, q_wr_en;
    logic [AW-1:0] a_rd_addr, b_rd_addr, q_wr_addr;
    logic [DW-1:0] a_rd_data, b_rd_data;
    logic [QW-1:0] q_wr_data;
    int a_cnt [N*N], b_cnt [N*N], q_cnt [N*N];
    logic signed [QW-1:0] q_ref [N*N];
    int t_last = 0, t_start = 0, accesses = 0;

    matmul_top #(.N(N), .TRIANGULAR(t == 1)) dut (.clk, .rst_n, .start, .busy,
      .done, .a_rd_en, .a_rd_addr, .a_rd_data, .b_rd_en, .b_rd_addr, .b_rd_data,
      .q_wr_en, .q_wr_addr, .q_wr_data);

    always @(posedge clk) if (rst_n) begin
      if (a_rd_en) begin a_rd_data <= A[a_rd_addr]; a_cnt[a_rd_addr]++; accesses++; end
      if (b_rd_en) begin b_rd_data <= B[b_rd_addr]; b_cnt[b_rd_addr]++; accesses++; end
      if (q_wr_en) begin
        q_cnt[q_wr_addr]++; accesses++; t_last = cycle;
        checks++;
        if (q_wr_data !== q_ref[q_wr_addr]) begin
          failures++;
          if (failures < 10) $display("FAIL(%0d): Q[%0d] = %0d, expected %0d", t, q_wr_addr,
                                      $signed(q_wr_data), q_ref[q_wr_addr]);
        end
      end
    end

    task automatic run();
      int iters = 0;
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          logic signed [QW-1:0] s = 0;
          for (int k = (t == 1) ? i : 0; k < int'(N); k++) s += QW'(A[i*N+k] * B[k*N+j]);
          q_ref[i*N+j] = s;
          iters += N - ((t == 1) ? i : 0);
          a_cnt[i*N+j] = 0; b_cnt[i*N+j] = 0; q_cnt[i*N+j] = 0;
        end
      a_rd_data = '0; b_rd_data = '0;
      wait (rst_n); @(negedge clk);
      t_start = cycle; start = 1; @(negedge clk); start = 0;
      wait (done); @(posedge clk); @(negedge clk);
      checks++;
      if (t_last - t_start != iters + 2) begin
        failures++; $display("FAIL(%0d): latency %0d, expected %0d", t, t_last - t_start, iters + 2);
      end
      for (int i = 0; i < int'(N*N); i++) begin
        bit a_needed = (t == 0) || ((i % N) >= (i / N));
        checks += 3;
        if (a_cnt[i] != (a_needed ? 1 : 0)) begin failures++; $display("FAIL(%0d): A[%0d] read %0d times", t, i, a_cnt[i]); end
        if (b_cnt[i] != 1) begin failures++; $display("FAIL(%0d): B[%0d] read %0d times", t, i, b_cnt[i]); end
        if (q_cnt[i] != 1) begin failures++; $display("FAIL(%0d): Q[%0d] written %0d times", t, i, q_cnt[i]); end
      end
      $display("design %0d: %0d iterations, latency %0d cycles, %0d memory accesses",
               t, iters, t_last - t_start, accesses);
    endtask
  end

  initial begin
    for (int i = 0; i < int'(N*N); i++) begin
      A[i] = DW'($urandom);
      B[i] = DW'($urandom);
      if ((i % N) < (i / N)) A[i] = '0;  // upper triangular
    end
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      g[0].run();
      g[1].run();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
