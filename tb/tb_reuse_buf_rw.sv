// tb_reuse_buf_rw: two read/write buffers driven with a pipelined loop
// (shift of iteration n+1 in the same cycle as the write of iteration n).
// Buffer X (distance 3, with read port): for i < 6, k < 3: X[k] += i*7 + k,
// initial values read from memory at i = 0, stored after i = 5.
// Buffer Y (distance 1, write-first, no read port): for i < 5, k < 4:
// Y = (k == 0 ? 0 : Y) + i + k, stored at k = 3.
// Buffer Z (variable distance, FIFO of 2 words, with read port): for i < 4,
// k = i..3: Z[k] += i*5 + k + 1, read from memory at i = 0, kept while
// k > i, stored at k = i (its last write). The distance of Z[k] is 3 - i.
// Checks the values read by the "datapath" and every stored word.
`timescale 1ns/1ps
module tb_reuse_buf_rw;
  logic clk = 0, rst_n = 0;
  logic xn = 0, xl = 0, xwe = 0, xst = 0, ywe = 0, yst = 0;
  logic [15:0] xmd = '0, xwd = '0, xdata, xmwd, ywd = '0, ydata, ymwd;
  logic xmwe, ymwe;
  logic [15:0] xinit [3], xmodel [3];
  int checks = 0, failures = 0, xstores = 0, ystores = 0;

  reuse_buf_rw #(.W(16), .DIST(3), .HAS_READ(1'b1)) u_x (
    .clk, .rst_n, .clr(1'b0), .rbpush(1'b0), .nshift(xn), .lshift(xl), .mem_rd_data(xmd), .we(xwe), .wdata(xwd),
    .store(xst), .data(xdata), .mem_wr_en(xmwe), .mem_wr_data(xmwd));
  reuse_buf_rw #(.W(16), .DIST(1), .HAS_READ(1'b0)) u_y (
    .clk, .rst_n, .clr(1'b0), .rbpush(1'b0), .nshift(1'b0), .lshift(1'b0), .mem_rd_data('0), .we(ywe), .wdata(ywd),
    .store(yst), .data(ydata), .mem_wr_en(ymwe), .mem_wr_data(ymwd));

  logic zn = 0, zl = 0, zrb = 0, zwe = 0, zst = 0, zmwe;
  logic [15:0] zmd = '0, zwd = '0, zdata, zmwd;
  int zstores = 0;
  reuse_buf_rw #(.W(16), .DIST(3), .HAS_READ(1'b1), .VARIABLE(1'b1), .MAXDEPTH(2)) u_z (
    .clk, .rst_n, .clr(1'b0), .rbpush(zrb), .nshift(zn), .lshift(zl), .mem_rd_data(zmd),
    .we(zwe), .wdata(zwd), .store(zst), .data(zdata), .mem_wr_en(zmwe), .mem_wr_data(zmwd));

  always #5 clk = ~clk;

  // Z: same two-stage timing as X
  initial begin : zrun
    int zi [10], zk [10];
    int cnt, pi, pk;
    logic [15:0] zinit [4], zmodel [4];
    cnt = 0;
    for (int i = 0; i < 4; i++)
      for (int k = i; k < 4; k++) begin zi[cnt] = i; zk[cnt] = k; cnt++; end
    foreach (zinit[k]) begin zinit[k] = 16'($urandom_range(0, 1000)); zmodel[k] = zinit[k]; end
    pi = -1; pk = 0;
    repeat (3) @(negedge clk);
    for (int n = 0; n <= 10; n++) begin
      zwe = (pi >= 0); zst = (pi >= 0) && (pk == pi);
      if (pi >= 0) begin
        checks++;
        if (zdata != zmodel[pk]) begin failures++; $display("FAIL Z read i=%0d k=%0d: %0d vs %0d", pi, pk, zdata, zmodel[pk]); end
        zmodel[pk] = zmodel[pk] + 16'(pi*5 + pk + 1);
        zwd = zmodel[pk];
        #1;
        if (zst) begin
          checks++; zstores++;
          if (!zmwe || zmwd != zmodel[pk]) begin failures++; $display("FAIL Z store k=%0d", pk); end
        end
      end
      if (n < 10) begin
        zn = (zi[n] == 0); zl = (zi[n] != 0); zrb = (zk[n] > zi[n]);
        zmd = (zi[n] == 0) ? zinit[zk[n]] : 16'hdead;
        pi = zi[n]; pk = zk[n];
      end else begin
        {zn, zl, zrb} = '0; pi = -1;
      end
      @(negedge clk);
    end
    {zwe, zst} = '0;
  end
  initial begin
    #100_000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // X: stage 1 shifts, stage 2 reads/writes (and stores at the last write)
  initial begin
    int pi, pk;
    pi = -1; pk = -1;
    foreach (xinit[k]) begin xinit[k] = 16'($urandom_range(0, 1000)); xmodel[k] = xinit[k]; end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int n = 0; n <= 18; n++) begin
      automatic int i = n / 3, k = n % 3;
      // stage 2 for the previous iteration
      xwe = (pi >= 0); xst = (pi == 5);
      if (pi >= 0) begin
        checks++;
        if (xdata != xmodel[pk]) begin failures++; $display("FAIL X read i=%0d k=%0d", pi, pk); end
        xmodel[pk] = xmodel[pk] + 16'(pi*7 + pk);
        xwd = xmodel[pk];
        #1;
        if (xst) begin
          checks++; xstores++;
          if (!xmwe || xmwd != xmodel[pk]) begin failures++; $display("FAIL X store k=%0d", pk); end
        end
      end
      // stage 1 for this iteration
      xn = (n < 18) && (i == 0); xl = (n < 18) && (i != 0);
      xmd = (n < 18 && i == 0) ? xinit[k] : 16'hdead;
      pi = (n < 18) ? i : -1; pk = k;
      @(negedge clk);
    end
    {xn, xl, xwe, xst} = '0;
  end

  // Y: no shifts; read-modify-write every cycle, store at k = 3
  initial begin
    logic [15:0] ym;
    ym = '0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 5; i++)
      for (int k = 0; k < 4; k++) begin
        if (k != 0) begin checks++; if (ydata != ym) begin failures++; $display("FAIL Y read"); end end
        ym = ((k == 0) ? 16'd0 : ym) + 16'(i + k);
        ywd = ((k == 0) ? 16'd0 : ydata) + 16'(i + k); ywe = 1; yst = (k == 3);
        #1;
        if (yst) begin
          checks++; ystores++;
          if (!ymwe || ymwd != 16'(4*i + 6)) begin failures++; $display("FAIL Y store i=%0d %0d", i, ymwd); end
        end
        @(negedge clk);
      end
    {ywe, yst} = '0;
    repeat (25) @(negedge clk);
    checks++;
    if (xstores != 3 || ystores != 5 || zstores != 4) begin
      failures++; $display("FAIL store counts %0d %0d %0d", xstores, ystores, zstores);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
