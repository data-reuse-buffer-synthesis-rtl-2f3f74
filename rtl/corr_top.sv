// corr_top: generated design for finding where a short pulse B[0..NJ-1]
// correlates best with a signal A: for every offset i < NI it accumulates
// corr = sum_j A[i+j] * B[j], takes |corr| and keeps the largest value and
// its offset. One multiply-accumulate per cycle (NI*NJ iterations, 13000 in
// the evaluation), and each of the NI+NJ-1 samples of A and NJ samples of B
// is read from memory once: A sits in a constant-distance loop buffer of
// NJ-1 words, B in one of NJ words.
// Memory ports as in the other designs (data one cycle after `*_rd_en`).
// Pipeline: iteration in cycle t, operands in t+1, accumulate in t+2; the
// running maximum (`max_corr`, `max_index`) is final when `done` pulses,
// 2 cycles after the last iteration. The maximum starts at zero for each run
// and a later offset replaces it only when strictly larger. 8-bit signed
// samples and a 24-bit accumulator are this design's choice.
module corr_top #(
  parameter int unsigned NI  = 1000,
  parameter int unsigned NJ  = 13,
  parameter int unsigned DW  = 8,
  parameter int unsigned CW  = 24,
  localparam int unsigned IW = $clog2(NI),
  localparam int unsigned JW = $clog2(NJ),
  localparam int unsigned AW = $clog2(NI + NJ - 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          a_rd_en,
  output logic [AW-1:0] a_rd_addr,
  input  logic [DW-1:0] a_rd_data,
  output logic          b_rd_en,
  output logic [JW-1:0] b_rd_addr,
  input  logic [DW-1:0] b_rd_data,
  output logic [CW-1:0] max_corr,
  output logic [IW-1:0] max_index
);
  logic          c_busy, c_done, a_n, a_l, b_n, b_l, first, last;
  logic [IW-1:0] idx, idx1, idx2;
  logic          a_n1, a_l1, b_n1, b_l1, ex1, ex2, first1, first2, last1, last2, done1;
  logic [DW-1:0] a_data, b_data;
  logic signed [CW-1:0] acc, acc_new, mag;
  logic signed [2*DW-1:0] prod;
  logic [CW-1:0] mag_u;

  corr_ctrl #(.NI(NI), .NJ(NJ)) u_ctrl (
    .clk, .rst_n, .start, .busy(c_busy), .done(c_done),
    .a_nshift(a_n), .a_lshift(a_l), .a_addr(a_rd_addr),
    .b_nshift(b_n), .b_lshift(b_l), .b_addr(b_rd_addr),
    .first, .last, .idx);

  assign a_rd_en = a_n;
  assign b_rd_en = b_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_n1, a_l1, b_n1, b_l1, ex1, ex2, first1, first2, last1, last2, done1} <= '0;
      idx1 <= '0; idx2 <= '0;
    end else begin
      {a_n1, a_l1, b_n1, b_l1} <= {a_n, a_l, b_n, b_l};
      ex1 <= c_busy; ex2 <= ex1;
      first1 <= first; first2 <= first1;
      last1 <= last && c_busy; last2 <= last1;
      idx1 <= idx; idx2 <= idx1;
      done1 <= c_done;
    end
  end

  reuse_buf_const #(.W(DW), .DIST(NJ - 1)) u_a (
    .clk, .rst_n, .nshift(a_n1), .lshift(a_l1), .mem_data(a_rd_data), .data(a_data));
  reuse_buf_const #(.W(DW), .DIST(NJ)) u_b (
    .clk, .rst_n, .nshift(b_n1), .lshift(b_l1), .mem_data(b_rd_data), .data(b_data));

  // Loop body: if (j == 0) corr = 0; corr += A*B;
  // if (j == NJ-1) { corr = |corr|; if (corr > maxcorr) record it; }
  assign prod    = $signed(a_data) * $signed(b_data);
  assign acc_new = (first2 ? '0 : acc) + CW'(prod);
  assign mag     = (acc_new < 0) ? -acc_new : acc_new;
  assign mag_u   = mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; max_corr <= '0; max_index <= '0;
    end else begin
      if (start && !c_busy) begin
        max_corr <= '0; max_index <= '0;
      end
      if (ex2) acc <= acc_new;
      if (ex2 && last2 && (mag_u > max_corr)) begin
        max_corr  <= mag_u;
        max_index <= idx2;
      end
    end
  end

  assign busy = c_busy || ex1 || ex2;
  assign done = done1;
endmodule
