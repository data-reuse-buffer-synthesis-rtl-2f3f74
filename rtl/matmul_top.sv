// matmul_top: generated design for Q = A * B on N x N matrices (N = 100 in
// the evaluation), with one multiply-accumulate per cycle and every matrix
// element crossing the memory interface exactly once: A and B are read
// once, Q is written once and never read. With TRIANGULAR = 0 all reuse
// distances are constant (A: N, B: N*N, Q: 1), so A and B sit in
// reuse_buf_const loops. With TRIANGULAR = 1 (A upper triangular, k >= i)
// the distances of A and B vary and reuse_buf_var FIFOs hold them, sized
// as the distance bound minus one (N-1 for A, N*N-1 for B). Q is a
// write-first read/write buffer of distance 1, a single register, stored
// after its last update.
// Each array has its own memory port: `*_rd_en`/`*_rd_addr` with data one
// cycle later on `*_rd_data`; results leave on `q_wr_*`. Pipeline: iteration
// in cycle t, operands arrive in t+1, multiply-accumulate in t+2 with the
// store of a finished Q element in the same cycle. A product takes N^3
// (rectangular) or N^2(N+1)/2 (triangular) iterations, and the last Q
// element is written 2 cycles after its last iteration, together with
// the `done` pulse.
// Element widths (16-bit signed operands, 40-bit Q) are this design's choice.
module matmul_top #(
  parameter int unsigned N          = 100,
  parameter bit          TRIANGULAR = 1'b0,
  parameter int unsigned DW         = 16,
  parameter int unsigned QW         = 40,
  localparam int unsigned AW        = $clog2(N * N)
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
  output logic [AW-1:0] b_rd_addr,
  input  logic [DW-1:0] b_rd_data,
  output logic          q_wr_en,
  output logic [AW-1:0] q_wr_addr,
  output logic [QW-1:0] q_wr_data
);
  logic          c_busy, c_done;
  logic          a_n, a_l, a_p, b_n, b_l, b_p, q_first, q_store;
  logic [AW-1:0] q_addr;
  // control pipeline: stage 1 = operand arrival, stage 2 = datapath
  logic          a_n1, a_l1, a_p1, b_n1, b_l1, b_p1;
  logic          ex1, ex2, first1, first2, store1, store2, done1;
  logic [AW-1:0] qa1, qa2;
  logic [DW-1:0] a_data, b_data;
  logic [QW-1:0] q_data, q_new;
  logic signed [2*DW-1:0] prod;

  matmul_ctrl #(.N(N), .TRIANGULAR(TRIANGULAR)) u_ctrl (
    .clk, .rst_n, .start, .busy(c_busy), .done(c_done),
    .a_nshift(a_n), .a_lshift(a_l), .a_rbpush(a_p), .a_addr(a_rd_addr),
    .b_nshift(b_n), .b_lshift(b_l), .b_rbpush(b_p), .b_addr(b_rd_addr),
    .q_first, .q_store, .q_addr);

  assign a_rd_en = a_n;
  assign b_rd_en = b_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {a_n1, a_l1, a_p1, b_n1, b_l1, b_p1} <= '0;
      {ex1, ex2, first1, first2, store1, store2, done1} <= '0;
      qa1 <= '0; qa2 <= '0;
    end else begin
      {a_n1, a_l1, a_p1, b_n1, b_l1, b_p1} <= {a_n, a_l, a_p, b_n, b_l, b_p};
      ex1 <= c_busy;  ex2 <= ex1;
      first1 <= q_first; first2 <= first1;
      store1 <= q_store; store2 <= store1;
      qa1 <= q_addr; qa2 <= qa1;
      done1 <= c_done;
    end
  end

  if (TRIANGULAR) begin : g_var
    reuse_buf_var #(.W(DW), .MAXDEPTH(N - 1)) u_a (
      .clk, .rst_n, .clr(1'b0), .nshift(a_n1), .lshift(a_l1), .rbpush(a_p1),
      .mem_data(a_rd_data), .data(a_data), .level());
    reuse_buf_var #(.W(DW), .MAXDEPTH(N * N - 1)) u_b (
      .clk, .rst_n, .clr(1'b0), .nshift(b_n1), .lshift(b_l1), .rbpush(b_p1),
      .mem_data(b_rd_data), .data(b_data), .level());
  end else begin : g_const
    reuse_buf_const #(.W(DW), .DIST(N)) u_a (
      .clk, .rst_n, .nshift(a_n1), .lshift(a_l1), .mem_data(a_rd_data),
      .data(a_data));
    reuse_buf_const #(.W(DW), .DIST(N * N)) u_b (
      .clk, .rst_n, .nshift(b_n1), .lshift(b_l1), .mem_data(b_rd_data),
      .data(b_data));
  end

  // Loop body: if (k == first) Q = 0; Q += A * B.
  assign prod  = $signed(a_data) * $signed(b_data);
  assign q_new = (first2 ? '0 : q_data) + QW'(prod);

  reuse_buf_rw #(.W(QW), .DIST(1), .HAS_READ(1'b0)) u_q (
    .clk, .rst_n, .clr(1'b0), .rbpush(1'b0), .nshift(1'b0), .lshift(1'b0),
    .mem_rd_data('0), .we(ex2), .wdata(q_new), .store(store2), .data(q_data),
    .mem_wr_en(q_wr_en), .mem_wr_data(q_wr_data));

  assign q_wr_addr = qa2;
  assign busy      = c_busy || ex1 || ex2;
  assign done      = done1;
endmodule
