// rb_fifo: reuse FIFO for variable reuse distances. A circular buffer of
// DEPTH words with a first-word-fall-through output: `dout` shows the oldest
// word. A pop together with a push into an empty FIFO bypasses the storage
// and delivers the pushed word in the same cycle, which is what a reuse chain
// needs when the distance momentarily shrinks to zero stored words. DEPTH is
// the upper bound of the occupancy that the polyhedral analysis gives (or a
// safe bound of it). `level` reports the occupancy; overflow and underflow
// are caught by assertions. `clr` empties it.
module rb_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 100
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);
  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH);
  localparam int unsigned LW = $clog2(DEPTH + 1);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          bypass, do_wr, do_rd;

  assign empty  = (level == '0);
  assign bypass = empty && push && pop;
  assign dout   = empty ? din : mem[rd_ptr];
  assign do_wr  = push && !bypass;
  assign do_rd  = pop && !bypass;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; level <= '0;
    end else if (clr) begin
      rd_ptr <= '0; wr_ptr <= '0; level <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      level <= level + LW'(do_wr) - LW'(do_rd);
    end
  end
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                    !(do_wr && !do_rd && level == LW'(DEPTH)));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                    !(pop && empty && !push));
endmodule
