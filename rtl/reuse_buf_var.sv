// reuse_buf_var: single-access-function reuse buffer for a variable reuse
// distance (e.g. A[i][k] of an upper-triangular matrix product, where the
// distance depends on i). A FIFO replaces the fixed-length loop of
// reuse_buf_const. `nshift` loads the active register from memory (first
// use), `lshift` pops the next reused word from the FIFO into it. `rbpush`
// marks an iteration whose word will be used again later; such a word is
// pushed into the FIFO when the next shift moves it out of the active
// register (a one-bit flag remembers the mark), so words no longer needed
// are simply dropped. The FIFO bypasses a word pushed and popped in the same
// cycle (reuse in the very next iteration). MAXDEPTH is the upper bound of
// the reuse distance minus one. All three controls belong to the same
// iteration; `data` is valid the cycle after.
module reuse_buf_var #(
  parameter int unsigned W        = 16,
  parameter int unsigned MAXDEPTH = 99
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         nshift,
  input  logic         lshift,
  input  logic         rbpush,
  input  logic [W-1:0] mem_data,
  output logic [W-1:0] data,
  output logic [$clog2(MAXDEPTH+1)-1:0] level
);
  logic [W-1:0] active, fifo_out;
  logic         keep;
  logic         shift;

  assign shift = nshift || lshift;

  rb_fifo #(.W(W), .DEPTH(MAXDEPTH)) u_fifo (
    .clk, .rst_n, .clr, .push(shift && keep), .din(active), .pop(lshift),
    .dout(fifo_out), .empty(), .level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0; keep <= 1'b0;
    end else if (clr) begin
      keep <= 1'b0;
    end else if (shift) begin
      active <= nshift ? mem_data : fifo_out;
      keep   <= rbpush;
    end
  end

  assign data = active;

  a_one_shift: assert property (@(posedge clk) disable iff (!rst_n) !(nshift && lshift));
endmodule
