// reuse_buf_rw: read/write single-access-function reuse buffer with a
// constant reuse distance DIST. The datapath reads the active register
// (`data`) and may overwrite it (`we`, `wdata`) one cycle after the shift
// that brought the word in. Shifting works as in reuse_buf_const: `nshift`
// brings a word in for its first use, `lshift` brings a reused word back
// round a DIST-1 word loop. In a pipelined loop the write of one iteration
// coincides with the shift of the next, so the word leaving the active
// register is the freshly written one (`cur`). `store`, raised together with
// the last write of a word, sends it to external memory (`mem_wr_en`,
// `mem_wr_data`); the controller knows that iteration from the analysis, so
// no dirty bits are needed.
// HAS_READ = 0 gives the variant for arrays whose every element is written
// before it is read (the initial values are never used): there is no
// memory read port, and `nshift` only opens a fresh slot (cleared to zero)
// that the datapath then writes. With DIST = 1 the buffer is one register.
// VARIABLE = 1 gives the variable-distance form: as in reuse_buf_var, the
// loop becomes a FIFO of MAXDEPTH words (upper bound of the distance minus
// one), `lshift` pops it, and `rbpush` marks an iteration whose word is used
// again; that word, with this iteration's write applied, is pushed at the
// next shift. `clr` empties the FIFO for a new run. With VARIABLE = 0,
// `rbpush` and `clr` are not used.
module reuse_buf_rw #(
  parameter int unsigned W          = 40,
  parameter int unsigned DIST       = 1,
  parameter bit          HAS_READ   = 1'b0,
  parameter int unsigned RAM_THRESH = 16,
  parameter bit          VARIABLE   = 1'b0,
  parameter int unsigned MAXDEPTH   = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         rbpush,
  input  logic         nshift,
  input  logic         lshift,
  input  logic [W-1:0] mem_rd_data,
  input  logic         we,
  input  logic [W-1:0] wdata,
  input  logic         store,
  output logic [W-1:0] data,
  output logic         mem_wr_en,
  output logic [W-1:0] mem_wr_data
);
  logic [W-1:0] active, cur, loop_out, fresh;

  assign cur = we ? wdata : active;

  if (VARIABLE) begin : g_fifo
    logic keep;
    rb_fifo #(.W(W), .DEPTH(MAXDEPTH)) u_fifo (
      .clk, .rst_n, .clr, .push((nshift || lshift) && keep), .din(cur),
      .pop(lshift), .dout(loop_out), .empty(), .level());
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                keep <= 1'b0;
      else if (clr)              keep <= 1'b0;
      else if (nshift || lshift) keep <= rbpush;
    end
  end else if (DIST > 1) begin : g_loop
    shift_reg #(.W(W), .DEPTH(DIST - 1), .RAM_THRESH(RAM_THRESH)) u_sr (
      .clk, .rst_n, .shift(nshift || lshift), .din(cur), .dout(loop_out));
  end else begin : g_noloop
    assign loop_out = cur;
  end

  if (HAS_READ) begin : g_rd
    assign fresh = mem_rd_data;
  end else begin : g_nord
    assign fresh = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      active <= '0;
    else if (nshift) active <= fresh;
    else if (lshift) active <= loop_out;
    else             active <= cur;
  end

  assign data        = active;
  assign mem_wr_en   = store;
  assign mem_wr_data = cur;

  a_one_shift:    assert property (@(posedge clk) disable iff (!rst_n) !(nshift && lshift));
endmodule
