// shift_reg: enabled delay line of DEPTH words, the building block between
// two taps of a reuse chain. Every cycle with `shift` high the word on `din`
// enters and `dout` moves on; `dout` always shows the word that entered
// DEPTH shifts ago. A configurable reuse-distance threshold picks the
// implementation: up to RAM_THRESH words
// it is a chain of registers, above it a circular buffer in a RAM with an
// asynchronous read, which maps onto distributed or block RAM. The threshold
// value (16) is this design's choice. DEPTH must be at least 1. The RAM
// contents are not reset: words read before DEPTH shifts have happened are
// undefined, which the controllers never use.
module shift_reg #(
  parameter int unsigned W          = 8,
  parameter int unsigned DEPTH      = 98,
  parameter int unsigned RAM_THRESH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH <= RAM_THRESH) begin : g_regs
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
      end else if (shift) begin
        sr[0] <= din;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end else begin : g_ram
    localparam int unsigned AW = $clog2(DEPTH);
    logic [W-1:0]  mem [DEPTH];
    logic [AW-1:0] ptr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ptr <= '0;
      else if (shift) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
    always_ff @(posedge clk) begin
      if (shift) mem[ptr] <= din;
    end
    assign dout = mem[ptr];
  end
endmodule
