// sobel_rect_ctrl: loop controller of the rectangular Sobel design. It walks
// the extended iteration domain, the union of the fetch domain and the
// execute domain, one iteration per cycle. For the head reference
// P[r+1][c+1] the fetch domain is -1 <= r <= ROWS-2, -1 <= c <= COLS-2, which
// contains the execute domain 1 <= r,c <= ROWS-2/COLS-2 of the original loop
// nest; so every iteration fetches one pixel, and the execute flag is raised
// only inside the original loop. The first two image rows and the first two
// pixels of every row are thus prefetched without executing.
// Interface: `start` (one cycle, while idle) begins a frame; during `busy`
// the outputs describe the current iteration: `fetch`/`fetch_addr`
// (row-major pixel address of P[r+1][c+1]), `exec` and `q_addr` (address of
// Q[r][c]). `done` pulses in the cycle after the last iteration. The outputs
// are combinational from the loop counters.
module sobel_rect_ctrl #(
  parameter int unsigned ROWS = 100,
  parameter int unsigned COLS = 100,
  localparam int unsigned AW  = $clog2(ROWS * COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          fetch,
  output logic [AW-1:0] fetch_addr,
  output logic          exec,
  output logic [AW-1:0] q_addr
);
  // fr = r + 1 and fc = c + 1: the indices of the fetched pixel.
  logic [$clog2(ROWS)-1:0] fr;
  logic [$clog2(COLS)-1:0] fc;
  logic last_col, last_row;

  assign last_col   = (fc == ($bits(fc))'(COLS - 1));
  assign last_row   = (fr == ($bits(fr))'(ROWS - 1));
  assign fetch      = busy;
  assign fetch_addr = AW'(fr) * AW'(COLS) + AW'(fc);
  assign exec       = busy && (fr >= 2) && (fc >= 2);
  assign q_addr     = AW'(fr - 1'b1) * AW'(COLS) + AW'(fc - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; fr <= '0; fc <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; fr <= '0; fc <= '0;
        end
      end else if (last_col) begin
        fc <= '0;
        if (last_row) begin
          busy <= 1'b0; done <= 1'b1;
        end else begin
          fr <= fr + 1'b1;
        end
      end else begin
        fc <= fc + 1'b1;
      end
    end
  end
endmodule
