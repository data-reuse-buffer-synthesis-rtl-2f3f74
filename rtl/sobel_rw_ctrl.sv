// sobel_rw_ctrl: loop controller of the read/write Sobel example, in which
// the loop body also modifies P[r+1][c-1] (tap 2) and P[r][c-1] (tap 4).
// Besides the fetch and execute domains of sobel_rect_ctrl it produces:
//   shift   every iteration moves the chain; in the extra row r = ROWS-1 it
//           shifts without a memory read, to carry the last modified rows
//           up to tap 4 (the last write tap)
//   store   write P[r][c-1] back to memory: the write data domain (rows
//           1..ROWS-1, columns 0..COLS-3) projected through the access
//           function of tap 4, i.e. 1 <= r <= ROWS-1, 1 <= c <= COLS-2
// So the loop runs r = -1..ROWS-1, c = -1..COLS-2, (ROWS+1)*COLS iterations,
// and stops right after the last store. Outputs are combinational from the
// counters; `done` pulses after the last iteration.
module sobel_rw_ctrl #(
  parameter int unsigned ROWS = 100,
  parameter int unsigned COLS = 100,
  localparam int unsigned AW  = $clog2(ROWS * COLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          shift,
  output logic          fetch,
  output logic [AW-1:0] fetch_addr,
  output logic          exec,
  output logic [AW-1:0] q_addr,
  output logic          store,
  output logic [AW-1:0] store_addr
);
  // fr = r + 1, fc = c + 1
  logic [$clog2(ROWS+1)-1:0] fr;
  logic [$clog2(COLS)-1:0]   fc;
  logic last_col, last_row;

  assign last_col   = (fc == ($bits(fc))'(COLS - 1));
  assign last_row   = (fr == ($bits(fr))'(ROWS));
  assign shift      = busy;
  assign fetch      = busy && !last_row;
  assign fetch_addr = AW'(fr) * AW'(COLS) + AW'(fc);
  assign exec       = busy && (fr >= 2) && !last_row && (fc >= 2);
  assign q_addr     = AW'(fr - 1'b1) * AW'(COLS) + AW'(fc - 1'b1);
  assign store      = busy && (fr >= 2) && (fc >= 2);
  assign store_addr = AW'(fr - 1'b1) * AW'(COLS) + AW'(fc - 2'd2);

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
