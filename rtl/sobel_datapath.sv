// sobel_datapath: the loop body of the Sobel edge detector, one result per
// cycle. From the eight neighbours of P[r][c] (the centre pixel is not used)
// it forms the horizontal and vertical gradients with the usual 1-2-1
// kernels and outputs |Gx| + |Gy| saturated to the 8-bit pixel range. The
// kernel weights and the magnitude approximation are this design's choice:
// the filter is only named, not spelt out. The result is registered: `q`
// and `q_valid` follow `exec` by one cycle.
module sobel_datapath
  import rb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       exec,
  input  sobel_win_t win,
  output pix_t       q,
  output logic       q_valid
);
  typedef logic signed [11:0] grad_t;
  grad_t gx, gy, ax, ay;
  logic [12:0] mag;

  function automatic grad_t ext(input pix_t p);
    return grad_t'({4'b0, p});
  endfunction

  always_comb begin
    gx  = (ext(win.p_ud) + (ext(win.p_0d) <<< 1) + ext(win.p_dd))
        - (ext(win.p_um) + (ext(win.p_0m) <<< 1) + ext(win.p_dm));
    gy  = (ext(win.p_dm) + (ext(win.p_d0) <<< 1) + ext(win.p_dd))
        - (ext(win.p_um) + (ext(win.p_u0) <<< 1) + ext(win.p_ud));
    ax  = (gx < 0) ? -gx : gx;
    ay  = (gy < 0) ? -gy : gy;
    mag = 13'(ax) + 13'(ay);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; q_valid <= 1'b0;
    end else begin
      q_valid <= exec;
      if (exec) q <= (mag > 13'd255) ? 8'd255 : mag[7:0];
    end
  end
endmodule
