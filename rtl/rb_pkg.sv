// rb_pkg: types and constants shared by the data reuse buffer designs.
// Pixels are 8 bits wide, as in the Sobel experiments. The Sobel window is
// described by a struct that names the eight taps of the reuse chain in
// chain order (head first). Matrix and correlation data widths are this
// design's own choice; the evaluation does not give them.
package rb_pkg;
  localparam int unsigned PIX_W = 8;
  typedef logic [PIX_W-1:0] pix_t;

  // Taps of the Sobel reuse chain, in the order data pass them.
  // P[r+1][c+1] is the head of the chain.
  typedef struct packed {
    pix_t p_dd;  // P[r+1][c+1]
    pix_t p_d0;  // P[r+1][c]
    pix_t p_dm;  // P[r+1][c-1]
    pix_t p_0d;  // P[r][c+1]
    pix_t p_0m;  // P[r][c-1]
    pix_t p_ud;  // P[r-1][c+1]
    pix_t p_u0;  // P[r-1][c]
    pix_t p_um;  // P[r-1][c-1]
  } sobel_win_t;

  function automatic int unsigned clog2_min1(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction
endpackage
