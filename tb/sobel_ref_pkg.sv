// sobel_ref_pkg: reference model for the Sobel testbenches. It computes the
// expected output pixel from a 3x3 neighbourhood with the same kernels and
// saturation as the design, independently of any reuse buffer.
package sobel_ref_pkg;
  typedef int win3_t [3][3];
  function automatic int sobel_ref(input win3_t p);
    int gx, gy, m;
    gx = (p[0][2] + 2*p[1][2] + p[2][2]) - (p[0][0] + 2*p[1][0] + p[2][0]);
    gy = (p[2][0] + 2*p[2][1] + p[2][2]) - (p[0][0] + 2*p[0][1] + p[0][2]);
    m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (m > 255) ? 255 : m;
  endfunction
endpackage
