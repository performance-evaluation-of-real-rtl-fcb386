// edge_ref_pkg: reference model used by the testbenches.
//
// Straightforward, non-pipelined arithmetic for the grey conversion and the
// zero-padded 5x5 Laplacian edge value, written from the formulas rather than
// from the RTL structure:
//   grey(r,g,b)  = (77 r + 150 g + 29 b + 128) / 256
//   edge(x,y)    = min(255, |sum_{i,j=-2..2} K[2+i][2+j] * I(x+j, y+i)|),
//                  I = 0 outside the image, then 255 - edge when inverted.
package edge_ref_pkg;
  import edge_pkg::*;

  function automatic int ref_gray(input int r, input int g, input int b);
    return (77 * r + 150 * g + 29 * b + 128) / 256;
  endfunction

  // raw signed sum, img is row-major, w x h
  function automatic int ref_sum(const ref byte unsigned img[], input int w, input int h,
                                 input kernel_t k, input int x, input int y);
    int s = 0;
    for (int i = -2; i <= 2; i++)
      for (int j = -2; j <= 2; j++) begin
        int xx = x + j;
        int yy = y + i;
        if (xx >= 0 && xx < w && yy >= 0 && yy < h)
          s += int'(k[2+i][2+j]) * int'(img[yy*w + xx]);
      end
    return s;
  endfunction

  function automatic int ref_edge(const ref byte unsigned img[], input int w, input int h,
                                  input kernel_t k, input int x, input int y, input bit inv);
    int s = ref_sum(img, w, h, k, x, y);
    int m = (s < 0) ? -s : s;
    if (m > 255) m = 255;
    return inv ? 255 - m : m;
  endfunction

endpackage
