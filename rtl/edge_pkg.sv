// edge_pkg: types and constants shared by the Laplacian edge-detection pipeline.
//
// The pipeline works on 8-bit grey pixels and a 5x5 kernel of signed 8-bit
// coefficients. Kernel size 5x5 and the Full HD frame (1920x1080) follow the
// design description; the pixel and coefficient widths, the packing of the
// kernel and the default coefficient set are this design's own choices.
//
// Kernel layout: kernel_t is indexed [row][col], row 0 being the top line of
// the window and col 0 its leftmost column. The default kernel is a common
// 5x5 Laplacian: negative taps along a plus-shaped cross through the centre,
// zero corners and a positive centre, so the taps sum to zero.
// The array ranges are ascending on purpose, so that index 0 is the top line
// and the leftmost column and the default kernel reads as printed below.
package edge_pkg;

  localparam int unsigned KSIZE  = 5;   // kernel is KSIZE x KSIZE
  localparam int unsigned KHALF  = 2;   // (KSIZE-1)/2, border padding per side
  localparam int unsigned PIX_W  = 8;   // grey pixel width
  localparam int unsigned COEF_W = 8;   // signed kernel coefficient width
  // 25 products of 8x9-bit signed terms: |sum| <= 25*128*255 < 2^20
  localparam int unsigned ACC_W  = 22;

  typedef logic [PIX_W-1:0]                    pix_t;
  typedef logic signed [COEF_W-1:0]            coef_t;
  typedef logic signed [ACC_W-1:0]             acc_t;
  typedef coef_t [0:KSIZE-1][0:KSIZE-1]        kernel_t;
  typedef pix_t  [0:KSIZE-1][0:KSIZE-1]        window_t;
  typedef pix_t  [0:KSIZE-1]                   column_t;   // [0] = newest line

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Default 5x5 Laplacian kernel, rows top to bottom.
  localparam kernel_t LAPLACE5 = '{
    '{ 8'sd0,  8'sd0, -8'sd1,  8'sd0,  8'sd0},
    '{ 8'sd0, -8'sd1, -8'sd2, -8'sd1,  8'sd0},
    '{-8'sd1, -8'sd2, 8'sd16, -8'sd2, -8'sd1},
    '{ 8'sd0, -8'sd1, -8'sd2, -8'sd1,  8'sd0},
    '{ 8'sd0,  8'sd0, -8'sd1,  8'sd0,  8'sd0}
  };

endpackage
