// video_edge_top: programmable-logic edge-detection pipeline for live video.
//
// Sits between the HDMI receiver's RGB video decoder and the HDMI
// transmitter's encoder (or between two video DMA channels) and turns each
// incoming colour frame into a Laplacian edge map. Two processing stages:
//   1. rgb2gray       - 24-bit RGB to 8-bit grey (1 cycle)
//   2. laplace_filter - 5x5 Laplacian high-pass filter, |result| saturated to
//                       8 bits, optionally inverted
// The grey edge value is copied to all three colour channels on the output so
// that an RGB video encoder can display it.
//
// Interface: AXI4-Stream video on both sides, 24-bit RGB, tuser = start of
// frame, tlast = end of line, one clock domain (the system clock, 100 MHz on
// the reference board). coef and invert come from the processor's control
// registers, which are outside this module; they are sampled per frame.
// Timing: one pixel per clock; a frame of IMG_W x IMG_H pixels occupies
// (IMG_W+2) x (IMG_H+2) clock cycles of the filter's scan (zero-padded
// border), i.e. about 48 frames/s of 1920x1080 at 100 MHz when neither side
// stalls.
//
// The two-stage processing chain and the Full HD frame size follow the design
// description; the colour conversion, the RGB replication on the output and
// the stream conventions are this design's own choices.
module video_edge_top
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
)(
  input  logic     clk,
  input  logic     rst_n,
  input  kernel_t  coef,
  input  logic     invert,
  // video in (from the decoder / read DMA)
  input  rgb_t     s_axis_tdata,
  input  logic     s_axis_tvalid,
  input  logic     s_axis_tuser,
  input  logic     s_axis_tlast,
  output logic     s_axis_tready,
  // video out (to the encoder / write DMA)
  output rgb_t     m_axis_tdata,
  output logic     m_axis_tvalid,
  output logic     m_axis_tuser,
  output logic     m_axis_tlast,
  input  logic     m_axis_tready
);

  pix_t g_data;
  logic g_valid, g_user, g_last, g_ready;
  pix_t e_data;

  rgb2gray u_gray (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_data  (s_axis_tdata),
    .s_valid (s_axis_tvalid),
    .s_user  (s_axis_tuser),
    .s_last  (s_axis_tlast),
    .s_ready (s_axis_tready),
    .m_data  (g_data),
    .m_valid (g_valid),
    .m_user  (g_user),
    .m_last  (g_last),
    .m_ready (g_ready)
  );

  laplace_filter #(
    .IMG_W (IMG_W),
    .IMG_H (IMG_H)
  ) u_filter (
    .clk     (clk),
    .rst_n   (rst_n),
    .coef    (coef),
    .invert  (invert),
    .s_data  (g_data),
    .s_valid (g_valid),
    .s_user  (g_user),
    .s_last  (g_last),
    .s_ready (g_ready),
    .m_data  (e_data),
    .m_valid (m_axis_tvalid),
    .m_user  (m_axis_tuser),
    .m_last  (m_axis_tlast),
    .m_ready (m_axis_tready)
  );

  assign m_axis_tdata = '{r: e_data, g: e_data, b: e_data};

endmodule
