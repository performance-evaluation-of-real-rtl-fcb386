// laplace_filter: streaming 5x5 Laplacian high-pass filter for grey video.
//
// Each output pixel is |sum of the 5x5 neighbourhood times the kernel|,
// saturated to 255 and optionally inverted (255 - value), so edges come out
// bright on black, or dark on white when inverted. Output frames have the
// same IMG_W x IMG_H size as input frames.
//
// How it works: a scan counter walks an extended raster of
// (IMG_W+2) x (IMG_H+2) positions. Inside the image a position consumes one
// input pixel; in the two extra columns on the right and the two extra lines
// at the bottom it inserts a zero without consuming input. Each position
// pushes one 5-pixel column (from line_buffer) into a 5x5 window register, and
// the window centred two columns and two lines behind the scan position is
// sent to conv5x5. Taps that fall outside the image (above the first line,
// below the last, or in the padding columns) are forced to zero, so the
// border is handled as zero padding and no state has to be cleared between
// frames. The extra positions also drain the last two lines at frame end.
//
// Interface: AXI4-Stream style grey input (s_*) and output (m_*) with
// tuser = start of frame and tlast = end of line. While idle the filter
// waits for a pixel with s_user set; pixels without it are accepted and
// dropped (resynchronisation). Input tlast is not used: line length comes
// from IMG_W. Output tuser/tlast are generated from the output position.
// coef and invert are sampled with the first pixel of a frame and apply to
// that whole frame; they take effect at the frame's first output pixel.
//
// Timing: one scan position per clock when the input has data and the output
// is not stalled; a frame takes (IMG_W+2)*(IMG_H+2) cycles. An output pixel
// is handed over 6 clock edges after the scan position that completes its
// window, which is 2 lines + 2 positions after its own input pixel; the
// first output of a frame therefore follows the start-of-frame pixel by
// 2*(IMG_W+2) + 2 + 6 cycles. The whole pipeline has one enable,
// en = !m_valid || m_ready, so backpressure stalls every stage together.
//
// From the design description: 5x5 Laplacian kernel, Full HD frame size,
// streaming pipeline between the video decoder and encoder, the inverted
// view. This design's own choices: zero padding at the borders, absolute
// value with saturation, the sampling of the kernel per frame, and the
// resynchronisation on start of frame.
//
// Lint reports rst_n as used both asynchronously and synchronously: the
// second use is only the disable condition of the stream assertion.
module laplace_filter
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
)(
  input  logic     clk,
  input  logic     rst_n,
  // run-time settings
  input  kernel_t  coef,
  input  logic     invert,
  // grey input stream
  input  pix_t     s_data,
  input  logic     s_valid,
  input  logic     s_user,
  input  logic     s_last,
  output logic     s_ready,
  // filtered output stream
  output pix_t     m_data,
  output logic     m_valid,
  output logic     m_user,
  output logic     m_last,
  input  logic     m_ready
);

  localparam int unsigned SCAN_W = IMG_W + KHALF;
  localparam int unsigned SCAN_H = IMG_H + KHALF;
  localparam int unsigned XW     = $clog2(SCAN_W);
  localparam int unsigned YW     = $clog2(SCAN_H);

  typedef struct packed {
    logic sof;
    logic eol;
    logic inv;
  } tag_t;

  // ------------------------------------------------------------------
  // Stage 0: scan position and input acceptance
  // ------------------------------------------------------------------
  logic          en;
  logic          active;
  logic [XW-1:0] sx;
  logic [YW-1:0] sy;
  logic          pad;
  logic          fire;
  logic          last_pos;
  logic          inv_frame;
  kernel_t       coef_frame;

  assign en       = !m_valid || m_ready;
  assign pad      = (32'(sx) >= IMG_W) || (32'(sy) >= IMG_H);
  assign s_ready  = en && (!active || !pad);
  assign fire     = en && (active ? (pad || s_valid) : (s_valid && s_user));
  assign last_pos = (32'(sx) == SCAN_W-1) && (32'(sy) == SCAN_H-1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      sx         <= '0;
      sy         <= '0;
      inv_frame  <= 1'b0;
      coef_frame <= '0;
    end else if (fire) begin
      if (!active) begin
        coef_frame <= coef;
        inv_frame  <= invert;
      end
      if (last_pos) begin
        active <= 1'b0;
        sx     <= '0;
        sy     <= '0;
      end else begin
        active <= 1'b1;
        if (32'(sx) == SCAN_W-1) begin
          sx <= '0;
          sy <= sy + 1'b1;
        end else begin
          sx <= sx + 1'b1;
        end
      end
    end
  end

  // tap k of the column holds line sy-k; it is inside the image when
  // 0 <= sy-k < IMG_H and the column is inside the image
  logic [0:KSIZE-1] tap_ok;
  always_comb begin
    for (int k = 0; k < int'(KSIZE); k++)
      tap_ok[k] = (32'(sx) < IMG_W) && (32'(sy) >= k) && (32'(sy) - k < IMG_H);
  end

  // ------------------------------------------------------------------
  // Stage 1: line buffer read data, column assembly, window shift
  // ------------------------------------------------------------------
  logic             s1_v;
  pix_t             s1_pix;
  logic [0:KSIZE-1] s1_ok;
  logic             s1_out;     // window centre lies inside the image
  tag_t             s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      s1_pix <= '0;
      s1_ok  <= '0;
      s1_out <= 1'b0;
      s1_tag <= '0;
    end else if (en) begin
      s1_v   <= fire;
      s1_pix <= pad ? '0 : s_data;
      s1_ok  <= tap_ok;
      s1_out <= (32'(sx) >= KHALF) && (32'(sy) >= KHALF);
      s1_tag <= '{sof: (32'(sx) == KHALF) && (32'(sy) == KHALF),
                  eol: (32'(sx) == SCAN_W-1),
                  inv: active ? inv_frame : invert};
    end
  end

  column_t col;

  line_buffer #(
    .DEPTH (SCAN_W),
    .LINES (KSIZE-1)
  ) u_lines (
    .clk     (clk),
    .en      (en),
    .rd_en   (fire),
    .rd_addr (sx),
    .wr_en   (s1_v),
    .new_pix (s1_pix),
    .col     (col)
  );

  // window[r][c]: r = 0 is the top line (tap KSIZE-1), c = KSIZE-1 the newest column
  window_t win;
  logic    s2_v;
  tag_t    s2_tag;
  kernel_t kern;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win    <= '0;
      s2_v   <= 1'b0;
      s2_tag <= '0;
      kern   <= LAPLACE5;
    end else if (en) begin
      s2_v   <= s1_v && s1_out;
      s2_tag <= s1_tag;
      if (s1_v) begin
        for (int r = 0; r < int'(KSIZE); r++) begin
          for (int c = 0; c < int'(KSIZE) - 1; c++) win[r][c] <= win[r][c+1];
          win[r][KSIZE-1] <= s1_ok[KSIZE-1-r] ? col[KSIZE-1-r] : '0;
        end
        // the frame's first window brings that frame's kernel along
        if (s1_out && s1_tag.sof) kern <= coef_frame;
      end
    end
  end

  // ------------------------------------------------------------------
  // Stages 2-4: convolution
  // ------------------------------------------------------------------
  logic  c_v;
  acc_t  c_sum;
  tag_t  c_tag;

  conv5x5 #(
    .TAG_W ($bits(tag_t))
  ) u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .in_valid  (s2_v),
    .window    (win),
    .kernel    (kern),
    .in_tag    (s2_tag),
    .out_valid (c_v),
    .out_sum   (c_sum),
    .out_tag   (c_tag)
  );

  // ------------------------------------------------------------------
  // Stage 5: magnitude, saturation, inversion
  // ------------------------------------------------------------------
  acc_t mag;
  pix_t edge_val;

  always_comb begin
    mag      = c_sum[ACC_W-1] ? -c_sum : c_sum;
    edge_val = (mag > acc_t'(255)) ? 8'd255 : mag[PIX_W-1:0];
    if (c_tag.inv) edge_val = 8'd255 - edge_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_data  <= '0;
      m_user  <= 1'b0;
      m_last  <= 1'b0;
    end else if (en) begin
      m_valid <= c_v;
      m_data  <= edge_val;
      m_user  <= c_tag.sof;
      m_last  <= c_tag.eol;
    end
  end

  // s_last carries no information the scan counter does not already have
  logic unused_last;
  assign unused_last = s_last;

`ifndef SYNTHESIS
  // AXI4-Stream rule: once valid is high it stays high until accepted
  property p_hold_valid;
    @(posedge clk) disable iff (!rst_n) (m_valid && !m_ready) |=> m_valid;
  endproperty
  a_hold_valid: assert property (p_hold_valid);
`endif

endmodule
