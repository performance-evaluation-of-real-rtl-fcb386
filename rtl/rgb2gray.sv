// rgb2gray: converts the decoded 24-bit RGB video stream to 8-bit grey.
//
// The edge detector works on grey-scale images, so this is the first
// processing stage of the programmable-logic pipeline. The weighting is this
// design's choice (the description does not give one): integer ITU-R BT.601
// luma, Y = (77*R + 150*G + 29*B + 128) >> 8, which never exceeds 255 because
// the weights sum to 256.
//
// Interface: AXI4-Stream style valid/ready on both sides; tuser (start of
// frame) and tlast (end of line) travel with the pixel.
// Timing: one register stage, one pixel per clock, latency 1 cycle.
// s_ready = !m_valid || m_ready, so a stalled output holds the stage.
// Lint notes the unused low byte of the weighted sum: it is the fraction
// dropped by the >> 8.
module rgb2gray
  import edge_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // RGB input stream
  input  rgb_t   s_data,
  input  logic   s_valid,
  input  logic   s_user,
  input  logic   s_last,
  output logic   s_ready,
  // grey output stream
  output pix_t   m_data,
  output logic   m_valid,
  output logic   m_user,
  output logic   m_last,
  input  logic   m_ready
);

  logic [15:0] luma;

  always_comb begin
    luma = 16'd77 * 16'(s_data.r) + 16'd150 * 16'(s_data.g)
         + 16'd29 * 16'(s_data.b) + 16'd128;
  end

  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_data  <= '0;
      m_user  <= 1'b0;
      m_last  <= 1'b0;
    end else if (s_ready) begin
      m_valid <= s_valid;
      m_data  <= luma[15:8];
      m_user  <= s_user;
      m_last  <= s_last;
    end
  end

endmodule
