// conv5x5: pipelined 5x5 convolution (multiply-accumulate) of a pixel window
// with a signed kernel.
//
// out = sum over r,c of window[r][c] * kernel[r][c], pixels unsigned,
// coefficients signed, full precision (ACC_W bits, no rounding or overflow).
// This is the discrete Laplacian of the description applied as a
// convolution, l * f; the adder organisation is this design's own.
//
// Pipeline: stage 1 registers the 25 products, stage 2 the five row sums,
// stage 3 the total, so the latency is 3 enabled cycles and a new window is
// accepted on every enabled cycle. en freezes all stages (used for stalls).
// A TAG_W-bit tag travels with each window and comes out with its sum.
// The kernel is sampled in stage 1, so it may change between two windows.
module conv5x5
  import edge_pkg::*;
#(
  parameter int unsigned TAG_W = 1
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  window_t           window,
  input  kernel_t           kernel,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output acc_t              out_sum,
  output logic [TAG_W-1:0]  out_tag
);

  typedef logic signed [PIX_W+COEF_W:0] prod_t;   // 9-bit signed pixel x coef

  prod_t [0:KSIZE-1][0:KSIZE-1] prod;
  acc_t  [0:KSIZE-1]            rsum;
  logic  [2:1]                  v;
  logic  [TAG_W-1:0]            tag1, tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v         <= '0;
      out_valid <= 1'b0;
      prod      <= '0;
      rsum      <= '0;
      out_sum   <= '0;
      tag1      <= '0;
      tag2      <= '0;
      out_tag   <= '0;
    end else if (en) begin
      // stage 1: products
      v[1] <= in_valid;
      tag1 <= in_tag;
      for (int r = 0; r < int'(KSIZE); r++)
        for (int c = 0; c < int'(KSIZE); c++)
          prod[r][c] <= prod_t'($signed({1'b0, window[r][c]})) * prod_t'(kernel[r][c]);
      // stage 2: row sums
      v[2] <= v[1];
      tag2 <= tag1;
      for (int r = 0; r < int'(KSIZE); r++) begin
        acc_t s;
        s = '0;
        for (int c = 0; c < int'(KSIZE); c++) s += acc_t'(prod[r][c]);
        rsum[r] <= s;
      end
      // stage 3: total
      out_valid <= v[2];
      out_tag   <= tag2;
      begin
        acc_t t;
        t = '0;
        for (int r = 0; r < int'(KSIZE); r++) t += rsum[r];
        out_sum <= t;
      end
    end
  end

endmodule
