// tb_video_edge_full: one full-size frame through the top level at its
// default parameters (1920 x 1080).
// The frame is generated in the testbench: vertical and horizontal ramps,
// a bright rectangle, a checkerboard patch and random noise, so it has flat
// areas, sharp edges that saturate and fine texture. Input is presented every
// cycle and the output is never stalled. Every output pixel is checked
// against the reference model, and the frame timing is checked: the first
// output follows the start-of-frame pixel by 2*(1920+2)+2+7 cycles (one more
// than the filter alone, for the grey stage) and the frame's outputs span
// (1080-1)*(1920+2)+1920-1 cycles, i.e. one scan position per clock.
module tb_video_edge_full;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 1920;
  localparam int H = 1080;

  logic clk = 0, rst_n = 0;
  kernel_t coef;
  logic invert;
  rgb_t s_axis_tdata, m_axis_tdata;
  logic s_axis_tvalid, s_axis_tuser, s_axis_tlast, s_axis_tready;
  logic m_axis_tvalid, m_axis_tuser, m_axis_tlast, m_axis_tready;
  int checks = 0, failures = 0, errors_shown = 0;

  video_edge_top dut (.*);

  always #5 clk = ~clk;

  rgb_t pix[];
  byte unsigned img[];
  int cycle = 0, sent = 0, got = 0, ox = 0, oy = 0;
  int t_sof = -1, t_first = -1, t_last = -1;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic rgb_t gen(input int x, input int y);
    rgb_t p;
    if (x >= 600 && x < 900 && y >= 300 && y < 600) p = '1;
    else if (x >= 1200 && x < 1400 && y >= 700 && y < 900)
      p = (((x / 4) + (y / 4)) % 2 == 1) ? '1 : '0;
    else if (y > 950) p = rgb_t'($urandom);
    else p = '{r: 8'(x / 8), g: 8'(y / 5), b: 8'((x + y) / 12)};
    return p;
  endfunction

  initial begin
    pix = new[W*H];
    img = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        pix[y*W + x] = gen(x, y);
        img[y*W + x] = 8'(ref_gray(pix[y*W + x].r, pix[y*W + x].g, pix[y*W + x].b));
      end
    s_axis_tvalid = 0; s_axis_tdata = '0; s_axis_tuser = 0; s_axis_tlast = 0;
    coef = LAPLACE5; invert = 0; m_axis_tready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (sent < W*H) begin
      s_axis_tvalid = 1;
      s_axis_tdata  = pix[sent];
      s_axis_tuser  = (sent == 0);
      s_axis_tlast  = (sent % W) == W-1;
      @(posedge clk);
      if (s_axis_tready) begin
        if (sent == 0) t_sof = cycle;
        sent++;
      end
      @(negedge clk);
    end
    s_axis_tvalid = 0;
  end

  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) begin
    int e;
    e = ref_edge(img, W, H, LAPLACE5, ox, oy, 1'b0);
    checks++;
    if (m_axis_tdata != {3{8'(e)}} || m_axis_tuser != (ox == 0 && oy == 0) ||
        m_axis_tlast != (ox == W-1)) begin
      failures++;
      if (errors_shown < 20) begin
        errors_shown++;
        $display("FAIL (%0d,%0d) got %h/%0b/%0b exp %0d", ox, oy, m_axis_tdata,
                 m_axis_tuser, m_axis_tlast, e);
      end
    end
    if (got == 0) t_first = cycle;
    got++;
    if (got == W*H) t_last = cycle;
    if (ox == W-1) begin ox = 0; oy++; end else ox++;
  end

  initial begin
    wait (rst_n && got == W*H);
    repeat (10) @(posedge clk);
    checks++;
    if (m_axis_tvalid) begin failures++; $display("FAIL extra output"); end
    checks++;
    if (t_first - t_sof != 2*(W+2) + 2 + 7) begin
      failures++; $display("FAIL first-pixel latency %0d", t_first - t_sof);
    end
    checks++;
    if (t_last - t_first != (H-1)*(W+2) + W - 1) begin
      failures++; $display("FAIL frame output span %0d", t_last - t_first);
    end
    $display("frame of %0dx%0d: %0d cycles from first input to last output", W, H, t_last - t_sof);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog got=%0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
