// tb_video_edge_top: end-to-end test of the RGB-in, edge-map-out pipeline.
// Streams several colour frames through the top level with a different
// kernel and invert setting per frame, stray pixels before start of frame,
// random input gaps and random output stalls, and compares every RGB output
// pixel and its tuser/tlast with the reference (grey conversion, zero-padded
// 5x5 Laplacian, magnitude, saturation, inversion). It counts how often each
// mechanism of the design was exercised and fails if one never was:
// output stall, input gap, zero-padded border pixel, stray-pixel drop,
// saturation, negative sum, inverted frame, kernel change, and a frame that
// starts while the previous one is still draining.
module tb_video_edge_top;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 10;
  localparam int F = 6;

  logic clk = 0, rst_n = 0;
  kernel_t coef;
  logic invert;
  rgb_t s_axis_tdata, m_axis_tdata;
  logic s_axis_tvalid, s_axis_tuser, s_axis_tlast, s_axis_tready;
  logic m_axis_tvalid, m_axis_tuser, m_axis_tlast, m_axis_tready;
  int checks = 0, failures = 0;

  video_edge_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { rgb_t d; bit u; bit l; bit junk; int f; } beat_t;
  beat_t beats[$];
  typedef struct { int v; bit u; bit l; } exp_t;
  exp_t q[$];
  kernel_t fk[F];
  bit      finv[F];
  byte unsigned img[];
  int got = 0, ox = 0, oy = 0;
  bit taken = 0;
  bit cur_junk = 0;

  // mechanism counters
  int n_stall = 0, n_gap = 0, n_pad = 0, n_drop = 0, n_sat = 0, n_neg = 0;
  int n_inv = 0, n_kchange = 0, n_overlap = 0;

  initial begin
    img = new[W*H];
    for (int f = 0; f < F; f++) begin
      if (f % 2 == 0) fk[f] = LAPLACE5;
      else foreach (fk[f][r, c]) fk[f][r][c] = coef_t'($signed($urandom_range(0, 31)) - 16);
      if (f > 0 && fk[f] != fk[f-1]) n_kchange++;
      finv[f] = (f % 3 == 2);
      if (finv[f]) n_inv++;
      if (f % 2 == 1)
        for (int j = 0; j < 2; j++) beats.push_back('{rgb_t'($urandom), 0, 0, 1, f});
      for (int i = 0; i < W*H; i++) begin
        rgb_t p;
        p = (f == 0 && (i / W) % 3 == 0) ? '1 : rgb_t'($urandom);
        img[i] = 8'(ref_gray(p.r, p.g, p.b));
        beats.push_back('{p, i == 0, (i % W) == W-1, 0, f});
      end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int s;
          s = ref_sum(img, W, H, fk[f], x, y);
          if (s < 0) n_neg++;
          if (s > 255 || s < -255) n_sat++;
          q.push_back('{ref_edge(img, W, H, fk[f], x, y, finv[f]), x == 0 && y == 0, x == W-1});
        end
    end
  end

  initial begin
    beat_t b;
    s_axis_tvalid = 0; s_axis_tdata = '0; s_axis_tuser = 0; s_axis_tlast = 0;
    m_axis_tready = 0; coef = '0; invert = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      if (!s_axis_tvalid || taken) begin
        taken = 0;
        if (beats.size() == 0) s_axis_tvalid = 0;
        else if ($urandom_range(0, 5) == 0) s_axis_tvalid = 0;
        else begin
          b = beats.pop_front();
          s_axis_tvalid = 1; s_axis_tdata = b.d; s_axis_tuser = b.u; s_axis_tlast = b.l;
          cur_junk = b.junk;
          if (b.u) begin coef = fk[b.f]; invert = finv[b.f]; end
        end
      end
      m_axis_tready = ($urandom_range(0, 4) != 0);
    end
  end

  // all mechanisms are observed at the top's ports
  int in_frames = 0, out_frames_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (s_axis_tvalid && s_axis_tready) begin
      taken = 1;
      if (s_axis_tuser) begin
        // a new frame enters before the previous frame's last output left
        if (in_frames > out_frames_done) n_overlap++;
        in_frames++;
      end
      if (cur_junk) n_drop++;
    end
    if (m_axis_tvalid && !m_axis_tready) n_stall++;
    if (!s_axis_tvalid && in_frames > 0 && beats.size() > 0 && !beats[0].u) n_gap++;
  end

  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = q.pop_front();
      if (m_axis_tdata != {3{8'(e.v)}} || m_axis_tuser != e.u || m_axis_tlast != e.l) begin
        failures++;
        $display("FAIL out %0d: got %h/%0b/%0b exp %0d/%0b/%0b", got, m_axis_tdata,
                 m_axis_tuser, m_axis_tlast, e.v, e.u, e.l);
      end
    end
    if ((ox < 2 || ox >= W-2 || oy < 2 || oy >= H-2)) n_pad++;
    got++;
    if (ox == W-1) begin
      ox = 0;
      if (oy == H-1) begin oy = 0; out_frames_done++; end else oy++;
    end else ox++;
  end

  task automatic need(input string name, input int n);
    checks++;
    $display("mechanism %-14s seen %0d times", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never exercised", name); end
  endtask

  initial begin
    wait (rst_n && got == F*W*H);
    repeat (8) @(posedge clk);
    checks++;
    if (m_axis_tvalid) begin failures++; $display("FAIL extra output"); end
    need("output_stall", n_stall);
    need("input_gap", n_gap);
    need("border_pad", n_pad);
    need("stray_drop", n_drop);
    need("saturation", n_sat);
    need("negative_sum", n_neg);
    need("invert", n_inv);
    need("kernel_change", n_kchange);
    need("frame_overlap", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog got=%0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
