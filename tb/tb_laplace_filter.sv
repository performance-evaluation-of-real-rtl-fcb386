// tb_laplace_filter: self-checking test of the streaming 5x5 Laplacian filter
// on small frames.
// Sends several random frames back to back with a random kernel and invert
// setting per frame, stray pixels before some start-of-frame pixels, random
// input gaps and random output stalls. Every output pixel, its tuser and its
// tlast are compared with the zero-padded reference model. The last frame
// runs without gaps or stalls and checks the timing: one scan position per
// clock over (W+2) x (H+2) positions, and a fixed latency to the first
// output pixel.
module tb_laplace_filter;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 9;
  localparam int H = 6;
  localparam int F = 8;

  logic clk = 0, rst_n = 0;
  kernel_t coef;
  logic invert;
  pix_t s_data;
  logic s_valid, s_user, s_last, s_ready;
  pix_t m_data;
  logic m_valid, m_user, m_last, m_ready;
  int checks = 0, failures = 0;

  laplace_filter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { pix_t d; bit u; bit l; bit junk; int f; } beat_t;
  beat_t beats[$];
  typedef struct { int v; bit u; bit l; } exp_t;
  exp_t q[$];
  kernel_t fk[F];
  bit      finv[F];
  byte unsigned img[];
  int cycle = 0, got = 0, dropped_sent = 0;
  int t_sof_last = -1, t_first_last = -1, t_end_last = -1;
  bit taken = 0, last_mode = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    img = new[W*H];
    for (int f = 0; f < F; f++) begin
      if (f == 0 || f == F-1) fk[f] = LAPLACE5;
      else foreach (fk[f][r, c]) fk[f][r][c] = coef_t'($signed($urandom_range(0, 15)) - 8);
      finv[f] = (f % 3 == 1);
      if (f != F-1 && f % 2 == 0) begin
        for (int j = 0; j < 3; j++) begin
          beats.push_back('{pix_t'($urandom), 0, 0, 1, f});
          dropped_sent++;
        end
      end
      for (int i = 0; i < W*H; i++) begin
        img[i] = (f == 1) ? ((i % 2) ? 8'd255 : 8'd0) : 8'($urandom);
        beats.push_back('{pix_t'(img[i]), i == 0, (i % W) == W-1, 0, f});
      end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          q.push_back('{ref_edge(img, W, H, fk[f], x, y, finv[f]), x == 0 && y == 0, x == W-1});
    end
  end

  // driver
  initial begin
    beat_t b;
    s_valid = 0; s_data = '0; s_user = 0; s_last = 0; m_ready = 0;
    coef = '0; invert = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      if (!s_valid || taken) begin
        taken = 0;
        if (beats.size() == 0) s_valid = 0;
        else if (!last_mode && beats[0].f != F-1 && $urandom_range(0, 3) == 0) s_valid = 0;
        else begin
          b = beats.pop_front();
          s_valid = 1; s_data = b.d; s_user = b.u; s_last = b.l;
          if (b.u) begin coef = fk[b.f]; invert = finv[b.f]; end
          if (b.u && b.f == F-1) last_mode = 1;
        end
      end
      m_ready = last_mode ? 1'b1 : ($urandom_range(0, 3) != 0);
    end
  end

  always @(posedge clk) if (rst_n && s_valid && s_ready) begin
    taken = 1;
    if (s_user && last_mode) t_sof_last = cycle;
  end

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = q.pop_front();
      if (int'(m_data) != e.v || m_user != e.u || m_last != e.l) begin
        failures++;
        $display("FAIL out %0d: got %0d/%0b/%0b exp %0d/%0b/%0b", got, m_data, m_user, m_last, e.v, e.u, e.l);
      end
    end
    if (got == (F-1)*W*H) t_first_last = cycle;
    got++;
    if (got == F*W*H) t_end_last = cycle;
  end

  initial begin
    wait (rst_n && got == F*W*H);
    repeat (5) @(posedge clk);
    checks++;
    if (m_valid) begin failures++; $display("FAIL extra output"); end
    checks++;
    if (t_first_last - t_sof_last != 2*(W+2) + 2 + 6) begin
      failures++; $display("FAIL first-pixel latency %0d", t_first_last - t_sof_last);
    end
    checks++;
    if (t_end_last - t_first_last != (H-1)*(W+2) + W - 1) begin
      failures++; $display("FAIL frame output span %0d", t_end_last - t_first_last);
    end
    checks++;
    if (dropped_sent == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog got=%0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
