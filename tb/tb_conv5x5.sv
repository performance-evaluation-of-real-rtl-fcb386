// tb_conv5x5: self-checking test of the pipelined 5x5 multiply-accumulate.
// Feeds random windows and kernels (plus the extreme cases of all-255 pixels
// against all +127 and all -128 coefficients) with random valid gaps and
// random enable stalls, and compares each sum and tag with a direct double
// loop. Also checks the latency of three enabled cycles.
module tb_conv5x5;
  import edge_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en, in_valid, out_valid;
  window_t window;
  kernel_t kernel;
  logic [7:0] in_tag, out_tag;
  acc_t out_sum;
  int checks = 0, failures = 0;

  conv5x5 #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int s; logic [7:0] t; } exp_t;
  exp_t q[$];
  localparam int N = 3000;
  int sent = 0, got = 0;

  function automatic int dot(window_t w, kernel_t k);
    int s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) s += int'(w[r][c]) * int'(k[r][c]);
    return s;
  endfunction

  initial begin
    en = 0; in_valid = 0; window = '0; kernel = '0; in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      in_valid = ($urandom_range(0, 3) != 0);
      foreach (window[r, c]) window[r][c] = pix_t'($urandom);
      foreach (kernel[r, c]) kernel[r][c] = coef_t'($urandom);
      if (sent == 0) begin window = '1; kernel = {25{8'sd127}}; end
      if (sent == 1) begin window = '1; kernel = {25{-8'sd128}}; end
      in_tag = 8'($urandom);
      #1;
      if (en && in_valid) begin q.push_back('{dot(window, kernel), in_tag}); sent++; end
    end
    @(negedge clk);
    in_valid = 0; en = 1;
    // latency: one window, then count enabled cycles until it appears
    wait (got == N);
    @(negedge clk);
    foreach (window[r, c]) window[r][c] = 8'd1;
    kernel = LAPLACE5; in_valid = 1; in_tag = 8'h5a;
    @(negedge clk); in_valid = 0;
    checks++;
    repeat (1) @(negedge clk);
    if (out_valid) begin failures++; $display("FAIL output after 2 cycles"); end
    @(negedge clk);
    checks++;
    if (!(out_valid && out_sum == 0 && out_tag == 8'h5a)) begin
      failures++; $display("FAIL latency/flat-window result %0d", out_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en && out_valid && got < N) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = q.pop_front();
      if (int'(out_sum) != e.s || out_tag != e.t) begin
        failures++; $display("FAIL sum %0d exp %0d", out_sum, e.s);
      end
    end
    got++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
