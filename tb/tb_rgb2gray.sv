// tb_rgb2gray: self-checking test of the RGB to grey stage.
// Streams random and corner-case colours with random output stalls and
// checks every grey value, the tuser/tlast side band, the one-cycle latency
// and that a stalled output holds its value.
module tb_rgb2gray;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  rgb_t s_data;
  logic s_valid, s_user, s_last, s_ready;
  pix_t m_data;
  logic m_valid, m_user, m_last, m_ready;
  int checks = 0, failures = 0;

  rgb2gray dut (.*);

  always #5 clk = ~clk;

  typedef struct { int y; bit u; bit l; } exp_t;
  exp_t q[$];
  int cycle = 0;
  int sent = 0, got = 0;
  localparam int N = 2000;

  bit taken = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // driver
  initial begin
    s_valid = 0; s_data = '0; s_user = 0; s_last = 0; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      if (sent >= N) break;
      if (!s_valid || taken) begin
        // previous beat (if any) was taken at the last posedge
        taken = 0;
        s_valid = ($urandom_range(0, 3) != 0);
        case (sent)
          0: s_data = '{r: 8'hff, g: 8'hff, b: 8'hff};
          1: s_data = '0;
          2: s_data = '{r: 8'hff, g: 8'h00, b: 8'h00};
          default: s_data = rgb_t'($urandom);
        endcase
        s_user = $urandom_range(0, 1);
        s_last = $urandom_range(0, 1);
      end
      m_ready = ($urandom_range(0, 3) != 0);
    end
    s_valid = 0;
    m_ready = 1;
  end

  // input monitor builds expected values
  always @(posedge clk) if (rst_n && s_valid && s_ready && sent < N) begin
    q.push_back('{ref_gray(s_data.r, s_data.g, s_data.b), s_user, s_last});
    sent++;
    taken = 1;
  end

  // output monitor
  pix_t held; logic was_stalled = 0;
  always @(posedge clk) if (rst_n) begin
    if (was_stalled) begin
      checks++;
      if (!m_valid || m_data != held) begin
        failures++; $display("FAIL stalled output changed");
      end
    end
    was_stalled <= m_valid && !m_ready;
    held <= m_data;
    if (m_valid && m_ready && got < N) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (int'(m_data) != e.y || m_user != e.u || m_last != e.l) begin
          failures++;
          $display("FAIL got %0d/%0b/%0b exp %0d/%0b/%0b", m_data, m_user, m_last, e.y, e.u, e.l);
        end
      end
      got++;
    end
  end

  // latency: with output always ready a pixel appears exactly one cycle later
  initial begin
    wait (got == N);
    @(negedge clk);
    m_ready = 1; s_valid = 1; s_data = '{r: 8'd10, g: 8'd20, b: 8'd30}; s_user = 0; s_last = 0;
    @(posedge clk); #1 s_valid = 0;
    checks++;
    if (!(m_valid && m_data == 8'(ref_gray(10, 20, 30)))) begin
      failures++; $display("FAIL latency is not one cycle");
    end
    checks++;
    if (int'(m_data) != 18) begin failures++; $display("FAIL grey(10,20,30) = %0d", m_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
