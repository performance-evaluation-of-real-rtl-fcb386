// tb_line_buffer: self-checking test of the four-line column store.
// Walks the column addresses in raster order over many short lines with
// random enable gaps and read bubbles, keeps a software copy of the image,
// and checks that each column output holds the new pixel and the pixels at
// the same column one to four lines above it.
module tb_line_buffer;
  import edge_pkg::*;

  localparam int DEPTH = 7;
  localparam int AW    = $clog2(DEPTH);
  localparam int LINES = 40;

  logic clk = 0;
  logic en, rd_en, wr_en;
  logic [AW-1:0] rd_addr;
  pix_t new_pix;
  pix_t [0:4] col;
  int checks = 0, failures = 0;

  line_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  pix_t img [LINES][DEPTH];

  initial begin
    foreach (img[y, x]) img[y][x] = pix_t'($urandom);
    en = 0; rd_en = 0; wr_en = 0; rd_addr = '0; new_pix = '0;
    @(negedge clk);
    for (int y = 0; y < LINES; y++)
      for (int x = 0; x < DEPTH; x++) begin
        // read cycle (possibly preceded by stalled cycles)
        while ($urandom_range(0, 2) == 0) begin
          en = 0; rd_en = $urandom_range(0, 1); wr_en = $urandom_range(0, 1);
          rd_addr = AW'($urandom_range(0, DEPTH-1)); new_pix = pix_t'($urandom);
          @(negedge clk);
        end
        en = 1; rd_en = 1; wr_en = 0; rd_addr = AW'(x);
        @(negedge clk);
        // stalls between read and write must not lose the read data
        while ($urandom_range(0, 2) == 0) begin
          en = 0; rd_en = 1; rd_addr = AW'($urandom_range(0, DEPTH-1)); wr_en = 1;
          @(negedge clk);
        end
        en = 1; rd_en = 0; wr_en = 1; new_pix = img[y][x];
        #1;
        for (int k = 0; k <= 4; k++) begin
          if (y - k >= 0) begin
            checks++;
            if (col[k] != img[y-k][x]) begin
              failures++;
              $display("FAIL y=%0d x=%0d tap %0d got %0h exp %0h", y, x, k, col[k], img[y-k][x]);
            end
          end
        end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
