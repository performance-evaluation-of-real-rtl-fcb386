// line_buffer: storage for the KSIZE-1 most recent image lines.
//
// A 5x5 window needs the current pixel plus the pixels at the same column in
// the four previous lines. The buffer keeps LINES lines of DEPTH pixels each,
// one memory per line, and works like a vertical shift register indexed by
// column: reading column a returns the four older pixels of that column, and
// writing column a stores the new pixel in line 0 and moves each older pixel
// one line down (the oldest one drops out).
//
// Timing: a read is issued with rd_en/rd_addr; the data are registered (as a
// block RAM would) and visible on the next cycle. On that next cycle the
// caller presents the new pixel and wr_en, and the module writes it back to
// the address it latched at the read. The column output is combinational:
// col[0] = new_pix, col[k] = pixel k lines above it. Everything is gated by
// en, so a stall freezes reads, writes and the read register.
// Reading and writing the same address in one cycle never happens as long as
// the caller walks the addresses in order with DEPTH >= 2.
//
// The use of line memories and this read-modify-write organisation is this
// design's choice; the description only gives the 5x5 kernel and frame size.
module line_buffer
  import edge_pkg::*;
#(
  parameter int unsigned DEPTH = 1922,          // pixels per stored line
  parameter int unsigned LINES = KSIZE - 1,     // stored lines
  localparam int unsigned AW   = $clog2(DEPTH)
)(
  input  logic             clk,
  input  logic             en,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  input  logic             wr_en,
  input  pix_t             new_pix,
  output pix_t [0:LINES]   col
);

  pix_t [0:LINES-1] q;
  logic [AW-1:0]    wr_addr;

  always_ff @(posedge clk) begin
    if (en && rd_en) wr_addr <= rd_addr;
  end

  // one memory per stored line: line 0 takes the new pixel, line k the pixel
  // just read from line k-1
  for (genvar k = 0; k < LINES; k++) begin : g_line
    pix_t mem [DEPTH];
    pix_t wdata;

    if (k == 0) begin : g_first
      assign wdata = new_pix;
    end else begin : g_next
      assign wdata = q[k-1];
    end

    always_ff @(posedge clk) begin
      if (en && rd_en) q[k] <= mem[rd_addr];
      if (en && wr_en) mem[wr_addr] <= wdata;
    end
  end

  always_comb begin
    col[0] = new_pix;
    for (int k = 1; k <= int'(LINES); k++) col[k] = q[k-1];
  end

endmodule
