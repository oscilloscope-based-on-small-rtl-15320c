// text_generator: graphic-mode text window.
//
// Text is not drawn from a font ROM: the processor copies character
// patterns, pixel by pixel, into a small graphic memory that covers a window
// of the frame (TEXT_W x TEXT_H pixels with its top-left corner at X0, Y0).
// This keeps the character set and font entirely in software, at the price
// of only covering a fragment of the screen. One bit per pixel; a set bit
// requests the pixel, painted in the text colour.
//
// Memory layout: 32-bit words, TEXT_W/32 words per pixel row, row-major.
// Bit i of a word is the i-th pixel from the left of its 32-pixel group.
// Written on the Avalon clock, read on the pixel clock.
//
// Timing: `req` belongs to the pixel address of GEN_LATENCY (3) clocks
// earlier: window check and word read, bit select, output register.
//
// From the source design: the graphic-mode choice and that it covers only
// part of the frame. This design's own choices: the window (a 1024 x 32 strip
// at the top of the screen by default) and the memory layout.
module text_generator
  import osc_pkg::*;
#(
  parameter int unsigned X0     = 0,
  parameter int unsigned Y0     = 0,
  parameter int unsigned TEXT_W = 1024,   // multiple of 32
  parameter int unsigned TEXT_H = 32,
  parameter int unsigned WORDS  = TEXT_W / 32 * TEXT_H,
  parameter int unsigned AW     = $clog2(WORDS)
) (
  input  logic          wr_clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          clk,
  input  pix_addr_t     pix,
  input  logic          enable,
  output logic          req
);

  localparam int unsigned WPR = TEXT_W / 32;    // words per pixel row

  logic             inside0, inside1, px2;
  logic [PIX_W-1:0] dx, dy;
  logic [AW-1:0]    rd_addr;
  logic [4:0]       bit1;
  logic [31:0]      word;

  always_comb begin
    dx      = pix.col - PIX_W'(X0);
    dy      = pix.row - PIX_W'(Y0);
    // left of or above the window, dx or dy wraps to a large value
    inside0 = pix.active && dx < PIX_W'(TEXT_W) && dy < PIX_W'(TEXT_H);
    rd_addr = AW'(32'(dy) * WPR + 32'(dx[PIX_W-1:5]));
  end

  dual_port_ram #(.WIDTH(32), .DEPTH(WORDS)) u_text_mem (
    .wr_clk, .wr_en, .wr_addr, .wr_data,
    .rd_clk (clk), .rd_en (1'b1), .rd_addr, .rd_data (word)
  );

  always_ff @(posedge clk) begin
    inside1 <= inside0;
    bit1    <= dx[4:0];
    px2     <= inside1 && word[bit1];
    req     <= enable && px2;
  end

endmodule
