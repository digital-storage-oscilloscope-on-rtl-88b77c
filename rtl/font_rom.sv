// font_rom: glyph lookup table of the text sprite, one block-RAM read port.
//
// NUM_GLYPHS glyphs of CHAR_H rows of CHAR_W pixels (40 x 15 x 10 = 6,000
// bits, the size the font is budgeted at). Word char*CHAR_H + row holds one
// glyph row; bit CHAR_W-1 is the leftmost pixel. The table is loaded from
// rtl/font.hex: every glyph is a 5x7 dot pattern with each dot doubled to 2x2
// pixels, filling rows 0-13, and row 14 is blank. Glyph order: digits 0-9,
// letters A-Z, space, '.', ':', '-'.
//
// Timing: registered read, data one clock after the address.
module font_rom
  import dso_pkg::*;
#(
  parameter string FONT_FILE = "rtl/font.hex"
) (
  input  logic                                clock,
  input  logic [$clog2(NUM_GLYPHS*CHAR_H)-1:0] address,
  output logic [CHAR_W-1:0]                   rowBits
);

  localparam int unsigned WORDS = NUM_GLYPHS * CHAR_H;

  logic [CHAR_W-1:0] table_q [WORDS];

  initial $readmemh(FONT_FILE, table_q);

  always_ff @(posedge clock) rowBits <= table_q[address];

endmodule
