// text_sprite: draws a row of DISPLAY_LENGTH characters over the picture.
//
// The characters occupy a strip CHAR_W*DISPLAY_LENGTH pixels wide and CHAR_H
// rows high whose top-left corner is (positionX, positionY). For a pixel in
// the strip, the sprite works out which character it lies in and which row
// and column of that glyph, reads the glyph row from the font lookup table
// (font_rom) and paints TEXT_COLOR where the glyph bit is set; every other
// pixel of the previous sprite passes through. `characterString[i]` is the
// code of the i-th character from the left (codes in dso_pkg: 0-9 digits,
// 10-35 A-Z, 36 space, 37 '.', 38 ':', 39 '-'). The original design gives the
// DISPLAY_LENGTH parameter, the characterString input, the font lookup table
// and its size (about 40 glyphs of 15 x 10 pixels); the default length of 10,
// the position ports and the code assignment are this design's choices.
//
// Timing: two clocks of latency (position decode, then the font read);
// videoOut and pixelOut are delayed by the same two clocks. The pipeline
// registers have no reset.
module text_sprite
  import dso_pkg::*;
#(
  parameter int unsigned DISPLAY_LENGTH = 10
) (
  input  logic           clock,
  input  video_t         videoIn,
  input  pixel_t         pixelIn,
  input  char_t          characterString [DISPLAY_LENGTH],
  input  logic [X_W-1:0] positionX,
  input  logic [Y_W-1:0] positionY,
  output video_t         videoOut,
  output pixel_t         pixelOut
);

  localparam int unsigned ROM_AW = $clog2(NUM_GLYPHS * CHAR_H);
  localparam int unsigned IDX_W  = (DISPLAY_LENGTH > 1) ? $clog2(DISPLAY_LENGTH) : 1;

  logic [X_W-1:0]    relX;
  logic [Y_W-1:0]    relY;
  logic              inStrip;
  logic [X_W-1:0]    charIndex;
  logic [3:0]        column;
  char_t             code;
  logic [ROM_AW-1:0] romAddress;
  logic [CHAR_W-1:0] rowBits;

  always_comb begin
    relX      = videoIn.displayX - positionX;   // wraps for pixels left of the strip
    relY      = videoIn.displayY - positionY;
    inStrip    = !videoIn.blank &&
                (relX < X_W'(CHAR_W * DISPLAY_LENGTH)) && (relY < Y_W'(CHAR_H));
    charIndex = relX / X_W'(CHAR_W);
    column    = 4'(relX % X_W'(CHAR_W));
    code      = inStrip ? characterString[IDX_W'(charIndex)] : CH_SPACE;
    if (code >= char_t'(NUM_GLYPHS)) code = CH_SPACE;
    romAddress = ROM_AW'(code) * ROM_AW'(CHAR_H) + (inStrip ? ROM_AW'(relY) : '0);
  end

  font_rom u_font (
    .clock   (clock),
    .address (romAddress),
    .rowBits (rowBits)
  );

  video_t     videoD1;
  pixel_t     pixelD1;
  logic       inStripD1;
  logic [3:0] columnD1;

  always_ff @(posedge clock) begin
    videoD1  <= videoIn;
    pixelD1  <= pixelIn;
    inStripD1 <= inStrip;
    columnD1 <= column;
    videoOut <= videoD1;
    pixelOut <= (inStripD1 && rowBits[4'(CHAR_W - 1) - columnD1]) ? TEXT_COLOR : pixelD1;
  end

endmodule
