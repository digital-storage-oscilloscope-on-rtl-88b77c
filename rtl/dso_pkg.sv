// dso_pkg: types and constants shared by the oscilloscope modules.
//
// The display pipeline passes the monitor control signals (position, syncs,
// blank) from sprite to sprite as one struct, video_t, so that every sprite
// can delay them by its own latency with a single register chain. Pixels are
// 24-bit RGB (8 bits per colour, red in the top byte). Positions are 11 bits
// horizontally and 10 bits vertically, the widths of the block diagram.
// The 1024x768 timing numbers are the standard XVGA (65 MHz) figures; the
// character codes of the text sprite are this design's own encoding.
package dso_pkg;

  // Widths from the block diagram.
  localparam int unsigned X_W      = 11;  // displayX[10:0]
  localparam int unsigned Y_W      = 10;  // displayY[9:0]
  localparam int unsigned PIXEL_W  = 24;  // pixel[23:0]

  typedef logic [PIXEL_W-1:0] pixel_t;

  // Monitor control signals that travel through the sprite chain.
  typedef struct packed {
    logic [X_W-1:0] displayX;
    logic [Y_W-1:0] displayY;
    logic           hsync;
    logic           vsync;
    logic           blank;
  } video_t;

  // Colours (RGB888).
  localparam pixel_t BLACK      = 24'h000000;
  localparam pixel_t GRID_COLOR = 24'h404040;
  localparam pixel_t AXIS_COLOR = 24'h808080;
  localparam pixel_t CURVE_COLOR = 24'hFFFF00;
  localparam pixel_t TEXT_COLOR = 24'hFFFFFF;

  // Character codes of the text sprite: 0-9 digits, 10-35 letters A-Z,
  // then space and three punctuation marks: 40 glyphs in all.
  localparam int unsigned NUM_GLYPHS = 40;
  typedef logic [5:0] char_t;
  localparam char_t CH_A     = 6'd10;
  localparam char_t CH_SPACE = 6'd36;
  localparam char_t CH_DOT   = 6'd37;
  localparam char_t CH_COLON = 6'd38;
  localparam char_t CH_MINUS = 6'd39;

  // Glyph cell: 15 rows of 10 pixels.
  localparam int unsigned CHAR_W = 10;
  localparam int unsigned CHAR_H = 15;

endpackage
