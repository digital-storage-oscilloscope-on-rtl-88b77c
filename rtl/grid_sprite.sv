// grid_sprite: first sprite of the display chain; black screen with a grid.
//
// Every visible pixel is black except the graticule: vertical lines every
// GRID_X pixels and horizontal lines every GRID_Y pixels, plus a closing line
// on the right and bottom edges, drawn in grey, and the two centre lines drawn
// brighter. Blanked pixels are black. The original design asks for a black background
// with grid lines; the spacing (8 x 8 divisions of 128 x 96 pixels) and the
// colours are this design's choices.
//
// Interface: `videoIn` from the timing generator, `videoOut`/`pixelOut` to the
// next sprite. Timing: latency of one clock; the control signals are delayed
// by the same clock so that they stay aligned with the pixel. The registers
// have no reset: the outputs are meaningful from the first clock after a
// valid position enters.
module grid_sprite
  import dso_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned GRID_X   = 128,
  parameter int unsigned GRID_Y   = 96
) (
  input  logic   clock,
  input  video_t videoIn,
  output video_t videoOut,
  output pixel_t pixelOut
);

  logic onGrid, onAxis;

  always_comb begin
    onAxis = (videoIn.displayX == X_W'(H_ACTIVE / 2)) ||
             (videoIn.displayY == Y_W'(V_ACTIVE / 2));
    onGrid = (videoIn.displayX % X_W'(GRID_X) == '0) ||
             (videoIn.displayY % Y_W'(GRID_Y) == '0) ||
             (videoIn.displayX == X_W'(H_ACTIVE - 1)) ||
             (videoIn.displayY == Y_W'(V_ACTIVE - 1));
  end

  always_ff @(posedge clock) begin
    videoOut <= videoIn;
    if (videoIn.blank)  pixelOut <= BLACK;
    else if (onAxis)    pixelOut <= AXIS_COLOR;
    else if (onGrid)    pixelOut <= GRID_COLOR;
    else                pixelOut <= BLACK;
  end

endmodule
