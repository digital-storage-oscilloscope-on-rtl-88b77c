// curve_sprite: draws the stored waveform over the picture of earlier sprites.
//
// For the pixel at (displayX, displayY) the sprite asks the sample buffer for
// the sample at address displayX; the buffer answers one clock later. The
// 10-bit sample s is centred and scaled to a screen row,
//     row = V_ACTIVE/2 - ((s - 512) * verticalGain) / 16   (arithmetic shift),
// and if that row is displayY the pixel is painted CURVE_COLOR; otherwise the
// pixel of the previous sprite passes through. With verticalGain = 12 the full
// ADC range spans the 768 visible rows; larger gains zoom in. At the first
// position of each frame (0, 0) `drawStarting` pulses for one clock; it drives
// the buffer's lockTrigger so the frame is drawn from a freshly locked record.
// The original design gives the address request, the scaling by a user setting, the
// plot test and drawStarting; the scaling formula, the gain encoding and the
// colour are this design's choices.
//
// Timing: `address` is combinational from videoIn.displayX. `dataIn` must
// arrive exactly one clock later (the buffer's read latency). videoOut and
// pixelOut lag videoIn by two clocks; drawStarting is registered, one clock
// after (0, 0) appears on videoIn. The pixel pipeline has no reset. The upper
// address bits are always zero and the lower ones equal displayX: the read
// address is the column, as the original design describes.
module curve_sprite
  import dso_pkg::*;
#(
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned DATA_W   = 10,
  parameter int unsigned ADDR_W   = 20
) (
  input  logic              clock,
  input  logic              reset,
  input  video_t            videoIn,
  input  pixel_t            pixelIn,
  input  logic [DATA_W-1:0] dataIn,
  input  logic [3:0]        verticalGain,
  output video_t            videoOut,
  output pixel_t            pixelOut,
  output logic              drawStarting,
  output logic [ADDR_W-1:0] address
);

  localparam int unsigned ROW_W = DATA_W + 6;   // signed width of row arithmetic

  video_t videoD1;
  pixel_t pixelD1;

  logic signed [ROW_W-1:0] centred, scaled, row;

  assign address = ADDR_W'(videoIn.displayX);

  always_comb begin
    centred = $signed(ROW_W'(dataIn)) - $signed(ROW_W'(1 << (DATA_W - 1)));
    scaled  = (centred * $signed({1'b0, verticalGain})) >>> 4;
    row     = $signed(ROW_W'(V_ACTIVE / 2)) - scaled;
  end

  always_ff @(posedge clock) begin
    videoD1  <= videoIn;
    pixelD1  <= pixelIn;
    videoOut <= videoD1;
    pixelOut <= (!videoD1.blank && row == $signed(ROW_W'(videoD1.displayY)))
                ? CURVE_COLOR : pixelD1;
  end

  always_ff @(posedge clock) begin
    if (reset) drawStarting <= 1'b0;
    else       drawStarting <= (videoIn.displayX == '0) && (videoIn.displayY == '0);
  end

endmodule
