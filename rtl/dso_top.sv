// dso_top: the digital storage oscilloscope, acquisition and display.
//
// Acquisition pipeline: the XADC core (outside this module, its ready/data
// outputs are the adcReady/adcData ports) converts the scaled probe voltage at
// 1 MSPS. adc_controller keeps one conversion in samplePeriod; every kept
// sample is written into the active bank of sample_buffer, and trigger
// compares the top 10 bits of each sample with the threshold and marks the
// crossing sample in the buffer.
//
// Display pipeline: xvga produces the 1024x768 raster; the control signals and
// the pixel then pass in series through three sprites, each adding its own
// latency and delaying the control signals to match: grid_sprite (1 clock,
// background and graticule), curve_sprite (2 clocks, the waveform) and
// text_sprite (2 clocks, the "DT: nnnnUS" sample-interval label). At the first
// pixel of each frame the curve sprite pulses drawStarting, which makes the
// buffer swap banks, so each frame is drawn from one stable record while new
// samples go to the other bank. The curve sprite reads the locked bank at
// address displayX.
//
// user_control debounces buttons and switches into samplePeriod, threshold,
// vertical gain, trigger edge and disable, display mode, stop and single-shot
// mode; run_stop turns the last two (and the trigger, in single-shot mode)
// into the buffer's disableCollection.
//
// Everything runs on one clock, the 65 MHz pixel clock; the XADC's ready is a
// one-clock pulse per conversion in that domain. The block set and their
// connections follow the original design's block diagram; the single clock domain,
// the bit slices between 12-bit and 10-bit samples and the control mapping are
// this design's choices. Outputs: active-low hsync/vsync, blank, and 24-bit
// RGB pixel, all five clocks behind the raster counters.
module dso_top
  import dso_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter int unsigned BUFFER_DEPTH    = 1024,
  parameter int unsigned H_ACTIVE        = 1024,
  parameter int unsigned H_FRONT         = 24,
  parameter int unsigned H_SYNC          = 136,
  parameter int unsigned H_BACK          = 160,
  parameter int unsigned V_ACTIVE        = 768,
  parameter int unsigned V_FRONT         = 3,
  parameter int unsigned V_SYNC          = 6,
  parameter int unsigned V_BACK          = 29
) (
  input  logic         clock,
  input  logic         reset,
  // From the XADC core.
  input  logic         adcReady,
  input  logic [11:0]  adcData,
  // Board controls.
  input  logic [4:0]   buttons,
  input  logic [15:0]  switches,
  // To the monitor.
  output logic         hsync,
  output logic         vsync,
  output logic         blank,
  output pixel_t       pixel
);

  // ---- user settings ----
  logic [9:0] samplePeriod, threshold;
  logic [3:0] verticalGain;
  logic       fallingEdge, triggerDisable, readTriggerRelative;
  logic       stop, singleShot, disableCollection;

  user_control #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_control (
    .clock, .reset, .buttons, .switches,
    .samplePeriod, .threshold, .verticalGain, .fallingEdge,
    .triggerDisable, .readTriggerRelative, .stop, .singleShot
  );

  // ---- acquisition ----
  logic        sampleReady;
  logic [11:0] sample;
  logic        isTriggered;
  logic        drawStarting;
  logic [19:0] readAddress;
  logic [9:0]  readData;
  logic        readDataReady;   // the curve sprite relies on the fixed latency instead

  adc_controller #(.DATA_W(12), .PERIOD_W(10)) u_adc (
    .clock, .reset,
    .ready(adcReady), .dataIn(adcData), .samplePeriod,
    .readyOut(sampleReady), .dataOut(sample)
  );

  trigger #(.DATA_W(10)) u_trigger (
    .clock, .reset,
    .dataIn(sample[11:2]), .threshold, .triggerDisable, .fallingEdge,
    .isTriggered
  );

  run_stop u_runstop (
    .clock, .reset, .stop, .singleShot, .isTriggered, .disableCollection
  );

  sample_buffer #(.DATA_W(12), .OUT_W(10), .ADDR_W(20), .DEPTH(BUFFER_DEPTH)) u_buffer (
    .clock, .reset,
    .ready(sampleReady), .dataIn(sample),
    .isTrigger(isTriggered), .lockTrigger(drawStarting), .disableCollection,
    .address(readAddress), .readTriggerRelative,
    .dataOut(readData), .dataOutReady(readDataReady)
  );

  // ---- display ----
  video_t videoRaster, videoGrid, videoCurve, videoText;
  pixel_t pixelGrid, pixelCurve, pixelText;
  char_t  label [10];

  xvga #(
    .H_ACTIVE(H_ACTIVE), .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK),
    .V_ACTIVE(V_ACTIVE), .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK)
  ) u_xvga (
    .clock, .reset, .video(videoRaster)
  );

  grid_sprite #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE)) u_grid (
    .clock, .videoIn(videoRaster), .videoOut(videoGrid), .pixelOut(pixelGrid)
  );

  curve_sprite #(.V_ACTIVE(V_ACTIVE), .DATA_W(10), .ADDR_W(20)) u_curve (
    .clock, .reset,
    .videoIn(videoGrid), .pixelIn(pixelGrid),
    .dataIn(readData), .verticalGain,
    .videoOut(videoCurve), .pixelOut(pixelCurve),
    .drawStarting, .address(readAddress)
  );

  period_label u_label (.samplePeriod, .characters(label));

  text_sprite #(.DISPLAY_LENGTH(10)) u_text (
    .clock,
    .videoIn(videoCurve), .pixelIn(pixelCurve),
    .characterString(label),
    .positionX(X_W'(16)), .positionY(Y_W'(16)),
    .videoOut(videoText), .pixelOut(pixelText)
  );

  assign hsync = videoText.hsync;
  assign vsync = videoText.vsync;
  assign blank = videoText.blank;
  assign pixel = pixelText;

endmodule
