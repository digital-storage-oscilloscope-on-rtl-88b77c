// dso_top_tb: end-to-end test of the oscilloscope at its default parameters.
//
// The testbench plays the XADC core: a one-clock ready pulse every 65 clocks
// (1 MSPS at the 65 MHz pixel clock) carrying a 12-bit triangle wave. It
// presses buttons and flips switches through the real debouncers (10 ms) and
// watches the full 1024x768 monitor output for 15 frames.
//
// A reference model of the acquisition path, written from the behaviour of
// the blocks, runs alongside: decimation by samplePeriod, the threshold
// crossing rule, and two ring buffers of 1024 samples that swap at each frame
// start (while stopped, only a swap that shows the newest samples). From the model's locked record the testbench predicts every visible
// pixel outside the text label: the curve colour on the row of the sample
// displayed in that column, otherwise the graticule colour or black. The
// label area is only checked for containing text. The settings the model
// needs (sample period, threshold, edge, disable, mode, run/stop, gain) are
// read from the user-control outputs, and the frame-start strobe from the
// curve sprite; the first raster line of each frame, drawn while the banks
// swap, and the first five clocks after reset, while the sprite pipeline
// fills, are not checked.
//
// Mechanisms that must each be seen at least once: decimation, rising and
// falling triggers, a disabled trigger, a bank swap, trigger-relative and
// newest-relative display, run/stop freezing (at most one swap while
// stopped), a single-shot capture, and a threshold and a sample-period change
// from buttons.
module dso_top_tb;
  import dso_pkg::*;

  logic        clock = 1'b0;
  logic        reset;
  logic        adcReady;
  logic [11:0] adcData;
  logic [4:0]  buttons;
  logic [15:0] switches;
  logic        hsync, vsync, blank;
  pixel_t      pixel;

  int checks = 0, failures = 0;

  dso_top dut (.*);

  always #5 clock = ~clock;

  localparam int FRAME = 1344 * 806;

  initial begin
    repeat (24 * FRAME) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus: XADC stand-in ----------------
  int adcTimer = 0, adcIndex = 0;
  function automatic logic [11:0] triangle(int k);
    int p = k % 300;
    return 12'((p < 150) ? 400 + p * 22 : 400 + (300 - p) * 22);
  endfunction

  // ---------------- reference model ----------------
  int          mCount;
  bit          mReady, mTrig, mPrimed;
  logic [11:0] mData;
  logic [9:0]  mPrev;
  logic [11:0] bank [2][1024];
  bit          written [2][1024];
  int          wptr [2], trigAddr [2], active, newestBank;

  int nDecimated = 0, nRising = 0, nFalling = 0, nDisabledCrossings = 0, nSwaps = 0;
  int nFrozenFrames = 0, nRelFrames = 0, nNewestFrames = 0;
  int nSingleShotFrames = 0, nStopSwaps = 0;
  int nCurvePixels = 0, nTextPixels = 0;

  task automatic modelEdge();
    int lastIdx, writeBank;
    bit wr, newReady, newTrig, crossing;
    logic [11:0] newData;
    logic [9:0]  cur;
    // buffer, with the registered values from before this edge
    wr = mReady && !dut.disableCollection;
    if (mTrig && !dut.disableCollection)
      trigAddr[active] = wr ? wptr[active] : (wptr[active] + 1023) % 1024;
    writeBank = active;
    if (wr) begin
      bank[active][wptr[active]]    = mData;
      written[active][wptr[active]] = 1;
      wptr[active] = (wptr[active] + 1) % 1024;
      if (dut.samplePeriod > 1) nDecimated++;
    end
    // While stopped, only the swap that locks the newest bank happens.
    if (dut.drawStarting && (!dut.disableCollection || active == newestBank)) begin
      if (dut.disableCollection) nStopSwaps++;
      active = 1 - active;
      nSwaps++;
    end
    if (wr) newestBank = writeBank;
    // trigger
    cur   = mData[11:2];
    crossing = dut.fallingEdge ? (mPrev >= dut.threshold && cur < dut.threshold)
                            : (mPrev <  dut.threshold && cur >= dut.threshold);
    newTrig = mPrimed && !dut.triggerDisable && crossing;
    if (mPrimed && dut.triggerDisable && crossing) nDisabledCrossings++;
    mPrev = cur; mPrimed = 1;
    // ADC controller
    lastIdx  = (dut.samplePeriod == 0) ? 0 : int'(dut.samplePeriod) - 1;
    newReady = 0; newData = mData;
    if (adcReady) begin
      if (mCount == 0) begin newReady = 1; newData = adcData; end
      mCount = (mCount >= lastIdx) ? 0 : mCount + 1;
    end
    mReady = newReady; mData = newData; mTrig = newTrig;
  endtask

  function automatic pixel_t gridColor(int x, int y);
    if (x == 512 || y == 384) return 24'h808080;
    if (x % 128 == 0 || y % 96 == 0 || x == 1023 || y == 767) return 24'h404040;
    return 24'h000000;
  endfunction

  // Expected row of the curve in column x, or -1 when nothing is known.
  function automatic int curveRow(int x);
    int locked, base, slot, s, scaled;
    locked = 1 - active;
    base = dut.readTriggerRelative ? trigAddr[locked] : wptr[locked];
    slot = (base + x) % 1024;
    if (!written[locked][slot]) return -1;
    s = bank[locked][slot][11:2];
    scaled = (s - 512) * int'(dut.verticalGain);
    return 384 - ((scaled >= 0) ? scaled / 16 : -((-scaled + 15) / 16));
  endfunction

  int ticks = 0;

  task automatic checkPixel();
    int x, y, row;
    pixel_t exp;
    // The sprite pipeline registers have no reset: the monitor outputs are
    // defined from the fifth clock after reset on.
    if (ticks < 5) return;
    x = int'(dut.videoText.displayX);
    y = int'(dut.videoText.displayY);
    if (blank) begin
      checks++;
      if (pixel !== 24'h0) begin failures++; $display("blanked pixel not black"); end
      return;
    end
    if (y == 0) return;
    if (x >= 16 && x < 116 && y >= 16 && y < 31) begin
      if (pixel == 24'hFFFFFF) nTextPixels++;
      return;
    end
    row = curveRow(x);
    if (row < 0) return;
    exp = (row == y) ? 24'hFFFF00 : gridColor(x, y);
    checks++;
    if (pixel !== exp) begin
      failures++;
      if (failures < 20) $display("frame pixel x=%0d y=%0d: %h expected %h", x, y, pixel, exp);
    end
    if (pixel == 24'hFFFF00) nCurvePixels++;
  endtask

  // One clock: drive the inputs for the coming edge, step the model, check
  // the output that the previous edge produced.
  task automatic tick();
    adcReady = 1'b0;
    if (++adcTimer == 65) begin
      adcTimer = 0;
      adcReady = 1'b1;
      adcData  = triangle(adcIndex++);
    end
    checkPixel();
    ticks++;
    if (dut.isTriggered) begin
      if (dut.fallingEdge) nFalling++; else nRising++;
    end
    modelEdge();
    @(negedge clock);
  endtask

  task automatic runFrames(input int n);
    int swapsBefore;
    for (int f = 0; f < n; f++) begin
      swapsBefore = nSwaps;
      for (int c = 0; c < FRAME; c++) tick();
      if (dut.disableCollection) begin
        if (dut.singleShot && !dut.stop) nSingleShotFrames++;
        else nFrozenFrames++;
        checks++;
        if (nSwaps > swapsBefore + 1) begin failures++; $display("more than one bank swap while stopped"); end
      end else if (dut.readTriggerRelative) nRelFrames++;
      else nNewestFrames++;
    end
  endtask

  task automatic pressButton(input int b);
    buttons[b] = 1'b1;
    repeat (700_000) tick();
    buttons[b] = 1'b0;
    repeat (700_000) tick();
  endtask

  task automatic setSwitches(input logic [15:0] sw);
    switches = sw;
    repeat (700_000) tick();
  endtask

  initial begin
    int thrBefore, perBefore;
    reset = 1'b1; adcReady = 1'b0; adcData = '0; buttons = '0; switches = 16'h000C;
    mCount = 0; mReady = 0; mTrig = 0; mPrimed = 0; mData = '0; mPrev = '0;
    wptr = '{0, 0}; trigAddr = '{0, 0}; active = 0; newestBank = 0;
    foreach (written[b, i]) written[b][i] = 0;
    @(negedge clock); @(negedge clock);
    reset = 1'b0;
    // gain 12, rising edge, trigger-relative display
    setSwitches(16'h000C);
    runFrames(2);
    // slower sampling (period 4) and falling-edge trigger
    perBefore = int'(dut.samplePeriod);
    pressButton(4);
    pressButton(4);
    checks++;
    if (dut.samplePeriod != 10'(perBefore * 4)) begin failures++; $display("period not doubled twice"); end
    setSwitches(16'h001A);   // gain 10, falling edge
    runFrames(2);
    // free-running display and trigger disabled
    setSwitches(16'h006C);
    runFrames(2);
    // stop: the record freezes
    setSwitches(16'h008C);
    runFrames(3);
    // single shot: stops at the next trigger and holds that record
    setSwitches(16'h010C);
    runFrames(2);
    // run again with a higher threshold
    thrBefore = int'(dut.threshold);
    pressButton(1);
    checks++;
    if (dut.threshold != 10'(thrBefore + 16)) begin failures++; $display("threshold not raised"); end
    setSwitches(16'h000C);
    runFrames(2);

    checks++;
    if (nDecimated == 0 || nRising == 0 || nFalling == 0 || nDisabledCrossings == 0 ||
        nSwaps == 0 || nFrozenFrames == 0 || nSingleShotFrames == 0 || nStopSwaps == 0 || nRelFrames == 0 || nNewestFrames == 0 ||
        nCurvePixels == 0 || nTextPixels == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("decimated writes %0d, rising triggers %0d, falling triggers %0d, disabled crossings %0d",
             nDecimated, nRising, nFalling, nDisabledCrossings);
    $display("bank swaps %0d (%0d while stopped), stopped frames %0d, single-shot frames %0d, trigger-relative frames %0d, newest-relative frames %0d",
             nSwaps, nStopSwaps, nFrozenFrames, nSingleShotFrames, nRelFrames, nNewestFrames);
    $display("curve pixels %0d, label pixels %0d", nCurvePixels, nTextPixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
