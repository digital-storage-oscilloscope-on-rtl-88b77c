// curve_sprite_tb: checks waveform plotting and the frame-start pulse.
//
// A behavioural stand-in for the sample buffer holds one random 10-bit sample
// per column and answers an address one clock later, as the real buffer does.
// A full 1024x768 raster (plus blanked columns) is swept with a random pixel
// coming in from the previous sprite and a vertical gain that changes every
// line. For each position the testbench computes the plotted row
// 384 - floor((s - 512) * gain / 16) on its own and expects, two clocks later,
// the curve colour where the row matches the position and the incoming pixel
// elsewhere. drawStarting must pulse exactly once per frame, one clock after
// position (0, 0).
module curve_sprite_tb;
  import dso_pkg::*;

  logic        clock = 1'b0;
  logic        reset;
  video_t      videoIn, videoOut;
  pixel_t      pixelIn, pixelOut;
  logic [9:0]  dataIn;
  logic [3:0]  verticalGain;
  logic        drawStarting;
  logic [19:0] address;

  int checks = 0, failures = 0;
  int plotted = 0, starts = 0;

  curve_sprite dut (.*);

  always #5 clock = ~clock;

  // Stand-in for the buffer: registered read of a per-column table.
  logic [9:0] column [2048];
  always_ff @(posedge clock) dataIn <= column[address[10:0]];

  initial begin
    repeat (3_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs, two clocks deep.
  video_t expVideo [2];
  pixel_t expPixel [2];
  bit     expStart [2];
  int     cycle;

  function automatic pixel_t predict(video_t v, pixel_t inPix, int gain);
    int s, scaled, row;
    s = column[v.displayX];
    scaled = ((s - 512) * gain);
    // floor division by 16
    row = 384 - ((scaled >= 0) ? scaled / 16 : -((-scaled + 15) / 16));
    if (!v.blank && row == int'(v.displayY)) return 24'hFFFF00;
    return inPix;
  endfunction

  task automatic step(video_t v);
    videoIn = v;
    pixelIn = 24'($urandom);
    expVideo[1] = expVideo[0];
    expPixel[1] = expPixel[0];
    expVideo[0] = v;
    expPixel[0] = predict(v, pixelIn, verticalGain);
    expStart[1] = expStart[0];
    expStart[0] = (v.displayX == 0 && v.displayY == 0);
    @(negedge clock);
    cycle++;
    checks++;
    if (drawStarting !== expStart[0]) begin
      failures++; $display("drawStarting %b expected %b", drawStarting, expStart[0]);
    end
    if (drawStarting) starts++;
    if (cycle >= 2) begin
      checks++;
      if (videoOut !== expVideo[1] || pixelOut !== expPixel[1]) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d pixel %h expected %h", expVideo[1].displayX,
                                    expVideo[1].displayY, pixelOut, expPixel[1]);
      end
      if (pixelOut == 24'hFFFF00 && expPixel[1] == 24'hFFFF00) plotted++;
    end
  endtask

  initial begin
    video_t v;
    foreach (column[i]) column[i] = 10'($urandom);
    column[3] = 10'd0; column[4] = 10'd1023; column[5] = 10'd512;
    reset = 1'b1; videoIn = '0; pixelIn = '0; verticalGain = 4'd12; cycle = 0;
    @(negedge clock); @(negedge clock);
    reset = 1'b0;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < 770; y++) begin
        verticalGain = 4'($urandom_range(0, 15));
        if (y < 4) verticalGain = 4'd12;
        for (int x = 0; x < 1030; x++) begin
          v.displayX = X_W'(x);
          v.displayY = Y_W'(y);
          v.blank    = (x >= 1024) || (y >= 768);
          v.hsync    = 1'b1;
          v.vsync    = (y != 769);
          step(v);
        end
      end
    end
    checks++;
    if (starts != 2 || plotted < 1000) begin
      failures++; $display("frame starts %0d, plotted %0d", starts, plotted);
    end
    $display("frame starts %0d, plotted pixels %0d", starts, plotted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
