// xvga_tb: checks the 1024x768 raster timing at the default parameters.
//
// Over two full frames the testbench follows its own position counter and
// compares displayX/displayY with it every clock. It measures the frame period
// (1344 x 806 clocks), the hsync period and pulse width (1344 and 136 clocks),
// the vsync pulse width (6 lines), and counts the unblanked pixels of a frame
// (1024 x 768). Sync pulses must be active low and start after the front
// porch (24 pixels, 3 lines).
module xvga_tb;
  import dso_pkg::*;
  localparam int H_TOTAL = 1344, V_TOTAL = 806;

  logic   clock = 1'b0;
  logic   reset;
  video_t video;

  int checks = 0, failures = 0;

  xvga dut (.clock, .reset, .video);

  always #5 clock = ~clock;

  initial begin
    repeat (3 * H_TOTAL * V_TOTAL) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at x=%0d y=%0d", what, video.displayX, video.displayY);
    end
  endtask

  int x, y, visible, hsLow, vsLowLines;
  bit expH, expV, expB;

  initial begin
    reset = 1'b1;
    @(negedge clock); @(negedge clock);
    reset = 1'b0;
    x = 0; y = 0;
    for (int f = 0; f < 2; f++) begin
      visible = 0; vsLowLines = 0;
      for (int c = 0; c < H_TOTAL * V_TOTAL; c++) begin
        expB = (x >= 1024) || (y >= 768);
        expH = !(x >= 1024 + 24 && x < 1024 + 24 + 136);
        expV = !(y >= 768 + 3 && y < 768 + 3 + 6);
        check(video.displayX == X_W'(x) && video.displayY == Y_W'(y), "position");
        check(video.blank == expB, "blank");
        check(video.hsync == expH, "hsync");
        check(video.vsync == expV, "vsync");
        if (!video.blank) visible++;
        if (x == 0 && !video.vsync) vsLowLines++;
        if (y == 0) begin
          if (!video.hsync) hsLow++;
        end
        @(negedge clock);
        x++;
        if (x == H_TOTAL) begin x = 0; y = (y + 1) % V_TOTAL; end
      end
      check(visible == 1024 * 768, "visible pixel count");
      check(vsLowLines == 6, "vsync width");
    end
    check(hsLow == 2 * 136, "hsync width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
