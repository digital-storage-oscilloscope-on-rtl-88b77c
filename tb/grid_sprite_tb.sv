// grid_sprite_tb: checks the graticule over one full visible frame.
//
// Every visible position of a 1024x768 frame plus a run of blanked positions
// is presented in raster order. One clock later the pixel must be: black when
// blanked; AXIS grey on column 512 or row 384; GRID grey on multiples of 128
// columns or 96 rows and on the last column and row; black elsewhere. The
// control signals must come out one clock later, unchanged.
module grid_sprite_tb;
  import dso_pkg::*;

  logic   clock = 1'b0;
  video_t videoIn, videoOut;
  pixel_t pixelOut;

  int checks = 0, failures = 0;
  int gridPixels = 0, axisPixels = 0;

  grid_sprite dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pixel_t expected(video_t v);
    int x = v.displayX, y = v.displayY;
    if (v.blank) return 24'h000000;
    if (x == 512 || y == 384) return 24'h808080;
    if (x % 128 == 0 || y % 96 == 0 || x == 1023 || y == 767) return 24'h404040;
    return 24'h000000;
  endfunction

  video_t previous;

  initial begin
    previous = '0;
    for (int y = 0; y < 770; y++) begin
      for (int x = 0; x < 1030; x++) begin
        videoIn.displayX = X_W'(x);
        videoIn.displayY = Y_W'(y);
        videoIn.blank    = (x >= 1024) || (y >= 768);
        videoIn.hsync    = $urandom_range(0, 1);
        videoIn.vsync    = $urandom_range(0, 1);
        @(negedge clock);
        checks++;
        if (videoOut !== videoIn || pixelOut !== expected(videoIn)) begin
          failures++;
          if (failures < 10) $display("x=%0d y=%0d pixel %h expected %h", x, y, pixelOut, expected(videoIn));
        end
        if (pixelOut == 24'h404040) gridPixels++;
        if (pixelOut == 24'h808080) axisPixels++;
      end
    end
    // The two centre lines cross once: 1024 + 768 - 1 axis pixels.
    checks++;
    if (axisPixels != 1024 + 768 - 1) begin failures++; $display("axis pixels %0d", axisPixels); end
    $display("grid pixels %0d, axis pixels %0d", gridPixels, axisPixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
