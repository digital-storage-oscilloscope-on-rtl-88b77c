// text_sprite_tb: checks character rendering against hand-written glyphs.
//
// The testbench knows six glyphs as 5x7 dot patterns ('0', '1', '7', 'A', 'T',
// ':') plus the space, and expands them itself: each dot covers 2x2 pixels,
// rows 0-13 of the 15-row cell, column 0 on the left. Strings of those
// characters are placed at random positions and a window around the strip is
// swept in raster order with a random incoming pixel. Two clocks later each
// pixel must be white where the expanded glyph has a dot and the incoming
// pixel everywhere else, including blanked positions.
module text_sprite_tb;
  import dso_pkg::*;
  localparam int LEN = 10;

  logic           clock = 1'b0;
  video_t         videoIn, videoOut;
  pixel_t         pixelIn, pixelOut;
  char_t          characterString [LEN];
  logic [X_W-1:0] positionX;
  logic [Y_W-1:0] positionY;

  int checks = 0, failures = 0;
  int litPixels = 0;

  text_sprite #(.DISPLAY_LENGTH(LEN)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (2_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference glyphs: code and seven rows of five dots, MSB on the left.
  int     glyphCode [7] = '{0, 1, 7, 10, 29, 38, 36};
  logic [4:0] glyphRows [7][7] = '{
    '{5'b01110, 5'b10001, 5'b10011, 5'b10101, 5'b11001, 5'b10001, 5'b01110},  // 0
    '{5'b00100, 5'b01100, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b01110},  // 1
    '{5'b11111, 5'b00001, 5'b00010, 5'b00100, 5'b01000, 5'b01000, 5'b01000},  // 7
    '{5'b01110, 5'b10001, 5'b10001, 5'b11111, 5'b10001, 5'b10001, 5'b10001},  // A
    '{5'b11111, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b00100, 5'b00100},  // T
    '{5'b00000, 5'b01100, 5'b01100, 5'b00000, 5'b01100, 5'b01100, 5'b00000},  // :
    '{5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000, 5'b00000}   // space
  };
  int chosen [LEN];

  function automatic bit lit(int x, int y);
    int rx, ry, k, col, row;
    rx = x - int'(positionX);
    ry = y - int'(positionY);
    if (rx < 0 || ry < 0 || rx >= 10 * LEN || ry >= 15) return 0;
    k   = chosen[rx / 10];
    col = (rx % 10) / 2;
    row = ry / 2;
    if (row >= 7) return 0;
    return glyphRows[k][row][4 - col];
  endfunction

  video_t expVideo [2];
  pixel_t expPixel [2];
  int     cycle;

  task automatic step(video_t v);
    videoIn = v;
    pixelIn = 24'($urandom);
    expVideo[1] = expVideo[0];
    expPixel[1] = expPixel[0];
    expVideo[0] = v;
    expPixel[0] = (!v.blank && lit(v.displayX, v.displayY)) ? 24'hFFFFFF : pixelIn;
    @(negedge clock);
    cycle++;
    if (cycle >= 2) begin
      checks++;
      if (videoOut !== expVideo[1] || pixelOut !== expPixel[1]) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d pixel %h expected %h", expVideo[1].displayX,
                                    expVideo[1].displayY, pixelOut, expPixel[1]);
      end
      if (expPixel[1] == 24'hFFFFFF && pixelOut == 24'hFFFFFF) litPixels++;
    end
  endtask

  initial begin
    video_t v;
    cycle = 0;
    for (int trial = 0; trial < 12; trial++) begin
      foreach (chosen[i]) begin
        chosen[i] = $urandom_range(0, 6);
        characterString[i] = char_t'(glyphCode[chosen[i]]);
      end
      positionX = X_W'($urandom_range(0, 900));
      positionY = Y_W'($urandom_range(0, 740));
      if (trial == 0) begin positionX = '0; positionY = '0; end
      for (int y = int'(positionY) - 3; y < int'(positionY) + 20; y++) begin
        for (int x = int'(positionX) - 12; x < int'(positionX) + 10 * LEN + 12; x++) begin
          if (x < 0 || y < 0) continue;
          v.displayX = X_W'(x);
          v.displayY = Y_W'(y);
          v.blank    = (x >= 1024) || (y >= 768) || (x % 37 == 5);
          v.hsync    = $urandom_range(0, 1);
          v.vsync    = 1'b1;
          step(v);
        end
      end
    end
    checks++;
    if (litPixels < 500) begin failures++; $display("only %0d text pixels", litPixels); end
    $display("text pixels drawn %0d", litPixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
