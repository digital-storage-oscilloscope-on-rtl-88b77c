// xvga: timing generator for a 1024x768, 60 Hz monitor (65 MHz pixel clock).
//
// Two counters step through every pixel position of a frame, including the
// blanking intervals: displayX runs 0..H_TOTAL-1 along a line and displayY
// 0..V_TOTAL-1 down the frame. `blank` is high outside the visible
// H_ACTIVE x V_ACTIVE area; `hsync` and `vsync` are active low during their
// sync pulses, as the 1024x768 mode expects. The outputs form the head of the
// sprite chain. The original design names this block and its outputs (displayX[10:0],
// displayY[9:0], hsync, vsync, blank); the porch and sync lengths are the
// standard numbers for this mode, not numbers from the original design, and the
// parameters let a testbench shrink the frame.
//
// Timing: one position per clock; all outputs change together, one clock
// after the counters advance. `reset` (synchronous) restarts at (0, 0).
module xvga
  import dso_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FRONT  = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BACK   = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FRONT  = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BACK   = 29
) (
  input  logic   clock,
  input  logic   reset,
  output video_t video
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;

  logic [X_W-1:0] hcount;
  logic [Y_W-1:0] vcount;

  always_ff @(posedge clock) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == X_W'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == Y_W'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    video.displayX = hcount;
    video.displayY = vcount;
    video.blank    = (hcount >= X_W'(H_ACTIVE)) || (vcount >= Y_W'(V_ACTIVE));
    video.hsync    = !((hcount >= X_W'(H_ACTIVE + H_FRONT)) &&
                       (hcount <  X_W'(H_ACTIVE + H_FRONT + H_SYNC)));
    video.vsync    = !((vcount >= Y_W'(V_ACTIVE + V_FRONT)) &&
                       (vcount <  Y_W'(V_ACTIVE + V_FRONT + V_SYNC)));
  end

endmodule
