// user_control_tb: checks debouncing and the effect of each control.
//
// With a 20-clock debounce time the testbench presses buttons cleanly (held
// well past the debounce time) and with bounces (short pulses that must be
// ignored), and keeps its own copy of threshold and samplePeriod: +/-16 with
// saturation at 0 and 1023, centre button back to 512, period halved or
// doubled within 1..512. Each setting must change only after the debounce
// time and exactly once per press. Switches are checked the same way, and a
// glitch shorter than the debounce time must not reach the outputs.
module user_control_tb;
  localparam int DB = 20;

  logic        clock = 1'b0;
  logic        reset;
  logic [4:0]  buttons;
  logic [15:0] switches;
  logic [9:0]  samplePeriod, threshold;
  logic [3:0]  verticalGain;
  logic        fallingEdge, triggerDisable, readTriggerRelative, stop, singleShot;

  int checks = 0, failures = 0;

  user_control #(.DEBOUNCE_CYCLES(DB), .THRESHOLD_STEP(16)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expThr, expPer;

  task automatic checkSettings(input string what);
    checks++;
    if (threshold !== 10'(expThr) || samplePeriod !== 10'(expPer)) begin
      failures++;
      $display("%s: threshold %0d period %0d, expected %0d %0d", what, threshold, samplePeriod, expThr, expPer);
    end
  endtask

  // Clean press: the setting must not move before the debounce time and must
  // have moved (once) shortly after it.
  task automatic press(input int b);
    buttons[b] = 1'b1;
    repeat (DB - 2) @(negedge clock);
    checkSettings("before debounce");
    repeat (8) @(negedge clock);
    case (b)
      0: expThr = 512;
      1: expThr = (expThr + 16 > 1023) ? 1023 : expThr + 16;
      2: expThr = (expThr - 16 < 0) ? 0 : expThr - 16;
      3: expPer = (expPer > 1) ? expPer / 2 : 1;
      4: expPer = (expPer < 512) ? expPer * 2 : 512;
      default: ;
    endcase
    checkSettings("after press");
    repeat (3 * DB) @(negedge clock);
    checkSettings("while held");
    buttons[b] = 1'b0;
    repeat (DB + 6) @(negedge clock);
    checkSettings("after release");
  endtask

  task automatic bounce(input int b);
    for (int i = 0; i < 6; i++) begin
      buttons[b] = 1'b1;
      repeat ($urandom_range(1, DB / 3)) @(negedge clock);
      buttons[b] = 1'b0;
      repeat ($urandom_range(1, DB / 3)) @(negedge clock);
    end
    repeat (DB + 6) @(negedge clock);
    checkSettings("after bounce");
  endtask

  initial begin
    reset = 1'b1; buttons = '0; switches = '0;
    @(negedge clock); @(negedge clock);
    reset = 1'b0;
    expThr = 512; expPer = 1;
    @(negedge clock);
    checkSettings("reset values");
    // threshold up to saturation and back down to zero
    for (int i = 0; i < 34; i++) press(1);
    for (int i = 0; i < 3; i++) bounce(1);
    press(0);
    for (int i = 0; i < 34; i++) press(2);
    bounce(2);
    press(0);
    // sample period
    press(3);
    for (int i = 0; i < 11; i++) press(4);
    bounce(4);
    for (int i = 0; i < 4; i++) press(3);
    // switches
    for (int t = 0; t < 20; t++) begin
      logic [15:0] sw;
      sw = 16'($urandom);
      // a short glitch first: outputs must keep the previous values
      switches = ~switches;
      repeat (DB / 2) @(negedge clock);
      switches = sw ^ 16'hFFFF;
      @(negedge clock);
      switches = sw;
      repeat (DB + 6) @(negedge clock);
      checks++;
      if (verticalGain !== sw[3:0] || fallingEdge !== sw[4] || triggerDisable !== sw[5] ||
          readTriggerRelative !== !sw[6] || stop !== sw[7] || singleShot !== sw[8]) begin
        failures++; $display("switch outputs wrong for %h", sw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
