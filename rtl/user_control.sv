// user_control: turns the board's buttons and switches into settings.
//
// All five push buttons and the nine used slide switches are debounced (module
// debounce). A button acts once per press, on the clean rising edge:
//   buttons[0] centre : threshold back to mid-scale (512)
//   buttons[1] up     : threshold + THRESHOLD_STEP (saturates at 1023)
//   buttons[2] down   : threshold - THRESHOLD_STEP (saturates at 0)
//   buttons[3] left   : samplePeriod halved (not below 1) - faster sampling
//   buttons[4] right  : samplePeriod doubled (not above 512) - slower sampling
// The switches are levels:
//   switches[3:0] vertical gain of the curve (12 fits the full ADC range)
//   switches[4]   trigger on falling instead of rising edges
//   switches[5]   trigger disable
//   switches[6]   free-running display: read relative to the newest sample
//                 instead of the trigger (readTriggerRelative = !switches[6])
//   switches[7]   stop: freeze the buffer
//   switches[8]   single-shot mode: stop at the next trigger
// The original design says this module reads buttons and switches, debounces them and
// distributes sample rate, vertical scaling and trigger level; which control
// does what, the step sizes and the power-of-two period steps are this
// design's choices. After reset samplePeriod is 1 (full 1 MSPS) and the
// threshold is 512. Timing: a setting changes one clock after the debounced
// press is seen.
module user_control #(
  parameter int unsigned DEBOUNCE_CYCLES = 650_000,
  parameter int unsigned THRESHOLD_STEP  = 16
) (
  input  logic        clock,
  input  logic        reset,
  input  logic [4:0]  buttons,
  input  logic [15:0] switches,
  output logic [9:0]  samplePeriod,
  output logic [9:0]  threshold,
  output logic [3:0]  verticalGain,
  output logic        fallingEdge,
  output logic        triggerDisable,
  output logic        readTriggerRelative,
  output logic        stop,
  output logic        singleShot
);

  logic [4:0]  buttonsClean, buttonsLast, pressed;
  logic [8:0]  switchesClean;   // switches[15:9] have no function

  for (genvar i = 0; i < 5; i++) begin : g_button
    debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db (
      .clock(clock), .reset(reset), .noisy(buttons[i]), .clean(buttonsClean[i]));
  end
  for (genvar i = 0; i < 9; i++) begin : g_switch
    debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db (
      .clock(clock), .reset(reset), .noisy(switches[i]), .clean(switchesClean[i]));
  end

  assign pressed = buttonsClean & ~buttonsLast;

  always_ff @(posedge clock) begin
    if (reset) begin
      buttonsLast  <= '0;
      samplePeriod <= 10'd1;
      threshold    <= 10'd512;
    end else begin
      buttonsLast <= buttonsClean;
      if (pressed[0])
        threshold <= 10'd512;
      else if (pressed[1])
        threshold <= (threshold > 10'(1023 - THRESHOLD_STEP)) ? 10'd1023
                                                             : threshold + 10'(THRESHOLD_STEP);
      else if (pressed[2])
        threshold <= (threshold < 10'(THRESHOLD_STEP)) ? 10'd0
                                                      : threshold - 10'(THRESHOLD_STEP);
      if (pressed[3])
        samplePeriod <= (samplePeriod > 10'd1) ? samplePeriod >> 1 : 10'd1;
      else if (pressed[4])
        samplePeriod <= (samplePeriod < 10'd512) ? samplePeriod << 1 : 10'd512;
    end
  end

  assign verticalGain        = switchesClean[3:0];
  assign fallingEdge         = switchesClean[4];
  assign triggerDisable      = switchesClean[5];
  assign readTriggerRelative = !switchesClean[6];
  assign stop                = switchesClean[7];
  assign singleShot          = switchesClean[8];

endmodule
