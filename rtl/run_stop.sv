// run_stop: decides when the sample buffer stops collecting.
//
// Two ways to stop are supported. The stop switch (`stop`) freezes the buffer
// for as long as it is on. In single-shot mode (`singleShot` on) the
// controller is armed and stops the buffer as soon as the trigger fires once;
// it stays stopped until single-shot mode is switched off, which re-arms it
// for the next time. While stopped the display keeps showing one record. The
// run/stop feature and the single-shot mode that stops at the first trigger
// follow the original design; the switch-based control and the re-arm rule are this
// design's choices.
//
// Timing: disableCollection rises one clock after the isTriggered pulse, so
// the buffer still records the trigger mark of that pulse (the mark and the
// pulse share a clock). `reset` (synchronous) returns to the running state.
module run_stop (
  input  logic clock,
  input  logic reset,
  input  logic stop,
  input  logic singleShot,
  input  logic isTriggered,
  output logic disableCollection
);

  typedef enum logic [1:0] {RUNNING, ARMED, HELD} state_t;
  state_t state;

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= RUNNING;
    end else begin
      unique case (state)
        RUNNING: if (singleShot) state <= ARMED;
        ARMED:   if (!singleShot) state <= RUNNING;
                 else if (isTriggered) state <= HELD;
        HELD:    if (!singleShot) state <= RUNNING;
        default: state <= RUNNING;
      endcase
    end
  end

  assign disableCollection = stop || (state == HELD);

endmodule
