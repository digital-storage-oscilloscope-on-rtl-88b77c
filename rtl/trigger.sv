// trigger: edge trigger on a threshold crossing.
//
// The module remembers the sample it saw on the previous clock. A rising
// crossing is previous < threshold <= current; a falling crossing is
// previous >= threshold > current. When the crossing matches the selected
// edge and `triggerDisable` is low, `isTriggered` is high for exactly one
// clock. Because the ADC controller holds its data between samples, comparing
// consecutive clocks finds each crossing once without a valid strobe.
// The original design gives the threshold test, the disable input, the one-cycle
// pulse and the edge choice; the exact comparison (>= at the threshold) and
// the `fallingEdge` port are this design's choices.
//
// Timing: isTriggered is registered; it is high in the clock after the one in
// which the crossing sample first appears on `dataIn`. `reset` is synchronous.
module trigger #(
  parameter int unsigned DATA_W = 10
) (
  input  logic              clock,
  input  logic              reset,
  input  logic [DATA_W-1:0] dataIn,
  input  logic [DATA_W-1:0] threshold,
  input  logic              triggerDisable,
  input  logic              fallingEdge,    // 0: fire on rising edges, 1: on falling edges
  output logic              isTriggered
);

  logic [DATA_W-1:0] previous;
  logic              primed;    // previous holds a real sample
  logic              rising, falling;

  assign rising  = (previous <  threshold) && (dataIn >= threshold);
  assign falling = (previous >= threshold) && (dataIn <  threshold);

  always_ff @(posedge clock) begin
    if (reset) begin
      previous    <= '0;
      primed      <= 1'b0;
      isTriggered <= 1'b0;
    end else begin
      previous    <= dataIn;
      primed      <= 1'b1;
      isTriggered <= primed && !triggerDisable && (fallingEdge ? falling : rising);
    end
  end

endmodule
