// adc_controller: downsamples the XADC sample stream.
//
// The XADC core delivers one 12-bit conversion per pulse of `ready` (1 MSPS in
// single-channel mode). This module forwards one conversion out of every
// `samplePeriod` conversions, so the output rate is 1 MSPS / samplePeriod.
// Decimating here, before the samples reach the buffer, is the original design's
// plan; forwarding the first of each group unchanged (no averaging) is this
// design's choice, as is treating samplePeriod = 0 like 1.
//
// Interface: `ready`/`dataIn` from the XADC core; `readyOut` pulses for one
// clock with the forwarded sample on `dataOut`, which holds until the next
// forwarded sample. Timing: readyOut follows the accepted `ready` by one clock.
// `reset` (synchronous, active high) clears the output and restarts the count.
module adc_controller #(
  parameter int unsigned DATA_W   = 12,
  parameter int unsigned PERIOD_W = 10
) (
  input  logic                clock,
  input  logic                reset,
  input  logic                ready,
  input  logic [DATA_W-1:0]   dataIn,
  input  logic [PERIOD_W-1:0] samplePeriod,
  output logic                readyOut,
  output logic [DATA_W-1:0]   dataOut
);

  logic [PERIOD_W-1:0] count;   // conversions seen in the current group
  logic [PERIOD_W-1:0] lastIdx; // index of the last conversion of a group

  assign lastIdx = (samplePeriod == '0) ? '0 : samplePeriod - 1'b1;

  always_ff @(posedge clock) begin
    if (reset) begin
      count    <= '0;
      readyOut <= 1'b0;
      dataOut  <= '0;
    end else begin
      readyOut <= 1'b0;
      if (ready) begin
        if (count == '0) begin
          readyOut <= 1'b1;
          dataOut  <= dataIn;
        end
        count <= (count >= lastIdx) ? '0 : count + 1'b1;
      end
    end
  end

endmodule
