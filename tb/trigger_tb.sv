// trigger_tb: checks threshold-crossing detection on both edges.
//
// A random walk (held for random numbers of clocks, as the ADC controller
// holds its output) is applied with a random threshold, edge selection and
// disable. The expected pulse is computed from the previous and current data
// with the crossing rule: rising = prev < thr <= cur, falling = prev >= thr >
// cur. isTriggered must equal that prediction one clock later, so every pulse
// is exactly one clock long. Counts of rising and falling firings must be
// non-zero.
module trigger_tb;
  logic       clock = 1'b0;
  logic       reset;
  logic [9:0] dataIn, threshold;
  logic       triggerDisable, fallingEdge;
  logic       isTriggered;

  int checks = 0, failures = 0;
  int risingFired = 0, fallingFired = 0;

  trigger #(.DATA_W(10)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] prev;
  logic       expected;
  int         hold, step, value;

  initial begin
    reset = 1'b1; dataIn = 10'd0; threshold = 10'd512; triggerDisable = 1'b0; fallingEdge = 1'b0;
    @(posedge clock); @(posedge clock);
    @(negedge clock); reset = 1'b0;
    // first clock after reset: no previous sample, no pulse
    dataIn = 10'd1000;
    @(negedge clock);
    checks++;
    if (isTriggered) begin failures++; $display("pulse without a previous sample"); end
    prev  = dataIn;
    value = dataIn;
    for (int i = 0; i < 40000; i++) begin
      if (i % 5000 == 0) begin
        threshold   = 10'($urandom_range(100, 900));
        fallingEdge = $urandom_range(0, 1);
      end
      triggerDisable = ($urandom_range(0, 9) == 0);
      if (hold == 0) begin
        step  = $urandom_range(0, 120) - 60;
        value = value + step;
        if (value < 0) value = 0;
        if (value > 1023) value = 1023;
        hold = $urandom_range(0, 3);
      end else hold--;
      dataIn = 10'(value);
      expected = !triggerDisable &&
                 (fallingEdge ? (prev >= threshold && dataIn < threshold)
                              : (prev < threshold && dataIn >= threshold));
      prev = dataIn;
      @(negedge clock);
      checks++;
      if (isTriggered !== expected) begin
        failures++;
        $display("step %0d: isTriggered=%b expected %b (data %0d thr %0d falling %b)",
                 i, isTriggered, expected, dataIn, threshold, fallingEdge);
      end
      if (isTriggered && fallingEdge) fallingFired++;
      if (isTriggered && !fallingEdge) risingFired++;
    end
    checks++;
    if (risingFired == 0 || fallingFired == 0) begin
      failures++; $display("an edge never fired: rising %0d falling %0d", risingFired, fallingFired);
    end
    $display("rising firings %0d, falling firings %0d", risingFired, fallingFired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
