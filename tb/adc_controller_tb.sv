// adc_controller_tb: checks the decimation of the XADC stream.
//
// Conversions arrive as one-clock ready pulses with random gaps and random
// data. For several sample periods (including 0, treated as 1) the testbench
// predicts which conversions must be forwarded: the first of every group of
// samplePeriod. Each forwarded sample must appear exactly one clock after its
// ready pulse, with the same data, and no other output pulse may occur.
module adc_controller_tb;
  logic        clock = 1'b0;
  logic        reset;
  logic        ready;
  logic [11:0] dataIn;
  logic [9:0]  samplePeriod;
  logic        readyOut;
  logic [11:0] dataOut;

  int checks = 0, failures = 0;

  adc_controller #(.DATA_W(12), .PERIOD_W(10)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output of the next clock.
  logic        expReady;
  logic [11:0] expData;
  int          seen;

  task automatic runPeriod(input int period, input int conversions);
    int n;
    int effective;
    effective = (period == 0) ? 1 : period;
    @(negedge clock);
    reset = 1'b1; ready = 1'b0; dataIn = '0; samplePeriod = 10'(period);
    @(negedge clock); reset = 1'b0;
    // outputs cleared by reset
    checks++;
    if (readyOut !== 1'b0 || dataOut !== '0) begin failures++; $display("reset state wrong"); end
    seen = 0; n = 0;
    while (n < conversions) begin
      @(negedge clock);
      ready  = ($urandom_range(0, 2) == 0);
      dataIn = 12'($urandom);
      expReady = ready && (seen % effective == 0);
      expData  = dataIn;
      if (ready) begin seen++; n++; end
      @(negedge clock);
      checks++;
      if (readyOut !== expReady || (expReady && dataOut !== expData)) begin
        failures++;
        $display("period %0d: readyOut=%b dataOut=%h, expected %b %h", period, readyOut, dataOut, expReady, expData);
      end
      ready = 1'b0;
      // the pulse must not linger
      @(negedge clock);
      checks++;
      if (readyOut !== 1'b0) begin failures++; $display("readyOut longer than one clock"); end
    end
  endtask

  initial begin
    runPeriod(1, 200);
    runPeriod(0, 50);
    runPeriod(3, 300);
    runPeriod(7, 400);
    runPeriod(100, 600);
    runPeriod(1023, 2100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
