// run_stop_tb: checks the stop switch and the single-shot mode.
//
// A random sequence of stop, singleShot and isTriggered inputs is applied.
// The testbench's own model: single-shot is armed when switched on, becomes
// held at the first trigger while armed, and is released when switched off;
// disableCollection = stop or held, one clock after the inputs. It also
// checks that a held state survives further triggers and that each case
// (manual stop, single-shot capture, re-arm) happened.
module run_stop_tb;
  logic clock = 1'b0;
  logic reset, stop, singleShot, isTriggered, disableCollection;

  int checks = 0, failures = 0;
  int nCaptures = 0, nRearms = 0, nManual = 0;

  run_stop dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit armed, held;

  initial begin
    reset = 1'b1; stop = 0; singleShot = 0; isTriggered = 0;
    @(negedge clock); @(negedge clock);
    reset = 1'b0;
    armed = 0; held = 0;
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(0, 199) == 0) stop = !stop;
      if ($urandom_range(0, 149) == 0) singleShot = !singleShot;
      isTriggered = ($urandom_range(0, 39) == 0);
      // model of the next clock
      if (!singleShot) begin
        if (held) nRearms++;
        armed = 0; held = 0;
      end else if (!armed && !held) armed = 1;
      else if (armed && isTriggered) begin armed = 0; held = 1; nCaptures++; end
      if (stop) nManual++;
      @(negedge clock);
      checks++;
      if (disableCollection !== (stop || held)) begin
        failures++;
        if (failures < 10) $display("clock %0d: disableCollection %b expected %b", i, disableCollection, stop || held);
      end
    end
    checks++;
    if (nCaptures == 0 || nRearms == 0 || nManual == 0) begin
      failures++; $display("a case never happened");
    end
    $display("captures %0d, re-arms %0d, stopped clocks %0d", nCaptures, nRearms, nManual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
