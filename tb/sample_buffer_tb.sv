// sample_buffer_tb: checks the double-buffered ring store against a model.
//
// A small buffer (DEPTH = 12, not a power of two, so the wrap logic is
// exercised) gets random writes, trigger marks, bank swaps, run/stop phases
// and reads in both address modes. A reference model in the testbench keeps
// both banks, their write pointers and trigger slots. Every clock the
// testbench predicts dataOutReady (a new request when the address or mode
// changed) and, for slots already written, dataOut = top 10 bits of the
// stored sample, both one clock after the request. While stopped, the model
// allows only the one swap that locks the bank with the newest samples. The
// testbench counts that each mechanism (swap, swap while stopped, blocked
// swap, trigger mark, trigger-relative read, newest-relative read, frozen
// clocks) occurred.
module sample_buffer_tb;
  localparam int DEPTH = 12;

  logic        clock = 1'b0;
  logic        reset;
  logic        ready;
  logic [11:0] dataIn;
  logic        isTrigger, lockTrigger, disableCollection;
  logic [19:0] address;
  logic        readTriggerRelative;
  logic [9:0]  dataOut;
  logic        dataOutReady;

  int checks = 0, failures = 0;
  int nSwaps = 0, nMarks = 0, nRelReads = 0, nNewestReads = 0, nFrozen = 0;
  int nStopSwaps = 0, nBlockedSwaps = 0;

  sample_buffer #(.DATA_W(12), .OUT_W(10), .ADDR_W(20), .DEPTH(DEPTH)) dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  logic [11:0] mem     [2][DEPTH];
  bit          written [2][DEPTH];
  int          wptr [2], trig [2];
  int          active, newest;
  bit          first;
  logic [19:0] lastAddr;
  bit          lastRel;

  bit          expReady, expValid;
  logic [9:0]  expData;

  task automatic modelStep();
    int locked, base, slot, writeBank;
    bit wr;
    locked = 1 - active;
    base   = readTriggerRelative ? trig[locked] : wptr[locked];
    slot   = (base + int'(address % DEPTH)) % DEPTH;
    expValid = written[locked][slot];
    expData  = mem[locked][slot][11:2];
    expReady = first || (address != lastAddr) || (readTriggerRelative != lastRel);
    first = 0; lastAddr = address; lastRel = readTriggerRelative;
    if (readTriggerRelative) nRelReads++; else nNewestReads++;
    wr = ready && !disableCollection;
    writeBank = active;
    if (disableCollection) nFrozen++;
    if (isTrigger && !disableCollection) begin
      trig[active] = wr ? wptr[active] : (wptr[active] + DEPTH - 1) % DEPTH;
      nMarks++;
    end
    if (wr) begin
      mem[active][wptr[active]]     = dataIn;
      written[active][wptr[active]] = 1;
      wptr[active] = (wptr[active] + 1) % DEPTH;
    end
    // While stopped, only a swap that shows the newest bank is allowed.
    if (lockTrigger && (!disableCollection || active == newest)) begin
      if (disableCollection) nStopSwaps++;
      active = 1 - active;
      nSwaps++;
    end else if (lockTrigger) nBlockedSwaps++;
    if (wr) newest = writeBank;
  endtask

  initial begin
    reset = 1'b1; ready = 0; dataIn = 0; isTrigger = 0; lockTrigger = 0;
    disableCollection = 0; address = 0; readTriggerRelative = 0;
    active = 0; newest = 0; wptr = '{0, 0}; trig = '{0, 0}; first = 1; lastAddr = 0; lastRel = 0;
    foreach (written[b, i]) written[b][i] = 0;
    @(negedge clock); @(negedge clock);
    reset = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      ready             = ($urandom_range(0, 1) == 0);
      dataIn            = 12'($urandom);
      isTrigger         = ($urandom_range(0, 9) == 0);
      lockTrigger       = ($urandom_range(0, 29) == 0);
      if (i % 1000 == 0) disableCollection = ($urandom_range(0, 3) == 0);
      // Keep the address steady for a few clocks now and then.
      if ($urandom_range(0, 2) != 0) address = ($urandom_range(0, 3) == 0) ? 20'($urandom) : 20'($urandom_range(0, 2 * DEPTH));
      if ($urandom_range(0, 7) == 0) readTriggerRelative = !readTriggerRelative;
      modelStep();
      @(negedge clock);
      checks++;
      if (dataOutReady !== expReady) begin
        failures++; $display("clock %0d: dataOutReady=%b expected %b", i, dataOutReady, expReady);
      end
      if (expValid) begin
        checks++;
        if (dataOut !== expData) begin
          failures++; $display("clock %0d: dataOut=%h expected %h", i, dataOut, expData);
        end
      end
    end
    checks++;
    if (nSwaps == 0 || nMarks == 0 || nRelReads == 0 || nNewestReads == 0 || nFrozen == 0 ||
        nStopSwaps == 0 || nBlockedSwaps == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("swaps %0d (%0d while stopped, %0d blocked), trigger marks %0d, trigger-relative reads %0d, newest-relative reads %0d, frozen clocks %0d",
             nSwaps, nStopSwaps, nBlockedSwaps, nMarks, nRelReads, nNewestReads, nFrozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
