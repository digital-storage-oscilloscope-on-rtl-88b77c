// sample_buffer: double-buffered sample store with trigger bookkeeping.
//
// Two block RAMs of DEPTH samples each are used as ring buffers. One, the
// active bank, takes every sample that arrives with `ready`; the other, the
// locked bank, is frozen and is the only one that can be read. When
// `isTrigger` is high, the address of the current sample in the active bank is
// recorded as that bank's trigger address. A pulse on `lockTrigger` swaps the
// roles of the two banks, so the display reads a complete, stable record while
// acquisition continues into the other bank. Each bank keeps its own write
// pointer and trigger address, which travel with it through a swap.
//
// Reads: `address` is added, modulo DEPTH, to a base in the locked bank. With
// `readTriggerRelative` high the base is the recorded trigger sample, so
// address 0 is the trigger and higher addresses are later samples. Otherwise
// the base is the write pointer, the slot just after the most recent sample,
// so address 0 is the oldest sample and DEPTH-1 the newest. Only the low
// log2(DEPTH) bits of the 20-bit address count. A new request is any clock in
// which `address` or `readTriggerRelative` differs from the clock before (or
// the first clock after reset); one clock later the sample is on `dataOut` and
// `dataOutReady` is high for that one clock. `dataOut` is the top OUT_W bits of
// the stored sample. The read data follows the address every clock even
// without a new request, so a sprite may also use it as a plain 1-cycle ROM.
//
// `disableCollection` (run/stop) blocks writes and trigger recording. While
// it is high, a swap is still carried out if, and only if, it brings the bank
// holding the newest samples into the locked role; after that no more swaps
// happen. So a stop shows the last record taken, and then that record stays
// on screen. `reset` (synchronous) clears the pointers and selects bank 0 as
// active; memory contents are not cleared.
//
// From the original design: the two banks and their roles, the swap on lockTrigger,
// the recorded trigger address, the two read modes and the port list. This
// design's choices: the depth 1024 (the original design asks for about 1,000
// samples), the exact read base of each mode, request detection by address
// change, and the swap rule while collection is disabled.
module sample_buffer #(
  parameter int unsigned DATA_W = 12,
  parameter int unsigned OUT_W  = 10,
  parameter int unsigned ADDR_W = 20,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              ready,
  input  logic [DATA_W-1:0] dataIn,
  input  logic              isTrigger,
  input  logic              lockTrigger,
  input  logic              disableCollection,
  input  logic [ADDR_W-1:0] address,
  input  logic              readTriggerRelative,
  output logic [OUT_W-1:0]  dataOut,
  output logic              dataOutReady
);

  localparam int unsigned PTR_W = $clog2(DEPTH);
  typedef logic [PTR_W-1:0] ptr_t;

  logic [DATA_W-1:0] bank0 [DEPTH];
  logic [DATA_W-1:0] bank1 [DEPTH];

  logic active;               // index of the bank being written
  logic newestBank;           // bank that took the most recent sample
  ptr_t wptr     [2];         // next write slot of each bank
  ptr_t trigAddr [2];         // recorded trigger slot of each bank

  logic write, swap;
  assign write = ready && !disableCollection;
  assign swap  = lockTrigger && (!disableCollection || active == newestBank);

  // Wrap the pointers explicitly so that DEPTH need not be a power of two.
  function automatic ptr_t wrapAdd(ptr_t a, logic [ADDR_W-1:0] b);
    logic [ADDR_W:0] sum;
    sum = (ADDR_W+1)'(a) + (ADDR_W+1)'(b % ADDR_W'(DEPTH));
    if (sum >= (ADDR_W+1)'(DEPTH)) sum = sum - (ADDR_W+1)'(DEPTH);
    return ptr_t'(sum);
  endfunction

  function automatic ptr_t prevSlot(ptr_t a);
    return (a == '0) ? ptr_t'(DEPTH - 1) : a - 1'b1;
  endfunction

  function automatic ptr_t nextSlot(ptr_t a);
    return (a == ptr_t'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  // Acquisition side.
  always_ff @(posedge clock) begin
    if (reset) begin
      active      <= 1'b0;
      newestBank  <= 1'b0;
      wptr[0]     <= '0;
      wptr[1]     <= '0;
      trigAddr[0] <= '0;
      trigAddr[1] <= '0;
    end else begin
      if (write) begin
        wptr[active] <= nextSlot(wptr[active]);
        newestBank   <= active;
      end
      if (isTrigger && !disableCollection)
        // The sample written this clock, or else the most recent one.
        trigAddr[active] <= write ? wptr[active] : prevSlot(wptr[active]);
      if (swap) active <= !active;
    end
  end

  always_ff @(posedge clock) begin
    if (write && !active) bank0[wptr[0]] <= dataIn;
    if (write &&  active) bank1[wptr[1]] <= dataIn;
  end

  // Read side: always the locked bank.
  logic              locked;
  ptr_t              readSlot;
  logic [DATA_W-1:0] word0, word1;
  logic [ADDR_W-1:0] lastAddress;
  logic              lastRelative;
  logic              primed;

  assign locked   = !active;
  assign readSlot = wrapAdd(readTriggerRelative ? trigAddr[locked] : wptr[locked], address);

  always_ff @(posedge clock) begin
    word0 <= bank0[readSlot];
    word1 <= bank1[readSlot];
  end

  // The bank is chosen after the RAM read, with the bank index of the request.
  logic readBank;
  always_ff @(posedge clock) readBank <= locked;
  assign dataOut = readBank ? word1[DATA_W-1 -: OUT_W] : word0[DATA_W-1 -: OUT_W];

  always_ff @(posedge clock) begin
    if (reset) begin
      primed       <= 1'b0;
      lastAddress  <= '0;
      lastRelative <= 1'b0;
      dataOutReady <= 1'b0;
    end else begin
      primed       <= 1'b1;
      lastAddress  <= address;
      lastRelative <= readTriggerRelative;
      dataOutReady <= !primed || (address != lastAddress) || (readTriggerRelative != lastRelative);
    end
  end

endmodule
