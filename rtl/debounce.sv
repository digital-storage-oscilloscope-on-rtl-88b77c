// debounce: cleans one mechanical button or switch input.
//
// The raw input first passes a two-flip-flop synchronizer. The clean output
// changes only after the synchronized input has held a new value for
// STABLE_CYCLES consecutive clocks; any bounce restarts the count. The default
// of 650,000 clocks is 10 ms at the 65 MHz pixel clock, a choice of this
// design. Timing: a steady change reaches `clean` STABLE_CYCLES + 2 clocks
// after it appears on `noisy`. `reset` (synchronous) sets everything to 0.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 650_000
) (
  input  logic clock,
  input  logic reset,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CNT_W = $clog2(STABLE_CYCLES + 1);

  logic             sync0, sync1;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clock) begin
    if (reset) begin
      sync0 <= 1'b0;
      sync1 <= 1'b0;
      count <= '0;
      clean <= 1'b0;
    end else begin
      sync0 <= noisy;
      sync1 <= sync0;
      if (sync1 == clean) begin
        count <= '0;
      end else if (count == CNT_W'(STABLE_CYCLES - 1)) begin
        count <= '0;
        clean <= sync1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
