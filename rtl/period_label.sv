// period_label: builds the text "DT: nnnnUS" for the text sprite.
//
// The ADC controller keeps one XADC conversion in samplePeriod, and the XADC
// runs at 1 MSPS, so the time between displayed samples is samplePeriod
// microseconds. This block writes that number as four decimal digits with
// leading zeros (0000-1023) between the fixed characters "DT: " and "US".
// The original design routes samplePeriod to the text sprite; the label format is
// this design's choice. Purely combinational.
module period_label
  import dso_pkg::*;
(
  input  logic [9:0] samplePeriod,
  output char_t      characters [10]
);

  always_comb begin
    characters[0] = char_t'(CH_A + 6'd3);       // D
    characters[1] = char_t'(CH_A + 6'd19);      // T
    characters[2] = CH_COLON;
    characters[3] = CH_SPACE;
    characters[4] = char_t'(samplePeriod / 10'd1000);
    characters[5] = char_t'((samplePeriod / 10'd100) % 10'd10);
    characters[6] = char_t'((samplePeriod / 10'd10) % 10'd10);
    characters[7] = char_t'(samplePeriod % 10'd10);
    characters[8] = char_t'(CH_A + 6'd20);      // U
    characters[9] = char_t'(CH_A + 6'd18);      // S
  end

endmodule
