// fpix1_adc_enc: encoder of the flash-ADC bits at the end of a column.
//
// The three set-only flip-flops of a pixel's 2-bit flash ADC form a
// thermometer code (comparator i fired when the amplitude passed threshold
// i). The end-of-column logic turns it into a two-bit count. The highest set
// bit decides, so a missing lower bit (a "bubble") does not lower the value.
// Combinational. Encoding at the end of the column follows the chip
// description; the bubble rule is this design's choice.
module fpix1_adc_enc
  import fpix1_pkg::*;
(
  input  logic [THERM_W-1:0] therm,
  output logic [ADC_W-1:0]   adc
);

  assign adc = therm2bin(therm);

endmodule
