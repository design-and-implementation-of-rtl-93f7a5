// dac: behavioural model of the converter's feedback DAC.
//
// It turns the counter value V_num into the reference V_ref that the
// difference quantifier compares with the input. The analog domain is modelled
// as a signed fixed-point number with FRAC bits below one quantum q, so level
// V_num sits at V_num * 2^FRAC. The conversion settles SETTLE time units after
// V_num changes. Mid-scale (code 0) is 0, the levels being placed evenly and
// symmetrically over the range; this placement is this design's choice.
module dac
  import fir_pkg::*;
#(
  parameter int SETTLE = 2
) (
  input  amp_t vnum,
  output ain_t vref
);
  ain_t level;
  assign level = ain_t'(vnum) <<< FRAC;

  initial vref = '0;
  always @(level) vref <= #(SETTLE) level;
endmodule
