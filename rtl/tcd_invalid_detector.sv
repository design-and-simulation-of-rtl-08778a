// tcd_invalid_detector: flags a three-trit sum that is not a valid TCD digit.
//
// A TCD digit is valid for values 0..9 (ternary 000..100). The detector
// looks at the three sum trits of the first adder and raises invalid when
// their value exceeds 9: trit 2 is 2, or trit 2 is 1 and either lower trit
// is non-zero. It also emits the word the correction adder adds: ternary
// 122 (decimal 17) when invalid, 000 otherwise. The threshold and the two
// words follow the published correction rule; the comparison logic itself
// is this design's own.
//
// Interface: sum (3 trits in), invalid (1 when sum > 9),
// corr (3 trits out, 122 or 000). Purely combinational.
module tcd_invalid_detector
  import ternary_pkg::*;
(
  input  tcd_digit_t sum,
  output logic       invalid,
  output tcd_digit_t corr
);

  always_comb begin
    invalid = (sum[2] == T2) ||
              ((sum[2] == T1) && ((sum[1] != T0) || (sum[0] != T0)));
    corr    = invalid ? TCD_CORRECTION : TCD_ZERO;
  end

endmodule
