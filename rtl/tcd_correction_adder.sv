// tcd_correction_adder: second adder of the TCD adder.
//
// Adds the correction word chosen by the invalid-TCD detector (000 or
// 122) to the three-trit sum of the first adder, with carry-in 0. Adding
// 122 (= 17 = 27 - 10) to a sum s in 10..19 gives s + 17 = 27 + (s - 10):
// the three sum trits are then the decimal digit s - 10 and the carry out
// of the top trit is the decimal carry, worth ten. Adding 000 leaves a
// valid sum unchanged with no carry.
//
// The source labels this block a "1-bit ternary full adder" while it adds a
// three-trit word; it is built here as a three-trit ripple adder.
//
// Interface: sum_in (3 trits), corr (3 trits), digit (3 trits, the TCD
// result digit), carry (trit, the decimal carry, 0 or 1 for any sum_in up
// to 19). Purely combinational.
module tcd_correction_adder
  import ternary_pkg::*;
(
  input  tcd_digit_t sum_in,
  input  tcd_digit_t corr,
  output tcd_digit_t digit,
  output trit_t      carry
);

  tern_ripple_adder #(.N(TCD_TRITS)) u_add (
    .a   (sum_in),
    .b   (corr),
    .cin (T0),
    .sum (digit),
    .cout(carry)
  );

endmodule
