// tcd_adder: one-digit ternary coded decimal (TCD) adder.
//
// Adds two TCD digits a and b (three trits each, value 0..9) and a decimal
// carry-in cin (0 or 1), giving one TCD digit and a decimal carry out. The
// data path has three blocks, as in the published block diagram:
//   1. a three-trit ternary adder forms the plain ternary sum s = a + b + cin
//      (0..19, which always fits in three trits);
//   2. the invalid-TCD detector flags s > 9 and selects the correction
//      word 122 (decimal 17), else 000;
//   3. a second three-trit adder adds that word; for s > 9 this wraps the
//      digit to s - 10 and produces carry 1 out of the top trit.
// Example: 6 + 5 -> 020 + 012 = 102 (11); 102 + 122 = 1 001, digit 1,
// carry 1.
//
// Digits chain into a multi-digit decimal adder by feeding cout into the
// next digit's cin. The published diagram ties cin to 0; the port is kept
// so that digits can be chained, which the text's "carry input" and
// "carry ... will act as a higher digit" describe.
//
// Interface: a, b (TCD digits, element 0 least significant trit), cin
// (trit 0 or 1), sum (TCD digit), cout (trit 0 or 1), corrected (1 when the
// correction was applied, for observation). Purely combinational, no clock
// or reset. The carry out of the first adder is always 0 for legal inputs
// (19 < 27) and is used only by an assertion.
module tcd_adder
  import ternary_pkg::*;
(
  input  tcd_digit_t a,
  input  tcd_digit_t b,
  input  trit_t      cin,
  output tcd_digit_t sum,
  output trit_t      cout,
  output logic       corrected
);

  tcd_digit_t raw_sum;
  trit_t      raw_carry;
  tcd_digit_t corr;

  tern_ripple_adder #(.N(TCD_TRITS)) u_binsum (
    .a   (a),
    .b   (b),
    .cin (cin),
    .sum (raw_sum),
    .cout(raw_carry)
  );

  tcd_invalid_detector u_detect (
    .sum    (raw_sum),
    .invalid(corrected),
    .corr   (corr)
  );

  tcd_correction_adder u_correct (
    .sum_in(raw_sum),
    .corr  (corr),
    .digit (sum),
    .carry (cout)
  );

  // Operand rules: each input is a valid TCD digit, cin is 0 or 1, and so
  // the first adder never carries out.
  function automatic int unsigned tcd_value(tcd_digit_t d);
    return 9 * int'(d[2]) + 3 * int'(d[1]) + int'(d[0]);
  endfunction

  always_comb begin
    assert final (tcd_value(a) <= TCD_MAX && tcd_value(b) <= TCD_MAX &&
                  is_trit(a[0]) && is_trit(a[1]) && is_trit(a[2]) &&
                  is_trit(b[0]) && is_trit(b[1]) && is_trit(b[2]))
      else $error("tcd_adder: operand is not a TCD digit");
    assert final (cin == T0 || cin == T1)
      else $error("tcd_adder: carry-in must be 0 or 1");
    assert final (raw_carry == T0)
      else $error("tcd_adder: first adder carried out");
  end

endmodule
