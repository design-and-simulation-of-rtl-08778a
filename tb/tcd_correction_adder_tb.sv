// tcd_correction_adder_tb: self-check of the TCD correction adder.
//
// Part 1: for every three-trit sum 0..26 and both correction words (000
// and 122 = 17) the outputs must be the base-3 digits of sum + word.
// Part 2: for the sums a TCD adder can produce (0..19), with the word the
// correction rule selects, the digit must be sum mod 10 and the carry
// sum div 10. A watchdog ends the run with a failure if it hangs.
module tcd_correction_adder_tb;
  import ternary_pkg::*;

  tcd_digit_t sum_in, corr, digit;
  trit_t      carry;
  int checks = 0;
  int failures = 0;

  tcd_correction_adder dut (.sum_in(sum_in), .corr(corr), .digit(digit), .carry(carry));

  function automatic tcd_digit_t to_trits(int v);
    tcd_digit_t t;
    for (int i = 0; i < 3; i++) begin
      t[i] = trit_t'(v % 3);
      v = v / 3;
    end
    return t;
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int word;
    sum_in = '0; corr = '0;
    for (int v = 0; v < 27; v++)
      for (int w = 0; w < 2; w++) begin
        word = (w == 1) ? 17 : 0;
        sum_in = to_trits(v);
        corr = to_trits(word);
        #10;
        checks++;
        if (digit != to_trits((v + word) % 27) || int'(carry) != (v + word) / 27) begin
          failures++;
          $display("FAIL %0d+%0d: digit=%p carry=%0d", v, word, digit, carry);
        end
      end
    for (int v = 0; v < 20; v++) begin
      sum_in = to_trits(v);
      corr = to_trits(v > 9 ? 17 : 0);
      #10;
      checks++;
      if (digit != to_trits(v % 10) || int'(carry) != v / 10) begin
        failures++;
        $display("FAIL corrected sum %0d: digit=%p carry=%0d", v, digit, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
