// tcd_invalid_detector_tb: exhaustive self-check of the invalid-TCD
// detector.
//
// Applies every three-trit value 0..26 and expects invalid = (value > 9)
// and corr = ternary 122 when invalid, else 000. A watchdog ends the run
// with a failure if it hangs.
module tcd_invalid_detector_tb;
  import ternary_pkg::*;

  tcd_digit_t sum, corr, exp_corr;
  logic       invalid;
  int checks = 0;
  int failures = 0;

  tcd_invalid_detector dut (.sum(sum), .invalid(invalid), .corr(corr));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sum = '0;
    for (int v = 0; v < 27; v++) begin
      sum[0] = trit_t'(v % 3);
      sum[1] = trit_t'((v / 3) % 3);
      sum[2] = trit_t'(v / 9);
      #10;
      // 122 in ternary: trit 2 = 1, trit 1 = 2, trit 0 = 2.
      exp_corr = (v > 9) ? {2'd1, 2'd2, 2'd2} : '0;
      checks++;
      if (invalid != (v > 9) || corr != exp_corr) begin
        failures++;
        $display("FAIL value %0d: invalid=%0b corr=%p", v, invalid, corr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
