// tern_full_adder_tb: exhaustive self-check of the ternary full adder.
//
// Drives all 27 combinations of a, b and cin and checks
// a + b + cin == 3 * cout + sum in integer arithmetic, with each output a
// legal trit. A watchdog ends the run with a failure if it hangs.
module tern_full_adder_tb;
  import ternary_pkg::*;

  trit_t a, b, cin, sum, cout;
  int checks = 0;
  int failures = 0;

  tern_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = T0; b = T0; cin = T0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        for (int k = 0; k < 3; k++) begin
          a = trit_t'(i); b = trit_t'(j); cin = trit_t'(k);
          #10;
          checks++;
          if (int'(sum) != (i + j + k) % 3 || int'(cout) != (i + j + k) / 3) begin
            failures++;
            $display("FAIL %0d+%0d+%0d: sum=%0d cout=%0d", i, j, k, sum, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
