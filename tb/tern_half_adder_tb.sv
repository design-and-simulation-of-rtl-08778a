// tern_half_adder_tb: exhaustive self-check of the ternary half adder.
//
// Drives all nine pairs of trits and compares sum and carry with
// (a + b) mod 3 and (a + b) div 3 worked out in integer arithmetic.
// A watchdog ends the run with a failure if it does not finish in time.
module tern_half_adder_tb;
  import ternary_pkg::*;

  trit_t a, b, sum, carry;
  int checks = 0;
  int failures = 0;

  tern_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = T0; b = T0;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        a = trit_t'(i);
        b = trit_t'(j);
        #10;
        checks++;
        if (int'(sum) != (i + j) % 3 || int'(carry) != (i + j) / 3) begin
          failures++;
          $display("FAIL a=%0d b=%0d: sum=%0d carry=%0d", i, j, sum, carry);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
