// tern_ripple_adder_tb: exhaustive self-check of the three-trit ternary
// adder at its default width.
//
// Every pair of 3-trit operands (0..26) with carry-in 0, 1 and 2 is applied;
// the expected sum trits and carry out are the base-3 digits of the integer
// a + b + cin. A watchdog ends the run with a failure if it hangs.
module tern_ripple_adder_tb;
  import ternary_pkg::*;

  localparam int N = 3;

  trit_t [N-1:0] a, b, sum;
  trit_t         cin, cout;
  int checks = 0;
  int failures = 0;

  tern_ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic trit_t [N-1:0] to_trits(int v);
    trit_t [N-1:0] t;
    for (int i = 0; i < N; i++) begin
      t[i] = trit_t'(v % 3);
      v = v / 3;
    end
    return t;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    a = '0; b = '0; cin = T0;
    for (int x = 0; x < 27; x++)
      for (int y = 0; y < 27; y++)
        for (int c = 0; c < 3; c++) begin
          a = to_trits(x); b = to_trits(y); cin = trit_t'(c);
          #1;
          total = x + y + c;
          checks++;
          if (sum != to_trits(total % 27) || int'(cout) != total / 27) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d+%0d+%0d: sum=%p cout=%0d", x, y, c, sum, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
