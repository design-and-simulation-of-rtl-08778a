// tcd_adder_tb: end-to-end self-check of the one-digit TCD adder at its
// default (and only) configuration.
//
// 1. The two worked examples of the correction rule: 4 + 5 = 9 needs no
//    correction; 6 + 5 = 11 is corrected to digit 1, carry 1.
// 2. Exhaustive: all 10 x 10 digit pairs with carry-in 0 and 1; expected
//    digit and carry are (a + b + cin) mod 10 and div 10.
// 3. A four-digit decimal adder made by chaining four tcd_adder instances
//    (carry out to the next carry in), fed with random operands and
//    compared with integer addition.
// Each mechanism (sum passed unchanged, correction applied, carry-in
// used, decimal carry out, carry rippling between digits) is counted and a
// failure is counted for any that never happened. A watchdog ends the run
// with a failure if it hangs.
module tcd_adder_tb;
  import ternary_pkg::*;

  localparam int DIGITS = 4;
  localparam int RANDOM_ADDS = 2000;

  function automatic tcd_digit_t to_tcd(int v);
    tcd_digit_t t;
    for (int i = 0; i < 3; i++) begin
      t[i] = trit_t'(v % 3);
      v = v / 3;
    end
    return t;
  endfunction

  function automatic int from_tcd(tcd_digit_t t);
    return 9 * int'(t[2]) + 3 * int'(t[1]) + int'(t[0]);
  endfunction

  int checks = 0;
  int failures = 0;
  int n_pass = 0, n_corrected = 0, n_cin = 0, n_cout = 0, n_ripple = 0;

  // Single-digit device under test.
  tcd_digit_t a, b, sum;
  trit_t      cin, cout;
  logic       corrected;

  tcd_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .corrected(corrected));

  // Four-digit chain.
  tcd_digit_t [DIGITS-1:0] ma, mb, msum;
  trit_t      [DIGITS:0]   mc;
  logic       [DIGITS-1:0] mcorr;

  assign mc[0] = T0;
  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    tcd_adder u_digit (
      .a(ma[d]), .b(mb[d]), .cin(mc[d]),
      .sum(msum[d]), .cout(mc[d+1]), .corrected(mcorr[d])
    );
  end

  task automatic check_digit(int x, int y, int c);
    int total;
    a = to_tcd(x); b = to_tcd(y); cin = trit_t'(c);
    #10;
    total = x + y + c;
    checks++;
    if (from_tcd(sum) != total % 10 || sum != to_tcd(total % 10) ||
        int'(cout) != total / 10 || corrected != (total > 9)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: sum=%0d cout=%0d corrected=%0b",
               x, y, c, from_tcd(sum), cout, corrected);
    end
    if (corrected) n_corrected++; else n_pass++;
    if (c != 0) n_cin++;
    if (cout != T0) n_cout++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, got, p;
    a = '0; b = '0; cin = T0; ma = '0; mb = '0;

    // Worked examples: 4 + 5 -> 011 + 012 = 100; 6 + 5 -> 020 + 012 = 102,
    // corrected by 122 to carry 1, digit 001.
    check_digit(4, 5, 0);
    check_digit(6, 5, 0);
    checks++;
    if (sum != {T0, T0, T1} || cout != T1) begin
      failures++;
      $display("FAIL 6+5 example: sum=%p cout=%0d", sum, cout);
    end

    for (int i = 0; i < 10; i++)
      for (int j = 0; j < 10; j++)
        for (int c = 0; c < 2; c++)
          check_digit(i, j, c);

    for (int n = 0; n < RANDOM_ADDS; n++) begin
      x = int'($urandom_range(9999, 0));
      y = int'($urandom_range(9999, 0));
      p = 1;
      for (int d = 0; d < DIGITS; d++) begin
        ma[d] = to_tcd((x / p) % 10);
        mb[d] = to_tcd((y / p) % 10);
        p *= 10;
      end
      #10;
      got = 0;
      p = 1;
      for (int d = 0; d < DIGITS; d++) begin
        got += from_tcd(msum[d]) * p;
        p *= 10;
        if (d > 0 && mc[d] != T0) n_ripple++;
      end
      got += int'(mc[DIGITS]) * p;
      checks++;
      if (got != x + y) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d: got %0d", x, y, got);
      end
    end

    $display("mechanisms: unchanged=%0d corrected=%0d carry_in=%0d carry_out=%0d ripple=%0d",
             n_pass, n_corrected, n_cin, n_cout, n_ripple);
    if (n_pass == 0)      begin failures++; $display("FAIL no uncorrected sum seen"); end
    if (n_corrected == 0) begin failures++; $display("FAIL no correction seen"); end
    if (n_cin == 0)       begin failures++; $display("FAIL carry-in never used"); end
    if (n_cout == 0)      begin failures++; $display("FAIL no carry out seen"); end
    if (n_ripple == 0)    begin failures++; $display("FAIL no carry rippled between digits"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
