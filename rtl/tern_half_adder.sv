// tern_half_adder: ternary half adder.
//
// Adds two trits a and b and returns sum = (a + b) mod 3 and
// carry = (a + b) div 3, the nine-row truth table of the ternary half adder
// (carry is 1 exactly for 1+2, 2+1 and 2+2). The table is the published
// function; the source gives no gate-level netlist, so the logic is written
// directly as the table. Purely combinational, no clock.
//
// Interface: a, b (trit in), sum (trit out), carry (trit out, 0 or 1).
// An illegal input code (2'd3) is this design's own concern: it yields
// sum = 0, carry = 0, and a deferred assertion reports it in simulation.
module tern_half_adder
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t sum,
  output trit_t carry
);

  always_comb begin
    unique case ({a, b})
      {T0, T0}: begin sum = T0; carry = T0; end
      {T0, T1}: begin sum = T1; carry = T0; end
      {T0, T2}: begin sum = T2; carry = T0; end
      {T1, T0}: begin sum = T1; carry = T0; end
      {T1, T1}: begin sum = T2; carry = T0; end
      {T1, T2}: begin sum = T0; carry = T1; end
      {T2, T0}: begin sum = T2; carry = T0; end
      {T2, T1}: begin sum = T0; carry = T1; end
      {T2, T2}: begin sum = T1; carry = T1; end
      default:  begin sum = T0; carry = T0; end
    endcase
  end

  always_comb begin
    assert final (is_trit(a) && is_trit(b))
      else $error("tern_half_adder: illegal trit code a=%0d b=%0d", a, b);
  end

endmodule
