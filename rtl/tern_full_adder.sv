// tern_full_adder: ternary full adder built from three ternary half adders.
//
// Structure as published: half adder 1 adds a and b; half adder 2 adds
// that sum to cin and its sum is the full-adder sum; half adder 3 adds the
// carries of half adders 1 and 2, and its sum is the full-adder carry.
// The carry of half adder 3 is always 0 (its inputs are at most 1 each),
// so it is left unconnected.
//
// Interface: a, b, cin (trits in, each 0..2), sum (trit out),
// cout (trit out). With cin <= 1, as in a ripple adder, cout is 0 or 1;
// with cin = 2 and a = b = 2 the total is 6 and cout is 2.
// Purely combinational.
module tern_full_adder
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  input  trit_t cin,
  output trit_t sum,
  output trit_t cout
);

  trit_t s1, c1, c2;
  trit_t c3_unused;

  tern_half_adder u_ha_ab    (.a(a),  .b(b),   .sum(s1),   .carry(c1));
  tern_half_adder u_ha_cin   (.a(s1), .b(cin), .sum(sum),  .carry(c2));
  tern_half_adder u_ha_carry (.a(c1), .b(c2),  .sum(cout), .carry(c3_unused));

endmodule
