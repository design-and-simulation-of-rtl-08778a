// tern_ripple_adder: N-trit ternary adder (default three trits, the
// "3-bit ternary full adder" of the TCD adder).
//
// Adds two N-trit unsigned numbers a and b and a carry-in trit cin. It is a
// ripple chain of N ternary full adders, trit 0 first; the carry of stage i
// feeds stage i+1 and the last carry is cout. The source says the TCD adder
// is built from ternary full adders but does not draw the chain; the ripple
// arrangement is this design's choice as the simplest one.
//
// Interface: a, b (N trits, element 0 least significant), cin (trit),
// sum (N trits), cout (trit). Value: a + b + cin = sum + 3**N * cout.
// Purely combinational; delay grows linearly with N.
module tern_ripple_adder
  import ternary_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  trit_t [N-1:0] a,
  input  trit_t [N-1:0] b,
  input  trit_t         cin,
  output trit_t [N-1:0] sum,
  output trit_t         cout
);

  trit_t [N:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_stage
    tern_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[N];

endmodule
