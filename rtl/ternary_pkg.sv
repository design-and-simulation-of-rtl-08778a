// ternary_pkg: shared types and constants for the ternary coded decimal
// (TCD) adder.
//
// A trit (ternary digit, value 0, 1 or 2) is carried on two binary wires as
// its plain unsigned value: 2'd0, 2'd1, 2'd2. The code 2'd3 is illegal and
// never produced by any block; blocks that receive it treat it as described
// in their own header. A multi-trit number is a packed array of trits with
// element 0 the least significant trit. A TCD digit is three trits holding a
// decimal value 0..9 (trit 2 is the 9s place, trit 1 the 3s, trit 0 the 1s).
//
// The two-wire encoding is this design's own choice: the circuits these
// blocks model are multi-level CMOS, one wire per trit at three voltages.
package ternary_pkg;

  typedef logic [1:0] trit_t;

  localparam trit_t T0 = 2'd0;
  localparam trit_t T1 = 2'd1;
  localparam trit_t T2 = 2'd2;

  // Number of trits in one TCD digit.
  localparam int unsigned TCD_TRITS = 3;
  typedef trit_t [TCD_TRITS-1:0] tcd_digit_t;

  // Largest decimal value a TCD digit may hold.
  localparam int unsigned TCD_MAX = 9;

  // Correction word added to a sum above 9: ternary 122 = 17 = 27 - 10.
  localparam tcd_digit_t TCD_CORRECTION = '{T1, T2, T2};
  localparam tcd_digit_t TCD_ZERO       = '{T0, T0, T0};

  // True when the two wires hold a legal trit.
  function automatic logic is_trit(trit_t t);
    return t != 2'd3;
  endfunction

endpackage
