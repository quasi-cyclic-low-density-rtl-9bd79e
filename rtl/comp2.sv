// comp2: two-input sign-magnitude comparator, the basic cell of the check
// node unit.
//
// The output sign is the XOR of the two input signs (the product of the signs
// in the min-sum check update) and the output magnitude is the smaller of the
// two 3-bit magnitudes. The magnitude comparator derives equal / less / greater
// flags; on a tie input a's magnitude is passed (both are equal). The 1-bit
// sign and 3-bit magnitude are joined into a 4-bit result, as the drawing of
// the cell shows.
//
// Interface: a, b, min_val are 4-bit {sign, magnitude} words.
// Timing: purely combinational.
module comp2
  import qc_ldpc_pkg::*;
(
  input  msg_t a,
  input  msg_t b,
  output msg_t min_val
);

  logic a_eq_b, a_lt_b, a_gt_b;

  always_comb begin
    a_eq_b = (a.mag == b.mag);
    a_lt_b = (a.mag <  b.mag);
    a_gt_b = (a.mag >  b.mag);
    min_val.sign = a.sign ^ b.sign;
    min_val.mag  = (a_eq_b || a_lt_b) ? a.mag : b.mag;
  end

  // Exactly one magnitude relation holds.
  always_comb assert ($onehot({a_eq_b, a_lt_b, a_gt_b}));

endmodule
