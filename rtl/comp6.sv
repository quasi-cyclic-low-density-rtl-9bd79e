// comp6: minimum magnitude and sign product of six sign-magnitude inputs.
//
// Five comp2 cells form the tree of the design's comp6 drawing:
// m1 = (a,b), m2 = (c,d), m3 = (e,f), m4 = (m1,m2), min_val = (m4,m3).
// The result's sign is the XOR of all six signs and its magnitude the
// smallest of the six magnitudes. A check node of row weight 7 uses one comp6
// per output, fed with the six other inputs.
//
// Interface: a..f, min_val are 4-bit {sign, magnitude} words.
// Timing: purely combinational, three comp2 levels deep.
module comp6
  import qc_ldpc_pkg::*;
(
  input  msg_t a, b, c, d, e, f,
  output msg_t min_val
);

  msg_t m1, m2, m3, m4;

  comp2 u_c1 (.a(a),  .b(b),  .min_val(m1));
  comp2 u_c2 (.a(c),  .b(d),  .min_val(m2));
  comp2 u_c3 (.a(e),  .b(f),  .min_val(m3));
  comp2 u_c4 (.a(m1), .b(m2), .min_val(m4));
  comp2 u_c5 (.a(m4), .b(m3), .min_val(min_val));

endmodule
