// sm_to_tc: sign-magnitude to two's complement converter at the inputs of the
// variable node unit.
//
// A 4-bit {sign, magnitude} message is widened to OUT_W-bit two's complement:
// the magnitude is zero-extended and negated when the sign is set. Both
// encodings of zero (+0 and -0) give 0. The widening leaves head-room so that
// the sum of up to 13 messages cannot overflow.
//
// Parameter: OUT_W, output width, 8 as in the adder drawing.
// Interface: sm_in 4-bit message, tc_out OUT_W-bit signed value.
// Timing: purely combinational.
module sm_to_tc
  import qc_ldpc_pkg::*;
#(
  parameter int OUT_W = SUM_W
) (
  input  msg_t                     sm_in,
  output logic signed [OUT_W-1:0]  tc_out
);

  logic signed [OUT_W-1:0] mag_ext;

  always_comb begin
    mag_ext = signed'({{(OUT_W - MAG_W){1'b0}}, sm_in.mag});
    tc_out  = sm_in.sign ? -mag_ext : mag_ext;
  end

endmodule
