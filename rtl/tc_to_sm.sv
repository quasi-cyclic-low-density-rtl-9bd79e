// tc_to_sm: two's complement to sign-magnitude converter at the output of the
// variable node unit.
//
// An IN_W-bit two's complement value becomes a 4-bit {sign, magnitude}
// message. Magnitudes above 7 saturate to 7 (the value keeps its sign), and
// zero is returned as +0. Saturation is this design's choice; the conversion
// itself follows the variable node drawing.
//
// Parameter: IN_W, input width, 8.
// Interface: tc_in IN_W-bit signed value, sm_out 4-bit message, sat high when
// the magnitude was clipped.
// Timing: purely combinational.
module tc_to_sm
  import qc_ldpc_pkg::*;
#(
  parameter int IN_W = SUM_W
) (
  input  logic signed [IN_W-1:0] tc_in,
  output msg_t                   sm_out,
  output logic                   sat
);

  localparam logic [IN_W-1:0] MAG_MAX = IN_W'((1 << MAG_W) - 1);

  logic [IN_W-1:0] abs_v;

  always_comb begin
    abs_v       = tc_in[IN_W-1] ? IN_W'(-tc_in) : IN_W'(tc_in);
    sat         = (abs_v > MAG_MAX);
    sm_out.sign = tc_in[IN_W-1];
    sm_out.mag  = sat ? MAG_MAX[MAG_W-1:0] : abs_v[MAG_W-1:0];
  end

endmodule
