// vnu: variable node unit (column processor) of the min-sum decoder.
//
// The channel value lambda and the DV check-to-variable messages alpha[t] of
// one column of H are converted from sign-magnitude to 8-bit two's complement
// and added into the column total y = lambda + sum(alpha). The message back to
// check t is the extrinsic sum beta[t] = y - alpha[t] (all inputs but the one
// from check t), converted back to 4-bit sign-magnitude with saturation at +-7.
// The hard decision (code estimate) is 1 when y < 0 and 0 otherwise.
// The conversion / addition / conversion chain follows the variable node
// drawing; forming each extrinsic output by subtracting its own input from the
// shared total is this design's choice.
//
// Parameter: DV, the column weight (12, 3 or 2 in the rate-1/2, N = 648 code).
// Interface: lambda and alpha[DV] in, beta[DV] out, 4-bit {sign, magnitude};
// hard is the decided bit; sat[t] flags a clipped beta[t].
// Timing: purely combinational.
module vnu
  import qc_ldpc_pkg::*;
#(
  parameter int DV = 3
) (
  input  msg_t           lambda,
  input  msg_t           alpha [DV],
  output msg_t           beta  [DV],
  output logic           hard,
  output logic [DV-1:0]  sat
);

  logic signed [SUM_W-1:0] lambda_tc;
  logic signed [SUM_W-1:0] alpha_tc [DV];
  logic signed [SUM_W-1:0] ext      [DV];
  logic signed [SUM_W-1:0] total;

  sm_to_tc u_lam (.sm_in(lambda), .tc_out(lambda_tc));

  for (genvar t = 0; t < DV; t++) begin : g_in
    sm_to_tc u_cv (.sm_in(alpha[t]), .tc_out(alpha_tc[t]));
  end

  always_comb begin
    total = lambda_tc;
    for (int t = 0; t < DV; t++) total += alpha_tc[t];
  end

  for (genvar t = 0; t < DV; t++) begin : g_out
    assign ext[t] = total - alpha_tc[t];
    tc_to_sm u_cv (.tc_in(ext[t]), .sm_out(beta[t]), .sat(sat[t]));
  end

  assign hard = total[SUM_W-1];

endmodule
