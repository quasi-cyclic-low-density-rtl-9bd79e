// cnu: check node unit (row processor) of the min-sum decoder.
//
// For each of its DC inputs beta[j] (variable-to-check messages of one row of
// H) the unit returns alpha[j] = (product of the signs of the other inputs) x
// (minimum magnitude of the other inputs), the min-sum check node update.
// Every output has its own comparator tree over the DC-1 other inputs: seven
// comp6 trees for a row of weight 7 and eight comp7 trees for a row of weight
// 8, the two row weights of the rate-1/2, N = 648 code. Building one tree per
// output (rather than a shared first/second minimum search) follows the
// design's description of the row processor as comp6 instantiated according to
// the row weight.
//
// Parameter: DC, the row weight, 7 or 8.
// Interface: beta[DC] in, alpha[DC] out, 4-bit {sign, magnitude} words.
// Timing: purely combinational.
module cnu
  import qc_ldpc_pkg::*;
#(
  parameter int DC = 7
) (
  input  msg_t beta  [DC],
  output msg_t alpha [DC]
);

  for (genvar j = 0; j < DC; j++) begin : g_out
    // The DC-1 inputs other than j, in order.
    msg_t oth [DC-1];
    for (genvar i = 0; i < DC - 1; i++) begin : g_sel
      assign oth[i] = beta[(i < j) ? i : i + 1];
    end
    if (DC == 7) begin : g_w7
      comp6 u_min (.a(oth[0]), .b(oth[1]), .c(oth[2]), .d(oth[3]),
                   .e(oth[4]), .f(oth[5]), .min_val(alpha[j]));
    end else if (DC == 8) begin : g_w8
      comp7 u_min (.a(oth[0]), .b(oth[1]), .c(oth[2]), .d(oth[3]),
                   .e(oth[4]), .f(oth[5]), .g(oth[6]), .min_val(alpha[j]));
    end else begin : g_bad
      $error("cnu: row weight DC must be 7 or 8");
    end
  end

endmodule
