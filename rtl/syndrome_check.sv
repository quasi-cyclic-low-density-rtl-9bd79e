// syndrome_check: parity check of the decided code word, s = H * v_hat.
//
// Each of the M = 324 check rows XORs the hard decisions of the columns it
// connects to (7 or 8 of them, found from the base matrix at elaboration);
// the word is a code word when every syndrome bit is zero, which is the stop
// test of the iterative decoder.
//
// Interface: v_hat[N] hard decisions in; syndrome[M] and ok (all zero) out.
// Timing: purely combinational.
module syndrome_check
  import qc_ldpc_pkg::*;
(
  input  logic [N-1:0] v_hat,
  output logic [M-1:0] syndrome,
  output logic         ok
);

  for (genvar br = 0; br < MB; br++) begin : g_brow
    localparam int DC = ROW_W[br];
    for (genvar k = 0; k < Z; k++) begin : g_row
      logic [DC-1:0] bits;
      for (genvar p = 0; p < DC; p++) begin : g_bit
        localparam int BC = ROW_BC[br*MAX_DC + p];
        assign bits[p] = v_hat[BC*Z + (k + SHIFT[br*NB + BC]) % Z];
      end
      assign syndrome[br*Z + k] = ^bits;
    end
  end

  assign ok = ~|syndrome;

endmodule
