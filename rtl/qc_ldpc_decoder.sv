// qc_ldpc_decoder: fully parallel min-sum decoder for the IEEE 802.11n
// rate-1/2, N = 648 QC-LDPC code.
//
// Every column of H has its own variable node unit (648 VNUs) and every row
// its own check node unit (324 CNUs); the 2376 ones of H are 2376 fixed wires
// in each direction, built at elaboration from the 12 x 24 base matrix of
// circulant shifts (qc_ldpc_pkg). A one of H in block row br, block column bc
// with shift s joins check row br*27 + k and column bc*27 + (k + s) mod 27. One decoding iteration is one clock cycle:
//
//   beta  = VNU(lambda, alpha_q)      variable-to-check, combinational
//   alpha = CNU(beta)                 check-to-variable, combinational
//   alpha_q <= alpha                  the only per-edge register
//
// The hard decisions come from the VNU totals of the current alpha_q and are
// checked by syndrome_check every cycle; decoder_ctrl stops when the parity
// check passes (early stop) or the iteration limit is reached. At load the
// channel values are stored and alpha_q is cleared, so the first check node
// update sees beta = lambda.
//
// Interface:
//   llr[N]      received values, 4-bit {sign, magnitude}; sign 1 means the bit
//               is more likely a 1. Sampled in the cycle after start.
//   max_iter    iteration limit, sampled with start (0 is taken as 1).
//   start       begins a frame when the decoder is idle.
//   busy, done  busy from the cycle after start to done; done is a one-cycle
//               pulse when the result is ready.
//   success     the returned word satisfies every parity check.
//   iterations  iterations performed.
//   codeword[N] decided bits, valid from done until the next start; the
//               first K = 324 bits are the information bits.
// Latency: 1 (start) + 1 (load) + I + 1 cycles for I iterations, done in the last.
// The fully parallel organisation, node units, interconnect and the stop rule
// follow the design description; the register placement, the handshake and the
// limit input are this design's choices.
module qc_ldpc_decoder
  import qc_ldpc_pkg::*;
#(
  parameter int ITER_W = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ITER_W-1:0] max_iter,
  input  msg_t              llr [N],
  output logic              busy,
  output logic              done,
  output logic              success,
  output logic [ITER_W-1:0] iterations,
  output logic [N-1:0]      codeword
);

  // Edge messages are held per block row br, slot p and local row k. Block
  // rows of weight 7 leave slot 7 unused; it is tied to zero.
  msg_t lambda_q [N];                 // stored channel values
  msg_t alpha_q  [MB][MAX_DC][Z];     // stored check-to-variable messages
  msg_t alpha_d  [MB][MAX_DC][Z];     // new check-to-variable messages
  msg_t beta     [MB][MAX_DC][Z];     // variable-to-check messages
  logic [N-1:0] hard;
  logic [M-1:0] syndrome;
  logic         parity_ok;
  logic         load, update;

  // ---------------------------------------------------------------- VNUs
  for (genvar bc = 0; bc < NB; bc++) begin : g_vcol
    localparam int DV = COL_W[bc];
    for (genvar j = 0; j < Z; j++) begin : g_vnu
      msg_t a_in  [DV];
      msg_t b_out [DV];
      logic [DV-1:0] sat;
      for (genvar t = 0; t < DV; t++) begin : g_edge
        localparam int BR = COL_BR[bc*MAX_DV + t];
        localparam int P  = SLOT[BR*NB + bc];
        localparam int KR = (j - SHIFT[BR*NB + bc] + Z) % Z;   // local row of this edge
        assign a_in[t]          = alpha_q[BR][P][KR];
        assign beta[BR][P][KR]  = b_out[t];
      end
      vnu #(.DV(DV)) u_vnu (
        .lambda (lambda_q[bc*Z + j]),
        .alpha  (a_in),
        .beta   (b_out),
        .hard   (hard[bc*Z + j]),
        .sat    (sat)
      );
    end
  end

  // ---------------------------------------------------------------- CNUs
  for (genvar br = 0; br < MB; br++) begin : g_crow
    localparam int DC = ROW_W[br];
    for (genvar k = 0; k < Z; k++) begin : g_cnu
      msg_t b_in  [DC];
      msg_t a_out [DC];
      for (genvar p = 0; p < DC; p++) begin : g_edge
        assign b_in[p]         = beta[br][p][k];
        assign alpha_d[br][p][k] = a_out[p];
      end
      for (genvar p = DC; p < MAX_DC; p++) begin : g_unused
        assign beta[br][p][k]    = '0;
        assign alpha_d[br][p][k] = '0;
      end
      cnu #(.DC(DC)) u_cnu (.beta(b_in), .alpha(a_out));
    end
  end

  // ---------------------------------------------------------------- parity check
  syndrome_check u_syn (.v_hat(hard), .syndrome(syndrome), .ok(parity_ok));

  // ---------------------------------------------------------------- control
  decoder_ctrl #(.ITER_W(ITER_W)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .parity_ok  (parity_ok),
    .max_iter   (max_iter),
    .load       (load),
    .update     (update),
    .busy       (busy),
    .done       (done),
    .success    (success),
    .iterations (iterations)
  );

  // ---------------------------------------------------------------- storage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lambda_q <= '{default: '0};
      alpha_q  <= '{default: '0};
    end else if (load) begin
      lambda_q <= llr;
      alpha_q  <= '{default: '0};
    end else if (update) begin
      alpha_q  <= alpha_d;
    end
  end

  assign codeword = hard;

endmodule
