// ldpc_tb_pkg: reference models shared by the decoder testbenches.
//
// encode()      systematic encoder for the rate-1/2, N = 648 code, using the
//               dual-diagonal parity part of the base matrix: the first parity
//               block is the sum of all block-row products H_s * u, the others
//               follow row by row.
// ref_syndrome  H * v computed straight from the base matrix.
// ref_decode    bit-true integer model of the min-sum decoder (4-bit
//               sign-magnitude messages, +-7 saturation, one flooding iteration
//               per step, parity check after every iteration).
package ldpc_tb_pkg;
  import qc_ldpc_pkg::*;

  typedef bit [Z-1:0] blk_t;

  // (P^s x)[k] = x[(k + s) mod Z]
  function automatic blk_t cshift(blk_t x, int s);
    blk_t y;
    for (int k = 0; k < Z; k++) y[k] = x[(k + s) % Z];
    return y;
  endfunction

  function automatic bit [N-1:0] encode(bit [K-1:0] u);
    blk_t lam [MB];
    blk_t q   [MB];
    bit [N-1:0] cw;
    blk_t q0;
    for (int i = 0; i < MB; i++) begin
      lam[i] = '0;
      for (int bc = 0; bc < NB - MB; bc++)
        if (BASE[i][bc] >= 0) lam[i] ^= cshift(blk_t'(u >> (bc * Z)), BASE[i][bc]);
    end
    q0 = '0;
    for (int i = 0; i < MB; i++) q0 ^= lam[i];
    q[0] = q0;
    q[1] = lam[0] ^ cshift(q0, BASE[0][NB - MB]);
    for (int i = 1; i < MB - 1; i++) begin
      q[i+1] = lam[i] ^ q[i];
      if (BASE[i][NB - MB] >= 0) q[i+1] ^= cshift(q0, BASE[i][NB - MB]);
    end
    cw = '0;
    cw[K-1:0] = u;
    for (int i = 0; i < MB; i++)
      for (int k = 0; k < Z; k++) cw[K + i*Z + k] = q[i][k];
    return cw;
  endfunction

  function automatic bit [M-1:0] ref_syndrome(bit [N-1:0] v);
    bit [M-1:0] s = '0;
    for (int br = 0; br < MB; br++)
      for (int bc = 0; bc < NB; bc++)
        if (BASE[br][bc] >= 0)
          for (int k = 0; k < Z; k++) s[br*Z + k] ^= v[bc*Z + (k + BASE[br][bc]) % Z];
    return s;
  endfunction

  function automatic int sm2int(msg_t m);
    return m.sign ? -int'(m.mag) : int'(m.mag);
  endfunction

  function automatic int sat7(int v, ref int nsat);
    if (v > 7)  begin nsat++; return 7;  end
    if (v < -7) begin nsat++; return -7; end
    return v;
  endfunction

  // Reference decoder. Returns decided word, iterations, parity result and the
  // number of saturated variable-to-check messages seen.
  task automatic ref_decode(input msg_t llr [N], input int max_iter,
                            output bit [N-1:0] cw, output int iters,
                            output bit ok, output int nsat);
    int er [$], ec [$];
    int alpha [], beta [], total [N], lam [N];
    int limit = (max_iter == 0) ? 1 : max_iter;
    for (int br = 0; br < MB; br++)
      for (int k = 0; k < Z; k++)
        for (int bc = 0; bc < NB; bc++)
          if (BASE[br][bc] >= 0) begin
            er.push_back(br*Z + k);
            ec.push_back(bc*Z + (k + BASE[br][bc]) % Z);
          end
    alpha = new[er.size()];
    beta  = new[er.size()];
    foreach (alpha[e]) alpha[e] = 0;
    foreach (lam[c]) lam[c] = sm2int(llr[c]);
    nsat  = 0;
    iters = 0;
    do begin
      // variable node update
      foreach (total[c]) total[c] = lam[c];
      foreach (alpha[e]) total[ec[e]] += alpha[e];
      foreach (beta[e]) beta[e] = sat7(total[ec[e]] - alpha[e], nsat);
      // check node update (edges of a row are consecutive)
      for (int e0 = 0; e0 < er.size(); ) begin
        int e1 = e0;
        while (e1 < er.size() && er[e1] == er[e0]) e1++;
        for (int e = e0; e < e1; e++) begin
          bit sg = 0;
          int mn = 100;
          for (int f = e0; f < e1; f++) if (f != e) begin
            sg ^= (beta[f] < 0);
            if ((beta[f] < 0 ? -beta[f] : beta[f]) < mn) mn = (beta[f] < 0 ? -beta[f] : beta[f]);
          end
          alpha[e] = sg ? -mn : mn;
        end
        e0 = e1;
      end
      iters++;
      // decision and parity check
      foreach (total[c]) total[c] = lam[c];
      foreach (alpha[e]) total[ec[e]] += alpha[e];
      foreach (total[c]) cw[c] = (total[c] < 0);
      ok = (ref_syndrome(cw) == '0);
    end while (!ok && iters < limit);
  endtask

endpackage
