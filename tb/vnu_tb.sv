// vnu_tb: random check of the variable node unit for column weights 3 and 12.
// Expected: total = lambda + sum(alpha); beta[t] = clip(total - alpha[t], +-7)
// in sign-magnitude (+0 for zero); hard = (total < 0).
module vnu_tb;
  import qc_ldpc_pkg::*;
  msg_t lam3, lam12;
  msg_t a3 [3], b3 [3];
  msg_t a12 [12], b12 [12];
  logic h3, h12;
  logic [2:0]  s3;
  logic [11:0] s12;
  int checks = 0, failures = 0, sats = 0;

  vnu #(.DV(3))  dut3  (.lambda(lam3),  .alpha(a3),  .beta(b3),  .hard(h3),  .sat(s3));
  vnu #(.DV(12)) dut12 (.lambda(lam12), .alpha(a12), .beta(b12), .hard(h12), .sat(s12));

  function automatic int v(msg_t m);
    return m.sign ? -int'(m.mag) : int'(m.mag);
  endfunction

  function automatic msg_t to_sm(int x);
    msg_t r;
    int a = (x < 0) ? -x : x;
    r.sign = (x < 0);
    r.mag  = (a > 7) ? 3'd7 : 3'(a);
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int tot3, tot12;
      lam3  = msg_t'($urandom_range(15));
      lam12 = msg_t'($urandom_range(15));
      foreach (a3[i])  a3[i]  = msg_t'($urandom_range(15));
      foreach (a12[i]) a12[i] = msg_t'($urandom_range(15));
      #1;
      tot3 = v(lam3);
      foreach (a3[i]) tot3 += v(a3[i]);
      tot12 = v(lam12);
      foreach (a12[i]) tot12 += v(a12[i]);
      checks += 2;
      if (h3 !== (tot3 < 0))   begin failures++; $display("vnu3 hard wrong, total %0d", tot3); end
      if (h12 !== (tot12 < 0)) begin failures++; $display("vnu12 hard wrong, total %0d", tot12); end
      foreach (a3[t]) begin
        checks++;
        if (b3[t] !== to_sm(tot3 - v(a3[t])) || s3[t] !== ((tot3 - v(a3[t]) > 7) || (tot3 - v(a3[t]) < -7))) begin
          failures++;
          $display("vnu3 beta[%0d]=%h expected %h", t, b3[t], to_sm(tot3 - v(a3[t])));
        end
        if (s3[t]) sats++;
      end
      foreach (a12[t]) begin
        checks++;
        if (b12[t] !== to_sm(tot12 - v(a12[t]))) begin
          failures++;
          $display("vnu12 beta[%0d]=%h expected %h", t, b12[t], to_sm(tot12 - v(a12[t])));
        end
      end
    end
    checks++;
    if (sats == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
