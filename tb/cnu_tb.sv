// cnu_tb: random check of the check node unit for both row weights (7 and 8).
// Each output must be the sign product and minimum magnitude of the other
// inputs.
module cnu_tb;
  import qc_ldpc_pkg::*;
  msg_t b7 [7], a7 [7];
  msg_t b8 [8], a8 [8];
  int checks = 0, failures = 0;

  cnu #(.DC(7)) dut7 (.beta(b7), .alpha(a7));
  cnu #(.DC(8)) dut8 (.beta(b8), .alpha(a8));

  function automatic msg_t expect_out(msg_t v [], int j);
    msg_t r;
    r.sign = 0;
    r.mag  = 7;
    foreach (v[i]) if (i != j) begin
      r.sign ^= v[i].sign;
      if (v[i].mag < r.mag) r.mag = v[i].mag;
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t v [];
    for (int n = 0; n < 2000; n++) begin
      foreach (b7[i]) b7[i] = msg_t'($urandom_range(15));
      foreach (b8[i]) b8[i] = msg_t'($urandom_range(15));
      #1;
      v = new[7];
      foreach (b7[i]) v[i] = b7[i];
      foreach (a7[j]) begin
        checks++;
        if (a7[j] !== expect_out(v, j)) begin
          failures++;
          $display("cnu7 out %0d = %h expected %h", j, a7[j], expect_out(v, j));
        end
      end
      v = new[8];
      foreach (b8[i]) v[i] = b8[i];
      foreach (a8[j]) begin
        checks++;
        if (a8[j] !== expect_out(v, j)) begin
          failures++;
          $display("cnu8 out %0d = %h expected %h", j, a8[j], expect_out(v, j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
