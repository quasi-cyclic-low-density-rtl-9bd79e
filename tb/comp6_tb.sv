// comp6_tb: random check of the six-input minimum / sign-product tree.
module comp6_tb;
  import qc_ldpc_pkg::*;
  msg_t in [6];
  msg_t y;
  int checks = 0, failures = 0;

  comp6 dut (.a(in[0]), .b(in[1]), .c(in[2]), .d(in[3]), .e(in[4]), .f(in[5]), .min_val(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      bit sg;
      int mn;
      foreach (in[i]) in[i] = msg_t'($urandom_range(15));
      sg = 0;
      mn = 7;
      foreach (in[i]) begin
        sg ^= in[i].sign;
        if (int'(in[i].mag) < mn) mn = in[i].mag;
      end
      #1;
      checks++;
      if (y.sign !== sg || int'(y.mag) != mn) begin
        failures++;
        $display("comp6 mismatch y=%h expected sign %0d mag %0d", y, sg, mn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
