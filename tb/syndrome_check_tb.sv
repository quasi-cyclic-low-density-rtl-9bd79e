// syndrome_check_tb: the all-zero word and encoded random words must pass;
// a word with errors must give exactly the syndrome computed from the base
// matrix by the reference model.
module syndrome_check_tb;
  import qc_ldpc_pkg::*;
  import ldpc_tb_pkg::*;
  logic [N-1:0] v;
  logic [M-1:0] s;
  logic ok;
  int checks = 0, failures = 0;

  syndrome_check dut (.v_hat(v), .syndrome(s), .ok(ok));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0;
    #1;
    checks++;
    if (!ok || s != '0) begin failures++; $display("all-zero word rejected"); end
    for (int n = 0; n < 40; n++) begin
      bit [K-1:0] u;
      bit [N-1:0] cw;
      for (int i = 0; i < K; i++) u[i] = 1'($urandom);
      cw = encode(u);
      // The reference encoder must produce code words.
      checks++;
      if (ref_syndrome(cw) != '0) begin failures++; $display("reference encoder error"); end
      v = cw;
      #1;
      checks++;
      if (!ok || s != '0) begin failures++; $display("code word %0d rejected", n); end
      // Flip 1..3 random bits.
      for (int f = 0; f <= n % 3; f++) v[$urandom_range(N-1)] ^= 1'b1;
      #1;
      checks++;
      if (s != ref_syndrome(v) || ok != (ref_syndrome(v) == '0)) begin
        failures++;
        $display("syndrome mismatch on corrupted word %0d", n);
      end
    end
    // A single flipped bit in column c sets one syndrome bit per block row it meets.
    for (int c = 0; c < N; c += 13) begin
      v = '0;
      v[c] = 1'b1;
      #1;
      checks++;
      if ($countones(s) != col_weight(c / Z) || ok) begin
        failures++;
        $display("single error in column %0d: %0d syndrome bits", c, $countones(s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
