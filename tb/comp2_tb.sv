// comp2_tb: exhaustive check of the two-input sign-magnitude comparator.
// All 256 input pairs; expected sign = XOR of signs, magnitude = minimum.
module comp2_tb;
  import qc_ldpc_pkg::*;
  msg_t a, b, y;
  int checks = 0, failures = 0;

  comp2 dut (.a(a), .b(b), .min_val(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = msg_t'(i);
        b = msg_t'(j);
        #1;
        checks++;
        if (y.sign !== (i[3] ^ j[3]) || y.mag !== ((i[2:0] < j[2:0]) ? i[2:0] : j[2:0])) begin
          failures++;
          $display("comp2 mismatch a=%h b=%h y=%h", a, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
