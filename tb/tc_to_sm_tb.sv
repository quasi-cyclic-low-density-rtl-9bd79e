// tc_to_sm_tb: exhaustive check of the two's complement to sign-magnitude
// converter with saturation at +-7 (all 256 inputs).
module tc_to_sm_tb;
  import qc_ldpc_pkg::*;
  logic signed [7:0] x;
  msg_t y;
  logic sat;
  int checks = 0, failures = 0;

  tc_to_sm dut (.tc_in(x), .sm_out(y), .sat(sat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      int a;
      bit exp_sat;
      x = 8'(i);
      a = (i < 0) ? -i : i;
      exp_sat = (a > 7);
      if (a > 7) a = 7;
      #1;
      checks++;
      if (y.sign !== (i < 0) || int'(y.mag) != a || sat !== exp_sat) begin
        failures++;
        $display("tc_to_sm %0d -> %h sat %0d", i, y, sat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
