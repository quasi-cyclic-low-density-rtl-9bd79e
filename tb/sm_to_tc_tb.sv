// sm_to_tc_tb: exhaustive check of the sign-magnitude to two's complement
// converter (16 inputs, -0 must give 0).
module sm_to_tc_tb;
  import qc_ldpc_pkg::*;
  msg_t m;
  logic signed [7:0] y;
  int checks = 0, failures = 0;

  sm_to_tc dut (.sm_in(m), .tc_out(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int expv;
      m = msg_t'(i);
      expv = (i >= 8) ? -(i - 8) : i;
      #1;
      checks++;
      if (int'(y) != expv) begin
        failures++;
        $display("sm_to_tc %h -> %0d expected %0d", m, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
