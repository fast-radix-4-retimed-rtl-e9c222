// tb_sd_upper: checks the first part of the 6-bit sign detector.
//
// For all 4096 pairs (a, b) it completes the sign from the partial state
// (carry into bit 5 = G_hi | P_hi & G_lo, sign = h ^ carry) and compares it
// with the MSB of the 6-bit sum a + b.
module tb_sd_upper;
  import div_pkg::*;

  logic [5:0] a, b, sum;
  sd_state_t  st;
  int checks = 0, failures = 0;

  sd_upper dut (.a(a), .b(b), .st(st));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sgn;
    for (int i = 0; i < 4096; i++) begin
      {a, b} = 12'(i);
      #1;
      sum = a + b;
      sgn = st.h ^ (st.g_hi | (st.p_hi & st.g_lo));
      checks++;
      if (sgn !== sum[5]) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h sign %b expected %b", a, b, sgn, sum[5]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
