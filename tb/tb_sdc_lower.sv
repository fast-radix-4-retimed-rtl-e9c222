// tb_sdc_lower: checks sign completion and digit coding.
//
// Drives all 2^16 combinations of the four 4-bit partial states. For each it
// forms the four signs from the carry-lookahead definition and the expected
// digit from the selection table (z_1 >= 0: 2 or 1 by z_2; otherwise 0, -1 or
// -2 by z_0 and z_-1), and compares with the decoded digit.
module tb_sdc_lower;
  import div_pkg::*;

  sd_state_t st [4];
  qdig_t     q;
  int checks = 0, failures = 0;

  sdc_lower dut (.st(st), .q(q));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    bit   ng [4];
    int   expq;
    for (int i = 0; i < 65536; i++) begin
      v = 16'(i);
      for (int k = 0; k < 4; k++) begin
        st[k] = v[4*k +: 4];
        ng[k] = st[k].h ^ ((st[k].g_hi) || (st[k].p_hi && st[k].g_lo));
      end
      #1;
      if (!ng[2])      expq = ng[3] ? 1 : 2;
      else if (!ng[1]) expq = 0;
      else             expq = ng[0] ? -2 : -1;
      checks++;
      if (qdig_value(q) != expq || (q.one && q.two)) begin
        failures++;
        if (failures < 5) $display("state %h q=%0d expected %0d", v, qdig_value(q), expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
