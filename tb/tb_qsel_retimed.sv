// tb_qsel_retimed: checks the retimed digit-selection unit cycle by cycle.
//
// After init the unit must present q = 0. Then, each cycle, random residual
// bits, constants and divisor slices are applied, and the digit seen in the
// next cycle must equal a reference formed with plain arithmetic: the
// estimate yhat - m_k is built as two full-adder (majority/parity) carry-save
// steps over the four 10-bit words (16w sum, 16w carry, -m_k, and the
// truncated -4 q d for the digit currently shown), the sign of each
// comparison is the MSB of the 6-bit sum of the two vectors at 4 (k = 2, -1)
// or 3 (k = 1, 0) fractional bits, and the digit is coded from the signs as
// in the selection table. It also checks that the digit depends on the
// inputs only through register R1 (one cycle of delay).
//
// A second phase checks the selection property itself, independently of the
// unit's structure: for a random divisor d in a random row, a random true
// shifted residual y with |y| <= (8/3) d is split into three random 10-bit
// carry-save words (16w sum, 16w carry, narrow-mux term) plus dropped low
// bits worth less than 3/32; with that row's constants loaded, the digit q
// chosen must satisfy (q - 2/3) d <= y <= (q + 2/3) d.
module tb_qsel_retimed;
  import div_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, init = 1'b0;
  nword_t ws16 = '0, wc16 = '0, nd1 = '0, nd2 = '0;
  nword_t negm [4];
  qdig_t  q;
  int checks = 0, failures = 0;
  int seen [5];

  qsel_retimed dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic nword_t maj(input nword_t a, input nword_t b, input nword_t c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  function automatic int ref_digit(input qdig_t qc);
    nword_t z, s1, c1, s2, c2;
    logic [5:0] sum6;
    bit ng [4];
    int v;
    v = qdig_value(qc);
    z = (v == 0) ? '0 : (v == 1) ? ~nd1 : (v == 2) ? ~nd2 : (v == -1) ? nd1 : nd2;
    for (int k = 0; k < 4; k++) begin
      s1 = ws16 ^ wc16 ^ negm[k];
      c1 = maj(ws16, wc16, negm[k]) << 1;
      s2 = s1 ^ c1 ^ z;
      c2 = maj(s1, c1, z) << 1;
      if (k == K2 || k == KM1) sum6 = s2[6:1] + c2[6:1];
      else                     sum6 = s2[7:2] + c2[7:2];
      ng[k] = sum6[5];
    end
    if (!ng[K1]) return ng[K2] ? 1 : 2;
    if (!ng[K0]) return 0;
    return ng[KM1] ? -2 : -1;
  endfunction

  initial begin
    int expq;
    for (int k = 0; k < 4; k++) negm[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge clk); init = 1'b1;
      @(negedge clk); init = 1'b0;
      checks++;
      if (qdig_value(q) != 0) begin failures++; $display("q after init = %0d", qdig_value(q)); end
      for (int i = 0; i < 500; i++) begin
        ws16 = 10'($urandom()); wc16 = 10'($urandom());
        nd1  = 10'($urandom()); nd2 = 10'($urandom());
        for (int k = 0; k < 4; k++) negm[k] = 10'($urandom());
        #1;
        expq = ref_digit(q);
        @(negedge clk);
        checks++;
        seen[qdig_value(q) + 2]++;
        if (qdig_value(q) != expq) begin
          failures++;
          if (failures < 5) $display("cycle %0d: q=%0d expected %0d", i, qdig_value(q), expq);
        end
      end
    end
    // phase 2: containment of the selected digit
    for (int i = 0; i < 200000; i++) begin
      int     row, v, r;
      real    dr, y;
      nword_t vx, vy, vz, vv;
      row = int'($urandom_range(7));
      dr  = (8.0 + row + real'($urandom()) / 4294967296.0) / 16.0;
      y   = (2.0 * real'($urandom()) / 4294967295.0 - 1.0) * (8.0 / 3.0) * dr;
      r   = int'($urandom_range(2));
      vv  = nword_t'($floor(32.0 * y) - r);
      for (int k = 0; k < 4; k++) negm[k] = neg_sel_const(3'(row), k);
      vx  = 10'($urandom());
      vz  = (qdig_value(q) == 0) ? '0 : 10'($urandom());
      vy  = vv - vx - vz;
      ws16 = vx; wc16 = vy;
      nd1 = 10'($urandom()); nd2 = 10'($urandom());
      case (qdig_value(q))
        1:  nd1 = ~vz;
        2:  nd2 = ~vz;
        -1: nd1 = vz;
        -2: nd2 = vz;
        default: ;
      endcase
      @(negedge clk);
      v = qdig_value(q);
      checks++;
      if (y < (real'(v) - 2.0/3.0) * dr || y > (real'(v) + 2.0/3.0) * dr) begin
        failures++;
        if (failures < 10) $display("row %0d d=%f y=%f: q=%0d outside containment", row, dr, y, v);
      end
    end
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (seen[v] == 0) begin failures++; $display("digit %0d never produced", v - 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
