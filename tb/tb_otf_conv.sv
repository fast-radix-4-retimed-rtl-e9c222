// tb_otf_conv: checks on-the-fly conversion.
//
// Feeds random sequences of 28 digits from {-2..2} and compares Q and QM
// after every digit with the integer sum of the digits weighted by powers of
// four (and that sum minus one), modulo 2^QW. Also checks clearing and that
// en low holds the registers.
module tb_otf_conv;
  import div_pkg::*;

  localparam int QW = 56;

  logic          clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  qdig_t         q = Q_ZERO;
  logic [QW-1:0] qq, qm;
  int checks = 0, failures = 0;

  otf_conv #(.QW(QW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 300; rep++) begin
      init = 1'b1;
      @(negedge clk); init = 1'b0;
      acc = 0;
      checks++;
      if (qq !== '0 || qm !== '1) begin failures++; $display("clear failed"); end
      for (int i = 0; i < QW / 2; i++) begin
        v  = int'($urandom_range(4)) - 2;
        q  = qdig_from_int(v);
        en = ($urandom_range(5) != 0);
        if (en) acc = acc * 4 + longint'(v);
        @(negedge clk);
        checks++;
        if (qq !== QW'(acc) || qm !== QW'(acc - 1)) begin
          failures++;
          if (failures < 5) $display("rep %0d digit %0d: Q=%h QM=%h expected %h", rep, i, qq, qm, QW'(acc));
        end
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
