// tb_qd_mux: checks the divisor-multiple multiplexer at the wide (60-bit)
// and narrow (10-bit) widths.
//
// For random divisors and every digit q in {-2..2} it checks that
// op + cin = -q*d modulo 2^W, and that the narrow instance fed with bit
// slices of d and 2d returns the same slice of the wide output.
module tb_qd_mux;
  import div_pkg::*;

  localparam int W = 60;
  localparam int F = 57;

  qdig_t          q;
  logic [W-1:0]   d1, d2, op;
  logic           cin;
  logic [9:0]     nop;
  logic           ncin;
  int checks = 0, failures = 0;

  qd_mux #(.W(W))  dut  (.q(q), .d1(d1), .d2(d2), .op(op), .cin(cin));
  qd_mux #(.W(10)) dutn (.q(q), .d1(d1[F+2 -: 10]), .d2(d2[F+2 -: 10]), .op(nop), .cin(ncin));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    logic [W-1:0] expv;
    for (int i = 0; i < 2000; i++) begin
      r  = {$urandom(), $urandom()};
      d1 = (W'(r[52:0]) | (W'(1) << 52)) << 4;
      d2 = d1 << 1;
      for (int v = -2; v <= 2; v++) begin
        q = qdig_from_int(v);
        #1;
        expv = W'(-(longint'(v)) * 1) * d1;
        checks++;
        if (op + W'(cin) !== expv) begin
          failures++;
          if (failures < 5) $display("q=%0d d=%h op=%h cin=%b", v, d1, op, cin);
        end
        checks++;
        if (nop !== op[F+2 -: 10]) begin
          failures++;
          if (failures < 5) $display("narrow q=%0d %h vs %h", v, nop, op[F+2 -: 10]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
