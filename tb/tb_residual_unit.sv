// tb_residual_unit: checks the carry-save residual recurrence.
//
// Loads w[-1] = x/16 and applies random digit sequences. A reference residual
// kept as an ordinary integer (units of 2^-F, modulo 2^W) follows
// w <- 4w - q d; after every cycle ws + wc must equal it. Cycles with en low
// must leave the register unchanged.
module tb_residual_unit;
  import div_pkg::*;

  localparam int N = 53;
  localparam int F = N + 4;
  localparam int W = F + 3;

  logic         clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [N-1:0] x = '0;
  logic [W-1:0] d1 = '0, d2 = '0, ws, wc;
  qdig_t        q = Q_ZERO;
  int checks = 0, failures = 0;

  residual_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] wref;
    logic [63:0]  r;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 100; rep++) begin
      r  = {$urandom(), $urandom()};
      x  = N'(r) | (N'(1) << (N - 1));
      r  = {$urandom(), $urandom()};
      d1 = W'(N'(r) | (N'(1) << (N - 1))) << 4;
      d2 = d1 << 1;
      init = 1'b1;
      @(negedge clk); init = 1'b0;
      wref = W'(x);
      checks++;
      if (W'(ws + wc) !== wref) begin failures++; $display("init value wrong"); end
      for (int i = 0; i < 40; i++) begin
        v  = int'($urandom_range(4)) - 2;
        q  = qdig_from_int(v);
        en = ($urandom_range(7) != 0);
        if (en) wref = W'((wref << 2) - W'(longint'(v)) * d1);
        @(negedge clk);
        checks++;
        if (W'(ws + wc) !== wref) begin
          failures++;
          if (failures < 5) $display("rep %0d step %0d: %h expected %h", rep, i, W'(ws + wc), wref);
        end
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
