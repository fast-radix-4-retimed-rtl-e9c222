// tb_radix4_div: end-to-end test of the radix-4 divider at its default size
// (53-bit significands).
//
// Divides random and corner-case normalised significands and compares the
// rounded quotient, the x < d flag and the inexact flag with a reference
// computed by exact wide-integer division with round-to-nearest-even. Checks
// that every result arrives NDIG + 3 = 30 cycles after start and that busy
// is high meanwhile. After every recurrence step it checks the residual
// bound |w| <= (2/3) d on which the digit selection relies. Counts the
// mechanisms of the design and fails if one never occurred: each digit value
// -2..2, a negative final residual (correction to Q - ulp), both
// normalisation cases, a rounding increment, an exact quotient, and each of
// the eight selection-constant rows.
module tb_radix4_div;
  import div_pkg::*;

  localparam int N      = 53;
  localparam int NDIG   = 27;
  localparam int LAT    = NDIG + 3;
  localparam int NRAND  = 20000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic [N-1:0] x = '0, d = '0;
  logic         busy, done, q_lt1, inexact;
  logic [N-1:0] q_sig;

  int checks = 0, failures = 0;
  int cnt_dig [5];
  int cnt_negres = 0, cnt_lt1 = 0, cnt_ge1 = 0, cnt_inc = 0, cnt_exact = 0;
  int cnt_row [8];

  radix4_div dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Digit statistics while iterating
  always @(posedge clk) if (dut.iter) cnt_dig[qdig_value(dut.q) + 2]++;
  // Convergence: every residual must stay within |w| <= (2/3) d
  int cnt_bound = 0;
  always @(posedge clk) begin
    logic signed [dut.W-1:0] w;
    if (dut.iter && !dut.init) begin
      w = $signed(dut.ws + dut.wc);
      cnt_bound++;
      if (3 * (w < 0 ? -w : w) > 2 * $signed(dut.d1)) begin
        failures++;
        if (failures < 10) $display("residual bound violated: w=%h d=%h", w, dut.d1);
      end
    end
  end

  // Negative final residual seen by the rounding step
  always @(posedge clk) if (dut.fin && dut.u_fin.w[dut.W-1]) cnt_negres++;

  task automatic check(input logic [N-1:0] xa, input logic [N-1:0] da);
    logic [127:0] num, qt, rm;
    logic [N-1:0] exp_sig;
    logic         exp_lt1, exp_inx, up;
    int           cyc;
    exp_lt1 = (xa < da);
    num = exp_lt1 ? (128'(xa) << N) : (128'(xa) << (N - 1));
    qt  = num / 128'(da);
    rm  = num % 128'(da);
    up  = (2 * rm > 128'(da)) || ((2 * rm == 128'(da)) && qt[0]);
    exp_sig = N'(qt + 128'(up));
    exp_inx = (rm != 0);
    if (up) cnt_inc++;
    if (!exp_inx) cnt_exact++;
    if (exp_lt1) cnt_lt1++; else cnt_ge1++;
    cnt_row[da[N-2 -: 3]]++;

    @(negedge clk);
    x = xa; d = da; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (!busy) begin
        failures++;
        $display("busy dropped before done");
      end
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, LAT);
    end
    checks++;
    if (q_sig !== exp_sig || q_lt1 !== exp_lt1 || inexact !== exp_inx) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH x=%h d=%h got %h lt1=%b inx=%b exp %h lt1=%b inx=%b",
                 xa, da, q_sig, q_lt1, inexact, exp_sig, exp_lt1, exp_inx);
    end
  endtask

  function automatic logic [N-1:0] rnd_sig();
    logic [63:0] r;
    r = {$urandom(), $urandom()};
    return N'(r) | (N'(1) << (N - 1));
  endfunction

  logic [N-1:0] xa, da;
  localparam logic [N-1:0] HALF = N'(1) << (N - 1);
  localparam logic [N-1:0] ONES = '1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // corners
    check(HALF, HALF);
    check(ONES, HALF);
    check(HALF, ONES);
    check(ONES, ONES);
    check(ONES, ONES - 1);
    check(ONES - 1, ONES);
    check(HALF + 1, HALF);
    check(HALF, HALF + 1);
    // each dhat row, near its edges
    for (int i = 0; i < 8; i++) begin
      da = HALF | (N'(i) << (N - 4));
      check(ONES, da);
      check(HALF, da);
      check(ONES, da | (ONES >> 4));
      check(HALF, da | (ONES >> 4));
    end
    // divisors at both edges of every constant row, random dividends
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 200; j++) begin
        da = HALF | (N'(i) << (N - 4));
        check(rnd_sig(), da);
        check(rnd_sig(), da | (ONES >> 4));
        check(rnd_sig(), da | (ONES >> 4) ^ N'($urandom_range(255)));
      end
    end
    // exact quotients: x = d * (small value)
    for (int i = 0; i < 50; i++) begin
      da = HALF | (N'($urandom()) << (N - 20));
      xa = N'((128'(da) * 128'(3)) >> 1);
      if (xa[N-1]) check(xa, da);
      check(da, da);
    end
    for (int i = 0; i < NRAND; i++) begin
      xa = rnd_sig();
      da = rnd_sig();
      check(xa, da);
    end
    // mechanisms
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (cnt_dig[v] == 0) begin failures++; $display("digit %0d never used", v - 2); end
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (cnt_row[i] == 0) begin failures++; $display("constant row %0d never used", i); end
    end
    checks += 5 + cnt_bound;
    if (cnt_negres == 0) begin failures++; $display("no negative final residual"); end
    if (cnt_lt1 == 0)    begin failures++; $display("no x<d case"); end
    if (cnt_ge1 == 0)    begin failures++; $display("no x>=d case"); end
    if (cnt_inc == 0)    begin failures++; $display("no rounding increment"); end
    if (cnt_exact == 0)  begin failures++; $display("no exact quotient"); end
    $display("digits -2..2: %0d %0d %0d %0d %0d; negative residual %0d; x<d %0d; x>=d %0d; round-up %0d; exact %0d",
             cnt_dig[0], cnt_dig[1], cnt_dig[2], cnt_dig[3], cnt_dig[4],
             cnt_negres, cnt_lt1, cnt_ge1, cnt_inc, cnt_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
