// tb_div_ctrl: checks the divider sequencer.
//
// After each start taken while idle it expects: init in that cycle only,
// exactly NDIG + 2 cycles with iter, then one cycle with fin, then done for
// one cycle, NDIG + 3 cycles after start, with busy high from the cycle after
// start until done. Starts raised while busy must be ignored.
module tb_div_ctrl;

  localparam int NDIG = 27;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic init, iter, fin, busy, done;
  int checks = 0, failures = 0;

  div_ctrl #(.NDIG(NDIG)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int niter, nfin, cyc, ninit;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      repeat ($urandom_range(3)) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy while idle"); end
      start = 1'b1;
      #1;
      checks++;
      if (!init) begin failures++; $display("init not raised with start"); end
      @(negedge clk);
      niter = 0; nfin = 0; cyc = 0; ninit = 0;
      while (!done && cyc < 100) begin
        start = ($urandom_range(3) == 0);   // must be ignored
        #1;
        if (iter) niter++;
        if (fin) nfin++;
        if (init) ninit++;
        if (!busy) begin failures++; $display("busy low during operation"); end
        @(negedge clk);
        cyc++;
      end
      start = 1'b0;
      checks += 4;
      if (cyc != NDIG + 3) begin failures++; $display("done after %0d cycles", cyc); end
      if (niter != NDIG + 2) begin failures++; $display("%0d iteration cycles", niter); end
      if (nfin != 1) begin failures++; $display("%0d rounding cycles", nfin); end
      if (ninit != 0) begin failures++; $display("start accepted while busy"); end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("done longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
