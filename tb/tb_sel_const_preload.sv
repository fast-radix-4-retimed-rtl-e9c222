// tb_sel_const_preload: checks the preloaded selection constants.
//
// For every divisor row dhat = (8+i)/16 it loads the registers and verifies,
// with real arithmetic and independently of the table, that each constant
// satisfies the radix-4 (rho = 2/3) selection conditions over the whole
// divisor interval [dhat, dhat + 1/16):
//   m_k >= (k - 2/3) d        (lower containment)
//   m_k + err - grid <= (k - 1/3) d   (upper containment with overlap)
// with err/grid = 1/8 and 1/16 for k = 2, -1 and 1/4 and 1/8 for k = 1, 0.
// It also checks that the constants are held while load is low and that the
// k = 1, 0 constants are multiples of 1/8 except for the first row.
module tb_sel_const_preload;
  import div_pkg::*;

  logic       clk = 1'b0;
  logic       load = 1'b0;
  logic [2:0] dhat = '0;
  nword_t     negm [4];
  int checks = 0, failures = 0;

  sel_const_preload dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input nword_t v);
    return real'($signed(v)) / 32.0;
  endfunction

  initial begin
    real m, dl, dh, kk, err, grid, lo, hi;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); dhat = 3'(i); load = 1'b1;
      @(negedge clk); load = 1'b0; dhat = 3'(7 - i);
      repeat (2) @(negedge clk);       // must hold while load is low
      dl = (8.0 + i) / 16.0;
      dh = (9.0 + i) / 16.0;
      for (int k = 0; k < 4; k++) begin
        m    = -to_real(negm[k]);
        kk   = real'(k - 1);              // index 3..0 -> k = 2..-1
        err  = (k == K2 || k == KM1) ? 0.125 : 0.25;
        grid = (k == K2 || k == KM1) ? 0.0625 : 0.125;
        lo   = (kk - 2.0/3.0) * dl;
        if ((kk - 2.0/3.0) * dh > lo) lo = (kk - 2.0/3.0) * dh;
        hi   = (kk - 1.0/3.0) * dl;
        if ((kk - 1.0/3.0) * dh < hi) hi = (kk - 1.0/3.0) * dh;
        checks++;
        if (m < lo - 1e-12 || m + err - grid > hi + 1e-12) begin
          failures++;
          $display("row %0d k=%0d: m=%f outside [%f, %f]", i, k - 1, m, lo, hi - err + grid);
        end
        if ((k == K1 || k == K0) && i != 0) begin
          checks++;
          if (negm[k][1:0] != 2'b00) begin
            failures++;
            $display("row %0d k=%0d: m=%f not a multiple of 1/8", i, k - 1, m);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
