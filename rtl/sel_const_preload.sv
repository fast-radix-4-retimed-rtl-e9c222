// sel_const_preload: selection-constant registers.
//
// The divisor does not change during a division, so the four selection
// constants that belong to its truncated value dhat = 0.1xxx (the three bits
// after the leading one) are looked up once, when a division starts, and kept
// in registers. They are stored negated (-m_k) in the 10-bit selection-path
// format (5 integer, 5 fractional bits), ready to enter a carry-save adder.
//
// Interface: load (one cycle, with dhat valid) -> negm[] valid from the next
// cycle until the next load. negm[3] is -m_2, negm[2] -m_1, negm[1] -m_0,
// negm[0] -m_-1. Preloading follows the scheme the divider is built on; the
// table itself (div_pkg) is this design's own derivation.
module sel_const_preload
  import div_pkg::*;
(
  input  logic       clk,
  input  logic       load,
  input  logic [2:0] dhat,
  output nword_t     negm [4]
);

  always_ff @(posedge clk) begin
    if (load) begin
      for (int k = 0; k < 4; k++) negm[k] <= neg_sel_const(dhat, k);
    end
  end

endmodule
