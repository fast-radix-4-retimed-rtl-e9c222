// qd_mux: divisor-multiple multiplexer.
//
// Produces the carry-save addend that subtracts q*d, for a digit q in
// {-2..2} given decoded as {neg, two, one}: 0, d, 2d, or the bitwise inverse
// of d or 2d for a positive digit. For a positive digit the missing +1 of the
// two's complement is returned on cin, to be injected as the carry into the
// least significant position of the residual adder.
//
// The same logic is used twice in the divider: at the full residual width
// (the wide mux, on the residual path) and on a 10-bit slice of d and 2d (the
// narrow mux, on the digit-selection path). Because inversion commutes with
// taking a bit slice, the narrow output is exactly the corresponding slice of
// the wide output. Purely combinational.
module qd_mux
  import div_pkg::*;
#(
  parameter int W = 60
) (
  input  qdig_t          q,
  input  logic [W-1:0]   d1,   // d
  input  logic [W-1:0]   d2,   // 2d
  output logic [W-1:0]   op,
  output logic           cin
);

  logic [W-1:0] mag;

  always_comb begin
    mag = q.two ? d2 : (q.one ? d1 : '0);
    op  = (q.neg || !(q.one || q.two)) ? mag : ~mag;
    cin = !q.neg && (q.one || q.two);
  end

endmodule
