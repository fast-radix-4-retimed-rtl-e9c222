// residual_unit: carry-save residual recurrence with register R2.
//
// Implements w[j] = 4 w[j-1] - q_j d with the residual kept in carry-save
// form (ws, wc) in register R2. The shifted residual 4w[j-1] (two early
// vectors) and the wide-mux output -q_j d (late vector) are added by one
// split 3:2 row: the first half-adder row does not wait for q_j, the second
// does. R2 sits after the second row.
//
// Format: W = F + 3 bits, two's complement, 3 integer bits and F fractional
// bits (bit F has weight 2^0). Shifting by 4 drops the two top bits; this is
// harmless because |4w| < 8/3 fits in 3 integer bits and all arithmetic is
// modulo 2^3. F = N + 4 so that the initial residual w[-1] = x/16 is exact.
//
// Timing: init loads w[-1] = x/16 (wc = 0). Each cycle with en, R2 advances
// one iteration using the digit q that the selection unit presents in that
// cycle. d1 = d and d2 = 2d must be in the residual format.
module residual_unit
  import div_pkg::*;
#(
  parameter int N = 53,
  parameter int F = N + 4,
  parameter int W = F + 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [N-1:0] x,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  input  qdig_t        q,
  output logic [W-1:0] ws,
  output logic [W-1:0] wc
);

  logic [W-1:0] op, ns, nc;
  logic         cin;

  // Wide mux: -q_j d
  qd_mux #(.W(W)) u_wmux (.q(q), .d1(d1), .d2(d2), .op(op), .cin(cin));

  // 4 w[j-1] - q_j d
  csa_split #(.W(W)) u_csa (
    .x({ws[W-3:0], 2'b00}), .y({wc[W-3:0], 2'b00}), .z(op), .cin(cin),
    .s(ns), .c(nc)
  );

  // Register R2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0;
      wc <= '0;
    end else if (init) begin
      ws <= W'(x) << (F - N - 4);   // w[-1] = x / 16
      wc <= '0;
    end else if (en) begin
      ws <= ns;
      wc <= nc;
    end
  end

endmodule
