// radix4_div: radix-4 significand divider with retimed selection by
// comparisons.
//
// Computes the rounded quotient x/d of two normalised significands
// (0.1xxx, N bits) one radix-4 digit per cycle, digits in {-2..2}, residual in
// carry-save form. The digit is selected by comparing the residual estimate
// with four selection constants preloaded for the divisor; each comparison is
// a carry-free subtraction plus a sign detection, and the subtraction of the
// constant from the residual is advanced by one iteration so that it is off
// the critical path. Two registers hold the iteration state: R2 the
// carry-save residual (residual_unit) and R1 the partial sign-detection
// states from which the next digit is decoded (qsel_retimed).
//
// Operation (NDIG + 3 cycles after start; 30 for N = 53):
//   start (idle)   : R2 <- w[-1] = x/16, R1 <- state of q_0 = 0, divisor and
//                    selection constants loaded, Q/QM cleared
//   NDIG+2 cycles  : w[j] = 4w[j-1] - q_j d, j = 0 .. NDIG+1, digits appended
//                    on the fly
//   1 cycle        : assimilate residual, correct, normalise, round
//   done pulses with q_sig / q_lt1 / inexact valid (held until the next
//   result).
// x and d must have their most significant bit set. q_sig is the rounded
// significand with its MSB set; q_lt1 = 1 means x < d and the true quotient is
// q_sig * 2^-N (otherwise q_sig * 2^-(N-1)). Exponent and sign handling are
// outside this unit. Rounding to nearest-even is this design's choice.
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the operand assertion.
module radix4_div
  import div_pkg::*;
#(
  parameter int N    = 53,
  parameter int NDIG = (N + 2) / 2,     // radix-4 digits incl. rounding bit
  parameter int F    = N + 4,
  parameter int W    = F + 3,
  parameter int QW   = 2 * (NDIG + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic [N-1:0] d,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] q_sig,
  output logic         q_lt1,
  output logic         inexact
);

  logic         init, iter, fin;
  logic [N-1:0] dreg;
  logic [W-1:0] d1, d2, ws, wc;
  nword_t       negm [4];
  qdig_t        q;
  logic [QW-1:0] qq, qm;

  div_ctrl #(.NDIG(NDIG)) u_ctrl (
    .clk, .rst_n, .start, .init, .iter, .fin, .busy, .done
  );

  // Divisor register and its multiples in residual format (weight 2^0 = bit F)
  always_ff @(posedge clk) if (init) dreg <= d;
  assign d1 = W'(dreg) << (F - N);
  assign d2 = d1 << 1;

  sel_const_preload u_const (
    .clk, .load(init), .dhat(d[N-2 -: 3]), .negm(negm)
  );

  residual_unit #(.N(N), .F(F), .W(W)) u_res (
    .clk, .rst_n, .init, .en(iter), .x, .d1, .d2, .q, .ws, .wc
  );

  qsel_retimed u_qsel (
    .clk, .rst_n, .init,
    .ws16(ws[F -: NW]), .wc16(wc[F -: NW]),
    .negm(negm),
    .nd1(d1[F+2 -: NW]), .nd2(d2[F+2 -: NW]),
    .q(q)
  );

  otf_conv #(.QW(QW)) u_otf (
    .clk, .rst_n, .init, .en(iter), .q, .qq, .qm
  );

  div_final #(.N(N), .F(F), .W(W), .QW(QW)) u_fin (
    .clk, .rst_n, .en(fin), .ws, .wc, .qq, .qm, .q_sig, .q_lt1, .inexact
  );

  // Operands must be normalised significands
  a_norm: assert property (@(posedge clk) disable iff (!rst_n)
                           init |-> (x[N-1] && d[N-1]));

endmodule
