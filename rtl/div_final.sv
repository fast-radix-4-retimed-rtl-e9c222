// div_final: termination step of the divider (one registered cycle).
//
// After the last recurrence cycle the residual w[n+1] is still in carry-save
// form. This block assimilates it (one carry-propagate addition), takes its
// sign to choose between the on-the-fly quotient Q and Q - ulp (the
// correction for a negative residual), normalises and rounds.
//
// The corrected quotient QI (QW bits) approximates x/(4d) * 2^QW, so its
// leading one sits at bit QW-2 when x >= d and at bit QW-3 when x < d; in the
// second case the result is shifted up by one and q_lt1 tells the exponent
// logic to subtract one. Rounding is to nearest, ties to even, with the
// sticky bit formed from the remaining quotient bits and from "residual is
// not zero". A carry out of the rounding (only possible for x < d) renormalises
// to 1.000. The rounding mode is this design's choice.
//
// Timing: with en, the result is registered at the next clock edge.
module div_final #(
  parameter int N  = 53,
  parameter int F  = N + 4,
  parameter int W  = F + 3,
  parameter int QW = 56
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  ws,
  input  logic [W-1:0]  wc,
  input  logic [QW-1:0] qq,
  input  logic [QW-1:0] qm,
  output logic [N-1:0]  q_sig,
  output logic          q_lt1,
  output logic          inexact
);

  logic [W-1:0]  w;
  logic [QW-1:0] qi, qs;
  logic [N-1:0]  sig, sig_r;
  logic [N:0]    sum;
  logic          lt1, lt1_r, rnd, sticky, inc;

  always_comb begin
    w      = ws + wc;                       // assimilate final residual
    qi     = w[W-1] ? qm : qq;              // correct for negative residual
    lt1    = !qi[QW-2];
    qs     = lt1 ? (qi << 1) : qi;          // normalise
    sig    = qs[QW-2 -: N];
    rnd    = qs[QW-2-N];
    sticky = (|qs[QW-3-N:0]) || (|w);
    inc    = rnd && (sticky || sig[0]);
    sum    = {1'b0, sig} + (N+1)'(inc);
    if (sum[N]) begin                       // rounded up to 1.000
      sig_r = {1'b1, {(N-1){1'b0}}};
      lt1_r = 1'b0;
    end else begin
      sig_r = sum[N-1:0];
      lt1_r = lt1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_sig   <= '0;
      q_lt1   <= 1'b0;
      inexact <= 1'b0;
    end else if (en) begin
      q_sig   <= sig_r;
      q_lt1   <= lt1_r;
      inexact <= rnd || sticky;
    end
  end

endmodule
