// sdc_lower: completion of the four sign detections and quotient-digit coder.
//
// From the partial states of z_k = yhat - m_k (k = 2, 1, 0, -1) held in
// register R1 it finishes each sign (carry into bit 5 = G_hi | P_hi & G_lo,
// sign = h ^ carry) and codes the digit as in the selection table:
//   z_1 >= 0: q = 2 if z_2 >= 0, else 1
//   z_1 <  0: q = 0 if z_0 >= 0, else -1 if z_-1 >= 0, else -2
// The signs that the table marks as don't care are not looked at, which is
// what allows the reduced 6-bit widths of z_k. Combinational; output is the
// decoded digit {neg, two, one}.
module sdc_lower
  import div_pkg::*;
(
  input  sd_state_t st [4],
  output qdig_t     q
);

  logic [3:0] neg;   // 1: z_k < 0

  always_comb begin
    for (int k = 0; k < 4; k++)
      neg[k] = st[k].h ^ (st[k].g_hi | (st[k].p_hi & st[k].g_lo));
    q = Q_ZERO;
    if (!neg[K1]) begin
      q.two = !neg[K2];
      q.one =  neg[K2];
    end else if (neg[K0]) begin
      q.neg = 1'b1;
      q.two =  neg[KM1];
      q.one = !neg[KM1];
    end
  end

endmodule
