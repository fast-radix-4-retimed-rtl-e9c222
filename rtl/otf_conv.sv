// otf_conv: on-the-fly conversion of the signed-digit quotient.
//
// Keeps Q = sum of the digits received so far (each new digit is the next
// radix-4 position) and QM = Q - 1 in the last position, both in plain
// binary, so that no carry propagation is needed as digits arrive:
//   q >= 0: Q  <- 4Q  + q,        q <  0: Q  <- 4QM + (4 + q)
//   q >  0: QM <- 4Q  + (q - 1),  q <= 0: QM <- 4QM + (3 + q)
// After the last digit, QM is the quotient corrected for a negative final
// residual. Registers are QW bits and wrap (only the low QW bits matter).
//
// Timing: init clears (Q = 0, QM = -1); each cycle with en appends q.
module otf_conv
  import div_pkg::*;
#(
  parameter int QW = 56
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          en,
  input  qdig_t         q,
  output logic [QW-1:0] qq,
  output logic [QW-1:0] qm
);

  logic [1:0] dq, dqm;
  logic       pos, zero;

  always_comb begin
    zero = !(q.one || q.two);
    pos  = !q.neg && !zero;
    // low digit appended to Q and to QM (mod 4)
    dq   = q.two ? 2'd2 : (q.one ? (q.neg ? 2'd3 : 2'd1) : 2'd0);
    dqm  = dq - 2'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qq <= '0;
      qm <= '1;
    end else if (init) begin
      qq <= '0;
      qm <= '1;
    end else if (en) begin
      qq <= {(q.neg ? qm[QW-3:0] : qq[QW-3:0]), dq};
      qm <= {(pos   ? qq[QW-3:0] : qm[QW-3:0]), dqm};
    end
  end

endmodule
