// qsel_retimed: retimed quotient-digit selection by comparisons.
//
// The digit q_{j+1} is chosen by comparing yhat = 4w[j] truncated to t = 4
// fractional bits with the four preloaded constants m_k, each comparison
// being a carry-free subtraction followed by a sign detection. Because
// 4w[j] = 16w[j-1] - 4q_j d, the subtraction is split (eq. (1) of the method):
//
//   yhat - m_k = trunc_t( [trunc_{t+1}(16w[j-1]) - m_k] + trunc_{t+1}(-4q_j d) )
//
// The bracket does not depend on q_j and is formed straight from the residual
// register (one 3:2 row plus the first half-adder row of the second 3:2 row).
// Only the narrow mux, one half-adder row and the sign detectors wait for q_j.
// Dropping the t+1 sum bit after the second row reproduces exactly the
// truncated estimate a conventional unit would compute.
//
// Widths of the sign detectors (6 bits each): z_2 and z_-1 use 2 integer and
// 4 fractional bits, z_1 and z_0 use 3 integer and 3 fractional bits.
//
// Register R1 holds the partial sign states (sd_upper outputs) of the four
// comparisons, not the digit itself. q_j is decoded from R1 by sdc_lower at
// the start of each cycle. init (or reset) loads R1 with states that decode to
// q_0 = 0. R1 is written every cycle.
//
// Interface: ws16/wc16 are bits of the carry-save residual w[j-1] with weights
// 2^0 .. 2^-9 (that is, 16w[j-1] with weights 2^4 .. 2^-5); nd1/nd2 are the
// bits of d and 2d that the wide mux places at the same weights after the
// shift by 4; negm[] are the preloaded -m_k. q is q_j, valid in the cycle
// whose R2 holds w[j-1].
module qsel_retimed
  import div_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   init,
  input  nword_t ws16,
  input  nword_t wc16,
  input  nword_t negm [4],
  input  nword_t nd1,
  input  nword_t nd2,
  output qdig_t  q
);

  nword_t    s1 [4], c1 [4], s2 [4], c2 [4];
  nword_t    nop;
  logic      ncin_unused;
  sd_state_t st_next [4];
  sd_state_t r1 [4];

  // Narrow mux: truncated -4 q_j d on the selection path
  qd_mux #(.W(NW)) u_nmux (
    .q(q), .d1(nd1), .d2(nd2), .op(nop), .cin(ncin_unused)
  );

  for (genvar k = 0; k < 4; k++) begin : g_cmp
    // Advanced subtraction: trunc(16 w[j-1]) - m_k, independent of q_j
    csa_split #(.W(NW)) u_presub (
      .x(ws16), .y(wc16), .z(negm[k]), .cin(1'b0), .s(s1[k]), .c(c1[k])
    );
    // Add trunc(-4 q_j d): first half-adder row early, second row late
    csa_split #(.W(NW)) u_addq (
      .x(s1[k]), .y(c1[k]), .z(nop), .cin(1'b0), .s(s2[k]), .c(c2[k])
    );
    if (k == K2 || k == KM1) begin : g_t4
      sd_upper u_sd (.a(s2[k][6:1]), .b(c2[k][6:1]), .st(st_next[k]));
    end else begin : g_t3
      sd_upper u_sd (.a(s2[k][7:2]), .b(c2[k][7:2]), .st(st_next[k]));
    end
  end

  // Register R1: partial sign states; the init value decodes to q = 0
  function automatic sd_state_t r1_init(input int k);
    sd_state_t s;
    s = '0;
    if (k == K1) s.h = 1'b1;   // z_1 < 0, z_0 >= 0  ->  q = 0
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) r1[k] <= r1_init(k);
    end else if (init) begin
      for (int k = 0; k < 4; k++) r1[k] <= r1_init(k);
    end else begin
      r1 <= st_next;
    end
  end

  sdc_lower u_lower (.st(r1), .q(q));

endmodule
