// div_pkg: types, sizes and the selection-constant table shared by the
// radix-4 retimed divider.
//
// The divider works on significands 0.1xxx of N bits and produces one
// radix-4 digit from {-2,-1,0,1,2} per cycle. Digits travel decoded as
// {neg, two, one} so that the divisor-multiple multiplexers need no decoder.
//
// Selection-path words (the "narrow" words) have NW = 10 bits: 5 integer and
// 5 fractional bits (t+1 = 5 with t = 4), matching the 10-bit narrow mux.
//
// The selection constants m_k(dhat), k = 2,1,0,-1, for dhat = 8/16..15/16 are
// this design's own table, derived from the containment and continuity
// conditions of radix-4, rho = 2/3 division:
//   m_k >= max over d in [dhat, dhat+1/16) of (k - 2/3) d
//   m_k + err - grid <= min over the same d of (k - 1 + 2/3) d
// with err = 1/8, grid = 1/16 for k = 2, -1 (sign detection with 4 fractional
// bits) and err = 1/4, grid = 1/8 for k = 1, 0 (sign detection with 3
// fractional bits). For k = 1, 0 the constants are multiples of 1/8 except for
// dhat = 8/16, where they are moved by 1/16 (3/16 and -5/16).
package div_pkg;

  // Decoded quotient digit: value = (neg ? -1 : 1) * (two ? 2 : one ? 1 : 0)
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } qdig_t;

  localparam qdig_t Q_ZERO = '{neg: 1'b0, two: 1'b0, one: 1'b0};

  // Partial sign-detection state kept in register R1 for one 6-bit
  // carry-save number a+b: h = a5^b5, G/P of bits 4:3 and G of bits 2:0.
  typedef struct packed {
    logic h;
    logic g_hi;
    logic p_hi;
    logic g_lo;
  } sd_state_t;

  // Selection-path word: 5 integer, 5 fractional bits
  localparam int NW  = 10;
  typedef logic [NW-1:0] nword_t;

  // Index of the four comparisons
  localparam int K2 = 3, K1 = 2, K0 = 1, KM1 = 0;

  // Selection constants in units of 1/16, row = dhat index (dhat = (8+i)/16)
  function automatic int sel_const16(input logic [2:0] i, input int k);
    int m2, m1, m0, mm1;
    case (i)
      3'd0: begin m2 = 12; m1 =  3; m0 = -5; mm1 = -13; end
      3'd1: begin m2 = 14; m1 =  4; m0 = -6; mm1 = -15; end
      3'd2: begin m2 = 15; m1 =  4; m0 = -6; mm1 = -16; end
      3'd3: begin m2 = 16; m1 =  4; m0 = -6; mm1 = -18; end
      3'd4: begin m2 = 18; m1 =  6; m0 = -8; mm1 = -20; end
      3'd5: begin m2 = 20; m1 =  6; m0 = -8; mm1 = -20; end
      3'd6: begin m2 = 20; m1 =  6; m0 = -8; mm1 = -22; end
      default: begin m2 = 22; m1 =  8; m0 = -8; mm1 = -24; end
    endcase
    case (k)
      K2:      return m2;
      K1:      return m1;
      K0:      return m0;
      default: return mm1;
    endcase
  endfunction

  // -m_k as a selection-path word (units of 1/32)
  function automatic nword_t neg_sel_const(input logic [2:0] i, input int k);
    return nword_t'(-2 * sel_const16(i, k));
  endfunction

  // Signed value of a decoded digit
  function automatic int qdig_value(input qdig_t q);
    int v;
    v = q.two ? 2 : (q.one ? 1 : 0);
    return q.neg ? -v : v;
  endfunction

  function automatic qdig_t qdig_from_int(input int v);
    qdig_t q;
    q.neg = (v < 0);
    q.two = (v == 2) || (v == -2);
    q.one = (v == 1) || (v == -1);
    return q;
  endfunction

endpackage
