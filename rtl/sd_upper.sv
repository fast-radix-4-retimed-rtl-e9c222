// sd_upper: first part of the sign detector of a 6-bit carry-save number.
//
// The sign of a+b (modulo 2^6) is a5 ^ b5 ^ carry-into-bit-5. This part
// forms the bit generates and propagates and the group carry terms of bits
// 4:3 and 2:0, leaving one AND-OR and one XOR for sdc_lower. Its output is
// what register R1 of the divider stores, so that the register cuts the sign
// detector in two, as the register-placement analysis asks. Where exactly the
// cut goes inside the detector is this design's choice. Combinational.
module sd_upper
  import div_pkg::*;
(
  input  logic [5:0] a,
  input  logic [5:0] b,
  output sd_state_t  st
);

  logic [4:0] g;
  logic [5:1] p;

  always_comb begin
    g = a[4:0] & b[4:0];
    p = a[5:1] ^ b[5:1];
    st.h    = p[5];
    st.g_hi = g[4] | (p[4] & g[3]);
    st.p_hi = p[4] & p[3];
    st.g_lo = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]);
  end

endmodule
