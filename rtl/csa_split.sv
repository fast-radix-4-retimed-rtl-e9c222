// csa_split: carry-save (3:2) adder row made of two half-adder rows.
//
// The first half-adder row adds the two early inputs x and y; the second adds
// its sum to the late input z. The carry of each position is the OR of the
// two half-adder carries (they are never both 1) and moves one place up; cin
// fills the freed least significant carry position. s + c = x + y + z + cin
// modulo 2^W.
//
// Splitting each full adder into two half adders lets a late input pass only
// one half adder, which is how the divider's timing analysis treats the
// adders (it is also where register R2 is placed: after the second row).
// Purely combinational.
module csa_split #(
  parameter int W = 10
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W-1:0] s1;
  logic [W-2:0] c1, c2;   // carries out of the top position are dropped

  always_comb begin
    s1 = x ^ y;                       // first half-adder row
    c1 = x[W-2:0] & y[W-2:0];
    s  = s1 ^ z;                      // second half-adder row
    c2 = s1[W-2:0] & z[W-2:0];
    c  = {c1 | c2, cin};
  end

endmodule
