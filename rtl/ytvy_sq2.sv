// ytvy_sq2 -- 2-bit squaring unit, the base case of the YTVY squarer.
//
// Squares a 2-bit number A = {A1,A0} without a multiplier. The square of a
// 2-bit value is 0, 1, 4 or 9, so its bits are
//   G0 = A0          (odd numbers have odd squares)
//   G1 = 0           (a square is never 2 mod 4)
//   G2 = A1 & ~A0    (only 2*2 = 4 sets bit 2)
//   G3 = A1 & A0     (only 3*3 = 9 sets bit 3)
// and it is built, as the squarer's description prescribes, from one 2-input
// AND gate (P = A1 & A0) and one half adder whose inputs are A1 and P: the
// half adder's sum A1 ^ P gives G2 and its carry A1 & P gives G3.
//
// Interface: a[1:0] in, g[3:0] out (g[0] is G0). Purely combinational, no
// clock. G1 is constant zero by the arithmetic, not by omission.
module ytvy_sq2 (
  input  logic [1:0] a,
  output logic [3:0] g
);

  logic p;        // the AND gate
  logic ha_sum;   // half adder sum
  logic ha_carry; // half adder carry

  always_comb begin
    p        = a[1] & a[0];
    ha_sum   = a[1] ^ p;
    ha_carry = a[1] & p;
    g        = {ha_carry, ha_sum, 1'b0, a[0]};
  end

endmodule
