// ytvy_adder -- W-bit unsigned binary adder with carry out.
//
// The YTVY squarer uses two adders per level: D = A + C, which needs N+1
// bits and so uses the carry out, and the final 2N-bit adder S = F + G.
// The squarer's description names these adders but not their insides, so
// this is a plain behavioural "+" that synthesis maps onto the target's
// carry logic.
//
// Interface: a, b in; sum, cout out ({cout, sum} = a + b). Combinational.
module ytvy_adder #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb {cout, sum} = a + b;

endmodule
