// ytvy_addsub -- N-bit adder/subtractor that forms the YTVY deficit/surplus C.
//
// In the deficit case (A >= B) the squarer needs C = A - B, in the surplus
// case (A < B) it needs C = A + B; sub selects which. The unit is the usual
// single adder with a conditional complement: y = a + (b ^ {N{sub}}) + sub,
// the result kept to N bits (two's complement wrap). Which of the two it
// does, and that one shared adder serves both, follows the squarer's
// description; the conditional-complement structure is this design's choice.
//
// Interface: a, b, sub in; y out. Combinational, no clock.
module ytvy_addsub #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,   // 1: y = a - b, 0: y = a + b
  output logic [N-1:0] y
);

  logic [N-1:0] b_eff;

  always_comb begin
    b_eff = b ^ {N{sub}};
    y     = a + b_eff + N'(sub);
  end

endmodule
