// ytvy_square -- N-bit squaring circuit built on the YTVY sutra, without a
// multiplier.
//
// Squaring an N-bit number is reduced by one ytvy_stage to squaring the N-1
// low bits of C (the deficit or surplus of A against the base 2^(N-1)); that
// square is in turn taken by an (N-1)-bit stage, and so on down to the 2-bit
// unit (one AND gate and one half adder). An N-bit squarer therefore holds
// N-2 stages and one 2-bit unit, all combinational: C ripples down from the
// N-bit stage to the 2-bit unit, and the partial squares ripple back up.
//
// The levels are unrolled with a generate loop. Level k works on the low k
// bits of lvl_a[k] and leaves its 2k-bit square in the low bits of lvl_s[k];
// the upper bits of both arrays are zero padding.
//
// The reuse of the (N-1)-bit squarer inside the N-bit one follows the
// squarer's description; N = 3 as the default is the size of its worked
// example and of its reported implementation (3 inputs and 6 outputs). Any
// N >= 2 elaborates.
//
// Interface: a[N-1:0] in, s[2N-1:0] = a*a out. Combinational, no clock.
module ytvy_square #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]   a,
  output logic [2*N-1:0] s
);

  if (N < 2) begin : g_bad_n
    $error("ytvy_square: N must be at least 2");
  end

  logic [N-1:0]   lvl_a [2:N];  // operand of the k-bit level (low k bits)
  logic [2*N-1:0] lvl_s [2:N];  // square from the k-bit level (low 2k bits)

  assign lvl_a[N] = a;

  for (genvar k = N; k >= 3; k--) begin : g_lvl
    logic [k-2:0]   c_low;
    logic [2*k-1:0] s_k;

    ytvy_stage #(.N(k)) u_stage (
      .a    (lvl_a[k][k-1:0]),
      .e    (lvl_s[k-1][2*k-3:0]),
      .c_low(c_low),
      .s    (s_k)
    );

    assign lvl_a[k-1] = N'(c_low);
    assign lvl_s[k]   = (2*N)'(s_k);
  end

  // The 2-bit unit at the bottom of the chain.
  logic [3:0] g2;

  ytvy_sq2 u_sq2 (
    .a(lvl_a[2][1:0]),
    .g(g2)
  );

  assign lvl_s[2] = (2*N)'(g2);
  assign s        = lvl_s[N];

endmodule
