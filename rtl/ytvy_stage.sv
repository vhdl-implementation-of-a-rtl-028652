// ytvy_stage -- one N-bit level of the YTVY (Yavadunam Tavadunikrtya
// Vargarica Yojayet) squarer.
//
// The sutra writes A^2 = (A + C)(A - C) + C^2 with C the distance of A from a
// base B. In binary the base of an N-bit number is B = 2^(N-1), so
// multiplying by B is a left shift by N-1 and no multiplier is needed:
//
//   deficit (A >= B): C = A - B (the low N-1 bits of A), D = A + C,
//                     F = D << (N-1), so that A^2 = F + C^2
//   surplus (A <  B): C = A + B, whose low N-1 bits are A itself, D = 0,
//                     F = 0, so that A^2 = C_low^2
//
// E, the square of the low N-1 bits of C, is computed outside this module by
// the (N-1)-bit squarer and comes back in on e; G is E zero-extended to 2N
// bits, and the final 2N-bit adder gives S = F + G. C's MSB is dropped before
// squaring in both cases (in the deficit case it is zero anyway).
//
// The steps, the names C, D, E, F, G, S and the two conditions follow the
// squarer's description. Its worked example for N = 3 prepends "2-bit (n-1)"
// zeros to E; this module prepends the two zeros that make G 2N bits wide,
// which is the same for N = 3 and the only width that works for other N.
//
// Interface: a[N-1:0] and e[2N-3:0] in; c_low[N-2:0] (goes to the next
// smaller squarer) and s[2N-1:0] (= a*a when e is correct) out. The internal
// signal deficit tells which condition applies.
// Combinational, no clock.
module ytvy_stage #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]   a,
  input  logic [2*N-3:0] e,        // square of c_low, from the (N-1)-bit squarer
  output logic [N-2:0]   c_low,    // C without its MSB
  output logic [2*N-1:0] s         // A squared
);

  localparam logic [N-1:0] BASE = N'(1) << (N - 1);

  logic [N-1:0]   c;
  logic [N-1:0]   d_sum;
  logic           d_cout;
  logic [N:0]     d;
  logic [2*N-1:0] f;
  logic [2*N-2:0] g;        // G without its MSB, which is always zero
  logic           deficit;  // 1 when A >= B (condition 1)
  logic [2*N-2:0] s_low;
  logic           s_cout;

  // Condition select: compare A with the base.
  always_comb deficit = (a >= BASE);

  // Step 1: C = A - B (deficit) or A + B (surplus).
  ytvy_addsub #(.N(N)) u_c (
    .a  (a),
    .b  (BASE),
    .sub(deficit),
    .y  (c)
  );

  always_comb c_low = c[N-2:0];

  // Step 3: D = A + C in the deficit case, D = 0 in the surplus case.
  ytvy_adder #(.W(N)) u_d (
    .a   (a),
    .b   (c),
    .sum (d_sum),
    .cout(d_cout)
  );

  // Step 4: F = D shifted left by N-1, G = E with two zeros on top (the
  // upper zero is left out of g, see step 5).
  always_comb begin
    d = deficit ? {d_cout, d_sum} : '0;
    f = {d, {(N-1){1'b0}}};
    g = {1'b0, e};
  end

  // Step 5: S = F + G on the 2N-bit adder. G's top bit is always zero, so
  // the adder's last bit is a half adder on F's MSB and the carry below it.
  // A^2 < 2^(2N), so that half adder never carries out.
  ytvy_adder #(.W(2*N-1)) u_s (
    .a   (f[2*N-2:0]),
    .b   (g),
    .sum (s_low),
    .cout(s_cout)
  );

  always_comb s = {f[2*N-1] ^ s_cout, s_low};

endmodule
