// pp_full_adder: parity-preserving reversible full adder on five lines.
//
// Inputs A, B, Cin and two constant lines k0, k1 (0 in normal use); outputs Sum, Cout
// and three garbage lines G1..G3. The adder is a cascade of parity-preserving reversible
// gates, one Fredkin and four Feynman double gates (F2G), so the XOR of its five outputs
// equals the XOR of its five inputs and the whole map is a bijection:
//   line:      1      2       3           4            5
//   start      A      B       Cin         k0           k1
//   F2G(1;2,4) A      A^B     Cin         A            k1
//   FRG(2;3,4) A      A^B     s           Cout         k1    Cout = (A^B) ? Cin : A
//   F2G(1;3,5) A      A^B     s^A         Cout         A     s^A = Cin ^ Cout
//   F2G(4;3,5) A      A^B     Cin         Cout         A^Cout
//   F2G(2;3,1) B      A^B     Sum         Cout         A^Cout
// giving Sum = A^B^Cin, Cout = AB + BCin + CinA, G1 = A^Cout, G2 = B, G3 = A^B (with
// k0 = k1 = 0). The line order of the outputs (G2, G3, Sum, Cout, G1 top to bottom)
// matches the published adder, but its two Islam gates are not reproduced: their
// equations are not available, so this gate cascade and its garbage functions are this
// design's own. Purely combinational: five gate levels, no clock.
module pp_full_adder (
  input  logic a,     // operand A
  input  logic b,     // operand B
  input  logic cin,   // carry in
  input  logic k0,    // constant line, tie to 0
  input  logic k1,    // constant line, tie to 0
  output logic sum,   // A ^ B ^ Cin
  output logic cout,  // majority(A, B, Cin)
  output logic g1,    // garbage A ^ Cout
  output logic g2,    // garbage B
  output logic g3     // garbage A ^ B
);
  // Line values after each gate: sN_lineM.
  logic s1_l1, s1_l2, s1_l4;
  logic s2_l2, s2_l3, s2_l4;
  logic s3_l1, s3_l3, s3_l5;
  logic s4_l4, s4_l3, s4_l5;

  feynman_double_gate u_g1 (.a(a),     .b(b),     .c(k0),    .p(s1_l1), .q(s1_l2), .r(s1_l4));
  fredkin_gate        u_g2 (.a(s1_l2), .b(cin),   .c(s1_l4), .p(s2_l2), .q(s2_l3), .r(s2_l4));
  feynman_double_gate u_g3 (.a(s1_l1), .b(s2_l3), .c(k1),    .p(s3_l1), .q(s3_l3), .r(s3_l5));
  feynman_double_gate u_g4 (.a(s2_l4), .b(s3_l3), .c(s3_l5), .p(s4_l4), .q(s4_l3), .r(s4_l5));
  feynman_double_gate u_g5 (.a(s2_l2), .b(s4_l3), .c(s3_l1), .p(g3),    .q(sum),   .r(g2));

  assign cout = s4_l4;
  assign g1   = s4_l5;
endmodule
