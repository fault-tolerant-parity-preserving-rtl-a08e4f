// majority_voter: parity-preserving reversible 3-bit majority voter.
//
// Three votes a, b, c and one constant line k0 (0 in normal use) pass through a cascade
// of three reversible gates, each of which preserves parity:
//   1. F2G, control a, targets b and c:      lines become a, a^b, a^c, 0
//   2. Fredkin, control a^b, swaps lines 3/4: line 4 = (a^b)(a^c), line 3 = (a^b)'(a^c)
//   3. F2G, control line 4, targets 1 and 3: line 1 = a ^ (a^b)(a^c) = ab^bc^ca,
//                                            line 3 = a^c
// (a^b)(a^c) is 1 exactly when a disagrees with both b and c, so XORing it into a gives
// the majority. Outputs, line by line: maj = ab^bc^ca, g_ab = a^b, g_ac = a^c and
// g_prod = (a^b)(a^c); the last three are garbage. With k0 = 0 the XOR of the outputs
// equals the XOR of the inputs, which is what lets a parity checker test the voter.
//
// The gate kinds (one Fredkin, two F2G), the constant line and the four output functions
// follow the voter as published; the order in which the gates are applied is this
// design's reading of the circuit drawing. Purely combinational: three gate levels,
// no clock.
module majority_voter (
  input  logic a,       // vote from module 1
  input  logic b,       // vote from module 2
  input  logic c,       // vote from module 3
  input  logic k0,      // constant input line, tie to 0
  output logic maj,     // ab ^ bc ^ ca
  output logic g_ab,    // garbage a ^ b
  output logic g_ac,    // garbage a ^ c
  output logic g_prod   // garbage (a ^ b)(a ^ c)
);
  // Line values after each gate: sN_lineM.
  logic s1_l1, s1_l2, s1_l3;
  logic s2_l2, s2_l3, s2_l4;

  feynman_double_gate u_f2g_in (
    .a(a), .b(b), .c(c),
    .p(s1_l1), .q(s1_l2), .r(s1_l3)
  );

  fredkin_gate u_frg (
    .a(s1_l2), .b(s1_l3), .c(k0),
    .p(s2_l2), .q(s2_l3), .r(s2_l4)
  );

  feynman_double_gate u_f2g_out (
    .a(s2_l4), .b(s1_l1), .c(s2_l3),
    .p(g_prod), .q(maj), .r(g_ac)
  );

  assign g_ab = s2_l2;
endmodule
