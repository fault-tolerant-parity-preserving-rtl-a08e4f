// robust_majority_voter: majority voter with fault diagnosis lines.
//
// The four lines of majority_voter are followed by two more reversible gates and one
// more constant line k1 (0 in normal use):
//   4. Feynman, control a^b, target a^c:          line 3 becomes b^c
//   5. Toffoli, controls b^c and (a^b)(a^c), target k1:
//                                                 line 5 = (a^b)(a^c)(b^c)
// The outputs are the final value ab^bc^ca, the garbage a^b, b^c, (a^b)(a^c) and the
// fault check line. At most one of the three votes can disagree with the other two,
// so a^b, a^c and b^c are never all 1 and the fault check is 0 for every input; a 1 on
// it flags a fault inside the voter's lines. The garbage pattern names the odd input
// out (see fault_locator).
//
// The two added gates, the extra constant line and the output functions follow the
// published robust voter; which line each added gate acts on is this design's reading
// of the drawing, chosen so that the printed output functions result. Unlike the base
// voter, the Feynman gate added here does not preserve parity, so parity testing is done
// on majority_voter. Purely combinational: five gate levels, no clock.
module robust_majority_voter (
  input  logic a,            // vote from module 1
  input  logic b,            // vote from module 2
  input  logic c,            // vote from module 3
  input  logic k0,           // constant line of the voter, tie to 0
  input  logic k1,           // constant line of the fault check, tie to 0
  output logic final_value,  // ab ^ bc ^ ca
  output logic g_ab,         // garbage a ^ b
  output logic g_bc,         // garbage b ^ c
  output logic g_prod,       // garbage (a ^ b)(a ^ c)
  output logic fault_check   // (a ^ b)(a ^ c)(b ^ c)
);
  logic v_ab, v_ac, v_prod;  // garbage lines of the inner voter
  logic l2_after_fg;         // line 2 after the Feynman gate
  logic l3_after_fg;         // line 3 after the Feynman gate (b ^ c)

  majority_voter u_voter (
    .a(a), .b(b), .c(c), .k0(k0),
    .maj(final_value), .g_ab(v_ab), .g_ac(v_ac), .g_prod(v_prod)
  );

  feynman_gate u_fg (
    .a(v_ab), .b(v_ac),
    .p(l2_after_fg), .q(l3_after_fg)
  );

  toffoli_gate u_tg (
    .a(l3_after_fg), .b(v_prod), .c(k1),
    .p(g_bc), .q(g_prod), .r(fault_check)
  );

  assign g_ab = l2_after_fg;
endmodule
