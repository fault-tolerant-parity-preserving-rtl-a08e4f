// feynman_double_gate: the 3x3 reversible Feynman double gate (F2G),
// P = A, Q = A xor B, R = A xor C.
//
// One control line is XORed into two target lines. Because both targets flip together
// the gate preserves parity (P ^ Q ^ R = A ^ B ^ C). Purely combinational. The gate's
// equations are the usual ones from the literature; the majority voter uses two of them.
module feynman_double_gate (
  input  logic a,  // control line
  input  logic b,  // first target
  input  logic c,  // second target
  output logic p,  // A
  output logic q,  // A xor B
  output logic r   // A xor C
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
