// feynman_gate: the 2x2 reversible Feynman (controlled NOT) gate, P = A, Q = A xor B.
//
// Purely combinational, one gate level. The function is the standard one the reversible
// logic literature gives for this gate; it is used here by the robust majority voter.
module feynman_gate (
  input  logic a,  // control line
  input  logic b,  // target line
  output logic p,  // A
  output logic q   // A xor B
);
  assign p = a;
  assign q = a ^ b;
endmodule
