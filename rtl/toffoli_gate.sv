// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled NOT) gate,
// P = A, Q = B, R = AB xor C.
//
// The target line C is inverted when both control lines are 1. Purely combinational. The
// robust majority voter uses it to form its fault check line.
module toffoli_gate (
  input  logic a,  // control line 1
  input  logic b,  // control line 2
  input  logic c,  // target line
  output logic p,  // A
  output logic q,  // B
  output logic r   // AB xor C
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
