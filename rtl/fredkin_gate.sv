// fredkin_gate: the 3x3 reversible Fredkin (controlled swap) gate,
// P = A, Q = A'B + AC, R = AB + A'C.
//
// When the control A is 1 the two data lines B and C trade places, otherwise they pass
// straight through. It only moves values between lines, so it preserves parity and the
// number of ones. Purely combinational.
module fredkin_gate (
  input  logic a,  // control line
  input  logic b,  // data line 1
  input  logic c,  // data line 2
  output logic p,  // A
  output logic q,  // B when A = 0, C when A = 1
  output logic r   // C when A = 0, B when A = 1
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (a & b) | (~a & c);
endmodule
