// parity_checker: tests a parity-preserving reversible block.
//
// A parity-preserving block keeps the XOR of all its lines unchanged from input to
// output. This checker XORs the block's input lines (constants included) and its output
// lines and raises parity_err when the two differ, which can only happen if the block
// is faulty. A single such fault that flips an odd number of lines is always caught.
// The comparison itself follows the published test method; the widths default to the
// four lines of the majority voter. Combinational, no clock.
module parity_checker #(
  parameter int unsigned N_IN  = 4,  // number of input lines of the checked block
  parameter int unsigned N_OUT = 4   // number of output lines of the checked block
) (
  input  logic [N_IN-1:0]  lines_in,   // input lines of the checked block
  input  logic [N_OUT-1:0] lines_out,  // output lines of the checked block
  output logic             parity_err  // 1 when input and output parity differ
);
  assign parity_err = (^lines_in) ^ (^lines_out);
endmodule
