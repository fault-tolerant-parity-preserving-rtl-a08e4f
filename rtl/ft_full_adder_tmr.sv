// ft_full_adder_tmr: fault-tolerant full adder by triple modular redundancy.
//
// Three copies of the parity-preserving reversible full adder (pp_full_adder) each get
// their own A, B, Cin inputs, as in a TMR system where every module has its own input
// path. Their Sum outputs go to one reversible majority voter and their Cout outputs to
// another; the voters' outputs are the Final Sum and Final Cout, which stay correct
// while any one copy is wrong. This is the published TMR full adder.
//
// The two voters are the two lines of a tmr_voter_bank, which also places beside each
// voter the test and diagnosis logic that goes with it:
//   * a parity_checker comparing the voter's input lines (three votes and its constant
//     0) with its four output lines; parity_err = 1 means the voter itself is faulty;
//   * a robust_majority_voter on the same three votes, whose garbage and fault check
//     lines a fault_locator turns into the location of the disagreeing copy.
// That pairing is this design's choice (see tmr_voter_bank). All constant lines are
// tied to 0 here.
//
// Ports: a, b, cin carry bit i to copy i. vote[0] is the status of the Sum bit and
// vote[1] of the Cout bit (see ft_voter_pkg::vote_status_t); final_sum and final_cout
// repeat vote[0].final_value and vote[1].final_value. fa_garbage[i] = {G3, G2, G1} of
// copy i. Purely combinational: the longest path is five adder gate levels plus five
// robust voter gate levels plus the locator; there is no clock.
module ft_full_adder_tmr
  import ft_voter_pkg::*;
(
  input  logic [2:0]       a,           // operand A of copy i
  input  logic [2:0]       b,           // operand B of copy i
  input  logic [2:0]       cin,         // carry in of copy i
  output logic             final_sum,   // voted Sum
  output logic             final_cout,  // voted Cout
  output vote_status_t     vote [2],    // [0] Sum bit, [1] Cout bit
  output logic [2:0][2:0]  fa_garbage   // {G3, G2, G1} of each copy
);
  logic [1:0] mod_out [3];  // {Cout, Sum} of copy i
  logic [1:0] voted;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    pp_full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (cin[i]),
      .k0  (1'b0),
      .k1  (1'b0),
      .sum (mod_out[i][0]),
      .cout(mod_out[i][1]),
      .g1  (fa_garbage[i][0]),
      .g2  (fa_garbage[i][1]),
      .g3  (fa_garbage[i][2])
    );
  end

  tmr_voter_bank #(.WIDTH(2)) u_bank (
    .mod_out(mod_out),
    .voted  (voted),
    .status (vote)
  );

  assign final_sum  = voted[0];
  assign final_cout = voted[1];
endmodule
