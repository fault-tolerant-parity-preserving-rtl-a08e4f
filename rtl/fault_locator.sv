// fault_locator: decodes the diagnosis lines of robust_majority_voter.
//
// The garbage lines a^b, b^c, (a^b)(a^c) and the fault check line of the robust voter
// identify which of the three voted copies disagrees with the other two:
//   a^b  b^c  (a^b)(a^c)  check   location
//    0    0       0         0     no fault          (inputs 000 or 111)
//    0    1       0         0     input c faulty    (001 or 110)
//    1    1       0         0     input b faulty    (010 or 101)
//    1    0       1         0     input a faulty    (011 or 100)
//    1    1       1         1     all input lines faulty
// The table rows follow the published fault location table. Every other pattern cannot
// come from a fault-free robust voter; this design reports it as FLOC_UNLISTED. Ordinary
// combinational logic (not reversible), no clock.
module fault_locator
  import ft_voter_pkg::*;
(
  input  logic       g_ab,         // a ^ b line
  input  logic       g_bc,         // b ^ c line
  input  logic       g_prod,       // (a ^ b)(a ^ c) line
  input  logic       fault_check,  // (a ^ b)(a ^ c)(b ^ c) line
  output fault_loc_e loc           // decoded location
);
  always_comb begin
    unique case ({g_ab, g_bc, g_prod, fault_check})
      4'b0000: loc = FLOC_NONE;
      4'b0100: loc = FLOC_C;
      4'b1100: loc = FLOC_B;
      4'b1010: loc = FLOC_A;
      4'b1111: loc = FLOC_ALL;
      default: loc = FLOC_UNLISTED;
    endcase
  end
endmodule
