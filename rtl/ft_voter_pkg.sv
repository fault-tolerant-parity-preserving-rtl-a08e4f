// ft_voter_pkg: types shared by the fault-tolerant voting logic.
//
// fault_loc_e encodes the diagnosis read from the garbage and fault check lines of the
// robust majority voter. The first five values are the rows of the fault location table
// (no fault, input c, b or a faulty, all input lines faulty); FLOC_UNLISTED is this
// design's own addition for the line patterns that table does not list, which a
// fault-free voter never produces. vote_status_t bundles everything the TMR top brings
// out for one voted bit.
package ft_voter_pkg;

  typedef enum logic [2:0] {
    FLOC_NONE     = 3'd0,  // all garbage lines 0
    FLOC_C        = 3'd1,  // input c disagrees with a and b
    FLOC_B        = 3'd2,  // input b disagrees with a and c
    FLOC_A        = 3'd3,  // input a disagrees with b and c
    FLOC_ALL      = 3'd4,  // fault check line is 1: all input lines faulty
    FLOC_UNLISTED = 3'd5   // a pattern the location table has no row for
  } fault_loc_e;

  // Status of one voted output bit of the TMR design.
  typedef struct packed {
    logic       final_value;   // majority of the three copies (Figure 2 voter)
    logic [2:0] garbage;       // {(a^b)(a^c), a^c, a^b} of that voter
    logic       parity_err;    // input parity of the voter differs from its output parity
    logic       diag_final;    // final value of the robust voter
    logic [2:0] diag_garbage;  // {(a^b)(a^c), b^c, a^b} of the robust voter
    logic       fault_check;   // (a^b)(a^c)(b^c) of the robust voter
    fault_loc_e fault_loc;     // decoded fault location
  } vote_status_t;

endpackage
