// tmr_voter_bank: bit-wise TMR voting stage for a module with WIDTH output lines.
//
// Triple modular redundancy votes each output line of the three module copies
// separately, so this bank holds one voting channel per line. Each channel has the
// parity-preserving reversible majority_voter, whose output is the voted line, a
// parity_checker on that voter's four input and four output lines, and a
// robust_majority_voter with a fault_locator on the same three votes for diagnosis. A
// circuit with n output lines made fault tolerant this way needs n voters, which is how
// the published cost figures for triplicated benchmark circuits add up.
//
// One voter per output line follows the published method. Pairing every voter with a
// parity checker and a robust voter beside it (not in place of it) is this design's
// choice: the voted value stays on a parity-testable voter while the robust voter adds
// fault location. All constant lines are tied to 0.
//
// Ports: mod_out[i] is the WIDTH-bit output of copy i (copy 0, 1, 2 = vote a, b, c).
// voted is the bit-wise majority; status[n] gives, for line n, the voter garbage, parity
// error, robust voter outputs and fault location (ft_voter_pkg::vote_status_t).
// Purely combinational, no clock.
module tmr_voter_bank
  import ft_voter_pkg::*;
#(
  parameter int unsigned WIDTH = 2  // output lines per module copy
) (
  input  logic [WIDTH-1:0] mod_out [3],     // outputs of module copies 0, 1, 2
  output logic [WIDTH-1:0] voted,           // bit-wise majority
  output vote_status_t     status [WIDTH]   // per-line test and diagnosis
);
  for (genvar n = 0; n < WIDTH; n++) begin : g_line
    logic       maj, g_ab, g_ac, g_prod;
    logic       r_final, r_ab, r_bc, r_prod, r_check;
    fault_loc_e loc;
    logic       perr;

    majority_voter u_voter (
      .a     (mod_out[0][n]),
      .b     (mod_out[1][n]),
      .c     (mod_out[2][n]),
      .k0    (1'b0),
      .maj   (maj),
      .g_ab  (g_ab),
      .g_ac  (g_ac),
      .g_prod(g_prod)
    );

    parity_checker #(.N_IN(4), .N_OUT(4)) u_parity (
      .lines_in  ({mod_out[0][n], mod_out[1][n], mod_out[2][n], 1'b0}),
      .lines_out ({maj, g_ab, g_ac, g_prod}),
      .parity_err(perr)
    );

    robust_majority_voter u_robust (
      .a          (mod_out[0][n]),
      .b          (mod_out[1][n]),
      .c          (mod_out[2][n]),
      .k0         (1'b0),
      .k1         (1'b0),
      .final_value(r_final),
      .g_ab       (r_ab),
      .g_bc       (r_bc),
      .g_prod     (r_prod),
      .fault_check(r_check)
    );

    fault_locator u_loc (
      .g_ab       (r_ab),
      .g_bc       (r_bc),
      .g_prod     (r_prod),
      .fault_check(r_check),
      .loc        (loc)
    );

    assign voted[n] = maj;

    always_comb begin
      status[n].final_value  = maj;
      status[n].garbage      = {g_prod, g_ac, g_ab};
      status[n].parity_err   = perr;
      status[n].diag_final   = r_final;
      status[n].diag_garbage = {r_prod, r_bc, r_ab};
      status[n].fault_check  = r_check;
      status[n].fault_loc    = loc;
    end
  end
endmodule
