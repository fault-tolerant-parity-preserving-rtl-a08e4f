// tb_ft_full_adder_tmr: end-to-end self-checking test of ft_full_adder_tmr at its
// default (and only) configuration.
//
// For every operand triple A, B, Cin it first feeds the same operands to all three
// adder copies (no fault), then makes each copy in turn faulty by giving it every one of
// the seven other operand triples while the other two copies keep the correct ones.
// Expected values come from integer addition: the final Sum and Cout must always equal
// A+B+Cin of the correct operands (fault masking); the voters' parity checks must stay
// quiet; the fault check lines must stay 0; and for each output bit the fault location
// must name the faulty copy (a = copy 0, b = copy 1, c = copy 2) exactly when that copy's
// bit differs, and "no fault" otherwise. The voter garbage is checked too.
//
// Mechanisms counted, each of which must occur: a masked Sum fault, a masked Cout fault,
// and every fault location (none, a, b, c). A parity error and a raised fault check can
// only come from a defect inside a voter, which fault-free RTL cannot produce, so they
// are checked to stay 0 rather than counted.
module tb_ft_full_adder_tmr;
  import ft_voter_pkg::*;
  int checks = 0, failures = 0;
  int n_mask_sum = 0, n_mask_cout = 0;
  int n_loc [4];  // 0 none, 1 copy a, 2 copy b, 3 copy c

  logic [2:0]      a, b, cin;
  logic            final_sum, final_cout;
  vote_status_t    vote [2];
  logic [2:0][2:0] fa_garbage;

  ft_full_adder_tmr dut (.a(a), .b(b), .cin(cin), .final_sum(final_sum),
                         .final_cout(final_cout), .vote(vote), .fa_garbage(fa_garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply operand triple good to all copies except copy bad (bad = 3: none), which gets
  // triple wrong, and check every output.
  task automatic run_case(input logic [2:0] good, input int bad, input logic [2:0] wrong);
    int gsum, wsum;
    logic [1:0] good_bits, wrong_bits;
    logic [2:0] votes;
    fault_loc_e want;
    for (int i = 0; i < 3; i++) begin
      {a[i], b[i], cin[i]} = (i == bad) ? wrong : good;
    end
    #1;
    gsum = int'(good[2]) + int'(good[1]) + int'(good[0]);
    wsum = int'(wrong[2]) + int'(wrong[1]) + int'(wrong[0]);
    good_bits = 2'(gsum);
    wrong_bits = (bad < 3) ? 2'(wsum) : good_bits;
    check(final_sum == good_bits[0], $sformatf("Final Sum good=%b bad=%0d wrong=%b", good, bad, wrong));
    check(final_cout == good_bits[1], $sformatf("Final Cout good=%b bad=%0d wrong=%b", good, bad, wrong));
    if (wrong_bits[0] != good_bits[0]) n_mask_sum++;
    if (wrong_bits[1] != good_bits[1]) n_mask_cout++;
    for (int n = 0; n < 2; n++) begin
      for (int i = 0; i < 3; i++) votes[i] = (i == bad) ? wrong_bits[n] : good_bits[n];
      check(vote[n].final_value == good_bits[n], $sformatf("bit %0d final", n));
      check(vote[n].diag_final == good_bits[n], $sformatf("bit %0d robust final", n));
      check(vote[n].parity_err == 1'b0, $sformatf("bit %0d parity error", n));
      check(vote[n].fault_check == 1'b0, $sformatf("bit %0d fault check", n));
      // garbage {(a^b)(a^c), a^c, a^b} and {(a^b)(a^c), b^c, a^b}
      check(vote[n].garbage == {(votes[0] != votes[1]) && (votes[0] != votes[2]),
                                votes[0] != votes[2], votes[0] != votes[1]},
            $sformatf("bit %0d voter garbage", n));
      check(vote[n].diag_garbage == {(votes[0] != votes[1]) && (votes[0] != votes[2]),
                                     votes[1] != votes[2], votes[0] != votes[1]},
            $sformatf("bit %0d robust garbage", n));
      if (bad < 3 && wrong_bits[n] != good_bits[n]) begin
        want = (bad == 0) ? FLOC_A : (bad == 1) ? FLOC_B : FLOC_C;
        n_loc[bad + 1]++;
      end else begin
        want = FLOC_NONE;
        n_loc[0]++;
      end
      check(vote[n].fault_loc == want,
            $sformatf("bit %0d location: got %0d want %0d (good=%b bad=%0d wrong=%b)",
                      n, vote[n].fault_loc, want, good, bad, wrong));
    end
    // garbage of a copy fed the correct operands: {G3, G2, G1} = {A^B, B, A^Cout}
    for (int i = 0; i < 3; i++) begin
      if (i != bad)
        check(fa_garbage[i] == {good[2] ^ good[1], good[1], good[2] ^ good_bits[1]},
              $sformatf("copy %0d garbage", i));
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_loc[k]) n_loc[k] = 0;
    for (int g = 0; g < 8; g++) begin
      run_case(3'(g), 3, 3'(g));
      for (int bad = 0; bad < 3; bad++)
        for (int w = 0; w < 8; w++)
          if (w != g) run_case(3'(g), bad, 3'(w));
    end
    $display("masked Sum faults %0d, masked Cout faults %0d", n_mask_sum, n_mask_cout);
    $display("locations: none %0d, a %0d, b %0d, c %0d", n_loc[0], n_loc[1], n_loc[2], n_loc[3]);
    checks++; if (n_mask_sum == 0)  begin failures++; $display("FAIL: no masked Sum fault"); end
    checks++; if (n_mask_cout == 0) begin failures++; $display("FAIL: no masked Cout fault"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_loc[k] == 0) begin failures++; $display("FAIL: location %0d never reported", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
