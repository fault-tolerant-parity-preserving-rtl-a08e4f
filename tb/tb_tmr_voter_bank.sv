// tb_tmr_voter_bank: self-checking test of tmr_voter_bank at its default width (2) and
// at a wider width (9 lines).
//
// Each trial draws a random correct output word, gives it to all three copies, then
// makes one randomly chosen copy wrong on a random non-zero set of lines. Expected values
// are worked out in the testbench: the voted word must equal the correct word, parity
// errors and fault check lines must stay 0, and every line must report the wrong copy
// (a, b or c) where that copy differs and "no fault" elsewhere. All eight vote patterns
// of the default-width bank are also applied to both lines directly. Fault masking and
// every location must occur at least once.
module tb_tmr_voter_bank;
  import ft_voter_pkg::*;
  localparam int unsigned WIDE = 9;

  int checks = 0, failures = 0;
  int n_masked = 0;
  int n_loc [4];  // none, a, b, c

  logic [1:0]      m2 [3];
  logic [1:0]      v2;
  vote_status_t    s2 [2];
  logic [WIDE-1:0] mw [3];
  logic [WIDE-1:0] vw;
  vote_status_t    sw [WIDE];

  tmr_voter_bank dut2 (.mod_out(m2), .voted(v2), .status(s2));
  tmr_voter_bank #(.WIDTH(WIDE)) dutw (.mod_out(mw), .voted(vw), .status(sw));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fault_loc_e want_loc(input int bad, input bit differs);
    if (!differs) return FLOC_NONE;
    return (bad == 0) ? FLOC_A : (bad == 1) ? FLOC_B : FLOC_C;
  endfunction

  task automatic check_line(input vote_status_t st, input logic good, input int bad,
                            input bit differs, input string tag);
    check(st.final_value == good, {tag, " final"});
    check(st.diag_final == good, {tag, " robust final"});
    check(st.parity_err == 1'b0, {tag, " parity error"});
    check(st.fault_check == 1'b0, {tag, " fault check"});
    check(st.fault_loc == want_loc(bad, differs),
          $sformatf("%s location got %0d want %0d", tag, st.fault_loc, want_loc(bad, differs)));
    if (differs) n_loc[bad + 1]++; else n_loc[0]++;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDE-1:0] good, mask;
    int bad;
    foreach (n_loc[k]) n_loc[k] = 0;

    // Every vote pattern on both lines of the default bank.
    for (int v = 0; v < 8; v++) begin
      for (int i = 0; i < 3; i++) m2[i] = {2{v[2 - i]}};
      #1;
      for (int n = 0; n < 2; n++) begin
        int ones;
        ones = int'(v[0]) + int'(v[1]) + int'(v[2]);
        check(v2[n] == (ones >= 2), $sformatf("default bank votes %b line %0d", v[2:0], n));
        check(s2[n].garbage == {(v[2] != v[1]) && (v[2] != v[0]), v[2] != v[0], v[2] != v[1]},
              $sformatf("default bank garbage %b", v[2:0]));
      end
    end

    // Random single-copy faults on the wide bank.
    for (int t = 0; t < 300; t++) begin
      good = WIDE'($urandom);
      mask = WIDE'($urandom);
      if (mask == '0) mask = WIDE'(1);
      bad = int'($urandom_range(0, 2));
      for (int i = 0; i < 3; i++) mw[i] = (i == bad) ? (good ^ mask) : good;
      #1;
      check(vw == good, $sformatf("wide voted %h want %h (bad copy %0d mask %h)", vw, good, bad, mask));
      if (vw == good) n_masked++;
      for (int n = 0; n < int'(WIDE); n++)
        check_line(sw[n], good[n], bad, mask[n], $sformatf("wide line %0d", n));
    end

    $display("masked faults %0d; locations none %0d a %0d b %0d c %0d",
             n_masked, n_loc[0], n_loc[1], n_loc[2], n_loc[3]);
    checks++; if (n_masked == 0) begin failures++; $display("FAIL: no masked fault"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_loc[k] == 0) begin failures++; $display("FAIL: location %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
