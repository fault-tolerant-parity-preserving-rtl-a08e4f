// tb_robust_majority_voter: exhaustive self-checking test of robust_majority_voter.
// With both constant lines at 0, every input abc is compared with a literal table of
// {final value, a^b, b^c, (a^b)(a^c), fault check}; the fault check must be 0 for every
// input. Over all 32 inputs (constant lines included) it checks that no two inputs share
// an output, i.e. that the circuit stays reversible.
module tb_robust_majority_voter;
  int checks = 0, failures = 0;
  logic a, b, c, k0, k1;
  logic fv, g_ab, g_bc, g_prod, fchk;
  logic [31:0] seen;

  // Expected {final, a^b, b^c, (a^b)(a^c), fault check} for abc = 000 .. 111.
  localparam logic [4:0] TRUTH [8] = '{
    5'b00000, 5'b00100, 5'b01100, 5'b11010, 5'b01010, 5'b11100, 5'b10100, 5'b10000
  };

  robust_majority_voter dut (.a(a), .b(b), .c(c), .k0(k0), .k1(k1),
                             .final_value(fv), .g_ab(g_ab), .g_bc(g_bc),
                             .g_prod(g_prod), .fault_check(fchk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, k0, k1} = 5'(v);
      #1;
      if (!k0 && !k1) begin
        check({fv, g_ab, g_bc, g_prod, fchk} == TRUTH[v >> 2],
              $sformatf("abc=%b: got %b%b%b%b%b want %b", v[4:2], fv, g_ab, g_bc, g_prod,
                        fchk, TRUTH[v >> 2]));
        check(fchk == 1'b0, $sformatf("fault check raised for abc=%b", v[4:2]));
      end
      check(!seen[{fv, g_ab, g_bc, g_prod, fchk}], $sformatf("output repeats for %b", v[4:0]));
      seen[{fv, g_ab, g_bc, g_prod, fchk}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
