// tb_fault_locator: exhaustive self-checking test of fault_locator.
// All sixteen patterns of the four diagnosis lines are applied; the five patterns of the
// fault location table must decode to their rows and every other pattern to
// FLOC_UNLISTED.
module tb_fault_locator;
  import ft_voter_pkg::*;
  int checks = 0, failures = 0;
  logic g_ab, g_bc, g_prod, fchk;
  fault_loc_e loc, want;

  fault_locator dut (.g_ab(g_ab), .g_bc(g_bc), .g_prod(g_prod), .fault_check(fchk), .loc(loc));

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
    for (int v = 0; v < 16; v++) begin
      {g_ab, g_bc, g_prod, fchk} = 4'(v);
      case (v)
        'b0000:  want = FLOC_NONE;
        'b0100:  want = FLOC_C;
        'b1100:  want = FLOC_B;
        'b1010:  want = FLOC_A;
        'b1111:  want = FLOC_ALL;
        default: want = FLOC_UNLISTED;
      endcase
      #1;
      check(loc == want, $sformatf("lines %b: got %0d want %0d", v[3:0], loc, want));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
