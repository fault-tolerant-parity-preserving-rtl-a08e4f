// tb_fredkin_gate: exhaustive self-checking test of fredkin_gate.
// For all eight inputs checks that P = A and that B and C are swapped exactly when
// A = 1, that the number of ones is kept (hence parity), and reversibility.
module tb_fredkin_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    logic eq, er;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      if (a) begin eq = c; er = b; end
      else   begin eq = b; er = c; end
      check(p == a, $sformatf("P for %b", v[2:0]));
      check(q == eq, $sformatf("Q for %b", v[2:0]));
      check(r == er, $sformatf("R for %b", v[2:0]));
      check(int'(p) + int'(q) + int'(r) == int'(a) + int'(b) + int'(c),
            $sformatf("ones count for %b", v[2:0]));
      check(!seen[{p, q, r}], $sformatf("output %b%b%b repeats", p, q, r));
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
