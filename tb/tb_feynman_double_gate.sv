// tb_feynman_double_gate: exhaustive self-checking test of feynman_double_gate.
// For all eight inputs checks P = A, Q = A xor B, R = A xor C, that the gate preserves
// parity, and that no two inputs give the same output (reversibility).
module tb_feynman_double_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  logic [7:0] seen;

  feynman_double_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, $sformatf("P for %b", v[2:0]));
      check(q == (a ? !b : b), $sformatf("Q for %b", v[2:0]));
      check(r == (a ? !c : c), $sformatf("R for %b", v[2:0]));
      check(((p + q + r) % 2) == ((a + b + c) % 2), $sformatf("parity for %b", v[2:0]));
      check(!seen[{p, q, r}], $sformatf("output %b%b%b repeats", p, q, r));
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
