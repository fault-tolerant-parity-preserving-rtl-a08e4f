// tb_feynman_gate: exhaustive self-checking test of feynman_gate.
// Applies all four input pairs, checks P = A and Q = A xor B against values computed in
// the testbench, and checks that the four outputs are distinct (the gate is reversible).
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

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
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(p == a, $sformatf("P for %b", v[1:0]));
      check(q == (a != b), $sformatf("Q for %b", v[1:0]));
      check(!seen[{p, q}], $sformatf("output %b%b repeats", p, q));
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
