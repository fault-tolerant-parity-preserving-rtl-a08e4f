// tb_pp_full_adder: exhaustive self-checking test of pp_full_adder.
// With both constant lines at 0, checks Sum and Cout against integer addition A+B+Cin
// and the garbage lines against G1 = A^Cout, G2 = B, G3 = A^B. Over all 32 inputs
// (constant lines included) checks that parity is preserved and that no two inputs share
// an output, i.e. that the adder is a parity-preserving reversible map.
module tb_pp_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, k0, k1, sum, cout, g1, g2, g3;
  logic [31:0] seen;

  pp_full_adder dut (.a(a), .b(b), .cin(cin), .k0(k0), .k1(k1),
                     .sum(sum), .cout(cout), .g1(g1), .g2(g2), .g3(g3));

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
    int total;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, cin, k0, k1} = 5'(v);
      #1;
      if (!k0 && !k1) begin
        total = int'(a) + int'(b) + int'(cin);
        check(sum == total[0], $sformatf("Sum for %b%b%b", a, b, cin));
        check(cout == total[1], $sformatf("Cout for %b%b%b", a, b, cin));
        check(g1 == (a != total[1]), $sformatf("G1 for %b%b%b", a, b, cin));
        check(g2 == b, $sformatf("G2 for %b%b%b", a, b, cin));
        check(g3 == (a != b), $sformatf("G3 for %b%b%b", a, b, cin));
      end
      check((a ^ b ^ cin ^ k0 ^ k1) == (sum ^ cout ^ g1 ^ g2 ^ g3),
            $sformatf("parity for %b", v[4:0]));
      check(!seen[{sum, cout, g1, g2, g3}], $sformatf("output repeats for %b", v[4:0]));
      seen[{sum, cout, g1, g2, g3}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
