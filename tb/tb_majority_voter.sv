// tb_majority_voter: exhaustive self-checking test of majority_voter.
// With the constant line at 0, every input abc is compared with the voter's truth table
// {ab^bc^ca, a^b, a^c, (a^b)(a^c)}, held here as a literal table rather than recomputed
// from the same equations. Over all sixteen inputs (constant line included) it checks
// that input and output parity agree and that no two inputs share an output, i.e. that
// the voter is a parity-preserving reversible map. It also checks that a single wrong
// vote is always outvoted.
module tb_majority_voter;
  int checks = 0, failures = 0;
  logic a, b, c, k0, maj, g_ab, g_ac, g_prod;
  logic [15:0] seen;

  // Expected {maj, a^b, a^c, (a^b)(a^c)} for abc = 000 .. 111.
  localparam logic [3:0] TRUTH [8] = '{
    4'b0000, 4'b0010, 4'b0100, 4'b1111, 4'b0111, 4'b1100, 4'b1010, 4'b1000
  };

  majority_voter dut (.a(a), .b(b), .c(c), .k0(k0),
                      .maj(maj), .g_ab(g_ab), .g_ac(g_ac), .g_prod(g_prod));

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
    for (int v = 0; v < 16; v++) begin
      {a, b, c, k0} = 4'(v);
      #1;
      if (!k0) begin
        check({maj, g_ab, g_ac, g_prod} == TRUTH[v >> 1],
              $sformatf("abc=%b: got %b%b%b%b want %b", v[3:1], maj, g_ab, g_ac, g_prod,
                        TRUTH[v >> 1]));
        // one vote flipped away from a unanimous value is masked
        if (v[3:1] != 3'b000 && v[3:1] != 3'b111)
          check(maj == ((int'(a) + int'(b) + int'(c)) >= 2), $sformatf("mask abc=%b", v[3:1]));
      end
      check((a ^ b ^ c ^ k0) == (maj ^ g_ab ^ g_ac ^ g_prod),
            $sformatf("parity for abck0=%b", v[3:0]));
      check(!seen[{maj, g_ab, g_ac, g_prod}], $sformatf("output repeats for abck0=%b", v[3:0]));
      seen[{maj, g_ab, g_ac, g_prod}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
