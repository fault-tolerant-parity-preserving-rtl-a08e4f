// tb_parity_checker: self-checking test of parity_checker at its default widths (four
// input and four output lines). Every combination of the eight lines is applied and the
// error flag compared with a parity counted bit by bit in the testbench.
module tb_parity_checker;
  int checks = 0, failures = 0;
  logic [3:0] lin, lout;
  logic perr;

  parity_checker dut (.lines_in(lin), .lines_out(lout), .parity_err(perr));

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
    int ones_in, ones_out;
    for (int v = 0; v < 256; v++) begin
      {lin, lout} = 8'(v);
      ones_in = 0;
      ones_out = 0;
      for (int i = 0; i < 4; i++) begin
        ones_in += int'(lin[i]);
        ones_out += int'(lout[i]);
      end
      #1;
      check(perr == ((ones_in % 2) != (ones_out % 2)),
            $sformatf("in=%b out=%b err=%b", lin, lout, perr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
