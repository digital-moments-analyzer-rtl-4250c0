// tb_uac: exhaustive check of the universal arithmetic cell against binary
// addition and subtraction worked out with integers.
//
// Applies all 32 input combinations and checks the five outputs against the
// cell equations.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_uac;
  int checks = 0, failures = 0;
  logic a, b, c, d, f, s, p, u, v, g;

  uac dut (.*);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b d=%0b f=%0b got %0b exp %0b", what, a, b, c, d, f, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int sum, diff;
      {a, b, c, d, f} = 5'(i);
      #1;
      sum  = int'(a) + int'(b) + int'(c);
      diff = int'(a) - int'(b) - int'(c);
      if (d) check("s", s, f ? diff[0] : sum[0]);
      else   check("s pass", s, a);
      // carry-out / borrow-out does not depend on D
      check("p", p, f ? (diff < 0) : (sum > 1));
      check("u", u, d);
      check("v", v, b);
      check("g", g, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
