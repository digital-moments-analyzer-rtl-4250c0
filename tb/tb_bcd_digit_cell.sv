// tb_bcd_digit_cell: all 10^4 digit combinations against integer div and mod.
//
// Applies every digit combination A, D, B, C (10^4 cases) and compares P and
// Q with integer arithmetic.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_bcd_digit_cell;
  int checks = 0, failures = 0;
  logic [3:0] a, d, b, c, p, q, f, g;

  bcd_digit_cell dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10000; i++) begin
      int v;
      a = 4'(i % 10); d = 4'((i / 10) % 10); b = 4'((i / 100) % 10); c = 4'(i / 1000);
      #1;
      v = int'(a) * int'(d) + int'(b) + int'(c);
      checks++;
      if (int'(p) != v % 10 || int'(q) != v / 10 || f != d || g != a) begin
        failures++;
        $display("FAIL %0d*%0d+%0d+%0d -> q=%0d p=%0d", a, d, b, c, q, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
