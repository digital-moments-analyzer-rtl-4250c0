// tb_prob_comparator: exhaustive check of the above-level and interval gate.
//
// Applies every level, reference, sign and mode combination and checks the
// hit output against the A >= R (or A == R) rule.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_prob_comparator;
  int checks = 0, failures = 0;
  logic [3:0] a, ref_lvl;
  logic neg, sel_neg, interval, hit;

  prob_comparator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      logic exp;
      {a, ref_lvl, neg, sel_neg, interval} = 11'(i);
      #1;
      if (neg != sel_neg)      exp = 1'b0;
      else if (interval)       exp = (int'(a) == int'(ref_lvl));
      else                     exp = (int'(a) >= int'(ref_lvl));
      checks++;
      if (hit !== exp) begin
        failures++;
        $display("FAIL a=%0d R=%0d neg=%0b sel=%0b int=%0b got %0b", a, ref_lvl, neg, sel_neg, interval, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
