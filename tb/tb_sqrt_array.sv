// tb_sqrt_array: integer square roots, 2-bit root (with the published 1001)
// and 6-bit root, both exhaustive.
//
// Exhaustive 4-bit radicands at the published size and all 12-bit radicands
// of a larger copy, compared with the integer square root.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_sqrt_array;
  int checks = 0, failures = 0;
  logic [3:0]  x2;
  logic [1:0]  r2;
  logic [11:0] x6;
  logic [5:0]  r6;

  sqrt_array dut2 (.x(x2), .root(r2));
  sqrt_array #(.N(6)) dut6 (.x(x6), .root(r6));

  function automatic int isqrt(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      x2 = 4'(v);
      #1;
      check($sformatf("sqrt %0d", v), int'(r2), isqrt(v));
    end
    for (int v = 0; v < 4096; v++) begin
      x6 = 12'(v);
      #1;
      check($sformatf("sqrt %0d", v), int'(r6), isqrt(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
