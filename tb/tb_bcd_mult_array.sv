// tb_bcd_mult_array: 3-digit decimal X*Y+K1+K2 against integer arithmetic,
// including the published 999 x 999 + 999 + 999, plus random operands.
//
// Random three-digit X, Y, K1, K2 and the published 999*999+999+999 case,
// compared with integer arithmetic. Combinational; a short delay per case.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_bcd_mult_array;
  int checks = 0, failures = 0;
  logic [2:0][3:0] x, y, k1, k2;
  logic [5:0][3:0] prod;

  bcd_mult_array dut (.*);

  function automatic logic [2:0][3:0] to_bcd3(int v);
    logic [2:0][3:0] r;
    for (int i = 0; i < 3; i++) begin
      r[i] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic int from_bcd6(logic [5:0][3:0] v);
    int r = 0;
    for (int i = 5; i >= 0; i--) r = r * 10 + int'(v[i]);
    return r;
  endfunction

  task automatic run(int xv, int yv, int a1, int a2);
    x = to_bcd3(xv); y = to_bcd3(yv); k1 = to_bcd3(a1); k2 = to_bcd3(a2);
    #1;
    checks++;
    if (from_bcd6(prod) != xv * yv + a1 + a2) begin
      failures++;
      $display("FAIL %0d*%0d+%0d+%0d got %0d", xv, yv, a1, a2, from_bcd6(prod));
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
    run(999, 999, 999, 999);
    run(0, 0, 0, 0);
    run(123, 456, 0, 0);
    for (int t = 0; t < 3000; t++)
      run(int'($urandom_range(0, 999)), int'($urandom_range(0, 999)),
          int'($urandom_range(0, 999)), int'($urandom_range(0, 999)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
