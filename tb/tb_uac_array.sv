// tb_uac_array: the general array in both modes, against integer arithmetic.
// The 3 x 3 array (the published example size) is checked exhaustively, a
// 5-row by 4-bit array with random operands. Includes the published cases
// 101 x 111 and 011 / 100.
//
// Exhaustive 3x3 multiply-and-add and division, the published examples, and
// random cases of a 5x4 copy.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_uac_array;
  int checks = 0, failures = 0;

  logic       z3;
  logic [2:0] l3, m3, q3, r3;
  logic [4:0] k3;
  logic [5:0] y3;

  logic       z5;
  logic [4:0] l5, q5;
  logic [3:0] m5, r5;
  logic [7:0] k5;
  logic [8:0] y5;

  uac_array dut3 (.z(z3), .l(l3), .m(m3), .k(k3), .y(y3), .q(q3), .rem(r3));
  uac_array #(.NL(5), .NM(4)) dut5 (.z(z5), .l(l5), .m(m5), .k(k5), .y(y5), .q(q5), .rem(r5));

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
    // multiply: y = l*m + k, k of n bits
    z3 = 1'b0;
    for (int l = 0; l < 8; l++)
      for (int m = 0; m < 8; m++)
        for (int k = 0; k < 8; k++) begin
          l3 = 3'(l); m3 = 3'(m); k3 = 5'(k);
          #1;
          check($sformatf("mul %0d*%0d+%0d", l, m, k), int'(y3), l * m + k);
        end
    // published example: L = 101, M = 111
    l3 = 3'b101; m3 = 3'b111; k3 = '0;
    #1;
    check("example 5*7", int'(y3), 35);
    // divide: k / m for every dividend below m * 2^3
    z3 = 1'b1;
    for (int m = 1; m < 8; m++)
      for (int k = 0; k < m * 8 && k < 32; k++) begin
        m3 = 3'(m); k3 = 5'(k); l3 = '0;
        #1;
        check($sformatf("quo %0d/%0d", k, m), int'(q3), k / m);
        check($sformatf("rem %0d/%0d", k, m), int'(r3), k % m);
      end
    // published example 011 / 100 = 0.11: dividend on the top row (<< 2)
    m3 = 3'b100; k3 = 5'b01100;
    #1;
    check("example 3/4", int'(q3), 3'b011);
    // wider array, random operands
    for (int t = 0; t < 3000; t++) begin
      int l, m, k;
      l = int'($urandom_range(0, 31));
      m = int'($urandom_range(0, 15));
      k = int'($urandom_range(0, 511 - l * m));
      if (k > 255) k = 255;
      z5 = 1'b0; l5 = 5'(l); m5 = 4'(m); k5 = 8'(k);
      #1;
      check("mul5", int'(y5), l * m + k);
      if (m > 0) begin
        k = int'($urandom_range(0, 255)) % (m * 32);
        z5 = 1'b1; k5 = 8'(k);
        #1;
        check("quo5", int'(q5), k / m);
        check("rem5", int'(r5), k % m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
