// tb_booth_array: signed products against integer multiplication; 3-bit
// exhaustively (with the published example +0.01 x -0.11), 7-bit at random.
//
// Exhaustive signed 3-bit products, the published example, and random 7-bit
// products from a larger copy of the array.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_booth_array;
  int checks = 0, failures = 0;
  logic [2:0]  x3, y3;
  logic [4:0]  p3;
  logic [6:0]  x7, y7;
  logic [12:0] p7;

  booth_array dut3 (.x(x3), .y(y3), .prod(p3));
  booth_array #(.N(7)) dut7 (.x(x7), .y(y7), .prod(p7));

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
    for (int x = -4; x < 4; x++)
      for (int y = -4; y < 4; y++) begin
        if (x == -4 && y == -4) continue;
        x3 = 3'(x); y3 = 3'(y);
        #1;
        check($sformatf("%0d*%0d", x, y), int'($signed(p3)), x * y);
      end
    // published example: y = 0.01, x = 1.01 -> 1.1101
    y3 = 3'b001; x3 = 3'b101;
    #1;
    check("example", int'(p3), 5'b11101);
    for (int t = 0; t < 4000; t++) begin
      int x, y;
      x = int'($urandom_range(0, 127)) - 64;
      y = int'($urandom_range(0, 127)) - 64;
      if (x == -64 && y == -64) continue;
      x7 = 7'(x); y7 = 7'(y);
      #1;
      check("7-bit", int'($signed(p7)), x * y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
