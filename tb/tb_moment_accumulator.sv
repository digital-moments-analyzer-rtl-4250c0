// tb_moment_accumulator: random weighting numbers added to an 8-bit and a
// 24-bit accumulator; the number of overflows must equal floor(total / 2^M)
// and the register must hold total mod 2^M. Also checks, every cycle, that
// ovf is high exactly when add is high and the sum reaches 2^M.
//
// Adds random weighting numbers and checks every carry and the remainder
// against an integer model, and that clear empties the register.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_moment_accumulator;
  int checks = 0, failures = 0;
  logic clk = 0, clr;
  logic add;
  logic [7:0]  w8;
  logic [23:0] w24;
  logic ovf8, ovf24;
  logic [7:0]  rem8;
  logic [23:0] rem24;
  longint tot8, tot24, n8, n24;

  moment_accumulator #(.M(8))  d8  (.clk, .clr, .add, .w(w8),  .ovf(ovf8),  .rem(rem8));
  moment_accumulator           d24 (.clk, .clr, .add, .w(w24), .ovf(ovf24), .rem(rem24));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tot8 = 0; tot24 = 0; n8 = 0; n24 = 0;
    clr = 1; add = 0; w8 = 0; w24 = 0;
    repeat (2) @(negedge clk);
    clr = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      add = ($urandom_range(0, 3) != 0);
      w8  = 8'($urandom);
      w24 = 24'($urandom);
      if (add) begin
        tot8  += w8;
        tot24 += w24;
      end
      // every cycle, once the inputs have settled: the carry is exactly
      // "add and the sum reaches 2^M"
      #1;
      check("carry 8", ovf8, longint'(add && (int'(rem8) + int'(w8) >= 256)));
      check("carry 24", ovf24, longint'(add && (longint'(rem24) + longint'(w24) >= (64'd1 << 24))));
      if (ovf8)  n8++;
      if (ovf24) n24++;
    end
    @(negedge clk);
    add = 0;
    @(negedge clk);
    check("overflows 8", n8, tot8 >> 8);
    check("remainder 8", rem8, tot8 % 256);
    check("overflows 24", n24, tot24 >> 24);
    check("remainder 24", rem24, tot24 % (1 << 24));
    clr = 1;
    @(negedge clk);
    check("clear", rem24, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
