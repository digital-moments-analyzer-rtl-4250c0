// tb_bcd_counter: random up/down pulses on a sign-and-magnitude UP/DOWN
// counter against an integer; an UP counter counted to 10^4 checks the
// decade outputs at 10^3 and 10^4 and that down pulses are ignored.
//
// Drives the counter with random up/down pulses and compares it with an integer
// model, including the sign changes, and checks the 10^3 and 10^4 pulses.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_bcd_counter;
  int checks = 0, failures = 0;
  logic clk = 0, clr, up, dn, up2, dn2;
  logic [6:0][3:0] dig, dig2;
  logic neg, neg2;
  logic [3:0] hit, hit2;
  int model, model2;
  int hits3, hits4;

  bcd_counter dut (.clk, .clr, .up, .dn, .digits(dig), .neg, .dec_hit(hit));
  bcd_counter #(.DIGITS(7), .UPDOWN(1'b0)) dut_up (.clk, .clr, .up(up2), .dn(dn2),
      .digits(dig2), .neg(neg2), .dec_hit(hit2));

  always #5 clk = ~clk;

  function automatic int value(logic [6:0][3:0] d, logic s);
    int v = 0;
    for (int i = 6; i >= 0; i--) v = v * 10 + int'(d[i]);
    return s ? -v : v;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; up = 0; dn = 0; up2 = 0; dn2 = 0; model = 0; model2 = 0;
    hits3 = 0; hits4 = 0;
    @(negedge clk);
    clr = 0;
    for (int t = 0; t < 5000; t++) begin
      up = 1'($urandom); dn = 1'($urandom);
      @(negedge clk);
      model += int'(up) - int'(dn);
      check("updown", value(dig, neg), model);
      if (model == 0) check("zero is positive", int'(neg), 0);
    end
    up = 0; dn = 0;
    for (int t = 0; t < 10000; t++) begin
      up2 = 1; dn2 = (t % 3 == 0);
      @(negedge clk);
      model2++;
      if (hit2[0]) hits3++;
      if (hit2[1]) hits4++;
      if (model2 == 1000)  check("hit 10^3", int'(hit2), 1);
      if (model2 == 10000) check("hit 10^4", int'(hit2), 2);
    end
    check("up counter", value(dig2, neg2), 10000);
    check("one cycle at 10^3", hits3, 1);
    check("one cycle at 10^4", hits4, 1);
    clr = 1;
    @(negedge clk);
    check("clear", value(dig, neg), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
