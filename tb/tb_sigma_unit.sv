// tb_sigma_unit: the 40-bit counter-equation unit (default size).
//   * square roots of fixed numbers: x = ceil(sqrt(N)), S = x^2, one step per
//     clock cycle;
//   * an incomplete N makes the last bit oscillate; "N complete" stops it;
//   * a changing N is followed;
//   * squaring: S = M^2 exactly;
//   * standard deviation: x = ceil(sqrt(N - M^2)).
// The decimal readout must equal x. Expected values are integer square roots
// computed here by search.
//
// Runs the counter-equation unit at its full 40-bit size: roots of fixed and
// changing N, the F1/F2 inhibit, squaring, and sigma of M and N, compared with
// integer square roots; checks S = x^2 and the decimal readout.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_sigma_unit;
  import spc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clr, go, n_complete, rooting, done;
  sd_mode_e mode;
  logic [39:0] n_in, s;
  logic [19:0] m_in, x;
  logic [6:0][3:0] x_digits;
  longint steps;

  sigma_unit dut (.*);

  always #5 clk = ~clk;

  function automatic longint ceil_sqrt(longint v);
    longint r = 0, lo = 0, hi = 2000000;
    while (lo < hi) begin
      r = (lo + hi) / 2;
      if (r * r >= v) hi = r; else lo = r + 1;
    end
    return lo;
  endfunction

  function automatic longint dec_value(logic [6:0][3:0] d);
    longint v = 0;
    for (int i = 6; i >= 0; i--) v = v * 10 + longint'(d[i]);
    return v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic restart(sd_mode_e md, longint nv, longint mv, logic comp);
    clr = 1; go = 0; mode = md; n_in = 40'(nv); m_in = 20'(mv); n_complete = comp;
    @(negedge clk);
    clr = 0; go = 1;
    steps = 0;
  endtask

  task automatic wait_done(longint limit);
    while (!done && steps < limit) begin
      @(negedge clk);
      steps++;
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vals [7] = '{0, 1, 2, 99, 100, 12345, 1000000007};
    clr = 1; go = 0; n_complete = 0; mode = SD_SQRT; n_in = 0; m_in = 0;
    @(negedge clk);
    foreach (vals[i]) begin
      longint e;
      restart(SD_SQRT, vals[i], 0, 1'b1);
      e = ceil_sqrt(vals[i]);
      wait_done(e + 10);
      repeat (3) @(negedge clk);
      check($sformatf("sqrt(%0d)", vals[i]), x, e);
      check("S = x^2", s, e * e);
      check("decimal readout", dec_value(x_digits), e);
      checks++;
      if (steps > e + 3) begin
        failures++;
        $display("FAIL sqrt(%0d) took %0d steps", vals[i], steps);
      end
    end
    // N not complete: the last bit oscillates between 1 and 2 for N = 2
    begin
      int changes;
      logic [19:0] xp;
      restart(SD_SQRT, 2, 0, 1'b0);
      repeat (10) @(negedge clk);
      changes = 0; xp = x;
      repeat (20) begin
        @(negedge clk);
        if (x != xp) changes++;
        xp = x;
      end
      checks++;
      if (changes < 10) begin
        failures++;
        $display("FAIL no oscillation (%0d changes)", changes);
      end
      n_complete = 1;
      repeat (5) @(negedge clk);
      xp = x;
      repeat (20) @(negedge clk);
      check("stopped after N complete", x, xp);
      check("done after N complete", done, 1);
      checks++;
      if (x != 1 && x != 2) failures++;
    end
    // changing N is followed
    restart(SD_SQRT, 10000, 0, 1'b0);
    repeat (150) @(negedge clk);
    n_in = 2500;
    repeat (100) @(negedge clk);
    n_complete = 1;
    steps = 0;
    wait_done(100);
    @(negedge clk);
    check("follows N", x, 50);
    // N falls below x^2 and is complete: x descends and stops at the floor
    restart(SD_SQRT, 10000, 0, 1'b0);
    repeat (150) @(negedge clk);
    n_in = 2600;
    n_complete = 1;
    steps = 0;
    wait_done(200);
    @(negedge clk);
    check("from above stops at floor", x, 50);
    check("from above S", s, 2500);
    // squaring
    restart(SD_SQUARE, 0, 1234, 1'b1);
    wait_done(2000);
    @(negedge clk);
    check("square x", x, 1234);
    check("square S", s, 1234 * 1234);
    // standard deviation: sqrt(N - M^2)
    restart(SD_SIGMA, 300 * 300 + 400 * 400, 300, 1'b1);
    wait_done(2000);
    @(negedge clk);
    check("sigma exact", x, 400);
    check("sigma phase", rooting, 1);
    restart(SD_SIGMA, 90050, 300, 1'b1);
    wait_done(2000);
    @(negedge clk);
    check("sigma inexact", x, ceil_sqrt(50));
    restart(SD_SIGMA, 64'd1000000000000 - 1, 999999, 1'b1);
    wait_done(3000000);
    @(negedge clk);
    check("sigma large", x, ceil_sqrt(64'd1000000000000 - 1 - 64'd999999 * 64'd999999));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
