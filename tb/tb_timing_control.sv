// tb_timing_control: one-cycle mode runs from one negative-going zero
// crossing to the next and then stays locked; fixed mode runs from the start
// request to the selected sample-count output.
//
// Checks one-cycle mode (start and stop on negative-going zero crossings,
// locked until clear) and the stop at the selected fixed sample size.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_timing_control;
  import spc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clr, start_sw, cmp_pos, run, done;
  timing_mode_e tmode;
  logic [1:0] size_sel;
  logic [3:0] dec_hit;
  int run_cycles;

  timing_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
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
    clr = 1; start_sw = 0; cmp_pos = 1; tmode = TIME_ONE_CYCLE; size_sel = 0; dec_hit = 0;
    @(negedge clk);
    clr = 0;
    // square-wave input, period 100 cycles, starting positive mid-cycle
    run_cycles = 0;
    for (int t = 0; t < 400; t++) begin
      cmp_pos = ((t + 20) % 100) < 50;
      @(negedge clk);
      if (run) run_cycles++;
    end
    check("one cycle run length", run_cycles, 100);
    check("one cycle done", done, 1);
    check("one cycle stopped", run, 0);
    // fixed mode: stop at the selected decade output only
    clr = 1; @(negedge clk); clr = 0;
    tmode = TIME_FIXED; size_sel = 2'd1; cmp_pos = 0;
    repeat (3) @(negedge clk);
    check("idle before start", run, 0);
    start_sw = 1; @(negedge clk); start_sw = 0;
    check("running", run, 1);
    dec_hit = 4'b0001; @(negedge clk); dec_hit = 0;   // 10^3: not selected
    check("still running", run, 1);
    dec_hit = 4'b0010; @(negedge clk); dec_hit = 0;   // 10^4: selected
    check("stopped", run, 0);
    check("fixed done", done, 1);
    start_sw = 1; @(negedge clk); start_sw = 0;
    check("no restart before clear", run, 0);
    // random periods and phases in one-cycle mode
    tmode = TIME_ONE_CYCLE;
    for (int k = 0; k < 20; k++) begin
      int per, ph;
      per = $urandom_range(4, 300);
      ph  = $urandom_range(0, per - 1);
      clr = 1; @(negedge clk); clr = 0;
      run_cycles = 0;
      for (int t = 0; t < 4 * per; t++) begin
        cmp_pos = ((t + ph) % per) < per / 2;
        @(negedge clk);
        if (run) run_cycles++;
      end
      check($sformatf("one cycle period %0d", per), run_cycles, per);
      check("one cycle locked", done, 1);
    end
    // every sample size, with pulses of the other decades ignored
    tmode = TIME_FIXED;
    for (int sz = 0; sz < 4; sz++) begin
      clr = 1; @(negedge clk); clr = 0;
      size_sel = 2'(sz);
      start_sw = 1; @(negedge clk); start_sw = 0;
      for (int h = 0; h < 4; h++) begin
        if (h == sz) continue;
        dec_hit = 4'(1 << h); @(negedge clk); dec_hit = 0;
        check($sformatf("size %0d ignores decade %0d", sz, h), run, 1);
      end
      dec_hit = 4'(1 << sz); @(negedge clk); dec_hit = 0;
      check($sformatf("size %0d stops", sz), run, 0);
      check("done", done, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
