// tb_clock_rate: the a.d. start pulse period for the 100 kHz, 10 kHz and
// 1 kHz settings (10, 100 and 1000 master-clock cycles), pulses one cycle
// wide, and no pulses while run is low.
//
// Counts master-clock cycles between a.d. start pulses for the 100 kHz, 10 kHz
// and 1 kHz settings and checks the pulse width and the stop.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_clock_rate;
  int checks = 0, failures = 0;
  logic clk = 0, clr, run;
  logic [2:0] rate_sel;
  logic ad_start;
  longint cyc, last;
  int npulse;

  clock_rate dut (.*);

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
    clr = 1; run = 0; rate_sel = 0;
    @(negedge clk);
    clr = 0;
    for (int sel = 0; sel < 3; sel++) begin
      longint period;
      period = (sel == 0) ? 10 : (sel == 1) ? 100 : 1000;
      clr = 1; @(negedge clk); clr = 0;
      rate_sel = 3'(sel); run = 1;
      cyc = 0; last = -1; npulse = 0;
      while (npulse < 6) begin
        @(negedge clk);
        cyc++;
        if (ad_start) begin
          if (last >= 0) check($sformatf("period sel %0d", sel), cyc - last, period);
          last = cyc;
          npulse++;
          @(negedge clk);
          cyc++;
          check("pulse width", ad_start, 0);
        end
      end
    end
    run = 0;
    rate_sel = 0;
    npulse = 0;
    repeat (200) begin
      @(negedge clk);
      if (ad_start) npulse++;
    end
    check("stopped", npulse, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
