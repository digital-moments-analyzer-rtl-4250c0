// tb_spc: the moments analyser with a behavioural converter model.
//   * d.c. inputs of both signs, 10^3 samples at 100 kHz: every readout is
//     checked against floor(C0 * W(k,r) / n^k) with W summed term by term;
//   * a random input, 10^3 samples: readouts checked against a sample-by-
//     sample model of the positive and negative accumulations;
//   * probability mode, above-level and interval counts;
//   * one-cycle mode on a periodic sign;
//   * the sample rate (10 master-clock cycles per sample at 100 kHz).
module tb_spc;
  import spc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, clr, start_sw, cmp_pos, ad_start, ad_done, sampling, done;
  spc_mode_e mode;
  timing_mode_e tmode;
  logic [2:0] rate_sel;
  logic [1:0] size_sel;
  logic [7:0] ad_data, level;
  logic [3:0] prob_ref;
  logic prob_sel_neg, prob_interval;
  logic [6:0][3:0] c0_digits, m1_digits, m2_digits, m3_digits, m4_digits, sd_digits;
  logic m1_neg, m3_neg, sd_done;
  sd_mode_e sd_mode;
  logic sd_go, sd_n_complete;
  logic [39:0] sd_n, sd_s;
  logic [19:0] sd_m, sd_x;

  // samples as taken (level and sign at each a.d. start)
  longint acc_p [5], acc_n [5];
  longint nsamp, nprob, run_cycles;

  spc dut (.*);
  ad_converter_model adc (.clk, .ad_start, .level, .ad_done, .ad_data);

  always #5 clk = ~clk;

  function automatic longint wk(int k, longint r);
    longint w = 0;
    for (longint q = 1; q <= r; q++)
      w += k * ((k == 1) ? 1 : (k == 2) ? q : (k == 3) ? q * q : q * q * q);
    return w;
  endfunction

  function automatic longint dec_value(logic [6:0][3:0] d, logic s);
    longint v = 0;
    for (int i = 6; i >= 0; i--) v = v * 10 + longint'(d[i]);
    return s ? -v : v;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // reference model of the accumulations
  always @(posedge clk) begin
    if (ad_start) begin
      longint r8, r6;
      r8 = level;
      r6 = level >> 2;
      nsamp++;
      if (cmp_pos) begin
        acc_p[1] += r8; acc_p[2] += wk(2, r6); acc_p[3] += wk(3, r6); acc_p[4] += wk(4, r6);
      end else begin
        acc_n[1] += r8; acc_n[2] += wk(2, r6); acc_n[3] += wk(3, r6); acc_n[4] += wk(4, r6);
      end
      if ((cmp_pos == !prob_sel_neg) &&
          (prob_interval ? (level[7:4] == prob_ref) : (level[7:4] >= prob_ref)))
        nprob++;
    end
    if (sampling) run_cycles++;
  end

  task automatic reset_model();
    for (int k = 0; k < 5; k++) begin
      acc_p[k] = 0;
      acc_n[k] = 0;
    end
    nsamp = 0; nprob = 0; run_cycles = 0;
  endtask

  task automatic clear();
    clr = 1;
    @(negedge clk);
    clr = 0;
    reset_model();
  endtask

  task automatic run_fixed(bit random_in, logic [7:0] dc, logic pos);
    clear();
    tmode = TIME_FIXED; size_sel = 2'd0; rate_sel = 3'd0;
    level = dc; cmp_pos = pos;
    start_sw = 1; @(negedge clk); start_sw = 0;
    while (!done) begin
      if (random_in) begin
        level = 8'($urandom);
        cmp_pos = 1'($urandom);
      end
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
  endtask

  task automatic check_moments(string tag);
    longint e1, e2, e3, e4;
    e1 = (acc_p[1] >> 8) - (acc_n[1] >> 8);
    e2 = (acc_p[2] + acc_n[2]) >> 12;
    e3 = (acc_p[3] >> 18) - (acc_n[3] >> 18);
    e4 = (acc_p[4] + acc_n[4]) >> 24;
    check({tag, " C0"}, dec_value(c0_digits, 1'b0), 1000);
    check({tag, " samples"}, nsamp, 1000);
    // 10 cycles per sample; the stop is registered, so the run may end up
    // to two cycles after the last start
    check({tag, " run cycles"}, longint'(run_cycles >= 10000 && run_cycles <= 10002), 1);
    check({tag, " m1"}, dec_value(m1_digits, m1_neg), e1);
    check({tag, " m2"}, dec_value(m2_digits, 1'b0), e2);
    check({tag, " m3"}, dec_value(m3_digits, m3_neg), e3);
    check({tag, " m4"}, dec_value(m4_digits, 1'b0), e4);
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; start_sw = 0; cmp_pos = 1; mode = MODE_MOMENTS; tmode = TIME_FIXED;
    rate_sel = 0; size_sel = 0; level = 0; prob_ref = 0; prob_sel_neg = 0; prob_interval = 0;
    sd_mode = SD_SQRT; sd_go = 0; sd_n = 0; sd_m = 0; sd_n_complete = 0;
    reset_model();
    repeat (2) @(negedge clk);
    // d.c. inputs
    for (int i = 0; i < 6; i++) begin
      logic [7:0] dc;
      logic pos;
      longint r6;
      dc  = (i == 0) ? 8'd0 : (i == 1) ? 8'd7 : (i == 2) ? 8'd130 : (i == 3) ? 8'd255 : (i == 4) ? 8'd77 : 8'd200;
      pos = (i < 4);
      run_fixed(1'b0, dc, pos);
      check_moments($sformatf("dc %0d", dc));
      // direct closed forms: m1 = C0 r/256, m2 = C0 r(r+1)/4096 (truncated)
      r6 = dc >> 2;
      check("dc m1 closed form", dec_value(m1_digits, m1_neg), (pos ? 1 : -1) * ((1000 * longint'(dc)) >> 8));
      check("dc m2 closed form", dec_value(m2_digits, 1'b0), (1000 * r6 * (r6 + 1)) >> 12);
    end
    // random input
    for (int i = 0; i < 3; i++) begin
      run_fixed(1'b1, 0, 1);
      check_moments("random");
    end
    // probability mode
    mode = MODE_PROB;
    for (int i = 0; i < 4; i++) begin
      prob_ref = 4'($urandom_range(0, 15));
      prob_sel_neg = 1'(i);
      prob_interval = (i >= 2);
      run_fixed(1'b1, 0, 1);
      check("probability count", dec_value(m1_digits, m1_neg), nprob);
      check("accumulators inhibited", dec_value(m2_digits, 1'b0), 0);
    end
    mode = MODE_MOMENTS;
    // one-cycle mode: sign period 600 cycles -> 60 samples at 100 kHz
    clear();
    tmode = TIME_ONE_CYCLE;
    level = 8'd128;
    for (int t = 0; t < 2000; t++) begin
      cmp_pos = ((t + 100) % 600) < 300;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check("one cycle done", done, 1);
    check("one cycle run", run_cycles, 600);
    check("one cycle samples", dec_value(c0_digits, 1'b0), 60);
    // counter-equation unit through the analyser's ports
    clear();
    sd_mode = SD_SIGMA; sd_m = 20'd3; sd_n = 40'd25; sd_n_complete = 1; sd_go = 1;
    repeat (40) @(negedge clk);
    check("sigma 3,25", sd_x, 4);
    check("sigma done", sd_done, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
