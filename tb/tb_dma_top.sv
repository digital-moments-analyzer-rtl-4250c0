// tb_dma_top: end-to-end test of the whole analyser at its default size.
//
// The top is instantiated with its default parameters. A behavioural 8-bit
// converter (ad_converter_model, 8 cycles per conversion) sits between the
// test's input level/sign and the analyser. The test covers:
//   * the published direct-readout table for d.c. inputs with C0 = 10^4:
//     m1 and m2 must equal the table value truncated; m3 and m4 may read up
//     to three counts low, because the weighted feed logic drops the small
//     terms of W3 and W4 (see wfl_unit.sv);
//   * a negative d.c. input (sign-magnitude readouts of m1 and m3);
//   * the largest sample size, 10^6, and the 10^5 size;
//   * a random input with random sign against a sample-by-sample model;
//   * the 10 kHz sample rate;
//   * probability mode (above a level and in an interval, both signs);
//   * one-cycle timing on a periodic sign;
//   * the standard-deviation unit in root, square and sigma modes;
//   * every cellular array against integer arithmetic.
// Each mechanism is counted (accumulator carries, up and down readout
// steps, probability hits, stops, sigma phase changes, array checks) and the
// counts are printed; a mechanism that was never exercised is a failure.
module tb_dma_top;
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
  logic ga_z;
  logic [2:0] ga_l, ga_m, ga_q, ga_rem;
  logic [4:0] ga_k;
  logic [5:0] ga_y;
  logic [2:0] bm_x, bm_y;
  logic [4:0] bm_prod;
  logic [3:0] sq_x;
  logic [1:0] sq_root;
  logic [2:0][3:0] dm_x, dm_y, dm_k1, dm_k2;
  logic [5:0][3:0] dm_prod;
  logic [5:0] wa_r;
  logic [11:0] wa_w2;
  logic [17:0] wa_w3;
  logic [23:0] wa_w4;

  dma_top dut (.*);
  ad_converter_model adc (.clk, .ad_start, .level, .ad_done, .ad_data);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  longint n_ovf [6];
  longint n_up, n_dn, n_prob, n_fixed_stop, n_cycle_stop, n_phase, n_turn;
  longint n_table, n_neg_read, n_rate, n_random, n_ga_mul, n_ga_div, n_booth,
          n_sqrt, n_bcd, n_wfla, n_sd;
  logic done_d = 0;

  always @(posedge clk) begin
    n_ovf[0] += longint'(dut.u_spc.m1p_ovf);
    n_ovf[1] += longint'(dut.u_spc.m1n_ovf);
    n_ovf[2] += longint'(dut.u_spc.m2_ovf);
    n_ovf[3] += longint'(dut.u_spc.m3p_ovf);
    n_ovf[4] += longint'(dut.u_spc.m3n_ovf);
    n_ovf[5] += longint'(dut.u_spc.m4_ovf);
    n_up   += longint'(dut.u_spc.m1_up & ~dut.u_spc.m1_dn);
    n_dn   += longint'(dut.u_spc.m1_dn & ~dut.u_spc.m1_up);
    n_prob += longint'(dut.u_spc.prob_hit & ad_done && mode == MODE_PROB);
    n_phase += longint'(dut.u_spc.u_sigma.phase_end);
    n_turn  += longint'(dut.u_spc.u_sigma.turn);
    if (done && !done_d) begin
      if (tmode == TIME_FIXED) n_fixed_stop++;
      else n_cycle_stop++;
    end
    done_d <= done;
  end

  // ---------------- reference model of the accumulations ----------------
  longint acc_p [5], acc_n [5];
  longint nsamp, nprob, run_cycles;

  function automatic longint wk(int k, longint r);
    longint w = 0;
    for (longint q = 1; q <= r; q++)
      w += k * ((k == 1) ? 1 : (k == 2) ? q : (k == 3) ? q * q : q * q * q);
    return w;
  endfunction

  // weights of all 64 levels, summed once
  longint wtab [5][64];

  always @(posedge clk) begin
    if (ad_start) begin
      longint r8, r6;
      r8 = level;
      r6 = level >> 2;
      nsamp++;
      if (cmp_pos) begin
        acc_p[1] += r8;
        for (int k = 2; k <= 4; k++) acc_p[k] += wtab[k][r6];
      end else begin
        acc_n[1] += r8;
        for (int k = 2; k <= 4; k++) acc_n[k] += wtab[k][r6];
      end
      if ((cmp_pos == !prob_sel_neg) &&
          (prob_interval ? (level[7:4] == prob_ref) : (level[7:4] >= prob_ref)))
        nprob++;
    end
    if (sampling) run_cycles++;
  end

  function automatic longint dec_value(logic [6:0][3:0] d, logic s);
    longint v = 0;
    for (int i = 6; i >= 0; i--) v = v * 10 + longint'(d[i]);
    return s ? -v : v;
  endfunction

  function automatic longint ceil_sqrt(longint v);
    longint x = 0;
    while (x * x < v) x++;
    return x;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic check_range(string what, longint got, longint lo, longint hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s got %0d exp %0d..%0d", what, got, lo, hi);
    end
  endtask

  task automatic clear();
    clr = 1;
    @(negedge clk);
    clr = 0;
    for (int k = 0; k < 5; k++) begin
      acc_p[k] = 0;
      acc_n[k] = 0;
    end
    nsamp = 0; nprob = 0; run_cycles = 0;
  endtask

  task automatic run_fixed(logic [1:0] size, logic [2:0] rate, bit random_in,
                           logic [7:0] dc, logic pos);
    clear();
    tmode = TIME_FIXED; size_sel = size; rate_sel = rate;
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

  task automatic check_model(string tag, longint c0);
    check({tag, " C0"}, dec_value(c0_digits, 1'b0), c0);
    check({tag, " samples"}, nsamp, c0);
    check({tag, " m1"}, dec_value(m1_digits, m1_neg), (acc_p[1] >> 8) - (acc_n[1] >> 8));
    check({tag, " m2"}, dec_value(m2_digits, 1'b0), (acc_p[2] + acc_n[2]) >> 12);
    check({tag, " m3"}, dec_value(m3_digits, m3_neg), (acc_p[3] >> 18) - (acc_n[3] >> 18));
    check({tag, " m4"}, dec_value(m4_digits, 1'b0), (acc_p[4] + acc_n[4]) >> 24);
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // published readouts (x100) for C0 = 10^4, level r (input r*10/64 volts)
  int tab_r [6] = '{0, 8, 32, 40, 48, 63};
  int tab_v [6][4] = '{
    '{0, 0, 0, 0},
    '{125000, 17578, 2342, 311},
    '{500000, 257813, 130951, 66499},
    '{625000, 400391, 253410, 160362},
    '{750000, 574219, 435196, 329797},
    '{984375, 984375, 976745, 969114}};

  initial begin
    for (int k = 2; k <= 4; k++)
      for (int r = 0; r < 64; r++) wtab[k][r] = wk(k, r);
    for (int i = 0; i < 6; i++) n_ovf[i] = 0;
    n_up = 0; n_dn = 0; n_prob = 0; n_fixed_stop = 0; n_cycle_stop = 0; n_phase = 0;
    n_turn = 0; n_table = 0; n_neg_read = 0; n_rate = 0; n_random = 0; n_ga_mul = 0;
    n_ga_div = 0; n_booth = 0; n_sqrt = 0; n_bcd = 0; n_wfla = 0; n_sd = 0;
    clr = 1; start_sw = 0; cmp_pos = 1; mode = MODE_MOMENTS; tmode = TIME_FIXED;
    rate_sel = 0; size_sel = 0; level = 0; prob_ref = 0; prob_sel_neg = 0; prob_interval = 0;
    sd_mode = SD_SQRT; sd_go = 0; sd_n = 0; sd_m = 0; sd_n_complete = 0;
    ga_z = 0; ga_l = 0; ga_m = 0; ga_k = 0; bm_x = 0; bm_y = 0; sq_x = 0;
    dm_x = '0; dm_y = '0; dm_k1 = '0; dm_k2 = '0; wa_r = 0;
    repeat (2) @(negedge clk);

    // ---- published direct-readout table, C0 = 10^4 ----
    $display("section: %s (%0t)", "published direct-readout table", $time);
    for (int i = 0; i < 6; i++) begin
      run_fixed(2'd1, 3'd0, 1'b0, 8'(4 * tab_r[i]), 1'b1);
      check_model($sformatf("table r=%0d", tab_r[i]), 10000);
      check("table m1", dec_value(m1_digits, m1_neg), tab_v[i][0] / 100);
      check("table m2", dec_value(m2_digits, 1'b0), tab_v[i][1] / 100);
      check_range("table m3", dec_value(m3_digits, m3_neg), tab_v[i][2] / 100 - 3, tab_v[i][2] / 100);
      check_range("table m4", dec_value(m4_digits, 1'b0), tab_v[i][3] / 100 - 3, tab_v[i][3] / 100);
      check_range("rate 100 kHz", run_cycles, 100000, 100002);
      n_table++;
    end
    // ---- negative d.c. input ----
    $display("section: %s (%0t)", "negative d.c. input", $time);
    run_fixed(2'd1, 3'd0, 1'b0, 8'd128, 1'b0);
    check_model("negative", 10000);
    check("negative m1 sign", m1_neg, 1);
    check("negative m3 sign", m3_neg, 1);
    check("negative m1", dec_value(m1_digits, m1_neg), -5000);
    n_neg_read++;
    // ---- largest and next sample sizes ----
    $display("section: %s (%0t)", "largest and next", $time);
    run_fixed(2'd3, 3'd0, 1'b0, 8'd255, 1'b1);
    check_model("size 10^6", 1000000);
    run_fixed(2'd2, 3'd0, 1'b0, 8'd93, 1'b0);
    check_model("size 10^5", 100000);
    // ---- random input, mixed signs ----
    $display("section: %s (%0t)", "random input, mixed", $time);
    for (int i = 0; i < 4; i++) begin
      run_fixed(2'd0, 3'd0, 1'b1, 8'd0, 1'b1);
      check_model("random", 1000);
      n_random++;
    end
    // ---- 10 kHz sample rate ----
    $display("section: %s (%0t)", "10 kHz sample rate", $time);
    run_fixed(2'd0, 3'd1, 1'b1, 8'd0, 1'b1);
    check_model("10 kHz", 1000);
    check_range("rate 10 kHz", run_cycles, 100000, 100020);
    n_rate++;
    // ---- probability mode ----
    $display("section: %s (%0t)", "probability mode", $time);
    mode = MODE_PROB;
    for (int i = 0; i < 6; i++) begin
      prob_ref = 4'($urandom_range(0, 15));
      prob_sel_neg = 1'(i);
      prob_interval = (i >= 3);
      run_fixed(2'd0, 3'd0, 1'b1, 8'd0, 1'b1);
      check("probability count", dec_value(m1_digits, m1_neg), nprob);
      check("probability C0", dec_value(c0_digits, 1'b0), 1000);
      check("moments inhibited", dec_value(m2_digits, 1'b0) + dec_value(m4_digits, 1'b0), 0);
    end
    mode = MODE_MOMENTS;
    // ---- one-cycle timing: sign period 3000 cycles -> 300 samples ----
    $display("section: %s (%0t)", "one-cycle timing", $time);
    clear();
    tmode = TIME_ONE_CYCLE;
    level = 8'd200;
    for (int t = 0; t < 8000; t++) begin
      cmp_pos = ((t + 700) % 3000) < 1500;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check("one cycle done", done, 1);
    check("one cycle run", run_cycles, 3000);
    check_model("one cycle", 300);
    tmode = TIME_FIXED;
    // ---- standard-deviation unit ----
    $display("section: %s (%0t)", "standard-deviation unit", $time);
    begin
      longint nv [4] = '{64'd0, 64'd2, 64'd999999999, 64'd1099509530625};
      for (int i = 0; i < 4; i++) begin
        clear();
        sd_mode = SD_SQRT; sd_n = 40'(nv[i]); sd_n_complete = 1; sd_go = 1;
        while (!sd_done) @(negedge clk);
        check($sformatf("root %0d", nv[i]), sd_x, ceil_sqrt(nv[i]));
        check("root readout", dec_value(sd_digits, 1'b0), ceil_sqrt(nv[i]) % 10000000);
        sd_go = 0;
        n_sd++;
      end
      clear();
      sd_mode = SD_SQUARE; sd_m = 20'd98765; sd_go = 1;
      while (!sd_done) @(negedge clk);
      check("square x", sd_x, 98765);
      check("square S", sd_s, 64'd98765 * 64'd98765);
      sd_go = 0;
      n_sd++;
      for (int i = 0; i < 4; i++) begin
        longint mv, var_;
        mv = $urandom_range(0, 5000);
        var_ = $urandom_range(0, 4000000);
        clear();
        sd_mode = SD_SIGMA; sd_m = 20'(mv); sd_n = 40'(mv * mv + var_); sd_go = 1;
        while (!sd_done) @(negedge clk);
        check("sigma", sd_x, ceil_sqrt(var_));
        sd_go = 0;
        n_sd++;
      end
      sd_n_complete = 0;
    end
    // ---- cellular arrays ----
    $display("section: %s (%0t)", "cellular arrays", $time);
    ga_z = 0;
    for (int l = 0; l < 8; l++)
      for (int m = 0; m < 8; m++)
        for (int k = 0; k < 8; k++) begin
          ga_l = 3'(l); ga_m = 3'(m); ga_k = 5'(k);
          #1;
          check("array multiply", ga_y, l * m + k);
          n_ga_mul++;
        end
    ga_z = 1; ga_l = 0;
    for (int m = 1; m < 8; m++)
      for (int k = 0; k < 8 * m && k < 32; k++) begin
        ga_m = 3'(m); ga_k = 5'(k);
        #1;
        check("array quotient", ga_q, k / m);
        check("array remainder", ga_rem, k % m);
        n_ga_div++;
      end
    for (int x = -4; x < 4; x++)
      for (int y = -4; y < 4; y++) begin
        if (x == -4 && y == -4) continue;
        bm_x = 3'(x); bm_y = 3'(y);
        #1;
        check("booth", longint'($signed(bm_prod)), x * y);
        n_booth++;
      end
    for (int v = 0; v < 16; v++) begin
      sq_x = 4'(v);
      #1;
      check("root array", sq_root, (v >= 9) ? 3 : (v >= 4) ? 2 : (v >= 1) ? 1 : 0);
      n_sqrt++;
    end
    for (int i = 0; i < 500; i++) begin
      int xv, yv, k1v, k2v;
      longint pv;
      xv = $urandom_range(0, 999); yv = $urandom_range(0, 999);
      k1v = $urandom_range(0, 999); k2v = $urandom_range(0, 999);
      for (int d = 0; d < 3; d++) begin
        dm_x[d]  = 4'((xv  / (10 ** d)) % 10);
        dm_y[d]  = 4'((yv  / (10 ** d)) % 10);
        dm_k1[d] = 4'((k1v / (10 ** d)) % 10);
        dm_k2[d] = 4'((k2v / (10 ** d)) % 10);
      end
      #1;
      pv = 0;
      for (int d = 5; d >= 0; d--) pv = pv * 10 + longint'(dm_prod[d]);
      check("decimal array", pv, longint'(xv) * yv + k1v + k2v);
      n_bcd++;
    end
    for (int r = 0; r < 64; r++) begin
      wa_r = 6'(r);
      #1;
      check("array w2", wa_w2, r * (r + 1));
      check("array w3", wa_w3, (r * (r + 1) * (2 * r + 1)) / 2);
      check("array w4", wa_w4, r * r * (r + 1) * (r + 1));
      check_range("array w3 vs sum", wa_w3, wk(3, r) - 3 * r, wk(3, r));
      n_wfla++;
    end

    // ---- mechanism report ----
    $display("mechanisms: carries m1+ %0d m1- %0d m2 %0d m3+ %0d m3- %0d m4 %0d",
             n_ovf[0], n_ovf[1], n_ovf[2], n_ovf[3], n_ovf[4], n_ovf[5]);
    $display("mechanisms: m1 up %0d down %0d, probability hits %0d, fixed stops %0d, one-cycle stops %0d",
             n_up, n_dn, n_prob, n_fixed_stop, n_cycle_stop);
    $display("mechanisms: sigma phase changes %0d, turn inhibits %0d, sd runs %0d",
             n_phase, n_turn, n_sd);
    $display("mechanisms: table rows %0d, negative %0d, random %0d, rate %0d",
             n_table, n_neg_read, n_random, n_rate);
    $display("mechanisms: array mul %0d div %0d booth %0d root %0d decimal %0d wfl %0d",
             n_ga_mul, n_ga_div, n_booth, n_sqrt, n_bcd, n_wfla);
    for (int i = 0; i < 6; i++) check($sformatf("carries seen %0d", i), longint'(n_ovf[i] > 0), 1);
    check("down steps seen", longint'(n_dn > 0), 1);
    check("probability hits seen", longint'(n_prob > 0), 1);
    check("one-cycle stop seen", n_cycle_stop, 1);
    check("fixed stops seen", longint'(n_fixed_stop > 10), 1);
    check("sigma phase changes", n_phase, 4);
    check("turn inhibits seen", longint'(n_turn > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
