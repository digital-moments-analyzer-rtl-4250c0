// tb_readout_table: the analyser's direct decimal readouts for d.c. inputs.
//
// For each of the 64 six-bit levels r (d.c. input r*10/64 volts, converter
// code 4r) the analyser takes C0 = 10^4 samples at 100 kHz, and its four
// readouts are compared with the closed-form direct readouts
//   m1 = C0 r/n                     m2 = C0 r(r+1)/n^2
//   m3 = C0 r(4r^2+6r+3)/(4n^3)     m4 = C0 r(2r^3+4r^2+3r+1)/(2n^4)
// with n = 64, computed here in real arithmetic. m1 and m2 must equal the
// truncated value; m3 and m4 may read up to three counts low, since the
// weighted feed logic adds r(r+1)(2r+1)/2 and r^2(r+1)^2, which fall slightly
// short of those closed forms. Each level is run once with a positive and,
// for odd r, once with a negative input, where m1 and m3 must change sign.
// The analyser runs at its default parameters with a behavioural converter.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_readout_table;
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

  spc dut (.clk, .clr, .mode, .tmode, .rate_sel, .size_sel, .start_sw, .cmp_pos,
           .ad_start, .ad_done, .ad_data, .prob_ref, .prob_sel_neg, .prob_interval,
           .sampling, .done, .c0_digits, .m1_digits, .m1_neg, .m2_digits, .m3_digits,
           .m3_neg, .m4_digits, .sd_mode, .sd_go, .sd_n, .sd_m, .sd_n_complete,
           .sd_x, .sd_s, .sd_digits, .sd_done);
  ad_converter_model adc (.clk, .ad_start, .level, .ad_done, .ad_data);

  always #5 clk = ~clk;

  function automatic longint dec_value(logic [6:0][3:0] d, logic s);
    longint v = 0;
    for (int i = 6; i >= 0; i--) v = v * 10 + longint'(d[i]);
    return s ? -v : v;
  endfunction

  task automatic check_range(string what, longint got, longint lo, longint hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s got %0d exp %0d..%0d", what, got, lo, hi);
    end
  endtask

  task automatic run_level(int r, logic pos);
    real c0, n, ddr1, ddr2, ddr3, ddr4;
    longint s;
    clr = 1; @(negedge clk); clr = 0;
    level = 8'(4 * r); cmp_pos = pos;
    start_sw = 1; @(negedge clk); start_sw = 0;
    while (!done) @(negedge clk);
    repeat (20) @(negedge clk);
    c0 = 10000.0; n = 64.0;
    ddr1 = c0 * r / n;
    ddr2 = c0 * r * (r + 1) / (n * n);
    ddr3 = c0 * r * (4.0 * r * r + 6.0 * r + 3.0) / (4.0 * n * n * n);
    ddr4 = c0 * r * (2.0 * r * r * r + 4.0 * r * r + 3.0 * r + 1.0) / (2.0 * n * n * n * n);
    s = pos ? 1 : -1;
    check_range($sformatf("r=%0d C0", r), dec_value(c0_digits, 1'b0), 10000, 10000);
    check_range($sformatf("r=%0d m1", r), dec_value(m1_digits, m1_neg),
                s * longint'($floor(ddr1)), s * longint'($floor(ddr1)));
    check_range($sformatf("r=%0d m2", r), dec_value(m2_digits, 1'b0),
                longint'($floor(ddr2)), longint'($floor(ddr2)));
    if (pos)
      check_range($sformatf("r=%0d m3", r), dec_value(m3_digits, m3_neg),
                  longint'($floor(ddr3)) - 3, longint'($floor(ddr3)));
    else
      check_range($sformatf("r=%0d -m3", r), dec_value(m3_digits, m3_neg),
                  -longint'($floor(ddr3)), -longint'($floor(ddr3)) + 3);
    check_range($sformatf("r=%0d m4", r), dec_value(m4_digits, 1'b0),
                longint'($floor(ddr4)) - 3, longint'($floor(ddr4)));
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; start_sw = 0; cmp_pos = 1; mode = MODE_MOMENTS; tmode = TIME_FIXED;
    rate_sel = 3'd0; size_sel = 2'd1; level = 0; prob_ref = 0; prob_sel_neg = 0;
    prob_interval = 0; sd_mode = SD_SQRT; sd_go = 0; sd_n = 0; sd_m = 0; sd_n_complete = 0;
    repeat (2) @(negedge clk);
    for (int r = 0; r < 64; r++) begin
      run_level(r, 1'b1);
      if (r % 2 == 1) run_level(r, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
