// tb_wfl_array: the array-built weighted feed logic, all 64 levels against weighting numbers summed term by term,
// W(k,r) = sum_{q=1..r} k*q^(k-1), plus rows of the published table of direct
// readouts (C0 = 10^4, n = 64).
//
// Checks W2, W3, W4 for all 64 levels against term-by-term sums, and the
// resulting readouts against the published direct-readout table.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_wfl_array;
  int checks = 0, failures = 0;
  logic [5:0]  r;
  logic [11:0] w2;
  logic [17:0] w3;
  logic [23:0] w4;

  wfl_array dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s r=%0d got %0d exp %0d", what, r, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      longint e2, e3, e4;
      e2 = 0; e3 = 0; e4 = 0;
      r = 6'(i);
      #1;
      for (longint q = 1; q <= i; q++) begin
        e2 += 2 * q;
        e3 += 3 * q * q;
        e4 += 4 * q * q * q;
      end
      check("w2", w2, e2);
      check("w3", w3, e3);
      check("w4", w4, e4);
    end
    // published direct readouts for a d.c. input, C0 = 10^4, n = 64:
    // r = 63: 9843.75, 9767.45, 9691.14; r = 32: 2578.13, 1309.51, 664.99.
    // The second moment matches exactly; for k = 3, 4 the table uses the
    // exact mid-interval powers while the weighting numbers drop the small
    // terms 1/4 and r, so the readout may be a few counts lower.
    r = 6'd63;
    #1;
    check("table m2", (longint'(w2) * 10000) / 4096, 9843);
    checks++;
    if (9767 - (longint'(w3) * 10000) / 262144 > 3) failures++;
    checks++;
    if (9691 - (longint'(w4) * 10000) / 16777216 > 3) failures++;
    r = 6'd32;
    #1;
    check("table m2 r32", (longint'(w2) * 10000) / 4096, 2578);
    checks++;
    if (1309 - (longint'(w3) * 10000) / 262144 > 3) failures++;
    checks++;
    if (664 - (longint'(w4) * 10000) / 16777216 > 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
