// tb_mode_control: exhaustive check of the a.d. done routing in both modes.
//
// Applies every input combination in both modes and checks the routing.
// Self-checking: ends with a TB_RESULT line; a watchdog ends a stuck run.
module tb_mode_control;
  import spc_pkg::*;
  int checks = 0, failures = 0;
  spc_mode_e mode;
  logic ad_done, prob_hit, m1_pos_ovf, m1_neg_ovf, acc_add, m1_up, m1_dn;

  mode_control dut (.*);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s mode=%0d got %0b exp %0b", what, mode, got, exp);
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
    for (int i = 0; i < 32; i++) begin
      mode = spc_mode_e'(i[4]);
      {ad_done, prob_hit, m1_pos_ovf, m1_neg_ovf} = 4'(i);
      #1;
      if (mode == MODE_PROB) begin
        check("acc inhibited", acc_add, 1'b0);
        check("prob count", m1_up, ad_done & prob_hit);
        check("no down", m1_dn, 1'b0);
      end else begin
        check("acc add", acc_add, ad_done);
        check("m1 up", m1_up, m1_pos_ovf);
        check("m1 down", m1_dn, m1_neg_ovf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
