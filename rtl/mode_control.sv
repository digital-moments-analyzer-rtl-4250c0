// mode_control: routes the a.d. done pulse according to the operating mode.
//
// In moments mode every a.d. done pulse is passed to the accumulators, and the
// first-moment display counter counts the overflows of the positive (up) and
// negative (down) first-moment accumulators. In probability mode the
// accumulators are inhibited, the a.d. done pulse goes to the probability gate
// instead, and the first-moment counter counts the gated pulses, i.e. it shows
// C_r. Purely combinational; all pulses are one clock wide.
//
// The routing follows the published analyser; using the m1 counter as the
// probability counter is this design's own choice.
module mode_control
  import spc_pkg::*;
(
  input  spc_mode_e mode,
  input  logic      ad_done,   // converter finished a sample
  input  logic      prob_hit,  // probability comparator and sign condition met
  input  logic      m1_pos_ovf,
  input  logic      m1_neg_ovf,
  output logic      acc_add,   // a.d. done to the moment accumulators
  output logic      m1_up,     // first-moment / probability counter, up
  output logic      m1_dn      // first-moment counter, down
);
  always_comb begin
    if (mode == MODE_PROB) begin
      acc_add = 1'b0;
      m1_up   = ad_done & prob_hit;
      m1_dn   = 1'b0;
    end else begin
      acc_add = ad_done;
      m1_up   = m1_pos_ovf;
      m1_dn   = m1_neg_ovf;
    end
  end
endmodule
