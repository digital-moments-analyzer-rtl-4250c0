// dma_top: digital moments analyser with its cellular arithmetic arrays.
//
// Two parts stand side by side, each with its own ports:
//   * spc - the moments analyser proper (see spc.sv): converter interface,
//     sample timing, weighted feed logic, moment accumulators, decimal
//     readouts, probability mode and the standard-deviation unit.
//   * the arrays of universal arithmetic cells: a general multiplier/divider
//     (uac_array), a signed Booth multiplier (booth_array), a square-root
//     array (sqrt_array), a decimal multiplier (bcd_mult_array) and weighted
//     feed logic made of multiplier arrays (wfl_array), which computes the same
//     numbers as the analyser's own weighted feed logic for any level r.
// The arrays are combinational; their sizes are the sizes of the published
// examples (3-bit operands, 2-bit root, 3-digit decimal) and the six-bit
// level of the analyser. All analyser timing is described in spc.sv.
//
// Timing: the analyser is synchronous to clk; the arrays have no clock.
// The analyser follows the published design; placing the arrays beside it,
// unconnected, is this design's own choice, as the arrays are offered as an
// alternative way to build such arithmetic.
module dma_top
  import spc_pkg::*;
(
  input  logic                        clk,
  input  logic                        clr,
  input  spc_mode_e                   mode,
  input  timing_mode_e                tmode,
  input  logic [2:0]                  rate_sel,
  input  logic [1:0]                  size_sel,
  input  logic                        start_sw,
  input  logic                        cmp_pos,
  output logic                        ad_start,
  input  logic                        ad_done,
  input  logic [ADC_BITS-1:0]         ad_data,
  input  logic [PROB_BITS-1:0]        prob_ref,
  input  logic                        prob_sel_neg,
  input  logic                        prob_interval,
  output logic                        sampling,
  output logic                        done,
  output logic [DISP_DIGITS-1:0][3:0] c0_digits,
  output logic [DISP_DIGITS-1:0][3:0] m1_digits,
  output logic                        m1_neg,
  output logic [DISP_DIGITS-1:0][3:0] m2_digits,
  output logic [DISP_DIGITS-1:0][3:0] m3_digits,
  output logic                        m3_neg,
  output logic [DISP_DIGITS-1:0][3:0] m4_digits,
  input  sd_mode_e                    sd_mode,
  input  logic                        sd_go,
  input  logic [39:0]                 sd_n,
  input  logic [19:0]                 sd_m,
  input  logic                        sd_n_complete,
  output logic [19:0]                 sd_x,
  output logic [39:0]                 sd_s,
  output logic [DISP_DIGITS-1:0][3:0] sd_digits,
  output logic                        sd_done,
  // general multiplier / divider array
  input  logic                        ga_z,
  input  logic [2:0]                  ga_l,
  input  logic [2:0]                  ga_m,
  input  logic [4:0]                  ga_k,
  output logic [5:0]                  ga_y,
  output logic [2:0]                  ga_q,
  output logic [2:0]                  ga_rem,
  // signed multiplier array
  input  logic [2:0]                  bm_x,
  input  logic [2:0]                  bm_y,
  output logic [4:0]                  bm_prod,
  // square-root array
  input  logic [3:0]                  sq_x,
  output logic [1:0]                  sq_root,
  // decimal multiplier array
  input  logic [2:0][3:0]             dm_x,
  input  logic [2:0][3:0]             dm_y,
  input  logic [2:0][3:0]             dm_k1,
  input  logic [2:0][3:0]             dm_k2,
  output logic [5:0][3:0]             dm_prod,
  // weighted feed logic from arrays
  input  logic [LVL_BITS-1:0]         wa_r,
  output logic [2*LVL_BITS-1:0]       wa_w2,
  output logic [3*LVL_BITS-1:0]       wa_w3,
  output logic [4*LVL_BITS-1:0]       wa_w4
);
  spc #(.SD_M(20)) u_spc (
    .clk, .clr, .mode, .tmode, .rate_sel, .size_sel, .start_sw, .cmp_pos,
    .ad_start, .ad_done, .ad_data, .prob_ref, .prob_sel_neg, .prob_interval,
    .sampling, .done, .c0_digits, .m1_digits, .m1_neg, .m2_digits, .m3_digits,
    .m3_neg, .m4_digits, .sd_mode, .sd_go, .sd_n, .sd_m, .sd_n_complete,
    .sd_x, .sd_s, .sd_digits, .sd_done
  );

  uac_array #(.NL(3), .NM(3)) u_general (
    .z(ga_z), .l(ga_l), .m(ga_m), .k(ga_k), .y(ga_y), .q(ga_q), .rem(ga_rem));

  booth_array #(.N(3)) u_booth (.x(bm_x), .y(bm_y), .prod(bm_prod));

  sqrt_array #(.N(2)) u_sqrt (.x(sq_x), .root(sq_root));

  bcd_mult_array #(.ND(3)) u_bcd (
    .x(dm_x), .y(dm_y), .k1(dm_k1), .k2(dm_k2), .prod(dm_prod));

  wfl_array #(.LBITS(LVL_BITS)) u_wfla (
    .r(wa_r), .w2(wa_w2), .w3(wa_w3), .w4(wa_w4));
endmodule
