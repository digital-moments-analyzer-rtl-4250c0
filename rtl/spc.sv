// spc: special purpose computer for the first four moments of a signal.
//
// The input is full-wave rectified and converted by an external 8-bit
// converter; a comparator gives its sign. For each sample the highest level
// exceeded, r, addresses the weighted feed logic, which returns the weighting
// number W(k,r) for every moment at once. Each weighting number is added to
// an accumulator l*k bits wide; a carry-out of that accumulator is one unit of
// m_k * C0 (the division by n^k is the accumulator width) and is counted by a
// decimal display counter. Odd moments have a positive and a negative
// accumulator, selected by the sign, and an UP/DOWN counter: their readout is
// in sign and magnitude. Even moments have one accumulator and an UP counter.
// The first moment uses all 8 bits (n = 256); the others the top 6 (n = 64).
// After C0 samples the counters read C0*m_k with nothing left to compute.
//
// Around this datapath: the clock-rate circuit makes the a.d. start pulses
// from the 1 MHz master clock; a sample-size counter counts them; the timing
// control runs one input cycle or a fixed 10^3..10^6 samples; the mode control
// switches to above-level probability measurement, where a 4-bit comparator
// and the sign selection gate a.d. done pulses into the first-moment counter.
// A counter-equation unit computes a square root, a square or a standard
// deviation from binary inputs brought out as ports.
//
// Interface and timing: clk is the master clock (1 MHz) and clr the single
// clear pulse. ad_start is one cycle wide. The converter answers with
// ad_done (one cycle) and ad_data valid in that cycle; the sign is stored in a
// flip-flop at ad_start, so a sign change during conversion does not matter.
// Accumulators and counters take a sample at the clock edge ending ad_done.
//
// The structure follows the published analyser block for block. Own choices:
// the sign is stored at each a.d. start; the accumulators add on the a.d. done
// pulse; the probability count uses the m1 counter; and the standard-deviation
// unit takes its operands from ports.
module spc
  import spc_pkg::*;
#(
  parameter int unsigned SD_M = 20   // counter-equation unit: x bits (S is 2*SD_M)
) (
  input  logic                        clk,
  input  logic                        clr,
  // controls
  input  spc_mode_e                   mode,
  input  timing_mode_e                tmode,
  input  logic [2:0]                  rate_sel,    // 0: 100 kHz .. 5: 1 Hz
  input  logic [1:0]                  size_sel,    // 0: 10^3 .. 3: 10^6 samples
  input  logic                        start_sw,
  // analog front end and converter
  input  logic                        cmp_pos,     // sign comparator, 1: input > 0
  output logic                        ad_start,
  input  logic                        ad_done,
  input  logic [ADC_BITS-1:0]         ad_data,     // rectified level, 8 bits
  // probability mode
  input  logic [PROB_BITS-1:0]        prob_ref,
  input  logic                        prob_sel_neg,
  input  logic                        prob_interval,
  // status and readouts
  output logic                        sampling,
  output logic                        done,
  output logic [DISP_DIGITS-1:0][3:0] c0_digits,
  output logic [DISP_DIGITS-1:0][3:0] m1_digits,   // m1*C0, or C_r in probability mode
  output logic                        m1_neg,
  output logic [DISP_DIGITS-1:0][3:0] m2_digits,
  output logic [DISP_DIGITS-1:0][3:0] m3_digits,
  output logic                        m3_neg,
  output logic [DISP_DIGITS-1:0][3:0] m4_digits,
  // counter-equation (standard deviation) unit
  input  sd_mode_e                    sd_mode,
  input  logic                        sd_go,
  input  logic [2*SD_M-1:0]           sd_n,
  input  logic [SD_M-1:0]             sd_m,
  input  logic                        sd_n_complete,
  output logic [SD_M-1:0]             sd_x,
  output logic [2*SD_M-1:0]           sd_s,
  output logic [DISP_DIGITS-1:0][3:0] sd_digits,
  output logic                        sd_done
);
  logic                  run;
  logic [3:0]            c0_hit;
  logic                  neg;             // sign stored at a.d. start
  logic [LVL_BITS-1:0]   r6;
  logic [ACC2_BITS-1:0]  w2;
  logic [ACC3_BITS-1:0]  w3;
  logic [ACC4_BITS-1:0]  w4;
  logic                  acc_add, prob_hit;
  logic                  m1p_ovf, m1n_ovf, m2_ovf, m3p_ovf, m3n_ovf, m4_ovf;
  logic                  m1_up, m1_dn;
  logic [ACC1_BITS-1:0]  m1p_rem, m1n_rem;
  logic [ACC2_BITS-1:0]  m2_rem;
  logic [ACC3_BITS-1:0]  m3p_rem, m3n_rem;
  logic [ACC4_BITS-1:0]  m4_rem;
  logic                  c0_neg, m2_neg, m4_neg;
  logic [3:0]            m1_hit, m2_hit, m3_hit, m4_hit;
  logic                  sd_rooting;

  assign r6       = ad_data[ADC_BITS-1 -: LVL_BITS];
  assign sampling = run;

  // ---------------- sample timing ----------------
  clock_rate #(.STAGES(6)) u_clock (
    .clk, .clr, .run, .rate_sel, .ad_start
  );

  bcd_counter #(.DIGITS(DISP_DIGITS), .UPDOWN(1'b0)) u_c0 (
    .clk, .clr, .up(ad_start), .dn(1'b0),
    .digits(c0_digits), .neg(c0_neg), .dec_hit(c0_hit)
  );

  timing_control u_timing (
    .clk, .clr, .tmode, .start_sw, .cmp_pos, .size_sel,
    .dec_hit(c0_hit), .run, .done
  );

  // sign flip-flop: sign taken at the start of each conversion
  always_ff @(posedge clk) begin
    if (clr)           neg <= 1'b0;
    else if (ad_start) neg <= ~cmp_pos;
  end

  // ---------------- mode control and probability gate ----------------
  prob_comparator #(.W(PROB_BITS)) u_prob (
    .a(ad_data[ADC_BITS-1 -: PROB_BITS]), .ref_lvl(prob_ref), .neg,
    .sel_neg(prob_sel_neg), .interval(prob_interval), .hit(prob_hit)
  );

  mode_control u_mode (
    .mode, .ad_done, .prob_hit, .m1_pos_ovf(m1p_ovf), .m1_neg_ovf(m1n_ovf),
    .acc_add, .m1_up, .m1_dn
  );

  // ---------------- weighted feed logic ----------------
  wfl_unit #(.LBITS(LVL_BITS)) u_wfl (.r(r6), .w2, .w3, .w4);

  // ---------------- accumulators ----------------
  moment_accumulator #(.M(ACC1_BITS)) u_acc1p (
    .clk, .clr, .add(acc_add & ~neg), .w(ad_data), .ovf(m1p_ovf), .rem(m1p_rem));
  moment_accumulator #(.M(ACC1_BITS)) u_acc1n (
    .clk, .clr, .add(acc_add & neg),  .w(ad_data), .ovf(m1n_ovf), .rem(m1n_rem));
  moment_accumulator #(.M(ACC2_BITS)) u_acc2 (
    .clk, .clr, .add(acc_add),        .w(w2),      .ovf(m2_ovf),  .rem(m2_rem));
  moment_accumulator #(.M(ACC3_BITS)) u_acc3p (
    .clk, .clr, .add(acc_add & ~neg), .w(w3),      .ovf(m3p_ovf), .rem(m3p_rem));
  moment_accumulator #(.M(ACC3_BITS)) u_acc3n (
    .clk, .clr, .add(acc_add & neg),  .w(w3),      .ovf(m3n_ovf), .rem(m3n_rem));
  moment_accumulator #(.M(ACC4_BITS)) u_acc4 (
    .clk, .clr, .add(acc_add),        .w(w4),      .ovf(m4_ovf),  .rem(m4_rem));

  // ---------------- display counters ----------------
  bcd_counter #(.DIGITS(DISP_DIGITS), .UPDOWN(1'b1)) u_m1 (
    .clk, .clr, .up(m1_up), .dn(m1_dn),
    .digits(m1_digits), .neg(m1_neg), .dec_hit(m1_hit));
  bcd_counter #(.DIGITS(DISP_DIGITS), .UPDOWN(1'b0)) u_m2 (
    .clk, .clr, .up(m2_ovf), .dn(1'b0),
    .digits(m2_digits), .neg(m2_neg), .dec_hit(m2_hit));
  bcd_counter #(.DIGITS(DISP_DIGITS), .UPDOWN(1'b1)) u_m3 (
    .clk, .clr, .up(m3p_ovf), .dn(m3n_ovf),
    .digits(m3_digits), .neg(m3_neg), .dec_hit(m3_hit));
  bcd_counter #(.DIGITS(DISP_DIGITS), .UPDOWN(1'b0)) u_m4 (
    .clk, .clr, .up(m4_ovf), .dn(1'b0),
    .digits(m4_digits), .neg(m4_neg), .dec_hit(m4_hit));

  // ---------------- standard deviation extension ----------------
  sigma_unit #(.M(SD_M), .DIGITS(DISP_DIGITS)) u_sigma (
    .clk, .clr, .mode(sd_mode), .go(sd_go), .n_in(sd_n), .m_in(sd_m),
    .n_complete(sd_n_complete), .x(sd_x), .s(sd_s), .x_digits(sd_digits),
    .rooting(sd_rooting), .done(sd_done)
  );
endmodule
