// sigma_unit: counter-equation unit for square root, squaring and standard deviation.
//
// A counter x and a register S are kept so that S tracks x^2. Each step compares
// S with N (or, when squaring, x with M) and moves one way:
//   below:  x <- x + 1,  S <- S + 2x_old + 1        (true feed 2x, carry-in 1)
//   above:  x <- x - 1,  S <- S + ~(2x_new)         (ones complement of 2x_new)
// The second line is S - 2x_new - 1 in twos-complement form, so one adder with
// true/complement gates serves both directions: the gates pass 2x (x wired one
// place left, l.s.b. 0) when S < N and its complement when S > N, and the
// comparator output S < N is also the adder's carry-in.
//
// Modes (sd_mode_e):
//   SD_SQRT    x follows sqrt(N) for a possibly changing N.
//   SD_SQUARE  x follows M; S then holds M^2 exactly when x = M.
//   SD_SIGMA   first squares M (the first moment) into S; when x = M and the
//              input is complete, x is cleared with S kept and the unit roots
//              N (the second moment) against S = M^2 + x^2, leaving
//              x = sqrt(N - M^2) within one count.
// Stepping stops (clock inhibit) when the compared quantities are equal, when
// go is low, or, once n_complete has been high for a cycle (a settling delay),
// at the first change of comparator state from below to above (flip-flop F1)
// or from above to below (F2). This prevents the last bit from oscillating
// when the root is not an integer. The flip-flops are held clear while the
// input is not complete or while N changes.
//
// N is taken into a buffer register every cycle, so N may change between
// steps but never during one. One step takes one clock cycle (1 us at 1 MHz).
// x is also counted in a decimal up/down counter for direct readout.
// M = 20 gives the 40-bit system needed for sample sizes up to 10^6.
//
// The counter equations, the comparator, the N buffer, the F1/F2 inhibit and
// the squaring-then-rooting sequence follow the published unit. Own choices:
// the inhibit acts on the first turn-round, so from a cleared x the result
// is the ceiling of the root (the floor when x comes down from above); the 200 ns settling delay is one clock; and the change-over to
// rooting is made inside the unit.
module sigma_unit
  import spc_pkg::*;
#(
  parameter int unsigned M      = 20,  // x width; S and N are 2M bits
  parameter int unsigned DIGITS = 7    // decimal readout digits of x
) (
  input  logic                   clk,
  input  logic                   clr,         // clears x, S, buffers and flags
  input  sd_mode_e               mode,
  input  logic                   go,          // clock enable
  input  logic [2*M-1:0]         n_in,        // number to root (m2 in sigma mode)
  input  logic [M-1:0]           m_in,        // number to square (m1 in sigma mode)
  input  logic                   n_complete,  // inputs are final
  output logic [M-1:0]           x,
  output logic [2*M-1:0]         s,
  output logic [DIGITS-1:0][3:0] x_digits,    // x in decimal
  output logic                   rooting,     // sigma mode: second phase active
  output logic                   done         // result final and clock inhibited
);
  logic [2*M-1:0] nbuf;
  logic [M-1:0]   mbuf;
  logic           ncomp_d;
  logic           f1, f2;
  logic           prev_lt, prev_gt, prev_valid;
  logic           lt, gt, eq, square_cmp;
  logic           turn, inhibit, step, up_step, dn_step;
  logic [M-1:0]   x_new;
  logic [2*M-1:0] tc_out, s_sum;
  logic           phase_end;
  logic           bcd_neg_unused;
  logic [3:0]     bcd_hit_unused;

  always_comb begin
    square_cmp = (mode == SD_SQUARE) || (mode == SD_SIGMA && !rooting);
    if (square_cmp) begin
      lt = x < mbuf;
      gt = x > mbuf;
    end else begin
      lt = s < nbuf;
      gt = s > nbuf;
    end
    eq      = !lt && !gt;
    // F1/F2 stop the clock at the very transition, before another step
    turn    = ncomp_d && prev_valid && nbuf == n_in && mbuf == m_in &&
              ((prev_lt && gt) || (prev_gt && lt));
    inhibit = !go || eq || f1 || f2 || turn;
    step    = !inhibit;
    up_step = step && lt;
    dn_step = step && gt;
    x_new   = lt ? x + 1'b1 : x - 1'b1;
    // true/complement gates fed with x shifted one place left
    tc_out  = lt ? {{(M-1){1'b0}}, x, 1'b0} : ~{{(M-1){1'b0}}, x_new, 1'b0};
    s_sum   = s + tc_out + {{(2*M-1){1'b0}}, lt};
    // sigma mode: "square of m1 complete" once x = M with final inputs
    phase_end = (mode == SD_SIGMA) && !rooting && eq && ncomp_d && go;
    done      = ncomp_d && (eq || f1 || f2 || turn) &&
                ((mode != SD_SIGMA) || rooting);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      x          <= '0;
      s          <= '0;
      nbuf       <= '0;
      mbuf       <= '0;
      ncomp_d    <= 1'b0;
      f1         <= 1'b0;
      f2         <= 1'b0;
      prev_lt    <= 1'b0;
      prev_gt    <= 1'b0;
      prev_valid <= 1'b0;
      rooting    <= 1'b0;
    end else begin
      nbuf    <= n_in;
      mbuf    <= m_in;
      ncomp_d <= n_complete;
      if (phase_end) begin
        // clear everything but S, then root N against S = M^2 + x^2
        x          <= '0;
        rooting    <= 1'b1;
        f1         <= 1'b0;
        f2         <= 1'b0;
        prev_valid <= 1'b0;
      end else begin
        if (step) begin
          x <= x_new;
          s <= s_sum;
        end
        if (!ncomp_d || nbuf != n_in || mbuf != m_in) begin
          f1 <= 1'b0;
          f2 <= 1'b0;
        end else if (prev_valid) begin
          if (prev_lt && gt) f1 <= 1'b1;
          if (prev_gt && lt) f2 <= 1'b1;
        end
        if (go) begin
          prev_lt    <= lt;
          prev_gt    <= gt;
          prev_valid <= 1'b1;
        end
      end
    end
  end

  // decimal readout counter that follows x
  bcd_counter #(.DIGITS(DIGITS), .UPDOWN(1'b1)) u_readout (
    .clk     (clk),
    .clr     (clr || phase_end),
    .up      (up_step && !phase_end),
    .dn      (dn_step && !phase_end),
    .digits  (x_digits),
    .neg     (bcd_neg_unused),
    .dec_hit (bcd_hit_unused)
  );
endmodule
