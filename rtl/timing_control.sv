// timing_control: decides when the analyser samples.
//
// One-cycle mode (for periodic inputs): the sign comparator doubles as a zero-
// crossing detector. Its negative-going edge (input passing from positive to
// negative) toggles flip-flop 1; while flip-flop 1 is set the master clock runs.
// The next negative-going edge, exactly one input period later, clears flip-
// flop 1 and stops sampling; that same change sets flip-flop 2, which locks the
// circuit until the next clear.
//
// Fixed-sample-size mode: a start request sets an R-S flip-flop that enables
// the master clock; the sample-size counter's output at the selected count
// (10^3, 10^4, 10^5 or 10^6, size_sel = 0..3) resets it.
//
// Both modes are cleared by clr. cmp_pos is treated as synchronous to clk; a
// real comparator output would be passed through a synchroniser first. Outputs:
// run (master clock enable, also the "sampling" lamp) and done (the run ended).
//
// Both modes follow the published control circuit. Own choice: the comparator
// is sampled by the master clock and its edges are found synchronously, rather
// than clocking the flip-flops from the comparator itself.
module timing_control
  import spc_pkg::*;
(
  input  logic         clk,
  input  logic         clr,
  input  timing_mode_e tmode,
  input  logic         start_sw,  // manual start (fixed mode), level or pulse
  input  logic         cmp_pos,   // sign comparator: 1 while the input is positive
  input  logic [1:0]   size_sel,  // 0: 10^3 ... 3: 10^6 samples
  input  logic [3:0]   dec_hit,   // sample counter at 10^3 .. 10^6
  output logic         run,
  output logic         done
);
  logic cmp_d, beta;
  logic q1, q2;          // one-cycle mode flip-flops
  logic rs, stopped;     // fixed mode R-S flip-flop and its end marker
  logic stop_pulse;

  always_comb begin
    beta       = cmp_d & ~cmp_pos;         // negative-going edge
    stop_pulse = dec_hit[size_sel];
    run        = (tmode == TIME_ONE_CYCLE) ? q1 : rs;
    done       = (tmode == TIME_ONE_CYCLE) ? q2 : stopped;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      cmp_d   <= 1'b0;
      q1      <= 1'b0;
      q2      <= 1'b0;
      rs      <= 1'b0;
      stopped <= 1'b0;
    end else begin
      cmp_d <= cmp_pos;
      if (tmode == TIME_ONE_CYCLE) begin
        if (beta && !q2) begin
          q1 <= ~q1;
          if (q1) q2 <= 1'b1;        // Q1 falling triggers flip-flop 2
        end
      end else begin
        if (stop_pulse && rs) begin
          rs      <= 1'b0;
          stopped <= 1'b1;
        end else if (start_sw && !stopped) begin
          rs <= 1'b1;
        end
      end
    end
  end
endmodule
