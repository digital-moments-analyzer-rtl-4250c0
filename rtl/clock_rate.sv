// clock_rate: sample-rate generator.
//
// The analyser runs from a 1 MHz master clock (clk). A chain of STAGES
// divide-by-ten counters produces rates of 100 kHz, 10 kHz, ... down to 1 Hz;
// rate_sel picks one (0 = 100 kHz, 5 = 1 Hz), as the rotary switch does. The
// master clock is gated by run (start/stop from the timing control): while run
// is low the dividers hold. Each period of the selected rate produces one
// a.d. start pulse, one master-clock cycle (1 us) wide: the synchronous form of
// the pulse shortener in front of the converter. The same pulse feeds the
// sample-size counter.
//
// Timing: the first pulse comes one full period of the selected rate after run
// rises from a cleared state. The highest selectable rate is 100 kHz because
// the converter needs 8 us per sample; 1 MHz itself is not offered.
//
// Following the published design: a 1 MHz master clock, decade dividers down
// to 1 Hz, and start/stop gating from the timing control. Own choice: the a.d.
// start pulse is one master-clock cycle wide.
module clock_rate #(
  parameter int unsigned STAGES = 6   // decades below the master clock: 1 MHz -> 1 Hz
) (
  input  logic                      clk,       // 1 MHz master clock
  input  logic                      clr,
  input  logic                      run,       // start/stop gate
  input  logic [$clog2(STAGES)-1:0] rate_sel,  // 0: 100 kHz ... STAGES-1: 1 Hz
  output logic                      ad_start   // one-cycle convert pulse
);
  logic [STAGES-1:0][3:0] cnt;
  logic [STAGES-1:0]      tick;   // tick[s]: end of a 10^(s+1)-cycle period

  assign tick[0] = run && (cnt[0] == 4'd9);
  for (genvar s = 1; s < STAGES; s++) begin : g_tick
    assign tick[s] = tick[s-1] && (cnt[s] == 4'd9);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      cnt      <= '0;
      ad_start <= 1'b0;
    end else begin
      for (int s = 0; s < STAGES; s++) begin
        if (run && (s == 0 || tick[s > 0 ? s - 1 : 0]))
          cnt[s] <= (cnt[s] == 4'd9) ? 4'd0 : cnt[s] + 4'd1;
      end
      ad_start <= (32'(rate_sel) < STAGES) ? tick[rate_sel] : 1'b0;
    end
  end
endmodule
