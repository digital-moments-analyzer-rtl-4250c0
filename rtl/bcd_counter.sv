// bcd_counter: decimal display counter, UP or UP/DOWN in sign and magnitude.
//
// Holds DIGITS binary-coded decimal digits and, for the UP/DOWN type, a sign.
// An up pulse adds one to the signed value and a down pulse subtracts one, so a
// count that falls below zero shows as a negative magnitude: the display reads
// sign and magnitude directly. With UPDOWN = 0 the down input is ignored and
// the sign stays positive (the counters of the even moments and of the sample
// size). Up and down together cancel.
//
// dec_hit[i] is high while the count equals +10^(3+i), i = 0..3: the outputs at
// 10^3, 10^4, 10^5 and 10^6 counts that the timing control uses to stop a
// fixed-sample-size run. Counts go at the clock edge; clr clears to +0.
// The counter wraps past 10^DIGITS - 1, as a hardware decade chain would.
//
// Following the published design: UP counters for C0 and the even moments,
// UP/DOWN counters for the odd moments, and stop pulses at 10^3..10^6 from the
// sample-size counter. Own choices: seven digits, the sign-magnitude form of
// the UP/DOWN count, and wrap-around beyond 9999999.
module bcd_counter
  import spc_pkg::*;
#(
  parameter int unsigned DIGITS = 7,   // decimal digits
  parameter bit          UPDOWN = 1'b1 // 1: UP/DOWN counter, 0: UP counter
) (
  input  logic                   clk,
  input  logic                   clr,
  input  logic                   up,
  input  logic                   dn,
  output logic [DIGITS-1:0][3:0] digits,  // digits[0] is the units digit
  output logic                   neg,     // sign of the count
  output logic [3:0]             dec_hit  // count == 10^3, 10^4, 10^5, 10^6
);
  typedef logic [DIGITS-1:0][3:0] mag_t;

  function automatic mag_t bcd_inc(mag_t v);
    mag_t r = v;
    for (int i = 0; i < DIGITS; i++) begin
      if (r[i] == 4'd9) r[i] = 4'd0;
      else begin
        r[i] = r[i] + 4'd1;
        break;
      end
    end
    return r;
  endfunction

  function automatic mag_t bcd_dec(mag_t v);
    mag_t r = v;
    for (int i = 0; i < DIGITS; i++) begin
      if (r[i] == 4'd0) r[i] = 4'd9;
      else begin
        r[i] = r[i] - 4'd1;
        break;
      end
    end
    return r;
  endfunction

  logic step_up, step_dn, is_zero, is_one;

  always_comb begin
    step_up = up & ~(dn & UPDOWN);
    step_dn = dn & ~up & UPDOWN;
    is_zero = (digits == '0);
    is_one  = (digits == mag_t'(1));
    for (int i = 0; i < 4; i++)
      dec_hit[i] = (3 + i < DIGITS) && !neg &&
                   (digits == (mag_t'(1) << (4 * (3 + i))));
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      digits <= '0;
      neg    <= 1'b0;
    end else if (step_up) begin
      if (!neg) digits <= bcd_inc(digits);
      else begin
        digits <= bcd_dec(digits);
        if (is_one) neg <= 1'b0;
      end
    end else if (step_dn) begin
      if (neg || is_zero) begin
        digits <= bcd_inc(digits);
        neg    <= 1'b1;
      end else digits <= bcd_dec(digits);
    end
  end
endmodule
