// moment_accumulator: one-step circulating accumulator for one moment.
//
// An M-bit parallel adder adds the weighting number of the current sample (B)
// to the stored remainder (A). The carry-out of the adder is the overflow: the
// running total has reached 2^M = n^k, so one unit of m_k*C0 is complete. The
// M sum bits, i.e. the remainder of the division by n^k, are written back to the
// register. Division by n^k thus costs nothing.
//
// Timing: when add is high the sum settles combinationally, ovf is high in that
// same cycle (it gates the a.d. done pulse to a display counter), and the
// register takes the remainder at the clock edge. The register is cleared by the
// analyser's clear pulse. Because the weighting number is below 2^M, at most one
// overflow can occur per sample.
//
// The adder-plus-register accumulator follows the published design. Own
// choice: the remainder is stored on the add clock rather than on the next
// a.d. start.
module moment_accumulator #(
  parameter int unsigned M = 24   // accumulator width l*k
) (
  input  logic         clk,
  input  logic         clr,   // synchronous clear (the single clear pulse)
  input  logic         add,   // a.d. done, gated to this accumulator
  input  logic [M-1:0] w,     // weighting number of this sample
  output logic         ovf,   // carry-out: one count of m_k*C0
  output logic [M-1:0] rem    // fractional remainder held in the register
);
  logic [M:0] sum;

  always_comb begin
    sum = {1'b0, rem} + {1'b0, w};
    ovf = add & sum[M];
  end

  always_ff @(posedge clk) begin
    if (clr)      rem <= '0;
    else if (add) rem <= sum[M-1:0];
  end
endmodule
