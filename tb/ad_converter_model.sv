// ad_converter_model: behavioural model of the 8-bit successive-approximation
// converter, for simulation only.
//
// On each one-cycle ad_start it samples level (the rectified input already
// quantised to 0..255) and, CONV_CYCLES clock cycles later, presents it on
// ad_data together with a one-cycle ad_done pulse, as the real converter does
// after its 8 us conversion at 1 us per bit. The analog part (reference,
// comparator, ladder) is not modelled.
//
// Behavioural model for testbenches only. It follows the published timing
// (conversion done within 8 us, i.e. 8 master-clock cycles); the rest, such as
// the one-cycle done pulse, is this model's own.
module ad_converter_model #(
  parameter int unsigned CONV_CYCLES = 8
) (
  input  logic       clk,
  input  logic       ad_start,
  input  logic [7:0] level,
  output logic       ad_done,
  output logic [7:0] ad_data
);
  int   count = 0;
  logic [7:0] held = '0;

  initial begin
    ad_done = 1'b0;
    ad_data = '0;
  end

  always_ff @(posedge clk) begin
    ad_done <= 1'b0;
    if (ad_start) begin
      held  <= level;
      count <= CONV_CYCLES;
    end else if (count > 1) begin
      count <= count - 1;
    end else if (count == 1) begin
      count   <= 0;
      ad_done <= 1'b1;
      ad_data <= held;
    end
  end
endmodule
