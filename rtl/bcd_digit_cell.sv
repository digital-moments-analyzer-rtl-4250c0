// bcd_digit_cell: decimal sub-array, one digit position of a BCD multiplier.
//
// Computes, for BCD digits A, D, B and C,
//   P = (A*D + B + C) mod 10     Q = (A*D + B + C) div 10
// and repeats D on F and A on G for the neighbouring sub-arrays. The result
// never exceeds 9*9 + 9 + 9 = 99. Three pieces, all built from universal
// arithmetic cells:
//   * a 4 x 4 multiplier array forming A*D + B (B enters on the addend lines),
//   * a 7-bit adder row of cells adding C,
//   * the same array type in divide mode dividing the 7-bit sum by 1010 (ten),
//     4 rows, giving the 4-bit quotient Q and the remainder P.
// Multiplication and division use one array design, as intended for a single
// integrated sub-array. Combinational.
//
// Following the published design: a 4x4 multiplier array, an adding row and
// one division by ten per sub-array. Own choice: how the second carry-in is
// added (one extra row of cells) and the use of the general array for the
// division.
module bcd_digit_cell (
  input  logic [3:0] a,   // multiplicand digit
  input  logic [3:0] d,   // multiplier digit
  input  logic [3:0] b,   // partial-sum digit
  input  logic [3:0] c,   // carry digit
  output logic [3:0] p,   // result digit
  output logic [3:0] q,   // carry digit out
  output logic [3:0] f,   // D repeated
  output logic [3:0] g    // A repeated
);
  logic [7:0] prod;       // A*D + B, at most 90
  logic [6:0] sum;        // + C, at most 99
  logic [7:0] add_c;      // carry chain of the adder row
  logic [6:0] c_ext;      // C widened to the adder row
  logic [3:0] q_unused_mul;
  logic [3:0] rem_unused_mul;
  logic [7:0] y_unused_div;

  uac_array #(.NL(4), .NM(4)) u_mul (
    .z   (1'b0),
    .l   (d),
    .m   (a),
    .k   ({3'b000, b}),
    .y   (prod),
    .q   (q_unused_mul),
    .rem (rem_unused_mul)
  );

  assign c_ext    = {3'b000, c};
  assign add_c[0] = 1'b0;
  for (genvar i = 0; i < 7; i++) begin : g_add
    uac u_add (
      .a (prod[i]),
      .b (c_ext[i]),
      .c (add_c[i]),
      .d (1'b1),
      .f (1'b0),
      .s (sum[i]),
      .p (add_c[i+1]),
      .u (),
      .v (),
      .g ()
    );
  end

  uac_array #(.NL(4), .NM(4)) u_div (
    .z   (1'b1),
    .l   (4'd0),
    .m   (4'd10),
    .k   (sum),
    .y   (y_unused_div),
    .q   (q),
    .rem (p)
  );

  assign f = d;
  assign g = a;
endmodule
