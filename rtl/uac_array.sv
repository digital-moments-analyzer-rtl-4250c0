// uac_array: general multiplier / non-restoring divider array of universal
// arithmetic cells.
//
// The array has NL rows. Row i holds NM + i cells; all rows end at the same
// most significant position and each row reaches one position lower than the
// row above, giving NL*(2*NM+NL-1)/2 cells (n(3n-1)/2 for an n x n array).
// Positions are numbered 0 (lowest cell of the last row) to NL+NM-2.
//   * B: the M operand enters the top row at positions NL-1..NL+NM-2 and moves
//     one position down in every following row (M shifted right per row);
//     positions above the shifted M see B = 0.
//   * A: a cell's A input is the S output of the cell at the same position in
//     the row above. The A inputs left free - the whole top row and the lowest
//     cell of every other row - form the NL+NM-1 bit input k.
//   * C: carries ripple from the lowest cell of a row towards its top; the
//     lowest cell has C = 0. The carry/borrow out of the top cell is P_i.
// A row control block (one per row) sets the mode of the array with z:
//   z = 0, multiply:  D_i = l[NL-1-i] (multiplier, m.s.b. first), F_i = 0.
//                     y = l*m + k. The S outputs of the last row are y's lower
//                     bits; y's m.s.b. is the OR of D_i & P_i over the rows.
//   z = 1, divide:    D_i = 1, F_0 = 1 (subtract), and
//                     q_i = F_(i+1) = F_i ^ P_i (non-restoring rule: add the
//                     divisor back on the next row after a negative result).
//                     k is the dividend, m the divisor; q (m.s.b. = q[NL-1])
//                     is floor(k / m) when k < m * 2^NL. rem is the last row's
//                     result, corrected by adding m once when it is negative.
// The cell count and the mode rules follow the published array; the ripple
// of the carries along each row (the published multiplier passes them
// diagonally to the next row, carry save, with the same result) and the
// use of k as the dividend lines (which puts an NM-bit dividend on the top
// row when shifted left by NL-1) are this implementation's choice. The
// array is combinational.
module uac_array #(
  parameter int unsigned NL = 3,   // rows: multiplier bits / quotient bits
  parameter int unsigned NM = 3    // multiplicand / divisor bits
) (
  input  logic               z,    // 0: multiply, 1: divide
  input  logic [NL-1:0]      l,    // multiplier (row D controls)
  input  logic [NM-1:0]      m,    // multiplicand / divisor
  input  logic [NL+NM-2:0]   k,    // free A inputs: addend K / dividend
  output logic [NL+NM-1:0]   y,    // l*m + k
  output logic [NL-1:0]      q,    // quotient
  output logic [NM-1:0]      rem   // remainder
);
  localparam int unsigned W  = NL + NM - 1;  // positions per row (max)
  localparam int unsigned HI = W - 1;        // top position

  logic [W-1:0] s_o [NL];   // S outputs
  logic [W-1:0] p_o [NL];   // P outputs
  logic [W-1:0] a_i [NL];
  logic [W-1:0] b_i [NL];
  logic [W-1:0] c_i [NL];
  logic [NL:0]  f_row;      // F of each row (f_row[NL] unused)
  logic [NL-1:0] d_row;
  logic [NL-1:0] top_p;
  logic [NL-1:0] msb_or;

  assign f_row[0] = z;

  for (genvar i = 0; i < NL; i++) begin : g_row
    localparam int unsigned LO = NL - 1 - i;   // lowest position of row i

    // row control block
    assign d_row[i]   = z ? 1'b1 : l[NL-1-i];
    assign top_p[i]   = p_o[i][HI];
    assign f_row[i+1] = z ? (f_row[i] ^ top_p[i]) : 1'b0;
    assign q[NL-1-i]  = f_row[i] ^ top_p[i];
    assign msb_or[i]  = d_row[i] & top_p[i] & ~z;

    for (genvar p = 0; p < W; p++) begin : g_pos
      if (p < LO) begin : g_none
        assign s_o[i][p] = (i == 0) ? 1'b0 : s_o[i > 0 ? i - 1 : 0][p];
        assign p_o[i][p] = 1'b0;
        assign a_i[i][p] = 1'b0;
        assign b_i[i][p] = 1'b0;
        assign c_i[i][p] = 1'b0;
      end else begin : g_cell
        // B: m shifted right by i; positions above it get 0
        if (p - LO < NM) begin : g_b
          assign b_i[i][p] = m[p - LO];
        end else begin : g_b0
          assign b_i[i][p] = 1'b0;
        end
        // A: free input on the top row and the lowest cell, else from above
        if (i == 0 || p == LO) begin : g_ak
          assign a_i[i][p] = k[p];
        end else begin : g_as
          assign a_i[i][p] = s_o[i > 0 ? i - 1 : 0][p];
        end
        if (p == LO) begin : g_c0
          assign c_i[i][p] = 1'b0;
        end else begin : g_cr
          assign c_i[i][p] = p_o[i][p > 0 ? p - 1 : 0];
        end
        uac u_cell (
          .a (a_i[i][p]),
          .b (b_i[i][p]),
          .c (c_i[i][p]),
          .d (d_row[i]),
          .f (f_row[i]),
          .s (s_o[i][p]),
          .p (p_o[i][p]),
          .u (),
          .v (),
          .g ()
        );
      end
    end
  end

  always_comb begin
    y   = {|msb_or, s_o[NL-1]};
    rem = s_o[NL-1][NM-1:0] + (q[0] ? '0 : m);
  end
endmodule
