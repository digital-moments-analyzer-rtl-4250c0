// bcd_mult_array: decimal multiplier built from BCD sub-arrays.
//
// Computes X*Y + K1 + K2 for ND-digit BCD numbers; the result has 2*ND digits
// and cannot overflow. Row j of sub-arrays handles multiplier digit Y_j: cell
// (j, i) forms X_i * Y_j + B + C, where B is the digit at the same weight from
// the row above (K1 for the first row; the row above's carry-out for the top
// cell) and C is the carry digit from the cell one place lower in the same
// row (K2_j for the lowest cell). Each row's lowest result digit is final;
// the last row supplies the top ND digits and the final carry.
// This arrangement uses ND*ND sub-arrays with carries rippling along each row;
// the published array resolves carries diagonal by diagonal with
// ND(3ND+1)/2 sub-arrays and is faster. Combinational.
//
// The function X*Y+K1+K2 and the decimal sub-array are from the published
// design; the grid of ND*ND sub-arrays and its ripple wiring are this design's
// own.
module bcd_mult_array #(
  parameter int unsigned ND = 3   // decimal digits of each operand
) (
  input  logic [ND-1:0][3:0]   x,   // multiplicand, digit 0 = units
  input  logic [ND-1:0][3:0]   y,   // multiplier
  input  logic [ND-1:0][3:0]   k1,  // addend 1
  input  logic [ND-1:0][3:0]   k2,  // addend 2
  output logic [2*ND-1:0][3:0] prod
);
  logic [ND-1:0][3:0] pd [ND];   // result digits of each row
  logic [ND-1:0][3:0] qd [ND];   // carry digits of each row

  for (genvar j = 0; j < ND; j++) begin : g_row
    for (genvar i = 0; i < ND; i++) begin : g_col
      logic [3:0] b_in, c_in;
      if (j == 0) begin : g_bk
        assign b_in = k1[i];
      end else if (i == ND - 1) begin : g_bq
        assign b_in = qd[j > 0 ? j - 1 : 0][ND-1];
      end else begin : g_bp
        assign b_in = pd[j > 0 ? j - 1 : 0][i + 1];
      end
      if (i == 0) begin : g_ck
        assign c_in = k2[j];
      end else begin : g_cq
        assign c_in = qd[j][i > 0 ? i - 1 : 0];
      end
      bcd_digit_cell u_cell (
        .a (x[i]),
        .d (y[j]),
        .b (b_in),
        .c (c_in),
        .p (pd[j][i]),
        .q (qd[j][i]),
        .f (),
        .g ()
      );
    end
    assign prod[j] = pd[j][0];
  end

  for (genvar i = 1; i < ND; i++) begin : g_top
    assign prod[ND - 1 + i] = pd[ND-1][i];
  end
  assign prod[2*ND-1] = qd[ND-1][ND-1];
endmodule
