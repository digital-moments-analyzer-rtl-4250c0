// booth_array: multiplier array for signed (two's complement) numbers.
//
// Uses Booth's rule on the multiplier x, taken from its sign bit downwards:
// row k looks at the bit pair (x_k, x_(k+1)), where x_0 is the sign bit and a 0
// is appended after the last bit. A one-bit comparator per row sets the cells
// of that row (ternary operation of the universal cell):
//   x_k > x_(k+1): F = 1, D = 1  subtract the shifted multiplicand
//   x_k < x_(k+1): F = 0, D = 1  add it
//   x_k = x_(k+1): D = 0         pass the partial sum unchanged
// Row k has N + k cells (N(3N-1)/2 in all). The multiplicand y enters the top
// row and moves one place down per row; the cells above it in a row take the
// B input of their lower neighbour, which sign-extends the shifted y. Each
// row's sum is kept modulo its width (its top carry is dropped) and passes
// straight down; every row adds one cell below. No shift follows the last row,
// so its S outputs are the 2N-1 bit product in two's complement. Carries
// ripple upward within a row. Combinational.
// The only product that does not fit is (-2^(N-1)) * (-2^(N-1)).
//
// Booth recoding and the ternary rows follow the published array; the exact
// placement of the cells and the 2N-1 bit product width are this design's own.
module booth_array #(
  parameter int unsigned N = 3   // bits of x and y including the sign
) (
  input  logic [N-1:0]   x,      // multiplier
  input  logic [N-1:0]   y,      // multiplicand
  output logic [2*N-2:0] prod    // x * y
);
  localparam int unsigned W = 2 * N - 1;

  logic [W-1:0] s_o [N];
  logic [W-1:0] p_o [N];
  logic [W-1:0] a_i [N];
  logic [W-1:0] b_i [N];
  logic [W-1:0] c_i [N];
  logic [N-1:0] d_row, f_row;
  logic [N:0]   xb;          // x bits from the sign down, 0 appended

  for (genvar k = 0; k < N; k++) begin : g_xb
    assign xb[k] = x[N-1-k];
  end
  assign xb[N] = 1'b0;

  for (genvar k = 0; k < N; k++) begin : g_row
    localparam int unsigned LO = N - 1 - k;
    // one-bit comparator
    assign f_row[k] = xb[k] & ~xb[k+1];
    assign d_row[k] = xb[k] ^ xb[k+1];

    for (genvar p = 0; p < W; p++) begin : g_pos
      if (p < LO) begin : g_none
        assign s_o[k][p] = 1'b0;
        assign p_o[k][p] = 1'b0;
        assign a_i[k][p] = 1'b0;
        assign b_i[k][p] = 1'b0;
        assign c_i[k][p] = 1'b0;
      end else begin : g_cell
        if (p - LO < N) begin : g_b
          assign b_i[k][p] = y[p - LO];
        end else begin : g_bx
          assign b_i[k][p] = y[N-1];      // sign extension
        end
        if (k == 0 || p == LO) begin : g_a0
          assign a_i[k][p] = 1'b0;
        end else begin : g_as
          assign a_i[k][p] = s_o[k > 0 ? k - 1 : 0][p];
        end
        if (p == LO) begin : g_c0
          assign c_i[k][p] = 1'b0;
        end else begin : g_cr
          assign c_i[k][p] = p_o[k][p > 0 ? p - 1 : 0];
        end
        uac u_cell (
          .a (a_i[k][p]),
          .b (b_i[k][p]),
          .c (c_i[k][p]),
          .d (d_row[k]),
          .f (f_row[k]),
          .s (s_o[k][p]),
          .p (p_o[k][p]),
          .u (),
          .v (),
          .g ()
        );
      end
    end
  end

  assign prod = s_o[N-1];
endmodule
