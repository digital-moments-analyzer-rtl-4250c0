// sqrt_array: non-restoring square-root array of universal arithmetic cells.
//
// Extracts the N-bit root of a 2N-bit number X. The radicand is taken in bit
// pairs from the top; row i brings down one more pair and holds 2i+2 cells
// (N(N+1) cells in all). All cells have D = 1; F of a row selects subtract
// (F = 1) or add (F = 0). Row 0 subtracts 01 from the top pair. After each
// row the root bit is F ^ P (P: borrow/carry out of the row's top cell), and
// it is also the F of the next row - the rule of non-restoring division:
//   remainder >= 0: root bit 1, subtract (4*root + 01) next
//   remainder <  0: root bit 0, add      (4*root + 11) next
// The number fed to row i is therefore: l.s.b. 1, then not(SA), then SA (SA
// = the previous root bit = this row's F), then the earlier root bits. A row's
// A inputs are the S outputs of the row above at the same positions plus the
// new pair below them. Carries ripple upward within a row. Combinational.
//
// The non-restoring rule and the growth of the rows by two cells follow the
// published array; the wiring of the fed number within a row is this design's
// own.
module sqrt_array #(
  parameter int unsigned N = 2   // root bits; radicand has 2N bits
) (
  input  logic [2*N-1:0] x,      // radicand
  output logic [N-1:0]   root    // floor(sqrt(x))
);
  localparam int unsigned W = 2 * N;

  logic [W-1:0] s_o [N];
  logic [W-1:0] p_o [N];
  logic [W-1:0] a_i [N];
  logic [W-1:0] b_i [N];
  logic [W-1:0] c_i [N];
  logic [N:0]   f_row;
  logic [N-1:0] q;            // q[i]: root bit from row i (m.s.b. first)

  assign f_row[0] = 1'b1;

  for (genvar i = 0; i < N; i++) begin : g_row
    localparam int unsigned LO = W - 2 - 2 * i;
    assign q[i]       = f_row[i] ^ p_o[i][W-1];
    assign f_row[i+1] = q[i];
    assign root[N-1-i] = q[i];

    for (genvar p = 0; p < W; p++) begin : g_pos
      localparam int J = int'(p) - int'(LO);  // bit index within the fed number
      if (p < LO) begin : g_none
        assign s_o[i][p] = 1'b0;
        assign p_o[i][p] = 1'b0;
        assign a_i[i][p] = 1'b0;
        assign b_i[i][p] = 1'b0;
        assign c_i[i][p] = 1'b0;
      end else begin : g_cell
        // number to add or subtract: {earlier root bits, SA, ~SA, 1}
        if (J == 0) begin : g_b1
          assign b_i[i][p] = 1'b1;
        end else if (J == 1) begin : g_bnsa
          assign b_i[i][p] = ~f_row[i];
        end else if (J < i + 2) begin : g_bq
          assign b_i[i][p] = q[i + 1 - J];   // J = 2: SA = q[i-1]
        end else begin : g_bz
          assign b_i[i][p] = 1'b0;
        end
        if (i == 0 || p < LO + 2) begin : g_ax
          assign a_i[i][p] = x[p];
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
          .d (1'b1),
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
endmodule
