// wfl_array: weighted feed logic built from universal-arithmetic-cell arrays.
//
// Produces the same weighting numbers as the minimised logic (wfl_unit) but
// from three copies of one regular array, which scale to more level bits by
// adding cells:
//   R  = r*r + r              6 x 6 array, L = M = K = r       -> W2 = R
//   W3 = R*r + R/2            6 x 12 array, K = R shifted right once
//   W4 = R*R                  12 x 12 array, K = 0
// (W3 = R(2r+1)/2 and R is always even.) Combinational.
//
// The three arrays, their sizes and the forms R*r + R/2 and R*R follow the
// published proposal; only the carry wiring inside each array is this
// design's own (see uac_array).
module wfl_array #(
  parameter int unsigned LBITS = 6   // level bits
) (
  input  logic [LBITS-1:0]   r,
  output logic [2*LBITS-1:0] w2,
  output logic [3*LBITS-1:0] w3,
  output logic [4*LBITS-1:0] w4
);
  localparam int unsigned RB = 2 * LBITS;   // width of R

  logic [RB-1:0]        rr;
  logic [LBITS-1:0]     q2_unused;
  logic [LBITS-1:0]     rem2_unused;
  logic [LBITS-1:0]     q3_unused;
  logic [RB-1:0]        rem3_unused;
  logic [RB-1:0]        q4_unused;
  logic [RB-1:0]        rem4_unused;

  uac_array #(.NL(LBITS), .NM(LBITS)) u_w2 (
    .z   (1'b0),
    .l   (r),
    .m   (r),
    .k   ((2*LBITS-1)'(r)),
    .y   (rr),
    .q   (q2_unused),
    .rem (rem2_unused)
  );

  uac_array #(.NL(LBITS), .NM(RB)) u_w3 (
    .z   (1'b0),
    .l   (r),
    .m   (rr),
    .k   ((LBITS+RB-1)'(rr[RB-1:1])),
    .y   (w3),
    .q   (q3_unused),
    .rem (rem3_unused)
  );

  uac_array #(.NL(RB), .NM(RB)) u_w4 (
    .z   (1'b0),
    .l   (rr),
    .m   (rr),
    .k   ('0),
    .y   (w4),
    .q   (q4_unused),
    .rem (rem4_unused)
  );

  assign w2 = rr;
endmodule
