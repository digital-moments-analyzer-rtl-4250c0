// wfl_unit: weighted feed logic for the second, third and fourth moments.
//
// A sample whose highest level exceeded is r adds, to the k-th moment
// accumulator, the weighting number W(k,r) = sum_{q=1..r} k*q^(k-1):
//   W2 = r(r+1)   W3 = r(r+1)(2r+1)/2   W4 = r^2 (r+1)^2
// For six-bit levels these need 12, 18 and 24 output lines. The first moment
// needs no logic: its weighting number is r itself.
//
// The unit is a simultaneous (purely combinational) multiplier: every output
// line is a fixed function of the six level bits, settled within one clock.
// The reference design minimised each line to NAND/NAND form by computer;
// here the same functions are written as products and left to synthesis.
//
// The formulas are the published ones. Writing them as arithmetic instead of
// the published minimised gates is this design's own choice.
module wfl_unit #(
  parameter int unsigned LBITS = 6   // level bits
) (
  input  logic [LBITS-1:0]   r,   // highest level exceeded (magnitude)
  output logic [2*LBITS-1:0] w2,  // r(r+1)
  output logic [3*LBITS-1:0] w3,  // r(r+1)(2r+1)/2
  output logic [4*LBITS-1:0] w4   // r^2 (r+1)^2
);
  logic [2*LBITS-1:0] rr1;        // r(r+1)
  logic [3*LBITS:0]   tri_prod;   // r(r+1)(2r+1), one bit wider before halving

  always_comb begin
    rr1      = (2*LBITS)'(r) * (2*LBITS)'({1'b0, r} + 1'b1);
    tri_prod = (3*LBITS+1)'(rr1) * (3*LBITS+1)'({r, 1'b1});  // 2r+1 = {r,1}
    w2       = rr1;
    w3       = tri_prod[3*LBITS:1];                          // r(r+1) is even
    w4       = (4*LBITS)'(rr1) * (4*LBITS)'(rr1);
  end
endmodule
