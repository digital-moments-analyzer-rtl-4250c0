// uac: universal arithmetic cell.
//
// One bit of a controlled adder/subtractor. With D = 1 the cell is a full adder
// (F = 0) or a full subtractor (F = 1): S is the sum or difference of A, B and
// the carry/borrow C, and P the carry-out or borrow-out. With D = 0 the cell does
// no arithmetic and S = A, which lets a whole row of an array pass its partial
// result through unchanged. B, D and F are repeated on V, U and G so that cells
// can be chained along the diagonals and rows of an array.
//
//   S = A ^ (B & D) ^ (C & D)
//   P = W & (B | C) | B & C,   W = A ^ F
//
// These equations are the cell as published; the cell is purely combinational.
//
// Nothing here is this design's own.
module uac (
  input  logic a,  // primary input (partial result)
  input  logic b,  // primary input (addend / subtrahend bit)
  input  logic c,  // carry-in or borrow-in
  input  logic d,  // 1: do arithmetic, 0: pass A
  input  logic f,  // 0: add, 1: subtract
  output logic s,  // sum / difference
  output logic p,  // carry-out / borrow-out
  output logic u,  // D repeated
  output logic v,  // B repeated
  output logic g   // F repeated
);
  logic w;

  always_comb begin
    w = a ^ f;
    s = a ^ (b & d) ^ (c & d);
    p = (w & (b | c)) | (b & c);
    u = d;
    v = b;
    g = f;
  end
endmodule
