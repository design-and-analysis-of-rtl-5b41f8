// full_adder: one-bit full adder, the cell of the carry-save rows of the
// Braun array.
//
// Adds three bits of equal weight and returns a sum bit of that weight and a
// carry bit of the next weight up: s = a ^ b ^ c, co = majority(a, b, c).
// Purely combinational. The multiplier is described as built from gates and
// adders; the standard full-adder equations used here are this design's own
// choice of cell.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (c & (a ^ b));
endmodule
