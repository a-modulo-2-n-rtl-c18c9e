// Full adder cell.
//
// A standard full adder: s = a ^ b ^ c, co = majority(a, b, c).  In this
// multiplier its inputs may be any mix of posibits (logical 1 worth +1) and
// inversely encoded negabits (logical 0 worth -1, logical 1 worth 0).  The
// cell needs no change for that: with k negabit inputs the carry is a
// negabit when k >= 2 and the sum is a negabit when k is odd, so the
// arithmetic value is kept.  Only the bookkeeping of polarities changes,
// which the enclosing rows handle.  Purely combinational.
module fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule
