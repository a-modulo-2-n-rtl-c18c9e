// Half adder cell.
//
// A standard half adder: s = a ^ b, co = a & b.  Like the full adder it is
// used unchanged on posibits and inversely encoded negabits: with one
// negabit input the sum is a negabit, with two the carry is a negabit and
// the sum a posibit.  Purely combinational.
module ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
