// Modulo 2^n+1 carry-save adder row.
//
// Three n-bit rows a, b, c go through n standard full adders, one per
// column.  The sum row s is the full adders' sums.  The carry row cy holds
// the carry of column i in position i+1; the carry out of column n-1, worth
// 2^n, is worth -1 modulo 2^n+1 and is returned to position 0 inverted.
// Inversion turns a posibit carry into an inversely encoded negabit and a
// negabit carry into a posibit, so the row is correct whatever mix of bit
// polarities enters it.  Each use of this row lowers the constant offset
// carried by the inversely encoded negabits by one (modulo 2^n+1), which
// the enclosing tree accounts for.  Purely combinational, one full-adder
// delay.
module mcsa #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);
  logic [N-1:0] co;

  for (genvar i = 0; i < N; i++) begin : g_fa
    fa u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(s[i]), .co(co[i]));
  end

  assign cy = {co[N-2:0], ~co[N-1]};
endmodule
