// Natural to double-LSB (DLSB) residue encoder.
//
// Input a[n:0] is a residue in [0, 2^n] in ordinary binary.  The DLSB word
// d has d[n:1] = a[n-1:0] XOR a[n] (bitwise) and second LSB d[0] = a[n]:
// every value below 2^n keeps its bits with a zero second LSB, and 2^n
// becomes the all-ones word.  Inputs above 2^n are not residues; the
// encoder applies the same equations to them without a check.  Purely
// combinational, one XOR level.
module nat2dlsb #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N:0] a,
  output logic [N:0] d
);
  assign d[N:1] = a[N-1:0] ^ {N{a[N]}};
  assign d[0]   = a[N];
endmodule
