// Regular parallel prefix adder (Kogge-Stone) with carry out.
//
// The bit cells form generate g = a & b and half-sum h = a ^ b (h doubles
// as propagate).  A Kogge-Stone prefix network gives the carry out of every
// position with no carry in; s[0] = h[0], s[i] = h[i] ^ carry[i-1], and
// cout is the group generate of all n bits.  It is the conventional final
// adder of the DLSB multiplier: cout is not fed back, it is stored
// (inverted) as the product's second LSB.  Purely combinational,
// ceil(log2 n) prefix levels plus the bit cells and the sum XOR.
module ks_adder #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] g, h, gg, gp;

  assign g = a & b;
  assign h = a ^ b;

  ks_prefix #(.N(N)) u_prefix (.g(g), .p(h), .gg(gg), .gp(gp));

  assign s    = h ^ {gg[N-2:0], 1'b0};
  assign cout = gg[N-1];
endmodule
