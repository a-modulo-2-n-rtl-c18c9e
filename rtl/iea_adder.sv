// Inverted end-around carry modulo 2^n+1 adder with natural (n+1)-bit output.
//
// Computes r = |a + b + 1|_{2^n+1} as an ordinary (n+1)-bit number in
// [0, 2^n], which is what the last two rows of the reduction tree need
// (their offset is +1).  A Kogge-Stone prefix network forms group generate
// G[i:0] and group propagate P[i:0] with no carry in.  The end-around carry
// in is the inverted carry out, cin = ~G[n-1:0]; one more level of black
// nodes folds it in, c_i = G[i:0] | P[i:0] & cin, instead of feeding it
// back through the tree.  The sum bits are s_i = h_i ^ c_{i-1} with
// c_{-1} = cin.  The only sum that would need bit n is a + b = 2^n - 1
// (all half-sums 1, no generate): then cin = 1, the low n bits wrap to
// zero and the result is 2^n, so bit n is the group propagate P[n-1:0].
// Purely combinational: ceil(log2 n) + 1 prefix levels.
module iea_adder #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   r
);
  logic [N-1:0] g, h, gg, gp;
  logic [N-2:0] c;
  logic         cin;

  assign g = a & b;
  assign h = a ^ b;

  ks_prefix #(.N(N)) u_prefix (.g(g), .p(h), .gg(gg), .gp(gp));

  assign cin = ~gg[N-1];
  assign c   = gg[N-2:0] | (gp[N-2:0] & {(N-1){cin}});

  assign r[N-1:0] = h ^ {c, cin};
  assign r[N]     = gp[N-1];
endmodule
