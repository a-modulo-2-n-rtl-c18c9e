// Kogge-Stone parallel prefix network (helper of the final adders).
//
// From the bit generate g and propagate p signals it forms, for every
// position i, the group generate gg[i] and group propagate gp[i] of bits
// i..0.  Level k combines each node with the node 2^k positions to its
// right ("black" node: G = g_hi | p_hi & g_lo, P = p_hi & p_lo); nodes with
// nothing 2^k to the right are buffered.  ceil(log2 n) levels, n*log2(n) -
// n + 1 black nodes for n a power of two.  Purely combinational.
module ks_prefix #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] gp
);
  localparam int unsigned NL = modmul_pkg::prefix_levels(N);

  logic [N-1:0] gl [NL+1];
  logic [N-1:0] pl [NL+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar k = 0; k < NL; k++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= (1 << k)) begin : g_black
        assign gl[k+1][i] = gl[k][i] | (pl[k][i] & gl[k][i-(1<<k)]);
        assign pl[k+1][i] = pl[k][i] & pl[k][i-(1<<k)];
      end else begin : g_buf
        assign gl[k+1][i] = gl[k][i];
        assign pl[k+1][i] = pl[k][i];
      end
    end
  end

  assign gg = gl[NL];
  assign gp = pl[NL];
endmodule
