// Modulo 2^n+1 multiplier with double-LSB (DLSB) operands and product.
//
// x and y are DLSB residues (x[n:1] the n-bit part, x[0] the second LSB,
// value x[n:1] + x[0] in [0, 2^n]).  Three combinational stages:
//   1. ppg      : AND/NAND partial products, n+2 rows of n bits, the bits
//                 at weights >= 2^n folded to low columns as inversely
//                 encoded negabits;
//   2. ppr_tree : modular carry-save rows with inverted end-around carries
//                 and one half-adder row, down to two rows a, b with
//                 |x*y| = |a + b + 1|;
//   3. final adders on a and b:
//        p     : a conventional n-bit adder (Kogge-Stone) forms a + b =
//                S + 2^n*c; the product is S + (1 - c), so p[n:1] = S and
//                the inverted carry out is stored as the second LSB,
//                p[0] = ~c.  No end-around carry is propagated.
//        p_nat : an inverted end-around carry adder gives the same product
//                as an ordinary (n+1)-bit number in [0, 2^n].
// Both outputs are valid at the same time; all of it is combinational, no
// clock, no latency in cycles.
module dlsb_modmul #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N:0] x,       // DLSB multiplicand
  input  logic [N:0] y,       // DLSB multiplier
  output logic [N:0] p,       // DLSB product
  output logic [N:0] p_nat    // natural (n+1)-bit product
);
  logic [N+1:0][N-1:0] rows;
  logic                extra;
  logic [N-1:0]        a, b, s;
  logic                c;

  ppg #(.N(N)) u_ppg (.x(x), .y(y), .rows(rows), .extra(extra));

  ppr_tree #(.N(N)) u_ppr (.rows(rows), .extra(extra), .a(a), .b(b));

  ks_adder #(.N(N)) u_cpa (.a(a), .b(b), .s(s), .cout(c));

  assign p = {s, ~c};

  iea_adder #(.N(N)) u_nat (.a(a), .b(b), .r(p_nat));
endmodule
