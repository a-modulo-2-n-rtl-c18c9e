// Top level: modulo 2^n+1 multiplier channel with DLSB or natural operands.
//
// Operands a and b arrive either as DLSB words (nat_mode = 0; a[n:1] the
// n-bit part, a[0] the second LSB) or as ordinary (n+1)-bit residues in
// [0, 2^n] (nat_mode = 1), in which case nat2dlsb encoders convert them.
// The DLSB multiplier produces the product in DLSB form (p) and, through
// its inverted end-around carry adder, in natural form (p_nat).  A DLSB to
// natural decoder on p gives the natural product a second way (p_nat_inc),
// by increment.  Selecting the operand encoding per operation is a choice
// of this top level.  Entirely combinational.
module modmul_top #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic       nat_mode,   // 1: a, b are natural residues; 0: DLSB
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] p,          // DLSB product
  output logic [N:0] p_nat,      // natural product, end-around carry adder
  output logic [N:0] p_nat_inc   // natural product, decoded from p
);
  logic [N:0] a_enc, b_enc, x, y;

  nat2dlsb #(.N(N)) u_enc_a (.a(a), .d(a_enc));
  nat2dlsb #(.N(N)) u_enc_b (.a(b), .d(b_enc));

  assign x = nat_mode ? a_enc : a;
  assign y = nat_mode ? b_enc : b;

  dlsb_modmul #(.N(N)) u_mul (.x(x), .y(y), .p(p), .p_nat(p_nat));

  dlsb2nat #(.N(N)) u_dec (.d(p), .r(p_nat_inc));
endmodule
