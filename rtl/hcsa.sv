// Half-adder carry-save row with an extra column-0 input.
//
// Two n-bit rows a and b plus one extra bit e of column 0 become two rows:
// column 0 uses a full adder on a[0], b[0] and e, columns 1..n-1 use half
// adders.  As in the full carry-save row the carry out of column n-1 returns
// to position 0 inverted.  This is the half-adder stage of the multiplier:
// it changes the polarities of the final two rows so that a conventional
// adder yields posibits only, and it absorbs the extra column-0 bit.  The
// full adder in column 0 follows the variant described for producing the
// natural (n+1)-bit product; here it is used for both outputs.  Purely
// combinational, one full-adder delay.
module hcsa #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         e,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);
  logic [N-1:0] co;

  fa u_fa0 (.a(a[0]), .b(b[0]), .c(e), .s(s[0]), .co(co[0]));

  for (genvar i = 1; i < N; i++) begin : g_ha
    ha u_ha (.a(a[i]), .b(b[i]), .s(s[i]), .co(co[i]));
  end

  assign cy = {co[N-2:0], ~co[N-1]};
endmodule
