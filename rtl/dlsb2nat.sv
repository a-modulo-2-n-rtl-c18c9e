// Double-LSB (DLSB) to natural residue decoder.
//
// The value of a DLSB word d is its n-bit part plus its second LSB, so the
// natural (n+1)-bit form is the increment r = d[n:1] + d[0].  The
// increment is written as an addition and left to synthesis.  Purely
// combinational.
module dlsb2nat #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N:0] d,
  output logic [N:0] r
);
  assign r = {1'b0, d[N:1]} + {{N{1'b0}}, d[0]};
endmodule
