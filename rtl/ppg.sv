// Partial product generator of the DLSB modulo 2^n+1 multiplier.
//
// Operands x and y are DLSB words (x[n:1] = x_{n-1}..x_0, x[0] = x0').
// The product x*y expands into the bits x_i*y_j at weight 2^(i+j), the
// bits y0'*x_i at 2^i, x0'*y_j at 2^j and x0'*y0' at 1.  A bit at weight
// 2^(n+k), k >= 0, is worth -2^k modulo 2^n+1, so it is moved to column k
// as a negabit.  Negabits are inversely encoded (logical 0 means -1,
// logical 1 means 0), which makes each of them a NAND gate; every posibit
// is an AND gate.  The result is a rectangle of n+2 rows of n bits plus one
// extra posibit in column 0:
//   row 0      : y_0  AND x_i              (posibits)
//   row 1      : y0'  AND x_i              (posibits)
//   row 2      : x0'  AND y_i in column i  (posibits)
//   row j+2    : for j = 1..n-1, column i >= j: x_{i-j} AND y_j (posibit),
//                column i < j: NAND(x_{i-j+n}, y_j)          (negabit)
//   extra      : x0' AND y0' in column 0   (posibit)
// Column i then holds n-1-i negabits and i+3 posibits (4 in column 0), so
// the gate count is n(n+1)/2 + 2n + 1 AND and n(n-1)/2 NAND gates.  The
// order of the rows is a choice of this implementation; any order gives the
// same product.  Purely combinational, one gate level.
module ppg #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N:0]             x,      // DLSB multiplicand
  input  logic [N:0]             y,      // DLSB multiplier
  output logic [N+1:0][N-1:0]    rows,   // n+2 rows, bit i of a row is column i
  output logic                   extra   // extra column-0 posibit x0' & y0'
);
  logic [N-1:0] xb, yb;   // n-bit parts
  logic         xd, yd;   // second LSBs

  assign xb = x[N:1];
  assign xd = x[0];
  assign yb = y[N:1];
  assign yd = y[0];

  assign rows[0] = xb & {N{yb[0]}};
  assign rows[1] = xb & {N{yd}};
  assign rows[2] = yb & {N{xd}};

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      if (i >= j) begin : g_pos
        assign rows[j+2][i] = xb[i-j] & yb[j];
      end else begin : g_neg
        assign rows[j+2][i] = ~(xb[i-j+N] & yb[j]);
      end
    end
  end

  assign extra = xd & yd;
endmodule
