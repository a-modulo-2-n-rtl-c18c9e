// Partial product reduction tree of the DLSB modulo 2^n+1 multiplier.
//
// Input: the n+2 rows of n bits and the extra column-0 bit from ppg.
// Output: two n-bit rows a and b whose logical sum plus one equals the
// product modulo 2^n+1:  |x*y|_{2^n+1} = |a + b + 1|_{2^n+1}.
//
// Every stage is built from modular carry-save rows (mcsa): the rows of a
// level are taken three at a time, each triple becomes two rows, and rows
// left over pass to the next level.  One half-adder row (hcsa) is placed on
// the first level that has two rows left over, or after the last level if
// no level has; it also absorbs the extra column-0 bit.  The shape is
// computed by the functions of modmul_pkg (n = 4: three carry-save levels
// and a final half-adder stage; n = 5: four levels with the half-adder row
// beside level II; n = 8: five levels with the half-adder row on level III).
//
// Why the constant is one: the inversely encoded negabits of the partial
// product matrix carry an offset of -(2^n - n - 1), which is n+2 modulo
// 2^n+1.  Each end-around carry, inverted, lowers that offset by one.  The
// tree has n carry-save rows and one half-adder row, so n+1 end-around
// carries, and the offset left on a and b is exactly +1.  That is the
// condition under which a conventional adder sums the last two rows into
// posibits only.  Purely combinational.
module ppr_tree #(
  parameter int unsigned N = modmul_pkg::DEFAULT_N
) (
  input  logic [N+1:0][N-1:0] rows,
  input  logic                extra,
  output logic [N-1:0]        a,
  output logic [N-1:0]        b
);
  import modmul_pkg::*;

  localparam int unsigned NLEV   = ppr_levels(N);
  localparam int unsigned HLEV   = ppr_hlevel(N);
  localparam int unsigned NSTAGE = ppr_stages(N);

  logic [N+1:0][N-1:0] lv [NSTAGE+1];
  logic                ex [NSTAGE+1];

  assign lv[0] = rows;
  assign ex[0] = extra;

  for (genvar l = 0; l < NSTAGE; l++) begin : g_stage
    localparam int unsigned R    = (l < NLEV) ? ppr_rows(N, l) : 2;
    localparam int unsigned NG   = (l < NLEV) ? R / 3 : 0;
    localparam int unsigned REM  = R - 3 * NG;
    localparam int unsigned BASE = 2 * NG;
    localparam int unsigned ROUT = BASE + ((l == HLEV) ? 2 : REM);

    for (genvar t = 0; t < NG; t++) begin : g_csa
      mcsa #(.N(N)) u_csa (
        .a (lv[l][3*t]),
        .b (lv[l][3*t+1]),
        .c (lv[l][3*t+2]),
        .s (lv[l+1][2*t]),
        .cy(lv[l+1][2*t+1])
      );
    end

    if (l == HLEV) begin : g_h
      hcsa #(.N(N)) u_hcsa (
        .a (lv[l][3*NG]),
        .b (lv[l][3*NG+1]),
        .e (ex[l]),
        .s (lv[l+1][BASE]),
        .cy(lv[l+1][BASE+1])
      );
      assign ex[l+1] = 1'b0;
    end else begin : g_pass
      for (genvar k = 0; k < REM; k++) begin : g_row
        assign lv[l+1][BASE+k] = lv[l][3*NG+k];
      end
      assign ex[l+1] = ex[l];
    end

    for (genvar k = ROUT; k < N + 2; k++) begin : g_unused
      assign lv[l+1][k] = '0;
    end
  end

  assign a = lv[NSTAGE][0];
  assign b = lv[NSTAGE][1];
endmodule
