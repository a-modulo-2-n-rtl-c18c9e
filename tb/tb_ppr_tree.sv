// Testbench of the partial product reduction tree. Random matrices of n+2
// rows plus an extra column-0 bit, for n = 2..8 and 16. The tree uses n+1
// inverted end-around carries, each adding one to the logical sum, so the
// two output rows must satisfy a + b = (sum of the rows) + extra + n + 1
// modulo 2^n+1. It also checks the shape: the level counts and the place
// of the half-adder row for n = 4, 5 and 8, and the number of carry-save
// levels against the published comparison with a tree one row shallower
// (n+1 rows): for 4 <= n <= 7 only n = 5 needs one more level, and for
// 64 <= n <= 1024 exactly n = 93, 140, 210, 315, 473 and 710 do.
module tb_ppr_tree;
  localparam int NS = 8;
  localparam int SIZES [NS] = '{2, 3, 4, 5, 6, 7, 8, 16};

  int checks = 0, failures = 0;
  int c [NS];
  int f [NS];
  logic d [NS];

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NS; gi++) begin : g_size
    ppr_tree_chk #(.N(SIZES[gi])) u_chk (.checks(c[gi]), .failures(f[gi]), .done(d[gi]));
  end

  initial begin
    #1;
    for (int k = 0; k < NS; k++) wait (d[k]);
    for (int n = 4; n <= 1024; n++) begin
      bit more, want;
      if (n == 8) n = 64;
      more = modmul_pkg::ppr_levels(n) > modmul_pkg::ppr_levels(n - 1);
      want = (n == 5) || (n == 93) || (n == 140) || (n == 210) || (n == 315) ||
             (n == 473) || (n == 710);
      checks++;
      if (more != want) begin
        failures++;
        $display("FAIL ppr_tree level count n=%0d: extra level %0d, expected %0d", n, more, want);
      end
    end
    for (int k = 0; k < NS; k++) begin
      checks += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
