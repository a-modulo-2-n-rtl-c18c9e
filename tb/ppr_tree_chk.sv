// Checker of one operand width for tb_ppr_tree (see there).
module ppr_tree_chk #(
  parameter int N = 4
) (
  output int   checks,
  output int   failures,
  output logic done
);
  int   n_checks = 0;
  int   n_failures = 0;
  logic finished = 1'b0;

  assign checks   = n_checks;
  assign failures = n_failures;
  assign done     = finished;

  localparam longint M = (longint'(1) << N) + 1;
  localparam longint P2 = longint'(1) << N;
  logic [N+1:0][N-1:0] rows;
  logic                extra;
  logic [N-1:0]        a, b;

  ppr_tree #(.N(N)) dut (.rows(rows), .extra(extra), .a(a), .b(b));

  task automatic check_one();
    longint lhs, rhs;
    rhs = longint'(extra) + N + 1;
    for (int r = 0; r < N + 2; r++) rhs += longint'(rows[r]);
    rhs = rhs % M;
    lhs = (longint'(a) + longint'(b)) % M;
    report((lhs != rhs) ? $sformatf("a=%h b=%h expected sum %0d", a, b, rhs) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL ppr_tree n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    for (int k = 0; k < 20000; k++) begin
      for (int r = 0; r < N + 2; r++) rows[r] = N'($urandom);
      extra = 1'($urandom);
      if (k < 2) begin
        rows = (k == 0) ? '0 : '1;
        extra = k[0];
      end
      #1;
      check_one();
    end
    // Shape of the tree: n = 4 has three carry-save levels and a final
    // half-adder stage, n = 5 has four levels with the half-adder row on the
    // second, n = 8 five levels with it on the third.
    if (N == 4) report((modmul_pkg::ppr_levels(N) == 3 && modmul_pkg::ppr_hlevel(N) == 3) ? "" : "shape n=4");
    if (N == 5) report((modmul_pkg::ppr_levels(N) == 4 && modmul_pkg::ppr_hlevel(N) == 1) ? "" : "shape n=5");
    if (N == 8) report((modmul_pkg::ppr_levels(N) == 5 && modmul_pkg::ppr_hlevel(N) == 2) ? "" : "shape n=8");
    finished = 1'b1;
  end
endmodule
