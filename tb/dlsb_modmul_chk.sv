// Checker of one operand width for tb_dlsb_modmul (see there).
module dlsb_modmul_chk #(
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
  logic [N:0] x, y, p, p_nat;
  int         n_zero = 0;
  int         n_top = 0;
  int         n_dlsb = 0;

  dlsb_modmul #(.N(N)) dut (.x(x), .y(y), .p(p), .p_nat(p_nat));

  task automatic check_one();
    longint want, got;
    want = ((longint'(x[N:1]) + longint'(x[0])) * (longint'(y[N:1]) + longint'(y[0]))) % M;
    got = longint'(p[N:1]) + longint'(p[0]);
    if (want == 0) n_zero++;
    if (want == P2) n_top++;
    if (p[0]) n_dlsb++;
    report((got != want || longint'(p_nat) != want) ?
           $sformatf("x=%h y=%h p=%h p_nat=%h want=%0d", x, y, p, p_nat, want) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL dlsb_modmul n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    if (N <= 8) begin
      for (int i = 0; i < (1 << (N + 1)); i++) begin
        for (int j = 0; j < (1 << (N + 1)); j++) begin
          x = (N+1)'(i);
          y = (N+1)'(j);
          #1;
          check_one();
        end
      end
    end else begin
      logic [N:0] corner [6];
      corner = '{'0, (N+1)'(2), (N+1)'(1), '1, {1'b0, {N{1'b1}}}, (N+1)'(P2 - 2)};
      for (int i = 0; i < 6; i++) begin
        for (int j = 0; j < 6; j++) begin
          x = corner[i];
          y = corner[j];
          #1;
          check_one();
        end
      end
      for (int k = 0; k < 20000; k++) begin
        x = (N+1)'($urandom);
        y = (N+1)'($urandom);
        #1;
        check_one();
      end
    end
    report((n_zero > 0) ? "" : "zero product never produced");
    report((n_top > 0) ? "" : "product 2^n never produced");
    report((n_dlsb > 0) ? "" : "second LSB of the product never set");
    finished = 1'b1;
  end
endmodule
