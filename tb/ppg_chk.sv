// Checker of one operand width for tb_ppg: drives the partial product
// generator with DLSB operand pairs and checks the arithmetic value of the
// matrix modulo 2^n+1 (see tb_ppg).
module ppg_chk #(
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
  logic [N:0]          x, y;
  logic [N+1:0][N-1:0] rows;
  logic                extra;

  ppg #(.N(N)) dut (.x(x), .y(y), .rows(rows), .extra(extra));

  function automatic longint dval(logic [N:0] d);
    return longint'(d[N:1]) + longint'(d[0]);
  endfunction

  task automatic check_one();
    longint v, w;
    v = longint'(extra);
    for (int r = 0; r < N + 2; r++) begin
      for (int i = 0; i < N; i++) begin
        if (r >= 3 && i < r - 2) begin
          v -= (rows[r][i] ? 0 : (longint'(1) << i));
        end else begin
          v += (rows[r][i] ? (longint'(1) << i) : 0);
        end
      end
    end
    v = ((v % M) + M) % M;
    w = (dval(x) * dval(y)) % M;
    n_checks++;
    if (v != w) begin
      n_failures++;
      if (n_failures < 10) $display("FAIL ppg n=%0d x=%h y=%h matrix=%0d expected=%0d", N, x, y, v, w);
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
      for (int k = 0; k < 20000; k++) begin
        x = (N+1)'($urandom);
        y = (N+1)'($urandom);
        #1;
        check_one();
      end
    end
    finished = 1'b1;
  end
endmodule
