// Checker of one operand width for tb_hcsa (see there).
module hcsa_chk #(
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
  logic [N-1:0] a, b, s, cy;
  logic         e;

  hcsa #(.N(N)) dut (.a(a), .b(b), .e(e), .s(s), .cy(cy));

  task automatic check_one();
    longint lhs, rhs;
    logic [N-1:0] xs;
    xs = a ^ b;
    xs[0] = xs[0] ^ e;
    lhs = (longint'(s) + longint'(cy)) % M;
    rhs = (longint'(a) + longint'(b) + longint'(e) + 1) % M;
    report((s != xs || lhs != rhs) ?
           $sformatf("a=%h b=%h e=%b s=%h cy=%h", a, b, e, s, cy) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL hcsa n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    for (int k = 0; k < 20000; k++) begin
      a = N'($urandom);
      b = N'($urandom);
      e = 1'($urandom);
      if (k < 8) begin
        a = (k[0]) ? '1 : '0;
        b = (k[1]) ? '1 : '0;
        e = k[2];
      end
      #1;
      check_one();
    end
    finished = 1'b1;
  end
endmodule
