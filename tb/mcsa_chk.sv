// Checker of one operand width for tb_mcsa (see there).
module mcsa_chk #(
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
  logic [N-1:0] a, b, c, s, cy;

  mcsa #(.N(N)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  task automatic check_one();
    longint lhs, rhs;
    lhs = (longint'(s) + longint'(cy)) % M;
    rhs = (longint'(a) + longint'(b) + longint'(c) + 1) % M;
    report((s != (a ^ b ^ c) || lhs != rhs) ?
           $sformatf("a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL mcsa n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    for (int k = 0; k < 20000; k++) begin
      a = N'($urandom);
      b = N'($urandom);
      c = N'($urandom);
      if (k < 4) begin
        a = (k[0]) ? '1 : '0;
        b = (k[1]) ? '1 : '0;
        c = a;
      end
      #1;
      check_one();
    end
    finished = 1'b1;
  end
endmodule
