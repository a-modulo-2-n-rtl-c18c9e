// Checker of one operand width for tb_iea_adder (see there).
module iea_adder_chk #(
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
  logic [N-1:0] a, b;
  logic [N:0]   r;
  int           n_top = 0;

  iea_adder #(.N(N)) dut (.a(a), .b(b), .r(r));

  task automatic check_one();
    longint want;
    want = (longint'(a) + longint'(b) + 1) % M;
    if (want == P2) n_top++;
    report((longint'(r) != want) ? $sformatf("a=%h b=%h r=%h want=%0d", a, b, r, want) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL iea_adder n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    if (N <= 8) begin
      for (int i = 0; i < (1 << N); i++) begin
        for (int j = 0; j < (1 << N); j++) begin
          a = N'(i);
          b = N'(j);
          #1;
          check_one();
        end
      end
    end else begin
      for (int k = 0; k < 20000; k++) begin
        a = N'($urandom);
        b = N'($urandom);
        #1;
        check_one();
        b = ~a;
        #1;
        check_one();
        b = N'(-a);
        #1;
        check_one();
      end
    end
    report((n_top > 0) ? "" : "result 2^n never produced");
    finished = 1'b1;
  end
endmodule
