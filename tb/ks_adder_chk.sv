// Checker of one operand width for tb_ks_adder (see there).
module ks_adder_chk #(
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
  logic [N-1:0] a, b, s;
  logic         cout;

  ks_adder #(.N(N)) dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic check_one();
    longint sum;
    sum = longint'(a) + longint'(b);
    report(({cout, s} != (N+1)'(sum)) ? $sformatf("a=%h b=%h s=%h cout=%b", a, b, s, cout) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL ks_adder n=%0d %s", N, msg);
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
      end
    end
    finished = 1'b1;
  end
endmodule
