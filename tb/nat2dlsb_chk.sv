// Checker of one operand width for tb_nat2dlsb (see there).
module nat2dlsb_chk #(
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
  logic [N:0] a, d;

  nat2dlsb #(.N(N)) dut (.a(a), .d(d));

  task automatic check_one();
    longint val;
    val = longint'(d[N:1]) + longint'(d[0]);
    report((val != longint'(a) || (a < (N+1)'(P2) && d[0]) || (a == (N+1)'(P2) && d != '1)) ?
           $sformatf("a=%h d=%h", a, d) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL nat2dlsb n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    for (longint v = 0; v <= P2; v++) begin
      a = (N+1)'(v);
      #1;
      check_one();
    end
    finished = 1'b1;
  end
endmodule
