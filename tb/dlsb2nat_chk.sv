// Checker of one operand width for tb_dlsb2nat (see there).
module dlsb2nat_chk #(
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
  logic [N:0] d, r;

  dlsb2nat #(.N(N)) dut (.d(d), .r(r));

  task automatic check_one();
    report((longint'(r) != longint'(d[N:1]) + longint'(d[0])) ? $sformatf("d=%h r=%h", d, r) : "");
  endtask

  task automatic report(input string msg);
    n_checks++;
    if (msg != "") begin
      n_failures++;
      if (n_failures < 10) $display("FAIL dlsb2nat n=%0d %s", N, msg);
    end
  endtask

  initial begin
    #1;
    for (longint v = 0; v < 2 * P2; v++) begin
      d = (N+1)'(v);
      #1;
      check_one();
    end
    finished = 1'b1;
  end
endmodule
