// Testbench of the inverted end-around carry adder. All operand pairs for n
// <= 8, random pairs plus every pair with a + b = 2^n - 1 or 2^n for n = 16:
// the (n+1)-bit result must be (a + b + 1) modulo 2^n+1. The case a + b =
// 2^n - 1, the only one with a result of 2^n, is counted and must occur.
module tb_iea_adder;
  localparam int NS = 6;
  localparam int SIZES [NS] = '{2, 3, 4, 5, 8, 16};

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
    iea_adder_chk #(.N(SIZES[gi])) u_chk (.checks(c[gi]), .failures(f[gi]), .done(d[gi]));
  end

  initial begin
    #1;
    for (int k = 0; k < NS; k++) wait (d[k]);
    for (int k = 0; k < NS; k++) begin
      checks += c[k];
      failures += f[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
