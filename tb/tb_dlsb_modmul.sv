// Testbench of the DLSB modulo 2^n+1 multiplier. For n = 2..8 it multiplies
// every pair of DLSB code words (both codes of each value and the all-ones
// code of 2^n); for n = 16 it uses random pairs and the corner values 0, 1,
// 2^n-1 and 2^n. The DLSB product must have the value x*y modulo 2^n+1 and
// the natural output must equal that value. It counts products of 0 and of
// 2^n and products whose second LSB is set, and fails if a width never
// produces one of them.
module tb_dlsb_modmul;
  localparam int NS = 8;
  localparam int SIZES [NS] = '{2, 3, 4, 5, 6, 7, 8, 16};

  int checks = 0, failures = 0;
  int c [NS];
  int f [NS];
  logic d [NS];

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar gi = 0; gi < NS; gi++) begin : g_size
    dlsb_modmul_chk #(.N(SIZES[gi])) u_chk (.checks(c[gi]), .failures(f[gi]), .done(d[gi]));
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
