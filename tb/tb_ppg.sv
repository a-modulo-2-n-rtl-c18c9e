// Testbench of the partial product generator.  For several operand widths
// it drives DLSB operand pairs (all code pairs for n <= 8, random pairs for
// n = 16) and evaluates the generated matrix arithmetically: posibits count
// +2^i when 1, inversely encoded negabits (row j+2, columns below j) count
// -2^i when 0.  The matrix value plus the extra column-0 bit must equal
// x*y modulo 2^n+1.  One ppg_chk instance per width does the work.
module tb_ppg;
  localparam int NS = 5;
  localparam int SIZES [NS] = '{3, 4, 5, 8, 16};

  int checks = 0, failures = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int c [NS];
  int f [NS];
  logic d [NS];

  for (genvar gi = 0; gi < NS; gi++) begin : g_size
    ppg_chk #(.N(SIZES[gi])) u_chk (.checks(c[gi]), .failures(f[gi]), .done(d[gi]));
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
