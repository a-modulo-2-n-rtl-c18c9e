// Testbench of the modular carry-save row. Random rows a, b, c for several
// widths n. The sum row must be the bitwise a^b^c, and the rows s + cy must
// equal a + b + c + 1 modulo 2^n+1: the inverted end-around carry adds one
// to the logical sum, which is how the row shifts the negabit offset by one.
module tb_mcsa;
  localparam int NS = 5;
  localparam int SIZES [NS] = '{3, 4, 5, 8, 16};

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
    mcsa_chk #(.N(SIZES[gi])) u_chk (.checks(c[gi]), .failures(f[gi]), .done(d[gi]));
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
