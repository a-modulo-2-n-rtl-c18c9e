// Testbench of the natural to DLSB encoder. Every residue v in [0, 2^n]: the
// DLSB word must have value v (n-bit part plus second LSB), a zero second
// LSB below 2^n, and be all ones for 2^n.
module tb_nat2dlsb;
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
    nat2dlsb_chk #(.N(SIZES[gi])) u_chk (.checks(c[gi]), .failures(f[gi]), .done(d[gi]));
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
