// Testbench of the full adder cell.  For all eight input patterns and all
// eight polarity assignments (each input a posibit or an inversely encoded
// negabit) it checks the plain truth table and that the arithmetic value
// of the inputs equals that of the outputs, with the output polarities
// (carry negabit when two or more inputs are negabits, sum negabit when an
// odd number are).
module tb_fa;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  fa dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  // Arithmetic value of one bit of the given polarity (1 = negabit).
  function automatic int bitval(logic v, logic neg);
    return neg ? int'(v) - 1 : int'(v);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL fa %b%b%b -> s=%b co=%b", a, b, c, s, co);
      end
      for (int pol = 0; pol < 8; pol++) begin
        int k, lhs, rhs;
        logic [2:0] pv;
        pv = 3'(pol);
        k = int'(pv[0]) + int'(pv[1]) + int'(pv[2]);
        lhs = bitval(a, pv[2]) + bitval(b, pv[1]) + bitval(c, pv[0]);
        rhs = 2 * bitval(co, k >= 2) + bitval(s, k % 2 == 1);
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("FAIL fa polarity %b inputs %b%b%b", pv, a, b, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
