// Testbench of the half adder cell.  All four input patterns under all
// four polarity assignments: the value of the inputs must equal that of the
// outputs (carry negabit when both inputs are negabits, sum negabit when
// exactly one is), and the plain truth table must hold.
module tb_ha;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  ha dut (.a(a), .b(b), .s(s), .co(co));

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
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL ha %b%b -> s=%b co=%b", a, b, s, co);
      end
      for (int pol = 0; pol < 4; pol++) begin
        int k, lhs, rhs;
        logic [1:0] pv;
        pv = 2'(pol);
        k = int'(pv[0]) + int'(pv[1]);
        lhs = bitval(a, pv[1]) + bitval(b, pv[0]);
        rhs = 2 * bitval(co, k == 2) + bitval(s, k == 1);
        checks++;
        if (lhs != rhs) begin
          failures++;
          $display("FAIL ha polarity %b inputs %b%b", pv, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
