// End-to-end testbench of modmul_top at its default width (n = 8, modulus
// 257), with no parameter override.
//
// Phase 1 (nat_mode = 0) multiplies every pair of DLSB code words: both
// codes of each value in [1, 2^n - 1], the zero code and the all-ones code
// of 2^n.  Phase 2 (nat_mode = 1) multiplies every pair of natural residues
// in [0, 2^n].  For each product it checks the value of the DLSB output,
// the natural output of the end-around carry adder and the natural output
// decoded from the DLSB product against (a*b) mod (2^n+1) worked out with
// integer arithmetic.  It counts how often each mechanism of the design
// occurs (both operand encodings, a zero operand, an operand of 2^n, a zero
// product, a product of 2^n, a product that uses its second LSB, a natural
// result needing bit n) and counts a failure for any that never occurs.
module tb_modmul_top;
  localparam int N = modmul_pkg::DEFAULT_N;
  localparam longint M = (longint'(1) << N) + 1;
  localparam longint P2 = longint'(1) << N;

  logic       nat_mode;
  logic [N:0] a, b, p, p_nat, p_nat_inc;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_dlsb_mode = 0, n_nat_mode = 0, n_zero_op = 0, n_top_op = 0;
  int n_zero_prod = 0, n_top_prod = 0, n_second_lsb = 0, n_nat_msb = 0;

  modmul_top dut (
    .nat_mode (nat_mode),
    .a        (a),
    .b        (b),
    .p        (p),
    .p_nat    (p_nat),
    .p_nat_inc(p_nat_inc)
  );

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint opval(logic [N:0] v, logic nat);
    return nat ? longint'(v) : longint'(v[N:1]) + longint'(v[0]);
  endfunction

  task automatic check_one();
    longint va, vb, want, got;
    va = opval(a, nat_mode);
    vb = opval(b, nat_mode);
    want = (va * vb) % M;
    got = longint'(p[N:1]) + longint'(p[0]);
    if (nat_mode) n_nat_mode++;
    else n_dlsb_mode++;
    if (va == 0 || vb == 0) n_zero_op++;
    if (va == P2 || vb == P2) n_top_op++;
    if (want == 0) n_zero_prod++;
    if (want == P2) n_top_prod++;
    if (p[0]) n_second_lsb++;
    if (p_nat[N]) n_nat_msb++;
    checks++;
    if (got != want || longint'(p_nat) != want || longint'(p_nat_inc) != want ||
        (want == P2 && p != '1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL mode=%b a=%h b=%h p=%h p_nat=%h p_nat_inc=%h want=%0d",
                 nat_mode, a, b, p, p_nat, p_nat_inc, want);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #1;
    nat_mode = 1'b0;
    for (int i = 0; i < (1 << (N + 1)); i++) begin
      for (int j = 0; j < (1 << (N + 1)); j++) begin
        a = (N+1)'(i);
        b = (N+1)'(j);
        #1;
        check_one();
      end
    end
    nat_mode = 1'b1;
    for (longint i = 0; i <= P2; i++) begin
      for (longint j = 0; j <= P2; j++) begin
        a = (N+1)'(i);
        b = (N+1)'(j);
        #1;
        check_one();
      end
    end
    need("DLSB operands", n_dlsb_mode);
    need("natural operands", n_nat_mode);
    need("zero operand", n_zero_op);
    need("operand 2^n", n_top_op);
    need("zero product", n_zero_prod);
    need("product 2^n (all-ones DLSB)", n_top_prod);
    need("second LSB of product set", n_second_lsb);
    need("natural product bit n set", n_nat_msb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
