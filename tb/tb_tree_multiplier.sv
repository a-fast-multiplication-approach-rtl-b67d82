// tb_tree_multiplier: end-to-end test of the tree multiplier at its default
// size (N = 4, no parameter override).
//
// First the method's worked examples: 101 x 10 = 1010 (operands zero-
// extended to 4 bits) and 0110 x 1110 = 1010100, where each product bit
// M[k] is also checked on its own. Then every one of the 256 operand pairs,
// one per clock, against the product computed here with integer arithmetic.
// The multiplier is combinational, so the product is checked in the cycle the
// operands are applied (zero clock cycles of latency).
//
// The test also counts how often each mechanism of the addition layer was
// exercised, worked out from the operands: a diagonal holding two or more
// ones (the node must pass a carry on), a diagonal whose node receives a
// carry, a product that reaches the top bit M[2N-1], which only the final
// carry can set, and a zero operand. A mechanism that never happened counts
// as a failure.
module tb_tree_multiplier;

  localparam int N = 4;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  int n_multi_diag  = 0;  // some diagonal held >= 2 ones
  int n_carry_in    = 0;  // some node received a non-zero carry
  int n_top_bit     = 0;  // M[2N-1] set by the final carry
  int n_zero_op     = 0;  // an operand was zero

  logic [N-1:0]   a, b;
  logic [2*N-1:0] m;

  tree_multiplier dut (.a(a), .b(b), .m(m));

  task automatic count_mechanisms(int x, int y);
    int carry = 0;
    bit multi = 0, cin = 0;
    for (int k = 0; k < 2 * N - 1; k++) begin
      int ones = 0;
      for (int i = 0; i < N; i++) begin
        int j = k - i;
        if (j >= 0 && j < N && ((x >> i) & 1) == 1 && ((y >> j) & 1) == 1) ones++;
      end
      if (ones >= 2) multi = 1;
      if (carry != 0) cin = 1;
      carry = (ones + carry) / 2;
    end
    if (multi) n_multi_diag++;
    if (cin)   n_carry_in++;
    if (carry != 0) n_top_bit++;
    if (x == 0 || y == 0) n_zero_op++;
  endtask

  task automatic apply_and_check(int x, int y);
    int expv;
    @(negedge clk);
    a = N'(x); b = N'(y);
    #1;
    expv = x * y;
    checks++;
    if (int'(m) != expv) begin
      failures++;
      $display("FAIL %0d x %0d: got %0d expected %0d", x, y, m, expv);
    end
    count_mechanisms(x, y);
  endtask

  task automatic check_bits(string tag, logic [2*N-1:0] expv);
    for (int k = 0; k < 2 * N; k++) begin
      checks++;
      if (m[k] !== expv[k]) begin
        failures++;
        $display("FAIL %s: M[%0d]=%0b expected %0b", tag, k, m[k], expv[k]);
      end
    end
  endtask

  initial begin
    a = '0; b = '0;
    // 101 x 10: M3 M2 M1 M0 = 1010.
    apply_and_check(5, 2);
    check_bits("101 x 10", 8'b0000_1010);
    // 0110 x 1110: M6 .. M0 = 1010100.
    apply_and_check(6, 14);
    check_bits("0110 x 1110", 8'b0101_0100);
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++)
        apply_and_check(x, y);

    $display("mechanisms: multi-one diagonal=%0d carry into node=%0d top bit=%0d zero operand=%0d",
             n_multi_diag, n_carry_in, n_top_bit, n_zero_op);
    checks++; if (n_multi_diag == 0) begin failures++; $display("FAIL no multi-one diagonal"); end
    checks++; if (n_carry_in   == 0) begin failures++; $display("FAIL no carry into a node"); end
    checks++; if (n_top_bit    == 0) begin failures++; $display("FAIL top bit never set"); end
    checks++; if (n_zero_op    == 0) begin failures++; $display("FAIL no zero operand"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
