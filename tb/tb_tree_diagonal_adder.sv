// tb_tree_diagonal_adder: self-checking test of the diagonal addition layer.
//
// The layer must return the weighted sum of its grid, sum of pp[i][j] *
// 2^(i+j), for any grid, not only for grids that come from two operands.
// The test drives every 2 x 2 grid, random 4 x 4 and 5 x 5 grids, the
// all-ones grids (largest sums, longest carries) and one-hot grids, one per
// clock, and compares with the weighted sum computed here. Combinational:
// checked in the cycle the grid changes.
module tb_tree_diagonal_adder;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [1:0][1:0] pp2;  logic [3:0] m2;
  logic [3:0][3:0] pp4;  logic [7:0] m4;
  logic [4:0][4:0] pp5;  logic [9:0] m5;

  tree_diagonal_adder #(.N(2)) dut2 (.pp(pp2), .m(m2));
  tree_diagonal_adder #(.N(4)) dut4 (.pp(pp4), .m(m4));
  tree_diagonal_adder #(.N(5)) dut5 (.pp(pp5), .m(m5));

  function automatic longint wsum(logic [63:0] flat, int n);
    longint s = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (flat[i*n + j]) s += longint'(1) << (i + j);
    return s;
  endfunction

  task automatic cmp(string tag, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", tag, got, expv);
    end
  endtask

  initial begin
    pp2 = '0; pp4 = '0; pp5 = '0;
    for (int g = 0; g < 16; g++) begin
      @(negedge clk);
      pp2 = 4'(g);
      #1 cmp("N=2", longint'(m2), wsum(64'(pp2), 2));
    end
    for (int r = 0; r < 400; r++) begin
      @(negedge clk);
      pp4 = 16'($urandom);
      pp5 = 25'($urandom);
      #1;
      cmp("N=4", longint'(m4), wsum(64'(pp4), 4));
      cmp("N=5", longint'(m5), wsum(64'(pp5), 5));
    end
    @(negedge clk);
    pp4 = '1; pp5 = '1;
    #1;
    cmp("N=4 all ones", longint'(m4), 225);
    cmp("N=5 all ones", longint'(m5), 961);
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      pp4 = 16'(1) << t;
      #1 cmp("N=4 one-hot", longint'(m4), wsum(64'(pp4), 4));
    end
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
