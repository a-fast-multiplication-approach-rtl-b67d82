// tb_tree_ppan_node: self-checking test of one partial product addition node.
//
// Drives every combination of the diagonal bits and the carry in, for a
// 4-input node with a 3-bit carry (the longest diagonal of a 4 x 4
// multiplier) and for a 1-input node (the end diagonals), one combination per
// clock. The expected total is the number of ones on the diagonal plus the
// carry in, counted here bit by bit; its bit 0 must appear on m and the rest
// on cout. Combinational: checked in the cycle the inputs change.
module tb_tree_ppan_node;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [3:0] diag4;
  logic [2:0] cin4, cout4;
  logic       m4;
  logic [0:0] diag1;
  logic [2:0] cin1, cout1;
  logic       m1;

  tree_ppan_node #(.NB(4), .CW(3)) dut4 (.diag(diag4), .cin(cin4), .m(m4), .cout(cout4));
  tree_ppan_node #(.NB(1), .CW(3)) dut1 (.diag(diag1), .cin(cin1), .m(m1), .cout(cout1));

  function automatic int ones(int v, int nb);
    int c = 0;
    for (int t = 0; t < nb; t++) if (((v >> t) & 1) == 1) c++;
    return c;
  endfunction

  task automatic expect_node(string tag, int total, logic m, logic [2:0] cout);
    checks++;
    if (m !== logic'(total % 2) || int'(cout) != total / 2) begin
      failures++;
      $display("FAIL %s total=%0d got m=%0b cout=%0d", tag, total, m, cout);
    end
  endtask

  initial begin
    diag4 = '0; cin4 = '0; diag1 = '0; cin1 = '0;
    for (int d = 0; d < 16; d++)
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        diag4 = 4'(d); cin4 = 3'(c);
        #1 expect_node("NB=4", ones(d, 4) + c, m4, cout4);
      end
    for (int d = 0; d < 2; d++)
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        diag1 = 1'(d); cin1 = 3'(c);
        #1 expect_node("NB=1", d + c, m1, cout1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
