// tb_tree_ppn_array: self-checking test of the partial product node layer.
//
// Applies every pair of 4-bit operands to a 4 x 4 array and a few hundred
// random pairs to a 6 x 6 array, one pair per clock, and checks each
// partial product bit against the bit test ((a >> i) & 1) && ((b >> j) & 1).
// The layer is combinational, so its outputs are checked in the same cycle
// the operands are applied. A watchdog ends the run if it does not finish.
module tb_tree_ppn_array;

  localparam int unsigned N0 = 4;
  localparam int unsigned N1 = 6;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [N0-1:0]         a0, b0;
  logic [N0-1:0][N0-1:0] pp0;
  logic [N1-1:0]         a1, b1;
  logic [N1-1:0][N1-1:0] pp1;

  tree_ppn_array #(.N(N0)) dut0 (.a(a0), .b(b0), .pp(pp0));
  tree_ppn_array #(.N(N1)) dut1 (.a(a1), .b(b1), .pp(pp1));

  task automatic check0();
    for (int i = 0; i < int'(N0); i++)
      for (int j = 0; j < int'(N0); j++) begin
        logic expv;
        expv = ((int'(a0) >> i) & 1) == 1 && ((int'(b0) >> j) & 1) == 1;
        checks++;
        if (pp0[i][j] !== expv) begin
          failures++;
          $display("FAIL N=%0d a=%0h b=%0h P[%0d][%0d]=%0b expected %0b",
                   N0, a0, b0, i, j, pp0[i][j], expv);
        end
      end
  endtask

  task automatic check1();
    for (int i = 0; i < int'(N1); i++)
      for (int j = 0; j < int'(N1); j++) begin
        logic expv;
        expv = ((int'(a1) >> i) & 1) == 1 && ((int'(b1) >> j) & 1) == 1;
        checks++;
        if (pp1[i][j] !== expv) begin
          failures++;
          $display("FAIL N=%0d a=%0h b=%0h P[%0d][%0d]=%0b expected %0b",
                   N1, a1, b1, i, j, pp1[i][j], expv);
        end
      end
  endtask

  initial begin
    a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    for (int x = 0; x < (1 << N0); x++)
      for (int y = 0; y < (1 << N0); y++) begin
        @(negedge clk);
        a0 = N0'(x); b0 = N0'(y);
        #1 check0();
      end
    for (int r = 0; r < 300; r++) begin
      @(negedge clk);
      a1 = N1'($urandom); b1 = N1'($urandom);
      #1 check1();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
