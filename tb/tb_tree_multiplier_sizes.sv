// tb_tree_multiplier_sizes: the multiplier at the operand widths 8, 16, 32
// and 64 bits, side by side.
//
// Each instance gets the corner operands (zero, one, all ones times all ones,
// all ones times one) and 500 random pairs, one pair per clock. The expected
// product is computed here with the simulator's own wide multiplication on
// 2N-bit values. Combinational: checked in the cycle the operands change.
module tb_tree_multiplier_sizes;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  a8,  b8;  logic [15:0]  m8;
  logic [15:0] a16, b16; logic [31:0]  m16;
  logic [31:0] a32, b32; logic [63:0]  m32;
  logic [63:0] a64, b64; logic [127:0] m64;

  tree_multiplier #(.N(8))  dut8  (.a(a8),  .b(b8),  .m(m8));
  tree_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .m(m16));
  tree_multiplier #(.N(32)) dut32 (.a(a32), .b(b32), .m(m32));
  tree_multiplier #(.N(64)) dut64 (.a(a64), .b(b64), .m(m64));

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic drive(logic [63:0] x, logic [63:0] y);
    @(negedge clk);
    a8  = x[7:0];  b8  = y[7:0];
    a16 = x[15:0]; b16 = y[15:0];
    a32 = x[31:0]; b32 = y[31:0];
    a64 = x;       b64 = y;
    #1;
    checks += 4;
    if (m8 != 16'(32'(a8) * 32'(b8))) begin
      failures++; $display("FAIL N=8 %0h x %0h = %0h", a8, b8, m8);
    end
    if (m16 != 32'(64'(a16) * 64'(b16))) begin
      failures++; $display("FAIL N=16 %0h x %0h = %0h", a16, b16, m16);
    end
    if (m32 != 64'(a32) * 64'(b32)) begin
      failures++; $display("FAIL N=32 %0h x %0h = %0h", a32, b32, m32);
    end
    if (m64 != 128'(a64) * 128'(b64)) begin
      failures++; $display("FAIL N=64 %0h x %0h = %0h", a64, b64, m64);
    end
  endtask

  initial begin
    logic [127:0] r;
    a8 = '0; b8 = '0; a16 = '0; b16 = '0; a32 = '0; b32 = '0; a64 = '0; b64 = '0;
    drive('0, '0);
    drive('1, '0);
    drive(64'd1, 64'd1);
    drive('1, '1);
    drive('1, 64'd1);
    for (int t = 0; t < 500; t++) begin
      r = rnd128();
      drive(r[127:64], r[63:0]);
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
