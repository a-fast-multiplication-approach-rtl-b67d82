// tree_multiplier: unsigned N x N multiplier built as a tree of nodes.
//
// The operands enter at the top of a tree: a root node fans out to N
// multiplicand nodes (A[N-1] left-most, A[0] right-most), each of which fans
// out to N multiplier nodes (B[N-1] .. B[0]). Step 1 ANDs every multiplicand
// bit with every multiplier bit in the partial product node layer
// (tree_ppn_array). Step 2 adds the partial products that lie on the same
// diagonal, i + j = k, in one partial product addition node per diagonal,
// starting at the right-most diagonal and handing a carry leftwards
// (tree_diagonal_adder). Reading the addition nodes from left to right gives
// the product M[2N-1] .. M[0].
//
// Interface: a (multiplicand) and b (multiplier) in, m = a * b out, all
// unsigned. There is no clock: the circuit is purely combinational and m is
// valid once the inputs have propagated through one AND level and the carry
// chain of the addition layer. The operand width N defaults to 4, the size of
// the method's worked 4 x 4 example; any N >= 1 elaborates. Unsigned operands,
// the carry between addition nodes and the 2N-bit result width are choices of
// this design.
module tree_multiplier #(
  parameter int unsigned N = 4   // operand width
) (
  input  logic [N-1:0]   a,   // multiplicand A[N-1:0]
  input  logic [N-1:0]   b,   // multiplier   B[N-1:0]
  output logic [2*N-1:0] m    // product      M[2N-1:0]
);

  logic [N-1:0][N-1:0] pp;

  tree_ppn_array #(.N(N)) u_ppn (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  tree_diagonal_adder #(.N(N)) u_ppan (
    .pp (pp),
    .m  (m)
  );

endmodule
