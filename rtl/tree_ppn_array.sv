// tree_ppn_array: the partial product node layer of the tree multiplier.
//
// The multiplicand bits A[N-1:0] sit in the multiplicand nodes, each of which
// has N multiplier nodes below it holding a copy of B[N-1:0]. Under every
// multiplier node is one partial product node, P[i][j] = A[i] AND B[j]. The
// three upper layers of the tree (root, multiplicand and multiplier nodes)
// only distribute bits, so in hardware they are the fan-out of a[i] and b[j]
// into this array; the only gates are the N*N AND gates, exactly as the
// method prescribes for its first step.
//
// Interface: a and b in, pp out with pp[i][j] the product of multiplicand bit
// i and multiplier bit j. Purely combinational, one gate level.
module tree_ppn_array #(
  parameter int unsigned N = 4   // operand width (bits of A and of B)
) (
  input  logic [N-1:0]        a,   // multiplicand
  input  logic [N-1:0]        b,   // multiplier
  output logic [N-1:0][N-1:0] pp   // pp[i][j] = a[i] & b[j]
);

  for (genvar i = 0; i < N; i++) begin : g_mcand_node
    // Multiplier nodes under multiplicand node i: a copy of b.
    logic [N-1:0] mplier_node;
    assign mplier_node = b;
    for (genvar j = 0; j < N; j++) begin : g_pp_node
      assign pp[i][j] = a[i] & mplier_node[j];
    end
  end

endmodule
