// tree_ppan_node: one partial product addition node (PPAN) of the tree
// multiplier.
//
// A PPAN collects the partial products that lie on one diagonal of the
// partial product grid (all P[i][j] with the same i + j = k) and adds them.
// The diagonals are added from the right (k = 0) to the left, so besides its
// own diagonal the node also adds the carry handed over by the node to its
// right. Bit 0 of the total is product bit M[k]; the remaining bits are the
// carry handed to the node on its left. Passing that carry on is this
// design's reading of "adding" a diagonal: it is what makes the product bits
// come out right when a diagonal holds more than one 1.
//
// Interface: diag holds the NB partial products of the diagonal, cin the
// carry from the right, m the product bit and cout the carry to the left.
// Purely combinational: a population count of NB bits plus a CW-bit add.
module tree_ppan_node #(
  parameter int unsigned NB = 4,  // partial products on this diagonal
  parameter int unsigned CW = 3   // width of carry in and carry out
) (
  input  logic [NB-1:0] diag,
  input  logic [CW-1:0] cin,
  output logic          m,
  output logic [CW-1:0] cout
);

  // cin + NB must fit in CW + 1 bits.
  if (NB > (1 << CW)) begin : g_bad_size
    $error("tree_ppan_node: NB=%0d does not fit a %0d-bit carry", NB, CW);
  end

  logic [CW:0] total;

  always_comb begin
    total = {1'b0, cin};
    for (int unsigned t = 0; t < NB; t++) begin
      total = total + (CW + 1)'(diag[t]);
    end
  end

  assign m    = total[0];
  assign cout = total[CW:1];

endmodule
