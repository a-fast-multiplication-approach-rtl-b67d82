// tree_diagonal_adder: the partial product addition layer of the tree
// multiplier.
//
// Two partial product nodes P[i][j] and P[k][l] are grouped on one diagonal
// when i + j == k + l, i.e. when they carry the same weight 2^(i+j). For every
// diagonal k = 0 .. 2N-2 one tree_ppan_node adds its partial products. The
// nodes are chained from the right-most diagonal (k = 0, the single node
// P[0][0]) to the left-most (k = 2N-2, the single node P[N-1][N-1]), each
// handing its carry to the next. The carry left over after the last diagonal
// is the top product bit M[2N-1], which never exceeds 1 because the product
// of two N-bit numbers fits in 2N bits.
//
// Interface: pp[i][j] in, m[2N-1:0] out, with m = sum of pp[i][j] * 2^(i+j).
// Purely combinational. The carry runs through all 2N-1 nodes in series, so
// the depth grows linearly with N.
module tree_diagonal_adder
  import tree_mult_pkg::*;
#(
  parameter int unsigned N = 4   // side of the partial product grid
) (
  input  logic [N-1:0][N-1:0] pp,  // pp[i][j], weight 2^(i+j)
  output logic [2*N-1:0]      m    // product bits M[2N-1] .. M[0]
);

  localparam int unsigned CW = carry_width(N);
  localparam int unsigned ND = 2 * N - 1;   // number of diagonals

  // carry[k] enters diagonal k; carry[ND] leaves the left-most diagonal.
  logic [CW-1:0] carry [ND+1];

  assign carry[0] = '0;

  for (genvar k = 0; k < ND; k++) begin : g_diag
    localparam int unsigned LEN   = diag_len(N, k);
    localparam int unsigned FIRST = diag_first(N, k);

    logic [LEN-1:0] diag;
    for (genvar t = 0; t < LEN; t++) begin : g_member
      assign diag[t] = pp[FIRST + t][k - FIRST - t];
    end

    tree_ppan_node #(
      .NB (LEN),
      .CW (CW)
    ) u_ppan (
      .diag (diag),
      .cin  (carry[k]),
      .m    (m[k]),
      .cout (carry[k+1])
    );
  end

  assign m[2*N-1] = carry[ND][0];

  // The product of two N-bit numbers fits in 2N bits, so the carry left over
  // after the last diagonal is 0 or 1.
  if (CW > 1) begin : g_final_carry_check
    always_comb begin
      assert (carry[ND][CW-1:1] == '0)
        else $error("tree_diagonal_adder: final carry %0d exceeds 1", carry[ND]);
    end
  end

endmodule
