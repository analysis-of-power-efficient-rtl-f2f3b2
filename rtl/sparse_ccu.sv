// Sparse carry computation unit of a diminished-1 modulo 2^n+1 adder.
//
// Only one carry in every SPARSITY bits is produced: the inverted end-around
// carries C_k^+ = G_{k:0} + P_{k:0} & ~G_{n-1:k+1} at the top bit k of each
// block of SPARSITY bits, and C_{n-1}^+ = ~G_{n-1:0}, which is the carry into
// bit 0. The carry-select blocks of the adder produce all other sum bits.
//
// Structure. The first log2(SPARSITY) prefix levels reduce each block to one
// group pair (G,P) with plain prefix operators. The remaining levels form a
// cyclic Kogge-Stone tree over the blocks: at block level l, block column m
// associates with column (m - 2^l) mod MP.
//  * A column whose span is still inside the word uses the plain operator.
//  * The first time a column's span wraps past bit 0 (the feedback edge), the
//    plain operator is replaced by a gray operator with its T input tied to 0:
//    the high group from the top of the word enters inverted.
//  * Every later operator in that column is a gray operator too; its lateral
//    input is the next high group further down, so the column keeps
//    accumulating ~G_{n-1:r} without a second, inverted copy of the tree.
//  * A column that is not wrapped but associates with a wrapped column (this
//    first happens with 8 block columns) uses the plain operator on the (G,P)
//    pair and ANDs its P into the neighbour's T, so that gray operators
//    further down keep working. This case is an extension of this design.
// After the last level, the carry of column m is the lateral output c = G + P
// of its last gray operator (or G + P of its last plain operator); the
// leftmost column holds the plain G_{n-1:0}. Repeated pairs at the tail of an
// inverted group do not change the carry (inverted circular idempotency).
//
// Widths. The word is cut into M = ceil(N/SPARSITY) blocks from bit 0 up; the
// top block may be narrower. The block tree always has a power-of-two number
// of columns MP >= M: bits and blocks above bit N-1 are filled with the
// identity pair (G,P) = (0,1), which leaves every carry unchanged and is
// removed by synthesis as constant logic. The carry out of the real top block
// is then taken from the leftmost column, ~G_{n-1:0}. (This padding is this
// design's way of covering widths such as n = 10.)
//
// When the zero input is set (an operand is zero) all carries are forced to
// 0, as the diminished-1 adder then just passes the other operand on.
//
// Interface: g, p N-bit generate/propagate bits; zero; c_blk[m] = carry out
// of block m (c_blk[M-1] = C_{n-1}^+); g_all, p_all = G_{n-1:0}, P_{n-1:0}.
// SPARSITY must be a power of two (checked at elaboration).
// Timing: combinational, log2(SPARSITY) + log2(MP) prefix levels.
module sparse_ccu
  import modadd_pkg::*;
#(
  parameter int unsigned N        = modadd_pkg::N_DEFAULT,
  parameter int unsigned SPARSITY = modadd_pkg::SPARSITY_DEFAULT
) (
  input  logic [N-1:0]                       g,
  input  logic [N-1:0]                       p,
  input  logic                               zero,
  output logic [(N+SPARSITY-1)/SPARSITY-1:0] c_blk,
  output logic                               g_all,
  output logic                               p_all
);

  localparam int unsigned M  = (N + SPARSITY - 1) / SPARSITY;  // real blocks
  localparam int unsigned LM = $clog2(M);                      // block levels
  localparam int unsigned MP = 1 << LM;                        // tree columns
  localparam int unsigned K  = $clog2(SPARSITY);
  localparam int unsigned NP = MP * SPARSITY;                  // padded width

  if ((1 << K) != SPARSITY) begin : g_bad
    $error("sparse_ccu: SPARSITY must be a power of two");
  end

  logic [NP-1:0] gx, px;   // generate/propagate padded with the identity (0,1)
  gpt_t base [MP];         // block group pairs, T = 0
  gpt_t fin  [MP];         // column states after the last level

  if (NP > N) begin : g_pad
    assign gx = {{(NP-N){1'b0}}, g};
    assign px = {{(NP-N){1'b1}}, p};
  end else begin : g_nopad
    assign gx = g;
    assign px = p;
  end

  // First K levels: reduce each block of SPARSITY bits to one group pair.
  for (genvar m = 0; m < MP; m++) begin : g_blk
    if (K == 0) begin : g_bit
      assign base[m] = '{g: gx[m], p: px[m], t: 1'b0};
    end else begin : g_tree
      for (genvar k = 0; k < K; k++) begin : g_red
        gp_t y [SPARSITY >> (k+1)];
        for (genvar j = 0; j < (SPARSITY >> (k+1)); j++) begin : g_op
          if (k == 0) begin : g_leaf
            localparam int unsigned B = m*SPARSITY + 2*j;
            prefix_op u_op (.hi('{g: gx[B+1], p: px[B+1]}), .lo('{g: gx[B], p: px[B]}), .y(y[j]));
          end else begin : g_node
            prefix_op u_op (.hi(g_red[k-1].y[2*j+1]), .lo(g_red[k-1].y[2*j]), .y(y[j]));
          end
        end
      end
      assign base[m] = '{g: g_red[K-1].y[0].g, p: g_red[K-1].y[0].p, t: 1'b0};
    end
  end

  // Block-level cyclic tree.
  for (genvar l = 0; l < LM; l++) begin : g_lvl
    localparam int S = 1 << l;
    gpt_t prev [MP];
    gpt_t st   [MP];
    logic cl   [MP];   // carry of each column after this level (G + P)
    for (genvar m = 0; m < MP; m++) begin : g_col
      localparam int Q = m - S;
      if (l == 0) begin : g_from_base
        assign prev[m] = base[m];
      end else begin : g_from_lvl
        assign prev[m] = g_lvl[l-1].st[m];
      end
      if (m < S - 1) begin : g_gray
        // Column already wrapped: next inverted high group.
        gray_op u_op (
          .v  (prev[m]),
          .lat('{g: prev[Q+MP].g, p: prev[Q+MP].p}),
          .vo (st[m]),
          .c  (cl[m])
        );
      end else if (Q == -1) begin : g_gray_top
        // Feedback edge: top gray operator of the column, T tied to 0.
        gray_op u_op (
          .v  ('{g: prev[m].g, p: prev[m].p, t: 1'b0}),
          .lat('{g: prev[MP-1].g, p: prev[MP-1].p}),
          .vo (st[m]),
          .c  (cl[m])
        );
      end else begin : g_black
        gp_t y;
        prefix_op u_op (
          .hi('{g: prev[m].g, p: prev[m].p}),
          .lo('{g: prev[Q].g, p: prev[Q].p}),
          .y (y)
        );
        // T of a plain column is 0; over a wrapped neighbour it is P & T.
        assign st[m] = '{g: y.g, p: y.p, t: prev[m].p & prev[Q].t};
        assign cl[m] = y.g | y.p;
      end
    end
  end

  for (genvar m = 0; m < MP; m++) begin : g_fin
    if (LM == 0) begin : g_nolvl
      assign fin[m] = base[m];
    end else begin : g_lvl_out
      assign fin[m] = g_lvl[LM-1].st[m];
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_out
    if (m == M - 1) begin : g_top
      assign c_blk[m] = ~fin[MP-1].g & ~zero;
    end else begin : g_low
      // M > 1 here, so at least one block level exists.
      assign c_blk[m] = g_lvl[LM-1].cl[m] & ~zero;
    end
  end

  assign g_all = fin[MP-1].g;
  assign p_all = fin[MP-1].p;

endmodule
