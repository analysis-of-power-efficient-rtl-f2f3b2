// Sparse parallel-prefix diminished-1 modulo 2^n+1 adder.
//
// Operands are in diminished-1 form: a zero-indication bit z and an n-bit
// number part Z* = Z - 1 (Z = 0 is z = 1, Z* = 0). For two non-zero operands
// the number part of the sum is (A* + B* + ~cout) mod 2^n, the addition with
// inverted end-around carry (IEAC). When one operand is zero the result is
// the other one; when both are, it is zero.
//
// Datapath: the modified pre-processing stage forms G, P, H; the sparse
// carry unit (sparse_ccu) produces only the IEAC carries at the top of each
// block of SPARSITY bits, using gray operators for the end-around part; one
// carry-select block per block of bits produces the sum bits, block m taking
// the carry out of block m-1 and block 0 the carry C_{n-1}^+ = ~G_{n-1:0}.
// For a zero operand all carries are forced to 0, which passes the other
// operand through the carry-select blocks unchanged.
//
// The zero-indication bit of the sum is set when both operands are zero, or
// when neither is and A* + B* = 2^n - 1; then P_{n-1:0} & ~G_{n-1:0} = 1 and
// the number part comes out all zeros.
//
// The word is cut into blocks of SPARSITY bits from bit 0 up; when N is not a
// multiple of SPARSITY the top block is narrower (for example 4+4+2 bits for
// n = 10). SPARSITY must be a power of two.
//
// The datapath and the zero handling follow the published sparse method;
// the zero-bit equation and the split of odd widths are this design's.
//
// Operands with the zero bit set must carry an all-zero number part.
// Interface: (a_z, a), (b_z, b) operands, (s_z, s) result. Timing:
// combinational; log2(N) prefix levels plus the block multiplexer.
module dim1_sparse_adder #(
  parameter int unsigned N        = modadd_pkg::N_DEFAULT,
  parameter int unsigned SPARSITY = modadd_pkg::SPARSITY_DEFAULT
) (
  input  logic         a_z,
  input  logic [N-1:0] a,
  input  logic         b_z,
  input  logic [N-1:0] b,
  output logic         s_z,
  output logic [N-1:0] s
);

  localparam int unsigned M = (N + SPARSITY - 1) / SPARSITY;  // blocks

  logic [N-1:0] g, p, h;
  logic [M-1:0] c_blk;
  logic         g_all, p_all, zero;

  assign zero = a_z | b_z;

  preproc #(.N(N)) u_pre (.a(a), .b(b), .g(g), .p(p), .h(h));

  sparse_ccu #(.N(N), .SPARSITY(SPARSITY)) u_ccu (
    .g(g), .p(p), .zero(zero), .c_blk(c_blk), .g_all(g_all), .p_all(p_all)
  );

  for (genvar m = 0; m < M; m++) begin : g_csb
    localparam int unsigned PREV = (m == 0) ? M - 1 : m - 1;
    localparam int unsigned LSB  = m * SPARSITY;
    localparam int unsigned W    = (m == M - 1) ? N - LSB : SPARSITY;
    csb #(.W(W)) u_csb (
      .g  (g[LSB +: W]),
      .p  (p[LSB +: W]),
      .h  (h[LSB +: W]),
      .cin(c_blk[PREV]),
      .s  (s[LSB +: W])
    );
  end

  assign s_z = (a_z & b_z) | (~zero & p_all & ~g_all);

endmodule
