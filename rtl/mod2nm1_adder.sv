// Parallel-prefix modulo 2^n-1 adder with end-around carry.
//
// The carry out of a modulo 2^n-1 adder is fed back to its carry input. Done
// directly this would be a combinational loop; instead every carry is
// computed in cyclic form,
//   C_i^- = G_{i:0} + P_{i:0} & G_{n-1:i+1}
//         = (G_i,P_i) o ... o (G_0,P_0) o (G_{n-1},P_{n-1}) o ... o (G_{i+1},P_{i+1}),
// so that each carry associates all n generate/propagate pairs. The carry
// unit is a cyclic Kogge-Stone tree: at level l column i combines with column
// (i - 2^l) mod n, which after ceil(log2 n) levels leaves C_i^- in column i.
// The equations follow the published method; the Kogge-Stone shape of the
// tree is this design's choice.
// When n is not a power of two the last level associates some pairs twice;
// the operator is idempotent, so the carries are unaffected. The sum is
// S_i = H_i ^ C_{i-1}^-, with C_{n-1}^- entering bit 0.
//
// With STYLE = M1_INCREMENT the carries come instead from an integer
// (non-cyclic) Kogge-Stone tree, G_{i:0} and P_{i:0}, followed by one extra
// level of prefix operators driven by the carry out G_{n-1:0}:
// C_i^- = G_{i:0} + P_{i:0} & G_{n-1:0}, i.e. the integer sum is incremented
// when it overflows. This costs one more level but only n-1 operators per
// level below it. The cyclic form is the default.
//
// Zero has two forms: bitwise-complementary operands give all ones rather
// than all zeros, which this design keeps (the result is still correct modulo
// 2^n-1). The half-sum vector h is brought out for the unified modulo 2^n+1
// post-processing stage.
//
// Interface: a, b N-bit operands; s N-bit sum; h half-sums; cout = C_{n-1}^-.
// Timing: combinational, ceil(log2 N) prefix levels (one more with
// M1_INCREMENT) between the pre- and post-processing stages.
module mod2nm1_adder
  import modadd_pkg::*;
#(
  parameter int unsigned N     = modadd_pkg::N_DEFAULT,
  parameter m1_style_e   STYLE = M1_CYCLIC
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic [N-1:0] h,
  output logic         cout
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] g, p, cin_vec;
  gp_t          cy [N];   // cyclic group pair of each column after the last level

  preproc #(.N(N)) u_pre (.a(a), .b(b), .g(g), .p(p), .h(h));

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    gp_t y [N];
    for (genvar i = 0; i < N; i++) begin : g_col
      localparam int unsigned J = (i + N - ((1 << l) % N)) % N;
      gp_t hi, lo;
      if (l == 0) begin : g_first
        assign hi = '{g: g[i], p: p[i]};
        assign lo = '{g: g[J], p: p[J]};
      end else begin : g_next
        assign hi = g_level[l-1].y[i];
        assign lo = g_level[l-1].y[J];
      end
      if (STYLE == M1_INCREMENT && i < (1 << l)) begin : g_pass
        // integer tree: nothing below bit 0 to associate with
        assign y[i] = hi;
      end else begin : g_op
        prefix_op u_op (.hi(hi), .lo(lo), .y(y[i]));
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_cin
    if (STYLE == M1_INCREMENT) begin : g_inc
      // extra level: associate the integer prefix with the carry out
      prefix_op u_inc (
        .hi(g_level[LEVELS-1].y[i]),
        .lo('{g: g_level[LEVELS-1].y[N-1].g, p: 1'b0}),
        .y (cy[i])
      );
    end else begin : g_cyc
      assign cy[i] = g_level[LEVELS-1].y[i];
    end
    // Carry into bit i is C_{i-1}^-; bit 0 receives the end-around carry.
    assign cin_vec[i] = cy[(i + N - 1) % N].g;
  end

  assign cout = cy[N-1].g;

  postproc #(.N(N)) u_post (.h(h), .cin_vec(cin_vec), .s(s));

endmodule
