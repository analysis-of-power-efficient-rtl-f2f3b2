// Unified post-processing: modulo 2^n-1 sum to diminished-1 modulo 2^n+1 sum.
//
// The carries of a diminished-1 (inverted end-around carry) adder relate to
// those of a modulo 2^n-1 adder by C_i^+ = C_i^- ^ (~G_{i:0} & P_{i:0}), and
// ~G_{i:0} & P_{i:0} equals the running AND of half-sums H_{i:0} =
// H_i & ... & H_0. Hence the diminished-1 sum is obtained from the modulo
// 2^n-1 sum S^- of the same number parts with one XOR per bit:
//   S_0^+ = S_0^- ^ ~(a_z | b_z)
//   S_i^+ = S_i^- ^ (H_{i-1:0} & ~(a_z | b_z)),  i > 0
// When an operand is zero (its zero-indication bit is set and its number part
// is 0) the correction is dropped and the modulo 2^n-1 sum, which then equals
// the other operand, is passed on.
//
// The zero-indication bit of the sum is set when both operands are zero, or
// when neither is and A* + B* = 2^n - 1 (all half-sums one), in which case the
// number part computed above is all zeros. The correction equations follow
// the published method; the zero-bit equation and the simple AND chain that
// forms the H_{i:0} terms are this design's choices.
//
// Interface: s_m modulo 2^n-1 sum, h half-sums of the number parts, a_z, b_z
// zero-indication bits; s_p number part and s_z zero bit of the result.
// Timing: combinational.
module unified_post #(
  parameter int unsigned N = modadd_pkg::N_DEFAULT
) (
  input  logic [N-1:0] s_m,
  input  logic [N-1:0] h,
  input  logic         a_z,
  input  logic         b_z,
  output logic [N-1:0] s_p,
  output logic         s_z
);

  logic [N-1:0] corr;   // XOR correction per bit
  logic         nz;     // neither operand is zero
  logic         h_all;  // H_{n-1:0}

  always_comb begin
    logic hpre;         // running H_{i-1:0}
    nz   = ~(a_z | b_z);
    hpre = 1'b1;
    for (int i = 0; i < N; i++) begin
      corr[i] = (i == 0) ? nz : (hpre & nz);
      hpre    = hpre & h[i];
    end
    h_all = hpre;
  end

  assign s_p = s_m ^ corr;
  assign s_z = (a_z & b_z) | (nz & h_all);

endmodule
