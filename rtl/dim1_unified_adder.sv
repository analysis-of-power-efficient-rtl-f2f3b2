// Diminished-1 modulo 2^n+1 adder built on a modulo 2^n-1 adder.
//
// In diminished-1 form a value Z in [0, 2^n] is carried as a zero-indication
// bit z and an n-bit number part Z* = Z - 1 (Z = 0 is z = 1, Z* = 0). Instead
// of a dedicated inverted end-around carry tree, this adder adds the number
// parts in an ordinary parallel-prefix modulo 2^n-1 adder and converts its sum
// with one XOR per bit (unified_post). Any modulo 2^n-1 carry structure can be
// used; STYLE selects the cyclic Kogge-Stone tree (default) or the integer
// tree with an extra increment level.
//
// Operands with the zero bit set must carry an all-zero number part.
//
// Interface: (a_z, a) and (b_z, b) operands, (s_z, s) result, all in
// diminished-1 form. Timing: combinational; the XOR stage and the H_{i:0}
// chain sit after the modulo 2^n-1 adder.
module dim1_unified_adder
  import modadd_pkg::*;
#(
  parameter int unsigned N     = modadd_pkg::N_DEFAULT,
  parameter m1_style_e   STYLE = M1_CYCLIC
) (
  input  logic         a_z,
  input  logic [N-1:0] a,
  input  logic         b_z,
  input  logic [N-1:0] b,
  output logic         s_z,
  output logic [N-1:0] s
);

  logic [N-1:0] s_m, h;
  logic         cout_unused;

  mod2nm1_adder #(.N(N), .STYLE(STYLE)) u_m (.a(a), .b(b), .s(s_m), .h(h), .cout(cout_unused));

  unified_post #(.N(N)) u_post (
    .s_m(s_m), .h(h), .a_z(a_z), .b_z(b_z), .s_p(s), .s_z(s_z)
  );

endmodule
