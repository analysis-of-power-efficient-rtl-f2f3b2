// Post-processing stage of a parallel-prefix adder.
//
// Forms the sum bits S_i = H_i ^ C_{i-1}. The input cin_vec already holds, at
// index i, the carry that enters bit i (C_{i-1}); the caller decides what
// enters bit 0 (a carry input, or the recirculated end-around carry of a
// modulo 2^n-1 adder).
//
// Interface: h half-sum bits, cin_vec carries into each bit, s sum.
// Timing: one XOR level, combinational.
module postproc #(
  parameter int unsigned N = modadd_pkg::N_DEFAULT
) (
  input  logic [N-1:0] h,
  input  logic [N-1:0] cin_vec,
  output logic [N-1:0] s
);

  always_comb s = h ^ cin_vec;

endmodule
