// Modified pre-processing stage of a parallel-prefix adder.
//
// For every bit position i it forms the carry-generate G_i = A_i & B_i, the
// carry-propagate P_i = A_i | B_i and the half-sum H_i. The conventional stage
// builds H_i with its own XOR; this stage reuses the two gates already present
// and derives H_i = P_i & ~G_i (one inverter and one AND), which equals
// A_i ^ B_i. That identity (~G_i & P_i = H_i) is the one the unified modulo
// 2^n+1 design relies on as well. The four-gate count follows the published
// modified stage; the exact gate choice is this design's reading of it.
//
// Interface: a, b are N-bit operands; g, p, h are N-bit outputs.
// Timing: purely combinational, two gate levels on h.
module preproc #(
  parameter int unsigned N = modadd_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p,
  output logic [N-1:0] h
);

  always_comb begin
    g = a & b;
    p = a | b;
    h = p & ~g;
  end

endmodule
