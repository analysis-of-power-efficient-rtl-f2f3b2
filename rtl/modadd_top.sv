// Both diminished-1 modulo 2^n+1 adders side by side.
//
// The same pair of diminished-1 operands feeds the sparse parallel-prefix
// adder with gray operators and carry-select blocks (first architecture) and
// the adder built from a modulo 2^n-1 adder and an XOR stage (second
// architecture). Their results come out on separate ports so that the two
// can be compared; in a correct implementation they are always equal.
// Putting both behind one set of ports is this design's choice; each adder
// can also be used on its own.
//
// Interface: (a_z, a), (b_z, b) operands; (sp_z, sp) result of the sparse
// adder; (un_z, un) result of the unified adder. Operands with the zero bit
// set must carry an all-zero number part. Timing: combinational.
module modadd_top #(
  parameter int unsigned N        = modadd_pkg::N_DEFAULT,
  parameter int unsigned SPARSITY = modadd_pkg::SPARSITY_DEFAULT
) (
  input  logic         a_z,
  input  logic [N-1:0] a,
  input  logic         b_z,
  input  logic [N-1:0] b,
  output logic         sp_z,
  output logic [N-1:0] sp,
  output logic         un_z,
  output logic [N-1:0] un
);

  dim1_sparse_adder #(.N(N), .SPARSITY(SPARSITY)) u_sparse (
    .a_z(a_z), .a(a), .b_z(b_z), .b(b), .s_z(sp_z), .s(sp)
  );

  dim1_unified_adder #(.N(N)) u_unified (
    .a_z(a_z), .a(a), .b_z(b_z), .b(b), .s_z(un_z), .s(un)
  );

endmodule
