// Carry-select block of a sparse parallel-prefix adder.
//
// A block of W bits receives its group's generate, propagate and half-sum
// bits and one carry-in from the sparse carry unit. Two ripple chains compute
// the internal carries assuming a block carry-in of 0 and of 1,
//   c0_i = G_i + P_i & c0_{i-1},  c0_{-1} = 0
//   c1_i = G_i + P_i & c1_{i-1},  c1_{-1} = 1
// both candidate sums H_i ^ c_{i-1} are formed, and the block carry-in
// selects one of them per bit. The chains work in parallel with the carry
// unit, so only the multiplexer sits after the carry arrives. The role of
// the block follows the sparse-adder method; its inside (two ripple chains
// and a multiplexer) is this design's choice.
//
// Interface: g, p, h W-bit block inputs; cin block carry-in; s W-bit sum.
// Timing: combinational.
module csb #(
  parameter int unsigned W = modadd_pkg::SPARSITY_DEFAULT
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic [W-1:0] h,
  input  logic         cin,
  output logic [W-1:0] s
);

  logic [W-1:0] s0, s1;   // candidate sums for block carry-in 0 / 1

  always_comb begin
    logic c0, c1;          // running carries of the two chains
    c0 = 1'b0;
    c1 = 1'b1;
    for (int i = 0; i < W; i++) begin
      s0[i] = h[i] ^ c0;
      s1[i] = h[i] ^ c1;
      c0    = g[i] | (p[i] & c0);
      c1    = g[i] | (p[i] & c1);
    end
  end

  assign s = cin ? s1 : s0;

endmodule
