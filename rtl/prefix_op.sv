// Parallel-prefix carry operator ("black cell").
//
// Associates a more significant group (hi) with the adjacent less significant
// group (lo): (G,P) o (G',P') = (G + P&G', P&P'). Chains of this operator give
// the group generate/propagate terms G_{k:j}, P_{k:j}; the carry out of bit i
// of an integer adder is G_{i:0}.
//
// Interface: hi, lo and y are generate/propagate pairs. Combinational.
module prefix_op
  import modadd_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t y
);

  always_comb begin
    y.g = hi.g | (hi.p & lo.g);
    y.p = hi.p & lo.p;
  end

endmodule
