// Shared types and default sizes for the modulo 2^n+1 / 2^n-1 adders.
//
// gp_t carries one generate/propagate pair, the operand of the parallel-prefix
// carry operator. gpt_t adds the T signal that the gray operator passes down
// its column once an inverted (end-around) group has been associated.
// N_DEFAULT is the operand width of the evaluated implementation (modulo
// 2^8+1, 8-bit number parts); SPARSITY_DEFAULT is the sparse-4 carry spacing
// used throughout the description of the sparse architecture. m1_style_e
// selects the carry structure of the modulo 2^n-1 adder.
package modadd_pkg;

  localparam int unsigned N_DEFAULT        = 8;
  localparam int unsigned SPARSITY_DEFAULT = 4;

  // Carry structure of the modulo 2^n-1 adder: the cyclic log2(n)-level
  // tree, or an integer prefix tree plus one extra level driven by its carry
  // out (conditional increment).
  typedef enum logic {
    M1_CYCLIC    = 1'b0,
    M1_INCREMENT = 1'b1
  } m1_style_e;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  typedef struct packed {
    logic g;
    logic p;
    logic t;
  } gpt_t;

endpackage
