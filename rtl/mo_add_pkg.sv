// mo_add_pkg: constants and helper functions shared by the multi-operand adder.
//
// The fast carry chain of the target FPGA family comes in 4-bit segments
// (CARRY4); any chain of n bits is built from ceil(n/4) of them. The basic
// building unit compresses four operands, and the tree built from it adds
// eight. These counts follow the structures described for the design; the
// helper function is only arithmetic on them.
package mo_add_pkg;

  // Bits per carry-chain segment (one CARRY4 primitive).
  localparam int unsigned CHAIN_SEG = 4;

  // Operands taken by one carry-chain CSA unit, and by the two-level tree.
  localparam int unsigned UNIT_OPERANDS = 4;
  localparam int unsigned TREE_OPERANDS = 8;

  // Number of carry-chain segments needed for an n-bit chain.
  function automatic int unsigned n_segments(int unsigned n);
    return (n + CHAIN_SEG - 1) / CHAIN_SEG;
  endfunction

endpackage
