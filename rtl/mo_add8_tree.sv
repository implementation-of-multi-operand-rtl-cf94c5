// mo_add8_tree: eight-operand N-bit carry-save tree of four-operand units.
//
// Two N-bit carry-chain units (csa4_cc) each reduce four operands to a
// carry-save pair of N+1-bit vectors: the chain sum S and the full-adder
// carries shifted up by one, C = {c, 0}. The four vectors go into one
// (N+1)-bit unit, whose pair of N+2-bit vectors is the tree's result:
//   s4 = chain sum of the second level   (its MSB is the chain carry out)
//   c4 = {full-adder carries of the second level, 1'b0}
//   a[0] + ... + a[7] = s4 + c4   (fits in N+3 bits)
// The two-level structure, the widths N, N+1 and N+2 and the output pair
// follow the tree this design is based on. The order in which the four
// first-level vectors enter the second unit (C and S of the first unit, then
// C and S of the second, with the second unit's S on the carry chain) and the
// unused chain carry inputs tied to 0 are this design's choices.
// Combinational; the delay is two unit delays.
module mo_add8_tree
  import mo_add_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a  [TREE_OPERANDS],
  output logic [N+1:0] s4,
  output logic [N+1:0] c4
);

  logic [N-1:0] lvl1_in [2][UNIT_OPERANDS];
  logic [N:0]   lvl1_s  [2];
  logic [N-1:0] lvl1_c  [2];
  logic [N:0]   lvl2_in [UNIT_OPERANDS];
  logic [N:0]   lvl2_c;

  for (genvar u = 0; u < 2; u++) begin : g_lvl1
    for (genvar k = 0; k < UNIT_OPERANDS; k++) begin : g_op
      assign lvl1_in[u][k] = a[u*UNIT_OPERANDS + k];
    end
    csa4_cc #(.N(N)) u_csa (
      .we(lvl1_in[u]),
      .d (1'b0),
      .s (lvl1_s[u]),
      .c (lvl1_c[u])
    );
  end

  assign lvl2_in[0] = {lvl1_c[0], 1'b0};
  assign lvl2_in[1] = lvl1_s[0];
  assign lvl2_in[2] = {lvl1_c[1], 1'b0};
  assign lvl2_in[3] = lvl1_s[1];

  csa4_cc #(.N(N + 1)) u_csa_lvl2 (
    .we(lvl2_in),
    .d (1'b0),
    .s (s4),
    .c (lvl2_c)
  );

  assign c4 = {lvl2_c, 1'b0};

endmodule
