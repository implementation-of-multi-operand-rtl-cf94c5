// mo_add8_top: pipelined eight-operand N-bit adder for FPGA.
//
// Multi-operand addition is done in two phases: a compressor tree reduces the
// eight operands to two vectors without propagating carries across the word,
// and one carry-propagate adder then forms the binary sum. The tree
// (mo_add8_tree) is made of four-operand units that use the FPGA's fast carry
// chain for their second layer instead of a second row of full adders.
//
// Pipeline (all registers on the rising edge of clk):
//   cycle 0  in_valid and a[] are captured in the input register
//   cycle 1  the tree's carry-save pair is captured: cs_valid, s_cs, c_cs
//   cycle 2  the final sum is captured: out_valid, sum
// so a set of operands presented with in_valid appears on cs_valid/s_cs/c_cs
// two rising edges later and on out_valid/sum three rising edges later; one
// new set can be accepted every cycle, with no stalls.
//   s_cs + c_cs = sum = a[0] + ... + a[7]   (sum is N+3 bits, never overflows)
//
// The tree, its widths and its carry-save output follow the design it is
// based on, as does registering the unit at its ports. The exact register
// placement, the valid bits, the synchronous active-low reset (rst_n) that
// clears all registers, and the final adder on the carry chain are this
// design's own choices. Two assertions check the zero LSB of the carry
// vector and the one-cycle step from cs_valid to out_valid.
module mo_add8_top
  import mo_add_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a        [TREE_OPERANDS],
  output logic         cs_valid,
  output logic [N+1:0] s_cs,
  output logic [N+1:0] c_cs,
  output logic         out_valid,
  output logic [N+2:0] sum
);

  logic [N-1:0] a_q [TREE_OPERANDS];
  logic         v_q;
  logic [N+1:0] s_tree, c_tree;
  logic [N+2:0] sum_d;

  // Input register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      for (int k = 0; k < TREE_OPERANDS; k++) a_q[k] <= '0;
    end else begin
      v_q <= in_valid;
      a_q <= a;
    end
  end

  // Compressor tree: eight operands to a carry-save pair.
  mo_add8_tree #(.N(N)) u_tree (
    .a (a_q),
    .s4(s_tree),
    .c4(c_tree)
  );

  // Carry-save register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs_valid <= 1'b0;
      s_cs     <= '0;
      c_cs     <= '0;
    end else begin
      cs_valid <= v_q;
      s_cs     <= s_tree;
      c_cs     <= c_tree;
    end
  end

  // Final carry-propagate addition of the pair.
  cpa #(.N(N + 2)) u_cpa (
    .a  (s_cs),
    .b  (c_cs),
    .ci (1'b0),
    .sum(sum_d)
  );

  // Output register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= cs_valid;
      sum       <= sum_d;
    end
  end

  // The carry vector of the tree always has a zero LSB, and a result leaves
  // the output register exactly one cycle after its carry-save pair.
  a_cs_lsb_zero : assert property (@(posedge clk) disable iff (!rst_n)
    cs_valid |-> c_cs[0] == 1'b0);
  a_valid_follows : assert property (@(posedge clk) disable iff (!rst_n)
    cs_valid |=> out_valid);

endmodule
