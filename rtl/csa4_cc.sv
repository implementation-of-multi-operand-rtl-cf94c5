// csa4_cc: four-operand N-bit carry-save adder built around the fast carry
// chain (the "4:2 compressor with carry chain").
//
// A classic four-operand CSA uses two layers of full adders. Here only the
// first layer is a full-adder row: it compresses we[0], we[1] and we[2] into a
// sum row fs and a carry row fc. The second layer, which would add fs, we[3]
// and the neighbouring carries, is replaced by an N-bit ripple addition of
// fs and we[3] on the dedicated carry chain: per bit one LUT forms the
// propagate fs[i] ^ we[3][i], the chain multiplexer passes the incoming carry
// when it is 1 and we[3][i] otherwise, and the chain XOR gives the sum bit.
// The chain is split into ceil(N/4) carry4 segments.
//
// Outputs (weights in brackets):
//   s[N-1:0] (2^i) chain sum bits, s[N] (2^N) chain carry out,
//   c[N-1:0] (2^(i+1)) carries of the full-adder row.
//   we[0] + we[1] + we[2] + we[3] + d = s + 2*c
// so the two carry-save vectors, each N+1 bits wide, are s and {c, 1'b0}.
//
// The split of the operands (three into the full-adder row, one into the
// chain multiplexer's data input) and the carry-chain input d follow the
// carry-chain realisation of this unit; the port names we0..we3, d, s and c
// follow its post-synthesis netlist. The operand array and the choice of
// which array index feeds the chain are this design's own. Combinational;
// the delay is one LUT level plus the chain.
// The chain is a whole number of 4-bit segments; the sum bits of the
// zero-padded positions above N-1 are left unused on purpose.
module csa4_cc
  import mo_add_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] we [UNIT_OPERANDS],
  input  logic         d,
  output logic [N:0]   s,
  output logic [N-1:0] c
);

  localparam int unsigned NSEG = n_segments(N);
  localparam int unsigned NPAD = NSEG * CHAIN_SEG;

  logic [N-1:0]    fs;         // full-adder row sum bits
  logic [NPAD-1:0] prop;       // chain select (propagate), zero-padded
  logic [NPAD-1:0] gen;        // chain data input, zero-padded
  logic [NPAD-1:0] sum_o;      // chain XOR outputs
  logic [NPAD-1:0] carry_o;    // chain multiplexer outputs

  // First layer: full-adder row on three operands.
  csa3_row #(.N(N)) u_row (
    .x1(we[0]),
    .x2(we[1]),
    .x3(we[2]),
    .s (fs),
    .c (c)
  );

  // LUT stage: propagate of fs + we[3]; the padding bits above N-1 carry
  // nothing into the result.
  always_comb begin
    prop = '0;
    gen  = '0;
    prop[N-1:0] = fs ^ we[3];
    gen[N-1:0]  = we[3];
  end

  // Second layer: the carry chain, segment by segment.
  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    logic seg_ci;
    if (k == 0) begin : g_first
      assign seg_ci = d;
    end else begin : g_next
      assign seg_ci = carry_o[k*CHAIN_SEG-1];
    end
    carry4 u_carry4 (
      .ci (seg_ci),
      .di (gen[k*CHAIN_SEG +: CHAIN_SEG]),
      .sel(prop[k*CHAIN_SEG +: CHAIN_SEG]),
      .o  (sum_o[k*CHAIN_SEG +: CHAIN_SEG]),
      .co (carry_o[k*CHAIN_SEG +: CHAIN_SEG])
    );
  end

  assign s = {carry_o[N-1], sum_o[N-1:0]};

endmodule
