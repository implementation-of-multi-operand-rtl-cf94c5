// cpa: N-bit two-operand carry-propagate adder on the fast carry chain.
//
// This is the final stage of multi-operand addition: once a tree has reduced
// the operands to a carry-save pair, one binary addition gives the result.
// Each bit forms the propagate a[i] ^ b[i], which selects the carry-chain
// multiplexer; the multiplexer's data input is a[i], so a bit that does not
// propagate generates a carry exactly when both inputs are 1. The chain is
// ceil(N/4) carry4 segments.
//
// sum = a + b + ci, N+1 bits wide (sum[N] is the carry out). Combinational.
// The use of the carry chain for this adder is this design's choice, made to
// match the rest of the datapath.
// The chain is a whole number of 4-bit segments; the sum bits of the
// zero-padded positions above N-1 are left unused on purpose.
module cpa
  import mo_add_pkg::*;
#(
  parameter int unsigned N = 18
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N:0]   sum
);

  localparam int unsigned NSEG = n_segments(N);
  localparam int unsigned NPAD = NSEG * CHAIN_SEG;

  logic [NPAD-1:0] prop;
  logic [NPAD-1:0] gen;
  logic [NPAD-1:0] sum_o;
  logic [NPAD-1:0] carry_o;

  always_comb begin
    prop = '0;
    gen  = '0;
    prop[N-1:0] = a ^ b;
    gen[N-1:0]  = a;
  end

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    logic seg_ci;
    if (k == 0) begin : g_first
      assign seg_ci = ci;
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

  assign sum = {carry_o[N-1], sum_o[N-1:0]};

endmodule
