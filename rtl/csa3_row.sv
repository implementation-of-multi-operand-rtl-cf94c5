// csa3_row: three-operand N-bit carry-save adder, a row of N full adders.
//
// Bit i of the three operands goes into full adder i; nothing passes between
// the columns, so the delay is that of one full adder regardless of N. The
// result is kept as two vectors:
//   s[i] has weight 2^i      (the sum vector, with a 0 above bit N-1),
//   c[i] has weight 2^(i+1)  (the carry vector, shifted up by one, 0 at bit 0),
// so x1 + x2 + x3 = s + 2*c. The same row forms the first layer of the
// carry-chain four-operand unit (csa4_cc). Combinational.
module csa3_row #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  input  logic [N-1:0] x3,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (x1[i]),
      .b (x2[i]),
      .ci(x3[i]),
      .s (s[i]),
      .co(c[i])
    );
  end

endmodule
