// full_adder: one-bit full adder, the 3:2 counter every carry-save structure
// of this design is made of.
//
// s is the parity of the three inputs and co their majority, so
// a + b + ci = 2*co + s. Purely combinational; no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
