// carry4: a 4-bit segment of the FPGA fast carry chain, written as logic.
//
// Per bit i the chain holds a 2:1 multiplexer and an XOR. The select input
// sel[i] is the propagate signal computed in the LUT in front of the chain:
//   co[i] = sel[i] ? carry_in_of_bit_i : di[i]
//   o[i]  = sel[i] ^ carry_in_of_bit_i
// Bit 0 takes its carry from ci, bit i>0 from co[i-1]. With sel = a ^ b and
// di = a (or b), o is the sum of a, b and ci, and co[3] the carry out.
// Segments are chained by feeding co[3] into the next segment's ci. The port
// names mirror the primitive's pins (CI, DI, S, O, CO); the multiplexer and
// XOR per bit are the structure the carry-chain realisation shows.
// Combinational.
module carry4 (
  input  logic       ci,
  input  logic [3:0] di,
  input  logic [3:0] sel,
  output logic [3:0] o,
  output logic [3:0] co
);

  logic [4:0] cy;   // cy[i]: carry into bit i

  assign cy[0] = ci;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    assign o[i]      = sel[i] ^ cy[i];
    assign cy[i + 1] = sel[i] ? cy[i] : di[i];
  end

  assign co = cy[4:1];

endmodule
