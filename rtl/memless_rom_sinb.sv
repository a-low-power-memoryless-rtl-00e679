// memless_rom_sinb: "memoryless ROM" for sin B, the middle segment of the
// quarter-wave sine.
//
// For the 4-bit address b = 0..15 it produces
//   sin_b = round((2^11 - 1) * sin(pi/2 * b/256)),  8 bits (0..188),
// i.e. the sine of the angle b spans inside one coarse step of segment A,
// as combinational logic instead of a stored table.
//
// The four address bits are named x[0]..x[3] with x[0] the most significant
// one, the naming of the published equations. Each output bit is a
// two-level AND-OR function of the address, minimised by Karnaugh map, so
// the block holds no storage: no registers and no multiplexers.
//
// The document names the outputs B7..B0 and says they are derived like sin A;
// the equations themselves were minimised for this design.
//
// Interface: combinational, addr -> sin_b, no clock.
module memless_rom_sinb (
  input  logic [3:0] addr,
  output logic [7:0] sin_b
);

  logic [0:3] x;          // x[0] = address MSB
  assign x = addr;

  assign sin_b[7] = (x[0] & x[2] & x[3]) | (x[0] & x[1]);
  assign sin_b[6] = (~x[0] & x[1] & x[2]) | (x[0] & ~x[1] & ~x[2]) | (x[0] & ~x[1] & ~x[3]);
  assign sin_b[5] = (~x[0] & ~x[1] & x[2] & x[3]) | (~x[0] & x[1] & ~x[2]) | (x[0] & ~x[1] & ~x[2]) | (x[0] & x[2] & ~x[3]) | (x[0] & x[1] & x[3]);
  assign sin_b[4] = (~x[1] & x[2] & ~x[3]) | (x[1] & ~x[2] & ~x[3]) | (~x[0] & x[1] & x[3]) | (x[0] & ~x[1] & ~x[2] & x[3]) | (x[0] & x[1] & x[2]);
  assign sin_b[3] = (~x[0] & ~x[2] & x[3]) | (~x[0] & x[2] & ~x[3]) | (x[1] & x[2] & x[3]) | (x[0] & ~x[1] & x[2]);
  assign sin_b[2] = (~x[0] & ~x[1] & x[3]) | (~x[0] & ~x[2] & x[3]) | (x[0] & ~x[1] & ~x[3]) | (x[0] & ~x[2] & ~x[3]) | (x[0] & x[1] & x[2] & x[3]);
  assign sin_b[1] = (~x[1] & x[2] & x[3]) | (~x[0] & x[1] & ~x[3]) | (x[1] & ~x[2]) | (x[0] & ~x[1] & x[2]);
  assign sin_b[0] = (~x[2] & x[3]) | (~x[0] & x[2] & ~x[3]) | (x[0] & x[1] & ~x[2]);

endmodule
