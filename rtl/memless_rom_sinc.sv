// memless_rom_sinc: "memoryless ROM" for sin C, the fine segment of the
// quarter-wave sine.
//
// For the 4-bit address c = 0..15 it produces
//   sin_c = round((2^11 - 1) * sin(pi/2 * (c + 1/2)/4096)),  4 bits (0..12),
// as combinational logic instead of a stored table. The half-LSB offset in
// (c + 1/2) shifts the whole 12-bit quarter-wave address by half a step, so
// that the one's complement of the address used for the second and fourth
// quadrants lands exactly on the mirrored angle and no two's complement
// adder is needed. The document asks for such an offset in the sub-ROMs;
// placing all of it in this finest sub-ROM is this design's choice.
//
// The four address bits are named x[0]..x[3] with x[0] the most significant
// one, the naming of the published equations. Each output bit is a
// two-level AND-OR function of the address, minimised by Karnaugh map, so
// the block holds no storage: no registers and no multiplexers.
//
// The document names the outputs C3..C0 and says they are derived like
// sin A; the equations themselves were minimised for this design.
//
// Interface: combinational, addr -> sin_c, no clock.
module memless_rom_sinc (
  input  logic [3:0] addr,
  output logic [3:0] sin_c
);

  logic [0:3] x;          // x[0] = address MSB
  assign x = addr;

  assign sin_c[3] = (x[0] & x[2]) | (x[0] & x[1]);
  assign sin_c[2] = (~x[0] & x[1]) | (x[1] & x[2] & x[3]) | (x[0] & ~x[1] & ~x[2]);
  assign sin_c[1] = (~x[0] & ~x[1] & x[2]) | (~x[0] & x[2] & x[3]) | (x[0] & ~x[2]) | (x[0] & x[1] & ~x[3]);
  assign sin_c[0] = (~x[1] & x[3]) | (x[1] & x[2] & ~x[3]) | (x[0] & ~x[1] & ~x[2]) | (x[0] & ~x[2] & x[3]);

endmodule
