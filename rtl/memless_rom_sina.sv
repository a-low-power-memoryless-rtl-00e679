// memless_rom_sina: "memoryless ROM" for sin A, the coarse segment of the
// quarter-wave sine.
//
// For the 4-bit coarse address a = 0..15 it produces
//   sin_a = round((2^11 - 1) * sin(pi/2 * a/16)),  11 bits,
// as combinational logic instead of a stored table: each output bit is
// written as a sum-of-products of the address bits, in the manner of a
// seven-segment decoder.
//
// The four address bits are named x[0]..x[3] with x[0] the most significant
// one, the naming of the published equations. Each output bit is a
// two-level AND-OR function of the address, minimised by Karnaugh map, so
// the block holds no storage: no registers and no multiplexers.
//
// Bits 10 and 9 are the published equations, A10 = X0 + X1 X2 and
// A9 = X1 ~X2 + X0 X3 + X2 (X0 + ~X1 X3). The document gives only these
// two; bits 8..0 were minimised the same way for this design. The 11-bit
// scale (2^11 - 1 rather than 2^12 - 1) is the one the published A10/A9
// equations and the 11-bit sin A bus imply.
//
// Interface: combinational, addr -> sin_a, no clock.
module memless_rom_sina (
  input  logic [3:0]  addr,
  output logic [10:0] sin_a
);

  logic [0:3] x;          // x[0] = address MSB
  assign x = addr;

  assign sin_a[10] = x[0] | (x[1] & x[2]);
  assign sin_a[9]  = (x[1] & ~x[2]) | (x[0] & x[3]) | (x[2] & (x[0] | (~x[1] & x[3])));
  assign sin_a[8] = (~x[0] & ~x[1] & x[2] & ~x[3]) | (x[1] & ~x[2]) | (x[1] & x[3]) | (x[0] & ~x[2] & ~x[3]) | (x[0] & x[2] & x[3]) | (x[0] & x[1]);
  assign sin_a[7] = (~x[0] & ~x[2] & x[3]) | (~x[1] & x[2] & ~x[3]) | (x[0] & ~x[1] & ~x[3]) | (x[0] & x[1] & x[3]) | (x[0] & x[1] & x[2]);
  assign sin_a[6] = (~x[0] & ~x[1] & x[3]) | (~x[0] & ~x[2] & x[3]) | (x[1] & x[2] & ~x[3]) | (x[0] & x[1] & ~x[3]) | (x[0] & x[1] & x[2]);
  assign sin_a[5] = (~x[0] & x[1] & x[2] & ~x[3]) | (x[0] & ~x[1] & ~x[3]) | (x[0] & ~x[2]) | (x[0] & x[1] & x[3]);
  assign sin_a[4] = (~x[0] & x[2] & x[3]) | (x[1] & x[2]);
  assign sin_a[3] = (~x[1] & ~x[2] & x[3]) | (~x[0] & ~x[1] & x[2] & ~x[3]) | (~x[0] & x[1] & ~x[2] & ~x[3]) | (x[0] & ~x[1] & x[3]) | (x[0] & x[1] & x[2] & ~x[3]);
  assign sin_a[2] = (~x[1] & x[2] & ~x[3]) | (~x[0] & x[1] & ~x[2]) | (x[0] & ~x[1]) | (x[0] & x[3]);
  assign sin_a[1] = (~x[1] & x[2] & ~x[3]) | (~x[0] & x[2] & x[3]) | (x[1] & ~x[2] & ~x[3]) | (x[0] & ~x[2]);
  assign sin_a[0] = (~x[0] & ~x[2] & x[3]) | (~x[0] & x[2] & ~x[3]) | (~x[0] & x[1]) | (x[1] & x[3]) | (x[0] & ~x[2] & ~x[3]) | (x[0] & x[2] & x[3]);

endmodule
