// compressed_rom: 12-bit compressed quarter-wave sine built from three 4-bit
// memoryless sub-ROMs by angular decomposition.
//
// The 12-bit quarter-wave address is split into A = addr[11:8] (coarse),
// B = addr[7:4] and C = addr[3:0] (fine). With the angle
// theta = A + B + C and B, C small, the sine is approximated as
//   sin(theta) ~= sin A + cos A * sin B + cos A * sin C,
// which needs three small sub-ROMs, two multipliers and two adders in
// place of a 4096-word table. All sub-ROM words are scaled by 2^11 - 1,
// so each product is divided by 2^11 by dropping its low 11 bits.
//
// cos A is not stored: it is read from the sin A logic with the coarse
// address complemented (A XOR 1111), since sin(pi/2 * (15 - A)/16) is
// cos(pi/2 * (A + 1)/16). The published description obtains cos A from the
// sin A sub-ROM through XOR gates with one input at logic high, applied to
// the complement of sin A; applying them to the sub-ROM address, which
// needs a second copy of the sin A logic, is this design's reading, since
// complementing the sin A output word does not produce a cosine.
//
// Pipeline, as in the published diagram: the sub-ROM/multiplier outputs
// sin A, cos A * sin B and cos A * sin C are registered (three registers),
// the two adders follow, and the sum is registered again. mag therefore
// shows the magnitude of the address applied two clock edges earlier.
// mag is the 11-bit quarter-wave magnitude, 0..2037; the published diagram
// widens it to 12 bits with a grounded bit, which here is left to the
// quadrant logic around this block (quarter_wave_pac).
//
// Reset (asynchronous, active low) clearing the registers is this design's
// choice.
module compressed_rom
  import ddfs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  output logic [MAG_W-1:0]  mag
);

  logic [SEG_W-1:0]  seg_a, seg_b, seg_c;
  logic [SINA_W-1:0] sin_a, cos_a;
  logic [SINB_W-1:0] sin_b;
  logic [SINC_W-1:0] sin_c;

  assign seg_a = addr[3*SEG_W-1 -: SEG_W];
  assign seg_b = addr[2*SEG_W-1 -: SEG_W];
  assign seg_c = addr[SEG_W-1   -: SEG_W];

  memless_rom_sina u_sin_a (.addr(seg_a),             .sin_a(sin_a));
  memless_rom_sina u_cos_a (.addr(seg_a ^ 4'b1111),   .sin_a(cos_a));
  memless_rom_sinb u_sin_b (.addr(seg_b),             .sin_b(sin_b));
  memless_rom_sinc u_sin_c (.addr(seg_c),             .sin_c(sin_c));

  // cos A * sin B / 2^11 and cos A * sin C / 2^11
  logic [SINA_W+SINB_W-1:0] prod_b;
  logic [SINA_W+SINC_W-1:0] prod_c;
  assign prod_b = cos_a * sin_b;
  assign prod_c = cos_a * sin_c;

  logic [MAG_W-1:0] sin_a_r, cb_r, cc_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_a_r <= '0;
      cb_r    <= '0;
      cc_r    <= '0;
    end else begin
      sin_a_r <= sin_a;
      cb_r    <= MAG_W'(prod_b >> MAG_W);
      cc_r    <= MAG_W'(prod_c >> MAG_W);
    end
  end

  // Two adders; the sum never exceeds 2037 (checked below).
  logic [MAG_W:0] total;
  assign total = (MAG_W+1)'(sin_a_r) + (MAG_W+1)'(cb_r) + (MAG_W+1)'(cc_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mag <= '0;
    else        mag <= total[MAG_W-1:0];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !total[MAG_W])
    else $error("compressed_rom: magnitude sum overflowed %0d bits", MAG_W);

endmodule
