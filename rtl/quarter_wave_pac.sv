// quarter_wave_pac: phase-to-amplitude converter using quarter-wave
// symmetry around the compressed sine ROM.
//
// Only the first quarter of the sine (0 to pi/2) is generated. Of the 14-bit
// phase word, bit 13 selects the half period (sign) and bit 12 the odd or
// even quarter inside it; bits 11:0 are the quarter-wave address. In the
// second and fourth quarters the address is complemented bit by bit (one's
// complement) so the quarter is read backwards; the half-LSB offset built
// into the sin C sub-ROM makes this exact without an incrementer. In the
// second half period the 11-bit magnitude is complemented as well.
//
// Output format (this design's choice, the document does not give one): a
// 12-bit offset-binary code for a DAC, out = {~sign, mag ^ {11{sign}}},
// i.e. 2048 + mag in the first half period and 2047 - mag in the second,
// symmetric about mid-scale and formed with XOR gates only. The sign bit is
// delayed by the two pipeline registers of compressed_rom so that out is
// the sample of the phase applied two clock edges earlier.
module quarter_wave_pac
  import ddfs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase,
  output logic [OUT_W-1:0]   dac_code
);

  logic              sign, mirror;
  logic [ADDR_W-1:0] addr;
  logic [MAG_W-1:0]  mag;
  logic [1:0]        sign_d;

  assign sign   = phase[PHASE_W-1];
  assign mirror = phase[PHASE_W-2];
  assign addr   = phase[ADDR_W-1:0] ^ {ADDR_W{mirror}};

  compressed_rom u_rom (
    .clk   (clk),
    .rst_n (rst_n),
    .addr  (addr),
    .mag   (mag)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sign_d <= '0;
    else        sign_d <= {sign_d[0], sign};
  end

  assign dac_code = {~sign_d[1], mag ^ {MAG_W{sign_d[1]}}};

endmodule
