// ddfs_top: complete direct digital frequency synthesizer (DDFS).
//
// A 24-bit pipelined phase accumulator (phase_accumulator) adds the
// frequency control word (FCW) to the phase every clock cycle; its top 14
// bits drive a phase-to-amplitude converter (quarter_wave_pac) made of
// quadrant folding and a memoryless, angular-decomposition sine ROM. The
// output is a 12-bit sample per clock for an external DAC, at
//   f_out = FCW * f_clk / 2^24
// (for example FCW = 0x0EFFFF at 125 MHz gives 7.324 MHz).
//
// Interface: load a new FCW by holding it on fcw and pulsing fcw_load for
// one cycle; keep fcw stable for three more cycles. phase is the 14-bit
// accumulator output (bits 23:10), brought out for observation. dac_code is
// offset binary (2048 = zero).
//
// Timing: with fcw_load sampled at edge j0, phase first includes the new
// FCW after edge j0 + 4, and dac_code shows the sample of a phase value two
// edges after phase shows it. Reset is asynchronous and active low; after
// reset the FCW is zero and the output sits at mid-scale.
module ddfs_top
  import ddfs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ACC_W-1:0]   fcw,
  input  logic               fcw_load,
  output logic [PHASE_W-1:0] phase,
  output logic [OUT_W-1:0]   dac_code
);

  phase_accumulator u_pa (
    .clk      (clk),
    .rst_n    (rst_n),
    .fcw      (fcw),
    .fcw_load (fcw_load),
    .phase    (phase)
  );

  quarter_wave_pac u_pac (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase),
    .dac_code (dac_code)
  );

endmodule
