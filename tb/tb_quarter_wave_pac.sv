// tb_quarter_wave_pac: checks the phase-to-amplitude converter over the
// whole period.
//
// All 16384 phase words are applied, one per clock, then random ones. The
// output must equal the reference code for the phase applied two edges
// earlier and stay within 12 LSB of the ideal sine. Each of the four
// quadrants (sign and mirror bits) is counted and must occur. Over the
// first, complete period the signal-to-noise ratio of the output against the
// ideal sine is computed and printed; it must exceed 45 dB (the
// decomposition as built reaches about 47.6 dB, see the README).
module tb_quarter_wave_pac;
  import ddfs_pkg::*;
  import ddfs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PHASE_W-1:0] phase = '0;
  logic [OUT_W-1:0]   dac_code;
  int checks = 0, failures = 0;
  int p_hist [2] = '{default: 0};
  int quad [4] = '{default: 0};

  quarter_wave_pac dut (.clk, .rst_n, .phase, .dac_code);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err, noise = 0.0, snr_db;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16384 + 3000 + 2; i++) begin
      phase = (i < 16384) ? PHASE_W'(i) : PHASE_W'($urandom);
      p_hist[1] = p_hist[0]; p_hist[0] = int'(phase);
      @(negedge clk);
      if (i >= 1) begin
        quad[p_hist[1] >> 12]++;
        checks++;
        if (int'(dac_code) != ref_code(p_hist[1])) begin
          failures++;
          if (failures < 10) $display("FAIL phase=%0d code=%0d expected %0d", p_hist[1], dac_code, ref_code(p_hist[1]));
        end
        err = real'(dac_code) - ideal_code(p_hist[1]);
        if (i <= 16384) noise += err * err;
        if (err < 0) err = -err;
        checks++;
        if (err > 12.5) begin
          failures++;
          if (failures < 10) $display("FAIL phase=%0d code=%0d off the sine by %f", p_hist[1], dac_code, err);
        end
      end
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad[q] == 0) begin
        failures++;
        $display("FAIL quadrant %0d never exercised", q);
      end
    end
    // full-scale sine power 2047^2/2 over the mean squared error
    snr_db = 10.0 * $log10((2047.0 * 2047.0 / 2.0) / (noise / 16384.0));
    $display("SNR over one full period: %f dB", snr_db);
    checks++;
    if (snr_db < 45.0) begin
      failures++;
      $display("FAIL SNR too low");
    end
    $display("quadrant samples: %0d %0d %0d %0d", quad[0], quad[1], quad[2], quad[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
