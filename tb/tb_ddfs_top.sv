// tb_ddfs_top: end-to-end test of the complete synthesizer at its default
// sizes.
//
// A behavioural model (a plain 24-bit accumulator plus the floating-point
// amplitude reference of ddfs_ref_pkg) predicts, for every clock edge, the
// 14-bit phase word and the 12-bit output code; the design must match both
// exactly. The run loads the published example FCW = 0x0EFFFF, measures the
// output frequency by counting rising mid-scale crossings (expected
// 0x0EFFFF / 2^24 of the clock rate, i.e. 7.324 MHz at 125 MHz) and then
// changes the FCW on the fly to other and random words. It counts how often
// each mechanism occurs (FCW load, carry into the middle and top
// accumulator stage, mirrored-address quarters, negative half periods,
// accumulator wrap-around) and fails if one never does.
module tb_ddfs_top;
  import ddfs_pkg::*;
  import ddfs_ref_pkg::*;
  logic clk = 0, rst_n = 0, fcw_load = 0;
  logic [ACC_W-1:0]   fcw = '0;
  logic [PHASE_W-1:0] phase;
  logic [OUT_W-1:0]   dac_code;
  int checks = 0, failures = 0;
  int n_load = 0, n_carry1 = 0, n_carry2 = 0, n_mirror = 0, n_neg = 0, n_wrap = 0;

  ddfs_top dut (.clk, .rst_n, .fcw, .fcw_load, .phase, .dac_code);

  always #4 clk = ~clk;   // 125 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model --------------------------------------------------
  logic [ACC_W-1:0] cur_f = '0, gref = '0;
  logic [ACC_W-1:0] fh [4] = '{default: '0};
  int ph_hist [3] = '{default: 0};
  bit running = 0;
  int rising = 0;
  logic prev_pos = 0;

  always @(posedge clk) if (running) begin
    if (fcw_load) cur_f = fcw;
    if (9'(gref[7:0]) + 9'(fh[3][7:0]) > 9'd255) n_carry1++;
    if (17'(gref[15:0]) + 17'(fh[3][15:0]) > 17'h0FFFF) n_carry2++;
    if (25'(gref) + 25'(fh[3]) > 25'hFFFFFF) n_wrap++;
    gref = gref + fh[3];
    fh[3] = fh[2]; fh[2] = fh[1]; fh[1] = fh[0]; fh[0] = cur_f;
    ph_hist[2] = ph_hist[1]; ph_hist[1] = ph_hist[0];
    ph_hist[0] = int'(gref[ACC_W-1 -: PHASE_W]);
    #1;
    checks++;
    if (int'(phase) != ph_hist[0]) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t phase=%h expected %h", $time, phase, ph_hist[0]);
    end
    checks++;
    if (int'(dac_code) != ref_code(ph_hist[2])) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t code=%0d expected %0d", $time, dac_code, ref_code(ph_hist[2]));
    end
    if ((ph_hist[2] & 32'h1000) != 0) n_mirror++;
    if ((ph_hist[2] & 32'h2000) != 0) n_neg++;
    if (dac_code[OUT_W-1] && !prev_pos) rising++;
    prev_pos = dac_code[OUT_W-1];
  end

  task automatic load(input logic [ACC_W-1:0] f, input int hold);
    @(negedge clk);
    fcw = f; fcw_load = 1;
    @(negedge clk);
    fcw_load = 0;
    n_load++;
    repeat (hold) @(negedge clk);
  endtask

  initial begin
    int r0, cycles;
    real expected;
    repeat (2) @(negedge clk);
    rst_n = 1;
    running = 1;
    repeat (3) @(negedge clk);
    // published example: 0x0EFFFF at 125 MHz -> 7.324 MHz
    load(24'h0EFFFF, 20);
    r0 = rising;
    cycles = 40000;
    repeat (cycles) @(negedge clk);
    expected = real'(cycles) * real'(24'h0EFFFF) / 16777216.0;
    $display("FCW 0EFFFF: %0d periods in %0d cycles, expected %f (f_out = %f MHz at 125 MHz)",
             rising - r0, cycles, expected, 125.0 * real'(rising - r0) / real'(cycles));
    checks++;
    if ((real'(rising - r0) - expected) > 1.5 || (expected - real'(rising - r0)) > 1.5) begin
      failures++;
      $display("FAIL output frequency");
    end
    // frequency changes while running
    load(24'h000FFF, 5000);
    load(24'h400000, 40);
    load(24'hFFFFFF, 40);
    for (int i = 0; i < 100; i++) load(24'($urandom), 4 + ($urandom % 200));
    repeat (4) @(negedge clk);
    running = 0;
    $display("mechanisms: fcw loads=%0d carry into stage1=%0d carry into stage2=%0d wraps=%0d mirrored quarters=%0d negative half=%0d",
             n_load, n_carry1, n_carry2, n_wrap, n_mirror, n_neg);
    if (n_load == 0 || n_carry1 == 0 || n_carry2 == 0 || n_wrap == 0 || n_mirror == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
