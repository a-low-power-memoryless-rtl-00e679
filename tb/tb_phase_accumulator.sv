// tb_phase_accumulator: checks the pipelined 24-bit phase accumulator
// against a plain 24-bit accumulator model.
//
// Reference: with the load strobe sampled at edge j0, the new FCW is first
// contained in the phase shown after edge j0 + 4 (L + 1 with L = 3 stages).
// The model keeps, per edge, the FCW in force and adds the one in force four
// edges earlier, then compares bits 23:10 with the phase output after every
// edge. FCW values include 0x0EFFFF (the published example), 0xFFFFFF and
// random words, changed while the accumulator runs. The testbench also
// counts, in the model, the carries between the 8-bit stages and fails if either never
// occurs.
module tb_phase_accumulator;
  import ddfs_pkg::*;
  logic clk = 0, rst_n = 0, fcw_load = 0;
  logic [ACC_W-1:0] fcw = '0;
  logic [PHASE_W-1:0] phase;
  int checks = 0, failures = 0;
  int carry01 = 0, carry12 = 0, loads = 0;

  phase_accumulator dut (.clk, .rst_n, .fcw, .fcw_load, .phase);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [ACC_W-1:0] cur_f = '0, gref = '0;
  logic [ACC_W-1:0] fh [4] = '{default: '0};   // FCW in force 1..4 edges ago
  bit running = 0;

  always @(posedge clk) if (running) begin
    if (fcw_load) cur_f = fcw;
    if (9'(gref[7:0]) + 9'(fh[3][7:0]) > 9'd255) carry01++;
    if (17'(gref[15:0]) + 17'(fh[3][15:0]) > 17'h0FFFF) carry12++;
    gref = gref + fh[3];
    fh[3] = fh[2]; fh[2] = fh[1]; fh[1] = fh[0]; fh[0] = cur_f;
    #1;
    checks++;
    if (phase !== gref[ACC_W-1 -: PHASE_W]) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t phase=%h expected %h", $time, phase, gref[ACC_W-1 -: PHASE_W]);
    end
  end

  task automatic load(input logic [ACC_W-1:0] f, input int hold);
    @(negedge clk);
    fcw = f; fcw_load = 1;
    @(negedge clk);
    fcw_load = 0;
    loads++;
    repeat (hold) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    running = 1;
    repeat (3) @(negedge clk);
    load(24'h0EFFFF, 600);
    load(24'hFFFFFF, 50);
    load(24'h000001, 40);
    load(24'h800000, 20);
    for (int i = 0; i < 200; i++) load(24'($urandom), 4 + ($urandom % 60));
    load(24'h000100, 300);
    running = 0;
    if (carry01 == 0 || carry12 == 0) begin
      failures++;
      $display("FAIL an inter-stage carry never occurred (%0d, %0d)", carry01, carry12);
    end
    $display("loads=%0d carry0to1=%0d carry1to2=%0d", loads, carry01, carry12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
