// tb_compressed_rom: checks the compressed quarter-wave sine ROM.
//
// All 4096 addresses are applied, one per clock, followed by random ones.
// The magnitude must equal the reference model's value for the address
// applied two edges earlier (two-register latency of the block), and must
// stay within 12 LSB of the ideal 2047 sin(pi/2 (addr + 1/2)/4096).
module tb_compressed_rom;
  import ddfs_pkg::*;
  import ddfs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [MAG_W-1:0]  mag;
  int checks = 0, failures = 0;
  int a_hist [2] = '{default: 0};
  real worst = 0.0;

  compressed_rom dut (.clk, .rst_n, .addr, .mag);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096 + 2000 + 2; i++) begin
      addr = (i < 4096) ? ADDR_W'(i) : ADDR_W'($urandom);
      a_hist[1] = a_hist[0]; a_hist[0] = int'(addr);
      @(negedge clk);
      if (i >= 1) begin
        checks++;
        if (int'(mag) != ref_mag(a_hist[1])) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d mag=%0d expected %0d", a_hist[1], mag, ref_mag(a_hist[1]));
        end
        err = real'(mag) - 2047.0 * $sin(PI / 2.0 * (real'(a_hist[1]) + 0.5) / 4096.0);
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        checks++;
        if (err > 12.0) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d mag=%0d off the sine by %f", a_hist[1], mag, err);
        end
      end
    end
    $display("largest deviation from the ideal sine: %f LSB", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
