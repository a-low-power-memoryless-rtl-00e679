// tb_memless_rom_sina: exhaustive check of the sin A memoryless ROM.
// For every 4-bit address the output is compared with
// round((2^11 - 1) * sine of the segment angle), computed here in floating
// point independently of the logic equations.
module tb_memless_rom_sina;
  logic [3:0] addr;
  logic [10:0] sin_a;
  int checks = 0, failures = 0;

  memless_rom_sina dut (.addr, .sin_a);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int expected;
      addr = 4'(i);
      #1;
      expected = $rtoi(2047.0 * $sin(3.14159265358979 * real'(i) / 32.0) + 0.5);
      checks++;
      if (int'(sin_a) != expected) begin
        failures++;
        $display("FAIL addr=%0d sin_a=%0d expected %0d", i, sin_a, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
