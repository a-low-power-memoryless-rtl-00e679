// tb_cla8: exhaustive check of the 8-bit carry look-ahead adder.
// Every x, y and carry-in combination (2^17) is applied and the sum and
// carry-out are compared with the integer sum x + y + cin.
module tb_cla8;
  logic [7:0] x, y, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla8 dut (.x, .y, .cin, .s, .cout);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, y, x} = 17'(i);
      #1;
      checks++;
      if ({cout, s} !== 9'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d cin=%0d -> s=%0d cout=%0d", x, y, cin, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
