// tb_shifted_clock: the load-enable chain must reproduce the strobe k
// delayed by 1, 2 and 3 clock cycles on load_en[0..2]. Random strobes are
// applied and compared with a history of k kept by the testbench.
module tb_shifted_clock;
  localparam int STAGES = 3;   // the module's default
  logic clk = 0, rst_n = 0, k = 0;
  logic [STAGES-1:0] load_en;
  logic [15:0] hist = '0;   // hist[i] = k sampled i+1 edges ago
  int checks = 0, failures = 0, cycles = 0;

  shifted_clock dut (.clk, .rst_n, .k, .load_en);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (1000) begin
      @(posedge clk);
      hist = {hist[14:0], k};
      #1;
      for (int i = 0; i < STAGES; i++) begin
        checks++;
        if (load_en[i] !== hist[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d load_en[%0d]=%0b expected %0b", cycles, i, load_en[i], hist[i]);
        end
      end
      k = ($urandom % 4) == 0;
      cycles++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
