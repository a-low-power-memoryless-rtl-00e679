// shifted_clock: load-enable chain of the phase accumulator's frequency
// control word (FCW) input registers ("shifted clocking").
//
// In a pipelined accumulator, stage k works on the phase step that stage 0
// worked on k cycles earlier, so a new FCW must reach stage k k cycles after
// it reaches stage 0. Instead of delaying the FCW bits through skew
// registers, a single bit is delayed: a chain of STAGES flip-flops carries
// the load strobe K, and flip-flop k enables the FCW input register of stage
// k. That costs N + L registers in total instead of N(L+1)/2.
//
// Interface: k is a one-cycle load strobe. load_en[0] is high in the cycle
// after k, load_en[k] k cycles later still. The FCW itself must be held
// stable from the cycle k is high until load_en[STAGES-1] has been high.
// The flip-flop chain is as published; which chain output drives which
// register, the reset to zero and leaving out the set input drawn on the
// first flip-flop are this design's reading of the diagram.
module shifted_clock #(
  parameter int unsigned STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              k,
  output logic [STAGES-1:0] load_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_en <= '0;
    end else begin
      load_en[0] <= k;
      for (int unsigned i = 1; i < STAGES; i++) load_en[i] <= load_en[i-1];
    end
  end

endmodule
