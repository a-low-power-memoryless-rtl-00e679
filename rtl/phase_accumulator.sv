// phase_accumulator: 24-bit pipelined phase accumulator (PA) with shifted
// clocking.
//
// The accumulator is cut into L = N/8 stages of 8 bits, each with its own
// FCW input register, an 8-bit carry look-ahead adder (cla8) and an 8-bit
// accumulator register. The carry out of stage k is registered in a single
// flip-flop and enters stage k+1 one cycle later, so no carry ripples
// through more than 8 bits in a cycle. Stage 0 adds with its carry input
// tied to zero. Stage k therefore holds its byte of the phase k cycles after
// stage 0 held its own; the FCW input registers are loaded with the same
// skew by the shifted_clock enable chain, and the output bits taken from
// lower stages are delayed so that every bit of the phase word belongs to one phase
// step. With the default sizes that is the top 8 bits from stage 2 and the
// top 6 bits of stage 1 through a 6-bit register, OUT = acc[23:10], as in
// the published block diagram.
//
// Interface: pulse fcw_load for one cycle with the new FCW on fcw, and
// hold fcw for the next L cycles (the input registers of stages 0..L-1 are
// loaded 1..L edges after the edge that samples fcw_load). The carry out of
// the top stage is dropped: the phase wraps modulo 2^N.
//
// Timing: if the edge that samples fcw_load is edge j0, the first value of
// phase that contains the new FCW appears after edge j0 + L + 1, and from
// then on phase grows by the FCW (top OUT_BITS bits of the N-bit sum) every
// cycle. Reset (asynchronous, active low, this design's choice) clears the
// FCW, carry and accumulator registers, so the phase starts at zero.
module phase_accumulator
  import ddfs_pkg::*;
#(
  parameter int unsigned N       = ACC_W,
  parameter int unsigned OUT_BITS = PHASE_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        fcw,
  input  logic                fcw_load,
  output logic [OUT_BITS-1:0] phase
);

  localparam int unsigned W = STAGE_W;  // the adder is cla8
  localparam int unsigned L = N / W;

  if (N % W != 0 || L < 2) begin : g_size_check
    $error("phase_accumulator: N must be a multiple of 8, at least 16");
  end
  if (OUT_BITS > N) begin : g_out_check
    $error("phase_accumulator: OUT_BITS must not exceed N");
  end

  logic [L-1:0]   load_en;
  logic [W-1:0]   fcw_r [L];     // FCW input registers
  logic [W-1:0]   acc   [L];     // accumulator registers
  logic [W-1:0]   sum   [L];
  logic [L-1:0]   carry_in;      // carry into stage k (registered for k > 0)
  logic [L-1:0]   carry_out;
  logic [N-1:0]   aligned;       // all stages brought to the same phase step

  shifted_clock #(.STAGES(L)) u_shift (
    .clk     (clk),
    .rst_n   (rst_n),
    .k       (fcw_load),
    .load_en (load_en)
  );

  assign carry_in[0] = 1'b0;     // stage 0 carry input is grounded

  for (genvar k = 0; k < L; k++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          fcw_r[k] <= '0;
      else if (load_en[k]) fcw_r[k] <= fcw[k*W +: W];
    end

    cla8 u_cla (
      .x    (fcw_r[k]),
      .y    (acc[k]),
      .cin  (carry_in[k]),
      .s    (sum[k]),
      .cout (carry_out[k])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) acc[k] <= '0;
      else        acc[k] <= sum[k];
    end

    // carry flip-flop between stage k and stage k+1
    if (k < L - 1) begin : g_carry
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) carry_in[k+1] <= 1'b0;
        else        carry_in[k+1] <= carry_out[k];
      end
    end

    // Stage k is L-1-k cycles ahead of the top stage: delay its byte.
    localparam int unsigned DEPTH = L - 1 - k;
    if (DEPTH == 0) begin : g_nodelay
      assign aligned[k*W +: W] = acc[k];
    end else begin : g_delay
      logic [W-1:0] dly [DEPTH];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int unsigned d = 0; d < DEPTH; d++) dly[d] <= '0;
        end else begin
          dly[0] <= acc[k];
          for (int unsigned d = 1; d < DEPTH; d++) dly[d] <= dly[d-1];
        end
      end
      assign aligned[k*W +: W] = dly[DEPTH-1];
    end
  end

  assign phase = aligned[N-1 -: OUT_BITS];

endmodule
