// phase_accumulator: the DDS phase register.
//
// Every clock the stored phase grows by the frequency tuning word M and wraps
// around modulo 2^PHASE_W, so one trip through the phase circle takes
// 2^PHASE_W / M clocks and the output frequency is f_out = M * f_clk / 2^PHASE_W
// (1.9 kHz steps at 125 MHz and 16 bits). The ADDR_W most significant bits of
// the phase address the waveform ROM; the PHASE_W - ADDR_W bits below them are
// the fractional part of the phase, so for M < 2^(PHASE_W-ADDR_W) samples are
// repeated and for larger M samples are skipped.
//
// Timing: phase, addr and wrap are registered; the M present at a clock edge is
// added at that edge. wrap is high for one clock after an edge at which the
// addition overflowed (the phase passed through zero).
//
// From the design: 16-bit phase, add M every clock, 12 MSBs as the address.
// This design's own choices: the wrap flag and a synchronous reset to phase 0.
module phase_accumulator #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = dds_pkg::ADDR_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PHASE_W-1:0] ftw,
  output logic [PHASE_W-1:0] phase,
  output logic [ADDR_W-1:0]  addr,
  output logic               wrap
);

  logic [PHASE_W:0] sum;

  always_comb sum = {1'b0, phase} + {1'b0, ftw};

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else begin
      phase <= sum[PHASE_W-1:0];
      wrap  <= sum[PHASE_W];
    end
  end

  assign addr = phase[PHASE_W-1 -: ADDR_W];

endmodule
