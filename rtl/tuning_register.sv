// tuning_register: input register holding the last entered frequency and
// amplitude tuning words of the DDS.
//
// Each word has its own load strobe; on a clock edge with the strobe high the
// entered value is stored, otherwise the stored value is kept, so the
// synthesizer keeps running with the last values the user gave. Stored words
// appear at ftw/atw one clock after the load edge.
//
// From the design: both tuning words are 16 bits and are held in registers.
// This design's own choices: a separate load strobe per word (how the user
// enters values is left open by the design), a synchronous active-high reset,
// and reset values FTW_RESET = 0 (the phase stands still) and ATW_RESET = 0
// (the output sits at code 0).
module tuning_register #(
  parameter int unsigned        W         = dds_pkg::PHASE_W,
  parameter logic [W-1:0]       FTW_RESET = '0,
  parameter logic [W-1:0]       ATW_RESET = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ftw_load,
  input  logic [W-1:0] ftw_in,
  input  logic         atw_load,
  input  logic [W-1:0] atw_in,
  output logic [W-1:0] ftw,
  output logic [W-1:0] atw
);

  always_ff @(posedge clk) begin
    if (rst) begin
      ftw <= FTW_RESET;
      atw <= ATW_RESET;
    end else begin
      if (ftw_load) ftw <= ftw_in;
      if (atw_load) atw <= atw_in;
    end
  end

endmodule
