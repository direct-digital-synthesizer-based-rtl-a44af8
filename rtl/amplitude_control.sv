// amplitude_control: scales the waveform sample by the amplitude tuning word.
//
// The unsigned SAMPLE_W-bit sample is multiplied by the unsigned ATW_W-bit
// amplitude tuning word; the DAC_W most significant bits of the
// (SAMPLE_W + ATW_W)-bit product are the DAC word. With 16 x 16 bits and a
// 14-bit DAC that is dac = (sample * atw) >> 18, so an amplitude word of
// 0xFFFF gives almost the full DAC range and the output amplitude grows
// linearly with the word. On an FPGA the product maps to one DSP block.
//
// Timing: the DAC word is registered, one clock after sample and atw.
//
// From the design: the 16 x 16 multiply and taking the 14 MSBs of the 32-bit
// product. This design's own choice: both operands unsigned (samples stored in
// offset binary, 0 to 65535, as the DAC's straight-binary input expects), so
// the mid-level of the output scales with the amplitude word as well as its
// swing; an AC-coupled analog output removes that offset. The low 18 product
// bits are dropped by design (truncation, no rounding), which lint reports as
// unused.
module amplitude_control #(
  parameter int unsigned SAMPLE_W = dds_pkg::SAMPLE_W,
  parameter int unsigned ATW_W    = dds_pkg::ATW_W,
  parameter int unsigned DAC_W    = dds_pkg::DAC_W
) (
  input  logic                clk,
  input  logic [SAMPLE_W-1:0] sample,
  input  logic [ATW_W-1:0]    atw,
  output logic [DAC_W-1:0]    dac
);

  localparam int unsigned PROD_W = SAMPLE_W + ATW_W;

  logic [PROD_W-1:0] product;

  always_comb product = PROD_W'(sample) * PROD_W'(atw);

  always_ff @(posedge clk) dac <= product[PROD_W-1 -: DAC_W];

endmodule
