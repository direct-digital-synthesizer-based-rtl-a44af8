// dds_top: the digital part of a direct digital synthesizer (DDS).
//
// A phase accumulator adds the frequency tuning word M to a 16-bit phase every
// clock; its 12 MSBs address a 4096 x 16 ROM holding one sine period; the
// sample is scaled by the 16-bit amplitude tuning word and the 14 MSBs of the
// product go to a 14-bit DAC, which with a low-pass filter (both outside this
// RTL) make the analog signal. The output frequency is
//   f_out = M * f_clk / 2^16      (1.907 kHz per step of M at f_clk = 125 MHz)
// and the output swing is proportional to the amplitude tuning word.
//
// Interface: clk is the 125 MHz clock, also the DAC's sample clock (made from
// the 50 MHz board clock by a PLL outside this RTL). The user enters the
// tuning words through ftw_in/ftw_load and atw_in/atw_load; they are held
// until the next load. dac_data is the DAC word, offset binary.
//
// Timing: a new M is stored one clock after its load edge and first moves the
// phase at the next edge; a phase reaches dac_data two clocks after it is in
// the phase register (one clock ROM read, one clock multiply). A new amplitude
// word reaches dac_data two clocks after its load edge.
//
// Registers outside the memory: 16 (M) + 16 (amplitude word) + 16 (phase) +
// 14 (DAC word) = 62, plus the 3-bit bank select and the 1-bit wrap flag that
// this design adds. Reset is synchronous, active high; it clears the tuning
// words and the phase, so dac_data is 0 from the third clock of reset on.
// The accumulator's full phase and wrap outputs are not needed here and are
// left open.
module dds_top (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         ftw_load,
  input  logic [dds_pkg::PHASE_W-1:0]  ftw_in,
  input  logic                         atw_load,
  input  logic [dds_pkg::ATW_W-1:0]    atw_in,
  output logic [dds_pkg::DAC_W-1:0]    dac_data
);
  import dds_pkg::*;

  logic [PHASE_W-1:0]  ftw;
  logic [ATW_W-1:0]    atw;
  logic [ADDR_W-1:0]   rom_addr;
  logic [SAMPLE_W-1:0] sample;

  tuning_register #(.W(PHASE_W)) u_tuning (
    .clk, .rst,
    .ftw_load, .ftw_in,
    .atw_load, .atw_in,
    .ftw, .atw
  );

  phase_accumulator #(.PHASE_W(PHASE_W), .ADDR_W(ADDR_W)) u_phase (
    .clk, .rst,
    .ftw,
    .phase (),
    .addr  (rom_addr),
    .wrap  ()
  );

  sine_rom #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W), .BANK_ADDR_W(BANK_ADDR_W)) u_rom (
    .clk,
    .addr   (rom_addr),
    .sample
  );

  amplitude_control #(.SAMPLE_W(SAMPLE_W), .ATW_W(ATW_W), .DAC_W(DAC_W)) u_amp (
    .clk,
    .sample,
    .atw,
    .dac (dac_data)
  );

endmodule
