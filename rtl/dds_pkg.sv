// dds_pkg: word widths and clock figures shared by the direct digital
// synthesizer (DDS) modules.
//
// The widths are the ones the design is built around: a 16-bit phase
// accumulator whose 12 most significant bits address a 4096-entry table of
// 16-bit sine samples, a 16-bit amplitude tuning word, and a 14-bit word for
// the digital-to-analog converter (DAC). The ROM is split into banks of 512
// words, the shape of one FPGA embedded memory block configured as 512 x 16.
// The clock is 125 MHz, the DAC's top sample rate, made from a 50 MHz board
// clock by a PLL outside this RTL.
package dds_pkg;
  localparam int unsigned PHASE_W      = 16;  // phase accumulator / frequency tuning word
  localparam int unsigned ADDR_W       = 12;  // ROM address: the phase MSBs
  localparam int unsigned SAMPLE_W     = 16;  // ROM sample
  localparam int unsigned ATW_W        = 16;  // amplitude tuning word
  localparam int unsigned DAC_W        = 14;  // DAC input word
  localparam int unsigned BANK_ADDR_W  = 9;   // 512 words per ROM bank
  localparam int unsigned F_CLK_HZ     = 125_000_000;
endpackage
