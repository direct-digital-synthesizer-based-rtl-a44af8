// sine_rom: one period of a sine wave, 2^ADDR_W samples of SAMPLE_W bits,
// read synchronously.
//
// The table is split into 2^(ADDR_W - BANK_ADDR_W) banks of 2^BANK_ADDR_W
// words; at the defaults that is 8 banks of 512 x 16 bits, each the size of one
// FPGA embedded memory block in 512 x 16 ROM mode, 65536 bits in all. The upper
// address bits choose the bank and the lower ones the word in it: every bank
// reads the word at the low address on each clock, the upper bits are
// registered alongside, and the registered bank number selects which bank's
// word is the output.
//
// Contents (offset binary, centred on mid-scale):
//   rom[k] = round(2^(SAMPLE_W-1) + (2^(SAMPLE_W-1) - 1) * sin(2*pi*k / 2^ADDR_W))
// so at the defaults the samples run from 1 to 65535 with 32768 at k = 0.
// The table is computed at elaboration rather than read from a file.
//
// Timing: sample is valid one clock after addr (the address is registered
// inside the memory blocks, as in a synchronous ROM).
//
// From the design: 4096 sine samples of 16 bits, 12-bit address, 8 blocks of
// 512 x 16. This design's own choices: the exact sample formula (offset binary
// at full 16-bit swing) and the one-clock read latency.
module sine_rom #(
  parameter int unsigned ADDR_W      = dds_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W    = dds_pkg::SAMPLE_W,
  parameter int unsigned BANK_ADDR_W = dds_pkg::BANK_ADDR_W
) (
  input  logic                clk,
  input  logic [ADDR_W-1:0]   addr,
  output logic [SAMPLE_W-1:0] sample
);

  localparam int unsigned SEL_W      = ADDR_W - BANK_ADDR_W;
  localparam int unsigned N_BANKS    = 1 << SEL_W;
  localparam int unsigned BANK_DEPTH = 1 << BANK_ADDR_W;

  function automatic logic [SAMPLE_W-1:0] sine_value(int unsigned k);
    real mid, amp, v;
    mid = real'(longint'(1) << (SAMPLE_W - 1));
    amp = mid - 1.0;
    v   = mid + amp * $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(longint'(1) << ADDR_W));
    return SAMPLE_W'($rtoi(v + 0.5));
  endfunction

  logic [SAMPLE_W-1:0] bank_q [N_BANKS];
  logic [SEL_W-1:0]    sel_q;

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic [SAMPLE_W-1:0] mem [BANK_DEPTH];

    initial begin
      for (int unsigned i = 0; i < BANK_DEPTH; i++)
        mem[i] = sine_value(b * BANK_DEPTH + i);
    end

    always_ff @(posedge clk) bank_q[b] <= mem[addr[BANK_ADDR_W-1:0]];
  end

  always_ff @(posedge clk) sel_q <= addr[ADDR_W-1 -: SEL_W];

  assign sample = bank_q[sel_q];

endmodule
