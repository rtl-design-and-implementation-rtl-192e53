// bpsk_pkg: constants shared by the BPSK modulator blocks.
//
// The modulator runs from a 120 MHz clock. One data bit lasts 100000 clocks
// (120 MHz / 1200 bit/s) and one DAC sample lasts 10 clocks (12 MS/s), so a
// bit spans exactly 10000 samples, the length of the one-cycle sine table.
// The DAC is 14 bits wide and offset binary: 0x0000 is -1, 0x1fff is zero,
// 0x3ffe is +1 (the table never uses 0x3fff). All of these numbers follow
// the document; the package only gathers them.
package bpsk_pkg;
  localparam int unsigned CLK_HZ     = 120_000_000;
  localparam int unsigned BIT_RATE   = 1200;
  localparam int unsigned BIT_PERIOD = CLK_HZ / BIT_RATE;   // 100000 clocks per bit
  localparam int unsigned SAMPLE_DIV = 10;                  // clocks per DAC sample
  localparam int unsigned N_SAMPLES  = BIT_PERIOD / SAMPLE_DIV; // 10000 table entries
  localparam int unsigned N_BITS     = 1200;                // pattern ROM depth
  localparam int unsigned DAC_W      = 14;

  typedef logic [DAC_W-1:0] sample_t;

  localparam sample_t DAC_MID  = 14'h1fff;   // zero level, also the sine amplitude
  localparam sample_t DAC_FULL = 14'h3ffe;   // 2*DAC_MID, used to invert a sample
endpackage
