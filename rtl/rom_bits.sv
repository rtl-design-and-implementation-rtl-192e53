// rom_bits: DEPTH x 1 ROM holding the data bits to be modulated.
//
// By default every word is filled from a short pattern repeated over the
// whole depth: word i = PATTERN[PATTERN_LEN-1 - (i mod PATTERN_LEN)], so the
// first word is the pattern's most significant bit. The document's pattern
// is 10110100 over 1200 words. A different sequence can be loaded instead
// from INIT_FILE, a text file of one binary digit per word ($readmemb).
//
// Interface: clk, address, q. Timing: synchronous read, q follows the
// address of the previous rising clk edge. Depth and pattern follow the
// document; the INIT_FILE option is this design's own.
module rom_bits #(
  parameter int unsigned DEPTH       = 1200,
  parameter int unsigned PATTERN_LEN = 8,
  parameter logic [PATTERN_LEN-1:0] PATTERN = 8'b1011_0100,
  parameter string       INIT_FILE   = "",
  parameter int unsigned AW          = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] address,
  output logic          q
);
  logic mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemb(INIT_FILE, mem);
    else
      for (int i = 0; i < DEPTH; i++)
        mem[i] = PATTERN[PATTERN_LEN-1 - (i % PATTERN_LEN)];
  end

  always_ff @(posedge clk) q <= mem[address];
endmodule
