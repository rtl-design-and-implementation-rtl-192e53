// rom_sine_samples: one full sine cycle in DEPTH words of W bits, offset binary.
//
// Word i holds trunc(sin(2*pi*i/DEPTH) * AMP) + AMP, where trunc drops the
// fraction toward zero. With the document's AMP = 0x1fff the words span
// 0x0000 (-1) .. 0x1fff (0) .. 0x3ffe (+1), the coding of the 14-bit
// offset-binary DAC. The table is computed at elaboration time rather than
// loaded from a file.
//
// Interface: clk, address, q. Timing: synchronous read; q shows the word
// at the address presented at the previous rising clk edge (registered
// address, no output register, as in an FPGA block RAM in ROM mode).
// Depth, width and the sample formula follow the document.
module rom_sine_samples #(
  parameter int unsigned DEPTH = 10_000,
  parameter int unsigned W     = 14,
  parameter logic [W-1:0] AMP  = 14'h1fff,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] address,
  output logic [W-1:0]  q
);
  localparam real TWO_PI = 6.283185307179586;

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      // $rtoi truncates toward zero: "taking only the integer part".
      mem[i] = W'($rtoi($sin(TWO_PI * i / DEPTH) * real'(AMP)) + int'(AMP));
    end
  end

  always_ff @(posedge clk) q <= mem[address];
endmodule
