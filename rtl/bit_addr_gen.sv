// bit_addr_gen: address generator for the bit pattern ROM.
//
// Watches the bit-period counter and moves the ROM address on by one each
// time the counter is at its last value (BIT_PERIOD-1), so every address is
// held for exactly BIT_PERIOD clocks (1/1200 s at the document's numbers).
// After the last pattern bit (N_BITS-1) the address wraps to 0 and the pattern
// repeats.
//
// Interface: clk, rst (active low, asynchronous), count (the bit-period
// counter value), bit_address. Timing: bit_address is 0 in reset; it changes on
// the clock edge at which count goes from BIT_PERIOD-1 back to 0. Sizes follow
// the document; the reset is this design's choice.
module bit_addr_gen #(
  parameter int unsigned N_BITS     = 1200,
  parameter int unsigned BIT_PERIOD = 100_000,
  parameter int unsigned AW         = $clog2(N_BITS),
  parameter int unsigned CW         = $clog2(BIT_PERIOD)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [CW-1:0] count,
  output logic [AW-1:0] bit_address
);
  always_ff @(posedge clk or negedge rst) begin
    if (!rst) bit_address <= '0;
    else if (count == CW'(BIT_PERIOD-1)) begin
      if (bit_address == AW'(N_BITS-1)) bit_address <= '0;
      else                              bit_address <= bit_address + 1'b1;
    end
  end
endmodule
