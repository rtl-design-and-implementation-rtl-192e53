// counter_1lakh: free-running modulo-100000 counter (1 lakh = 100000).
//
// At 120 MHz one full turn of this counter lasts 1/1200 s, the length of one
// data bit. The count runs 0, 1, ..., MODULUS-1 and wraps to 0; the bit address
// logic acts on the last value. The count itself is the only output, as in the
// document's block diagram (Counter_1lakh_value, 17 bits).
//
// Interface: clk, rst (active low, asynchronous), value. Timing: value changes
// on every rising clk edge; it is 0 in reset and 1 after the first edge.
// The modulus and width follow the document; the 0-based count and the reset
// are this design's choice.
module counter_1lakh #(
  parameter int unsigned MODULUS = 100_000,
  parameter int unsigned W       = $clog2(MODULUS)
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] value
);
  always_ff @(posedge clk or negedge rst) begin
    if (!rst)                        value <= '0;
    else if (value == W'(MODULUS-1)) value <= '0;
    else                             value <= value + 1'b1;
  end
endmodule
