// counter_10: free-running modulo-10 counter.
//
// Divides the 120 MHz clock by ten: the sine address logic steps once per
// turn of this counter, giving a 12 MHz DAC sample rate. The count runs
// 0..MODULUS-1 and wraps; the step is taken on the last value (9).
//
// Interface: clk, rst (active low, asynchronous), value (4 bits, as in the
// document's Counter_10_value(3:0)). Timing: value is 0 in reset and
// advances on every rising clk edge. The modulus is the document's; the
// 0-based count and the reset are this design's choice.
module counter_10 #(
  parameter int unsigned MODULUS = 10,
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
