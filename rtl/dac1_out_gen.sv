// dac1_out_gen: BPSK output stage, the 180-degree phase switch.
//
// For a 1 bit the sine sample goes to the DAC unchanged; for a 0 bit the
// stage sends FULL - sample. With offset-binary samples centred on FULL/2
// (0x1fff) that mirrors the wave about mid-scale, i.e. multiplies the carrier
// by -1, which is a 180-degree phase shift. The rule and FULL = 0x3ffe follow
// the document; the output register and its reset value (mid-scale, the DAC's
// zero) are this design's choice.
//
// Interface: clk, rst (active low, asynchronous), bit_input, sample_value,
// dac_1. Timing: one clock of latency from bit_input/sample_value to dac_1.
module dac1_out_gen #(
  parameter int unsigned  W    = 14,
  parameter logic [W-1:0] FULL = 14'h3ffe
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bit_input,
  input  logic [W-1:0] sample_value,
  output logic [W-1:0] dac_1
);
  always_ff @(posedge clk or negedge rst) begin
    if (!rst)           dac_1 <= FULL >> 1;
    else if (bit_input) dac_1 <= sample_value;
    else                dac_1 <= FULL - sample_value;
  end
endmodule
