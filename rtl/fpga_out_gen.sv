// fpga_out_gen: output stage for the data bit (binary_seq).
//
// Registers the bit read from the pattern ROM so that binary_seq leaves the
// chip on the same clock edge as the DAC word built from that bit, which
// goes through an equally deep path. A 1 bit gives binary_seq = 1, a 0 bit
// gives 0, as the document states; the register and its reset value (0) are
// this design's choice, following the clocked block in the document's
// diagram.
//
// Interface: clk, rst (active low, asynchronous), bit_input, binary_seq.
// Timing: one clock of latency.
module fpga_out_gen (
  input  logic clk,
  input  logic rst,
  input  logic bit_input,
  output logic binary_seq
);
  always_ff @(posedge clk or negedge rst) begin
    if (!rst) binary_seq <= 1'b0;
    else      binary_seq <= bit_input;
  end
endmodule
