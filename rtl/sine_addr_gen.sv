// sine_addr_gen: phase accumulator addressing the sine table.
//
// Once every SAMPLE_DIV clocks (when the sample counter is at SAMPLE_DIV-1)
// the address grows by phase_acc, modulo N_SAMPLES. With N_SAMPLES samples
// read per bit, the table is swept phase_acc times per bit, so the carrier
// frequency is phase_acc times the bit rate: 15 gives 18 kHz, 40 gives
// 48 kHz at 1200 bit/s. Because N_SAMPLES*phase_acc is a multiple of
// N_SAMPLES, the phase is back at 0 at every bit boundary.
//
// Interface: clk, rst (active low, asynchronous), count (sample counter
// value), phase_acc (step, below N_SAMPLES), sine_sample_address. Timing:
// the address is 0 in reset and changes on the edge that takes count from
// SAMPLE_DIV-1 back to 0. The step rule follows the document; the modulo wrap
// and reset are this design's choice.
module sine_addr_gen #(
  parameter int unsigned N_SAMPLES  = 10_000,
  parameter int unsigned SAMPLE_DIV = 10,
  parameter int unsigned AW         = $clog2(N_SAMPLES),
  parameter int unsigned CW         = $clog2(SAMPLE_DIV)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [CW-1:0] count,
  input  logic [AW-1:0] phase_acc,
  output logic [AW-1:0] sine_sample_address
);
  // One extra bit so the sum cannot overflow before the wrap test.
  logic [AW:0] sum;

  always_comb begin
    sum = {1'b0, sine_sample_address} + {1'b0, phase_acc};
    if (sum >= (AW+1)'(N_SAMPLES)) sum = sum - (AW+1)'(N_SAMPLES);
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst)                            sine_sample_address <= '0;
    else if (count == CW'(SAMPLE_DIV-1)) sine_sample_address <= sum[AW-1:0];
  end

  // phase_acc at or above the table length would skip past the wrap.
  always_ff @(posedge clk)
    a_step_in_range: assert (phase_acc < AW'(N_SAMPLES))
      else $error("phase_acc %0d is not below the table length", phase_acc);
endmodule
