// bpsk_top: BPSK modulator for a 1200 bit/s data stream and a 14-bit DAC.
//
// Two paths run side by side from one 120 MHz clock:
//   bit path    counter_1lakh -> bit_addr_gen -> rom_bits -> fpga_out_gen
//               one pattern bit every BIT_PERIOD clocks, shown on binary_seq;
//   carrier     counter_10 -> sine_addr_gen -> rom_sine_samples -> dac1_out_gen
//               a new table sample every SAMPLE_DIV clocks (12 MS/s), the
//               table address stepping by PHASE_ACC, so the carrier is
//               PHASE_ACC sine cycles per bit (15 -> 18 kHz, 40 -> 48 kHz).
// dac1_out_gen passes the sample for a 1 bit and inverts it about mid-scale
// for a 0 bit. Both paths are three registers deep (address, ROM read,
// output stage), so binary_seq and dac_1 change together, 3 clocks after the
// counters cross a bit boundary. The clock generator (a 125 -> 120 MHz PLL
// with a second output shifted by 180 degrees) is outside this module: its
// two clocks come in on clk and clk_180 and leave again as the DAC clock pair.
//
// Ports: clk, clk_180, rst (active low), binary_seq, dac_1[13:0],
// dac_clk_p, dac_clk_n. The structure, sizes and rates are the document's;
// the reset polarity, the block-RAM read timing and the register alignment
// are this design's choices.
module bpsk_top #(
  parameter int unsigned BIT_PERIOD = bpsk_pkg::BIT_PERIOD,  // clocks per bit
  parameter int unsigned SAMPLE_DIV = bpsk_pkg::SAMPLE_DIV,  // clocks per sample
  parameter int unsigned N_SAMPLES  = bpsk_pkg::N_SAMPLES,   // sine table depth
  parameter int unsigned N_BITS     = bpsk_pkg::N_BITS,      // pattern ROM depth
  parameter int unsigned PHASE_ACC  = 15,                    // sine cycles per bit
  parameter int unsigned PATTERN_LEN = 8,
  parameter logic [PATTERN_LEN-1:0] PATTERN = 8'b1011_0100,
  parameter string       INIT_FILE  = ""
) (
  input  logic             clk,
  input  logic             clk_180,
  input  logic             rst,
  output logic             binary_seq,
  output logic [bpsk_pkg::DAC_W-1:0] dac_1,
  output logic             dac_clk_p,
  output logic             dac_clk_n
);
  localparam int unsigned CW1 = $clog2(BIT_PERIOD);
  localparam int unsigned CW2 = $clog2(SAMPLE_DIV);
  localparam int unsigned BAW = $clog2(N_BITS);
  localparam int unsigned SAW = $clog2(N_SAMPLES);

  // A bit must hold a whole table sweep, or the phase drifts across bits.
  if (BIT_PERIOD != SAMPLE_DIV * N_SAMPLES) begin : g_bad_period
    $error("BIT_PERIOD must equal SAMPLE_DIV * N_SAMPLES");
  end
  if (PHASE_ACC >= N_SAMPLES) begin : g_bad_step
    $error("PHASE_ACC must be below N_SAMPLES");
  end

  logic [CW1-1:0] counter_1lakh_value;
  logic [CW2-1:0] counter_10_value;
  logic [BAW-1:0] bit_address;
  logic [SAW-1:0] sine_sample_address;
  logic           bit_input;
  bpsk_pkg::sample_t sample_value;

  counter_1lakh #(.MODULUS(BIT_PERIOD)) u_counter_1lakh (
    .clk, .rst, .value(counter_1lakh_value));

  bit_addr_gen #(.N_BITS(N_BITS), .BIT_PERIOD(BIT_PERIOD)) u_bit_addr_gen (
    .clk, .rst, .count(counter_1lakh_value), .bit_address);

  rom_bits #(.DEPTH(N_BITS), .PATTERN_LEN(PATTERN_LEN), .PATTERN(PATTERN),
             .INIT_FILE(INIT_FILE)) u_rom_bits (
    .clk, .address(bit_address), .q(bit_input));

  fpga_out_gen u_fpga_out_gen (
    .clk, .rst, .bit_input, .binary_seq);

  counter_10 #(.MODULUS(SAMPLE_DIV)) u_counter_10 (
    .clk, .rst, .value(counter_10_value));

  sine_addr_gen #(.N_SAMPLES(N_SAMPLES), .SAMPLE_DIV(SAMPLE_DIV)) u_sine_addr_gen (
    .clk, .rst, .count(counter_10_value), .phase_acc(SAW'(PHASE_ACC)),
    .sine_sample_address);

  rom_sine_samples #(.DEPTH(N_SAMPLES), .W(bpsk_pkg::DAC_W), .AMP(bpsk_pkg::DAC_MID)) u_rom_sine_samples (
    .clk, .address(sine_sample_address), .q(sample_value));

  dac1_out_gen #(.W(bpsk_pkg::DAC_W), .FULL(bpsk_pkg::DAC_FULL)) u_dac1_out_gen (
    .clk, .rst, .bit_input, .sample_value, .dac_1);

  // DAC clock pair: the design clock and its 180-degree copy, as delivered.
  assign dac_clk_p = clk;
  assign dac_clk_n = clk_180;
endmodule
