// bpsk_checker: reference model and scoreboard for bpsk_top, shared by the
// end-to-end testbenches.
//
// It counts the rising clk edges since rst went high (k) and, after each
// edge, predicts both outputs from the modulator's specification alone:
//   bit index   b = floor((k-2) / BIT_PERIOD) mod N_BITS
//   bit         PATTERN bit b (most significant first, repeating)
//   sample      S[(floor((k-2) / SAMPLE_DIV) * PHASE_ACC) mod N_SAMPLES],
//               S[i] = trunc(sin(2*pi*i/N_SAMPLES) * 0x1fff) + 0x1fff
//   dac_1       S for a 1 bit, 0x3ffe - S for a 0 bit
// The offset of 2 is the modulator's pipeline (address register, ROM read)
// ahead of the output registers; the first two clocks after reset are not
// compared. While rst is low both outputs must hold their reset values.
// It also counts what the end-to-end test must exercise: phase reversals
// (binary_seq changes), pattern wraps, sine table wraps, carrier cycles per
// bit (rising crossings of mid-scale, which must equal PHASE_ACC in every
// complete bit) and the spacing of bit changes (a multiple of BIT_PERIOD).
module bpsk_checker #(
  parameter int unsigned BIT_PERIOD  = 100_000,
  parameter int unsigned SAMPLE_DIV  = 10,
  parameter int unsigned N_SAMPLES   = 10_000,
  parameter int unsigned N_BITS      = 1200,
  parameter int unsigned PHASE_ACC   = 15,
  parameter int unsigned PATTERN_LEN = 8,
  parameter logic [PATTERN_LEN-1:0] PATTERN = 8'b1011_0100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        binary_seq,
  input  logic [13:0] dac_1,
  output int          checks,
  output int          failures,
  output int          flips,
  output int          pattern_wraps,
  output int          table_wraps,
  output int          bits_done,
  output int          resets_seen
);
  logic [13:0] table_s [N_SAMPLES];
  longint unsigned k = 0;

  initial begin
    real x;
    for (int i = 0; i < N_SAMPLES; i++) begin
      x = $sin(2.0 * 3.141592653589793 * i / N_SAMPLES) * 8191.0;
      table_s[i] = 14'((x < 0.0 ? -int'($floor(-x)) : int'($floor(x))) + 8191);
    end
    checks = 0; failures = 0; flips = 0; pattern_wraps = 0;
    table_wraps = 0; bits_done = 0; resets_seen = 0;
  end

  always @(posedge clk) k <= rst ? k + 1 : 0;

  longint unsigned last_flip = 0, prev_bi = 0, prev_si = 0;
  logic            prev_seq = 1'b0;
  logic            above = 1'b0;
  int              crossings = 0;
  logic            in_reset = 1'b0;

  always @(negedge clk) begin
    longint unsigned bi, si;
    logic            b;
    logic [13:0]     s, e;
    if (!rst) begin
      if (!in_reset) resets_seen++;
      in_reset = 1'b1;
      checks++;
      if (binary_seq !== 1'b0 || dac_1 !== 14'h1fff) begin
        failures++;
        if (failures < 10) $display("[%m] reset outputs %b %h", binary_seq, dac_1);
      end
    end else if (k >= 2) begin
      bi = ((k - 2) / BIT_PERIOD) % N_BITS;
      si = (((k - 2) / SAMPLE_DIV) * PHASE_ACC) % N_SAMPLES;
      b  = PATTERN[PATTERN_LEN - 1 - (bi % PATTERN_LEN)];
      s  = table_s[si];
      e  = b ? s : 14'h3ffe - s;
      checks++;
      if (binary_seq !== b || dac_1 !== e) begin
        failures++;
        if (failures < 10)
          $display("[%m] k=%0d bit %0d: binary_seq=%b dac_1=%h, expected %b %h",
                   k, bi, binary_seq, dac_1, b, e);
      end
      if (k > 2) begin
        if (binary_seq != prev_seq) begin
          flips++;
          checks++;
          if ((k - 2) % BIT_PERIOD != 0) begin
            failures++; $display("[%m] bit change off the bit grid at k=%0d", k);
          end
          last_flip = k;
        end
        if (bi != prev_bi && bi == 0) pattern_wraps++;
        if (si < prev_si) table_wraps++;
        // carrier cycles: rising mid-scale crossings of the carrier itself
        if (!above && s > 14'h1fff) crossings++;
        if (bi != prev_bi) begin
          if (!in_reset) begin
            checks++;
            if (crossings != int'(PHASE_ACC)) begin
              failures++;
              $display("[%m] %0d carrier cycles in bit %0d, expected %0d", crossings, prev_bi, PHASE_ACC);
            end
            bits_done++;
          end
          crossings = 0;
          in_reset = 1'b0;
        end
      end else begin
        crossings = 0;
        in_reset  = 1'b0;
      end
      above    = (s > 14'h1fff);
      prev_seq = binary_seq;
      prev_bi  = bi;
      prev_si  = si;
    end
  end
endmodule
