// bpsk_top_tb: end-to-end test of the modulator at reduced sizes.
//
// Two modulators run from one clock pair:
//   u_a  1000-clock bits, 100-entry sine table, 10 clocks per sample,
//        16-bit pattern ROM (10110100 twice), 3 carrier cycles per bit;
//   u_b  same rates, pattern 01, 7 carrier cycles per bit.
// The ratios are those of the full design (bit = SAMPLE_DIV * table length),
// only shorter. bpsk_checker predicts every output word and bit on every
// clock. The run covers 40 bits, with a reset in the middle of a bit, and
// requires that each mechanism happened: phase reversals, pattern-ROM wrap,
// sine-table wrap, the correct number of carrier cycles in each bit, reset.
// The DAC clock pair must equal the two input clocks.
module bpsk_top_tb;
  localparam int unsigned BP = 1000, SD = 10, NS = 100, NB = 16;
  logic clk = 1'b0, clk_180, rst = 1'b0;
  logic        seq_a, seq_b, cp_a, cn_a, cp_b, cn_b;
  logic [13:0] dac_a, dac_b;
  int checks = 0, failures = 0;
  int c_a, f_a, fl_a, pw_a, tw_a, bd_a, rs_a;
  int c_b, f_b, fl_b, pw_b, tw_b, bd_b, rs_b;

  assign clk_180 = ~clk;
  always #5 clk = ~clk;

  bpsk_top #(.BIT_PERIOD(BP), .SAMPLE_DIV(SD), .N_SAMPLES(NS), .N_BITS(NB), .PHASE_ACC(3))
    u_a (.clk, .clk_180, .rst, .binary_seq(seq_a), .dac_1(dac_a), .dac_clk_p(cp_a), .dac_clk_n(cn_a));
  bpsk_top #(.BIT_PERIOD(BP), .SAMPLE_DIV(SD), .N_SAMPLES(NS), .N_BITS(NB), .PHASE_ACC(7),
             .PATTERN_LEN(2), .PATTERN(2'b01))
    u_b (.clk, .clk_180, .rst, .binary_seq(seq_b), .dac_1(dac_b), .dac_clk_p(cp_b), .dac_clk_n(cn_b));

  bpsk_checker #(.BIT_PERIOD(BP), .SAMPLE_DIV(SD), .N_SAMPLES(NS), .N_BITS(NB), .PHASE_ACC(3))
    chk_a (.clk, .rst, .binary_seq(seq_a), .dac_1(dac_a), .checks(c_a), .failures(f_a),
           .flips(fl_a), .pattern_wraps(pw_a), .table_wraps(tw_a), .bits_done(bd_a), .resets_seen(rs_a));
  bpsk_checker #(.BIT_PERIOD(BP), .SAMPLE_DIV(SD), .N_SAMPLES(NS), .N_BITS(NB), .PHASE_ACC(7),
                 .PATTERN_LEN(2), .PATTERN(2'b01))
    chk_b (.clk, .rst, .binary_seq(seq_b), .dac_1(dac_b), .checks(c_b), .failures(f_b),
           .flips(fl_b), .pattern_wraps(pw_b), .table_wraps(tw_b), .bits_done(bd_b), .resets_seen(rs_b));

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DAC clock forwarding
  always @(clk) begin
    #1;
    checks++;
    if (cp_a !== clk || cn_a !== clk_180 || cp_b !== clk || cn_b !== clk_180) begin
      failures++; $display("DAC clock pair differs from the input clocks");
    end
  end

  task automatic need(string what, int n, int at_least);
    checks++;
    $display("%s: %0d", what, n);
    if (n < at_least) begin failures++; $display("  expected at least %0d", at_least); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b1;
    repeat (BP * 7 + 345) @(negedge clk);      // reset in the middle of bit 7
    #2 rst = 1'b0;                             // asynchronous: between edges
    repeat (4) @(negedge clk);
    rst = 1'b1;
    repeat (BP * 33 + 10) @(negedge clk);
    need("phase reversals (a)", fl_a, 10);
    need("phase reversals (b)", fl_b, 20);
    need("pattern wraps (a)", pw_a, 1);
    need("pattern wraps (b)", pw_b, 1);
    need("sine table wraps (a)", tw_a, 33 * 3);
    need("sine table wraps (b)", tw_b, 33 * 7);
    need("bits with checked carrier count (a)", bd_a, 38);
    need("bits with checked carrier count (b)", bd_b, 38);
    need("resets (a)", rs_a, 2);
    checks += c_a + c_b;
    failures += f_a + f_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
