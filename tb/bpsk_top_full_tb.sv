// bpsk_top_full_tb: one complete pass of the modulator at its default
// configuration: 120 MHz clock, 100000 clocks per bit (1200 bit/s), 10
// clocks per sample (12 MS/s), 10000-entry sine table, 15 carrier cycles
// per bit (18 kHz) and the 1200-bit pattern ROM filled with 10110100.
// It runs all 1200 bits (one second of output) plus two bits past the
// pattern wrap, predicting every output on every clock with bpsk_checker,
// and requires phase reversals, the pattern wrap, sine-table wraps and 15
// carrier cycles in every bit.
module bpsk_top_full_tb;
  localparam int unsigned BP = 100_000, NB = 1200;
  logic clk = 1'b0, clk_180, rst = 1'b0;
  logic        binary_seq, dac_clk_p, dac_clk_n;
  logic [13:0] dac_1;
  int checks = 0, failures = 0;
  int c, f, fl, pw, tw, bd, rs;

  assign clk_180 = ~clk;
  always #5 clk = ~clk;

  bpsk_top dut (.clk, .clk_180, .rst, .binary_seq, .dac_1, .dac_clk_p, .dac_clk_n);

  bpsk_checker chk (.clk, .rst, .binary_seq, .dac_1, .checks(c), .failures(f),
                    .flips(fl), .pattern_wraps(pw), .table_wraps(tw), .bits_done(bd),
                    .resets_seen(rs));

  initial begin : watchdog
    repeat (BP * (NB + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(string what, int n, int at_least);
    checks++;
    $display("%s: %0d", what, n);
    if (n < at_least) begin failures++; $display("  expected at least %0d", at_least); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b1;
    for (int b = 0; b < NB + 2; b++) begin
      repeat (BP) @(negedge clk);
      if (b % 200 == 0) $display("bit %0d done, failures so far %0d", b, f);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (dac_clk_p !== clk || dac_clk_n !== clk_180) begin failures++; $display("DAC clock pair"); end
    need("phase reversals", fl, 600);
    need("pattern wraps", pw, 1);
    need("sine table wraps", tw, (NB + 1) * 15);
    need("bits with 15 carrier cycles", bd, NB + 1);
    checks += c;
    failures += f;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
