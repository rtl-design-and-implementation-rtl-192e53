// bpsk_scope_tb: the two hardware measurements of the modulator, at full
// size: 18 kHz carrier (15 cycles per bit) with the repeating pattern 010,
// and 48 kHz carrier (40 cycles per bit) with the pattern 01, both at
// 1200 bit/s and 12 MS/s. Each runs for 12 bits; every output is predicted
// by bpsk_checker, and the carrier frequency is reported from the counted
// carrier cycles per bit times the bit rate.
module bpsk_scope_tb;
  localparam int unsigned BP = 100_000, NBITS_RUN = 12;
  logic clk = 1'b0, clk_180, rst = 1'b0;
  logic        seq_18, seq_48, cp_18, cn_18, cp_48, cn_48;
  logic [13:0] dac_18, dac_48;
  int checks = 0, failures = 0;
  int c1, f1, fl1, pw1, tw1, bd1, rs1;
  int c2, f2, fl2, pw2, tw2, bd2, rs2;

  assign clk_180 = ~clk;
  always #5 clk = ~clk;

  bpsk_top #(.PHASE_ACC(15), .PATTERN_LEN(3), .PATTERN(3'b010)) u_18k
    (.clk, .clk_180, .rst, .binary_seq(seq_18), .dac_1(dac_18), .dac_clk_p(cp_18), .dac_clk_n(cn_18));
  bpsk_top #(.PHASE_ACC(40), .PATTERN_LEN(2), .PATTERN(2'b01)) u_48k
    (.clk, .clk_180, .rst, .binary_seq(seq_48), .dac_1(dac_48), .dac_clk_p(cp_48), .dac_clk_n(cn_48));

  bpsk_checker #(.PHASE_ACC(15), .PATTERN_LEN(3), .PATTERN(3'b010)) chk_18k
    (.clk, .rst, .binary_seq(seq_18), .dac_1(dac_18), .checks(c1), .failures(f1),
     .flips(fl1), .pattern_wraps(pw1), .table_wraps(tw1), .bits_done(bd1), .resets_seen(rs1));
  bpsk_checker #(.PHASE_ACC(40), .PATTERN_LEN(2), .PATTERN(2'b01)) chk_48k
    (.clk, .rst, .binary_seq(seq_48), .dac_1(dac_48), .checks(c2), .failures(f2),
     .flips(fl2), .pattern_wraps(pw2), .table_wraps(tw2), .bits_done(bd2), .resets_seen(rs2));

  initial begin : watchdog
    repeat (BP * (NBITS_RUN + 2)) @(posedge clk);
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
    repeat (BP * NBITS_RUN + 10) @(negedge clk);
    need("18 kHz: phase reversals", fl1, 7);
    need("18 kHz: bits with 15 carrier cycles", bd1, NBITS_RUN);
    need("48 kHz: phase reversals", fl2, 11);
    need("48 kHz: bits with 40 carrier cycles", bd2, NBITS_RUN);
    $display("carrier at 1200 bit/s: %0d Hz and %0d Hz", (bd1 > 0 ? 15 : 0) * 1200, (bd2 > 0 ? 40 : 0) * 1200);
    checks += c1 + c2;
    failures += f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
