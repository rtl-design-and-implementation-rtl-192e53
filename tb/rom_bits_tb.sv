// rom_bits_tb: reads the whole 1200-word bit ROM with its default content
// (10110100 repeated) and, in a second instance, with the three-bit
// pattern 010; each word is compared with the pattern worked out here. The
// one-clock read latency is checked as well.
module rom_bits_tb;
  localparam int unsigned DEPTH = 1200;
  logic clk = 1'b0;
  logic [10:0] address;
  logic q8, q3;
  int checks = 0, failures = 0;

  rom_bits dut8 (.clk, .address, .q(q8));
  rom_bits #(.PATTERN_LEN(3), .PATTERN(3'b010)) dut3 (.clk, .address, .q(q3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pat8 [8] = '{1, 0, 1, 1, 0, 1, 0, 0};
    bit pat3 [3] = '{0, 1, 0};
    int ones;
    ones = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      address = 11'(i);
      @(posedge clk); #1;
      checks += 2;
      if (q8 != pat8[i % 8]) begin failures++; if (failures < 10) $display("8-bit pattern, addr %0d: %b", i, q8); end
      if (q3 != pat3[i % 3]) begin failures++; if (failures < 10) $display("3-bit pattern, addr %0d: %b", i, q3); end
      ones += int'(q8);
    end
    checks++; if (ones != 600) begin failures++; $display("ones=%0d, expected 600", ones); end
    address = 11'd0; @(posedge clk); #1;   // word 0 = 1
    address = 11'd1; #1;                  // word 1 = 0, not visible before the edge
    checks++; if (q8 != 1'b1) begin failures++; $display("read is not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
