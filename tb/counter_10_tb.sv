// counter_10_tb: checks the modulo-10 sample-rate counter.
// Runs 3.5 turns of the counter, comparing the count on every clock with a
// reference count, checks the reset value, and measures the wrap period
// (must be exactly 10 clocks: 12 MS/s from 120 MHz).
module counter_10_tb;
  localparam int unsigned MOD = 10;
  logic clk = 1'b0, rst = 1'b0;
  logic [3:0] value;
  int checks = 0, failures = 0;

  counter_10 dut (.clk, .rst, .value);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref_count, last_wrap, wraps;
    ref_count = 0; wraps = 0; last_wrap = 0;
    repeat (3) @(negedge clk);
    checks++; if (value != 0) begin failures++; $display("reset value %0d", value); end
    rst = 1'b1;
    for (int unsigned k = 1; k <= 35; k++) begin
      @(negedge clk);
      ref_count = (ref_count == MOD-1) ? 0 : ref_count + 1;
      checks++;
      if (value != 17'(ref_count)) begin
        failures++;
        if (failures < 10) $display("k=%0d value=%0d expected=%0d", k, value, ref_count);
      end
      if (value == 0) begin
        if (wraps > 0) begin
          checks++;
          if (k - last_wrap != MOD) begin
            failures++; $display("wrap period %0d", k - last_wrap);
          end
        end
        wraps++; last_wrap = k;
      end
    end
    checks++; if (wraps != 3) begin failures++; $display("wraps=%0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
