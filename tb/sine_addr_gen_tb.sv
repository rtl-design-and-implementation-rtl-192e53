// sine_addr_gen_tb: checks the sine-table phase accumulator at full size
// (10000-entry table, step every 10 clocks). The testbench drives the
// sample counter 0..9 itself and tries several steps: 1 (one sine per bit),
// 2, 15 (18 kHz), 40 (48 kHz), 4999 and 9999 (wrap on nearly every step).
// The address is compared on every clock with a reference, and after each
// 10000 steps (one bit at the document's rates) the address must be back
// where it started.
module sine_addr_gen_tb;
  localparam int unsigned NS = 10_000, SD = 10;
  logic clk = 1'b0, rst = 1'b0;
  logic [3:0]  count;
  logic [13:0] phase_acc, sine_sample_address;
  int checks = 0, failures = 0;

  sine_addr_gen dut (.clk, .rst, .count, .phase_acc, .sine_sample_address);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned steps[6] = '{1, 2, 15, 40, 4999, 9999};

  initial begin
    int unsigned ref_addr, start_addr, wraps;
    wraps = 0;
    count = 4'(SD-1); phase_acc = 14'd1;
    repeat (2) @(negedge clk);
    checks++; if (sine_sample_address != 0) begin failures++; $display("reset value"); end
    rst = 1'b1;
    ref_addr = 0;
    count = 0;
    foreach (steps[s]) begin
      phase_acc = 14'(steps[s]);
      start_addr = ref_addr;
      for (int n = 0; n < NS; n++) begin
        for (int c = 0; c < SD; c++) begin
          count = 4'(c);
          @(negedge clk);
          if (c == SD-1) begin
            ref_addr += steps[s];
            if (ref_addr >= NS) begin ref_addr -= NS; wraps++; end
          end
          checks++;
          if (sine_sample_address != 14'(ref_addr)) begin
            failures++;
            if (failures < 10) $display("step=%0d n=%0d addr=%0d expected=%0d",
                                        steps[s], n, sine_sample_address, ref_addr);
          end
        end
      end
      checks++;
      if (sine_sample_address != 14'(start_addr)) begin
        failures++; $display("step %0d: not back at the start after one bit", steps[s]);
      end
      // move the start off zero for the next step size
      count = 4'(SD-1); @(negedge clk);
      ref_addr += steps[s]; if (ref_addr >= NS) ref_addr -= NS;
    end
    checks++; if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
