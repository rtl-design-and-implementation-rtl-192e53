// fpga_out_gen_tb: drives random bits into the binary_seq output stage and
// checks the reset value (0) and that each bit appears exactly one clock
// later.
module fpga_out_gen_tb;
  logic clk = 1'b0, rst = 1'b0, bit_input = 1'b1, binary_seq;
  int checks = 0, failures = 0;

  fpga_out_gen dut (.clk, .rst, .bit_input, .binary_seq);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    repeat (2) @(negedge clk);
    checks++; if (binary_seq != 1'b0) begin failures++; $display("reset value"); end
    rst = 1'b1;
    prev = 1'b0;                 // still the reset value until the next edge
    for (int k = 0; k < 2000; k++) begin
      bit_input = 1'($urandom);
      #1;
      checks++; if (binary_seq != prev) begin failures++; $display("changed before the edge"); end
      @(negedge clk);
      checks++;
      if (binary_seq != bit_input) begin failures++; if (failures < 10) $display("k=%0d", k); end
      prev = bit_input;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
