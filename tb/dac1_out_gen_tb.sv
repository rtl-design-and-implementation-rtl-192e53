// dac1_out_gen_tb: drives random samples and bits into the DAC output stage.
// Expected word, one clock later: the sample for bit 1, 0x3ffe - sample for
// bit 0. Also checks the reset value (mid-scale 0x1fff), the end points of
// the range (0x0000 <-> 0x3ffe) and that the output is registered.
module dac1_out_gen_tb;
  logic clk = 1'b0, rst = 1'b0, bit_input = 1'b0;
  logic [13:0] sample_value = '0, dac_1;
  int checks = 0, failures = 0;

  dac1_out_gen dut (.clk, .rst, .bit_input, .sample_value, .dac_1);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(logic b, logic [13:0] s);
    int e;
    bit_input = b; sample_value = s;
    @(negedge clk);
    e = b ? int'(s) : 'h3ffe - int'(s);
    checks++;
    if (dac_1 != 14'(e)) begin
      failures++;
      if (failures < 10) $display("bit=%b sample=%h dac=%h expected=%h", b, s, dac_1, 14'(e));
    end
  endtask

  initial begin
    logic [13:0] held;
    repeat (2) @(negedge clk);
    checks++; if (dac_1 != 14'h1fff) begin failures++; $display("reset value %h", dac_1); end
    rst = 1'b1;
    drive(1'b1, 14'h0000);
    drive(1'b0, 14'h0000);   // -> 0x3ffe
    drive(1'b0, 14'h3ffe);   // -> 0x0000
    drive(1'b1, 14'h3ffe);
    drive(1'b0, 14'h1fff);   // mid-scale stays mid-scale
    for (int k = 0; k < 10_000; k++)
      drive(1'($urandom), 14'($urandom_range(0, 'h3ffe)));
    held = dac_1;
    bit_input = ~bit_input; sample_value = sample_value ^ 14'h0155; #1;
    checks++; if (dac_1 != held) begin failures++; $display("output is not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
