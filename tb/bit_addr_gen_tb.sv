// bit_addr_gen_tb: checks the pattern-ROM address generator at full size
// (1200 bits, 100000-clock bit period). The testbench drives the counter
// input itself: mostly random values other than the last one, and the last
// value (99999) at random moments, so a full pass over all 1200 addresses
// and several wraps take only a few thousand clocks. Every clock the
// address is compared with a reference address; the wrap 1199 -> 0 and the
// reset value are checked too.
module bit_addr_gen_tb;
  localparam int unsigned NB = 1200, BP = 100_000;
  logic clk = 1'b0, rst = 1'b0;
  logic [16:0] count;
  logic [10:0] bit_address;
  int checks = 0, failures = 0;

  bit_addr_gen dut (.clk, .rst, .count, .bit_address);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref_addr, wraps;
    bit step;
    ref_addr = 0; wraps = 0;
    count = 17'(BP-1);
    repeat (2) @(negedge clk);
    checks++; if (bit_address != 0) begin failures++; $display("reset value %0d", bit_address); end
    rst = 1'b1;
    for (int k = 0; k < 12_000; k++) begin
      step = ($urandom_range(0, 2) == 0);
      if (step) count = 17'(BP-1);
      else begin
        count = 17'($urandom_range(0, BP-2));
        if (k % 7 == 0) count = 17'(BP-2);   // the value next to the terminal one
      end
      @(negedge clk);
      if (step) begin
        if (ref_addr == NB-1) begin ref_addr = 0; wraps++; end
        else ref_addr++;
      end
      checks++;
      if (bit_address != 11'(ref_addr)) begin
        failures++;
        if (failures < 10) $display("k=%0d addr=%0d expected=%0d", k, bit_address, ref_addr);
      end
    end
    checks++; if (wraps < 2) begin failures++; $display("only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
