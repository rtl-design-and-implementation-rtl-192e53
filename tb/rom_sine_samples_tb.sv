// rom_sine_samples_tb: reads all 10000 words of the sine table and compares
// each with trunc(sin(2*pi*i/10000) * 8191) + 8191 computed here, checks a
// few anchor words by hand (0 and 5000 at mid-scale 0x1fff, 2500 at the top
// 0x3ffe, 7500 at the bottom 0x0000, 1250 at 0x369e), and checks the one-
// clock read latency and the value range.
module rom_sine_samples_tb;
  localparam int unsigned DEPTH = 10_000;
  logic clk = 1'b0;
  logic [13:0] address, q;
  int checks = 0, failures = 0;

  rom_sine_samples dut (.clk, .address, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int i);
    real x;
    x = $sin(2.0 * 3.141592653589793 * i / DEPTH) * 8191.0;
    return (x < 0.0 ? -int'($floor(-x)) : int'($floor(x))) + 8191;
  endfunction

  task automatic read_check(int i, int exp_val);
    address = 14'(i);
    @(posedge clk); #1;
    checks++;
    if (q != 14'(exp_val)) begin
      failures++;
      if (failures < 10) $display("addr %0d: q=%h expected %h", i, q, exp_val);
    end
  endtask

  initial begin
    int unsigned lo, hi;
    lo = 16383; hi = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      read_check(i, expected(i));
      if (q < lo) lo = q;
      if (q > hi) hi = q;
    end
    read_check(0, 'h1fff);
    read_check(2500, 'h3ffe);
    read_check(5000, 'h1fff);
    read_check(7500, 'h0000);
    read_check(1250, 'h369e);
    checks++; if (lo != 0 || hi != 'h3ffe) begin failures++; $display("range %h..%h", lo, hi); end
    // latency: the word must not appear before the clock edge
    address = 14'd2500; @(posedge clk); #1;
    address = 14'd7500; #1;
    checks++; if (q != 14'h3ffe) begin failures++; $display("read is not registered"); end
    @(posedge clk); #1;
    checks++; if (q != 14'h0000) begin failures++; $display("read latency above one clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
