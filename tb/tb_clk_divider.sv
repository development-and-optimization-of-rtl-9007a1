// Testbench for the clock divider: measures the tick period of a DIV=5 instance
// and of an instance at the default ratio (714286), checks that every tick is one
// cycle wide, and that a clear restarts the count so the next tick comes exactly
// DIV cycles after the clear edge.
module tb_clk_divider;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic tick5, tickd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_divider #(.DIV(5)) dut5 (.clk, .rst, .clear, .tick(tick5));
  clk_divider            dutd (.clk, .rst, .clear(1'b0), .tick(tickd));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last, n, cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // Period of the DIV=5 divider over 10 ticks.
    last = -1;
    n = 0;
    while (n < 10) begin
      @(negedge clk);
      if (tick5) begin
        if (last >= 0) check(cyc - last == 5, $sformatf("period %0d", cyc - last));
        last = cyc; n++;
        @(negedge clk);
        check(!tick5, "tick one cycle wide");
      end
    end
    // Clear two cycles after a tick: the next tick must be 5 cycles after the clear.
    while (!tick5) @(negedge clk);
    @(negedge clk); @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    n = 1;
    while (!tick5) begin @(negedge clk); n++; end
    check(n == 5, $sformatf("ticks %0d cycles after clear", n));
    // Default ratio: two ticks 714286 cycles apart.
    while (!tickd) @(negedge clk);
    last = cyc;
    @(negedge clk);
    while (!tickd) @(negedge clk);
    check(cyc - last == 714286, $sformatf("default period %0d", cyc - last));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
