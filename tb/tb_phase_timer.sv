// Testbench for the phase timer with a DIV=4 divider cleared on every load (as in
// the controller): for several lengths N, including 0 (treated as 1), done must
// come exactly N*4 cycles (at least 4) after the load edge and be one cycle wide;
// back-to-back phases reloaded on done must also be exact.
module tb_phase_timer;
  import tlc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, tick, done;
  logic [PAR_W-1:0] value = '0, remaining;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clk_divider #(.DIV(4)) u_div (.clk, .rst, .clear(load), .tick);
  phase_timer dut (.clk, .rst, .load, .value, .tick, .done, .remaining);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lens[6] = '{1, 3, 0, 7, 31, 2};
  int n, want;

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (lens[k]) begin
      value = PAR_W'(lens[k]); load = 1'b1; @(negedge clk); load = 1'b0;
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      want = (lens[k] == 0 ? 1 : lens[k]) * 4;
      check(n == want, $sformatf("length %0d: done after %0d cycles, expected %0d", lens[k], n, want));
      @(negedge clk);
      check(!done, "done one cycle wide");
      repeat (9) begin @(negedge clk); check(!done, "no done after expiry"); end
    end
    // Back-to-back: reload 2 s on every done, 5 phases.
    value = 2; load = 1'b1; @(negedge clk); load = 1'b0;
    for (int p = 0; p < 5; p++) begin
      n = 1;
      while (!done) begin @(negedge clk); n++; end
      check(n == 8, $sformatf("back-to-back phase %0d: %0d cycles", p, n));
      load = 1'b1; @(negedge clk); load = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
