// Testbench for the walk-request latch: a press sets pending, pending holds after
// the button is released, serve clears it, a press coinciding with serve is kept,
// and random traffic is compared with a reference model.
module tb_walk_latch;
  logic clk = 1'b0, rst = 1'b1, req = 1'b0, serve = 1'b0, pending;
  bit model = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  walk_latch dut (.clk, .rst, .req, .serve, .pending);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    check(!pending, "reset");
    rst = 1'b0;
    req = 1'b1; @(negedge clk); req = 1'b0;
    check(pending, "set by press");
    repeat (5) @(negedge clk);
    check(pending, "held after release");
    serve = 1'b1; @(negedge clk); serve = 1'b0;
    check(!pending, "cleared by serve");
    req = 1'b1; @(negedge clk);
    serve = 1'b1; @(negedge clk); req = 1'b0; serve = 1'b0;
    check(pending, "press during serve kept");
    for (int i = 0; i < 300; i++) begin
      req   = ($urandom % 5) == 0;
      serve = ($urandom % 4) == 0;
      if (req) model = 1'b1;
      else if (serve) model = 1'b0;
      @(negedge clk);
      check(pending == model, $sformatf("random step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
