// Testbench for the timing-parameter store: checks the reset contents (TBASE 25,
// TEXT 25, TYEL 5, TBLINK 1) on both read ports, then performs random writes and
// compares both ports against a reference array, including a read of the word
// being written (old value before the edge).
module tb_timing_ram;
  import tlc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  par_e waddr = PAR_TBASE, ra = PAR_TBASE, rb = PAR_TBASE;
  logic [PAR_W-1:0] wdata = '0, da, db;
  logic [PAR_W-1:0] ref_mem [4] = '{25, 25, 5, 1};
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  timing_ram dut (.clk, .rst, .we, .waddr, .wdata,
                  .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

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
    rst = 1'b0;
    for (int i = 0; i < 4; i++) begin
      ra = par_e'(i); rb = par_e'(3 - i); #1;
      check(da == ref_mem[i] && db == ref_mem[3 - i], $sformatf("reset word %0d", i));
    end
    for (int i = 0; i < 300; i++) begin
      we    = 1'($urandom % 2);
      waddr = par_e'($urandom % 4);
      wdata = PAR_W'($urandom);
      ra    = par_e'($urandom % 4);
      rb    = waddr;
      #1;
      check(da == ref_mem[ra] && db == ref_mem[rb], $sformatf("read step %0d", i));
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      check(db == ref_mem[rb], $sformatf("after write step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
