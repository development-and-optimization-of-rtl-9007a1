// Testbench for the synchronizer: drives random 8-bit words into a W=8, two-stage
// instance and checks that every output equals the input of two clock edges
// earlier, and that reset clears the outputs.
module tb_synchronizer;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] d = '0, q;
  logic [7:0] hist [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  synchronizer #(.W(8)) dut (.clk, .rst, .d, .q);

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    hist = '{default: '0};
    for (int i = 0; i < 200; i++) begin
      d = 8'($urandom);
      hist[0] = d;
      @(posedge clk);
      #1;
      hist[2] = hist[1];
      hist[1] = hist[0];
      checks++;
      if (q != hist[2]) begin
        failures++;
        $display("FAIL step %0d q=%h expected %h", i, q, hist[2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
