// Testbench for the seven-segment decoder: every digit is compared with segment
// patterns built here from the list of lit segments of each character, and blank
// must turn every segment off.
module tb_hex7seg;
  logic [3:0] digit;
  logic blank;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  hex7seg dut (.digit, .blank, .seg);

  // Lit segments of each character, as letters a-g.
  string lit[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                     "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] pattern(string s);
    logic [6:0] p = '0;
    for (int i = 0; i < s.len(); i++) p[3'(s[i] - "a")] = 1'b1;
    return p;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      digit = 4'(i); blank = 1'b0; #1;
      checks++;
      if (seg != pattern(lit[i])) begin failures++; $display("FAIL digit %0d: %b", i, seg); end
      blank = 1'b1; #1;
      checks++;
      if (seg != 7'b0) begin failures++; $display("FAIL blank %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
