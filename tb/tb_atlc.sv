// Integration testbench for the four-road controller, driven only through its
// switches, buttons and sensors (all passing the synchronizers).
//
// With a 10-cycle "second" (DIV=10) and short reset parameters (TBASE 3, TEXT 5,
// TYEL 2, TBLINK 1) it writes TYEL = 1 with the write function, reads TEXT back
// and checks both hex digits, then runs one normal light cycle with a walk request
// and waiting traffic on side street 3, and finally the blinking mode. Every
// lamp segment is measured in clock cycles and must last its parameter times DIV
// cycles; the walk light must be green exactly during the first main green, and
// side street 3 must be extended once by TBASE.
module tb_atlc;
  import tlc_pkg::*;

  localparam int DIV = 10;

  logic clk = 1'b0, rst = 1'b1;
  logic go_btn = 1'b0, walk_btn = 1'b0;
  logic [1:0] func_sw = 2'd0, lsel_sw = 2'd0;
  logic [4:0] c_sw = '0;
  logic [2:0] sensor = '0;
  lamp_t [3:0] lamps;
  logic walk_red, walk_green, disp_valid, extend;
  logic [4:0] disp_value;
  logic [6:0] hex_lo, hex_hi;
  logic [3:0] state_code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  atlc #(.DIV(DIV), .INIT_TBASE(3), .INIT_TEXT(5), .INIT_TYEL(2), .INIT_TBLINK(1)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic logic [11:0] pat(int g, int y);
    logic [11:0] p;
    for (int r = 0; r < 4; r++)
      p[3*r +: 3] = (r == g) ? 3'b001 : (r == y) ? 3'b010 : 3'b100;
    return p;
  endfunction

  logic [13:0] seg_val [64];
  int seg_len [64];
  int nseg = 0, cur_len = 0;
  logic [13:0] cur = '0;
  bit rec = 1'b0;
  always @(negedge clk) begin
    if (rec) begin
      if ({lamps, walk_red, walk_green} != cur && cur_len > 0) begin
        seg_val[nseg] = cur; seg_len[nseg] = cur_len; nseg++; cur_len = 0;
      end
      cur = {lamps, walk_red, walk_green};
      cur_len++;
    end
  end

  int n_ext = 0;
  always @(posedge clk) if (extend) begin n_ext++; sensor[1] <= 1'b0; end

  task automatic press_go;
    go_btn = 1'b1; repeat (4) @(negedge clk); go_btn = 1'b0; repeat (4) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(lamps == '0 && !walk_red && !walk_green && !disp_valid, "idle after reset");

    // Write TYEL = 1.
    func_sw = 2'd0; lsel_sw = 2'd2; c_sw = 5'd1;
    repeat (4) @(negedge clk);
    press_go();
    // Read TYEL back, then TEXT (5 -> hex 05), then write and read TEXT = 25 (hex 19).
    func_sw = 2'd1;
    repeat (4) @(negedge clk);
    press_go();
    check(disp_valid && disp_value == 5'd1, $sformatf("read TYEL = %0d", disp_value));
    check(hex_lo == 7'b0000110 && hex_hi == 7'b0111111, "hex 01");
    lsel_sw = 2'd1; repeat (4) @(negedge clk);
    check(disp_value == 5'd5 && hex_lo == 7'b1101101, "read TEXT = 5");
    func_sw = 2'd0; c_sw = 5'd25; repeat (4) @(negedge clk);
    check(!disp_valid && hex_lo == 7'b0 && hex_hi == 7'b0, "display blank after read");
    press_go();
    func_sw = 2'd1; repeat (4) @(negedge clk);
    press_go();
    check(disp_value == 5'd25 && hex_hi == 7'b0000110 && hex_lo == 7'b1101111, "read TEXT = 25 as 19");
    // Put TEXT back to 5.
    func_sw = 2'd0; c_sw = 5'd5; repeat (4) @(negedge clk);
    press_go();

    // Normal mode with a walk request and traffic on side street 3.
    func_sw = 2'd2;
    walk_btn = 1'b1; repeat (3) @(negedge clk); walk_btn = 1'b0;
    sensor[1] = 1'b1;
    repeat (4) @(negedge clk);
    rec = 1'b1;
    go_btn = 1'b1;
    repeat (DIV * (1 + 1 + 5 + 1 + 3 + 1 + 6 + 1 + 3 + 1) + 5 * DIV) @(negedge clk);
    go_btn = 1'b0;
    func_sw = 2'd3; repeat (6) @(negedge clk);
    press_go();
    repeat (4 * DIV + 2) @(negedge clk);
    func_sw = 2'd0; repeat (6) @(negedge clk);
    rec = 1'b0;

    begin
      logic [13:0] ev [16];
      int el [16];
      automatic int k = 0;
      ev[k] = 14'b0;                    el[k++] = 0;        // idle
      ev[k] = {pat(-1, -1), 2'b10};     el[k++] = 1 * DIV;  // all red, TYEL
      ev[k] = {pat(-1, 0), 2'b10};      el[k++] = 1 * DIV;
      ev[k] = {pat(0, -1), 2'b01};      el[k++] = 5 * DIV;  // main green + walk
      ev[k] = {pat(-1, 1), 2'b10};      el[k++] = 1 * DIV;
      ev[k] = {pat(1, -1), 2'b10};      el[k++] = 3 * DIV;
      ev[k] = {pat(-1, 2), 2'b10};      el[k++] = 1 * DIV;
      ev[k] = {pat(2, -1), 2'b10};      el[k++] = 6 * DIV;  // extended once
      ev[k] = {pat(-1, 3), 2'b10};      el[k++] = 1 * DIV;
      ev[k] = {pat(3, -1), 2'b10};      el[k++] = 3 * DIV;
      ev[k] = {pat(-1, 0), 2'b10};      el[k++] = 1 * DIV;
      ev[k] = {pat(0, -1), 2'b10};      el[k++] = 0;        // no walk this time; cut short
      ev[k] = 14'b0;                    el[k++] = 0;        // idle
      ev[k] = {pat(-1, 0), 2'b10};      el[k++] = 1 * DIV;  // blink A
      ev[k] = {12'b010_010_010_100, 2'b10}; el[k++] = 1 * DIV;  // blink B
      ev[k] = {pat(-1, 0), 2'b10};      el[k++] = 1 * DIV;
      check(nseg >= k, $sformatf("segments %0d, expected at least %0d", nseg, k));
      for (int i = 0; i < k && i < nseg; i++) begin
        check(seg_val[i] == ev[i], $sformatf("segment %0d: %b expected %b", i, seg_val[i], ev[i]));
        if (el[i] != 0) check(seg_len[i] == el[i], $sformatf("segment %0d: %0d cycles, expected %0d", i, seg_len[i], el[i]));
      end
    end
    check(n_ext == 1, $sformatf("extensions %0d", n_ext));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
