// Full-size testbench: the top level with every parameter at its default (one
// second = 714286 clock cycles), taken through one complete normal light cycle of
// the four-road controller while the T-junction controller runs alongside.
//
// The default timing parameters (TYEL 5 s, TEXT 25 s, TBASE 25 s) are first read
// back on the display, then the normal mode runs from the all-red start through
// the yellow and green of all four roads and into the next main-street yellow.
// Every phase must last its parameter times 714286 cycles and show the expected
// lamps; a walk request made before the start must light the walk green during
// the main green. The T-junction controller is compared with a reference model on
// every cycle of the first 2000 cycles and then once per ring.
module tb_traffic_light_top_full;
  import tlc_pkg::*;

  localparam int SEC = 714286;

  logic clk = 1'b0, rst = 1'b1;
  logic tj_se = 1'b0, tj_si = 1'b0, tj_so;
  lamp_t tj_light_M1, tj_light_S, tj_light_MT, tj_light_M2;
  logic [2:0] tj_state;
  logic [3:0] tj_count;
  logic fr_go_btn = 1'b0, fr_walk_btn = 1'b0;
  logic [1:0] fr_func_sw = 2'd1, fr_lsel_sw = 2'd2;
  logic [4:0] fr_c_sw = '0;
  logic [2:0] fr_sensor = '0;
  lamp_t [3:0] fr_lamps;
  logic fr_walk_red, fr_walk_green, fr_disp_valid, fr_extend;
  logic [4:0] fr_disp_value;
  logic [6:0] fr_hex_lo, fr_hex_hi;
  logic [3:0] fr_state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  traffic_light_top dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic logic [11:0] pat(int g, int y);
    logic [11:0] p;
    for (int r = 0; r < 4; r++)
      p[3*r +: 3] = (r == g) ? 3'b001 : (r == y) ? 3'b010 : 3'b100;
    return p;
  endfunction

  // T-junction model: ring of 48 cycles from reset.
  int lim[6] = '{15, 3, 3, 15, 3, 3};
  longint cyc = 0;
  int rs = 0, rc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (rc < lim[rs]) rc++;
    else begin rs = (rs + 1) % 6; rc = 0; end
  end
  always @(negedge clk) if (!rst && (cyc < 2000 || cyc % 48 == 17))
    check(int'(tj_state) == rs && int'(tj_count) == rc, "T-junction state/count");

  initial begin : watchdog
    repeat (140 * SEC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_change(output int len);
    logic [13:0] v;
    v = {fr_lamps, fr_walk_red, fr_walk_green};
    len = 0;
    while ({fr_lamps, fr_walk_red, fr_walk_green} == v) begin @(negedge clk); len++; end
  endtask

  initial begin
    int len;
    logic [11:0] exp_p [10];
    int exp_s [10];
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // Read TYEL, TEXT and TBASE.
    repeat (4) @(negedge clk);
    fr_go_btn = 1'b1; repeat (4) @(negedge clk); fr_go_btn = 1'b0;
    check(fr_disp_valid && fr_disp_value == 5'd5, "TYEL default 5");
    fr_lsel_sw = 2'd1; repeat (4) @(negedge clk);
    check(fr_disp_value == 5'd25 && fr_hex_hi == 7'b0000110 && fr_hex_lo == 7'b1101111, "TEXT default 25");
    fr_lsel_sw = 2'd0; repeat (4) @(negedge clk);
    check(fr_disp_value == 5'd25, "TBASE default 25");
    // Normal mode.
    fr_func_sw = 2'd2; repeat (4) @(negedge clk);
    check(fr_lamps == '0, "dark before GO");
    fr_walk_btn = 1'b1; repeat (3) @(negedge clk); fr_walk_btn = 1'b0;
    fr_go_btn = 1'b1;
    while (fr_lamps == '0) @(negedge clk);
    fr_go_btn = 1'b0;
    exp_p = '{pat(-1, -1), pat(-1, 0), pat(0, -1), pat(-1, 1), pat(1, -1),
              pat(-1, 2), pat(2, -1), pat(-1, 3), pat(3, -1), pat(-1, 0)};
    exp_s = '{5, 5, 25, 5, 25, 5, 25, 5, 25, 5};
    for (int i = 0; i < 9; i++) begin
      check(fr_lamps == exp_p[i], $sformatf("phase %0d lamps %b", i, fr_lamps));
      check(fr_walk_green == (i == 2) && fr_walk_red == (i != 2), $sformatf("phase %0d walk light", i));
      wait_change(len);
      check(len == exp_s[i] * SEC, $sformatf("phase %0d lasted %0d cycles, expected %0d", i, len, exp_s[i] * SEC));
    end
    check(fr_lamps == exp_p[9], "cycle restarts with main yellow");
    $display("normal cycle done after %0d cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
