// End-to-end testbench of the top level: both controllers run at once.
//
// The T-junction controller runs at its default dwell limits; a reference model
// predicts its state, counter and lamps every cycle for several rings, and a scan
// shift is done once at the end. The four-road controller runs with a 20-cycle
// "second" (DIV=20) and its default timing parameters: it writes and reads a
// parameter, runs the normal mode for a full cycle with a walk request and waiting
// traffic on side street 2, and runs the blinking mode. Every lamp change of the
// four-road controller is checked against the expected next phase and its length
// against parameter * DIV. Each mechanism (the six T-junction states, scan shift,
// write, read, normal cycle, side-street extension, walk service, blink, return
// to idle on a function change) is counted, and one that never happened counts as
// a failure.
module tb_traffic_light_top;
  import tlc_pkg::*;

  localparam int DIV = 20;

  logic clk = 1'b0, rst = 1'b1;
  logic tj_se = 1'b0, tj_si = 1'b0, tj_so;
  lamp_t tj_light_M1, tj_light_S, tj_light_MT, tj_light_M2;
  logic [2:0] tj_state;
  logic [3:0] tj_count;
  logic fr_go_btn = 1'b0, fr_walk_btn = 1'b0;
  logic [1:0] fr_func_sw = 2'd0, fr_lsel_sw = 2'd0;
  logic [4:0] fr_c_sw = '0;
  logic [2:0] fr_sensor = '0;
  lamp_t [3:0] fr_lamps;
  logic fr_walk_red, fr_walk_green, fr_disp_valid, fr_extend;
  logic [4:0] fr_disp_value;
  logic [6:0] fr_hex_lo, fr_hex_hi;
  logic [3:0] fr_state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  traffic_light_top #(.DIV(DIV)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  // ---------------- T-junction reference model ----------------
  int lim[6] = '{15, 3, 3, 15, 3, 3};
  logic [11:0] tj_exp[6] = '{
    {3'b001, 3'b100, 3'b100, 3'b001}, {3'b001, 3'b100, 3'b100, 3'b010},
    {3'b001, 3'b100, 3'b001, 3'b100}, {3'b010, 3'b100, 3'b010, 3'b100},
    {3'b100, 3'b001, 3'b100, 3'b100}, {3'b100, 3'b010, 3'b100, 3'b100}};
  int rs = 0, rc = 0;
  bit tj_on = 1'b0;
  int tj_visits[6] = '{default: 0};
  always @(negedge clk) if (tj_on) begin
    check(int'(tj_state) == rs && int'(tj_count) == rc, "T-junction state/count");
    check({tj_light_M1, tj_light_S, tj_light_MT, tj_light_M2} == tj_exp[rs], "T-junction lamps");
  end
  always @(posedge clk) if (tj_on) begin
    if (rc < lim[rs]) rc++;
    else begin tj_visits[rs]++; rs = (rs + 1) % 6; rc = 0; end
  end

  // ---------------- four-road phase checker ----------------
  // Parameters in seconds as held by the store (TYEL is rewritten to 4 below).
  int p_tbase = 25, p_text = 25, p_tyel = 5, p_tblink = 1;
  function automatic logic [11:0] pat(int g, int y);
    logic [11:0] p;
    for (int r = 0; r < 4; r++)
      p[3*r +: 3] = (r == g) ? 3'b001 : (r == y) ? 3'b010 : 3'b100;
    return p;
  endfunction

  logic [13:0] cur = '0;
  int cur_len = 0;
  int n_norm_phases = 0, n_blink_phases = 0, n_walk = 0, n_ext = 0, n_idle_ret = 0;
  int n_write = 0, n_read = 0, n_full_cycles = 0;
  bit ext_pending = 1'b0;

  // Length a completed segment must have, or 0 if it is not timed.
  function automatic int want_len(logic [13:0] v, bit extended, bit blink);
    logic [11:0] l = v[13:2];
    if (l == 12'b0) return 0;
    if (blink) return p_tblink * DIV;
    if (l == pat(-1, -1)) return p_tyel * DIV;
    for (int r = 0; r < 4; r++) begin
      if (l == pat(-1, r)) return p_tyel * DIV;
      if (l == pat(r, -1)) return (r == 0 ? p_text : p_tbase * (extended ? 2 : 1)) * DIV;
    end
    if (l == 12'b010_010_010_100) return p_tblink * DIV;
    return -1;
  endfunction

  logic [13:0] nv;
  bit cur_blink = 1'b0;
  always @(negedge clk) begin
    nv = {fr_lamps, fr_walk_red, fr_walk_green};
    if (nv != cur && cur_len > 0 && !rst) begin
      automatic int w = want_len(cur, ext_pending, cur_blink);
      check(w >= 0, $sformatf("unknown lamp pattern %b", cur));
      // A segment cut by a function change (next is dark) is not timed.
      if (w > 0 && nv[13:2] != 12'b0)
        check(cur_len == w, $sformatf("phase %b lasted %0d cycles, expected %0d", cur, cur_len, w));
      if (nv[13:2] == 12'b0 && cur[13:2] != 12'b0) n_idle_ret++;
      if (cur[13:2] == pat(3, -1) && nv[13:2] == pat(-1, 0)) n_full_cycles++;
      if (cur[13:2] == pat(1, -1)) ext_pending = 1'b0;
      cur_len = 0;
      if (fr_state >= 4'd5) n_norm_phases++;
      if (fr_state == 4'd3 || fr_state == 4'd4) n_blink_phases++;
    end
    if (fr_walk_green) begin
      check(nv[13:2] == pat(0, -1), "walk green only with main green");
      if (!cur[0]) n_walk++;
    end
    cur = nv;
    cur_blink = (fr_state == 4'd3 || fr_state == 4'd4);
    cur_len++;
  end
  always @(posedge clk) if (fr_extend) begin
    n_ext++; ext_pending <= 1'b1; fr_sensor[0] <= 1'b0;
  end
  always @(negedge clk) begin
    if (dut.u_fr.u_fsm.ram_we) n_write++;
  end

  task automatic press_go;
    fr_go_btn = 1'b1; repeat (4) @(negedge clk); fr_go_btn = 1'b0; repeat (4) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (400 * DIV + 3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    tj_on = 1'b1;
    // Write TYEL = 4, read it back.
    fr_func_sw = 2'd0; fr_lsel_sw = 2'd2; fr_c_sw = 5'd4;
    repeat (4) @(negedge clk);
    press_go();
    p_tyel = 4;
    fr_func_sw = 2'd1; repeat (4) @(negedge clk);
    press_go();
    check(fr_disp_valid && fr_disp_value == 5'd4 && fr_hex_lo == 7'b1100110, "read back TYEL");
    if (fr_disp_valid) n_read++;
    // Normal mode, walk request, traffic on side street 2.
    fr_func_sw = 2'd2; repeat (4) @(negedge clk);
    fr_walk_btn = 1'b1; repeat (3) @(negedge clk); fr_walk_btn = 1'b0;
    fr_sensor[0] = 1'b1;
    press_go();
    // One cycle: all red + 4 yellows + 4 greens + one extension, then into the next cycle.
    repeat (DIV * (4 + 4 * 4 + 25 + 3 * 25 + 25) + 3 * DIV) @(negedge clk);
    // Blink mode.
    fr_func_sw = 2'd3; repeat (6) @(negedge clk);
    press_go();
    repeat (6 * DIV) @(negedge clk);
    fr_func_sw = 2'd0; repeat (6) @(negedge clk);

    // Scan shift on the T-junction controller: 7 ones in, then a reset.
    tj_on = 1'b0;
    tj_se = 1'b1; tj_si = 1'b1;
    repeat (7) @(negedge clk);
    check({tj_state, tj_count} == 7'h7F, "scan shifted in");
    tj_se = 1'b0;
    @(negedge clk);
    check(tj_state == 3'd0 && tj_count == 4'd0, "unused state code falls back to S0");

    for (int i = 0; i < 6; i++) begin
      check(tj_visits[i] > 0, $sformatf("T-junction state S%0d visited %0d times", i, tj_visits[i]));
    end
    check(n_write == 1, $sformatf("writes %0d", n_write));
    check(n_read == 1, $sformatf("reads %0d", n_read));
    check(n_full_cycles >= 1, $sformatf("full normal cycles %0d", n_full_cycles));
    check(n_norm_phases >= 9, $sformatf("normal phases %0d", n_norm_phases));
    check(n_ext == 1, $sformatf("extensions %0d", n_ext));
    check(n_walk == 1, $sformatf("walk phases %0d", n_walk));
    check(n_blink_phases >= 4, $sformatf("blink phases %0d", n_blink_phases));
    check(n_idle_ret >= 2, $sformatf("returns to idle %0d", n_idle_ret));
    $display("mechanisms: tj_states=%p write=%0d read=%0d normal_phases=%0d full_cycles=%0d ext=%0d walk=%0d blink_phases=%0d idle_returns=%0d",
             tj_visits, n_write, n_read, n_norm_phases, n_full_cycles, n_ext, n_walk, n_blink_phases, n_idle_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
