// Testbench for the four-road controller's state machine.
//
// The state machine is surrounded by reference models of its parameter store and
// of a timer counting one "second" per clock cycle, so that a phase of N seconds
// lasts N cycles. The test writes the four timing parameters through the write
// function (TBASE 4, TEXT 6, TYEL 3, TBLINK 2), reads one back, then runs the normal
// mode for two light cycles and the blinking mode. The lamps are recorded as a
// list of (lamp pattern, walk light, length) segments and compared with the list
// expected from the description: all red, then yellow and green for each road in
// turn, the main green with the walk light on the first cycle only (a request is
// pending then), the first road-2 green extended once by TBASE because its sensor
// reports traffic, and blinking as alternating main-yellow / side-yellow.
module tb_atlc_fsm;
  import tlc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic go = 1'b0;
  func_e func = FN_WRITE;
  par_e lsel = PAR_TBASE;
  logic [PAR_W-1:0] cval = '0;
  logic [2:0] sensor = '0;
  logic walk_pending = 1'b0, walk_serve;
  logic ram_we, timer_load, timer_done;
  par_e ram_raddr;
  logic [PAR_W-1:0] ram_rdata;
  lamp_t [3:0] lamps;
  logic walk_red, walk_green, disp_valid, extend;
  logic [3:0] state_code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  atlc_fsm dut (.*);

  // Reference parameter store and timer.
  logic [PAR_W-1:0] mem [4] = '{25, 25, 5, 1};
  int tcnt = 0;
  assign ram_rdata  = mem[ram_raddr];
  assign timer_done = (tcnt == 1);
  always @(posedge clk) begin
    if (ram_we) mem[lsel] <= cval;
    if (timer_load) tcnt <= int'(ram_rdata);
    else if (tcnt > 0) tcnt <= tcnt - 1;
    if (walk_serve) walk_pending <= 1'b0;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // Lamp pattern with road g green and road y yellow (-1 for none), others red.
  function automatic logic [11:0] pat(int g, int y);
    logic [11:0] p;
    for (int r = 0; r < 4; r++)
      p[3*r +: 3] = (r == g) ? 3'b001 : (r == y) ? 3'b010 : 3'b100;
    return p;
  endfunction

  // Segment recorder.
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
  always @(posedge clk) if (extend) n_ext++;
  always @(posedge clk) if (extend) sensor[0] <= 1'b0;  // traffic clears after one extension

  task automatic press_go;
    go = 1'b1; @(negedge clk); go = 1'b0; @(negedge clk);
  endtask

  task automatic write_par(par_e p, int v);
    func = FN_WRITE; lsel = p; cval = PAR_W'(v);
    go = 1'b1; @(negedge clk);          // idle sees the rising edge
    check(state_code == 4'd1, "write state entered");
    check(ram_we, "write strobe");
    go = 1'b0; @(negedge clk);
    check(!ram_we && state_code == 4'd0, "back to idle after write");
    check(mem[p] == PAR_W'(v), "parameter stored");
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] exp_val [32];
  int exp_len [32];
  int ne;

  task automatic expect_seg(logic [11:0] p, bit wg, int len);
    exp_val[ne] = {p, !wg, wg}; exp_len[ne] = len; ne++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(lamps == '0 && !walk_red && !walk_green, "idle: all dark");
    // GO held low: nothing happens even with a running function selected.
    func = FN_NORMAL; repeat (5) @(negedge clk);
    check(state_code == 4'd0, "stays idle without GO");

    write_par(PAR_TBASE, 4);
    write_par(PAR_TEXT, 6);
    write_par(PAR_TYEL, 3);
    write_par(PAR_TBLINK, 2);

    // Read function.
    func = FN_READ; lsel = PAR_TEXT;
    press_go();
    check(disp_valid && lamps == '0, "read: display on, lamps dark");
    func = FN_NORMAL; @(negedge clk);
    check(!disp_valid && state_code == 4'd0, "read left when function changes");

    // Normal mode: two cycles.
    walk_pending = 1'b1;
    sensor = 3'b001;
    func = FN_NORMAL;
    rec = 1'b1;
    go = 1'b1; @(negedge clk); go = 1'b0;
    repeat (3 + 2 * (3 + 6 + 3 + 4 + 3 + 4 + 3 + 4) + 4 + 3 + 2) @(negedge clk);
    func = FN_BLINK; @(negedge clk);
    check(state_code == 4'd0, "normal left when function changes");
    go = 1'b1; @(negedge clk); go = 1'b0;
    repeat (8) @(negedge clk);
    func = FN_WRITE; @(negedge clk); @(negedge clk);
    rec = 1'b0;

    ne = 0;
    expect_seg(12'b0, 1'b0, 0);   // placeholder for the dark idle segment (length not checked)
    expect_seg(pat(-1, -1), 0, 3);
    expect_seg(pat(-1, 0), 0, 3);
    expect_seg(pat(0, -1), 1, 6);
    expect_seg(pat(-1, 1), 0, 3);
    expect_seg(pat(1, -1), 0, 8);
    expect_seg(pat(-1, 2), 0, 3);
    expect_seg(pat(2, -1), 0, 4);
    expect_seg(pat(-1, 3), 0, 3);
    expect_seg(pat(3, -1), 0, 4);
    expect_seg(pat(-1, 0), 0, 3);
    expect_seg(pat(0, -1), 0, 6);
    expect_seg(pat(-1, 1), 0, 3);
    expect_seg(pat(1, -1), 0, 4);
    expect_seg(pat(-1, 2), 0, 3);
    expect_seg(pat(2, -1), 0, 4);
    expect_seg(pat(-1, 3), 0, 3);
    expect_seg(pat(3, -1), 0, 4);
    expect_seg(pat(-1, 0), 0, 3);
    expect_seg(pat(0, -1), 0, 0);  // cut short by the function change; length not checked
    expect_seg(12'b0, 0, 0);       // idle between the two functions
    expect_seg(pat(-1, 0), 0, 2);  // blink: main yellow, sides red
    expect_seg({3{3'b010}} << 3 | 12'b100, 0, 2);  // main red, sides yellow
    expect_seg(pat(-1, 0), 0, 2);
    expect_seg({3{3'b010}} << 3 | 12'b100, 0, 2);

    // The idle segments are dark: walk lights off too.
    exp_val[0][1] = 1'b0;
    exp_val[20][1] = 1'b0;
    check(nseg >= ne, $sformatf("segments recorded %0d, expected at least %0d", nseg, ne));
    for (int i = 0; i < ne && i < nseg; i++) begin
      check(seg_val[i] == exp_val[i], $sformatf("segment %0d lamps %b expected %b", i, seg_val[i], exp_val[i]));
      if (exp_len[i] != 0)
        check(seg_len[i] == exp_len[i], $sformatf("segment %0d length %0d expected %0d", i, seg_len[i], exp_len[i]));
    end
    check(n_ext == 1, $sformatf("extensions %0d", n_ext));
    check(!walk_pending, "walk request served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
