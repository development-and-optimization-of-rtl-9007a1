// Self-checking testbench for the T-junction controller.
//
// Two instances run side by side: dut_a with the state-diagram dwell limits
// (15,3,3,15,3,3) and dut_b with the limits of the published simulation trace for
// S0, S1 and S5 (7,2,3,15,3,2). For each, a table-driven reference model predicts
// state, counter and all four lamp groups every cycle, and the length of every
// visited state is measured and compared with limit + 1 cycles. dut_b is also
// checked against the exact S4 -> S5 -> S0 -> S1 -> S2 stretch of the trace
// (counter values and lamp codes). Finally the scan chain is exercised: a pattern
// is shifted in, the previous contents must appear on so in chain order, and an
// illegal state code shifted in must fall back to S0.
module tb_traffic_light_controller;
  import tlc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic se  = 1'b0;
  logic si  = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic so_a, so_b;
  lamp_t m1_a, s_a, mt_a, m2_a, m1_b, s_b, mt_b, m2_b;
  tj_state_e ps_a, ps_b;
  logic [3:0] cnt_a, cnt_b;

  traffic_light_controller dut_a (
    .clk, .rst, .se, .si, .so(so_a),
    .light_M1(m1_a), .light_S(s_a), .light_MT(mt_a), .light_M2(m2_a),
    .ps(ps_a), .count(cnt_a)
  );

  traffic_light_controller #(
    .T_S0(7), .T_S1(2), .T_S2(3), .T_S3(15), .T_S4(3), .T_S5(2)
  ) dut_b (
    .clk, .rst, .se(1'b0), .si(1'b0), .so(so_b),
    .light_M1(m1_b), .light_S(s_b), .light_MT(mt_b), .light_M2(m2_b),
    .ps(ps_b), .count(cnt_b)
  );

  // Expected lamp codes {M1, S, MT, M2} per state, written as the 3-bit numbers of
  // the simulation trace (100 red, 010 yellow, 001 green).
  function automatic logic [11:0] exp_lamps(int st);
    case (st)
      0: return {3'b001, 3'b100, 3'b100, 3'b001};
      1: return {3'b001, 3'b100, 3'b100, 3'b010};
      2: return {3'b001, 3'b100, 3'b001, 3'b100};
      3: return {3'b010, 3'b100, 3'b010, 3'b100};
      4: return {3'b100, 3'b001, 3'b100, 3'b100};
      5: return {3'b100, 3'b010, 3'b100, 3'b100};
      default: return '0;
    endcase
  endfunction

  int lim_a[6] = '{15, 3, 3, 15, 3, 3};
  int lim_b[6] = '{7, 2, 3, 15, 3, 2};

  // Reference models.
  int rs_a = 0, rc_a = 0, rs_b = 0, rc_b = 0;
  int len_a = 0, len_b = 0;
  int visits_a[6] = '{default: 0};
  bit model_on = 1'b0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  always @(negedge clk) begin
    if (model_on) begin
      check(int'(ps_a) == rs_a && int'(cnt_a) == rc_a,
            $sformatf("A state %0d/%0d count %0d/%0d", ps_a, rs_a, cnt_a, rc_a));
      check({m1_a, s_a, mt_a, m2_a} == exp_lamps(rs_a), "A lamps");
      check(int'(ps_b) == rs_b && int'(cnt_b) == rc_b,
            $sformatf("B state %0d/%0d count %0d/%0d", ps_b, rs_b, cnt_b, rc_b));
      check({m1_b, s_b, mt_b, m2_b} == exp_lamps(rs_b), "B lamps");
    end
  end

  always @(posedge clk) begin
    if (model_on) begin
      len_a++;
      if (rc_a < lim_a[rs_a]) rc_a++;
      else begin
        check(len_a == lim_a[rs_a] + 1, $sformatf("A length of S%0d = %0d", rs_a, len_a));
        visits_a[rs_a]++;
        rs_a = (rs_a + 1) % 6; rc_a = 0; len_a = 0;
      end
      len_b++;
      if (rc_b < lim_b[rs_b]) rc_b++;
      else begin
        check(len_b == lim_b[rs_b] + 1, $sformatf("B length of S%0d = %0d", rs_b, len_b));
        rs_b = (rs_b + 1) % 6; rc_b = 0; len_b = 0;
      end
    end
  end

  // The stretch of the published trace, as (ps, count) pairs starting at S4/0001.
  int trace_ps[16]  = '{4,4,4, 5,5,5, 0,0,0,0,0,0,0,0, 1,1};
  int trace_cnt[16] = '{1,2,3, 0,1,2, 0,1,2,3,4,5,6,7, 0,1};

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    // Reset state: S0 lamps, counter clear.
    check(ps_a == TJ_S0 && cnt_a == 0, "reset state");
    check({m1_a, s_a, mt_a, m2_a} == exp_lamps(0), "reset lamps");
    rst = 1'b0;
    model_on = 1'b1;
    // Three full rings of dut_a (48 cycles each).
    repeat (3 * 48 + 2) @(posedge clk);
    for (int i = 0; i < 6; i++) check(visits_a[i] >= 3, $sformatf("A visited S%0d", i));

    // Trace of dut_b: wait for S4 with count 1 and compare 16 cycles.
    model_on = 1'b0;
    @(negedge clk);
    while (!(ps_b == TJ_S4 && cnt_b == 1)) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      check(int'(ps_b) == trace_ps[i] && int'(cnt_b) == trace_cnt[i],
            $sformatf("trace step %0d: ps %0d count %0d", i, ps_b, cnt_b));
      check({m1_b, s_b, mt_b, m2_b} == exp_lamps(trace_ps[i]), $sformatf("trace lamps %0d", i));
      @(negedge clk);
    end
    // The cursor line of the trace: ps 011, count 0010 gives M1 010, S 100, MT 010, M2 100.
    while (!(ps_b == TJ_S3 && cnt_b == 2)) @(negedge clk);
    check({m1_b, s_b, mt_b, m2_b} == {3'b010, 3'b100, 3'b010, 3'b100}, "cursor line");

    // Scan: reset dut_a, run to a known point, then shift 7 bits.
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    // Walk to S2, count 1: ps=010, count=0001.
    while (!(ps_a == TJ_S2 && cnt_a == 1)) @(negedge clk);
    se = 1'b1;
    begin
      logic [6:0] prev_bits, pattern, seen;
      prev_bits  = {ps_a, cnt_a};     // so order: ps[2], ps[1], ps[0], count[3..0]
      pattern = 7'b1100011;        // bits shifted in: last-in ends at count[0]
      for (int i = 0; i < 7; i++) begin
        seen[6 - i] = so_a;
        si = pattern[6 - i];
        @(negedge clk);
      end
      check(seen == prev_bits, $sformatf("scan out %b expected %b", seen, prev_bits));
      check({ps_a, cnt_a} == pattern, $sformatf("scan in %b expected %b", {ps_a, cnt_a}, pattern));
    end
    se = 1'b0;
    // ps is now 110, an unused code: the next functional edge must go to S0.
    @(negedge clk);
    check(ps_a == TJ_S0 && cnt_a == 0, "illegal state recovers to S0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
