// T-junction traffic light controller.
//
// Four lamp groups stand at a T-shaped junction: M1 and M2 for the two directions
// of the main road, MT for the main-road turn into the side street, and S for the
// side street. A Moore state machine steps through six states S0..S5 in a fixed
// ring; in each state a dwell counter counts clock cycles, and the machine stays
// while count < T_Sn, so state n lasts T_Sn + 1 cycles. The counter is cleared on
// every state change.
//
//   state  M1      M2      MT      S
//   S0     green   green   red     red
//   S1     green   yellow  red     red
//   S2     green   red     green   red
//   S3     yellow  red     yellow  red
//   S4     red     red     red     green
//   S5     red     red     red     yellow
//
// The six-state ring, the "count < N" dwell rule, the 3-bit state register, the
// 4-bit counter and the lamp codes of every state follow the design's state diagram
// and its simulation trace. The default dwell limits (15, 3, 3, 15, 3, 3) are the
// ones on the state diagram; the simulation trace was made with shorter limits for
// S0, S1 and S5 (7, 2, 2), which the parameters can reproduce.
//
// A mux-scan chain runs through all state flops, as in the synthesized netlist
// (ports se, si, so, one chain clocked on the rising edge of clk). With se high the
// flops shift si -> count[0] -> ... -> count[COUNT_W-1] -> ps[0] -> ps[1] -> ps[2]
// -> so; the chain order is this design's choice.
//
// Interface: clk, rst (asynchronous, active high: all four groups then show the S0
// lamps and the counter is cleared), se/si/so scan, four 3-bit lamp outputs
// {red, yellow, green}, and the state and counter for observation. Outputs are
// decoded from the state register alone, so they change one clock after the
// counter reaches its limit.
module traffic_light_controller
  import tlc_pkg::*;
#(
  parameter int unsigned COUNT_W = 4,
  parameter int unsigned T_S0 = 15,
  parameter int unsigned T_S1 = 3,
  parameter int unsigned T_S2 = 3,
  parameter int unsigned T_S3 = 15,
  parameter int unsigned T_S4 = 3,
  parameter int unsigned T_S5 = 3
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               se,
  input  logic               si,
  output logic               so,
  output lamp_t              light_M1,
  output lamp_t              light_S,
  output lamp_t              light_MT,
  output lamp_t              light_M2,
  output tj_state_e          ps,
  output logic [COUNT_W-1:0] count
);

  localparam int unsigned TMAX = (1 << COUNT_W) - 1;

  // Each dwell limit has to be reachable by the counter.
  if (T_S0 > TMAX || T_S1 > TMAX || T_S2 > TMAX ||
      T_S3 > TMAX || T_S4 > TMAX || T_S5 > TMAX) begin : g_bad_limit
    $error("traffic_light_controller: a dwell limit exceeds the counter range");
  end

  logic [COUNT_W-1:0] limit;
  tj_state_e          ns;

  always_comb begin
    unique case (ps)
      TJ_S0:   begin limit = COUNT_W'(T_S0); ns = TJ_S1; end
      TJ_S1:   begin limit = COUNT_W'(T_S1); ns = TJ_S2; end
      TJ_S2:   begin limit = COUNT_W'(T_S2); ns = TJ_S3; end
      TJ_S3:   begin limit = COUNT_W'(T_S3); ns = TJ_S4; end
      TJ_S4:   begin limit = COUNT_W'(T_S4); ns = TJ_S5; end
      TJ_S5:   begin limit = COUNT_W'(T_S5); ns = TJ_S0; end
      default: begin limit = '0;             ns = TJ_S0; end
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ps    <= TJ_S0;
      count <= '0;
    end else if (se) begin
      // Scan shift: si enters at count[0], ps[2] leaves on so.
      count <= {count[COUNT_W-2:0], si};
      ps    <= tj_state_e'({ps[1:0], count[COUNT_W-1]});
    end else if (count < limit) begin
      count <= count + 1'b1;
    end else begin
      ps    <= ns;
      count <= '0;
    end
  end

  assign so = ps[2];

  always_comb begin
    light_M1 = LAMP_RED;
    light_M2 = LAMP_RED;
    light_MT = LAMP_RED;
    light_S  = LAMP_RED;
    unique case (ps)
      TJ_S0: begin light_M1 = LAMP_GRN; light_M2 = LAMP_GRN; end
      TJ_S1: begin light_M1 = LAMP_GRN; light_M2 = LAMP_YEL; end
      TJ_S2: begin light_M1 = LAMP_GRN; light_MT = LAMP_GRN; end
      TJ_S3: begin light_M1 = LAMP_YEL; light_MT = LAMP_YEL; end
      TJ_S4: light_S = LAMP_GRN;
      TJ_S5: light_S = LAMP_YEL;
      default: ;
    endcase
  end

endmodule
