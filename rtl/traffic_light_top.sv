// Top level: the two traffic light controllers side by side.
//
// The T-junction controller (traffic_light_controller) is the fixed-time design
// with six states, four lamp groups (M1, S, MT, M2) and a scan chain; the
// four-road controller (atlc) is the programmable design with a main street,
// three side streets, walk light, traffic sensors, timing-parameter store and
// blinking mode. They share only clk and rst (asynchronous, active high); every
// other port of each is brought out unchanged, the T-junction ones prefixed tj_,
// the four-road ones fr_. Lamp groups are {red, yellow, green}.
module traffic_light_top
  import tlc_pkg::*;
#(
  parameter int unsigned DIV = 714286
) (
  input  logic                 clk,
  input  logic                 rst,
  // T-junction controller
  input  logic                 tj_se,
  input  logic                 tj_si,
  output logic                 tj_so,
  output lamp_t                tj_light_M1,
  output lamp_t                tj_light_S,
  output lamp_t                tj_light_MT,
  output lamp_t                tj_light_M2,
  output logic [2:0]           tj_state,
  output logic [3:0]           tj_count,
  // four-road controller
  input  logic                 fr_go_btn,
  input  logic [1:0]           fr_func_sw,
  input  logic [1:0]           fr_lsel_sw,
  input  logic [PAR_W-1:0]     fr_c_sw,
  input  logic                 fr_walk_btn,
  input  logic [NROADS-2:0]    fr_sensor,
  output lamp_t [NROADS-1:0]   fr_lamps,
  output logic                 fr_walk_red,
  output logic                 fr_walk_green,
  output logic                 fr_disp_valid,
  output logic [PAR_W-1:0]     fr_disp_value,
  output logic [6:0]           fr_hex_lo,
  output logic [6:0]           fr_hex_hi,
  output logic                 fr_extend,
  output logic [3:0]           fr_state
);

  tj_state_e tj_ps;

  traffic_light_controller u_tj (
    .clk, .rst, .se(tj_se), .si(tj_si), .so(tj_so),
    .light_M1(tj_light_M1), .light_S(tj_light_S),
    .light_MT(tj_light_MT), .light_M2(tj_light_M2),
    .ps(tj_ps), .count(tj_count)
  );

  assign tj_state = tj_ps;

  atlc #(.DIV(DIV)) u_fr (
    .clk, .rst,
    .go_btn(fr_go_btn), .func_sw(fr_func_sw), .lsel_sw(fr_lsel_sw), .c_sw(fr_c_sw),
    .walk_btn(fr_walk_btn), .sensor(fr_sensor),
    .lamps(fr_lamps), .walk_red(fr_walk_red), .walk_green(fr_walk_green),
    .disp_valid(fr_disp_valid), .disp_value(fr_disp_value),
    .hex_lo(fr_hex_lo), .hex_hi(fr_hex_hi), .extend(fr_extend), .state_code(fr_state)
  );

endmodule
