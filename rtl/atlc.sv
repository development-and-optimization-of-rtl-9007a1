// Four-road traffic light controller with programmable timing.
//
// This is the intersection of one main street and three side streets, each with a
// red/yellow/green group, plus a walk light, a walk button and a traffic sensor on
// each side street. It is assembled from the parts the description lists:
// synchronizers for every switch, button and sensor, a latch that holds a walk
// request, a clock divider making a one-second tick, a phase timer, a four-word
// store (D_RAM) for the timing parameters TBASE, TEXT, TYEL and TBLINK, and the
// state machine that runs the user functions (write and read a parameter, normal
// and blinking light operation). See atlc_fsm for the light sequence. The read
// function shows the selected parameter (0-31 s) as two hex digits.
//
// Interface: clk, rst (asynchronous, active high). User inputs are asynchronous
// and pass two synchronizer flops, so the controller reacts to them three clock
// cycles after they change (GO acts on its rising edge). lamps[0] is the main
// street, lamps[1..3] the side streets, each {red, yellow, green}. sensor[i] is
// the sensor of side street i+2. Light phases last a whole number of seconds,
// DIV clock cycles each; DIV = 714286 makes one second from a 1.4 us clock.
// The split into parts follows the description; their interfaces and the wiring
// between them are this design's choice.
module atlc
  import tlc_pkg::*;
#(
  parameter int unsigned DIV         = 714286,
  parameter int unsigned INIT_TBASE  = 25,
  parameter int unsigned INIT_TEXT   = 25,
  parameter int unsigned INIT_TYEL   = 5,
  parameter int unsigned INIT_TBLINK = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 go_btn,
  input  logic [1:0]           func_sw,    // F1,F0
  input  logic [1:0]           lsel_sw,    // L1,L0
  input  logic [PAR_W-1:0]     c_sw,       // C4..C0
  input  logic                 walk_btn,
  input  logic [NROADS-2:0]    sensor,
  output lamp_t [NROADS-1:0]   lamps,
  output logic                 walk_red,
  output logic                 walk_green,
  output logic                 disp_valid,
  output logic [PAR_W-1:0]     disp_value,
  output logic [6:0]           hex_lo,
  output logic [6:0]           hex_hi,
  output logic                 extend,
  output logic [3:0]           state_code
);

  localparam int unsigned SW = 1 + 2 + 2 + PAR_W + 1 + (NROADS - 1);

  logic                go_s, walk_s;
  logic [1:0]          func_s, lsel_s;
  logic [PAR_W-1:0]    c_s;
  logic [NROADS-2:0]   sensor_s;

  synchronizer #(.W(SW)) u_sync (
    .clk, .rst,
    .d({go_btn, func_sw, lsel_sw, c_sw, walk_btn, sensor}),
    .q({go_s, func_s, lsel_s, c_s, walk_s, sensor_s})
  );

  logic walk_pending, walk_serve;

  walk_latch u_walk (
    .clk, .rst, .req(walk_s), .serve(walk_serve), .pending(walk_pending)
  );

  logic             ram_we;
  par_e             ram_raddr;
  logic [PAR_W-1:0] ram_rdata;

  timing_ram #(
    .INIT_TBASE(INIT_TBASE), .INIT_TEXT(INIT_TEXT),
    .INIT_TYEL(INIT_TYEL), .INIT_TBLINK(INIT_TBLINK)
  ) u_ram (
    .clk, .rst,
    .we(ram_we), .waddr(par_e'(lsel_s)), .wdata(c_s),
    .raddr_a(ram_raddr), .rdata_a(ram_rdata),
    .raddr_b(par_e'(lsel_s)), .rdata_b(disp_value)
  );

  logic             timer_load, timer_done, tick;

  clk_divider #(.DIV(DIV)) u_div (
    .clk, .rst, .clear(timer_load), .tick
  );

  phase_timer u_timer (
    .clk, .rst, .load(timer_load), .value(ram_rdata), .tick,
    .done(timer_done), .remaining()
  );

  atlc_fsm u_fsm (
    .clk, .rst,
    .go(go_s), .func(func_e'(func_s)),
    .sensor(sensor_s), .walk_pending, .walk_serve,
    .ram_we, .ram_raddr,
    .timer_load, .timer_done,
    .lamps, .walk_red, .walk_green, .disp_valid, .extend, .state_code
  );

  hex7seg u_hex_lo (.digit(disp_value[3:0]), .blank(!disp_valid), .seg(hex_lo));
  hex7seg u_hex_hi (.digit({3'b000, disp_value[4]}), .blank(!disp_valid), .seg(hex_hi));

endmodule
