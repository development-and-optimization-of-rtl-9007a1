// Main state machine of the four-road traffic light controller.
//
// The junction has one main street (road 1) and three side streets (roads 2-4),
// each with a red/yellow/green group, a walk light (red/green) and a traffic
// sensor on every side street. After reset the machine waits in an idle state with
// every lamp dark until GO is pressed. On the GO press (rising edge of the
// synchronized button) it runs the function chosen on switches F1,F0:
//
//   write   store the value switches C4..C0 into the timing parameter selected by
//           L1,L0, then return to idle (one clock cycle);
//   read    show the parameter selected by L1,L0 on the display, following the
//           select switches, until the function switches change;
//   normal  run the light sequence below until the function switches change;
//   blink   alternate "main yellow, sides red" and "main red, sides yellow",
//           each for TBLINK seconds, until the function switches change.
//
// Leaving read, normal or blink goes back to idle; the next function needs GO.
//
// Normal sequence (the nine-state light table): N0 all red, then for each road in
// turn a yellow phase (TYEL) followed by its green phase, N1/N2 for road 1 up to
// N7/N8 for road 4, after which N1 follows again. Road 1 (main street) stays green
// for TEXT; a side street stays green for TBASE, and if its sensor reports
// waiting traffic when that time runs out the green is extended by another TBASE,
// as often as needed, so it stays green until the side street has cleared. If a
// walk request is pending when the main-street yellow ends, the walk light turns
// green for the whole main green (TEXT) and the request is cleared; otherwise,
// and in every other running phase, the walk light is red.
//
// What follows the description: the idle state with lamps off until GO, the four
// functions and two-switch selects, the four timing parameters and their use, the
// nine states and their lamps, the side-street extension by TBASE, walk green
// after the main yellow and only on request, and the blink alternation. This
// design's own choices: the switch codes (tlc_pkg), leaving a running function
// when F1,F0 change, the all-red N0 lasting TYEL (the table gives it no time),
// yellow shown alone (no red+yellow), walk red during blinking, and dark lamps in
// read and write.
//
// Interface: the synchronized GO button, function switches, side-street sensors
// and latched walk request come in; the machine raises ram_we to store the value
// switches at the selected parameter (the parameter store takes both straight from
// the switches) and names on ram_raddr the parameter that times the next phase.
//
// Timing: every phase is loaded into the phase timer on the edge that enters it
// (timer_load, with the store word at ram_raddr as the length) and the phase is
// left on the edge at which timer_done is high. Lamps and display enable are
// decoded from the registered state.
module atlc_fsm
  import tlc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  // synchronized user inputs
  input  logic                          go,
  input  func_e                         func,
  input  logic [NROADS-2:0]             sensor,        // side streets, roads 2..4
  input  logic                          walk_pending,
  output logic                          walk_serve,
  // timing-parameter store
  output logic                          ram_we,        // store the value switches
  output par_e                          ram_raddr,     // parameter of the next phase
  // phase timer (loaded with the store word at ram_raddr)
  output logic                          timer_load,
  input  logic                          timer_done,
  // lamps and display
  output lamp_t [NROADS-1:0]            lamps,         // index 0 = road 1 (main)
  output logic                          walk_red,
  output logic                          walk_green,
  output logic                          disp_valid,
  output logic                          extend,        // side green extended this cycle
  output logic [3:0]                    state_code
);

  typedef enum logic [3:0] {
    ST_IDLE  = 4'd0,
    ST_WRITE = 4'd1,
    ST_READ  = 4'd2,
    ST_BA    = 4'd3,   // blink: main yellow, sides red
    ST_BB    = 4'd4,   // blink: main red, sides yellow
    ST_N0    = 4'd5,   // all red
    ST_N1    = 4'd6,   // road 1 yellow
    ST_N2    = 4'd7,   // road 1 green
    ST_N3    = 4'd8,   // road 2 yellow
    ST_N4    = 4'd9,   // road 2 green
    ST_N5    = 4'd10,  // road 3 yellow
    ST_N6    = 4'd11,  // road 3 green
    ST_N7    = 4'd12,  // road 4 yellow
    ST_N8    = 4'd13   // road 4 green
  } st_e;

  st_e  st, st_nxt;
  logic go_q, go_rise;
  logic walk_on;

  assign go_rise    = go && !go_q;
  assign state_code = st;

  // Parameter that times a state.
  function automatic par_e par_of(st_e s);
    unique case (s)
      ST_BA, ST_BB:        return PAR_TBLINK;
      ST_N2:               return PAR_TEXT;
      ST_N4, ST_N6, ST_N8: return PAR_TBASE;
      default:             return PAR_TYEL;
    endcase
  endfunction

  // Next state and timer reload.
  always_comb begin
    st_nxt     = st;
    timer_load = 1'b0;
    extend     = 1'b0;
    unique case (st)
      ST_IDLE:
        if (go_rise) begin
          unique case (func)
            FN_WRITE:  st_nxt = ST_WRITE;
            FN_READ:   st_nxt = ST_READ;
            FN_NORMAL: st_nxt = ST_N0;
            FN_BLINK:  st_nxt = ST_BA;
            default:   st_nxt = ST_IDLE;
          endcase
          timer_load = (func == FN_NORMAL) || (func == FN_BLINK);
        end
      ST_WRITE: st_nxt = ST_IDLE;
      ST_READ:  if (func != FN_READ) st_nxt = ST_IDLE;
      ST_BA, ST_BB:
        if (func != FN_BLINK) st_nxt = ST_IDLE;
        else if (timer_done) begin
          st_nxt     = (st == ST_BA) ? ST_BB : ST_BA;
          timer_load = 1'b1;
        end
      default: // ST_N0 .. ST_N8
        if (func != FN_NORMAL) st_nxt = ST_IDLE;
        else if (timer_done) begin
          timer_load = 1'b1;
          if ((st == ST_N4 && sensor[0]) || (st == ST_N6 && sensor[1]) ||
              (st == ST_N8 && sensor[2])) begin
            extend = 1'b1;        // stay green for another TBASE
          end else if (st == ST_N8) begin
            st_nxt = ST_N1;
          end else begin
            st_nxt = st_e'(st + 4'd1);
          end
        end
    endcase
  end

  assign ram_raddr   = par_of(st_nxt);
  assign ram_we      = (st == ST_WRITE);
  assign walk_serve  = (st == ST_N1) && (st_nxt == ST_N2) && walk_pending;
  assign disp_valid  = (st == ST_READ);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st      <= ST_IDLE;
      go_q    <= 1'b0;
      walk_on <= 1'b0;
    end else begin
      st      <= st_nxt;
      go_q    <= go;
      if (st_nxt != ST_N2)  walk_on <= 1'b0;
      else if (walk_serve)  walk_on <= 1'b1;
    end
  end

  // Lamp decode.
  always_comb begin
    lamps      = {NROADS{LAMP_RED}};
    walk_red   = 1'b1;
    walk_green = 1'b0;
    unique case (st)
      ST_IDLE, ST_WRITE, ST_READ: begin
        lamps    = {NROADS{LAMP_OFF}};
        walk_red = 1'b0;
      end
      ST_BA: begin
        lamps[0] = LAMP_YEL;
      end
      ST_BB: begin
        for (int r = 1; r < NROADS; r++) lamps[r] = LAMP_YEL;
      end
      ST_N1: lamps[0] = LAMP_YEL;
      ST_N2: begin
        lamps[0]   = LAMP_GRN;
        walk_red   = !walk_on;
        walk_green = walk_on;
      end
      ST_N3: lamps[1] = LAMP_YEL;
      ST_N4: lamps[1] = LAMP_GRN;
      ST_N5: lamps[2] = LAMP_YEL;
      ST_N6: lamps[2] = LAMP_GRN;
      ST_N7: lamps[3] = LAMP_YEL;
      ST_N8: lamps[3] = LAMP_GRN;
      default: ;
    endcase
  end

endmodule
