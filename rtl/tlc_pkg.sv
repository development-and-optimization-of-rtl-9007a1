// Shared types of the two traffic light controllers.
//
// A lamp group is three bits {red, yellow, green}: 3'b100 is red, 3'b010 yellow,
// 3'b001 green, 3'b000 dark. This ordering is the one the T-junction controller's
// simulation prints (a yellow lamp reads 010). The T-junction state codes S0..S5
// are the binary values of the state register, 000..101, as printed in that
// simulation. The function and parameter-select codes of the four-road controller
// follow the order in which its functions and parameters are listed; the numeric
// codes themselves are this design's choice.
package tlc_pkg;

  typedef struct packed {
    logic r;
    logic y;
    logic g;
  } lamp_t;

  localparam lamp_t LAMP_RED = '{r: 1'b1, y: 1'b0, g: 1'b0};
  localparam lamp_t LAMP_YEL = '{r: 1'b0, y: 1'b1, g: 1'b0};
  localparam lamp_t LAMP_GRN = '{r: 1'b0, y: 1'b0, g: 1'b1};
  localparam lamp_t LAMP_OFF = '{r: 1'b0, y: 1'b0, g: 1'b0};

  // T-junction controller states (3-bit state register "ps").
  typedef enum logic [2:0] {
    TJ_S0 = 3'd0,  // M1 green, M2 green
    TJ_S1 = 3'd1,  // M1 green, M2 yellow
    TJ_S2 = 3'd2,  // M1 green, MT green
    TJ_S3 = 3'd3,  // M1 yellow, MT yellow
    TJ_S4 = 3'd4,  // side street green
    TJ_S5 = 3'd5   // side street yellow
  } tj_state_e;

  // Four-road controller: user function on switches F1,F0.
  typedef enum logic [1:0] {
    FN_WRITE  = 2'd0,  // write a timing parameter
    FN_READ   = 2'd1,  // read a timing parameter back to the display
    FN_NORMAL = 2'd2,  // run the normal light sequence
    FN_BLINK  = 2'd3   // run the blinking (night / fault) mode
  } func_e;

  // Four-road controller: timing parameter select on switches L1,L0.
  typedef enum logic [1:0] {
    PAR_TBASE  = 2'd0,  // side-street green and its extension step
    PAR_TEXT   = 2'd1,  // main-street green and walk green
    PAR_TYEL   = 2'd2,  // yellow
    PAR_TBLINK = 2'd3   // half period of the blinking mode
  } par_e;

  localparam int unsigned PAR_W = 5;  // switches C4..C0
  localparam int unsigned NROADS = 4; // one main street, three side streets

endpackage
