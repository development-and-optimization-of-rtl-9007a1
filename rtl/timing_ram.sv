// Timing-parameter store (the controller's D_RAM).
//
// Four words of PAR_W bits hold the four timing parameters in seconds, addressed
// by the parameter select: TBASE (side-street green and its extension step), TEXT
// (main-street green and walk green), TYEL (yellow) and TBLINK (blinking half
// period). One synchronous write port is driven by the controller's write
// function; two asynchronous read ports serve the phase timer and the display.
// The four parameters and their 5-bit value switches come from the design
// description; the reset contents are this design's choice: yellow 5 s and green
// 25 s as in the nine-state light table, and a 1 s blink interval, which the
// description does not give.
//
// Interface: clk, rst (asynchronous, active high, reloads the defaults), we /
// waddr / wdata (written at the clock edge), raddr_a / rdata_a and raddr_b /
// rdata_b (combinational reads; a read of the word being written returns the old
// value until the edge).
module timing_ram
  import tlc_pkg::*;
#(
  parameter int unsigned INIT_TBASE  = 25,
  parameter int unsigned INIT_TEXT   = 25,
  parameter int unsigned INIT_TYEL   = 5,
  parameter int unsigned INIT_TBLINK = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  par_e             waddr,
  input  logic [PAR_W-1:0] wdata,
  input  par_e             raddr_a,
  output logic [PAR_W-1:0] rdata_a,
  input  par_e             raddr_b,
  output logic [PAR_W-1:0] rdata_b
);

  logic [PAR_W-1:0] mem [4];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mem[PAR_TBASE]  <= PAR_W'(INIT_TBASE);
      mem[PAR_TEXT]   <= PAR_W'(INIT_TEXT);
      mem[PAR_TYEL]   <= PAR_W'(INIT_TYEL);
      mem[PAR_TBLINK] <= PAR_W'(INIT_TBLINK);
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
