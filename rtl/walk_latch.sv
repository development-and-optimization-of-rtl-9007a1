// Walk-request latch.
//
// A pedestrian presses the walk button briefly, but the walk light can only come
// on at one point of the light cycle (after the main-street yellow). This latch
// holds the request from the press until the controller serves it. pending is set
// in the cycle after req is seen high and cleared in the cycle after serve is
// high; when both are high the request wins, so a press that coincides with the
// start of a walk phase is kept for the next cycle of lights. The controller names
// a latch among its synchronizers; building it as a set/clear flip-flop rather
// than a level-sensitive latch is this design's choice.
//
// Interface: clk, rst (asynchronous, active high), req (synchronized button
// level), serve (one-cycle pulse from the controller), pending (registered).
module walk_latch (
  input  logic clk,
  input  logic rst,
  input  logic req,
  input  logic serve,
  output logic pending
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        pending <= 1'b0;
    else if (req)   pending <= 1'b1;
    else if (serve) pending <= 1'b0;
  end

endmodule
