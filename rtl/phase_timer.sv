// Phase timer of the four-road controller.
//
// The controller loads the length of the next light phase, in seconds, and the
// timer counts it down on the one-second tick of the clock divider. done is high
// in the cycle of the last tick, so the controller changes phase on the same edge
// at which the time runs out and loads the next length there. Together with the
// divider, which restarts on every load, a phase of N seconds lasts exactly
// N * DIV clock cycles. A length of 0 is treated as 1 second so that no phase can
// hang. The description names a timer; its counting scheme and interface are this
// design's choice.
//
// Interface: clk, rst (asynchronous, active high), load / value (start a new
// phase; load wins over a tick in the same cycle), tick (from the divider), done
// (combinational, one cycle; it does not look at load, which the controller
// raises in response to it), remaining (seconds left, for observation).
module phase_timer
  import tlc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [PAR_W-1:0] value,
  input  logic             tick,
  output logic             done,
  output logic [PAR_W-1:0] remaining
);

  assign done = tick && (remaining == PAR_W'(1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                              remaining <= '0;
    else if (load)                        remaining <= (value == '0) ? PAR_W'(1) : value;
    else if (tick && remaining != '0)     remaining <= remaining - 1'b1;
  end

endmodule
