// Clock divider: turns the system clock into a one-second time base.
//
// A counter runs from 0 to DIV-1 and wraps; tick is high for the one cycle in
// which the counter holds DIV-1, so ticks come every DIV clock cycles. A clear
// input restarts the count, so that the first tick after a clear comes exactly DIV
// cycles later; the phase timer uses this to make every light phase an exact
// whole number of seconds. The controller names a divider among its parts but
// gives neither its ratio nor its interface: the default DIV = 714286 makes one
// second from a 1.4 us clock (the 1400 ns clock period of the synthesized
// T-junction controller), and the clear input is this design's choice.
//
// Interface: clk, rst (asynchronous, active high), clear (synchronous restart),
// tick (registered-count compare, one cycle wide).
module clk_divider #(
  parameter int unsigned DIV = 714286
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  output logic tick
);

  if (DIV < 2) begin : g_bad_div
    $error("clk_divider: DIV must be at least 2");
  end

  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt;

  assign tick = (cnt == CW'(DIV - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        cnt <= '0;
    else if (clear) cnt <= '0;
    else if (tick)  cnt <= '0;
    else            cnt <= cnt + 1'b1;
  end

endmodule
