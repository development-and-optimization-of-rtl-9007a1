// Multi-flop synchronizer for the asynchronous inputs of the four-road controller
// (function, select and value switches, GO and walk buttons, road sensors).
//
// Each of the W bits passes through STAGES flip-flops in series on clk, so a
// change at the input shows at the output STAGES cycles later and a metastable
// first stage has a full cycle to settle. The controller lists synchronizers
// among its parts; the two-stage depth and the reset value 0 are this design's
// choice. The bits are synchronized independently: a multi-bit switch setting
// should be held stable while it is being used.
//
// Interface: clk, rst (asynchronous, active high, clears every stage), d (async
// inputs), q (synchronized outputs).
module synchronizer #(
  parameter int unsigned W      = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] stage [STAGES];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) stage[i] <= '0;
    end else begin
      stage[0] <= d;
      for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
    end
  end

  assign q = stage[STAGES-1];

endmodule
