// Hexadecimal seven-segment decoder for the parameter read-back display.
//
// The read function of the four-road controller shows a stored timing parameter on
// hex LEDs. This decoder turns one 4-bit digit into the segments {g,f,e,d,c,b,a}
// (bit 0 = segment a), active high, with the usual shapes of 0-9 and A-F
// (b and d in lower case). blank turns all segments off. The description only
// names the hex LEDs; the segment order and polarity are this design's choice.
//
// Interface: purely combinational, digit and blank in, seg out.
module hex7seg (
  input  logic [3:0] digit,
  input  logic       blank,
  output logic [6:0] seg
);

  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      4'hF: seg = 7'b1110001;
      default: seg = 7'b0000000;
    endcase
    if (blank) seg = 7'b0000000;
  end

endmodule
