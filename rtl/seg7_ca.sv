// seg7_ca: decimal digit to segment pattern for one common-anode
// seven-segment digital tube.
//
// In a common-anode tube all segment anodes share the supply, so a segment
// lights when its cathode line is driven low: the outputs are active low.
// seg[0] drives segment a, seg[1] b, ... seg[6] g (a at the top, then
// clockwise, g in the middle). Digits 0..9 show their numeral; codes 10..15
// blank the tube (all segments off). Purely combinational, no clock.
//
// The common-anode tube comes from the traffic-light design this controller
// implements; the segment-to-bit order and the blanking of codes above 9 are
// this design's own choices (they match the usual development-board wiring).
module seg7_ca (
  input  logic [3:0] digit,  // binary-coded decimal digit
  output logic [6:0] seg     // {g,f,e,d,c,b,a}, 0 = segment lit
);

  logic [6:0] lit;  // same order, 1 = segment lit

  always_comb begin
    unique case (digit)
      4'd0:    lit = 7'b011_1111;
      4'd1:    lit = 7'b000_0110;
      4'd2:    lit = 7'b101_1011;
      4'd3:    lit = 7'b100_1111;
      4'd4:    lit = 7'b110_0110;
      4'd5:    lit = 7'b110_1101;
      4'd6:    lit = 7'b111_1101;
      4'd7:    lit = 7'b000_0111;
      4'd8:    lit = 7'b111_1111;
      4'd9:    lit = 7'b110_1111;
      default: lit = 7'b000_0000;
    endcase
  end

  assign seg = ~lit;

endmodule
