// hex7seg: seven-segment decoder for one hexadecimal digit.
//
// The 32-bit product is shown on eight seven-segment displays in hexadecimal;
// this module drives one of them. Segments are ordered seg_n[6:0] =
// {g, f, e, d, c, b, a} with the usual lettering (a at the top, going
// clockwise, g in the middle) and are active low, as on the common-anode
// displays of the DE2 board. 'b' and 'd' are drawn in lower case so that they
// differ from '8' and '0'. Segment order and polarity are this design's
// choice.
//
// Interface: nibble (4 bits) in, seg_n (7 bits) out. Timing: combinational.
module hex7seg (
  input  logic [3:0] nibble,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (nibble)
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
      default: seg = 7'b1110001;  // F
    endcase
  end

  assign seg_n = ~seg;

endmodule
