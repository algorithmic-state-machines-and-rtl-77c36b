// hex7seg - hexadecimal digit to seven-segment pattern.
//
// Turns a 4-bit value into the segments of one digit, 0-9 and A-F (b and d
// in lower case). Segments are active low, as on boards whose displays are
// driven straight from the FPGA pins: bit 0 is segment a, bit 1 b, ... bit 6
// g, with a at the top and the rest going clockwise, g in the middle.
//
// Interface: combinational. In the cursor system two of these show the last
// keyboard scan code, high digit on display1 and low digit on display2. The
// published design names the two displays; the digit mapping, polarity and
// segment order are this design's own choice.
module hex7seg (
  input  logic [3:0] hex,
  output logic [6:0] seg_n
);

  logic [6:0] seg;  // active high, {g,f,e,d,c,b,a}

  always_comb begin
    unique case (hex)
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
    endcase
    seg_n = ~seg;
  end

endmodule
