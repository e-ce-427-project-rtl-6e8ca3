// sevensegment: hexadecimal digit to seven-segment pattern.
//
// Combinational. i_digit (0-F) gives o_segments[6:0] = segments g..a
// (bit 0 = a, top; then b, c clockwise; d bottom; e, f; bit 6 = g, middle),
// active low as on common-anode displays: a 0 lights the segment. Hex
// digits are used so that any 8-bit value fits on two digits; the segment
// order and polarity are this design's choices.
module sevensegment (
  input  logic [3:0] i_digit,
  output logic [6:0] o_segments
);

  logic [6:0] lit;   // 1 = segment on, bit order g f e d c b a

  always_comb begin
    unique case (i_digit)
      4'h0: lit = 7'b0111111;
      4'h1: lit = 7'b0000110;
      4'h2: lit = 7'b1011011;
      4'h3: lit = 7'b1001111;
      4'h4: lit = 7'b1100110;
      4'h5: lit = 7'b1101101;
      4'h6: lit = 7'b1111101;
      4'h7: lit = 7'b0000111;
      4'h8: lit = 7'b1111111;
      4'h9: lit = 7'b1101111;
      4'hA: lit = 7'b1110111;
      4'hB: lit = 7'b1111100;
      4'hC: lit = 7'b0111001;
      4'hD: lit = 7'b1011110;
      4'hE: lit = 7'b1111001;
      default: lit = 7'b1110001;   // F
    endcase
  end

  assign o_segments = ~lit;

endmodule
