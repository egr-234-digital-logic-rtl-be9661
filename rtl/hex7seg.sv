// hex7seg: combinational decoder from a 4-bit value to a 7-segment pattern.
//
// All sixteen values 0..F are decoded (0-9 as digits, A b C d E F as
// letters), although the clock only ever presents 0..9.
// Segment order: seg[0] = a (top), b (upper right), c (lower right),
// d (bottom), e (lower left), f (upper left), seg[6] = g (middle).
// Outputs are active low, a 0 lights the segment, as on common-anode
// displays driven directly from an FPGA pin. The segment order and polarity
// are this design's choice.
module hex7seg
  import clock_pkg::*;
(
  input  digit_t hex,
  output seg7_t  seg
);

  seg7_t lit;   // active-high pattern, bit i = segment i lit

  always_comb begin
    unique case (hex)
      //             gfedcba
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
      4'hF: lit = 7'b1110001;
    endcase
  end

  assign seg = ~lit;

endmodule
