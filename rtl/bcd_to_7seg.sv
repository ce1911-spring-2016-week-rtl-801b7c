// bcd_to_7seg: converts one BCD digit and a decimal-point bit into the
// 8-bit pattern that drives one seven-segment digit.
//
// Segments are named in the usual way: a (top), b (upper right), c (lower
// right), d (bottom), e (lower left), f (upper left), g (middle). The output
// is {dp, g, f, e, d, c, b, a}. Digits 0..9 show their numeral; the codes
// 10..15, which are not BCD, leave all seven segments dark. With ACTIVE_LOW
// set (the default) a segment is lit by a 0, as on common-anode displays;
// clear it for displays lit by a 1. Purely combinational. The inputs (4-bit
// digit plus decimal point) and the 8-bit output follow the lab description;
// the bit order, the polarity and the blanking of non-BCD codes are this
// design's choices.
//
// Ports: digit (BCD 0..9), dp (1 = light the decimal point), seg (pattern).
module bcd_to_7seg
  import voltmeter_pkg::*;
#(
  parameter bit ACTIVE_LOW = 1'b1
) (
  input  bcd_digit_t digit,
  input  logic       dp,
  output seg_t       seg
);

  logic [6:0] lit;  // {g,f,e,d,c,b,a}, 1 = segment on

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

  assign seg = ACTIVE_LOW ? ~{dp, lit} : {dp, lit};

endmodule
