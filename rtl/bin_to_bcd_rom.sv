// bin_to_bcd_rom: read-only memory that turns a 12-bit ADC code into four
// binary-coded-decimal digits.
//
// The ROM has one 16-bit word per possible code (4096 words). Word `a` holds
// the decimal digits of `a`: thousands in bits 15..12, hundreds in 11..8, tens
// in 7..4, ones in 3..0, each 0..9. With a 4.096 V full scale one code step
// is 1 mV, so the four digits read directly as X.XXX volts. The contents are
// computed when the ROM is initialised, word a = {a/1000, a/100 %10,
// a/10 %10, a %10}; codes whose value exceeds 9999 (only possible with a
// wider ADDR_W) saturate to 9999. The read is combinational: `data` follows
// `addr` in the same cycle, as the lab describes a ROM that looks up the value
// at a location. Using a lookup table for the conversion follows the lab
// description; the word layout and the asynchronous read are this design's
// choices.
//
// Ports: addr (sample code), data (four BCD digits, digit 3 = thousands).
module bin_to_bcd_rom
  import voltmeter_pkg::*;
#(
  parameter int unsigned ADDR_W = ADC_BITS
) (
  input  logic [ADDR_W-1:0] addr,
  output bcd_word_t         data
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  bcd_word_t rom [DEPTH];

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      int v;
      v = (a > 9999) ? 9999 : a;
      rom[a][3] = bcd_digit_t'(v / 1000);
      rom[a][2] = bcd_digit_t'((v / 100) % 10);
      rom[a][1] = bcd_digit_t'((v / 10) % 10);
      rom[a][0] = bcd_digit_t'(v % 10);
    end
  end

  assign data = rom[addr];

endmodule
