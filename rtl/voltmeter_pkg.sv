// voltmeter_pkg: types and constants shared by the ADC voltmeter.
//
// The voltmeter reads a 12-bit serial ADC (0 V to 4.096 V full scale, so one
// code step is 1 mV) and shows the reading on four seven-segment digits as
// X.XXX volts. The sample width, the number of digits and the counter moduli
// (80 clock cycles of conversion time, 12 data bits) follow the lab
// description; the controller state encoding is this design's own.
package voltmeter_pkg;

  // Width of one ADC sample.
  localparam int unsigned ADC_BITS   = 12;
  // Decimal digits shown (thousands, hundreds, tens, ones).
  localparam int unsigned NUM_DIGITS = 4;
  // Clock cycles CONVST is held high while the ADC converts (mod-80 counter).
  localparam int unsigned CONV_CYCLES = 80;

  typedef logic [ADC_BITS-1:0] sample_t;
  typedef logic [3:0]          bcd_digit_t;
  // Digit 3 is the thousands digit (volts), digit 0 the ones digit (millivolts).
  typedef bcd_digit_t [NUM_DIGITS-1:0] bcd_word_t;
  // Segment pattern: bit 7 decimal point, bits 6..0 segments g..a.
  typedef logic [7:0] seg_t;

  // Controller states.
  typedef enum logic [2:0] {
    S_CLEAR  = 3'd0,  // clear counters and shift register
    S_CONV   = 3'd1,  // CONVST high, mod-80 counter times the conversion
    S_SETUP  = 3'd2,  // CONVST low, first data bit appears on SDO
    S_SCK_HI = 3'd3,  // SCK high, SDO shifted in, bit counter advanced
    S_SCK_LO = 3'd4,  // SCK low, ADC moves SDO to the next bit
    S_DONE   = 3'd5   // all 12 bits in: sample valid for one cycle
  } ctrl_state_t;

endpackage
