// adc_voltmeter: digital voltmeter built around a 12-bit serial ADC.
//
// The design asks the ADC, over and over, to convert the voltage on its input
// channel 7, reads the 12-bit result one bit at a time, and shows it on four
// seven-segment digits as X.XXX volts (0.000 to 4.095 V; with a 4.096 V full
// scale one code step is exactly 1 mV, so the code read in decimal is the
// voltage in millivolts).
//
// Datapath, as the lab lays it out:
//   adc_controller      state machine producing CONVST and SCK and every
//                       clear / increment / shift signal
//   mod80_counter       times the 80-cycle conversion (CONVST high)
//   mod12_counter       counts the 12 data bits
//   sipo_shift_register assembles the bits arriving MSB first on SDO
//   bin_to_bcd_rom      4096-word table: sample -> four BCD digits
//   bcd_to_7seg (x4)    digit + decimal point -> segment pattern; the point is
//                       lit on SEG3, the volts digit
// SDI is held high, which selects the ADC's default configuration of
// single-ended channel 7, unipolar (unsigned) codes.
//
// Between the shift register and the ROM sits a 12-bit display register that
// loads the finished sample when the controller flags it (`sample_valid`).
// It keeps the shown value steady while the next sample is being shifted in;
// it is this design's addition, not one of the lab's listed blocks. It resets
// to 0, so the display reads 0.000 until the first sample arrives, 106 clock
// cycles after reset; after that the display is refreshed every 106 cycles.
//
// Ports: clk (50 MHz on the target board), rst_n (async, active low);
// adc_convst, adc_sck, adc_sdi outputs and adc_sdo input to the ADC;
// seg[3..0] segment patterns for SEG3..SEG0 ({dp,g..a}, active low);
// reading (the displayed sample) and reading_bcd (its digits) for observation.
module adc_voltmeter
  import voltmeter_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        adc_convst,
  output logic                        adc_sck,
  output logic                        adc_sdi,
  input  logic                        adc_sdo,
  output seg_t      [NUM_DIGITS-1:0]  seg,
  output sample_t                     reading,
  output bcd_word_t                   reading_bcd
);

  logic cnt80_clr, cnt80_inc, cnt80_tc;
  logic cnt12_clr, cnt12_inc, cnt12_tc;
  logic sr_clr, sr_shift, sample_valid;
  // The controller only needs the counters' terminal counts; the count values
  // themselves stay unconnected.
  sample_t sr_q;

  adc_controller u_ctrl (
    .clk, .rst_n,
    .cnt80_tc, .cnt12_tc,
    .cnt80_clr, .cnt80_inc, .cnt12_clr, .cnt12_inc,
    .sr_clr, .sr_shift, .sample_valid,
    .adc_convst, .adc_sck
  );

  mod80_counter #(.MODULUS(CONV_CYCLES)) u_cnt80 (
    .clk, .rst_n, .clr(cnt80_clr), .inc(cnt80_inc), .count(), .tc(cnt80_tc)
  );

  mod12_counter #(.MODULUS(ADC_BITS)) u_cnt12 (
    .clk, .rst_n, .clr(cnt12_clr), .inc(cnt12_inc), .count(), .tc(cnt12_tc)
  );

  sipo_shift_register #(.WIDTH(ADC_BITS)) u_sr (
    .clk, .rst_n, .clr(sr_clr), .shift(sr_shift), .sdi(adc_sdo), .q(sr_q)
  );

  // Display register: holds the last complete sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            reading <= '0;
    else if (sample_valid) reading <= sr_q;
  end

  bin_to_bcd_rom #(.ADDR_W(ADC_BITS)) u_rom (
    .addr(reading), .data(reading_bcd)
  );

  for (genvar i = 0; i < NUM_DIGITS; i++) begin : g_digit
    bcd_to_7seg u_seg (
      .digit(reading_bcd[i]),
      .dp   (i == NUM_DIGITS - 1),
      .seg  (seg[i])
    );
  end

  // SDI high selects the ADC's default configuration (channel 7, unipolar).
  assign adc_sdi = 1'b1;

endmodule
