// ltc2308_adc_model: behavioural model of the board's 12-bit, 8-channel
// serial ADC, for simulation only (not synthesizable).
//
// A rising CONVST edge samples the input and starts a conversion that takes
// T_CONV_NS. When CONVST falls the result's MSB appears on SDO after
// T_EN_NS; each falling SCK edge then moves SDO to the next bit, MSB first,
// T_DO_NS after the edge; after the LSB SDO is held low. Each rising SCK edge
// shifts SDI into a 6-bit configuration word (S/D, O/S, S1, S0, UNI, SLP);
// SDI held high gives 6'b111111: single-ended channel 7, unipolar. The analog
// input is given as an integer number of millivolts on `vin_mv`; with the
// 4.096 V reference the code is vin_mv clamped to 0..4095.
//
// The model checks the host's timing and counts violations in
// `timing_errors`: CONVST falling before the conversion time has passed, SCK
// pulsing while CONVST is high, and a new conversion starting less than
// T_ACQ_NS after the 6th falling SCK edge of the previous read. It also
// reports the number of conversions started, the SCK pulses seen in the last
// completed read, and the last configuration word.
`timescale 1ns/1ps
module ltc2308_adc_model #(
  parameter realtime T_CONV_NS = 1600.0,
  parameter realtime T_EN_NS   = 15.0,
  parameter realtime T_DO_NS   = 8.0,
  parameter realtime T_ACQ_NS  = 240.0
) (
  input  logic       convst,
  input  logic       sck,
  input  logic       sdi,
  output logic       sdo,
  input  int         vin_mv,
  output int         conversions,
  output int         timing_errors,
  output int         last_read_sck,
  output logic [5:0] last_config
);

  logic [11:0] result = '0;
  logic [5:0]  cfg_shift = '0;
  int          bit_idx = 0;
  int          sck_count = 0;
  realtime     t_conv_start = 0.0;
  realtime     t_sixth_fall = -1.0e9;

  initial begin
    sdo = 1'b0;
    conversions = 0;
    timing_errors = 0;
    last_read_sck = 0;
    last_config = '0;
  end

  always @(posedge convst) begin
    if (conversions > 0) begin
      last_read_sck = sck_count;
      if (sck_count >= 6) last_config = cfg_shift;
      if ($realtime - t_sixth_fall < T_ACQ_NS) begin
        timing_errors++;
        $display("ADC model: acquisition time too short (%0t)", $realtime);
      end
    end
    t_conv_start = $realtime;
    result = (vin_mv < 0) ? 12'd0 : (vin_mv > 4095) ? 12'd4095 : 12'(vin_mv);
    conversions++;
    sck_count = 0;
    sdo <= 1'b0;
  end

  always @(negedge convst) begin
    if ($realtime - t_conv_start < T_CONV_NS) begin
      timing_errors++;
      $display("ADC model: CONVST fell %0t into the conversion", $realtime - t_conv_start);
    end
    bit_idx = 11;
    sdo <= #(T_EN_NS) result[11];
  end

  always @(posedge sck) begin
    if (convst) begin
      timing_errors++;
      $display("ADC model: SCK pulse during conversion (%0t)", $realtime);
    end
    if (sck_count < 6) cfg_shift = {cfg_shift[4:0], sdi};
    sck_count++;
  end

  always @(negedge sck) begin
    if (sck_count == 6) t_sixth_fall = $realtime;
    bit_idx--;
    if (bit_idx >= 0) sdo <= #(T_DO_NS) result[bit_idx];
    else              sdo <= #(T_DO_NS) 1'b0;
  end

endmodule
