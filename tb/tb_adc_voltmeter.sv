// tb_adc_voltmeter: end-to-end testbench of the voltmeter with every
// parameter at its default, driving a behavioural model of the ADC.
//
// A 50 MHz clock runs the design; the ADC model receives a sequence of input
// voltages (in millivolts): zero, full scale, over range, values with every
// decimal digit position exercised, and random values. For each voltage the
// testbench waits for two complete sample periods and then checks:
//   * the displayed reading equals the ADC code for that voltage (1 mV steps,
//     so within 1 mV of the input and far inside a 10 % error);
//   * the four segment patterns decode back to the expected decimal digits,
//     with the decimal point lit on SEG3 only;
//   * the ADC model saw no timing violation, 12 SCK pulses per read and the
//     configuration word 6'b111111 on SDI (channel 7, unipolar).
// It measures the CONVST high time (80 clock cycles) and the sample period
// (106 cycles) and counts how often each mechanism happened: conversions
// started, conversion waits of exactly 80 cycles, complete 12-bit reads,
// display updates, and inputs clamped at full scale. A mechanism that never
// happened counts as a failure.
`timescale 1ns/1ps
module tb_adc_voltmeter;
  import voltmeter_pkg::*;

  localparam realtime TCLK = 20.0;  // 50 MHz
  localparam int PERIOD = 106;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_convst, adc_sck, adc_sdi, adc_sdo;
  seg_t [NUM_DIGITS-1:0] seg;
  sample_t reading;
  bcd_word_t reading_bcd;
  int vin_mv = 0;
  int conversions, timing_errors, last_read_sck;
  logic [5:0] last_config;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_conv_wait_80 = 0, n_reads_12 = 0, n_display_updates = 0, n_clamped = 0;
  int n_period_ok = 0;

  adc_voltmeter dut (.*);

  ltc2308_adc_model adc (
    .convst(adc_convst), .sck(adc_sck), .sdi(adc_sdi), .sdo(adc_sdo),
    .vin_mv, .conversions, .timing_errors, .last_read_sck, .last_config
  );

  always #(TCLK / 2) clk = ~clk;

  // CONVST high time and sample period, in clock cycles.
  int convst_cycles = 0, period_cycles = 0;
  logic seen_first_conv = 1'b0;
  always @(posedge clk) begin
    if (adc_convst) convst_cycles <= convst_cycles + 1;
    else if (convst_cycles != 0) begin
      checks++;
      if (convst_cycles == CONV_CYCLES) n_conv_wait_80++;
      else begin
        failures++;
        $display("FAIL: CONVST high for %0d cycles", convst_cycles);
      end
      convst_cycles <= 0;
    end
    period_cycles <= period_cycles + 1;
    if (adc_convst && convst_cycles == 0) begin
      if (seen_first_conv) begin
        checks++;
        if (period_cycles == PERIOD) n_period_ok++;
        else begin
          failures++;
          $display("FAIL: sample period %0d cycles, expected %0d", period_cycles, PERIOD);
        end
      end
      seen_first_conv <= 1'b1;
      period_cycles <= 1;
    end
  end

  // Count 12-bit reads and display updates.
  int sck_in_read = 0;
  sample_t prev_reading = '0;
  always @(posedge adc_sck) sck_in_read++;
  always @(posedge adc_convst) begin
    if (sck_in_read == ADC_BITS) n_reads_12++;
    sck_in_read = 0;
  end
  always @(posedge clk) begin
    if (reading != prev_reading) n_display_updates++;
    prev_reading <= reading;
  end

  function automatic logic [6:0] glyph(int d);
    case (d)  // {g,f,e,d,c,b,a}, 1 = lit
      0: return 7'h3F; 1: return 7'h06; 2: return 7'h5B; 3: return 7'h4F;
      4: return 7'h66; 5: return 7'h6D; 6: return 7'h7D; 7: return 7'h07;
      8: return 7'h7F; 9: return 7'h6F; default: return 7'h00;
    endcase
  endfunction

  task automatic measure(int mv);
    int code, shown, dd;
    code = (mv < 0) ? 0 : (mv > 4095) ? 4095 : mv;
    if (mv > 4095) n_clamped++;
    vin_mv = mv;
    // The conversion already running may have sampled the old value: wait
    // for two full periods plus margin.
    repeat (2 * PERIOD + 4) @(posedge clk);
    #1;
    checks++;
    if (reading !== sample_t'(code)) begin
      failures++;
      $display("FAIL vin=%0d mV: reading=%0d expected %0d", mv, reading, code);
    end
    // Decode the segment patterns (active low) back to a number.
    shown = 0;
    for (int i = NUM_DIGITS - 1; i >= 0; i--) begin
      dd = -1;
      for (int k = 0; k < 10; k++) if (~seg[i][6:0] == glyph(k)) dd = k;
      checks++;
      if (dd < 0) begin
        failures++;
        $display("FAIL vin=%0d mV: SEG%0d pattern %08b is no digit", mv, i, seg[i]);
        dd = 0;
      end
      shown = shown * 10 + dd;
      checks++;
      if (~seg[i][7] !== (i == NUM_DIGITS - 1)) begin
        failures++;
        $display("FAIL vin=%0d mV: SEG%0d decimal point %0b", mv, i, ~seg[i][7]);
      end
    end
    checks++;
    if (shown != code) begin
      failures++;
      $display("FAIL vin=%0d mV: display shows %0d.%03d V, expected %0d.%03d V",
               mv, shown / 1000, shown % 1000, code / 1000, code % 1000);
    end
    checks++;
    if (last_read_sck != ADC_BITS || last_config != 6'b111111) begin
      failures++;
      $display("FAIL: ADC saw %0d SCK pulses, configuration %06b", last_read_sck, last_config);
    end
  endtask

  initial begin
    int values [12] = '{0, 4095, 5000, 1234, 2500, 3300, 1, 999, 1000, 4000, 807, 2048};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    #1;
    checks++;
    if (reading !== '0) begin
      failures++;
      $display("FAIL: reading after reset %0d", reading);
    end
    foreach (values[i]) measure(values[i]);
    for (int i = 0; i < 20; i++) measure(int'($urandom_range(0, 4095)));

    checks++;
    if (timing_errors != 0) begin
      failures++;
      $display("FAIL: ADC model counted %0d timing violations", timing_errors);
    end
    $display("mechanisms: conversions=%0d conv_wait_80=%0d reads_12=%0d period_106=%0d display_updates=%0d clamped=%0d",
             conversions, n_conv_wait_80, n_reads_12, n_period_ok, n_display_updates, n_clamped);
    checks += 6;
    if (conversions == 0)       begin failures++; $display("FAIL: no conversion"); end
    if (n_conv_wait_80 == 0)    begin failures++; $display("FAIL: no 80-cycle conversion wait"); end
    if (n_reads_12 == 0)        begin failures++; $display("FAIL: no 12-bit read"); end
    if (n_period_ok == 0)       begin failures++; $display("FAIL: no full sample period"); end
    if (n_display_updates == 0) begin failures++; $display("FAIL: no display update"); end
    if (n_clamped == 0)         begin failures++; $display("FAIL: no over-range input"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * (2 * PERIOD + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
