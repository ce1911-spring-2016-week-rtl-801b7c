// tb_adc_controller: self-checking testbench for adc_controller.
//
// The testbench plays the mod-80 and mod-12 counters itself (integer models
// that follow the controller's clear and increment outputs and return the
// terminal counts). Every cycle it compares all nine controller outputs with
// the expected waveform of one sample period, written out by position in the
// period: cycle 0 clear, cycles 1..80 CONVST high with the conversion counter
// running, cycle 81 setup, cycles 82..104 alternating SCK high (shift, count a
// bit) and SCK low, cycle 105 sample valid. It runs several periods
// back to back, so it also checks the period of 106 cycles, the 80-cycle
// CONVST pulse and the 12 SCK pulses per read.
`timescale 1ns/1ps
module tb_adc_controller;

  localparam int CONV   = 80;
  localparam int BITS   = 12;
  localparam int PERIOD = 1 + CONV + 1 + 2 * BITS - 1 + 1;  // 106

  logic clk = 1'b0, rst_n = 1'b0;
  logic cnt80_tc, cnt12_tc;
  logic cnt80_clr, cnt80_inc, cnt12_clr, cnt12_inc, sr_clr, sr_shift;
  logic sample_valid, adc_convst, adc_sck;
  int c80 = 0, c12 = 0;
  int checks = 0, failures = 0;

  adc_controller dut (.*);

  always #10 clk = ~clk;

  assign cnt80_tc = (c80 == CONV - 1);
  assign cnt12_tc = (c12 == BITS - 1);

  always @(posedge clk) begin
    if (cnt80_clr)      c80 <= 0;
    else if (cnt80_inc) c80 <= (c80 + 1) % CONV;
    if (cnt12_clr)      c12 <= 0;
    else if (cnt12_inc) c12 <= (c12 + 1) % BITS;
  end

  // Expected outputs {clr, inc80, inc12/shift, valid, convst, sck} at a position.
  function automatic logic [5:0] expected(int pos);
    logic clr_e, inc80_e, bit_e, valid_e, convst_e, sck_e;
    clr_e    = (pos == 0);
    inc80_e  = (pos >= 1 && pos <= CONV);
    convst_e = inc80_e;
    bit_e    = (pos >= CONV + 2 && pos <= PERIOD - 2 && ((pos - (CONV + 2)) % 2 == 0));
    sck_e    = bit_e;
    valid_e  = (pos == PERIOD - 1);
    return {clr_e, inc80_e, bit_e, valid_e, convst_e, sck_e};
  endfunction

  initial begin
    int sck_pulses;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    sck_pulses = 0;
    for (int cyc = 0; cyc < 5 * PERIOD; cyc++) begin
      logic [5:0] e;
      int pos;
      pos = cyc % PERIOD;
      e = expected(pos);
      @(negedge clk);
      checks++;
      if ({cnt80_clr, cnt80_inc, cnt12_inc, sample_valid, adc_convst, adc_sck} !== e ||
          cnt12_clr !== cnt80_clr || sr_clr !== cnt80_clr || sr_shift !== cnt12_inc) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d (pos %0d): clr=%0b inc80=%0b inc12=%0b shift=%0b valid=%0b convst=%0b sck=%0b expected %06b",
                   cyc, pos, cnt80_clr, cnt80_inc, cnt12_inc, sr_shift, sample_valid,
                   adc_convst, adc_sck, e);
      end
      if (adc_sck) sck_pulses++;
      if (pos == PERIOD - 1) begin
        checks++;
        if (sck_pulses != BITS) begin
          failures++;
          $display("FAIL: %0d SCK pulses in a period, expected %0d", sck_pulses, BITS);
        end
        sck_pulses = 0;
      end
    end

    // Reset in the middle of a read returns to the clear state.
    rst_n = 1'b0;
    @(negedge clk);
    checks++;
    if (adc_convst || adc_sck || !cnt80_clr) begin
      failures++;
      $display("FAIL: outputs after reset convst=%0b sck=%0b clr=%0b", adc_convst, adc_sck, cnt80_clr);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
