// tb_bin_to_bcd_rom: self-checking testbench for bin_to_bcd_rom.
//
// Reads every one of the 4096 words and checks it against the decimal digits
// of the address, computed here by repeated subtraction of powers of ten
// (a different method from the ROM's division), and checks that every digit
// is a valid BCD value.
`timescale 1ns/1ps
module tb_bin_to_bcd_rom;
  import voltmeter_pkg::*;

  logic [ADC_BITS-1:0] addr = '0;
  bcd_word_t data;
  int checks = 0, failures = 0;

  bin_to_bcd_rom dut (.addr, .data);

  function automatic bcd_word_t expected_digits(int value);
    bcd_word_t d;
    int rest, k;
    int unsigned pow10 [4] = '{1, 10, 100, 1000};
    rest = value;
    for (int i = 3; i >= 0; i--) begin
      k = 0;
      while (rest >= int'(pow10[i])) begin
        rest -= int'(pow10[i]);
        k++;
      end
      d[i] = 4'(k);
    end
    return d;
  endfunction

  initial begin
    for (int a = 0; a < 2 ** ADC_BITS; a++) begin
      addr = ADC_BITS'(a);
      #1;
      checks++;
      if (data !== expected_digits(a)) begin
        failures++;
        if (failures < 10)
          $display("FAIL addr %0d: data=%04h expected %04h", a, data, expected_digits(a));
      end
      for (int i = 0; i < NUM_DIGITS; i++) begin
        checks++;
        if (data[i] > 4'd9) failures++;
      end
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
