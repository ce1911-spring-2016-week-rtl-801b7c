// tb_bcd_to_7seg: self-checking testbench for bcd_to_7seg.
//
// Applies every digit code 0..15 with the decimal point off and on, to the
// default active-low converter and to an active-high one, and compares the
// patterns with a table of lit segments written out below from the shapes of
// the numerals (a top, b upper right, c lower right, d bottom, e lower left,
// f upper left, g middle). Codes 10..15 must show nothing.
`timescale 1ns/1ps
module tb_bcd_to_7seg;
  import voltmeter_pkg::*;

  bcd_digit_t digit = '0;
  logic dp = 1'b0;
  seg_t seg_low, seg_high;
  int checks = 0, failures = 0;

  bcd_to_7seg                      dut_low  (.digit, .dp, .seg(seg_low));
  bcd_to_7seg #(.ACTIVE_LOW(1'b0)) dut_high (.digit, .dp, .seg(seg_high));

  // Segments lit for each numeral, as strings of segment letters.
  function automatic string lit_letters(int d);
    case (d)
      0: return "abcdef";
      1: return "bc";
      2: return "abdeg";
      3: return "abcdg";
      4: return "bcfg";
      5: return "acdfg";
      6: return "acdefg";
      7: return "abc";
      8: return "abcdefg";
      9: return "abcdfg";
      default: return "";
    endcase
  endfunction

  function automatic seg_t expected_high(int d, logic point);
    seg_t s;
    string l;
    s = '0;
    l = lit_letters(d);
    for (int i = 0; i < l.len(); i++) s[l[i] - "a"] = 1'b1;
    s[7] = point;
    return s;
  endfunction

  initial begin
    for (int d = 0; d < 16; d++) begin
      for (int p = 0; p < 2; p++) begin
        digit = 4'(d);
        dp = p[0];
        #1;
        checks++;
        if (seg_high !== expected_high(d, dp)) begin
          failures++;
          $display("FAIL high d=%0d dp=%0b: %08b expected %08b", d, dp, seg_high, expected_high(d, dp));
        end
        checks++;
        if (seg_low !== ~expected_high(d, dp)) begin
          failures++;
          $display("FAIL low d=%0d dp=%0b: %08b expected %08b", d, dp, seg_low, ~expected_high(d, dp));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
