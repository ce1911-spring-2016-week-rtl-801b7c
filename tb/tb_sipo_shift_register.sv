// tb_sipo_shift_register: self-checking testbench for sipo_shift_register.
//
// Shifts random 12-bit words in MSB first, one bit per shift, with random idle
// cycles in between, and checks that the parallel output equals the word after
// the 12th shift. It also checks that the contents hold while `shift` is low,
// that `clr` empties the register and wins over `shift`, and that every
// intermediate value matches a reference shift kept in the testbench.
`timescale 1ns/1ps
module tb_sipo_shift_register;

  localparam int unsigned W = 12;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift = 1'b0, sdi = 1'b0;
  logic [W-1:0] q;
  logic [W-1:0] ref_q = '0;
  int checks = 0, failures = 0;

  sipo_shift_register dut (.clk, .rst_n, .clr, .shift, .sdi, .q);

  always #5 clk = ~clk;

  task automatic expect_q(logic [W-1:0] want, string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%03h expected %03h", what, q, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_q('0, "after reset");

    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] word;
      word = W'($urandom);
      // clear (with shift also asserted: clear must win)
      clr = 1'b1; shift = 1'b1; sdi = 1'b1;
      @(negedge clk);
      clr = 1'b0; shift = 1'b0;
      ref_q = '0;
      expect_q('0, "clear");
      for (int b = W - 1; b >= 0; b--) begin
        int idle;
        idle = $urandom_range(0, 2);
        repeat (idle) begin
          sdi = ~sdi;  // must be ignored while shift is low
          @(negedge clk);
          expect_q(ref_q, "hold");
        end
        sdi = word[b]; shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
        ref_q = {ref_q[W-2:0], word[b]};
        expect_q(ref_q, "shift");
      end
      expect_q(word, "assembled word");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
