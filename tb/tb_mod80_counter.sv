// tb_mod80_counter: self-checking testbench for mod80_counter.
//
// Drives random clear / increment patterns and compares the count and the
// terminal-count flag every cycle with a reference model kept in an integer.
// A directed part checks that, counting from a clear on every cycle, the
// terminal count is reached after exactly 80 cycles and the counter wraps to 0.
`timescale 1ns/1ps
module tb_mod80_counter;

  localparam int unsigned MOD = 80;
  localparam int unsigned W   = $clog2(MOD);

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0;
  logic [W-1:0] count;
  logic tc;
  int checks = 0, failures = 0;
  int ref_count = 0;

  mod80_counter dut (.clk, .rst_n, .clr, .inc, .count, .tc);

  always #5 clk = ~clk;

  task automatic check_state(string what);
    checks++;
    if (count !== W'(ref_count) || tc !== (ref_count == MOD - 1)) begin
      failures++;
      $display("FAIL %s: count=%0d tc=%0b expected %0d", what, count, tc, ref_count);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_state("after reset");

    // Directed: 80 increments from zero reach the terminal count once, then wrap.
    begin
      int cycles_to_tc = 0;
      inc = 1'b1;
      while (!tc) begin
        @(posedge clk); #1;
        cycles_to_tc++;
        ref_count = (ref_count + 1) % MOD;
        check_state("run to tc");
        if (cycles_to_tc > 2 * MOD) break;
      end
      checks++;
      if (cycles_to_tc != MOD - 1) begin
        failures++;
        $display("FAIL: tc after %0d increments, expected %0d", cycles_to_tc, MOD - 1);
      end
      @(posedge clk); #1;
      ref_count = 0;
      check_state("wrap to zero");
      inc = 1'b0;
    end

    // Random clear / increment traffic.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 3 * MOD) == 0);
      inc = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (clr)      ref_count = 0;
      else if (inc) ref_count = (ref_count + 1) % MOD;
      check_state("random");
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
