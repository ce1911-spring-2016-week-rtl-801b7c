// mod80_counter: counter modulo 80 that times an ADC conversion.
//
// The controller clears it before a conversion starts and increments it on
// every clock cycle CONVST is high. The count runs 0..MODULUS-1 and wraps to 0
// on the increment after MODULUS-1; `tc` (terminal count) is high while the
// count equals MODULUS-1, so a run that starts at 0 and stops on the cycle
// `tc` is high lasts exactly MODULUS cycles. At a 50 MHz clock the default of
// 80 cycles is 1.6 us, the ADC's longest conversion time. The modulus follows
// the lab description; the synchronous clear having priority over the
// increment, and an asynchronous active-low reset, are this design's choices.
//
// Ports: clk, rst_n (async, active low), clr (sync clear), inc (count up),
// count (current value), tc (count == MODULUS-1).
module mod80_counter #(
  parameter int unsigned MODULUS = 80,
  parameter int unsigned WIDTH   = $clog2(MODULUS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             tc
);

  localparam logic [WIDTH-1:0] LAST = WIDTH'(MODULUS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         count <= '0;
    else if (clr)       count <= '0;
    else if (inc) begin
      if (count == LAST) count <= '0;
      else               count <= count + 1'b1;
    end
  end

  assign tc = (count == LAST);

endmodule
