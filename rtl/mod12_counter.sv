// mod12_counter: counter modulo 12 that counts the data bits read from the ADC.
//
// The controller clears it before a read and increments it once per SCK
// pulse, as each bit of the sample is shifted in. The count runs
// 0..MODULUS-1 and wraps to 0 after MODULUS-1; `tc` (terminal count) is high
// while the count equals MODULUS-1, which tells the controller that the bit
// being shifted in is the last of the 12. The modulus follows the lab
// description; the synchronous clear having priority over the increment, and
// an asynchronous active-low reset, are this design's choices.
//
// Ports: clk, rst_n (async, active low), clr (sync clear), inc (count up),
// count (current value), tc (count == MODULUS-1).
module mod12_counter #(
  parameter int unsigned MODULUS = 12,
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
