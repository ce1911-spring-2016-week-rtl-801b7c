// sipo_shift_register: serial-in, parallel-out register that assembles one
// ADC sample.
//
// The ADC sends its result most significant bit first, one bit per SCK
// pulse. Each cycle `shift` is high the register moves its contents one place
// towards the MSB and puts `sdi` into bit 0, so after WIDTH shifts the first
// bit received sits in the MSB and `q` holds the whole sample. `clr`
// (synchronous, priority over `shift`) empties it before a read. The width of
// 12 bits and the shift-per-bit behaviour follow the lab description; MSB-first
// order follows the ADC's serial format; the reset style is this design's own.
//
// Ports: clk, rst_n (async, active low), clr, shift, sdi (serial bit in),
// q (parallel contents, valid the cycle after the last shift).
module sipo_shift_register #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             shift,
  input  logic             sdi,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (shift) q <= {q[WIDTH-2:0], sdi};
  end

endmodule
