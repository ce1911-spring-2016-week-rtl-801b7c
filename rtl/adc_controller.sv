// adc_controller: state machine that runs one ADC conversion and serial read
// after another.
//
// Sequence, one state per line (Moore machine):
//   S_CLEAR   clear the mod-80 counter, the mod-12 counter and the shift register
//   S_CONV    CONVST high; the mod-80 counter counts every cycle; leave when it
//             reaches its terminal count, so CONVST is high for exactly 80
//             cycles (1.6 us at 50 MHz, the ADC's longest conversion time)
//   S_SETUP   CONVST low; the ADC puts the MSB of the result on SDO
//   S_SCK_HI  SCK high; shift SDO into the shift register and advance the
//             mod-12 counter; after the 12th bit go to S_DONE
//   S_SCK_LO  SCK low; on this falling edge the ADC moves SDO to the next bit
//   S_DONE    `sample_valid` high for one cycle: the shift register holds the
//             complete 12-bit sample; then back to S_CLEAR
// One sample takes 1 + 80 + 1 + 12 + 11 + 1 = 106 clock cycles (about 472 k
// samples/s at 50 MHz). SCK runs at half the clock (25 MHz) while bits are read.
// SDO is sampled on the clock edge that ends an SCK-high cycle, i.e. just
// before SCK falls, when the bit is stable. From the 6th falling SCK edge to
// the next CONVST rise there are 14 cycles (280 ns), which leaves the ADC its
// acquisition time.
//
// The counter, shift-register and pin control signals and the use of the
// mod-80 and mod-12 counters follow the lab description. The exact waveform
// (CONVST held high for the whole conversion, SCK at half the clock, sampling
// before the falling SCK edge) is this design's reading of the ADC's serial
// timing, which the lab leaves to its datasheet. CONVST and SCK are driven
// from flip-flops so the pins never glitch; the counter and shift-register
// controls are decoded from the state.
//
// Ports: clk, rst_n (async, active low); cnt80_tc / cnt12_tc from the
// counters; cnt80_clr, cnt80_inc, cnt12_clr, cnt12_inc, sr_clr, sr_shift to
// the counters and shift register; sample_valid; adc_convst, adc_sck to the ADC.
module adc_controller
  import voltmeter_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic cnt80_tc,
  input  logic cnt12_tc,
  output logic cnt80_clr,
  output logic cnt80_inc,
  output logic cnt12_clr,
  output logic cnt12_inc,
  output logic sr_clr,
  output logic sr_shift,
  output logic sample_valid,
  output logic adc_convst,
  output logic adc_sck
);

  ctrl_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_CLEAR:  state_d = S_CONV;
      S_CONV:   if (cnt80_tc) state_d = S_SETUP;
      S_SETUP:  state_d = S_SCK_HI;
      S_SCK_HI: state_d = cnt12_tc ? S_DONE : S_SCK_LO;
      S_SCK_LO: state_d = S_SCK_HI;
      S_DONE:   state_d = S_CLEAR;
      default:  state_d = S_CLEAR;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_CLEAR;
      adc_convst <= 1'b0;
      adc_sck    <= 1'b0;
    end else begin
      state_q    <= state_d;
      adc_convst <= (state_d == S_CONV);
      adc_sck    <= (state_d == S_SCK_HI);
    end
  end

  assign cnt80_clr    = (state_q == S_CLEAR);
  assign cnt12_clr    = (state_q == S_CLEAR);
  assign sr_clr       = (state_q == S_CLEAR);
  assign cnt80_inc    = (state_q == S_CONV);
  assign cnt12_inc    = (state_q == S_SCK_HI);
  assign sr_shift     = (state_q == S_SCK_HI);
  assign sample_valid = (state_q == S_DONE);

  // Serial-interface rules: SCK never pulses while CONVST is high, and an SCK
  // pulse lasts one clock cycle.
  a_no_sck_in_conv: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(adc_convst && adc_sck));
  a_sck_one_cycle:  assert property (@(posedge clk) disable iff (!rst_n)
                                     adc_sck |=> !adc_sck);

endmodule
