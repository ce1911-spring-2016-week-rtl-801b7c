# Serial-ADC digital voltmeter

This design turns an FPGA board with a 12-bit serial ADC into a digital
voltmeter. The FPGA asks the ADC over and over to convert the voltage on its
input channel 7. It reads back the 12-bit result one bit at a time and shows
it on four seven-segment digits as `X.XXX` volts.

The ADC's full scale is 4.096 V, so one code step is exactly 1 mV. The code,
written in decimal, is therefore the voltage in millivolts. No arithmetic is
needed: a 4096-word table gives the four decimal digits of every code.

## Structure

```
              +-------------------- adc_controller (state machine) ---------------------+
              | clr/inc               clr/inc            clr/shift      sample_valid     |
              v                       v                  v                  |             |
        mod80_counter          mod12_counter    sipo_shift_register        v        CONVST, SCK
        (80-cycle wait)        (12 data bits)    SDO --> 12-bit q --> display reg ----> ADC
                                                                          |
                                                                  bin_to_bcd_rom
                                                                          | 4 BCD digits
                                                              4 x bcd_to_7seg --> SEG3..SEG0
SDI is tied high.
```

| File | Role |
|---|---|
| `rtl/voltmeter_pkg.sv` | Shared constants: 12-bit samples, 4 digits, 80-cycle conversion. Also the sample, digit and segment types and the controller's state enum. |
| `rtl/adc_controller.sv` | Moore state machine. Drives CONVST and SCK and every clear, increment and shift signal. |
| `rtl/mod80_counter.sv` | Counts the 80 cycles of the conversion (modulus parameter, default 80). |
| `rtl/mod12_counter.sv` | Counts the 12 received bits (modulus parameter, default 12). |
| `rtl/sipo_shift_register.sv` | Serial-in, parallel-out register, MSB first. |
| `rtl/bin_to_bcd_rom.sv` | 4096 x 16 ROM that maps a code to its thousands, hundreds, tens and ones digits. |
| `rtl/bcd_to_7seg.sv` | Maps a digit and a decimal-point bit to an 8-bit segment pattern. |
| `rtl/adc_voltmeter.sv` | Top level: wires the blocks and adds the display register. |

## The conversion and read sequence

The controller does most of the work. It repeats one sample period of
106 clock cycles:

| Cycles | State | Pins | Internal action |
|---|---|---|---|
| 1 | `S_CLEAR` | CONVST 0, SCK 0 | Clears both counters and the shift register. |
| 80 | `S_CONV` | CONVST 1 | The mod-80 counter counts. The state is left when it reaches its terminal count (79). |
| 1 | `S_SETUP` | CONVST 0 | The ADC puts the result's MSB on SDO. |
| 12 | `S_SCK_HI` | SCK 1 | SDO is shifted in and the mod-12 counter advances. The 12th time, the next state is `S_DONE`. |
| 11 | `S_SCK_LO` | SCK 0 | The ADC moves SDO to the next bit on this falling SCK edge. |
| 1 | `S_DONE` | — | `sample_valid` loads the display register. |

Timing at a 50 MHz clock:

* CONVST is high for 1.6 µs. That is the ADC's longest conversion time.
* SCK runs at 25 MHz. The ADC allows up to 40 MHz.
* A new reading arrives every 2.12 µs, about 472 k samples/s.
* SDO is sampled on the clock edge that ends an SCK-high cycle. That is
  just before SCK falls, while the bit is stable.
* 280 ns pass between the 6th falling SCK edge and the next CONVST rise. The
  ADC needs 240 ns there to acquire the input.

CONVST and SCK come straight from flip-flops, so the pins cannot glitch. The
counter and shift-register controls are decoded from the state.

Two assertions in the controller check the serial rules. SCK never pulses
while CONVST is high. Each SCK pulse lasts one clock.

SDI is tied high. The ADC shifts SDI in on the first six rising SCK edges of
each read, as its configuration word. All ones selects single-ended channel 7
with unipolar (unsigned) codes.

## Digits and display

The display register holds the last complete sample. It keeps the digits
steady while the next sample is being shifted in. After reset it reads 0, so
the display shows `0.000` until the first sample arrives 106 cycles later.

`bin_to_bcd_rom` fills its table when it is initialised. Word `a` holds
`{a/1000, (a/100)%10, (a/10)%10, a%10}`, the thousands digit in bits 15..12.
The read is combinational.

`bcd_to_7seg` outputs `{dp, g, f, e, d, c, b, a}`:

* The patterns are active low by default: a 0 lights the segment. Set
  `ACTIVE_LOW = 0` for displays that are lit by a 1.
* Codes 10 to 15 are not BCD and leave the digit dark.
* The top level lights the decimal point on SEG3 only. SEG3 is the volts
  digit.

Top-level ports:

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | Clock; asynchronous reset, active low. |
| `adc_convst`, `adc_sck`, `adc_sdi` | Outputs to the ADC. |
| `adc_sdo` | Input from the ADC. |
| `seg[3:0]` | Segment patterns. `seg[3]` is SEG3, the volts digit. |
| `reading`, `reading_bcd` | The displayed code and its digits, for observation. |

## Which parts are specified and which are chosen here

The lab description fixes these points:

* the list of blocks;
* the 12-bit sample and the mod-80 and mod-12 counters;
* a ROM for the binary-to-decimal step;
* a digit converter with a decimal-point input and an 8-bit output;
* SDI held high;
* the 0 to 4.096 V input range.

It leaves the ADC waveform to the ADC's datasheet. These choices are this
design's own:

* The exact waveform above. It is a reading of the serial timing of the
  LTC2308-class ADC on the board.
* The 50 MHz clock. This is what makes 80 cycles equal 1.6 µs.
* Holding CONVST high for the whole conversion rather than a short pulse.
* The display register.
* The segment bit order and polarity, and blanking of non-BCD codes.
* Asynchronous active-low reset.

The seven-segment display itself is outside this RTL. The four patterns are
plain output ports, to be connected to whatever display driver the board
uses. The ADC is an external chip. The testbenches use a behavioural model of
it, `tb/ltc2308_adc_model.sv`.

Limits:

* Inputs below 0 V read `0.000`.
* Inputs at or above 4.095 V read `4.095`.
* The reading's accuracy is that of the ADC. The digital path adds no error.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_mod80_counter`, `tb_mod12_counter` | Random clear and increment traffic against an integer model. Terminal count after exactly 79 (or 11) increments, then wrap. |
| `tb_sipo_shift_register` | 200 random words shifted in MSB first, with idle cycles. Hold while idle, and clear taking priority over shift. |
| `tb_bin_to_bcd_rom` | All 4096 words, against digits computed by repeated subtraction. |
| `tb_bcd_to_7seg` | All 16 codes with the point off and on, both polarities, against segment-letter tables. |
| `tb_adc_controller` | Every output on every cycle of five sample periods, against the table above. The testbench plays both counters. |
| `tb_adc_voltmeter` | The whole design at its default parameters with the ADC model (details below). |

`tb_adc_voltmeter` applies 32 input voltages:

* 0 mV, full scale and over range;
* values that exercise every digit position;
* 20 random values.

For each voltage it decodes the segment patterns back to digits. It also
checks the decimal point, the 80-cycle CONVST time, the 106-cycle period,
12 SCK pulses per read and the SDI configuration word. The ADC model adds its
own timing checks:

* conversion time;
* no SCK during a conversion;
* acquisition time.

Every mechanism must occur at least once:

* conversion waits;
* 12-bit reads;
* full periods;
* display updates;
* over-range clamping.

Run a testbench with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/voltmeter_pkg.sv \
    tb/tb_adc_voltmeter.sv --top-module tb_adc_voltmeter -Mdir obj
./obj/Vtb_adc_voltmeter
```

Replace the testbench name to run another one.

To change the design:

* To use a different clock, change `CONV_CYCLES` in `voltmeter_pkg` so that
  it still covers 1.6 µs.
* For a faster SCK, the SCK-high and SCK-low states can be stretched or
  merged. The 40 MHz limit and the 240 ns acquisition window must still hold.
