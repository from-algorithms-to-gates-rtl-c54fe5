# Serial sample harness for DSP designs on an FPGA

This design lets a PC test a DSP datapath on an FPGA one sample at a time.
The PC sends a waveform over an RS-232 link. The FPGA rebuilds each input
sample, hands it to the DSP design under test, and sends the result straight
back. On the PC side you can then compare the hardware output with a software
model, measure a frequency response, or look at quantisation and overflow.

The harness has two reusable parts and one replaceable part:

```
            8-bit bytes              20-bit samples
 sdatain  +-------+  charin/oready  +-------------+  sample_out/oready/clock  +------------+
 -------->|       |---------------->|             |------------------------->|            |
          | uart  |                 | sample_proc |                          | fir_filter |
 <--------|       |<----------------|             |<-------------------------|            |
 sdataout +-------+  charout/iready +-------------+  sample_in/iready        +------------+
           bits <-> bytes            bytes <-> samples                         user design
```

`dsp_lab_top` wires the three together. The only block a user replaces is
`fir_filter`. Its default is the three-tap filter

    y[n] = x[n] - 1.625 x[n-1] + x[n-2]

which has a notch near 0.2 of the Nyquist frequency: about -8.5 dB at DC and
+11.2 dB at Nyquist.

## Samples on the wire

Every sample, in either direction, is three 8N1 serial bytes, most significant
part first:

| byte | bits 7..4      | bits 3..0   |
|------|----------------|-------------|
| 0    | header `4'hA`  | `s[19:16]`  |
| 1    | `s[15:8]`      |             |
| 2    | `s[7:0]`       |             |

`s` is a 20-bit two's-complement value. The PC scales a waveform in (-1, 1)
by a scaling factor and rounds it. With a factor of 65535 the samples use 17
bits, and they are sign-extended to 20.

Only byte 0 carries the header. While the receiver looks for the start of a
sample, it discards every byte whose upper nibble is not `A` and pulses
`byte_dropped`. If a byte is lost, the damaged sample is completed with the
next sample's first byte (one wrong result), and the remaining two bytes of
that next sample are skipped. The sample after that arrives intact. The check is weak: byte 1 or 2 of a sample can itself look like a
header. The header value and the byte order are choices of this
implementation. Both are `dsp_lab_pkg` constants, along with the helper
function `sample_byte()`.

## The sample handshake (sample_proc <-> user design)

The user design sees two 20-bit busses and five control signals. Everything
is synchronous to the single system clock.

| signal          | dir. (from sample_proc) | meaning |
|-----------------|------|---------|
| `sample_out`    | out  | input sample for the design |
| `sample_oready` | out  | `sample_out` holds a sample that has not been acknowledged |
| `sample_clock`  | out  | one-clock pulse in the cycle a new sample appears (the cycle `sample_oready` rises) |
| `sample_read`   | in   | one-clock pulse: the design is done with `sample_out` |
| `sample_in`     | in   | result from the design |
| `sample_iready` | out  | the transmit buffer is free |
| `sample_write`  | in   | one-clock pulse while `sample_in` is valid: store and send it |

The rules, checked by assertions in `sample_proc`:
- pulse `sample_read` only while `sample_oready` is high;
- pulse `sample_write` only while `sample_iready` is high.

`sample_oready` falls at the edge after `sample_read`. `sample_iready` falls at
the edge after `sample_write`. It rises again once the third byte of the result
has been handed to the UART, which is 20 bit times later if the line is free.

Use `sample_clock` as the clock enable of the design's delay registers. A
typical exchange with the default filter (one character per clock):

```
sample_clock  _|~|_________
sample_oready _|~~~~~~|____      (falls after read)
filter state   W O  A W          W = wait, O = result held, A = acknowledge
write, read   ____|~|______      (together, once sample_iready is high)
```

The filter takes `x` on `sample_clock`. It computes `y` from `x` and its two
delayed samples, and shifts its delay line. Then it pulses `write` and `read`
together, two clocks after `sample_clock` if the transmitter is free. It
acknowledges the input only after its result has been accepted. As a result,
a new input cannot arrive while an old result is still waiting.

## Buffering and flow control

Each direction buffers one sample:
- Receive: an assembly register, plus the `sample_out` buffer.
- Transmit: one sample register. Its bytes go to the UART, whose transmitter
  has no holding register.
- The UART receiver holds one complete byte while it shifts in the next.

When the PC sends continuously at the same bit rate, a result leaves about 30
bit times after its input arrived. The return path keeps pace indefinitely:
back-to-back output bytes take exactly 10 bit times each.

If input samples arrive faster than results can leave, the pressure moves
back up the chain. This happens when the PC's bit clock is fast, or when a
user design takes longer.
1. The filter waits for `sample_iready`.
2. `sample_out` stays unacknowledged.
3. The next complete sample waits in the assembly register (`rx_stall` = 1),
   and further bytes wait in the UART.
4. Only when the UART's holding register is also full is a byte lost
   (`overrun`). The lost byte shows up on the PC as a missing sample.

There is no flow control on the serial link. The PC must not send faster than
the FPGA returns results.

## The example filter: fixed point and overflow

`fir_filter` is a generic direct-form FIR. Its parameters:

| parameter   | default        | meaning |
|-------------|----------------|---------|
| `NTAPS`     | 3              | number of taps |
| `COEF_FRAC` | 3              | fractional bits of the coefficients |
| `COEFS`     | `'{8, -13, 8}` | integer coefficients, i.e. 1, -1.625, 1 |

The arithmetic:
- -1.625 = -13/8, so all three coefficients are exact with three fractional
  bits.
- Products are summed at full precision in a 36-bit accumulator.
- The sum is shifted right arithmetically by `COEF_FRAC`, which rounds toward
  minus infinity.
- The result is cut to 20 bits.

The filter's gain reaches 3.625 at Nyquist:
- 17-bit inputs (scaling factor up to 65535) never overflow.
- Larger inputs can exceed the 20-bit range. The output then wraps around in
  two's complement, as unprotected hardware would, and `overflow` pulses.
  This lets the effect of too large a scaling factor be studied rather than
  hidden.

## Interfaces of the blocks

- `uart`: serial pins `sdatain` and `sdataout`.
  - Receive channel: `charin`, `oready` and the `read` strobe.
  - Transmit channel: `charout`, the `write` strobe and `iready`.
  - Monitoring pulses: `overrun` and `frame_err`.
  - Built from `uart_rx` and `uart_tx`: 8 data bits, no parity, one stop bit.
    The receiver has a two-flop synchroniser and samples each bit in the
    middle.
  - `CLKS_PER_BIT` sets the bit time: 434 = 50 MHz / 115200 baud.
- `sample_proc`: the UART channels on one side and the sample handshake on
  the other, plus the status outputs `rx_stall` and `byte_dropped`.
  - The UART strobes `read` and `write`, and `charout`, are combinational. A
    byte is therefore taken or sent in the very cycle the UART offers it.
- `dsp_lab_top`: clock, reset (synchronous, active high), the two
  logic-level serial pins, and four sticky status flags for LEDs:
  `status_overrun`, `status_frame_err`, `status_resync` and
  `status_overflow`. An external RS-232 line driver connects the serial pins
  to the PC.

## Where this implementation makes its own choices

The block structure, the port names, the 20-bit busses, the three bytes per
sample with a 4-bit header, the five-signal handshake and the filter taps are
those of the original design. The following are choices of this
implementation:

- **One clock.** In the original, the sample processor runs on a separate
  baud clock and the other blocks on the board clock. Here everything runs on
  the board clock, and the UART times its bits with counters.
  `sample_clock` is a one-clock pulse, not a separate clock.
- **Serial format and rate.** 8N1 at 115200 baud from a 50 MHz clock. Change
  `CLKS_PER_BIT` on `dsp_lab_top` for other rates.
- **Header value and byte order**, as in the table above.
- **Buffer depths** of one sample per direction, and the stall and overrun
  behaviour described above.
- **Port directions.** The original declares most UART ports bidirectional.
  Here each port has the single direction it is used in.
- **Filter details:** the reset input, the rounding (floor), the wrap-around
  on overflow, and acknowledging an input together with writing its result.
- **Additions** that the original does not have: the `overrun`,
  `frame_err`, `rx_stall`, `byte_dropped` and `overflow` outputs and the
  top-level status flags.

## Verification

Each testbench in `tb/` checks itself and ends with a `TB_RESULT` line.

| testbench          | what it covers |
|--------------------|----------------|
| `tb_uart`          | random bytes through receiver and transmitter against a bit-level model, overrun, framing error, frame length (16 clocks per bit) |
| `tb_sample_proc`   | 200 random samples with stray bytes and random UART timing; sample integrity and order, one `sample_clock` per sample, byte format of results, resynchronisation, receive stall |
| `tb_fir_filter`    | 400 samples against a real-valued reference: 17-bit inputs and full-scale 20-bit inputs (overflow and wrap), waits on `sample_iready`, two-clock latency |
| `tb_dsp_lab_top`   | whole design at default parameters: a 600 Hz cosine at 8 kHz scaled by 65535 (output amplitude 0.157 of input), a stray byte, a lost byte and the resynchronisation after it, full-scale overflow, and a burst with a 4 % fast bit clock that forces stalls; counts each mechanism |
| `tb_freq_response` | 40 tones from 100 Hz to 4 kHz, 240 samples each, through the whole design (16 clocks per bit). Measured gain matches `|2 cos w - 1.625|` at every tone, including the -43 dB notch at 800 Hz, and every output sample is bit-exact |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dsp_lab_pkg.sv tb/tb_dsp_lab_top.sv --top-module tb_dsp_lab_top
./obj_dir/Vtb_dsp_lab_top
```

The full-size test takes about 1.7 million clocks and about a second.

## Replacing the filter

Write a module with the `fir_filter` ports and follow the handshake rules
above:
- wait for `sample_clock`, or for `sample_oready`;
- read `sample_out`;
- when `sample_iready` is high, pulse `sample_write` with the result and
  pulse `sample_read`.

If the design uses fewer than 20 bits:
- sign-extend its result onto `sample_in`;
- leave the unused high bits of `sample_out` unconnected.

Then instantiate it in `dsp_lab_top` in place of `filter1`. For a different
FIR, changing `COEFS`, `NTAPS` and `COEF_FRAC` is enough.
