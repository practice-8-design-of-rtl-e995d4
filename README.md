# BPSK transmitter with an SPI-driven LTC2624 DAC

This is a small binary phase shift keying (BPSK) transmitter for an FPGA board with an
LTC2624 quad 12-bit serial DAC, such as the Spartan-3A/3AN Starter Kit. A 4-stage
pseudo-random generator produces a bit stream. Each bit selects the phase of one full
period of a 32-sample sine wave: 0° for a 0 bit, 180° (the negated sine) for a 1 bit. Every
sample is sent over SPI to channel A of the DAC, which turns it into the analog BPSK signal.

The design fits in one clock domain, driven by a 50 MHz clock and two divided clocks.
Its hardest part is the timing. One SPI frame takes 64 clock cycles. The sine table advances
once per frame, and the data bit changes once per 32 frames. So each DAC update carries one
unchanging sample, and each bit lasts exactly one carrier period.

| quantity (50 MHz clk)  | value                               |
|------------------------|-------------------------------------|
| DAC update rate        | 50 MHz / 64 = 781.25 kHz            |
| carrier frequency      | 781.25 kHz / 32 = 24.41 kHz         |
| bit rate               | one bit per carrier period, 24.41 kbit/s |
| sequence length        | 2^4 − 1 = 15 bits, then it repeats  |
| DAC code range         | 2048 ± 2047, so 1 … 4095            |

## Block structure

```
            clk_data (1 pulse / 2048 clk)
     +-----------------------------------------+
     v                                         |
 +----------+  serial_data  +----------------+ |  data[11:0]  +---------+  spi_mosi
 | data_gen |-------------->| bpsk_modulator |-+------------>| com_dac |  spi_sck
 +----------+       |       +----------------+   clk_spi     +---------+  dac_cs
   sync (unused)    |          ^ clk               (= clk)                dac_clr
                    +--> data (pin)
 reset goes to all three blocks (active high, asynchronous)
```

| file | role |
|------|------|
| `rtl/bpsk_system.sv` | top level, wires the three blocks |
| `rtl/bpsk_modulator.sv` | clock divider, sine-table pointer, sign flip, DAC offset |
| `rtl/com_dac.sv` | 64-cycle SPI master for the LTC2624 |
| `rtl/data_gen.sv` | 4-stage maximal-length shift-register generator |
| `rtl/preset_reg.sv` | D flip-flop with asynchronous preset, the generator's cell |
| `rtl/constants_pkg.sv` | sizes (N=4, M=32, 12-bit words with 10 fraction bits), types, `and_vector` |
| `rtl/real2bit_pkg.sv` | elaboration-time fixed-point conversion and the sine table |

## Clocking: one fast clock, two divided clocks

`bpsk_modulator` counts `clk` modulo 64·32 = 2048. Its outputs are:

* `clk_bpsk`: a one-cycle pulse every 64 cycles. It clocks the sine-table pointer.
* `clk_data`: a one-cycle pulse every 2048 cycles. It clocks `data_gen`. It rises on the
  same edge as a `clk_bpsk` pulse.
* `clk_spi`: `clk` itself. It clocks `com_dac`.

Both pulses are registered outputs and rise one `clk` edge after the counter reaches zero
(or a multiple of 64). The pointer and the generator register are clocked by these pulses
directly, not by `clk` with clock enables. This keeps the structure of the original design.
On an FPGA the pulses should go onto global clock buffers, or you should rewrite the two
registers with enables. The two versions behave the same cycle for cycle.

After reset the pointer is 31 and the generator is all ones. The first `clk` edge raises both
pulses, so the pointer steps to 0 and the generator shifts once. From then on, the sample
that `com_dac` loads at the start of a frame is the one selected during the previous
64 cycles. `com_dac` samples `data` at the same edge that moves the pointer, and sees the
value from before the move. Frame *n* after reset therefore carries:

* table index 31 and the reset data bit when *n* = 0;
* index (*n*−1) mod 32 when *n* ≥ 1, modulated by the bit that the generator presents
  after (*n*−1)/32 + 1 shifts.

## The SPI frame (`com_dac`)

A 7-bit counter runs 1, 2, …, 63, 0, 1, … (`count_out`). One frame is 64 cycles:

| count | action |
|-------|--------|
| 1 | `dac_cs` goes low; `data` is copied into the word; bit 31 is driven |
| 2 … 32 | bits 30 … 0 are driven, one per cycle, MSB first |
| 33 | `dac_cs` goes high, and the DAC converts |
| 34 … 63, 0 | idle |

The 32-bit command word is:

| bits | 31:24 | 23:20 | 19:16 | 15:4 | 3:0 |
|------|-------|-------|-------|------|-----|
| content | don't care (0) | command `0011` = write and update | address `0000` = DAC A | 12-bit code | don't care (0) |

`spi_sck` is `~clk`. So `spi_mosi` changes on the falling edge of `spi_sck`, and the DAC
samples it on the rising edge, half a clock period (10 ns at 50 MHz) after each change. The
LTC2624 needs at least 4 ns of setup. `dac_clr` is `~reset`, so the DAC's outputs are cleared
while the system is in reset. The DAC echoes the previous word on its serial output, but this
interface does not read it. The command and address are the parameters `CMD` and `ADDR`. The
address codes are 0000 A, 0001 B, 0010 C, 0011 D and 1111 for all channels.

## The sine table and the modulation (`real2bit_pkg`, `bpsk_modulator`)

The table holds one carrier period of 2·sin(2πi/32) as signed 12-bit fixed-point words,
with 10 fraction bits. Constant functions fill it during elaboration, so the hardware holds
only 32 constants. `truncate` converts a real number as follows:

1. It takes the magnitude times 2^10 and truncates it toward zero.
2. It holds the result at 2^11 − 1 = 2047, so the peak 2.0 becomes 2047, not an overflow.
3. It applies the sign of the input.

The resulting table is 0, 399, 783, 1137, 1448, 1702, 1892, 2008, 2047, … and the
negatives of these in the second half.

The modulator passes the sample through for a 0 bit and negates it for a 1 bit. With
`DAC_OFFSET = 1` (the default, for hardware) it then adds 2048. This gives an unsigned code
centred on V<sub>REF</sub>/2, because the DAC accepts only unsigned codes:
V<sub>OUT</sub> = code/4096 · V<sub>REF</sub>. With `DAC_OFFSET = 0` the signed sample
is output instead, which is easier to read in a waveform viewer.

`extract` takes the middle 12 bits of a 24-bit product of two words, bringing the binary
point back from bit 20 to bit 10. The transmitter has no multiplier, so `extract` is only a
helper for later changes.

## Pseudo-random data (`data_gen`, `preset_reg`)

Four `preset_reg` cells form a shift chain q0 → q1 → q2 → q3. The first cell loads
q0 XOR q3. The serial bit is q3. Reset presets all cells to 1, so the generator can never
get stuck in the all-zeros state. This is a maximal-length sequence of 15 bits:
`1 1 1 0 1 0 1 1 0 0 1 0 0 0 1` (the serial bit after each of the first 15 shifts from the reset state).
`sync` is the AND of the four cells: it goes high once per period, in the all-ones state.
The system does not use `sync`.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `data_gen` | `NREG` | 4 | chain length; the taps (first and last stage) give a maximal sequence only for suitable lengths, such as 4 |
| `bpsk_modulator` | `SAMPLES` | 32 | samples per carrier period (the table is rebuilt for any value) |
| `bpsk_modulator` | `DIVIDE` | 64 | clk cycles per sample; must stay 64 when it feeds `com_dac`, whose frame is fixed at 64 cycles |
| `bpsk_modulator` | `DAC_OFFSET` | 1 | 1: unsigned offset code for the DAC; 0: signed sample |
| `com_dac` | `CMD`, `ADDR` | `0011`, `0000` | LTC2624 command and channel |

The system's sizes come from `constants_pkg`: N = 4, M = 32, NBITS = 12 and NDEC = 10.

## Where this RTL makes its own choices

* **Top-level wiring.** It follows the block diagram. The top's one-bit `data` output carries
  the serial data bit.
* **Reset in `com_dac`.** Reset clears the whole command word and `spi_mosi`. Only the
  command and address fields strictly need a reset value.
* **`sync` in `data_gen`.** The generator's `sync` is written as an AND reduction, so `NREG`
  can differ from N.
* **Divided clocks.** They are kept as clocks, as described above.
* **Fraction bits.** The table uses 10 fraction bits. This makes the ±2 sine span the full
  12-bit range that the 2048 offset assumes. An example with 7 fraction bits
  (1.5 → `00001.1000000`) is reproduced in the `real2bit` test.
* **No DAC readback.** The DAC's echo output is not read. Checking the echo would need an
  extra input and a capture register, on the rising edge of `spi_sck`.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_preset_reg` | q follows d; asynchronous preset, also in mid-period |
| `tb_data_gen` | against an integer model every cycle; period 15; all 15 states visited; `sync` once per period; mid-run reset |
| `tb_com_dac` | acts as the DAC: 32 bits per frame, exact word, data sampled only at the load edge, 64-cycle period, `count_out`, `spi_sck`/`dac_clr`, mid-frame reset |
| `tb_bpsk_modulator` | default instance and an 8-sample, divide-by-4, signed instance; pulse trains and every output sample against a `$sin`/`$floor` reference, with random `serial_data` |
| `tb_constants` | sizes and `and_vector` for all 16 inputs |
| `tb_real2bit` | `truncate` and `extract` on worked values; all 32 table entries |
| `tb_bpsk_system` | end to end at the default sizes, with the behavioural DAC model `tb/ltc2624_model.sv`; see below |

The system test runs two full 15-bit sequences: 960 frames, about 61,000 cycles at the
default sizes, followed by a reset in mid-run and 3 more carrier periods. It checks:

* every DAC channel-A update against an independent prediction, as in the clocking section;
* the command word of every frame;
* the 64-cycle update interval;
* the `data` pin;
* the DAC clear during reset.

It also counts these events and fails if any of them never happens: frames, completed sine
periods, periods sent with a 0 bit and with a 1 bit, phase flips, `sync` pulses, complete
sequences and mid-run resets.

To simulate with Verilator, for example the system test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/constants_pkg.sv rtl/real2bit_pkg.sv tb/tb_bpsk_system.sv \
    --top-module tb_bpsk_system -o sim
./obj_dir/sim
```

The other testbenches are built the same way. `-Irtl -Itb` lets Verilator find each module
by its file name. The packages must be listed first.

## Limits

* The LTC2624 and the 50 MHz oscillator are board parts. They are not part of the RTL. The
  DAC model in `tb/` covers only its SPI behaviour: shifting, echo, the update command, the
  channel addresses and clear. It does not model analog settling.
* The 180° phase jump happens at the sample boundary where the data bit changes. There is
  no pulse shaping or filtering: the analog output is the raw stepped DAC signal.
* No I/O pin constraints are included. On the Starter Kit the pins are: clk E12, reset T15,
  spi_mosi AB14, spi_sck AA20, dac_cs W7, dac_clr AB13, and the data bit on A13.
