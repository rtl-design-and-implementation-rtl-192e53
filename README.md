# BPSK modulator at 1200 bit/s for a 14-bit DAC

This is a binary phase-shift keying (BPSK) transmitter built only from counters and two
look-up ROMs. A stored bit pattern is sent at 1200 bit/s. Each bit is sent as a whole number
of cycles of a sine carrier, and the carrier's sign follows the bit:

    s(t) = +A sin(2 pi fc t)   for a 1 bit
    s(t) = -A sin(2 pi fc t)   for a 0 bit      (a 180-degree phase shift)

The output is a stream of 14-bit offset-binary words for an external D/A converter at
12 MS/s, plus the bit itself on `binary_seq` for a scope reference. The carrier frequency
is an integer multiple of the bit rate, set by one constant, `PHASE_ACC`:
fc = `PHASE_ACC` x 1200 Hz. The two reference settings are 15 (18 kHz) and 40 (48 kHz).

Everything runs from a single 120 MHz clock. 120 MHz was chosen because it divides evenly by
1200. A 125 MHz board clock would not, so on the board a PLL makes 120 MHz from 125 MHz.

## Timing plan: why the numbers fit together

| quantity | value | where it comes from |
|---|---|---|
| clock | 120 MHz | PLL output |
| clocks per bit (`BIT_PERIOD`) | 100 000 | 120 MHz / 1200 bit/s |
| clocks per DAC sample (`SAMPLE_DIV`) | 10 | 12 MS/s |
| samples per bit | 10 000 | 100 000 / 10 |
| sine table length (`N_SAMPLES`) | 10 000 | one full sine cycle |
| table step per sample (`PHASE_ACC`) | 15 or 40 | carrier cycles per bit |
| pattern length (`N_BITS`) | 1200 | one second of data |

The central idea is that one bit lasts exactly as many samples as the sine table has entries.
Each sample moves the table address on by `PHASE_ACC`, modulo 10 000. So in one bit the
address runs `PHASE_ACC` times around the table, and then lands back on address 0. Every bit
therefore starts at carrier phase 0, and the carrier holds exactly `PHASE_ACC` cycles per bit.
A phase reversal thus always falls on a zero crossing of the carrier. The top module refuses to
elaborate if `BIT_PERIOD != SAMPLE_DIV * N_SAMPLES`, because the phase would then drift from bit
to bit.

At 18 kHz a carrier cycle lasts 666.7 samples. At 48 kHz it lasts 250 samples. A step that is
not a divisor of 10 000 just means the samples fall on different points of the table in
successive carrier cycles. Steps up to 5000 give a usable carrier (Nyquist). The sine address
generator asserts that the step stays below 10 000.

## Block structure

```
            +---------------+  value   +--------------+ bit_address +----------+ bit  +--------------+
 clk ------>| counter_1lakh |--------->| bit_addr_gen |------------>| rom_bits |--+-->| fpga_out_gen |--> binary_seq
            +---------------+  17 b    +--------------+    11 b     | 1200 x 1 |  |   +--------------+
                                                                    +----------+  |
            +---------------+  value   +---------------+  address   +-----------+ |   +--------------+
 clk ------>|  counter_10   |--------->| sine_addr_gen |----------->| rom_sine_ |-+-->| dac1_out_gen |--> dac_1[13:0]
            +---------------+   4 b    |  +PHASE_ACC   |    14 b    | samples   |     +--------------+
                                       +---------------+            | 10000x14  | sample
                                                                    +-----------+
 clk     ------------------------------------------------------------------------------------------> dac_clk_p
 clk_180 ------------------------------------------------------------------------------------------> dac_clk_n
```

| module | role |
|---|---|
| `counter_1lakh` | Free-running counter 0..99 999 ("lakh" is 100 000), one turn per bit. |
| `bit_addr_gen` | Adds 1 to the pattern address when the counter is at 99 999. Wraps 1199 -> 0. |
| `rom_bits` | 1200 x 1 pattern ROM. By default it holds `10110100` repeated. |
| `counter_10` | Free-running counter 0..9, one turn per DAC sample. |
| `sine_addr_gen` | Adds `PHASE_ACC` to the sine address, modulo 10 000, when the counter is at 9. |
| `rom_sine_samples` | 10 000 x 14 ROM holding one sine cycle in offset binary. |
| `fpga_out_gen` | Registers the current bit onto `binary_seq`. |
| `dac1_out_gen` | Sends the sample unchanged for a 1 bit, or `0x3ffe - sample` for a 0 bit. Registered. |
| `bpsk_top` | Wires the two paths together and forwards the clock pair to the DAC. |
| `bpsk_pkg` | Shared constants: rates, widths, DAC mid-scale and full-scale codes. |

The design holds 61 flip-flops (17 + 4 + 11 + 14 + 14 + 1) and 141 200 ROM bits.

## Sample format and the phase switch

The DAC takes positive offset binary: 0x0000 means -1, 0x1fff means 0, and the top code means
+1. Sine table entry i is

    S[i] = trunc( sin(2 pi i / 10000) * 0x1fff ) + 0x1fff

`trunc` drops the fraction toward zero. The entries run from 0x0000 to **0x3ffe**: code 0x3fff
is never used. The table is symmetric about 0x1fff, so `0x3ffe - S[i]` is exactly the negated
sine. That negation is all `dac1_out_gen` does for a 0 bit. The table is computed with `$sin`
when the design elaborates, so no data file is needed. Both simulators and the synthesis
front end evaluate it as a constant initial value.

## Pipeline alignment

Both paths are three registers deep: the address register, the ROM read, and the output
register. So `binary_seq` and `dac_1` always change on the same clock edge. Counting k rising
edges since reset was released, for k >= 2:

    bit index     b = floor((k-2) / 100000) mod 1200
    sample index  i = (floor((k-2) / 10) * PHASE_ACC) mod 10000
    binary_seq    = pattern[b]
    dac_1         = pattern[b] ? S[i] : 0x3ffe - S[i]

The ROMs read synchronously: the address is registered inside the memory and the output is
not. FPGA block RAM in ROM mode works this way. If you map the ROMs to a memory with a
registered output, add one register stage to the bit path as well.

## Reset and clocks

`rst` is **active low** and asynchronous. It clears both counters and both addresses, sets
`binary_seq` to 0 and sets `dac_1` to mid-scale (0x1fff, the DAC's zero). The ROMs have no
reset. After `rst` rises, the first valid output appears two clocks later.

The PLL is not part of this RTL. Feed `clk` with the 120 MHz clock and `clk_180` with its
inverse. The top passes them straight out as `dac_clk_p`/`dac_clk_n` for the converter.

## Parameters of `bpsk_top`

| parameter | default | meaning |
|---|---|---|
| `BIT_PERIOD` | 100000 | clocks per bit |
| `SAMPLE_DIV` | 10 | clocks per DAC sample |
| `N_SAMPLES` | 10000 | sine table length; must equal `BIT_PERIOD / SAMPLE_DIV` |
| `N_BITS` | 1200 | pattern ROM depth |
| `PHASE_ACC` | 15 | carrier cycles per bit (15 = 18 kHz, 40 = 48 kHz) |
| `PATTERN_LEN`, `PATTERN` | 8, `8'b10110100` | short pattern repeated through the ROM, MSB first |
| `INIT_FILE` | `""` | if set, `$readmemb` file with one bit per line, replacing the pattern |

To change the data, either set `PATTERN`/`PATTERN_LEN` or point `INIT_FILE` at a bit list.
To change the carrier, set `PHASE_ACC`. Because the carrier is a build-time constant, the top
has no port for it.

## What follows the reference design and what is this design's choice

Taken from the reference design:
- the 120 MHz clock and the two counters (100 000 and 10);
- the ROM sizes (1200 x 1 and 10 000 x 14) and the sine formula with its 0x1fff scale;
- the 0x3ffe inversion;
- the address step rule;
- the bus widths (17, 4, 11, 14, 14 bits);
- the default pattern `10110100`;
- carrier settings of 15 and 40 cycles per bit.

The 61 flip-flops agree with the register count reported for the original FPGA build. Its
reported memory total of 231 424 bits is the same two ROMs rounded up to 16 384 x 14 and
2048 x 1.

Choices made here:
- **Counter phase.** The counters count from 0 and act on their last value (99 999 and 9),
  rather than on "100 000" and "10". The period is the same.
- **Reset.** Polarity active low (the reference waveforms hold `rst` at 1 while running);
  asynchronous action; reset values.
- **Output stages.** Both are registered, which keeps the two outputs aligned.
- **Address wrap.** The sine address wraps modulo 10 000.
- **Carrier setting.** `PHASE_ACC` is a parameter.
- **`INIT_FILE`.** This option is new.
- **Carrier phase at bit edges.** The original does not say whether the carrier phase restarts
  at bit edges. Here it restarts by construction (see the timing plan).

Not included: the PLL (a vendor macro, replaced by the `clk`/`clk_180` inputs) and the
D/A converter itself.

## Simulation

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`.
The end-to-end tests use `tb/bpsk_checker.sv`. This scoreboard predicts every `dac_1` word and
`binary_seq` bit from the formulas above. On every bit edge it also checks that the carrier made
exactly `PHASE_ACC` cycles in that bit, and that bits change only on the bit grid.

| testbench | what it runs | time |
|---|---|---|
| `bpsk_top_tb` | two small modulators (1000-clock bits, 100-entry table), with a mid-bit reset, pattern and table wraps | < 1 s |
| `bpsk_top_full_tb` | default design, all 1200 bits plus the pattern wrap: 120 M clocks, every one checked | about 1 min |
| `bpsk_scope_tb` | full size, 18 kHz with pattern `010` and 48 kHz with pattern `01`, 12 bits each | about 1 s |
| `<module>_tb` | one per block, at full size | seconds |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bpsk_pkg.sv tb/bpsk_top_full_tb.sv \
          --top-module bpsk_top_full_tb -Mdir obj_full
./obj_full/Vbpsk_top_full_tb
```

Any other testbench works the same way with its own name in place of `bpsk_top_full_tb`.
`rtl/bpsk_pkg.sv` must come first, because the top uses it.
