# Reprogrammable 48-output variable-duty-cycle clock generator

This design produces 48 clocks from a single crystal clock. Each output's
duty cycle can be set on its own, and every setting can be rewritten while the
outputs run. All 48 outputs share one period, `T = M * Tc`, where `Tc` is the
input clock period and `M` is an 8-bit value. Output *k* is high for
`N_k * Tc` of each period, where `N_k` is a second 8-bit value that belongs to
output *k* alone. With `M = 255` the duty cycle can be set from 1/255 (0.4 %)
to 254/255 (99.6 %), one step of 1/255 at a time.

All 49 bytes (one `M` and 48 values `N_k`) are loaded through a 15-line
parallel port: 8 data lines and 7 latch-select lines. This makes the unit
easy to drive from a host computer or a microcontroller. It was designed to
set the synaptic weights of a mixed analog/digital neural network. Each weight
there is a switched MOS resistor, and its effective value follows the duty
cycle of the clock that switches it. The outputs can also be combined
outside the chip to make more complex waveforms. For example,
`(not OUTa) and OUTb` gives a pulse whose position and width can both be
programmed.

## How one output works

An output needs only a counter, two comparators and a flip-flop:

```
            +-----------+    count == M (PRESET)
  clk ----> |  counter  |----+-----------------------> restart counter (M -> 1)
            | 1,2,...,M |    |                     +--> set   ---+
            +-----------+    |                     |             |  +----+
                  | count    +---------------------+             +->| FF |--> OUTk
                  +--------> count == N_k ------------> clear ------>|    |
                                                                    +----+
```

- The counter counts clock cycles: 1, 2, ..., M, and then 1 again. One turn
  takes exactly `M` clocks.
- When the count equals `M`, the period comparator raises **PRESET**. PRESET
  restarts the counter and sets the output flip-flop.
- When the count equals `N_k`, the output's own comparator clears its
  flip-flop.

So the flip-flop is high from the restart until the count reaches `N_k`.
That is `N_k` clocks of every `M`. The programming rule is `0 < N_k < M`,
with `M` from 2 to 255.

Timing of one period with `M = 5`, `N = 2`. The output follows its
comparators by one clock because the flip-flop samples them on the clock edge:

```
clk     _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
count     3   4   5   1   2   3   4   5   1   2   3
PRESET            ‾‾‾                 ‾‾‾
N-match                   ‾‾‾                 ‾‾‾
OUT     ______________‾‾‾‾‾‾‾‾__________‾‾‾‾‾‾‾‾______
                      |<-N=2->|
                      |<------ M=5 ------>|
```

## The 48-output chip

The chip shares everything it can. There is one counter, one period
register `M` and one period comparator. Their PRESET pulse goes to all 48
output flip-flops, so every output starts its high phase on the same clock
edge. Only the duration register, its comparator and the flip-flop are
repeated for each output. They come as six identical macros of eight
channels (`channel_macro`): the macro with index `g` drives `OUT8g` to
`OUT8g+7`.

```
 ein[7:0], eils[6:0] --> prog_port --> ls_decoder --> ls[47:0]  (one select line per duration register)
                                                  +-> ls[48]    (period register M)
 masterclr_n --> reset_sync --> rst_n (counter, flip-flops, port)

 M --> period comparator --PRESET--> sync_counter (restart)
                                 \--> 6 x channel_macro (8 x duration register,
          COUNT[7:0] -------------->   comparator, output flip-flop) --> out[47:0]
```

## Programming the registers

| select `eils[5:0]` | register               |
|--------------------|------------------------|
| 0 ... 47           | duration `N` of OUT0 ... OUT47 |
| 48                 | period `M`             |
| 49 ... 63          | none (the write is ignored) |

`ein[0]` is the least significant bit. A write works as follows:

1. Put the byte on `ein` and the select number on `eils[5:0]`, with the
   strobe `eils[6]` low.
2. At least 2 clocks later, raise `eils[6]`. Hold it high for at least 2
   clocks, then lower it.
3. Keep `ein` and `eils[5:0]` stable until 3 clocks after the strobe rose.
   Keep the strobe low for at least 2 clocks before the next write.

The port lines may change at any time relative to `clk`, because they pass
a two-flop synchronizer. The register takes the new value 4 clocks after the
strobe is first sampled high. A register may be rewritten while the outputs
run:

- A new `N_k` takes effect at the next count match. The high phase in flight
  during the write ends at the old value or the new one, whichever the count
  reaches first.
- A new `M` that is above the current count takes effect in the current
  period.
- A new `M` that is below the current count lets the counter run on to 255,
  wrap to 0 and then count up to `M`. That one period is longer.

The register file is built from 49 byte registers with a decoded write
enable. The 64-line select decoder is a tree of nine 3-to-8 decoders. One
first-level decoder, enabled by `eils[6]`, decodes `eils[5:3]` and enables
one of eight second-level decoders, which decode `eils[2:0]`.

## Master clear and start-up

`masterclr_n` is active low. When it falls, the counter goes to 0 and all
outputs go low at once, asynchronously. While it is held low, the
programming port ignores writes. **It does not erase the programmed
bytes**, so the outputs resume with the same settings after the clear is
released. The release passes a two-flop synchronizer. The outputs first rise
`M + 3` clocks after `masterclr_n` goes high: 2 clocks of release, `M`
counts, and 1 clock in the output flip-flop. After that they repeat every
`M` clocks.

The registers have no reset. After power-up, program all 49 bytes and then
pulse master clear, so that every output starts in phase from a clean
count.

## Values outside the rule `0 < N < M`

These are not checked in hardware. They behave as follows:

- `N = 0` and `N > M`: the count never equals `N`, so the output stays high
  after the first PRESET. This is a 100 % duty cycle.
- `N = M`: set and clear arrive in the same cycle, and clear wins. The output
  stays low.
- `M = 0`: the period becomes 256 clocks.
- `M = 1`: PRESET fires on every clock.

## Departures from the original circuit

The original was built from 74-series parts and then as an antifuse FPGA
schematic that used asynchronous tricks. This RTL keeps the structure and the
cycle counts, but runs everything on one clock:

- **Counter restart.** The original cleared the counter asynchronously in
  the low half of the clock cycle in which the count reached `M`. It then
  showed 0 for half a cycle before counting to 1. Here the counter steps
  from `M` straight to 1 on the clock edge. The period is still `M` clocks.
- **Output flip-flop.** The original set and cleared the flip-flop through
  its asynchronous preset and clear pins, straight from the comparators.
  Here set and clear are synchronous, so the outputs lag the count by one
  clock. PRESET is a full-clock pulse rather than a short glitch. High time
  and period are unchanged. Only master clear still acts asynchronously.
- **Register clocking.** The original clocked each byte latch with its
  decoded select line. Here the select lines are write enables on `clk`,
  after the synchronizer in `prog_port`. This adds the 4-clock write
  latency and the setup and hold rule above.
- **Choices of this design.** These points were not fixed by the original:
  - `eils[6]` is the active-high strobe;
  - master clear is synchronized and also holds the port idle;
  - set and clear together give 0.
- **Not modelled.** The I/O pad buffers are not modelled, because they have
  no logic function. The analog synapse circuit that the outputs were meant
  to drive is not modelled either.
- **Equality only.** The comparators test only for equality, which is all
  the circuit uses.

## Sizes and parameters

`clkgen_top` has three parameters:

- `WIDTH_P`: word width, default 8.
- `N_MACRO_P`: number of macros, default 6.
- `CH_PER_MACRO_P`: channels per macro, default 8.

The select decoder and port are fixed at 64 select lines. The number of
outputs must therefore stay below 64, and the period register always sits at
select number `N_MACRO_P * CH_PER_MACRO_P`. A wider `WIDTH_P`, for example
10 bits for a 1/1023 step, widens `ein` to match.

At the default size, synthesis gives 496 flip-flops:

- 49 x 8 register bits;
- the 8-bit counter;
- 48 output flip-flops;
- the synchronizers.

It also gives 49 8-bit equality comparators and one 8-bit incrementer.

## Files

| file | contents |
|------|----------|
| `rtl/clkgen_pkg.sv` | shared sizes |
| `rtl/clkgen_top.sv` | the generator |
| `rtl/prog_port.sv` | synchronizer and strobe-edge detector for the programming lines |
| `rtl/ls_decoder.sv`, `rtl/dec3to8.sv` | 1-of-64 select decoder from nine 3-to-8 decoders |
| `rtl/octal_latch.sv` | byte register (period `M` or duration `N`) |
| `rtl/eq_comparator.sv` | equality comparator with enable |
| `rtl/sync_counter.sv` | period counter 1..M |
| `rtl/duty_ff.sv` | output flip-flop with set, clear and master clear |
| `rtl/channel_macro.sv` | eight output channels |
| `rtl/reset_sync.sv` | master-clear release synchronizer |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the two below |

## Verification

Every testbench checks its module against values computed independently in
the testbench. It ends by printing `TB_RESULT checks=N failures=F`.

- `tb_clkgen_top` tests the full-size generator through its pins only. It
  programs all 49 bytes and measures every output on every clock. Each high
  phase must last `N` clocks, each period `M` clocks, and the first rise must
  come `M + 3` clocks after master clear. It also covers:
  - master clear keeping the bytes;
  - writes to unused select numbers;
  - rewriting `N` and `M` while running;
  - the write latency;
  - the extremes `M = 255` with `N = 1` and `254`, and `M = 2` with `N = 1`;
  - the out-of-rule values.

  It counts each of these mechanisms and fails if one never happened.
- `tb_clkgen_workloads` runs three example settings:
  - one output at 20/50;
  - eight outputs at 1, 2, 5, 7, 8, 22, 32 and 35 out of 36;
  - the programmable pulse, `(not OUT1) and OUT2`, which must start 5
    clocks into the period and last 7 clocks.
- The unit testbenches are:
  - `tb_octal_latch`: random writes;
  - `tb_eq_comparator`: all input pairs;
  - `tb_sync_counter`: several `M`, plus random restarts;
  - `tb_duty_ff`: random set, clear and clear-pin events;
  - `tb_ls_decoder`: all 128 select values;
  - `tb_channel_macro`: eight channels against a testbench counter.

Each testbench has also been shown to fail against a deliberately broken
copy of its module.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/clkgen_pkg.sv tb/tb_clkgen_top.sv \
          --top-module tb_clkgen_top -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.
