# Quinquenary pulse-compression waveform generator

A pulse-compression radar transmits a long pulse that is coded, element by
element, so that the receiver can correlate it back into a short, sharp
peak. In a *quinquenary* code every element is one of five values:
+1, +2, -1, -2 or 0. This design turns a stream of such elements into the
digital transmit waveform: each element becomes one period of a sinusoid
whose amplitude is the element's value (a negative value is the same
sinusoid in opposite phase, 0 is silence). The samples go, one per clock,
to an external D/A converter followed by a smoothing filter.

The whole generator is table lookup. Five small memories each hold one
sinusoid period, one memory per element value. A counter walks the address
through the period, a demultiplexer picks the memory that matches the
current element, and a multiplexer passes that memory's sample on. With
`DEPTH` samples per period (8 by default) the carrier frequency is exactly
`f_clk / DEPTH`, so the carrier is changed by changing the clock, and the
highest carrier is the highest clock the device runs at divided by 8.

## Element codes and sample tables

Elements arrive on a 3-bit bus in this code:

| element | code  | memory  |
|---------|-------|---------|
| +1      | `001` | Memory1 |
| +2      | `101` | Memory2 |
| -1      | `011` | Memory3 |
| -2      | `111` | Memory4 |
| 0       | `000` | Memory5 |

The codes `010`, `100` and `110` are not elements. The generator sends them
as 0 (silence) and raises `code_err` in the cycle it takes them.

Each memory is `DEPTH` x `WIDTH` bits (8 x 8 by default). Location `k` of
the memory for amplitude `A` holds

    round(A * AMP_UNIT * sin(2*pi*k/DEPTH))

in two's complement, with `AMP_UNIT = 63` for 8-bit samples. At the default
size this gives:

| k     | 0 | 1   | 2    | 3   | 4 | 5   | 6    | 7   |
|-------|---|-----|------|-----|---|-----|------|-----|
| A=+1  | 0 | 45  | 63   | 45  | 0 | -45 | -63  | -45 |
| A=+2  | 0 | 89  | 126  | 89  | 0 | -89 | -126 | -89 |
| A=-1  | 0 | -45 | -63  | -45 | 0 | 45  | 63   | 45  |
| A=-2  | 0 | -89 | -126 | -89 | 0 | 89  | 126  | 89  |
| A=0   | 0 | 0   | 0    | 0   | 0 | 0   | 0    | 0   |

The tables are computed while the design is elaborated (a constant function
using `$sin`), so there is no data file. Each memory is a ROM to synthesis.
Setting `DEPTH = 256` gives a 256-sample period, for a finer waveform at a
carrier of `f_clk / 256`.

Every element starts at sample 0, a zero crossing, and a whole period is
always sent. An element boundary therefore never puts a jump in the
waveform. A change of sign is a 180-degree phase change, and a change of
amplitude is a step in envelope.

## Timing of the element stream

The generator takes one element every `DEPTH` clocks while `run` is high:

```
clk        _/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_/~\_
run        ___/~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~
elem_code  ===< e0                >< e1 ...
elem_ack   ___/~~~\___________________________/~~~\_____   (every DEPTH clocks)
dac_valid  _______/~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~
dac_data   =======<s0 ><s1 ><s2 > ... <s7 ><s0 of e1 ...
```

* `elem_code` is sampled in the clock in which `elem_ack` is high, the first
  clock of an element period, and held inside for the rest of the period.
  A source keeps the next element on the bus until it sees `elem_ack`, then
  moves on. Nothing else about the bus matters between acknowledgements.
* The first sample of an element appears on `dac_data` one clock after its
  `elem_ack`, and the other `DEPTH-1` samples follow on consecutive clocks.
  Back-to-back elements follow without a gap.
* Dropping `run` stops the output at once. `dac_valid` and `dac_data` go to
  0 one clock later. An element that is cut short this way is not resumed:
  the address goes back to 0, and the next rising `run` starts a new element
  with a new `elem_ack`.
* `rst_n` is an asynchronous, active-low reset of the address, the held
  element and the output select. The sample registers in the memories are
  not reset, because the multiplexer passes none of them until a read has
  filled it.

## Structure

```
elem_code --> [held element] --> element_demux --one-hot read enable--> 5 x sine_sample_rom
                                                                               | samples
run --> sample_addr_counter --address--> (all five memories)                   v
                      |                                      select (1 clk) --> sample_mux --> dac_data
                      +--> elem_ack
```

| module                | role |
|-----------------------|------|
| `quin_pkg`            | element codes (`elem_code_e`), memory indices, `mem_sel_t`, amplitude of each memory |
| `sine_sample_rom`     | one sample memory (Memory1..Memory5 are five instances with different `AMPLITUDE`) with a registered read and a read enable |
| `sample_addr_counter` | steps the address 0..DEPTH-1, one location per clock; marks the first and last clock of a period; holds at 0 while `run` is low |
| `element_demux`       | decodes the element code into a one-hot read enable for the five memories; flags unused codes |
| `sample_mux`          | one-hot AND-OR multiplexer from the five memories to the D/A port; 0 when nothing is selected |
| `quin_pcs_gen`        | top: wires the above, holds the element for its period, delays the select by one clock to line it up with the registered read |

The one subtle point is the alignment. The memory read is registered, so
the sample read at address `k` appears a clock later. The multiplexer must
therefore use the select of the clock in which the read happened, not the
current one. Otherwise, at every change of element, the first sample of
the new element would come from the old memory. `quin_pcs_gen` keeps that
select in a register (`sel_q`). It also asserts, in simulation, that the
read select and the output select are never more than one-hot.

At the default size the design holds 320 bits of table (5 x 8 x 8) and 12
flip-flops.

### Parameters of `quin_pcs_gen`

| parameter  | default | meaning |
|------------|---------|---------|
| `DEPTH`    | 8       | samples per element (carrier = f_clk / DEPTH); 256 is the larger size intended for finer waveforms |
| `WIDTH`    | 8       | sample width |
| `AMP_UNIT` | 63      | code value of one amplitude unit, `(2**(WIDTH-1)-1)/2` by default so that amplitude 2 fits |

### Ports of `quin_pcs_gen`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | sample clock |
| `rst_n`     | in  | 1     | asynchronous active-low reset |
| `run`       | in  | 1     | generate while high |
| `elem_code` | in  | 3     | current element (codes above) |
| `elem_ack`  | out | 1     | element taken this clock |
| `code_err`  | out | 1     | the taken code was not an element (sent as 0) |
| `dac_data`  | out | WIDTH | two's-complement sample for the D/A converter |
| `dac_valid` | out | 1     | `dac_data` belongs to an element |

## What is fixed by the architecture and what is chosen here

Taken from the architecture:
* the five element values and their 3-bit codes;
* one memory per element value, 8 x 8 bits, each holding one period of a
  sinusoid of that amplitude, with 256 x 8 as the larger option;
* a demultiplexer and a multiplexer that select the memory of the current
  element;
* 8 clocks per element, one sample per clock, so the carrier is f_clk / 8.

Chosen in this design:
* the sample format (two's complement), the scale (63 codes per unit) and
  the phase (each period starts at a zero crossing);
* registered memory reads with a read enable from the demultiplexer, and
  the one-clock select delay that this requires;
* the `run` / `elem_ack` interface to the element source, the `dac_valid`
  flag, the reset, and the handling of the unused codes.

The reference implementation used only a 3-bit element input and an 8-bit
sample output (11 pins). `run`, `rst_n`, `elem_ack`, `code_err` and
`dac_valid` are added here so that a sequence source can be attached and
the generator tested. A design that has no use for them can tie `run` high
and ignore the outputs.

Not part of this RTL:
* the D/A converter and the reconstruction filter, which are analog parts
  outside the chip; `dac_data` is the converter's input;
* the source of the sequence itself. The elements are meant to come from a
  separate circuit that searches for codes with good merit factor, and that
  circuit is not described here. Any logic that presents elements and
  watches `elem_ack` will do.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_sine_sample_rom`    | all 40 samples of the five default memories against the table above; read latency and hold with `rd_en` low; a 256-deep memory at its peaks and zero crossings, for odd and quarter-wave symmetry and monotonic rise |
| `tb_sample_addr_counter`| address sequence and wrap, `sym_start` / `sym_last`, 8-clock period, stop and restart with `run`, asynchronous reset |
| `tb_element_demux`      | all 8 codes with enable high and low |
| `tb_sample_mux`         | random samples under every one-hot select and the empty select |
| `tb_quin_pcs_gen`       | the top at its default size, end to end (below) |
| `tb_quin_pcs_gen_256`   | the top with `DEPTH = 256`: each element once, samples within one code of the ideal sinusoid, 256-clock periods |

`tb_quin_pcs_gen` feeds the generator a pattern of eight elements for each
of six element pairs: +1/+2, +1/-2, -1/+2, -1/-2, +2/0 and +2/-2. It then
sends 30 random elements and the three unused codes. `run` is dropped once
between elements and once in the middle of an element. A cycle model with
its own tables predicts `dac_data`, `dac_valid`, `elem_ack` and `code_err`
on every clock, which also pins down the one-clock latency and the 8-clock
element period. The testbench counts every element value, every pair
transition, the unused codes, both kinds of stop, the restarts and the
back-to-back elements. A case that never happened counts as a failure.

To run one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/quin_pkg.sv tb/tb_quin_pcs_gen.sv \
    --top-module tb_quin_pcs_gen
./obj_dir/Vtb_quin_pcs_gen
```

Swap in another testbench name to run another. Each one runs in well under
a second.

## Changing the design

* **Finer waveform:** set `DEPTH` (256 is the intended larger size). The
  tables and the address width follow. The carrier becomes f_clk / DEPTH.
* **Wider D/A converter:** set `WIDTH`. `AMP_UNIT` follows unless it is set.
  If the converter wants offset binary rather than two's complement, invert
  the top bit of `dac_data`.
* **Different amplitudes or alphabet:** the amplitude of each memory comes
  from `quin_pkg::mem_amplitude`, and the code-to-memory map is in
  `element_demux`.
