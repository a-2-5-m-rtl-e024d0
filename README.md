# Digital core of a 9.5 Mpixel, 360 fps CMOS imager

This RTL is the digital core of a high-speed image sensor. The sensor has a
4224 x 2248 array of 2.5 µm pixels, grouped as 2112 x 1124 "four-shared"
pixels (a 2x2 group of photodiodes shares one floating diffusion and
readout transistor). It reads 360 raw frames per second. That is about
3.6 Gpixel/s of 16-bit words, or 58 Gb/s, over 32 LVDS lanes of 1.8 Gb/s.

Two ideas make this rate possible, and the RTL implements both:

* **Row addressing with bidirectional tokens.** A charge transfer needs
  about 1 µs, but one sample is only 618 ns long. So two rows must be
  active at once: one is read while the next is transferred. Six token
  shift registers run the rows. Because the tokens can move forward
  *and* backward, one register can pulse two different rows within a
  single row time.
* **A hybrid output multiplexer.** Every 132 column ADCs share one output
  word stream. Most of the selection uses slow, compact tristate buses.
  Only two registers per output run at the full word rate.

The pixel array, column ADCs, level shifters and LVDS pad drivers are
analog circuits and are not part of this RTL. Their signals are ports of
`imager_top`.

## Data path at a glance

```
                 external timing generator
                          |  vctrl[6] (token, shift, direction, enable)
                          v
   row_driver: 6 x vshift_reg (1124 stages) --> SEL/RST/TG_1/2/TG_0/3 x 1124 rows
                                                   (to level shifters, pixel array)

   adc[0][1055:0] (top ADCs)     adc[1][1055:0] (bottom ADCs), 16 bit each
        |                              |
   output_mux_side                output_mux_side
     mux_sequencer                  mux_sequencer
     8 x hybrid_mux132 (chained)    8 x hybrid_mux132 (chained)
        | 8 words                      | 8 words
   16 x lvds_serializer           16 x lvds_serializer      word_timer: word clock
        |                              |                     = bit clock / ser_factor
   lvds_sdo[0][15:0]              lvds_sdo[1][15:0]
```

The sizes are the chip's: 1124 rows, 1056 ADCs per side, 8 multiplexers
of 132 inputs per side, 2 lanes per multiplexer, 16-bit words. They are
the parameter defaults and the constants in `imager_pkg`.

## The hybrid output multiplexer

This is the part that is hardest to follow, so it gets the most space here.

### Structure (`hybrid_mux132`)

One 132:1 multiplexer has two *groups*. Each group holds:

1. **Six 11:1 tristate multiplexers** (`tristate_mux`). On the chip, eleven
   ADC outputs share one long bus, each through a tristate driver. All
   six share the one-hot select `mux_en[10:0]`. The bus is slow, so it
   gets a long time to settle. In RTL it is written as an AND-OR.
2. **A register stage** (`register_stage`). It latches the six bus values
   on `mux_reg_en`. After that, the buses can move on to the next input.
3. **A 6:1 multiplexer** (`stage_mux`), selected by `load_sel[2:0]`.
4. **A chain cell** (`chain_cell`): a 2:1 multiplexer in front of a
   register. On a word clock it either *loads* the 6:1 output or
   *shifts*, taking the word from the next cell along the chain.

The two chain cells form a two-word shift register. Group 0's cell drives
`mux_o`. Group 1's cell feeds group 0's cell, and group 1 in turn takes
`mux_i`, the output of the previous multiplexer in the daisy chain.

Column order is a choice of this design. Group `g`, tristate multiplexer
`m`, input `p` reads column `g*66 + m*11 + p` of the multiplexer.

### One readout (`mux_sequencer`)

A sequencer drives the control lines of all eight multiplexers of a side
together (`imager_pkg::mux_ctrl_t`). All registers advance only on the
word clock enable `adv`. With daisy-chain length `L` (1, 2, 4 or 8), a
readout runs like this:

```
word clock 0          : mux_reg_en, latch tristate input 0; mux_en -> input 1
then for p = 0..10    : for s = 0..5:
                          load (load_sel = s), then 2L-1 shifts
                        on the last shift of s = 5: latch input p+1, mux_en -> p+2
```

* A readout takes `1 + 132*L` word clocks.
* The output carries a new word on every word clock, with no gaps, because
  the register stage is re-latched on a clock edge where the chain is
  shifting, not loading.
* Each tristate input has `12*L` word clocks to settle.
* Register stages are written once every `12*L` word clocks. Only the
  chain cells run at the word rate, which is the point of the design.

`out_valid` marks the words at `mux_o` that are pixel data. `row_done`
pulses on the last word clock. The last word is at the outputs just after
that clock.

### Daisy chaining (`output_mux_side`)

The eight multiplexers of a side are always wired into a chain:
multiplexer `k`'s output register feeds `mux_i` of multiplexer `k+1`. The
chain length is set only by how often the sequencer loads:

* `L = 1` (`chain_log2 = 0`): load every 2 word clocks. All 8 outputs, and
  all 16 lanes of the side, carry data. The neighbour's word that shifts
  in is pushed out again before it reaches `mux_o`.
* `L = 2, 4, 8`: load every `2L` word clocks. In each run of `L`
  multiplexers, only the last one (`k mod L = L-1`) delivers data. Its
  output carries the words of multiplexers `k, k-1, ... k-L+1`, group 0
  before group 1. This trades active lanes for readout time, which grows
  by a factor of `L`.

The word order on an active output is therefore: for `p` in 0..10, for
`s` in 0..5, for `j = k` down to `k-L+1`, for `g` in 0..1, column
`j*132 + g*66 + s*11 + p`.

## Serial outputs

`word_timer` divides the bit clock by `ser_factor` (1 to 16). Its pulse
is both the multiplexers' word clock and the serializers' load.

Each multiplexer output feeds two `lvds_serializer` lanes. Each lane
sends `ser_factor` bits per word, least significant bit first:

* lane 0 sends bits `[f-1:0]`;
* lane 1 sends bits `[2f-1:f]`.

Use factor 8 for 16-bit ADC words and factor 6 for the chip's 12-bit
mode. At factor 8, one readout (133 word clocks) lasts 1064 bit clocks,
or 591 ns at 1.8 Gb/s. That fits in the 618 ns sample time of 360 fps.
It also means each column ADC is read at up to 1.69 Msample/s, which
matches the ADC's maximum rate of 1.7 MS/s.

Two sync outputs per side go with the lanes: `lvds_frame` is high during
the first bit of every word, and `lvds_valid` marks words that carry
pixel data. Both are this design's own; the original framing is unknown.

## Row addressing

Each `vshift_reg` has one stage per shared row, 1124 in all:

* A forward shift (`fw_bwn = 1`) moves every token one row down and
  takes `tok` into row 0.
* A backward shift moves tokens one row up and fills the last row with 0.

`row_driver` holds six of these registers: select1, select2, reset1,
reset2, TG1/2 and TG0/3. Per row it forms:

```
SEL(n)     = select1(n)&en_sel1 | select2(n)&en_sel2
RST(n)     = reset1(n)&en_rst1  | reset2(n)&en_rst2
TG_1/2(n)  = tg12(n)&en_tg12
TG_0/3(n)  = tg03(n)&en_tg03
```

The external timing generator controls all of it. For each register it
sets the token, a shift strobe, the direction and an enable
(`vreg_ctrl_t`). The enables make sure only the intended rows get a pulse
while a token passes over the others.

### The dual-row pattern

A row time has 8 sample slots of 618 ns. With digital double sampling,
every sample of a pixel comes as a reset level plus a signal. The
select1/reset1 pair works on one pair of shared rows while the
select2/reset2 pair works on another, three rows further down. Their
samples interleave on the column line: two slots for one pair, then two
for the other.

A transfer pulse spans two slots, 1.24 µs, which is longer than the 1 µs
the charge transfer needs. Each transfer line is cross-connected between
neighbouring shared rows:

* `TG_1/2(m)` moves photodiode C of row m and B of row m+1;
* `TG_0/3(m)` moves D of row m-1 and A of row m.

So one pulse puts a fresh signal on two floating diffusions, and the
select register reads both in the next two slots.

The transfer tokens walk one row per two slots, backward and forward. For
example, TG1/2 visits n+3, n+2, **n+1**, n+2, n+3, n+4, n+5, **n+6**,
n+5, n+4, **n+3**, n+4, where bold marks a pulse. This way a single
register serves both row pairs.

`tb_row_timing` replays three row times of this pattern on all six
registers. A model of the floating diffusions (`tb/pixel_fd_model.sv`)
checks that each of the 26 select pulses reads what it should: a fresh
reset level, or exactly one photodiode's charge.

## Interface and timing of `imager_top`

* **Clock and reset.** There is one clock, `clk`, the serial bit clock.
  Reset `rst_n` is active low and asynchronous. On the chip, the shift
  registers have their own clocks from the timing generator; here each
  register's clock is a `shift` strobe on `clk`.
* **Starting a readout.** Pulse `row_start` while both sides' `adc` words
  are stable. They must stay stable until `row_done`. Both sides read in
  parallel. Set `chain_log2` and `ser_factor` before `row_start`, and do
  not change them during a readout.
* **Outputs.**
  * `lvds_sdo[side][lane]`: lane `2k` and `2k+1` belong to multiplexer
    `k`. Side 0 is the top of the array.
  * `row_sel`, `row_rst`, `row_tg12`, `row_tg03`: the 1124-bit row lines
    that go to the level shifters.

## How far to trust it, and where it departs from the original

From the original chip description:

* the block structure and sizes: 11:1 / register stage / 6:1 / two-deep
  chain, 132 inputs, 8 multiplexers and 16 lanes per side, 16-bit words;
* the six row registers with forward/backward shifting;
* the OR-combining of the select and reset pairs;
* the control names `mux_en`, `mux_reg_en` and `load_sel`;
* the transfer-token walk used in the tests.

Choices of this design, because the original does not give them:

* all control timing: sequencer order, latch point, the priming word
  clock, chain lengths 1/2/4/8;
* the column order inside a multiplexer;
* the single clock with enables, and the reset;
* the output enables of the row registers;
* the lane split, bit order and sync outputs of the serializers;
* `ser_factor` values 8 and 6;
* backward shifts filling the last row with zero.

The tristate bus is modelled as logic. Its settling and contention are not
modelled; an assertion flags two enabled drivers.

Not in this RTL: the pixel array, the column ADCs (with their double
sampling capacitors), the level shifters, the LVDS drivers, the external
timing generator, and digital double sampling. DDS subtracts the reset
sample from the signal sample off chip, which turns 360 raw frames into
180 frames per second.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example, the full-size end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/imager_pkg.sv tb/tb_imager_top.sv --top-module tb_imager_top -Mdir obj -o sim
./obj/sim
```

`tb_imager_top` uses the default sizes. It:

* replays the row-token pattern and a dual-row select;
* reads random rows in three modes, deserializes all active lanes and
  checks every word and the row time:
  * 16 bit, factor 8, no chain;
  * 12 bit, factor 6, chains of 2;
  * 16 bit, factor 8, one chain of 8;
* counts that every mechanism occurred: forward and backward shifts,
  transfer pulses, register-stage latches, loads, shifts, words passed
  along the chain, and both serialization factors.

It finishes in well under a second.

`tb_frame_360fps` is a full frame of the data path. It also runs at the
default sizes:

* 1124 rows x 8 samples = 8992 readouts per side;
* every one of the 19 million words is checked;
* it checks that no sample takes more than 1112 bit clocks (618 ns at
  1.8 Gb/s).

The frame takes 9,567,488 bit clocks. That is 5.3 ms at 1.8 Gb/s, or
about 376 raw frames per second. Simulation takes about 12 s.

`tb_row_timing` is the dual-row pattern test described above.

| file | contents |
|---|---|
| `rtl/imager_pkg.sv` | sizes, `mux_ctrl_t`, `vreg_ctrl_t`, register names |
| `rtl/imager_top.sv` | top level |
| `rtl/row_driver.sv`, `rtl/vshift_reg.sv` | row addressing |
| `rtl/output_mux_side.sv`, `rtl/mux_sequencer.sv`, `rtl/hybrid_mux132.sv` | output multiplexer |
| `rtl/tristate_mux.sv`, `rtl/register_stage.sv`, `rtl/stage_mux.sv`, `rtl/chain_cell.sv` | multiplexer parts |
| `rtl/word_timer.sv`, `rtl/lvds_serializer.sv` | serial outputs |
| `tb/tb_<module>.sv` | testbench of each module |
| `tb/tb_row_timing.sv`, `tb/pixel_fd_model.sv` | dual-row pattern against a floating-diffusion model |
| `tb/tb_frame_360fps.sv` | one full frame through the output path |
