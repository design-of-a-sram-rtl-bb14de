# Self-timed SRAM controller for an in-memory-computing weight array

An in-memory-computing (IMC) array multiplies an input vector by a matrix of
neural-network weights where the weights are stored: in the SRAM cells
themselves. Networks rarely fit in the array, so the weights have to be
reloaded often, and the plain memory-access side of the array, the part that
writes weights in, limits the accelerator. This design is that side:
a 1 kbit SRAM (128 words of 8 bits) in four banks around one central
controller. It writes a word in **one clock period** and reads one in **two**.
The controller is not a state machine. It is five flip-flops, clocked on both
clock edges and on the end of a self-timed precharge pulse.

The analog computing parts of an IMC array (word-line DACs, multiplying DACs,
column amplifiers and ADCs) are not part of this design. The word lines,
where the word-line DACs would connect, are brought out of the top.

## Floorplan and address map

```
          left banks         right banks
        +-----------+-----+-----------+
 top    |  bank 0   | row |  bank 2   |   row decoder drives both banks of its half
        | 16 x 16   | dec |  16 x 16  |
        +-----------+-----+-----------+
        |  I/O left | CTRL|  I/O right|   I/O block serves both banks of its side
        +-----------+-----+-----------+
 bottom |  bank 1   | row |  bank 3   |
        | 16 x 16   | dec |  16 x 16  |
        +-----------+-----+-----------+
```

This is the "full butterfly" arrangement. The control block sits in the
middle, so no wire runs more than half the array. Each bank has 16 word lines
and 16 bit-line pairs. Two columns share one sense amplifier and write driver
through a 2:1 column multiplexer, so a bank row holds two 8-bit words.
Exactly one bank takes part in an access.

| address bits | field      | selects                                        |
|--------------|------------|------------------------------------------------|
| `addr[3:0]`  | `row`      | one of 16 word lines                           |
| `addr[4]`    | `col`      | even or odd column of each pair                |
| `addr[5]`    | `bot`      | top (0) or bottom (1) row decoder              |
| `addr[6]`    | `side`     | left (0) or right (1) I/O block                |

Bits 3..0 feeding the row decoder and bit 5 choosing top or bottom follow the
reference schematics. The roles of bits 4 and 6 are this design's choice.
Bank index `{side, bot}` is 0 = top-left, 1 = bottom-left, 2 = top-right,
3 = bottom-right.

## The controller (`mem_ctrl`)

The controller has no state register or counter. It turns the read/write pin
`rw` into four control levels with five flip-flops, and their timing comes from
three sources: the rising clock edge, the falling clock edge, and the end of
the precharge pulse as it comes back through a chain of four inverters
(`pch_delay_chain`).

| flip-flop   | clock                 | D          | async pin                         | output     |
|-------------|-----------------------|------------|-----------------------------------|------------|
| precharge   | CLK rising            | `senseb`   | clear while delayed PCHB is low   | `pch_en`, `pchb` |
| arming      | delayed PCHB rising   | 0          | set while CLK is low              | `wl_set_n` |
| word line   | CLK rising            | `sense_en` | set while `wl_set_n` is low       | `wl_en`    |
| sense hold  | CLK rising            | 0          | set while `wl_en` is low          | `sense_clr_n` |
| sense       | CLK falling           | `rw`       | clear while `sense_clr_n` is low  | `sense_en` |

`write_en = ~rw & wl_en` is a gate, not a flip-flop, so it follows the word
line enable without a clock delay.

**Precharge is a self-timed pulse.** At a rising edge the precharge flip-flop
is set, unless the sense amplifiers were on in the half period before. Its
inverted output `pchb` runs through the four-inverter chain and clears the
flip-flop again. The pulse therefore lasts one chain delay, whatever the
clock period. That is `4 x INV_DELAY_PS` = 120 ps with the defaults.

**The word line is on except during precharge.** The word-line flip-flop
loads `sense_en` at the rising edge. That is 0 unless a read is in its second
period, so the word line drops while the bit lines precharge. When the delayed
`pchb` rises again, the precharge is over. The arming flip-flop then sets the
word-line flip-flop asynchronously, and `wl_en` stays high until the next
rising edge. The arming flip-flop is held set while CLK is low, which prepares
it for the next period.

**A write takes one period.** With `rw` low the period is: precharge pulse,
then `wl_en` and `write_en` together until the next rising edge. The write
driver forces the bit lines and the cell flips during that time.

**A read takes two periods.** With `rw` high, the sense flip-flop loads 1 at
the falling edge of the first period. The sense amplifiers then fire for the
second half period, with the word line already up on precharged bit lines. At
the next rising edge the sense-hold flip-flop sees `wl_en` high and clears the
sense flip-flop, which closes the read latches. The same edge keeps `wl_en`
high (it loads `sense_en`, still 1 at that edge) and suppresses precharge
(`senseb` was 0). The second period therefore has the word line on and nothing
else. The sense-hold flip-flop stays cleared, and the sense amplifiers stay
off, until `wl_en` falls at the next rising edge, where the following access
starts with a precharge.

```
period        |  write  |  read, 1st  |  read, 2nd  |  write  |
pch_en        |P_______ |P__________  |____________ |P_______ |
wl_en         |_/~~~~~~ |_/~~~~~~~~~~ |~~~~~~~~~~~~ |_/~~~~~~ |
write_en      |_/~~~~~~ |____________ |____________ |_/~~~~~~ |
sense_en      |________ |______/~~~~~ |\___________ |________ |
data_o valid  |         |      ^ from here, held by the latches
```

**Input timing.** Neither the address nor `rw` is latched. They must be
stable from shortly after the rising edge that starts an access until the
access ends. They may change only in the short window between that edge and
the end of the precharge pulse, while every word line is low. The testbenches
change inputs 50 ps after the rising edge. `rw` must be valid at the falling
edge of the first period of a read. Assertions in `imc_sram_top` report an
address or `rw` change while `wl_en` is high.

**There is no idle state.** The controller is always active. Every period with
`rw` low writes `data_i` to `addr`, and there is no chip-enable pin. A host with
nothing to do holds `rw` high: reads change nothing.

## Bank selection, row decoding, data latches

* `bank_select` passes `wl_en` to the top row decoder when `addr[5]` is 0 and
  to the bottom one when it is 1 (an inverter and two AND gates). It gates
  the write-driver and sense enables of the left and right I/O blocks with
  `addr[6]` in the same way, so only one bank's write drivers are on.
* `row_decoder` has one AND gate per word line, fed with the true or inverted
  form of each of the four row-address bits, followed by an AND with the
  enable. There is no predecoding, which is adequate at 16 rows.
* `data_latches` puts level-sensitive latches on both directions of the data
  bus. The write latches are transparent while `rw` is low. The read latches
  are transparent while `rw & sense_en` is high, which is the sensing half
  period, and hold the result afterwards. The pad is split into `data_i`,
  `data_o` and `data_oe` (`data_oe = rw`). A tri-state pad driver would join
  them into the original bidirectional bus. The latches are intentional:
  lint tools report them.

## The banks are behavioural models

`sram_bank` and `pch_delay_chain` are **behavioural models**, not
synthesizable logic. They stand for transistor circuits: 6T cells, PMOS
precharge with equaliser, NMOS write drivers, pass-gate column multiplexers,
current-mirror sense amplifiers, and a chain of minimum-size inverters. The
bank model gives the bit lines two-valued behaviour:

* precharge pulls both bit lines of every column high;
* a write driver forces BL/BLB of its selected column, and every cell on a
  raised word line in that column takes the value;
* otherwise a raised word line lets each cell pull down the bit line on its
  0 side, and the bit line stays low until the next precharge;
* the sense amplifier outputs 1 when BL is high and BLB low.

These rules are enough to catch a controller that senses without a
precharge, writes during a read, or raises a word line in the wrong bank.
They say nothing about analog margins. Cells power up at random. An assertion
flags more than one raised word line in a bank. For a real chip, replace both
models with the memory and delay cells of the target process. The rest of the
RTL (controller, bank select, decoders, latches) is synthesizable. The
controller deliberately drives asynchronous set and clear pins from logic:
that is how it times its pulses, and a synthesis flow must be told not to
"fix" it.

## Where this design departs from, or fills in, the reference design

* **Size.** The reference calls the memory "1 kB". Its four 256-bit banks
  and 7-bit address both give 1024 bits, and that is what is built.
* **Delay-chain nets.** The reference schematic feeds the precharge
  flip-flop's clear pin and the arming flip-flop's clock from two
  feedback nets that it does not define. Both are taken as the chain output,
  the delayed `pchb`. This reproduces the described behaviour: a short
  precharge, and a word line that is on except during precharge.
* **Inverter delay.** 30 ps per inverter (`INV_DELAY_PS`) is assumed; no
  figure for it is given.
* **Reset.** The reference only says reset is done with pull-down
  transistors. Here `rst` (active high) clears precharge, word line and sense
  enable.
* **Address bits 4 and 6, the read multiplexer between banks, the split
  data bus** are this design's choices.
* **Not built:** the word-line DACs, R-2R multiplying DACs, transimpedance
  amplifiers, ADCs and activation function of the computing mode. Also not
  built: a power-down mode, which the reference does not have. The earlier
  two-period-write controller and the single-array "quad butterfly" layout
  were only comparison points and are not included.

## Files

| file | contents |
|------|----------|
| `rtl/imc_sram_pkg.sv`    | sizes, address struct `addr_t`, read/write encoding |
| `rtl/imc_sram_top.sv`    | the whole memory: controller, chain, bank select, two row decoders, latches, four banks |
| `rtl/mem_ctrl.sv`        | self-timed controller |
| `rtl/pch_delay_chain.sv` | behavioural four-inverter delay chain |
| `rtl/bank_select.sv`     | top/bottom word-line enable and left/right I/O enables |
| `rtl/row_decoder.sv`     | AND-gate row decoder |
| `rtl/data_latches.sv`    | data-bus latches |
| `rtl/sram_bank.sv`       | behavioural 16 x 16 bank with column circuits |
| `tb/tb_<module>.sv`      | one self-checking testbench per module |

Top parameters: `INV_DELAY_PS` (default 30). Sizes (8-bit data, 7-bit
address, 16 rows, 2:1 multiplexing) are fixed in `imc_sram_pkg`.

## Simulating

All files use `timescale 1ps/1ps`. The models contain delays, so Verilator
needs `--timing`:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/imc_sram_pkg.sv tb/tb_imc_sram_top.sv --top-module tb_imc_sram_top
./obj_dir/Vtb_imc_sram_top
```

Any other testbench builds the same way with its own name. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

What the testbenches cover:

* `tb_imc_sram_top` runs the memory at its default size with a 1 ns clock.
  It replays a short write/read sequence (0x01 to 0x00 and read back, 0x04
  to 0x02, 0x06 to 0x04, read all back), loads all 128 words at one write per
  period, and reads them all back at one read per two periods. It then runs
  400 random accesses. It checks every read twice against a shadow copy:
  during sensing, and at the end of the read from the latches. In every
  period it also checks the control levels, the raised word line and the
  period count of each access. It counts precharge pulses, accesses per bank
  and per column-select value, latch holds and read second periods; a count
  of zero is a failure.
* `tb_mem_ctrl` checks the controller alone against an ideal 120 ps delay.
  It covers the pulse width, the level of every control early, mid and late
  in each kind of period, and that precharge and word line enable never
  overlap.
* `tb_sram_bank`, `tb_row_decoder`, `tb_bank_select`, `tb_data_latches` and
  `tb_pch_delay_chain` check their module alone. The combinational blocks
  are checked exhaustively.
