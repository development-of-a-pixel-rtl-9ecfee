# FPIX1 pixel readout chip in SystemVerilog

This is a behavioural-to-RTL model of FPIX1, the second Fermilab prototype readout chip for the
BTeV silicon pixel vertex detector. The Tevatron has a bunch crossing every 132 ns. The innermost
pixel chip has to read out about 1.25 hit pixels per crossing on average, and it must ride out
fluctuations well above that. FPIX1 uses indirect addressing to do it:

* A hit pixel stores only that it was hit and its 2-bit pulse height.
* The crossing number (a 6-bit time stamp) is stored once per column, at the end of the column,
  in one of four **EOC sets** (end-of-column command sets). All pixels of a column hit in the same
  crossing point to the same set.
* Readout is by crossing number. When the requested crossing number matches a set's stored
  number, that set tells its pixels to output. The pixels then go out one per readout clock, passed
  along by tokens, column after column.

The repository also holds the simpler token readout of the earlier test chip FPIX0 (a 64 × 12
array). It sits beside FPIX1 in the top level and is independent of it.

## Pixel array and commands

The FPIX1 array has 160 rows × 18 columns of 50 µm × 400 µm cells. All cells of a column share
four pairs of command lines, one pair per EOC set:

| code | command        | what a pixel does                                                      |
|------|----------------|------------------------------------------------------------------------|
| 00   | idle           | nothing                                                                |
| 01   | reset          | a pixel tied to this set drops its hit                                 |
| 10   | output         | a pixel tied to this set requests the column bus (raises RFastOR)      |
| 11   | look for data  | an empty pixel whose discriminator fires ties itself to this set and raises HFastOR |

At any time at most one set of a column issues *look for data*. A pixel that is hit while no set
looks for data loses the hit. Once tied to a set, a pixel ignores the other three sets. HFastOR and
RFastOR are wired-OR lines running down the whole column.

## Life of a hit

Below, `clk` is the readout clock. `bco_en` is a one-clock pulse marking each beam-crossing edge.

1. **Capture.** Set *k* of the column is selected by the priority encoder and issues *look for data*.
   A charge above the discriminator threshold makes the pixel store the hit at the next `clk`
   edge. In the same clock, HFastOR reaches set *k*, which loads the current crossing number
   CBCO into its time-stamp register (SBCO). The three ADC comparators set their flip-flops too.
2. **Close the crossing.** Set *k* keeps issuing *look for data* until the next `bco_en`, so every
   pixel of that crossing joins it. At that edge, set *k* switches to *idle*. The priority encoder
   also picks the next available set, keeping the current one if it got no hit. If all four sets
   hold data, no set looks for data and new hits are lost. So a column can buffer hits from four
   different crossings.
3. **Wait.** The set compares SBCO with the requested crossing number RBCO, and also with CBCO
   under a mask:
   * `SBCO == RBCO` (with RBCO valid) → *output*.
   * `((SBCO ^ CBCO) & reset_mask) == 0` → *reset* for one clock. With the low *k* bits compared,
     an unread hit is dropped 2^k crossings after it was taken. With all six bits compared, that is
     64 crossings.
4. **Output.** When the set issues *output*, the tied pixels raise RFastOR. The column's token and
   bus controller releases the **column token** at once. The token ripples up from row 0,
   skipping empty cells, and stops at the first requesting cell.
5. **Column readout.** The column may move only while it holds the chip-wide **EOC token**. At
   each `clk` edge, the cell holding the column token loads {row, ADC bits} onto the column bus
   for one clock. It then clears itself, which moves the token on to the next hit cell in that
   same edge. The result is one pixel per readout clock.
6. **Column handover.** RFastOR drops in the clock in which the column's last pixel is on the bus.
   The EOC token then passes on combinationally, so the next column with data reads at the very
   next edge. The output has no empty clock, within a column or between columns. When the last
   pixel has been read, the set goes back to free.

## Readout modes and the requested crossing

`rbco_counter` provides RBCO, and `readout_controller` frames events.

* **Continuous mode** (the reset default). RBCO is an internal counter that may never come closer
  than two counts behind CBCO, which gives hit data time to settle. While no column has data for
  the current RBCO, it advances one count per readout clock, so empty crossings are skipped
  quickly. When "chip has data" (any column with a set matching RBCO) goes high, the counter stops
  until that event has been read out.
* **Triggered mode.** An external `ext_trig` pulse with `ext_rbco` requests one crossing. Further
  triggers are ignored until that event is done (`trig_ready`). Crossings that are never requested
  are reset by the masked CBCO comparison.

For each event the readout controller does the following:

1. It waits for the chip readout token `chip_token_in`. A chip with nothing to send passes that
   token on at `chip_token_out`.
2. It sends a header word.
3. It injects the EOC token into column 0, already during the header clock.
4. It forwards every pixel word from the chip bus.
5. It finishes when the EOC token comes out of the last column.

In continuous mode, crossings without hits produce no output. In triggered mode, a crossing
without hits produces a header alone.

### Output words (`dout`, 16 bits, valid with `dout_valid`)

| word   | bit 15 | bits 14:10 | bits 9:0                                   |
|--------|--------|------------|--------------------------------------------|
| header | 1      | chip ID    | 9:6 zero, 5:0 requested crossing (RBCO)    |
| hit    | 0      | column     | 9:2 row, 1:0 ADC code                      |

The ADC code is the number of ADC thresholds the charge exceeded (0–3). The column bus carries
the raw three comparator flip-flops, and `adc_encoder` turns them into this code.

## Configuration

`chip_config` is one shift register, written serially with `ser_en` and `ser_in`. Bits leave at
`ser_out`, so chips can be chained. After `2·ROWS·COLS + 12` shifts, the first bit sent is the chip
ID MSB. The bits are sent in this order:

1. chip ID, 5 bits, MSB first
2. readout mode, 1 bit (1 = continuous)
3. reset mask, 6 bits, MSB first
4. per pixel, from column COLS-1 row ROWS-1 down to column 0 row 0: the kill bit, then the
   injection-select bit

The reset state is chip ID 0, continuous mode, mask `111111`, and no pixel killed or injected.
Settings change while they are being shifted, so reprogram only while the chip is idle.

## Analog front end

`pixel_frontend` is a **behavioural model**, not hardware. It takes the charge collected by the
sensor pixel in electrons (`q_sensor`) and adds the test charge `q_test` when the pixel's injection
bit is set. It clips the sum at the amplifier's dynamic range of 32000 e- and compares the result
with four thresholds, also in electrons: the discriminator threshold and three ADC thresholds. In
the chip these are DC levels shared by all pixels. Noise, pulse shape and time walk are not
modelled. The testbenches use a 2000 e- discriminator threshold and ADC thresholds of 6000, 12000
and 18000 e-.

One row of cells, `TEST_ROW` (row 0 by default), is brought out for direct observation. For each
column, `test_amp` carries that cell's amplifier output, here the clipped charge. `test_disc`
carries its discriminator output, taken before the kill switch. The chip has the same access for
one row of cells as analog pads.

## FPIX0 token readout

`fpix0_readout` models the 64 × 12 array of FPIX0. Each cell has a set-reset hit flip-flop, feeds
a chip-wide fast-OR and has a programmable kill. With `token_in` high, the token runs through
column 0 rows 0..63, then column 1, and so on. It skips cells without hits and stops at the first
hit cell, which puts its address `{column[3:0], row[5:0]}` on the output (`addr_valid`). Each
`token_advance` pulse resets that cell and moves the token on. `token_out` rises once no hit is
left. The analog peak-detector output that accompanies each address in the real chip is not
modelled.

## Module map

```
fpix_top                      both chips side by side (ports prefixed fpix1_ / fpix0_)
├── fpix1_chip   #(ROWS=160, COLS=18)
│   ├── chip_config           serial configuration, kill / inject bits, mode, mask, chip ID
│   ├── cbco_counter          current crossing number
│   ├── rbco_counter          requested crossing number, readout-mode select
│   ├── readout_controller    event framing, chip token, EOC token injection
│   │   └── adc_encoder       3 comparator bits -> 2-bit code
│   └── per column:
│       ├── pixel_column #(ROWS)
│       │   └── pixel_cell × ROWS
│       │       ├── pixel_frontend     (behavioural analog model)
│       │       ├── pixel_cmd_interp   association, HFastOR / RFastOR
│       │       ├── pixel_flash_adc    comparator set-reset flip-flops
│       │       └── pixel_bus_ctrl     column token, bus register
│       └── eoc_logic
│           ├── eoc_set × 4            time stamp, comparators, command FSM
│           ├── eoc_priority_encoder   which set looks for data
│           └── eoc_token_bus_ctrl     column token release, EOC token, bus connect
└── fpix0_readout #(ROWS=64, COLS=12)
    └── fpix0_cell × 768
```

`fpix1_pkg` holds the shared widths (6-bit crossing number, 8-bit row, 5-bit column, 5-bit chip
ID), the command enum and the word types. The row and column counts are parameters. The address
widths are fixed, so ROWS ≤ 256 and COLS ≤ 32. Every file starts with a comment covering its
interface, its timing and which parts are this model's own choices.

Tri-state buses are modelled as OR-reductions of words that are zero when not driven. The column
and EOC token chains are combinational ripple paths through the whole column and across all
columns.

## Where this model departs from the chip

* **One clock.** The chip has a separate Beam Crossing Clock. Here everything runs on the readout
  clock, and a crossing is a `bco_en` pulse. Hits are sampled on readout-clock edges. In the chip
  the pixel ties itself to a set asynchronously.
* **Readout gating.** A pixel holding the column token is read only while its column holds the EOC
  token (`advance`). The chip releases the column token early, but its description does not say
  how the pixel then waits. This gating is this model's choice.
* **Throttle** blocks new hits only. Hits already stored still obey *output* and *reset*.
* **Own choices where the source is silent:**
  * the output word format and header
  * the chip-ID width
  * the priority order of the EOC sets
  * the meaning of the mask bits
  * the trigger handshake
  * the chip-token protocol between chips
  * the configuration bit order
  * the scan order of FPIX0
  * which row is the directly observed test row
  * all reset values
* **Not built:**
  * the amplifier and comparator circuits, which are only modelled
  * the low-voltage differential I/O
  * the pads and power distribution
  * the extra FPIX1 column read out under external control
  * the FPIX0 peak detector
  * the Pre-FPIX1 analog test columns
  * the proposed faster variants (several column tokens, cluster readout)
* **Readout rate.** The chip reads one pixel per readout clock. An event costs about four extra
  clocks (arbitrate, header, finish, idle). Five hit pixels every fourth crossing therefore need
  about 2.25 readout clocks per crossing. This model does not fix the readout-clock frequency.
  `tb_workload_btev` measures this load on the full-size chip (see Verification).

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The chip-level test `tb_fpix1_chip` (16 × 4 array) and the
top-level test `tb_fpix_top` (full 160 × 18 plus 64 × 12) share `tb/fpix1_bench.svh`. That bench
has a reference model that predicts every output word. It checks that the words of an event come
on consecutive clocks. It also counts, and requires to happen at least once:

* continuous and triggered events
* empty triggered events
* time-stamp resets
* hits lost with all four sets busy
* throttle, killed pixels and test injection
* waiting for the chip token
* events spanning several columns
* all four ADC codes
* the test-row discriminator firing (the test-row outputs are also compared with the charge every
  clock)

`tb_workload_btev` drives the full-size chip with track clusters in continuous mode. Each hit
is checked to come out exactly once, in the event of its own crossing.

| load                                  | readout clocks per crossing | hits  | lost | mean delay (clocks) |
|---------------------------------------|-----------------------------|-------|------|---------------------|
| 5 pixels in 1 crossing of 4 (1.25/BCO) | 4                          | 1897  | 0    | 19                  |
| 12 pixels in 1 crossing of 4 (3/BCO)   | 4                          | 4059  | 358  | 144                 |
| 12 pixels in 1 crossing of 4 (3/BCO)   | 8                          | 4659  | 0    | 30                  |

The nominal load must lose nothing, and the testbench fails if it does. The heavier load is only
reported. At 4 clocks per crossing it fills the output bus completely, so all four EOC sets of a
column fill up. New hits are then lost, and hits that wait 64 crossings are reset.

Each module's testbench was also run against a deliberately broken copy of the module, and every
such copy made it fail.

To run a testbench with plain verilator, for example the top level at full size (about 1.5 min to
build, a few seconds to run):

```
verilator --binary --timing --assert -Irtl -Itb rtl/fpix1_pkg.sv tb/tb_fpix_top.sv \
          --top-module tb_fpix_top -Mdir obj_top
./obj_top/Vtb_fpix_top
```

Other modules are found through `-Irtl` as long as each file is named after its module. Replace
`tb_fpix_top` with any other `tb_*` name to run that testbench.
