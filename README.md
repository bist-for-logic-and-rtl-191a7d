# Circular-comparison BIST for the logic and memory of a Virtex-4 class FPGA

An FPGA can test itself. You configure part of the array as test pattern
generators (TPGs) and output response analyzers (ORAs), and the rest as
identical copies of the resource under test, the blocks under test (BUTs).
Every BUT gets the same patterns. A fault-free BUT therefore gives exactly
the same outputs as its neighbours. An ORA does not need expected values: it
compares two neighbouring BUTs, and any difference is a fault.

This RTL models that scheme for the three resources of a Virtex-4 class
device that it covers:

* the programmable logic blocks (PLBs: four slices, each with two 4-input
  LUTs, carry logic and two flip-flops);
* the LUTs of the SliceM slices used as small RAMs (LUT RAMs);
* the 18K-bit dual-port block RAMs.

The BUTs are plain RTL models of those resources. Each model includes a
fault-injection input, so a testbench can show that the BIST finds a fault
and points at the right block. The BIST structures around them (TPGs, ORAs,
the comparison rings, the session sequencing and the readback of results)
are the actual subject of the design.

## The three ideas the design rests on

**Circular comparison.** BUTs and ORAs alternate along a line that closes
into a ring. ORA *k* compares the BUT on its left with the BUT on its right.
So every BUT is watched by two ORAs and compared with two different
neighbours. No BUT sits at an edge where only one ORA would see it.

Two TPGs feed alternate BUTs, so each ORA compares one BUT from each TPG.
This makes the diagnosis readable:

| Fault | ORA flags that are set |
|-------|------------------------|
| One faulty BUT | The two ORAs on either side of it |
| A faulty TPG | Every ORA |

**One ORA = one LUT + one flip-flop.** The ORA LUT computes
`(left xor right) or fail` and the flip-flop holds `fail` (`ora_cell`). A
slice holds two ORAs and a PLB holds eight, one per observed output of a
neighbouring BUT PLB. The ORA therefore tells you which output of the BUT
failed, as well as which BUT. The flags are not scanned out: they are read
through configuration readback.

**The results stay put between configurations.** A test session applies
several BUT configurations in a row. Only the BUTs are reconfigured; the ORA
flip-flops keep their state. The flags are therefore read once, at the end of
the session. This is the fastest way to run the test. The cost is that you
learn *which* PLB failed, but not in *which* configuration.

## PLB BIST (`plb_bist_group`, `bist_session_ctrl`, `frame_readback`)

### Four-row groups

One pair of TPGs for the whole array would load each TPG output with
thousands of slice inputs. Instead, the array is cut into groups of four PLB
rows. Each group has its own two TPGs, the two DSP slices of those rows
(`plb_bist_group`). A TPG then drives `COLS` BUT PLBs, that is `COLS x 4`
slices. This load depends only on the number of columns:

| Device | Slices per TPG |
|--------|----------------|
| 116-column device | 464 |
| Default 28-column array | 112 |

Inside a group, each of the four rows is its own ring. Which columns are BUTs
depends on the test session:

| Session | ORA columns | BUT columns |
|---------|-------------|-------------|
| 0 | even | odd |
| 1 | odd | even |

Two sessions therefore test every PLB once.

BUT column *b* (counting BUT columns only) takes TPG `b mod 2`. With `COLS` a
multiple of 4, the ring alternates between the two TPGs all the way round,
including across the wrap-around.

### The TPG

Each TPG is a DSP in accumulator mode (`acc_tpg`). It is cleared to 0 at the
start of each configuration and adds `0x691` on every clock. Its low 12 bits
go to the 12 inputs of every BUT slice: G1-G4, F1-F4, BY, BX, CE and SR.

Because `0x691` is odd, the 12 bits step through all 4,096 values in 4,096
clocks. They give more bit transitions than a binary counter would. The
testbench checks both properties.

### The twelve configurations of a session

`bist_pkg::plb_cfg(k)` lists the twelve configurations. Each one is a LUT
pair plus control options:

| Configurations | What they exercise |
|----------------|--------------------|
| 0-2 | XOR, XNOR, AND, OR, NAND and NOR of the four LUT inputs |
| 3-6 | Sum outputs through the carry logic, with both carry-row selections |
| 7-9 | Clock enable; synchronous set/reset to 0 and to 1 |
| 10-11 | SliceM LUTs as 16-bit shift registers, with the ORAs watching the combinational X/Y outputs instead of XQ/YQ |

The shift-register configurations behave differently in the two slice types:

* In SliceM slices, the LUTs shift.
* In SliceL slices, which cannot shift, the same configuration acts as a
  constant LUT.

In the device, moving the ORAs from XQ/YQ to X/Y changes the routing
between BUTs and ORAs. So the first shift-register configuration is a full
download rather than a partial one, which makes two full and ten partial
downloads per session. This model loads every configuration with one
`cfg_load` clock and does not model download time.

**These contents are this design's choice.** The target design calls for
twelve configurations per session, the last two for shift-register mode, but
their contents were chosen here. Change them in one place, `plb_cfg()`.

### The carry chain

Each PLB has two carry columns: slice 0 to slice 1, and slice 2 to slice 3.
Each column continues into the PLB above. A carry chain running up the whole
device would be the critical path of every BUT.

To avoid that, the bottom slice of each carry column works as follows:

* It takes CARRY-IN from the PLB below only on rows where
  `(row is odd) == cfg.carry_odd`.
* On the other rows, it starts a new chain from BX.

No chain is longer than two PLBs. Configurations 3/4 and 5/6 swap
`carry_odd`, so every CARRY-IN input is still exercised.

### Session timing

`bist_session_ctrl` sequences one session:

1. With `start`, it loads configuration 0 (`cfg_load`). On the same clock it
   restarts the TPGs (`tpg_init`) and clears the ORAs (`ora_clr`, which stands
   for the full configuration at the start of a session).
2. It then runs 4,096 pattern clocks plus 2 flush clocks. The flush clocks let
   the last pattern pass the BUT and ORA flip-flops.
3. It loads the next configuration and repeats.

The ORA flags are never cleared between configurations. `done` rises
12 x 4,099 = 49,188 clocks after the clock that samples `start`.

### Reading the results

In the device, one configuration frame holds all 128 flip-flops of a column
of 16 PLBs. Only the ORA columns need to be read: `ROWS/16 x COLS/2` frames,
which is 84 frames for the default 96 x 28 array.

`frame_readback` returns frame *f* one clock after `rd`:

* Frame *f* covers row block `f / (COLS/2)` and ORA column `f mod (COLS/2)`.
* That ORA column is physical column `2j + session`.
* Bit `8k+i` of the frame is ORA flag *i* of the PLB in row `16*block + k`.

The frame numbering is this model's own. It is not the device's frame address
format.

### Reading a result

A stuck-at fault in the F LUT of slice 0 of the BUT at (r, c) sets:

* bit 0 of the ORAs at (r, c-1) and (r, c+1), taken around the ring;
* sometimes flags of the ORAs in row r+1 as well, because the faulty slice's
  carry feeds the PLB above on the rows that take CARRY-IN.

No other ORA flags. The PLB-level testbenches check exactly this pattern.

## LUT RAM BIST (`lutram_bist_group`, `lutram_tpg`, `lutram_but`)

Only the two SliceM slices of a PLB can act as RAM. So in every PLB:

* the SliceM pair (64 bits of LUT) is the BUT;
* the two SliceL slices hold four ORAs.

The ORAs of PLB *c* compare LUT RAM *c* with LUT RAM *c+1*, in a ring per
row. Alternate columns take alternate TPGs. All of this is done in a single
session.

Each TPG is built in two parts:

* a DSP used as a 10-bit counter (`lutram_tpg`);
* a block RAM in 1K x 18 mode used as a ROM of test vectors. Each vector is
  `lutram_vec_t`: write enable, 2 data bits, write address and dual-port read
  address. The ROM is read synchronously, one vector per clock.

The ROM contents are the function `lutram_vec()`. It stands for the vectors
written into the block RAM at each reconfiguration.

| Mode (`lut_mode`) | Test | Vectors |
|-------------------|------|---------|
| 64x1 single-port | March Y | 512 |
| 32x1 single-port (one per SliceM) | March Y | 256 |
| 16x2 dual-port | March Y, second port on the addressed word | 128 |

March Y is `{any(w0); up(r0,w1,r1); dn(r1,w0,r0); any(r0)}`, 8 operations per
word.

The target design tests the dual-port mode with a dedicated dual-port march
of 624 vectors ("March DPR"). Its elements were not available, so that test
is not built here. The 16x4 mode is not tested: it is covered by the other
three.

## Block RAM BIST (`bram_bist_array`, `bram_tpg`, `bram_model`)

All block RAMs are configured alike and tested at once. The wiring:

* Two march TPGs drive alternate RAMs.
* Next to each RAM, 72 ORAs (9 PLBs) compare all 36 output bits of both ports
  of RAM *k* with those of RAM *k+1*.
* The last set of ORAs closes the ring back to RAM 0. On the die, these are
  the connections across the top and bottom of the RAM columns.

The ORAs watch every output bit, including bits that are unused at the
configured width. Identically configured RAMs drive the same values on those
bits.

`bram_tpg` is a table-driven march engine. Each element is an address order
plus up to four read/write operations on the background or its inverse. It
issues one operation per clock.

| `bram_cfg_sel` | Test | Organisation | Clocks |
|----------------|------|--------------|--------|
| 0 | March LR + 6 data backgrounds | 512 x 36 | 38 x 512 = 19,456 |
| 1 | MATS+ on port A, then on port B | 8K x 2 | 2 x 5 x 8,192 = 81,920 |
| 2 | MATS+ on port A, then on port B | 16K x 1 | 2 x 5 x 16,384 = 163,840 |

The two test sequences:

* March LR: `{any(w0); dn(r0,w1); up(r1,w0,r0,w1); up(r1,w0); up(r0,w1,r1,w0); up(r0)}`,
  followed by `up(wb, rb, w~b, r~b)` for each background *b*. Background *k*
  has bit *i* equal to bit *k-1* of *i*.
* MATS+: `{any(w0); up(r0,w1); dn(r1,w0)}`.

The MATS+ counts match the target design. For March LR with backgrounds, the
target design takes 58 x A clocks. Its background procedure was not
available, so the 38 x A version here is a stand-in.

`bram_model` is a dual-port RAM. Its 18,432 bits are addressed as one bit
array: word *a* at width *w* occupies bits `a*w .. a*w+w-1`. Both ports read
first, and port B wins a same-bit write collision. `init` clears the RAM,
standing for its configured contents.

## Where the model departs from the target design

* **Configuration is modelled with ordinary signals.** The configuration
  memory is replaced by a `cfg_load` pulse and a configuration struct. The
  configured initial values are replaced by `ora_clr` and `init` inputs.
  Configuration download, partial reconfiguration and multiple-frame writes
  are not modelled: there is no configuration port.
* **The slice is simplified.**
  * The carry muxes: a stage passes its carry when its LUT is 1 and otherwise
    takes F1 or G1.
  * Set/reset is synchronous.
  * There is no latch mode and no clock inversion.
* **A PLB holds both roles.** It contains both the BUT slices and the eight
  ORA cells, and a role input selects which one is active. In the device, the
  same slices are configured as one or the other.
* **The carry chain crosses group boundaries.** The PLB BIST groups pass the
  carry from the top of one group to the bottom of the next. The bottom row
  of the array sees 0.
* **Not built:**
  * March s2pf- and March d2pf (the dual-port block RAM tests);
  * FIFO, ECC and cascade block RAM modes and their TPGs;
  * March DPR;
  * the DSP and the TPGs of any DSP BIST.
* **The default size is an assumption.** The default size of `v4_bist_top`
  (96 x 28 PLBs, 72 block RAMs) is that of an XC4VLX25. The target design
  names this device but does not give its dimensions; they come from the
  device family's data.

## Files

| File | Contents |
|------|----------|
| `rtl/bist_pkg.sv` | Types, constants, the PLB configuration set, block RAM and LUT RAM test tables |
| `rtl/ora_cell.sv` | One ORA |
| `rtl/acc_tpg.sv` | Accumulator TPG |
| `rtl/plb_slice.sv`, `rtl/plb_cell.sv` | Slice and PLB models (BUT or ORA role) |
| `rtl/plb_bist_group.sv` | Four-row PLB BIST |
| `rtl/bist_session_ctrl.sv` | Session sequencer |
| `rtl/frame_readback.sv` | ORA readback by frames |
| `rtl/lutram_but.sv`, `rtl/lutram_tpg.sv`, `rtl/lutram_bist_group.sv` | LUT RAM BIST |
| `rtl/bram_model.sv`, `rtl/bram_tpg.sv`, `rtl/bram_bist_array.sv` | Block RAM BIST |
| `rtl/v4_bist_top.sv` | Whole array: PLB groups, LUT RAM groups, block RAM array |
| `tb/tb_<module>.sv` | One self-checking testbench per module |
| `tb/tb_v4_bist_top_full.sv` | The same end-to-end test at the default size |

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

Every module compiles on its own with the package first. For example, the
end-to-end test on a 16 x 8 array with 4 block RAMs:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bist_pkg.sv tb/tb_v4_bist_top.sv --top-module tb_v4_bist_top -o sim
./obj_dir/sim
```

It runs three PLB sessions: fault-free, a fault in session 0, and a fault in
session 1. After each session it reads back every frame. It then runs the
three LUT RAM modes and all three block RAM configurations, with and without
faults. It counts each mechanism (both sessions, both carry-row selections,
shift-register configurations, frame reads, detections, both march
algorithms, all LUT RAM modes) and fails if any of them never happened.

`tb_v4_bist_top_full` runs at the default size:

* two PLB sessions of 49,188 clocks on 2,688 PLBs, one per placement and
  each with one faulty PLB, with all 84 frames read after each;
* the LUT RAM BIST in all three modes;
* the block RAM BIST in configuration 0 (March LR with backgrounds) on 72
  RAMs, one of them faulty.

Every phase clocks the whole array, which costs a few milliseconds per clock
at this size. So the fault-free session and the MATS+ configurations
(82K and 164K clocks) are left to the reduced-size test. Building the
full-size test takes about four minutes, and running it about five.

To try another device, set `ROWS` (a multiple of 16), `COLS` (a multiple of
4) and `N_BRAM` (even) on `v4_bist_top`.
