# Track-Sorter-Master: a fault-tolerant final track selector for a drift-tube chamber trigger

Each muon drift-tube chamber has trigger electronics that find track segments on-chamber.
Seven phi trigger boards each preselect their best segment. The Track-Sorter-Master (TSM)
is the last on-chamber stage: every bunch crossing it picks the best two of these seven
segments and sends their full data to the sector collector, together with the theta
(non-bending view) information. It is also the gateway through which the chamber controller
configures the trigger boards.

All trigger data of the chamber pass through the TSM, so a single failed chip must not stop
the chamber's trigger. The main idea of the design is to **split the TSM over three chips
with separate power, whose functions partly overlap**:

* **TSMS** (Selection) sees only the short 13-bit *Preselect Words* (PRW) of the seven
  boards, sorts them and decides which two tracks leave the chamber.
* **TSMD0** and **TSMD1** (Data multiplexing) each hold the full 25-bit track data of half a
  chamber: boards 0-3 and boards 4-6. They put the tracks chosen by the TSMS on the
  shared 30-bit `TRACK` bus.

The controller can switch off any chip. The other chips see its power-enable line and
reorganise themselves. So the trigger keeps running with any one chip missing, and even
with only one TSMD left.

This repository holds synthesizable SystemVerilog for the three chips, the board that joins
them, their configuration paths (Parallel Interface and JTAG), and the 450-bit register used
to qualify the chips under irradiation. Each part has a self-checking testbench.

## Board structure

```
             7 x PRW(12:0) <-> (also PI data to the boards)      2 x Theta(7:0)
                  |                                                  |
   PI bus  ---> +------+ ---- 2 x Select(3:0) ----> +-------+          |
   JTAG    ---> | TSMS | ---- 2 x Select(3:0) --+   | TSMD0 | <--- 4 x TRK(24:0)
   power   ---> +------+                         |   +-------+
   enables         |  Theta(15:0) ---------------|------|-----------> to sector collector
                   |                             +-> +-------+
                   |                                 | TSMD1 | <--- 3 x TRK(24:0)
                   |                                 +-------+
                   |                                     |
                   +---- TRACK(29:0) shared bus <--------+--(TSMD0 and TSMD1)--> sector collector
```

`tsm_top` is the board. It instantiates `tsms`, two `tsmd` (4-input and 3-input), and
`tsm_jtag_net`. It models the power switches' bus-isolation behaviour: a chip whose
active-low enable (`n_pwren_sort`, `n_pwren_d0`, `n_pwren_d1`) is high is held in reset,
its inputs read as zero and its outputs are cut off. The three enables also go to every
chip as status inputs. Bi-directional lines are modelled as separate in, out and
output-enable signals. A shared bus is the OR of its enabled drivers, and assertions check
that at most one driver is enabled at a time.
A chip that is powered on again starts from its reset configuration, so the controller
must reload any register it had changed.

## Processing modes and how the power state selects them

| Chips powered          | Mode                  | Who drives slot 0 (first track) | Who drives slot 1 (second track) |
|------------------------|-----------------------|---------------------------------|----------------------------------|
| all three              | default               | the TSMD holding the best track | the TSMD holding the 2nd best |
| TSMS + TSMD0           | default, half 4-6 off | TSMD0                           | TSMD0 |
| TSMS + TSMD1           | default, half 0-3 off | TSMD1                           | TSMD1 |
| TSMD0 + TSMD1          | back-up               | TSMD0 (its own best)            | TSMD1 (its own best) |
| TSMD0 only / TSMD1 only| back-up               | TSMD0 / nothing                 | nothing / TSMD1 |

* **Default processing.** The TSMS ranks the PRWs and gives each output slot to one board.
  It tells each TSMD, through two 4-bit one-hot `Select` words (first slot, second slot),
  which of its inputs to send in which slot. The two tracks can both come from TSMD0,
  both from TSMD1, or one from each. In automatic mode, the PRWs of a half chamber whose
  TSMD is powered off are left out of the sort. That TSMD could not deliver the data, and
  this way the full efficiency of the other half is kept.
* **Back-up processing.** This mode is used when the TSMS is off, or when a register
  forces it. Each TSMD sorts its own inputs by track quality and sends its single best
  track in its own slot. This still finds all single muons, and all muon pairs with one
  track in each half.

Two mode bits sit in `CFG_MODE`:

* Bit 0, *automatic*, is set at reset. It makes the chips follow the power enables as in
  the table above.
* Bit 1, *back-up*, forces back-up processing in a TSMD.

Forcing back-up while the TSMS is still sorting would give a slot to two chips. Before
doing it, disable the TSMS sort by writing `CFG_MASK = 0` in the TSMS. The end-to-end
testbench does exactly this.

## Timing of a bunch crossing

The board clock runs at **two cycles per bunch crossing**. `bx_phase` is 0 then 1; it is
generated on the board and starts at 0 after reset. The trigger boards present their data
for a whole crossing (both cycles). The two track words leave one after the other on the
single 30-bit bus.

| cycle (from the crossing's first cycle) | 0 (ph 0) | 1 (ph 1) | 2 (ph 0) | 3 (ph 1) | 4 (ph 0) |
|---|---|---|---|---|---|
| inputs (PRW, TRK, theta) valid | ● | ● | | | |
| TSMS and TSMD input registers hold them | | ● | ● | | |
| TSMS sorts; `Select` registered at the end of cycle 1, held 2 cycles | | sort | ● | ● | |
| `track_out`: first-slot word | | | | ● | |
| `track_out`: second-slot word | | | | | ● |
| `theta_out` | | | | ● | ● |

So the first track leaves 3 clock cycles (1.5 crossings) after the inputs are sampled, and
the second track 4 cycles after. A new crossing can start every 2 cycles.

## Word formats

The widths come from the TSM block diagram. The field layouts below are this design's own
choices; they are defined in `tsm_pkg`.

| Word | Bits | Layout |
|---|---|---|
| PRW (`prw_t`) | 13 | `quality[12:10]` (0 = no track, 7 = best), `second[9]` (the slave sorter reports a second-choice track), `preview[8:0]` (carried, not interpreted) |
| TRK (`trk_t`) | 25 | `quality[24:22]` (0 = no track), `k[21:12]` bending, `x[11:0]` position |
| TRACK (`track_t`) | 30 | `valid[29]`, `second[28]` (word of slot 1), `board[27:25]` (0-6), `trk[24:0]` |
| Select | 4 | one-hot over the boards of that half; 0 = no track from this TSMD in this slot |
| Theta out | 16 | `{theta_in[1], theta_in[0]}`, registered and aligned with the tracks |

A `TRACK` word with `valid = 0` (all zero) means "no track in this slot".

## Sorting and fake rejection

The TSMS ranks each PRW by `{quality, !second}`: higher quality first and, at equal
quality, first-choice tracks before second-choice ones. Equal ranks go to the lower board
number. A PRW takes part in the sort only when all of these hold:

* its quality is non-zero and at least `CFG_QMIN[2:0]`;
* its board bit is set in `CFG_MASK[6:0]`;
* it is not a second-choice track while fake rejection (`CFG_MODE` bit 2) is on;
* in automatic mode, the TSMD of its half is powered.

In back-up, a TSMD ranks its TRK inputs by quality, under the same threshold and mask. The
selector itself (`tsm_sorter`) is a combinational best-two scan, shared by both chip types.

While a Parallel Interface transaction is in progress (`nprog` low), the PRW lines carry
configuration traffic, so the TSMS treats all PRWs as empty.

## Configuration access

Every chip has four 8-bit registers (`tsm_cfg_regs`):

| Address | Name | Reset | Meaning |
|---|---|---|---|
| 0 | `CFG_MODE` | `0x01` | bit 0 automatic mode, bit 1 force back-up (TSMD), bit 2 reject second-choice tracks (TSMS) |
| 1 | `CFG_QMIN` | `0x01` | lowest accepted quality `[2:0]` |
| 2 | `CFG_MASK` | `0x7F` | enabled boards `[6:0]` (bit n = board n) |
| 3 | `CFG_STATUS` | read-only | TSMS: `{fwd_active, d1_on, d0_on}`; TSMD: `{backup, other_on, sort_on}` |

The registers can be reached in two independent ways. If both write in the same cycle, the
PI write wins.

**Parallel Interface (PI)** (`tsm_pi_slave`) uses an 8-bit bus `PICD` and the control lines
`nProg`, `Strobe` and `nWrite`. A transaction lasts while `nProg` is low. Each `Strobe`
pulse moves one byte:

1. the global address: it must equal the board's `gaddr` strap;
2. the individual address: `0x00` TSMS, `0x01` TSMD0, `0x02` TSMD1, `0x08 + i` trigger
   board i;
3. the register address;
4. one or more data bytes. The chip samples them when `nWrite` is low, and drives them
   while `Strobe` is high when `nWrite` is high.

A wrong address makes the chip ignore the rest of the transaction. If the individual
address names a trigger board, the TSMS stays in a forwarding state until `nProg` rises.
In that state:

* the controller's strobes go out on that board's `Strobe_i` only;
* write data goes onto the low eight lines of that board's bi-directional PRW bus;
* read data comes back from those lines.

Only one trigger board is reachable at a time. The bus lines are treated as synchronous to
the chip clock, and a strobe is recognised at the first clock edge at which it is high.

**JTAG** (`tsm_jtag_tap`) is a standard 16-state TAP controller. TCK, TMS and TDI are
sampled by the chip clock through synchronisers, so TCK must be slower than a quarter of
the clock. The TAP has three instructions:

| IR (4 bits) | Data register |
|---|---|
| `0x1` IDCODE (after reset) | 32 bits: `{4'h1, 8'h54, chip[3:0], JADD[3:0], BADD[3:0], 7'h0, 1'b1}` |
| `0x8` CFG | 11 bits `{write, addr[1:0], data[7:0]}`, shifted LSB first. Update writes `data` when `write` is set and always remembers `addr`. The next Capture loads `{0, addr, register[addr]}`. |
| `0xF` (and any other code) | BYPASS, 1 bit |

So a read takes two scans: one to select the address, one to capture and shift the value
out. On the board, `tsm_jtag_net` chains the chips in the order TDI → TSMD0 → TSMD1 →
TSMS → TDO. It bypasses every chip whose power enable is high, and holds that chip's
TCK, TMS and TDI low. The chain therefore contains only the powered chips. An IDCODE scan
shows which chips they are.

## Irradiation test register

`seu_reg450` is a separate small design. It qualified the antifuse FPGA for radiation: a
450-bit register that a pattern generator rewrites and reads back once per microsecond,
so that single-event upsets (flipped bits) and total-dose effects can be observed. It is
organised as 30 words of 15 bits. It has a write port and a registered read port
(`rdata` follows `raddr` by one clock), and no reset. One refresh-and-check pass takes 31
cycles with reads and writes overlapped, so 1 MHz needs a clock above 31 MHz.
`tb_seu_irradiation` runs 1000 such passes at 40 MHz. It injects upsets, including one in
which a third of the bits flip at once, and checks that the monitor sees exactly the
flipped bits and that the next refresh restores the register. The register sits in
`tsm_top` beside the TSM with its own `seu_*` ports. It is not connected to the TSM logic.

## Files

| File | Contents |
|---|---|
| `rtl/tsm_pkg.sv` | sizes, word structs, ranking functions, register map, PI addresses |
| `rtl/tsm_sorter.sv` | best-two selector |
| `rtl/tsm_cfg_regs.sv` | configuration registers, PI and JTAG ports |
| `rtl/tsm_pi_slave.sv` | Parallel Interface decoder and board forwarding |
| `rtl/tsm_jtag_tap.sv` | JTAG TAP with IDCODE, BYPASS and CFG access |
| `rtl/tsm_jtag_net.sv` | board JTAG chain with power-controlled bypass |
| `rtl/tsms.sv` | Selection chip |
| `rtl/tsmd.sv` | Data multiplexing chip (parameters `N_IN`, `BOARD0`, `SLOT`, `CHIP_ID`) |
| `rtl/seu_reg450.sv` | 450-bit irradiation test register |
| `rtl/tsm_top.sv` | the board (top level) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_seu_irradiation.sv` | the 1 MHz refresh-and-monitor procedure with injected upsets |

Resources after generic synthesis: TSMS 206 flip-flops, TSMD0 344, and the whole board
843 plus the 450-bit test register.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. It also has a
watchdog that counts a failure if the test hangs. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv rtl/tsm_pkg.sv tb/tb_tsm_top.sv --top-module tb_tsm_top \
  --Mdir obj_top -o sim && obj_top/sim
```

Replace `tb_tsm_top` with any other testbench name. `tb_tsm_top` runs the whole board at
its default parameters. It covers these sequences:

* 400 crossings with all chips on;
* 200 crossings with each TSMD off;
* 300 crossings in automatic back-up;
* 200 crossings with only TSMD0;
* PI reconfiguration with fake rejection and thresholds;
* forced back-up;
* PI forwarding to a trigger board;
* a configuration write into TSMD0 through the JTAG chain (the other chips in BYPASS), read back over the PI;
* IDCODE scans through the JTAG chain with chips bypassed.

It counts how often each of these mechanisms occurred and fails if one never did. It runs
in a few seconds.

To change the design, start from `tsm_pkg`: the word layouts, ranking and register map
are all defined there. The chip modules use them only through the struct fields and the
`prw_rank`/`trk_rank` functions.

## What follows the source description and what is this design's own

Taken from the description of the TSM:

* the three-chip partition, and which boards each TSMD serves;
* the interface widths (PRW 13, TRK 25, TRACK 30, Select 4, theta 2×8 in and 16 out,
  PICD 8);
* the two processing modes, and the rule that each chip follows the power enables of the
  others;
* the disabling of a half chamber whose TSMD is off;
* the PI signal names, the global-then-individual addressing, and the forwarding to one
  trigger board at a time over the bi-directional PRW lines;
* the JTAG chain order and the bypassing of unpowered chips;
* the configuration registers reachable by both PI and JTAG;
* the 450-bit test register.

This design's own choices, where the description gives nothing:

* the clock (two cycles per crossing), all latencies, and the order of the two output slots;
* the field layouts of PRW, TRK and TRACK, the ranking rule and the tie-break;
* fake rejection as "drop second-choice tracks", plus a quality threshold;
* the register map and reset values;
* the PI byte sequence and chip addresses;
* the JTAG instruction codes and the CFG register, with JADD/BADD placed in the IDCODE;
* the back-up slot assignment (TSMD0 first, TSMD1 second);
* the 15-bit word organisation of the test register.

Known departures and limits:

* The block diagram shows a 40-bit `CTRL` bus into the TSMS. Here its lines appear as
  separate PI, JTAG, power-enable, clock and reset ports, because its bit assignment is
  not known.
* Lines marked `Bsel - Vsel` between the chips are read as the shared power-enable
  status. Their exact role is unknown.
* The chamber overview gives the theta output to the sector collector as 20 bits. This
  design follows the TSM diagram's 16 bits and passes the theta words through unchanged.
* Pin count: with an 8-bit global-address strap, the TSMS has 183 signal pins and TSMD0
  has 174. That is about the user I/O of a 208-pin A54SX32, so a real implementation would
  need a narrower address strap.
* Not modelled:
  * the power switches and their over-current fault signals, which are analog;
  * the isolation switches as electrical parts;
  * boundary-scan cells of the pads;
  * the trigger boards themselves.
