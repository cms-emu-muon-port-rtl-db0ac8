# Muon Port Card (MPC2004) trigger logic in SystemVerilog

In the CMS endcap muon trigger, each peripheral crate holds nine Trigger
Motherboards (TMBs). On every 25 ns LHC bunch crossing, each TMB can report up
to two track segments ("LCTs", local charged tracks). The Muon Port Card
collects all 18 LCTs and keeps the three with the highest 4-bit quality. It
sends those three to the Sector Processor over three optical links and tells
each TMB which of its LCTs were taken. It has to do this every bunch crossing
with a fixed latency, and it also has to stamp the outgoing data with
bunch-crossing and synchronisation information.

This repository is RTL for the card's FPGA logic and for its discrete CSR0
register:

- the LCT receiver;
- the 18-to-3 sorter and a "transparent" bypass;
- formatting of the serializer links;
- a bunch-crossing counter with synchronisation checks;
- VME-loadable test FIFOs and a capture FIFO;
- an A24/D16 VME slave with its register file;
- decoding of the crate's clock-and-control (CCB) bus;
- a 1-Wire master for the serial-number chip;
- the front-panel LED drivers.

Not included are the chips around the FPGA: the TLK2501 serializers, the
optical modules, the GTLP line drivers, the clock delay chip, the DS2401
serial-number chip, and the configuration EPROM. The top-level ports connect
to where they would sit.

## Clocking and the two-frame bus

Everything runs on one 80.16 MHz clock, twice the bunch-crossing rate. Each
32-bit LCT therefore travels as two 16-bit frames: frame 1 in one cycle and
frame 2 in the next. `frame_phase` (an output of `mpc_top`, generated in
`ccb_if`) is 0 in the cycle that carries frame 1. It starts at 0 after reset.

A TMB has 32 lines. Lines 15..0 carry its LCT0 and lines 31..16 its LCT1, so
one TMB delivers both LCTs in the same two cycles. Once reassembled, an LCT
looks like this (`mpc_pkg::lct_t`):

| bits  | frame | field |
|-------|-------|-------|
| 15    | 1 | vpf (valid pattern) |
| 14:11 | 1 | quality |
| 10:7  | 1 | CLCT pattern |
| 6:0   | 1 | wire group |
| 31:28 | 2 | CSC id |
| 27    | 2 | BC0 (bunch crossing zero marker) |
| 26    | 2 | BX0 (bit 0 of the bunch number) |
| 25    | 2 | ER (synchronisation error) |
| 24    | 2 | L/R bend |
| 23:16 | 2 | half-strip |

The link to the Sector Processor uses the same layout, one LCT per link and
per bunch crossing.

All backplane signals (`tmb_n`, `winner_n`, `ccb_*_n`, `mpc_*_n`) are active
low, as on the board. `mpc_top` inverts them at its edge, so the logic inside
works with active-high signals.

## Pipeline and latency

```
cycle c    frame 1 of all TMBs at the pins        (frame_phase = 0)
c+1        input register (tmb_rx)
c+2        frame 1 held, frame 2 registered
c+3        18 complete LCTs, lct_stb
c+4        sorter / CSR4 choice registered, sel_stb
c+5        sp_txd frame 1 of the three links, winner_n for all LCT0s
c+6        sp_txd frame 2,                    winner_n for all LCT1s
```

The latency is the same in sorter and transparent mode. A new bunch crossing
can enter every second cycle, so the card never stalls. The winner bits go
back to the TMBs the same way the data arrived: the bit for LCT0 in the first
frame and the bit for LCT1 in the second.

## Sorting rules (`mpc_sorter`, `muon_select`)

The sorter is combinational. For each input it counts how many other inputs
beat it, and an input with rank k < 3 becomes output k. Input j beats input i
if either:

- it has a higher quality, or
- it has equal quality and a larger index.

The index is `2*tmb + lct`, so among equal qualities the TMB in the higher
slot wins, and inside one TMB LCT1 wins over LCT0. Quality 0 means "no LCT":
such inputs are never chosen, and unused outputs are all zeros.

`muon_select` registers the outcome. When CSR4[0]=1 (transparent mode),
links 1..3 take whichever input CSR4[5:1], [10:6] and [15:11] name:

- code n = 1..18 is LCT n-1, that is TMB (n+1)/2, LCT0 for odd n and LCT1 for
  even n;
- code 0 (or any code above 18) sends zeros.

In transparent mode, quality-0 LCTs are forwarded, and a winner bit is
returned only if the chosen LCT has vpf=1.

BC0 on the outgoing links is the OR of the BC0 bits of all 18 LCTs, whatever
was selected.

## BX0 and synchronisation errors (`bx_counter`, `sp_link_tx`)

The card keeps its own 12-bit bunch counter:

- L1Reset or Bunch Counter Reset loads it with CSR5.
- Start Trigger arms it.
- The next BC0 command starts it, and it counts from the following bunch
  crossing (BC1).
- Stop Trigger halts it.
- It wraps from 3563 to 0, the number of bunch crossings in one LHC orbit.

Before the frames are sent, three fields are rewritten on every link:

- **BC0**: the OR described above.
- **BX0**: if CSR0[3]=1, the TMB's own bit is kept; if CSR0[3]=0, bit 0 of the
  card's counter is used.
- **ER**: the OR of three sources, each with its own mask bit:
  - the TMB's ER bit (masked by CSR0[10]);
  - a compare of the link's BX0 against counter bit 0, on links with vpf=1
    (masked by CSR0[11]);
  - a BC0 seen while the counter is not 0 (masked by CSR0[2]).

  The checks use the counter value sampled when the selection is registered.

TX_EN of the serializers is CSR0[9], with two exceptions:

- After an L1Reset, or a write to 6000B6h, TX_EN drops to 0 for 256 cycles
  (3.2 µs). The serializers send idle characters during that time.
- With CSR2[0]=1 (IDLE mode), a link is enabled only while it carries a valid
  pattern or a BC0.

## Test FIFOs (`fifo_a_bank`, `fifo_b_bank`, `mpc_fifo`)

FIFO_A holds test data in nine buffers, one per TMB. Each buffer is two
independent 511 × 16 FIFOs, one for LCT0 and one for LCT1, written over VME.
Enter Test mode (CSR0[0]=1), then write 6000B2h or send CCB command 30h. FIFO_A
then plays 511 words out of every half, at two words per bunch crossing in
place of the TMB inputs. The first word arrives in a frame-1 cycle. After
that, the test data take exactly the path live data take.

FIFO_B has three 511 × 16 buffers, one per link. They capture the selected
LCTs, frame 1 then frame 2, before BX0 and ER are rewritten:

- In sorter mode, all three buffers are written when the best LCT has vpf=1.
  This keeps them the same length.
- In transparent mode, each buffer is written when its own LCT has vpf=1.

A pattern is stored only if both of its words fit, so a buffer holds at most
255 patterns. The FULL flag is reported as soon as there is no room for
another pattern (509 words). Both FIFO groups can also be written and read
directly over VME.

## VME and registers (`vme_slave`, `mpc_csr`)

The card is an A24/D16 slave that answers AM 39h and 3Dh with word cycles
only:

- A23..A19 must match the geographical address (slot 12 gives 600000h).
- A18..A16 must be 0.
- A15..A8 must match the `base_sw` switches.

Strobes pass through two-flop synchronisers. A read answers a few cycles
after the data strobes: two synchronising cycles plus `RD_WAIT` wait cycles. Offsets:

| offset | access | function |
|---|---|---|
| 00 | R/W | CSR0: bit 0 Test mode, 2 mask BC0 check, 3 BX0 from TMB, 5-7 JTAG TDI/TMS/TCK, 8 TDO (R), 9 TX_EN, 10 mask TMB ER, 11 mask BXN compare, 12 FPGA done (R), 13 fixed clock delay 30h, 14 serializer enable, 15 PRBS |
| 02 / 04 / 06 | W | hard reset (pulses `fpga_reload`) / soft reset / DLL reset pulse |
| 80 + 4t, 82 + 4t | R/W | FIFO_A of TMB t+1, LCT0 / LCT1 half |
| A4, A6, A8 | R/W | FIFO_B1..3 |
| AA | R | CSR1 firmware date: day [4:0], month [8:5], year-2000 [11:9] |
| AC | R/W | CSR2: bit 0 IDLE mode, [15:8] clock delay code |
| AE | R | CSR3: FIFO_A full, FIFO_A empty, FIFO_B full, FIFO_B empty (bits 0-3) |
| B0 | R | L1 accept counter (cleared by CCB event-counter reset or soft reset) |
| B2 | W | play out FIFO_A |
| B6 | W | TX_EN 0 pulse |
| B8 | R/W | CSR4, transparent mode and sources |
| BA | R/W | CSR5, bunch counter preset |
| BC | R | CSR6, 1-Wire status |
| C0 / C2 / C4 / C6 / C8 | W | 1-Wire reset / read / clear CSR6 / write 0 / write 1 |

All registers reset to 0, which selects sorter mode with the links disabled.

A soft reset clears the data path, the FIFOs, the counters and the 1-Wire
master, but keeps the register contents. Its sources are offset 04, the
`Mpc_soft_reset` line and VME SYSRESET*.

## Other blocks

- `ccb_if` samples the CCB lines once per bunch crossing. It decodes the
  command codes 01h (BC0), 03h (L1Reset), 06h/07h (Start/Stop Trigger), 30h
  (inject) and 32h (bunch counter reset) while the command strobe is active.
  The dedicated BC0, counter-reset and L1Reset lines act like the
  corresponding commands.
- `onewire_master` produces the 1-Wire time slots for the serial-number chip:
  800 µs reset, 3 µs read, 50 µs write-0 and 12 µs write-1. It reports
  presence, the data bit and three "done" flags in CSR6. Software walks the
  protocol: a reset, eight command bits LSB first (33h), then 64 read slots.
- `front_panel` stretches events (muon vpf, resets, VME access, idle, test
  run, L1Reset) to 50 ms, copies the level signals, and blinks CLK40 at about
  5 Hz.

## Where this design departs from, or adds to, the specification

- **Its own choices**: the single clock domain, the pipeline depth, the
  rank-count sorter structure, the VME synchronisers, and the reset split
  between soft and hard reset.
- **Conflicts in the specification**:
  - The FIFO status flags are placed in CSR3. The text also names CSR2 for
    them.
  - CSR1 is read-only. The address table lists it as read/write, but its bit
    table marks every bit read-only.
  - After reset the FIFOs show EMPTY=1 and FULL=0. One sentence says all
    flags read 1 after reset.
- **Points the specification does not give**:
  - The counter width (12 bits) and wrap point (3564).
  - BC0 check expects the counter to be 0.
  - The 1-Wire sampling instants (standard DS2401 timing).
  - The length of the TX_EN pulse after a write to B6. The pulse after
    L1Reset is specified as 3.2 µs, and the B6 pulse uses the same length.
  - The one-shot length.
  - Only links with vpf=1 are checked by the BXN comparator.
- **Board-level functions handled outside the FPGA**:
  - The clock-delay chip: the design only outputs the code, CSR2[15:8] or 30h
    when CSR0[13]=1.
  - The JTAG chain: the design drives TDI/TMS/TCK from CSR0.
  - Serializer enable and PRBS: output as pins.
  - FPGA reload: `fpga_reload` is a request pulse.
- **Station-1 use** (two links): run with the third link unused. No separate
  build is provided.

## Simulating

Every module sits in `rtl/<name>.sv`, and `rtl/mpc_pkg.sv` holds the shared
types. Each block has a self-checking testbench `tb/tb_<name>.sv`, which
prints `TB_RESULT checks=... failures=...`. `tb/ds2401_model.sv` models the
serial-number chip. For example:

```
verilator --binary --timing --top-module tb_mpc_top -y rtl -y tb +libext+.sv \
    rtl/mpc_pkg.sv tb/tb_mpc_top.sv
./obj_dir/Vtb_mpc_top
```

`tb_mpc_top` runs the whole card at its default sizes: nine TMBs, 511-word
FIFOs, the real 3.2 µs and 800 µs timings. It runs in a few seconds. It
drives random LCTs every bunch crossing and checks every link word, TX_EN
and winner bit against a reference model. It exercises:

- sorter mode, filled until FIFO_B reports FULL;
- transparent mode with random CSR4 sources, with the per-link FIFO_B
  records read back in full;
- station-1 traffic, with the ninth TMB silent;
- the bunch counter through its wrap, with BX0 and all three ER sources;
- IDLE mode and the L1Reset TX_EN pulse;
- a soft reset, FIFO_A test patterns loaded and played out over VME, and
  FIFO_B read back;
- the L1 accept counter, the hard reset, and a 1-Wire reset, Read ROM command
  and family-code read against the chip model;
- the clock-delay code, the JTAG bits with TDO read back, and the DLL reset;
- FIFO_A filled to FULL and played out by the CCB inject command;
- the CCB soft and hard reset lines and the front-panel LEDs.

At the end it prints how often each of these happened, and counts a failure
for any that never did. The block testbenches use smaller parameters (a short
orbit, short FIFOs, scaled 1-Wire and one-shot times) to reach the corner
cases quickly.
