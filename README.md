# DFI-to-AXI DDR4 PHY bridge

A DDR4 memory controller normally talks, over the DDR PHY Interface (DFI), to a
PHY that drives real DRAM pins. In emulation, or anywhere a controller has to be
exercised without a DRAM, that PHY and DRAM can be replaced by this bridge. It
stands where the PHY would be. It decodes the DDR4 commands the controller issues
on DFI (ACT, RD, WR, PRE, REF, MRS, ZQ). It keeps track of which row is open in
each bank, and turns every read or write burst into an AXI transaction on an
ordinary AXI memory. Read data comes back from AXI and is handed to the
controller on `dfi_rddata`. The controller sees a PHY that answers
initialization, frequency-ratio changes, updates and low-power requests. It
cannot tell that the "DRAM" is an AXI memory.

```
            DFI clock                      |  AXI clock           |
  DFI  ──► cmd_decode ──► write_fsm ──► write_fifo ──► axi_write_channel ──► AXI AW/W/B
  (from         │                          |                      |
  memory        └──────► read_fsm ──► read_fifo (addr) ──► axi_read_channel ──► AXI AR
  controller)            ▲   │             |                      │
                         │   └── dfi_rddata ◄── read_fifo (16 ◄───┘ ◄──── AXI R
                         │                      data queues, by RID[3:0])
           init_ctrl, dfi_interaction_fsm  |
           scemi_ctrl registers ◄─────── message port (SCE-MI clock)
```

The top module is `dfi_axi_bridge`. Three clocks are independent of each other:
- **DFI clock**: the controller side and all configuration registers.
- **AXI clock**: the AXI master.
- **SCE-MI clock**: the message port a host uses to configure the bridge and read its status.

Every crossing between clock domains goes through a dual-clock FIFO (`async_fifo`:
Gray-coded pointers, two-flop synchronizers).

## Frequency ratios and phases

All DFI signals are arrays over four phases, phase 0 first. Four phases are
enough for the DFI ratios 1:1, 1:2 and 1:4. Only the first 1, 2 or 4 phases are
*live*; the others are ignored on input and kept low on output.

The ratio is taken from `dfi_freq_ratio` (0 = 1:1, 1 = 1:2, 2 = 1:4) when the
controller raises `dfi_init_start`. `init_ctrl` then:
1. drops `dfi_init_complete`;
2. waits `T_INIT` DFI cycles;
3. raises `dfi_init_complete` again;
4. waits for the controller to release `dfi_init_start`.

Commands are decoded only while initialization is complete, `dfi_reset_n` is high
and CKE is high.

## Command decoding and the address map

`cmd_decode` registers all phases, then decodes them in phase order with the
JEDEC DDR4 truth table. In each table, ACT_n = 1 for every command except ACT.

| CS_n | ACT_n | RAS_n | CAS_n | WE_n | command |
|---|---|---|---|---|---|
| 0 | 0 | row16 | row15 | row14 | ACT (row = {RAS_n, CAS_n, A14..A0}) |
| 0 | 1 | 1 | 0 | 0 | WR (A10 = 1: WRA) |
| 0 | 1 | 1 | 0 | 1 | RD (A10 = 1: RDA) |
| 0 | 1 | 0 | 1 | 0 | PRE (A10 = 1: all banks) |
| 0 | 1 | 0 | 0 | 1 | REF |
| 0 | 1 | 0 | 0 | 0 | MRS |
| 0 | 1 | 1 | 1 | 0 | ZQ calibration |

An open-row table (16 banks = 4 bank groups x 4 banks) records the row of each
ACT. PRE, PREA, RDA and WRA close it. A column command becomes a flat AXI byte
address:

```
addr = BASE + ({row[16:0], bg[1:0], ba[1:0], column[9:0]} << 1)
```

The shift by one gives two bytes per column, the x16 device behind a 32-bit DFI
data word. The column is aligned to the burst:
- BL8: column bits 2:0 cleared;
- BC4: bits 1:0 cleared;
- single word: bit 0 cleared.

Some commands are flagged as errors and counted in status word 4:
- a column command to a closed bank;
- a second column command in the same DFI cycle. DDR4's tCCD of at least four
  clocks rules this out at every ratio.

**Burst type.** A burst moves 4 DFI words (BL8), 2 (BC4) or 1 (single write/read).
The type comes from the burst-mode field of the CTRL register:
- fixed BL8;
- fixed BC4;
- fixed single;
- on the fly, where A12 (BC_n) selects BL8 = 1 or BC4 = 0.

The original description says the WE_n value also determines the burst size.
WE_n is what tells a write from a read, so it cannot carry the size as well. The
DDR4 A12 pin and the mode setting are used instead.

## Write path

1. `write_fsm` parks each decoded WR in a small pending queue.
2. Write words arrive with `dfi_wrdata_en`, one 32-bit word per enabled live
   phase. They are appended in phase order to an 8-word staging buffer.
3. When the buffer holds the 1, 2 or 4 words the oldest pending command needs,
   those words leave as one burst. At 1:2 and 1:4, one burst can end and the next
   begin in the same DFI cycle; leftover words stay in the buffer.
4. The burst becomes two FIFO entries, written together:
   - an address packet (160 bits: 16 reserved, 64-bit address, 80-bit AXI parameters);
   - a data packet (128 data bits and 16 byte strobes, strobe = NOT `dfi_wrdata_mask`).

`axi_write_channel` then takes each burst and:
- issues AW;
- places the bytes on the 512-bit W bus and sends the beats;
- waits for B.

A BRESP other than OKAY, or a wrong BID, sets `axi_err`.

## Read path and word order

`read_fsm` pushes an address packet into the read-address queue for every RD.
`axi_read_channel` issues it as AR and stores every R beat, unchanged, in one of
sixteen read-data queues. The queue is chosen by the low four bits of the
transaction ID, so reads with different ARIDs use different queues. Each entry is
531 bits: RUSER 8, RLAST 1, RRESP 2, RID 8, RDATA 512. RREADY is held low while
the chosen queue is full; the other queues do not matter.

Back in the DFI domain, `read_fsm` remembers the ARID of every pending read. It
pops the beats of the oldest read from that read's queue and copies
the bytes into a 128-bit RDATA register. It checks RRESP, that RID matches the
ARID, and that RLAST comes on the expected beat. It then returns the burst on `dfi_rddata`, **lowest 32-bit word
first**. A BL8 burst whose AXI data is `0EA0AFFC_E1480BB3_B281BB4B_C0DD9EA9` comes
back as the words C0DD9EA9, B281BB4B, E1480BB3, 0EA0AFFC.

The controller paces the return with `dfi_rddata_en`:
- every live phase on which it is high adds one credit;
- each returned word spends one credit;
- at most one word per live phase is sent per cycle.

So at 1:4 a whole BL8 burst can come back in a single DFI cycle.

**Narrow and unaligned AXI bursts.** Both channels use INCR bursts. ARSIZE/AWSIZE
come from configuration and are clamped to the 64-byte bus. ARLEN/AWLEN are
computed so that the burst covers exactly its 16, 8 or 4 bytes from the
(possibly unaligned) start address. For a burst that starts at bus lane `L`
with beat size `S`, byte `j` travels in beat `((L + j) >> S) - (L >> S)` on lane
`(L + j) mod 64`. The package functions `axi_len` and `axi_beat_of` compute this.
With the reset parameters (size 3, i.e. 8-byte beats), a BL8 burst at an
8-aligned address is two beats, ARLEN = 1.

## AXI parameter words

The AXI fields that are not derived from the command come from configuration.
Each address channel has an 80-bit word, most significant field first:

| field | DUMMY3 | USER | REGION | QOS | LEN | DUMMY1 | SIZE | BURST | LOCK | CACHE | DUMMY2 | PROT | ID |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| bits | 30 | 8 | 4 | 4 | 8 | 3 | 3 | 2 | 1 | 4 | 2 | 3 | 8 |

The reset value `0x04340000` decodes to ID 0, INCR, SIZE 3, LEN 1. LEN and BURST
are replaced by the computed values, and SIZE is clamped as described above.
The field order comes from the original description; the field widths are this
design's reading, chosen so that the value above decodes as shown.

## DFI interactions

`dfi_interaction_fsm` registers six requests (PHY update, PHY master, controller
update, init start, low-power control, low-power data) and classifies them:

| phyupd | phymstr | ctrlupd | init_start | lp_ctrl | lp_data | from | to |
|---|---|---|---|---|---|---|---|
| 1 | 0 | 0 | 0 | x | x | TPHYUPD | PHYUPD_REQ |
| 1 | 1 | 0 | 0 | x | x | TPHYUPD | PHY_REQ |
| 1 | 0 | 1 | 0 | x | x | TPHYUPD | UPD_REQ |
| 1 | 0 | 0 | 1 | x | x | TPHYUPD | PHYUPD_INITSTART_REQ |
| 0 | 1 | 0 | 0 | 0 | 0 | TPHYMSTR | PHYMSTR_REQ |
| 0 | 1 | 0 | 1 | 0 | 0 | TPHYMSTR | PHYMSTR_INITSTART_REQ |
| 0 | 1 | 0 | 0 | 1 | 1 | TPHYMSTR | PHYMSTR_LP_REQ |

Transitions into the intermediate states:
- IDLE goes to TPHYUPD on a PHY update request.
- IDLE goes to TPHYMSTR on a PHY master request.
- A PHY master request together with both low-power requests goes straight to
  PHYMSTR_LP_REQ.

Leaving the states (this design's own rules):
- A request state is held while its row matches and is left for IDLE when it no
  longer matches.
- TPHYUPD and TPHYMSTR wait while their own request stays high.

Acknowledges:
- `dfi_ctrlupd_ack` is high in UPD_REQ, i.e. a controller update is granted
  inside a PHY update window.
- Both low-power acknowledges are high in PHYMSTR_LP_REQ.

The bridge has no training of its own, so its PHY update and PHY master requests
(`dfi_phyupd_req`, `dfi_phyupd_type`, `dfi_phymstr_req`) are driven from the CTRL
register. A host can start these interactions at will.

## Configuration and status: the message port

`scemi_ctrl` takes 40-bit messages `{index[7:0], value[31:0]}` on the SCE-MI
clock and crosses them into the DFI domain.

| index | register | reset |
|---|---|---|
| 0x00 | CTRL: [1:0] burst mode (0 BL8, 1 on the fly, 2 BC4, 3 single), [2] PHY update request, [3] PHY master request, [5:4] PHY update type | 0 |
| 0x01 | T_INIT, DFI cycles of initialization | 16 |
| 0x02 / 0x03 | BASE low / high: AXI address of row 0, bank 0, column 0 | 0 |
| 0x04..0x06 | AW parameter word, low 32 bits first | 0x04340000 |
| 0x08..0x0a | AR parameter word, low 32 bits first | 0x04340000 |
| 0x80 + i | read status word i; answered on the output message port | – |

Status words:

| word | contents |
|---|---|
| 0 | [3:0] interaction state, [5:4] frequency ratio, [6] init complete, [7] phyupd ack, [8] phymstr ack, [31:16] initializations done |
| 1 | write bursts, read bursts |
| 2 | ACT count, REF count |
| 3 | PRE count, MRS + ZQ count |
| 4 | [15:0] DFI-side error count, [16] interaction busy |

A register write takes effect a few DFI cycles after it is accepted.
`msg_in_ready` drops only when the input FIFO is full, for example behind
unanswered status reads.

## Parameters and sizes

The sizes live in `ddr_bridge_pkg` and follow the widths of the original
design's waveforms:

| constant | value |
|---|---|
| PHASES | 4 |
| DFI_ADDR_W | 32 |
| DFI_DATA_W | 32 |
| BURST_W (RDATA) | 128 |
| AXI_ADDR_W | 64 |
| AXI_DATA_W | 512 |
| AXI_ID_W | 8 |
| ROW_W / COL_W / BG_W / BA_W | 17 / 10 / 2 / 2 |
| read-data queues | 16 (one per RID[3:0]), each 16 entries of 531 bits |

All queues are 16 entries deep; the message FIFOs are 4 deep. Module
parameters:
- `write_fsm`: `PEND_DEPTH` 4, `SBUF` 8;
- `read_fsm`: `PEND_DEPTH` 16;
- the FIFOs: `DEPTH_LOG2`.

## Where this design departs from, or goes beyond, its source

Conflicts in the source:
- **RD/WR encoding.** A command table in the source shows RAS_n low for RD and WR.
  Its prose gives RAS_n high, and JEDEC agrees; the prose is followed.
- **Burst size.** Taken from A12 or the mode register, not from WE_n (see above).

This design's own choices:
- The address map.
- The credit scheme on `dfi_rddata_en`.
- The register map, the message format and the status words.
- The error flags.
- How the interaction states are left.
- All queue depths, and choosing the read-data queue by RID[3:0].
  The source shows sixteen read-data queues, written one at a time, but not how
  one is picked; its example waveform writes queue 1 while RID is 0, so its own
  rule is something else. Reads still return correctly with any rule that keeps
  the beats of one read in one queue.

Known limits:
- **Ordering.** The write and read paths are independent. A read issued right
  after a write to the same address may reach AXI first, so a controller (or
  test) must wait for the write to complete.
- **Transactions in flight.** Each AXI channel has one transaction in flight.

Not built:
- DFI training;
- the disconnect, error and 2N-mode interface groups;
- data-bus inversion;
- ODT.

The bridge has no DRAM pins to train or terminate, and those interface groups
are only named in the source, without any behaviour to implement. `dfi_cke` and
`dfi_reset_n` are phase arrays, but only phase 0 is used.

## Verification

Every block has a self-checking testbench in `tb/`. Each one:
- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- computes its expected values independently of the RTL.

`tb_dfi_axi_bridge` runs the whole bridge at its default sizes. It plays three parts:
- **a DDR4 controller**: initialization, MRS/ZQ/REF/PRE/ACT, WR/WRA with random
  masks, RD/RDA;
- **an AXI byte memory** with random ready delays;
- **a configuration host.**

It checks every returned read word against a model of memory built from the DFI
traffic. Writes and reads run in every burst mode at 1:1, 1:2 and 1:4. It also:
- gives each batch a new ARID, so that twelve of the sixteen read-data queues
  carry data;
- fills a read-data queue until RREADY drops;
- walks the interaction state machine through all nine request states;
- compares the status words with its own counts.

Each of these mechanisms is counted, and one that never occurs is a failure.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl +libext+.sv -Irtl \
  rtl/ddr_bridge_pkg.sv tb/tb_dfi_axi_bridge.sv --top-module tb_dfi_axi_bridge -Mdir obj
obj/Vtb_dfi_axi_bridge
```

The same works for every unit testbench in `tb/`; the end-to-end run takes a few
seconds.

Lint notes:
- Verilator reports `SYNCASYNCNET` for the assertions, whose `disable iff` uses
  the asynchronous resets.
- It reports `UNUSEDSIGNAL` for observation signals left unconnected at the top.
- Neither is a circuit problem.
