# SFC: a FASTBUS controller driven by a MULTIBUS processor

A FASTBUS segment needs a controller for its slow jobs: monitoring, set-up,
diagnostics, acting as a backup host. This design makes any IEEE 796
(MULTIBUS) single-board computer into that controller. The processor board
plugs into the module. It sees the module as an ordinary 256-byte I/O
slave.

The main idea is that **an I/O address is a FASTBUS command**. The low eight
address bits of an I/O read or write say which FASTBUS strobe to move (AS,
DS) and which MS code to use. The data bus carries the AD bits at the same
time. When the MPU writes the last part of a 32-bit word, the module runs the
FASTBUS primitive by itself:

- it raises the strobe and waits for AK or DK;
- it runs a timeout and checks the slave's SS code and the parity;
- only then does it return XACK\* to the MPU.

So a 16-bit MPU does a complete FASTBUS address or data cycle with one
32-bit move instruction. No code polls a status bit after each cycle.
Errors are rare, so they arrive as a bus-error interrupt (BERR) instead.

The module is also:

- a FASTBUS slave, emulated in software with hardware help;
- a master that can win arbitration or take the segment as host;
- able to address itself for self-test.

The RTL is synthesizable SystemVerilog. It is a clocked design; the
original hardware was asynchronous, built from PALs, TTL and ECL.

## How an I/O address becomes a FASTBUS primitive

The module decodes I/O address bits 15:8 against jumpers (`io_base`). Bits
7:0 are decoded as follows:

| bits | meaning |
|------|---------|
| 7:6  | `00` register space, `01` COMMAND mode, `10` OVERLAPPED mode, `11` interlocked CYCLE mode |
| 5    | AS: the level AS should have |
| 4    | DS: do a data cycle |
| 3:2  | MS1, MS0 |
| 1:0  | byte offset in the 32-bit AD longword |

Each primitive does the following:

| AS | DS | MS0 | what the master does |
|----|----|-----|----------------------|
| 1 | 0 | x | If AS is down: put AD (and EG, from the control register) on the bus, raise AS, wait for AK. If DS is up: take DS down and wait for DK down. Otherwise nothing. |
| 1 | 1 | 0 | Random data cycle: DS up, wait for DK up (latch read data), DS down, wait for DK down. |
| 1 | 1 | 1 | Block transfer: toggle DS once and wait for DK to follow. |
| 0 | x | x | Take DS down if it is up, then take AS down and wait for AK down. |

With the 68000 code that accompanies the design, offset `$E0` is an address
cycle, `$F0` a random data cycle and `$40` "take AS down". Offset 7 is the
control register, where bit 7 requests the bus. Offset 4 is the master
status register, where bit 5 says the bus is ours. The rest of this table and
of the register map below are this implementation's own choices, made to fit
those offsets.

### The three modes, and when XACK\* comes

- **Interlocked CYCLE** (`11`). The transfer moves AD bits through the AD
  register.
  - Writes: the FASTBUS strobe is issued on the transfer that delivers
    byte 3 of the longword, so that all the write data has arrived. That
    transfer is held (no XACK\*) until the slave answers or the timeout
    expires.
  - Reads: the strobe is issued on the transfer that takes byte 0. That
    transfer waits. It then returns the new data, and the rest of the
    longword comes from the AD register.
  - A 16-bit MPU therefore needs two transfers per primitive, and an
    8-bit MPU four.
- **COMMAND** (`01`). No data moves. The primitive starts on any transfer
  and uses the AD register as it is, and the transfer waits until the
  primitive ends. Use it to clear AS, to take DS down after an odd-length
  block, or to write the same word repeatedly: load the AD register once
  (offset 0-3), then issue DS writes.
- **OVERLAPPED** (`10`). Like COMMAND, except that XACK\* comes as soon as
  the primitive has started, so the MPU can do other work meanwhile. Any
  later FASTBUS command waits until the primitive has finished. Register
  accesses do not wait, which is what self-test needs: the MPU can answer
  its own slave while its master is still waiting.

The `msb_first` jumper sets the order of the two 16-bit halves:

- `1`: the lower address holds AD[31:16] (68000);
- `0`: the lower address holds AD[15:0] (16032, 8086).

In both orders, the even address of a half-word is its low byte.

### Errors, BERR and SCRAM

Every wait runs the timeout counter (`TIMEOUT` clocks). The counter is held
while any slave asserts WT. So a slave that asks for time is not timed out,
and a master that waits on WT hangs until the slave answers. A primitive ends
in error on any of these:

- a non-zero SS code with AK or DK;
- a parity error on read data, when the slave asserts PE (even parity over
  AD and PA);
- a timeout.

On an error the module latches the error register and raises `berr_irq`
together with XACK\*. The error register holds:

- bits 1:0: the error class (0 none, 1 SS, 2 parity, 3 timeout), laid out for
  a mask-and-shift jump through a table of handlers;
- bits 4:2: the SS code;
- bit 7: BERR pending.

Any write to the error register clears it and BERR. After a timeout the
strobes stay where they are, and software decides what to do.

With the **SCRAM** control bit set, any error drops AS, DS and GK at once
and clears the bus-request bit. A program that loops on an error therefore
cannot hold the segment.

## Register map (register space, offset = address bits 5:0)

| offset | register | notes |
|--------|----------|-------|
| 0-3  | AD register | 32 bits, in the order set by the word-order jumper |
| 4    | master status | 0 AS, 1 DS, 2 AK, 3 DK, 4 busy, 5 bus mine, 6 WT, 7 AR |
| 5    | error status | see above; a write clears it |
| 6    | interrupt status | 0 SR, 1 took mastership (write 1 to clear), 2 selected as slave, 3 BERR, 4 GINTR |
| 7    | control | 7 request bus, 6 GINTR enable, 5 SCRAM, 4 automatic slave, 3 host (GK without arbitration), 2 RB, 1 EG on address cycles, 0 SR |
| 8    | arbitration level CSR | 6 bits |
| 9    | slave configuration | 2:0 IA width code (0..5 = 8, 13, 18, 23, 28, 32 bits), 4 sparse-data flag |
| 10   | slave status | 0 selected, 1 command ready, 2 RD, 4:3 MS, 5 broadcast, 6 logical address pending, 7 DS |
| 11   | slave pseudo-DK | writing it answers the pending strobe, with SS = bits 2:0 |
| 12-15 | logical address CSR | 32 bits |
| 16-19 | slave data in | AD as latched on the last address or write strobe (read only) |
| 20-23 | slave data out | data the slave returns on reads |

## Slave support

Slave behaviour is a software loop:

1. wait for "command ready";
2. read RD and MS;
3. jump to the handler;
4. answer with a pseudo-DK and an SS code;
5. repeat until AS drops.

The hardware (`sfc_fb_slave`, `sfc_addr_match`) does the parts that have to
be fast:

- **Address recognition**, sampled when AS rises:
  - *Geographic*: EG is asserted and AD[4:0] equals the slot pins `ga`.
    AK is given at once.
  - *Logical*: AD above the internal address (IA) matches the
    logical-address CSR. The IA is 8 to 32 bits wide. WT is raised at once,
    and AK waits for software to check the IA and write the pseudo-DK
    register. That write drops WT, sets SS and lets AK go up.
  - *Broadcast*: MS1 is set. AD[1:0] gives the case: general, pattern
    select, sparse data scan or SR scan.
- **Data strobes.** Once selected, every data strobe latches AD and RD,
  raises WT and sets "command ready". For random cycles (MS0 = 0) that is DS
  rising; for block transfers (MS0 = 1) it is every DS edge. The pseudo-DK
  sets DK to the current DS level, so software never tracks DK through a
  block. At the end of a random cycle, DK follows DS down without software.
  On reads, the slave data-out register is driven on AD while DK answers.
- **Broadcasts.** The pseudo-DK clears WT and sets SS, but gives no DK.
  This module gives no AK or DK for broadcasts; the segment's ancillary
  logic is assumed to acknowledge them.
  - Sparse data scan and SR scan reads are answered in hardware: AD[slot]
    is pulled if the sparse-data flag (or, for an SR scan, SR) is set.
  - After a pattern-select broadcast, the first data write selects this
    slave if its AD[slot] bit is set.
- **Automatic slave** (control bit 4). Data strobes get DK at once, with
  SS = 0 and no WT. The WT on a logical address is kept, so WT generation
  can still be tested.

## Mastership

Software sets control bit 7 and polls status bit 5. `sfc_arbiter` then does
the following:

1. It asserts AR.
2. When the ancillary logic raises AG, it drives its 6-bit level on the
   wired-OR AL lines. It withdraws every lower bit below a bus bit that is
   set where its own level is clear.
3. After `ARB_SETTLE` clocks, it has won if AL equals its own level.
4. The winner waits for GK to be free, then takes GK and drops AR.

Clearing bit 7 releases GK. The *host* bit takes GK at once, without
arbitration; together with RB it lets the module preempt the segment as
host. With the `ai_jumper` input set, AI is asserted while the module holds
GK.

There are two interrupt outputs:

- `berr_irq`: BERR, as described above.
- `gintr_irq`: GINTR, the OR of an incoming SR, a sticky "took mastership"
  flag and "selected as slave". One control bit enables all three.

## A complete operation

The reference sequence is: arbitrate, check for mastership, geographic
address cycle to slot $11, read a word, double it, write it back, AS down,
GK down. As I/O accesses at base `B` with a 16-bit MPU:

```
byte write B+8      <- arbitration level
byte read/write B+7 <- set bit 7 (request bus)
byte read  B+4      until bit 5 (bus mine)
word write B+$E0, B+$E2 <- slot address; address cycle runs on the 2nd
word read  B+$F0, B+$F2 -> data; random read runs on the 1st
word write B+$F0, B+$F2 <- doubled data; random write runs on the 2nd
byte write B+$40        ; COMMAND: AS down
byte read/write B+7     ; clear bit 7: GK down
```

`tb/tb_sfc_top.sv` runs exactly this sequence. With the bus timing of that
testbench it takes 185 clocks.

## Files and hierarchy

```
sfc_top                 top level, FASTBUS lines as drive/receive pairs
  sfc_mb_if             MULTIBUS I/O slave handshake, byte lanes, XACK*
  sfc_csr               address decoding, modes, registers, launches primitives
    sfc_ad_reg (x3)     32-bit register filled 8/16 bits at a time (AD, logical address, slave data out)
  sfc_fb_master         FASTBUS master sequencer, SS/parity checks, SCRAM
    sfc_timeout         timeout counter held by WT
  sfc_arbiter           AR/AG/AL/GK, host preemption, AI
  sfc_fb_slave          slave handshake support
    sfc_addr_match      geographic / logical / broadcast recognition
  sfc_intr              BERR and GINTR
sfc_pkg                 shared types, address and register constants
```

Every FASTBUS line is open-collector on the backplane. At the top level each
line is split in two:

- an output `fb_*_o`, where 1 means "pull the line to its asserted state";
- an input `fb_*_i`, the state of the bus line, which includes this
  module's own drive.

The bus itself, the OR of all drivers, is outside the module. AD has an
output enable. Only MS0 and MS1 are implemented. FASTBUS inputs are assumed
to be synchronous to `clk`. The MULTIBUS command strobes are synchronised
inside the module.

Parameters of `sfc_top` (the source design gives no numbers for either):

| parameter | default | meaning |
|-----------|---------|---------|
| `TIMEOUT`    | 1000 | clocks a master waits for AK/DK before a timeout |
| `ARB_SETTLE` | 8    | clocks allowed for the AL lines to settle |

## Simulating

Each testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. Run the end-to-end test with plain
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl --top-module tb_sfc_top \
    rtl/sfc_pkg.sv tb/tb_sfc_top.sv -Mdir obj_top
./obj_top/Vtb_sfc_top
```

Replace `tb_sfc_top` with the testbench of a single block to test that
block:

| testbench | what it checks |
|-----------|----------------|
| `tb_sfc_top` | End-to-end run at default parameters. A model MPU, an external slave at slot $11, a second bus master and ancillary logic around the module. Runs the read-modify-write with arbitration, then every mechanism: block transfers ending on an odd count, COMMAND repeated writes, OVERLAPPED commands, 8-bit cycles in the other word order, SS, parity and timeout errors with BERR, SCRAM, host preemption, self-addressing (geographic with automatic slave, and logical with WT and pseudo-DK), a general broadcast, a sparse data scan, pattern select, GINTR, and arbitration against a second master with a lower level. It counts each mechanism and fails if one never occurs. |
| `tb_sfc_mb_if` | MULTIBUS byte lanes, XACK\* never before the core answers, other bases ignored |
| `tb_sfc_csr` | launch points of CYCLE mode for 16- and 8-bit MPUs in both word orders, COMMAND and OVERLAPPED, error register, SCRAM, CSRs |
| `tb_sfc_fb_master` | all primitives against a model slave, SS, parity and timeout errors, timeout length, WT holding the timeout, SCRAM |
| `tb_sfc_timeout` | expiry after exactly `LIMIT` counting clocks, WT hold, clear |
| `tb_sfc_arbiter` | two arbiters with random levels (the higher wins, the other follows after release), host, SCRAM, AI |
| `tb_sfc_fb_slave` | every slave behaviour listed above |
| `tb_sfc_addr_match` | random addresses against an independent model for all six IA widths |
| `tb_sfc_ad_reg` | 16- and 8-bit filling in both orders, parallel load |
| `tb_sfc_intr` | random stimulus against a reference model |

## How far this follows the source design

These parts follow the published design:

- the I/O-mapped command scheme with AS, DS, MS0 and MS1 in the address;
- the three modes, and where interlocked mode issues its strobes;
- the word-order jumper;
- XACK\* held until AK or DK, and BERR for SS, parity and timeout errors;
- the timeout counter, SCRAM and the arbitration-inhibit jumper;
- host preemption with GK and RB;
- GINTR's three sources with one enable;
- the hardware-supported CSRs (logical address, arbitration level);
- the slave features: address kinds, IA widths, WT on logical addresses and
  on data strobes, DK toggling, pseudo-DK with SS, no DK in broadcasts,
  automatic slave;
- self-addressing for diagnostics.

These parts are this implementation's own choices. The published
description states the functions but not these details:

- the clocked implementation;
- the full bit map of the address and the registers, apart from offsets
  $E0, $F0, $40, 4 and 7;
- the error-register layout;
- holding the timeout while WT is asserted (inferred from how self-test is
  described);
- the parity convention;
- what the arbitration-inhibit jumper inhibits;
- the AL competition and settle time (taken from the FASTBUS scheme as
  understood here);
- where the broadcast case and geographic address sit in AD;
- the bit-per-slot form of scans and pattern select, answered in hardware;
- broadcasts being acknowledged by ancillary logic;
- the slave's software interface as registers. In the original, the slave
  responds through interlocked or COMMAND transfers; here it responds with a
  register write, which likewise never raises BERR.

Not included:

- the MULTIBUS processor board itself;
- the ECL/TTL translators, drivers and connectors;
- the routing of MULTIBUS to an adjacent slot;
- the fast RAM-driven sequencer proposed for a later printed-circuit
  version.

Timing is in clocks, so the microsecond figures of the wire-wrap prototype
(about 2-5 µs per 32-bit transfer, about 19 µs for the read-modify-write
with arbitration) depend on the clock rate and the processor board. They are
not reproduced.
