# A TRIPS EDGE processor core in SystemVerilog

TRIPS runs programs as *blocks* of up to 128 instructions rather than one
instruction at a time. Inside a block, instructions do not name registers for
their results. Each one names its consumers directly: "send my result to
operand 0 of instruction 37". The hardware maps the instructions of a block
onto a 4x4 array of execution tiles. Each instruction fires as soon as its
operands arrive, and results travel between tiles over a small mesh network.
Registers and memory are touched only at block boundaries. A block reads up
to 32 registers, writes up to 32 registers and issues up to 32 loads and
stores, and it commits atomically. Up to eight blocks are in flight at once,
one speculative block after another, predicted by a next-block predictor.

This repository is RTL for one such core, in the single-threaded
configuration with eight blocks in flight. It covers:

- the tiles and the operand network;
- block fetch and dispatch;
- dataflow execution with predication;
- register forwarding between blocks;
- a load/store queue with a dependence predictor;
- violation recovery, misprediction recovery;
- the distributed commit protocol.

It simulates with plain Verilator. Every tile has a self-checking testbench,
and one more runs a small program end to end.

## Tile map

```
          col 0   col 1  col 2  col 3  col 4      fetch side
   row 0    G       R0     R1     R2     R3        I (header)
   row 1    D0      E      E      E      E         I (row 0)
   row 2    D1      E      E      E      E         I (row 1)
   row 3    D2      E      E      E      E         I (row 2)
   row 4    D3      E      E      E      E         I (row 3)
```

| tile | file | what it does |
|------|------|--------------|
| G  | `rtl/gtile.sv`, `rtl/exit_predictor.sv` | Keeps the 8 block frames as a circular queue and predicts the next block. Starts fetches, detects completion, and sends commit and flush commands. |
| I  | `rtl/itile.sv` | A 16 KB instruction array per row. It streams a block's 8 rows, one per cycle. |
| R  | `rtl/rtile.sv` | One register bank: 128 registers, which is 4 threads x 32. Bank *b* holds GR *b*, *b*+4, and so on. It holds the block's reads and writes in queues and forwards values between blocks in flight. |
| E  | `rtl/etile.sv` | 64 reservation stations (8 frames x 8 slots), a wakeup/select stage and a 1-cycle integer ALU. |
| D  | `rtl/dtile.sv` | An 8 KB data bank and a 256-entry load/store queue (8 frames x 32 LSIDs). It also holds the dependence predictor, counts stores and commits them. |
| OPN | `rtl/opn_router.sv` | One router per tile position: 5 ports, Y-X routing, 4-entry input queues and on/off hold. |
| core | `rtl/trips_core.sv` | Wires everything together. |

`rtl/trips_pkg.sv` holds the shared sizes, instruction encodings, packet and
control structs.

## Instruction placement and the 9-bit target

An instruction's identity is its position: `{row Y (2), slot (3), column X (2)}`,
7 bits. A target is 9 bits:

| bits 8:7 | meaning |
|----------|---------|
| `00` | `00_01_wwwww` is register write slot *w*; all zero means no target |
| `01` | predicate of instruction `[6:0]` |
| `10` | operand 0 of instruction `[6:0]` |
| `11` | operand 1 of instruction `[6:0]` |

Write slot *w* belongs to bank `w[1:0]`, entry `w[4:2]`. Register reads carry
8-bit targets with an implied leading 1, so a read can only feed operands. A
read target of zero is treated as "none". As a result, operand 0 of
instruction 0 cannot be the target of a register read.

Instruction formats, 32 bits:

| format | layout |
|--------|--------|
| G | `op[31:25] pr[24:23] xop[22:18] T1[17:9] T0[8:0]` |
| I | `op pr xop imm9 T0` |
| L | `op pr lsid imm9 T0` |
| S | `op pr lsid imm9 0` |
| B | `op pr exit[22:20] offset[19:0]` |
| C | `op const16[24:9] T0` |

The predicate field `pr` has three values:

- `00`: the instruction always fires.
- `11`: it fires on a true predicate.
- `10`: it fires on a false predicate.

The opcode numbers are this design's own; see `opcode_e` in the package. XOP is
not used.

Block layout in the I-tiles:

- A block sits at a 128-byte aligned address. Address bits [13:7] pick an
  8-row slot in every I-tile.
- In the header I-tile, row *r* holds header words H(4r)..H(4r+3). Word
  H(4r+b) is `{mask nibble[31:28], read[27:6], write[5:0]}` for bank *b*,
  entry *r*.
- The read fields are `{valid, GR[4:0], RT0[7:0], RT1[7:0]}`.
- The write fields are `{valid, GR[4:0]}`.
- The store mask is 32 bits: one bit per LSID that is a store. It is the
  nibbles of H0..H7.
- In instruction I-tile *y*, row *s*, word *x* is the instruction for E-tile
  (x, y), slot *s*.
- The fall-through address is the block address + 5 chunks (640 bytes).

## Life of a block

1. **Fetch.** The G-tile takes a free frame and asks all five I-tiles for the
   block. The I-tiles stream 8 rows in 8 cycles. The first row arrives two
   cycles after the request. Meanwhile the predictor gives the next block
   address, so a new fetch can start every 8 cycles.
2. **Dispatch.** Header rows go to the R-tiles, and the store-mask nibbles go to
   the G-tile. The G-tile hands the mask to every D-tile. Instruction rows go
   to the E-tiles. Rows of a frame that was flushed meanwhile are dropped.
3. **Register reads.** Each R-tile sends one read per cycle into the OPN. If an
   older block in flight writes the same register, the read waits for that
   write value and forwards it (*register forwarding*). A null write is skipped
   in favour of the next older writer.
4. **Execution.** An E-tile picks one ready instruction per cycle: oldest frame
   first, then lowest slot. An operand delivered this cycle already counts as
   ready. A result goes to at most one local target (a *bypass* into the same
   tile) and one remote target (an OPN packet) per cycle. A predicate that
   arrived by bypass is checked in execute. If it does not match, that issue
   cycle is lost (*bubble*) and the instruction waits again.
5. **Loads and stores.** These go to the D-tile that owns the address (address
   bits [7:6]). The load/store queue returns a load's value by overlaying, byte
   by byte, older stores of the same and older blocks on the array data.
   - *Violation.* If a store arrives after a younger load to an overlapping
     address has already executed, the D-tile reports a violation. It also sets
     that load's bit in the dependence predictor, which is indexed by block
     address and LSID.
   - *Deferral.* A load whose bit is set waits until all older stores have
     arrived. The D-tiles learn about stores that arrive at other D-tiles over
     the DSN, a one-cycle broadcast.
   - `dep_mode` selects the policy: 0 uses the predictor, 1 defers every load,
     2 never defers.
   - The predictor clears itself after every 256 committed blocks.
6. **Completion.** A block is complete when three things have happened:
   - every R-tile has received all the writes of the block;
   - D-tile 0 has counted every store in the mask;
   - the branch has reached the G-tile.
7. **Commit.** The G-tile commits the oldest complete block:
   - cycle 0: completion is known.
   - cycle 1: commit is detected.
   - cycle 2: the commit command goes to every tile, and the predictor is
     updated. The R-tiles write their register files. The D-tiles write their
     stores, one per cycle.
   - Each R-tile and D-tile then acknowledges. After all acknowledgements, the
     frame is deallocated.

## Recovery

- **Misprediction.** The branch packet carries the actual target. This is the
  register value for `BR`/`CALL`/`RET`, or block address + offset x 128 for
  `BRO`/`CALLO`. The packet is registered for one cycle in the G-tile and then
  compared with the address that was predicted for that block. If they differ
  and younger blocks exist, the G-tile flushes them and refetches from the
  right address. If the block is the youngest, only the next fetch address is
  corrected.
- **Flush.** A flush is one command naming a set of frames:
  - Every E-tile clears the frames' stations.
  - Every router drops queued packets of those frames.
  - The R-tiles and D-tiles drop the frames' queue entries.
  - The I-tiles stop streaming them.
  A flush and a commit never share a cycle; the flush wins.
- **Violation.** The violating block and all younger blocks are flushed. The
  violating block is then refetched.
- **Exceptions.** An exception token that reaches the branch of the oldest
  block stops the core: younger blocks are flushed and `halted` rises. `SCALL`
  always raises one, so programs end with it.

## Top-level interface (`trips_core`)

| port | use |
|------|-----|
| `start`, `start_pc`, `max_frames`, `dep_mode` | Start fetching at `start_pc` with up to `max_frames` blocks in flight. `dep_mode` sets the load policy. |
| `running`, `halted`, `blocks_committed` | Status outputs. |
| `refill_*` | Writes one 128-bit row of one I-tile. Tile 0 is the header tile; tiles 1..4 are instruction rows 0..3. |
| `dmem_*` | Reads and writes a D-tile data array. `dmem_tile` = address[7:6], `dmem_addr` = {address[14:8], address[5:3]}. |
| `reg_*` | Reads and writes thread-0 register GR 0..127. |
| `events[13:0]` | One strobe per mechanism (see the header of `trips_core.sv`). |

All state is reset by an asynchronous active-low `rst_n`. The storage arrays
are not reset: the I-tile and data arrays, the register files and parts of the
predictor.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends a hung run. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_trips_core \
    rtl/trips_pkg.sv $(ls rtl/*.sv | grep -v trips_pkg) tb/tb_trips_core.sv
./obj_dir/Vtb_trips_core
```

### `tb_trips_core`

Runs the full-size core at its default parameters on three hand-assembled
blocks:

- A loop computes `C[i] = A[i] + B[i]` for 16 elements, one element per block,
  with the index passed from block to block in GR4.
- An exit block stores 42 through a slow address chain and then loads the same
  address. Its first run is a violation; after the refetch the load is
  deferred and forwarded.
- A final block makes a system call. It also sends two operand streams into
  one router to exercise flow control.

The testbench checks the memory and register results and 17 committed blocks.
It also requires every mechanism to occur at least once: local bypass, remote
operand, OPN stall, predicate bubble, register forwarding, LSQ forwarding,
load deferral, violation, store commit, commit, flush, misprediction,
deallocation and router hold.

### Other testbenches

- `tb_etile` runs the E-tile's ALU, bypass, predication and load-packet paths
  over all 8 frames.
- `tb_opn_router` sends random traffic through one router with random holds.
  It checks the route, per-input order and loss, and that a flush drops
  queued packets.
- `tb_itile` checks row streaming, busy and abort.
- `tb_exit_predictor` checks fall-through, training and call/return type.
- `tb_rtile` checks register reads, forwarding from an older block's write,
  completion, commit and a flushed write.
- `tb_dtile` runs a violation, then deferral with forwarding after the flush,
  then store commit and a sign-extended byte load.
- `tb_gtile` drives the G-tile with a model of the other tiles. It checks
  commit order, misprediction recovery, deallocation and the halt.

## Where this design departs from or adds to the TRIPS description

Sizes follow the described machine: 8 frames, 64 stations per E-tile,
128-instruction blocks, 16 KB I-tiles, 8 KB D-tiles, a 256-entry load/store
queue, a 1024-bit dependence predictor and 4-entry router queues. The
following are this design's own choices or simplifications:

- **Packets.** An OPN packet is a single wide flit carrying both control and
  data. The original sends a control flit followed by a data flit one cycle
  later.
- **Control networks.** The dispatch, control, status and store-arrival
  networks are direct wires with at most one cycle of delay, not hop-by-hop
  tile networks. Only D-tile 0 reports that all stores have arrived.
- **Caches always hit.** The I-tiles are directly indexed by block address
  with no tags. The D-tiles have no tags, no miss path and no TLB. There is no
  secondary memory system or on-chip network. Instead, the refill and access
  ports load programs and data.
- **Predictor.** There is only the local exit-history predictor (5 exits x 2
  bits of history, 3-bit exits with 2 hysteresis bits) and a target buffer.
  There is no global or choice predictor, no return address stack and no
  speculative history update.
- **Execution units.** Integer only. There is no floating point, multiply or
  divide; in the original these are licensed IP. `MOV3`/`MOV4` and PC reads
  are not built. Opcode numbers are arbitrary.
- **Test instructions.** `TxxI` test instructions deliver their result through
  the I-format T0 field.
- **Select.** The E-tile picks the oldest frame first, and a result sent to a
  remote tile wakes its consumer one cycle later than in the original.
- **Single thread.** Only single-threaded mode is wired. The R-tiles have
  storage for 4 threads, but the thread number is tied to 0.

## Synthesis notes

Every storage array is built from flip-flops. This includes the 16
reservation-station arrays, the four 256-entry load/store queues and the
instruction and data arrays, so generic logic synthesis of the whole core is
slow. For a real implementation, the instruction arrays, data arrays and
register files would be replaced by SRAM macros.
