# Pipelined VOQ buffer manager for an input-queued cell switch

An input-queued switch keeps the cells that lose output contention in the
input line card, not at the output. To avoid head-of-line blocking, every
input keeps one *virtual output queue* (VOQ) per output port, and a central
arbiter picks, slot by slot, which input may send to which output. This RTL
is the buffer manager that sits on such a line card: it stores every cell
once, keeps all VOQs as linked lists of cell addresses in one external
pointer memory, asks the arbiter for service, and sends the granted cells to
the crossbar, one cell in and one cell out in every cell slot.

Two ideas carry the design:

* **All queues share one pointer memory.** The 16 VOQs and the list of free
  buffers (the idle queue) are linked lists in a single dual-port SRAM. A
  queue holds as many cells as it needs, so buffer space is never reserved
  per output. Multicast cells are stored once and passed from one output
  queue to the next ("stitching").
* **Request shifting.** The arbiter sits several slots away across serial
  links. Instead of waiting for each grant, the manager keeps, per VOQ, a
  shift register of requests in flight, so it can send a fresh request every
  slot while earlier ones are still travelling, and re-sends a request that
  came back without a grant.

The defaults describe a 16x16 switch, 2.5 Gb/s (OC-48c) per port, 62.5 MHz
clock, 10-clock cell slot (160 ns, about 2.65 Gb/s of 53-byte cells).

## Blocks

| module | role |
|---|---|
| `buffer_manager_top` | one port card: ingress manager and egress manager, memory ports brought out |
| `ingress_bm` | `bm_engine` + `bpc` + `rfc`, faces the central arbiter |
| `bm_engine` | the shared pipeline: ICW, WPM, IDQ, VOQ, PM, RPM, OCR, slot timer, pointer-memory multiplexer |
| `icw` | incoming cell writer: holds one cell, writes it to the cell buffer |
| `wpm` | write pointer manager: takes a free address, links it into the VOQ, stores the bitmap |
| `idq` | idle queue (free list) with head/tail registers IHR/ITR and a free count |
| `voq` | head/tail registers OHR0-15/OTR0-15 and lengths of the 16 VOQs |
| `pm` | policing: admission decision, per-VOQ length, events for the BPC |
| `rpm` | read pointer manager: removes the served head, frees or stitches it |
| `ocr` | outgoing cell reader: reads the served cell out of the cell buffer |
| `rfc` | request FIFO controller: request shifting towards the arbiter |
| `bpc` | backpressure controller: hands per-slot arrival/stitch counts to the RFC |
| `slot_timer` | slot phase counter |
| `bm_pkg` | shared sizes and the phase plan |

The egress manager is a second `bm_engine`: cells from the crossbar are
queued by the bitmap in their header, and the queue to serve each slot comes
in on `eg_sel_valid`/`eg_sel_port`. The egress scheduling policy, the CSIX
port-processor interface, the processor interface and the SRAM chips
themselves are not part of the RTL.

## Memories and the pointer entry

Each manager uses two external synchronous SRAMs, both with one read port and
one write port and one clock of read latency:

* **Cell buffer** (INBM / EGBM), 72 bits wide, two 36-bit chips side by side
  (bits 71:36 and 35:0). Cell `c`, beat `b` lives at address `{c, b}`
  (`CELL_AW + 3` address bits). A cell is `CELL_BEATS` = 6 beats (54 bytes,
  room for a 53-byte ATM cell).
* **Pointer memory** (INPM / EGPM), 36 bits wide. Every cell address `c` owns
  a 72-bit entry stored as two words: `{c, 0}` holds the address of the next
  cell in whatever list `c` is on; `{c, 1}` holds the cell's remaining
  multicast bitmap (one bit per output, in the low `N_PORTS` bits).

A list is only its head and tail registers plus these next fields. Appending
`x` to a list whose tail is `t` is one write, `next[t] = x`, and a register
update; removing the head `h` is one read of `next[h]`. The idle queue is the
same kind of list. After reset the `idq` block spends `2**CELL_AW` clocks
writing `next[i] = i+1` for every address (`init_done` goes high after
that); nothing is admitted before.

## The cell slot

Everything runs on a slot of `SLOT_CYCLES` = 10 clocks: four two-clock
processing stages and a two-clock synchronisation stage. Two clocks per stage
are what a 72-bit entry takes over the 36-bit pointer bus. Each phase gives
the pointer memory to one block, so no arbitration is needed:

| phase | pointer memory | other work |
|---|---|---|
| 0 | read next of the idle head (pop); write `next[old tail] = new` | PM decides admission; OCR passes the grant to the RPM; ICW writes beat 0 |
| 1 | write the new cell's bitmap | OCR starts reading the served cell |
| 2 | stitch: write `next[tail of leaf q] = H` for last slot's multicast cell | first output beat |
| 3 | write the reduced bitmap of that cell | |
| 4 | read `next[H]` of the cell being served | |
| 5 | read the bitmap of `H` | last ICW write |
| 6 | VOQ head = `next[H]`; clear the served bit | |
| 7 | write `next[idle tail] = H` if no leaf is left (free) | last output beat |
| 8-9 | | slot end: RFC/BPC bookkeeping, grant sampled |

A cell whose beats enter on phases 0-5 of slot *n* is held in the ICW; its
header is admitted at phase 0 of slot *n+1*, and its beats are written to
the cell buffer on phases 0-5 of that slot. A grant sampled at the end of
slot *n* is served in slot *n+1*: the outgoing cell appears on `out_*` on
phases 2-7 with `out_sop` on phase 2.

## Multicast: one stored cell, many queues

A cell's destination bitmap comes in the top `N_PORTS` bits of its first
beat. The cell is written to the buffer once and linked only into the VOQ of
its lowest set bit. When that VOQ serves it, the RPM

1. reads the cell's next pointer and bitmap (phases 4, 5),
2. advances that VOQ's head and clears the served bit (phase 6),
3. if no bit is left, returns the address to the idle queue (phase 7);
   otherwise, in the **next** slot, appends the same address to the VOQ of
   the lowest remaining bit (phase 2) and writes back the reduced bitmap
   (phase 3).

The stitch of the previous cell thus runs in the same slot as the read of the
current one, ahead of it, so a queue that has just received a stitched cell
can be served in the same slot. The reused next field is safe: by the time a
cell is stitched it has left its old queue, so its next field is free. The
stitched leaf counts as a new arrival for the policing and request logic. A
cell with `k` leaves is therefore served `k` times, one leaf after another in
ascending port order, and each output sees the cell in the order it was
queued for that output.

## Request shifting (RFC)

For each VOQ the RFC keeps a `RFC_DEPTH`-bit shift register and a count of
queued cells that have no request yet. Bit 0 is the request sent in the
current slot, bit `DEPTH-1` the one sent `DEPTH-1` slots ago; the arbiter is
expected to answer a request within `DEPTH` slots. At each slot end:

1. New arrivals and stitches from the BPC are added to the count.
2. A grant for port `g` clears the oldest set bit of `g`'s register (a grant
   with nothing outstanding is flagged on `spurious` and ignored) and is
   handed to the OCR for the next slot.
3. All registers shift. The bit entering at position 0, which is also this
   slot's `arb_req` bit, is
   * the bit leaving the register, if it is still set (the arbiter turned it
     down, so the same request is sent again),
   * else a new request if the count is non-zero (count decremented),
   * else no request.

So every VOQ has at most `DEPTH` requests in flight, at most one request per
VOQ goes out per slot, and a request is never lost. Between slots, the RFC's
count equals the PM's queue length minus the set bits of the register (less
a granted cell that has not left yet). A grant therefore
always finds a cell in its queue: the cell was counted before its request
went out and is only removed by that grant.

## Policing

The PM keeps the length of each VOQ (arrivals and stitches in, departures
out). A cell is admitted when its bitmap is non-zero, a free buffer exists,
and its first leaf's queue is shorter than `Q_LIMIT`. Otherwise the whole
cell is dropped (`drop` pulse, `drop_cnt`). Stitches are never refused: the
cell is already stored.

## Interfaces

`buffer_manager_top` ports, prefix `ig_` for ingress, `eg_` for egress:

* cells in: `*_in_valid`, `*_in_data[71:0]`, six beats starting at the
  slot's phase 0 (`*_soc`). Beat 0 bits 71:56 are the destination bitmap.
* cells out: `*_out_valid`, `*_out_sop`, `*_out_port`, `*_out_data`.
* arbiter: `ig_arb_req[15:0]` valid from one slot end to the next;
  `ig_arb_grant_valid/ig_arb_grant_port` sampled at `ig_slot_end`.
* egress service: `eg_sel_valid/eg_sel_port`, sampled at phase 0.
* status: `*_drop`, `*_stitch`, `*_err` (served an empty queue),
  `ig_spurious`, `*_free_cnt`, `*_q_len`.
* memories: `inpm_*`, `inbm_*`, `egpm_*`, `egbm_*` read/write ports of the
  four SRAMs (read data expected one clock after `*_rd_en`).

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_PORTS` | 16 | 16x16 switch of the original design |
| `BEAT_W` | 72 | two 36-bit cell buffer chips |
| `PTR_W` | 36 | pointer memory bus |
| `SLOT_CYCLES` | 10 | five two-clock stages (read from the description of the stages) |
| `CELL_AW` | 12 | 4096 cell buffers; chosen here |
| `CELL_BEATS` | 6 | 53-byte ATM cell; chosen here |
| `RFC_DEPTH` | 4 | request/grant round trip in slots; chosen here |
| `Q_LIMIT` | 1024 | policing threshold; chosen here |

The phase plan in `bm_pkg` assumes `SLOT_CYCLES` = 10 and `CELL_BEATS` <= 6.

## How closely this follows the original design

Taken from the original description: the set of blocks and their roles, one
shared dual-port pointer memory for all VOQs and the idle queue, the 36-bit
pointer bus with two clocks per 72-bit entry, the four processing stages plus
a synchronising stage, the RPM's eleven steps split over two slots with
stitching of the previous cell overlapping the read of the current one, the
request FIFO rules (new request only when the first element is free, invalid
request when nothing is queued, a grant deletes the oldest request), the
BPC passing arrival and stitch events from the PM to the RFC, and the use of
the same engine as egress manager.

Chosen here, where the description gives no detail: the exact phase of each
memory access, the header format, cell and buffer sizes, the admission rule
and queue limit, the order of multicast leaves (lowest port first), the RFC
depth, treating the "first element" of the request FIFO as the one leaving
it and re-sending an ungranted request from there, the one-slot
store-and-forward in the ICW, the reset behaviour and idle-list
initialisation, freeing a multicast cell once its last leaf is served, and
the external egress queue selection. The BPC here only
moves counts to the RFC; any backpressure towards the port processor is not
built. The CSIX framing, the blocks around it and the processor interface
are not built.

## Verification

Each block has a self-checking testbench in `tb/` comparing against an
independent model; `tb/sram_model.sv` models the SRAMs and
`tb/bm_ref_pkg.sv` holds a cell-level reference model of a buffer manager.
`buffer_manager_top_tb` runs the whole port card at the default parameters:
random unicast and multicast traffic, an arbiter answering `RFC_DEPTH` slots
later and declining at random, ingress output looped into the egress manager,
then a phase that overfills one queue and the whole buffer, then a full
drain after which all buffers must be free. Every output beat is compared,
and the bench fails if stitching, queue-limit drops, buffer-full drops,
empty-bitmap drops, re-sent requests or back-to-back cells never occur.

`wire_speed_tb` runs the port card at line rate with the defaults: a new
unicast cell in every slot, a grant in every slot, egress serving every slot.
Once the queues are backlogged both managers must send a cell in every slot,
with start-of-cell pulses exactly 10 clocks apart and no drops; at 62.5 MHz
that is 2.65 Gb/s of 53-byte cells against the 2.488 Gb/s OC-48c line rate.

Simulating with Verilator 5, for example the top-level bench:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
      rtl/bm_pkg.sv tb/bm_ref_pkg.sv tb/buffer_manager_top_tb.sv \
      --top-module buffer_manager_top_tb
    ./obj_dir/Vbuffer_manager_top_tb

Each testbench prints `TB_RESULT checks=<n> failures=<n>` at the end. The
other benches are built the same way with their own top module; most of them
override parameters (fewer buffers, lower queue limit) to keep runs short.

Lint leaves two kinds of warnings. Unused signals: status outputs of the
blocks (queue lengths, RFC registers, drop counters) that the top does not
bring out, package constants a given module does not use, and the upper,
unused bits of the 36-bit pointer words. And the reset being seen both as an
asynchronous reset of the flops and as a synchronous term in the
`disable iff` of the handshake assertions.
