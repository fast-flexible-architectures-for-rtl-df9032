# CryptoManiac — a programmable cipher coprocessor

Servers and storage controllers that encrypt everything they send spend most
of their CPU time inside a few small secret-key cipher kernels: table
lookups, rotates, XORs, adds and the occasional modular multiply, repeated
for 8 to 48 rounds per block. A general-purpose out-of-order core runs these
loops poorly, and fixed-function cipher chips cannot follow new algorithms.
CryptoManiac sits between the two. It is a small, programmable coprocessor
built from several simple VLIW processing elements whose datapath is shaped
around cipher inner loops:

* every instruction can do **two dependent operations** (for example
  `(a + b) ^ c`) in one cycle;
* each of the four functional units has **its own 1 KB substitution table**
  (SBOX), read with no address arithmetic;
* two units have a **16-bit modular multiplier** (mod 2^16+1, as IDEA uses);
* all state for one key (tables plus key words, 5 KB) is one **context**,
  which a **keystore** swaps in and out of an element when the element is
  given work for a different session.

A host pushes tagged requests ("create session", "encrypt block", ...) into
an input queue; a scheduler hands them to free elements, preferring one that
already holds the session's context; results come back, tagged, through an
output queue.

This repository also holds four **cipher instruction-set extension units**
meant for a 64-bit general-purpose core (rotates with XOR, a bit-permute,
a modular multiplier and a sector-cached SBOX unit). They stand beside the
coprocessor in the top level with their own ports.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`, one
module or package per file. Testbenches are in `tb/`.

---

## 1. System structure

```
            in_req ──► InQ (req_fifo, 16) ──► request_scheduler ──► pe_valid[i]
                                                │     ▲
                             ctx_start/done     │     │ pe_idle[i]
                                                ▼     │
                 adm_ks_* ──► keystore ◄──ctx_*──► cm_pe[0..3] ──rs──┐
                              (8 × 5 KB)                              │
                                                 fixed-priority merge ▼
            out_rsp ◄── OutQ (req_fifo, 16) ◄──────────────────────────
```

| Module | Role |
|---|---|
| `cm_top` | System top: queues, scheduler, keystore, `NUM_PE` elements, output merge, and the extension units |
| `req_fifo` | Type-parameterised ready/valid FIFO, used for both queues |
| `request_scheduler` | Chooses an element for each request, runs context switches, tracks sessions |
| `keystore` | Per-session context memory and the word-serial save/load engine |
| `cm_pe` | One 4-wide, 4-stage VLIW processing element |
| `functional_unit` | logic → add/rotate/SBOX → logic datapath of one VLIW slot |
| `long_unit` | Multi-cycle multiplier (MUL, MULMOD) |
| `sbox_cache` | 256 × 32-bit table inside each functional unit |
| `regfile` | 32 × 32 register file, 12 reads and 4 writes per cycle, write-through |
| `bypass_xbar` | Full crossbar from the previous bundle's results to all 12 operands |
| `btb` | 16-entry branch target buffer |
| `imem`, `dmem` | 1 KB instruction memory (64 bundles), 4 KB data memory |
| `rot_xor_unit`, `xbox_unit`, `sbox_sector_cache` | Extension units for a 64-bit core; MULMOD reuses `long_unit` |
| `cm_pkg` | Shared constants, instruction and request types |

### Requests and results

`request_t` = `{tag[8], sess[3], code[3], data[4][32]}` and
`response_t` = `{tag, sess, data[4][32]}`. The tag is chosen by the host and
returned unchanged, so results may come back out of order. The codes are
CREATE (0), DELETE (1), ENCRYPT (2) and DECRYPT (3). The hardware does not
interpret them: each element jumps to a handler chosen by the code. The one
exception is DELETE, which the scheduler also handles itself (see below).

## 2. Scheduling and contexts

This is the part with the most subtle rules.

### Choosing an element

The scheduler looks only at the head of the input queue and dispatches in
arrival order, one request at a time. Among the elements that are waiting for
work (`pe_idle`):

1. If some hold the request's session, the one used most recently gets it.
   No context switch is needed.
2. Otherwise the **least recently used** free element is taken. If it holds
   another valid session, a context switch comes first.

Recency is an 8-bit saturating age counter per element, cleared when the
element is given a request.

### Context switch

A context is 1280 words (5 KB):

| Context word | Contents | Element address |
|---|---|---|
| 0–1023 | the four SBOX tables (table = word[9:8]) | SBOX write port / context read |
| 1024–1279 | data memory words 768–1023 (key words) | data memory port B |

A switch makes **one pass** over the 1280 addresses. In each cycle it reads
the old word from the element and stores it under the old session (when the
element held one). In the same cycle it writes the new session's word into
the element. A session that was never stored (or was deleted) loads as zeros.
`done` pulses one cycle after the last word, so a switch takes
**CTX_WORDS + 1 = 1281 cycles**. The element is idle (waiting in RECV), so
the switch owns its memories' second ports. The host can also write any
session directly into the keystore through `adm_ks_*`, for example tables
computed by a key-setup routine on the host.

### Keeping copies coherent

An element's copy of a session can be newer than the keystore's: a CREATE
builds the tables inside the element, and they reach the keystore only when
the element is later switched out. The scheduler therefore keeps one bit per
session, **ks_cur**, meaning "the keystore copy is current":

* It is set when the session is saved by a switch, or written by the host.
* It is cleared when a CREATE or a DELETE for the session is dispatched.

Then:

* A request whose session is held only by **busy** elements waits at the
  queue head, unless ks_cur is set. The queue head blocks, so later requests
  wait too.
* If ks_cur is set, the request goes to another element, which loads the
  session from the keystore. **One session can then run on several elements
  at once.** That is how a disk volume, which is one session, encrypts
  different sectors in parallel.
* A CREATE invalidates the session in every other element. No stale copy is
  used afterwards or written back over the new tables.
* A DELETE clears the session in the keystore and in every element. It then
  goes to a free element without a context switch, where the program only
  acknowledges it.

This scheme assumes that contexts are **read-only except during CREATE**.
A kernel that rewrites its tables while encrypting (RC4 does) must keep its
session on one element: send its requests one at a time.

Requests of one session that must stay strictly ordered, such as packets of
a CBC-chained network stream, must be ordered by the host. Waiting for each
result before sending the next request does that. The input queue itself
never reorders.

### Output merge

Each element offers at most one result at a time. The merge gives the output
queue to the lowest-numbered element that is offering. An element whose SEND
is not accepted stalls in EX until it is.

## 3. The processing element (`cm_pe`)

Four stages, four instruction slots per bundle:

```
 IF      bundle = imem[pc]; BTB looked up with pc → next pc
 ID      12 register reads (3 per slot), write-through from WB
 EX/MEM  bypass crossbar → 4 functional units; slot 0 data-memory access;
         branches, RECV and SEND resolve here (slot 3)
 WB      4 register writes
```

**Timing of results.** A result written back in WB is visible to the very
next bundle. The bypass crossbar covers the bundle just behind, and the
register file's write-through covers the one after. Nothing else needs an
interlock.

**Long operations.** MUL and MULMOD (slots 0 and 1 only) take `MUL_LAT = 3`
cycles. The whole bundle is held in EX until the multiplier finishes; IF and
ID freeze behind it. While held, the bundle's operands are re-read through
the bypass each cycle, so a result that is just leaving WB is not lost.

**Other stalls.** RECV waits in EX until a request arrives (`idle` is high
meanwhile). SEND waits in EX until the output merge accepts the result.

**Branches.** Only slot 3 may branch. The BTB is direct-mapped on the low PC
bits with a full tag, and a hit means "predict taken to the stored target".
Branches resolve in EX. A wrong prediction flushes IF and ID, costing two
cycles. The BTB is written on every taken branch. A not-taken branch **keeps**
its entry, so leaving a loop does not cost the next entry to the loop a
misprediction. A bundle that hit but holds no branch removes its entry.
RECV always redirects (to `VEC_BASE + code`).

**run.** While `run` is low the element is held at bundle `start_pc` with
an empty pipeline. The host then loads the instruction and data memories
through `adm_*`. When `run` rises, the element starts at `start_pc`. In the
system this address is set per element with `adm_pc_we`/`adm_pc`.

## 4. Instruction set

Each 32-bit instruction combines two operations:

```
 31    28 27    24 23  19 18  14 13   9 8    4 3 2 1   0
 [ op1  ][ op2  ][ rd ][ ra ][ rb ][ rc ][ - ][bsel]
 rd = op2( op1(ra, rb), rc )
```

| Class | Operations | Where it runs |
|---|---|---|
| tiny | XOR, AND, INC, SEXT (byte → 32 bits) | either logical unit |
| short | ADD, ROL, ROR, SBOX | the middle (short) unit |
| long | MUL (low 32 bits), MULMOD (mod 65537, 0 means 2^16) | multiplier, slots 0–1 |

The legal pairs are short-tiny, tiny-short, tiny-tiny and long-NOP. The
functional unit is laid out as *logic → short → logic*, so any legal pair
finishes in one cycle. SBOX reads the slot's **own** table at byte `bsel` of
its first operand. The program chooses the table by choosing the slot.

With `op1 = SPECIAL` (15), `op2` selects a control or memory operation. These
take a sign-extended 9-bit immediate in [8:0]; LDI takes a 19-bit immediate.

| Op | Effect | Slot |
|---|---|---|
| LD / ST | `rd = dmem[ra+imm]` / `dmem[ra+imm] = rb` | 0 |
| LDI | `rd = sext(imm19)` | any |
| BEQZ / BNEZ / JMP | branch to bundle `imm` | 3 |
| SBW | write the slot's SBOX table: `table[ra[7:0]] = rb` | any |
| RECV | wait for a request, jump to bundle `8 + code`, clear result words | 3 |
| RQR | `rd` = request field imm (0–3 data, 4 session, 5 code, 6 tag) | any |
| RSW | result word imm[1:0] = `ra` | any |
| SEND | push `{tag, session, result words}`, including RSWs in the same bundle | 3 |

A program must respect the slot rules. Assertions in `cm_pe` flag violations
in simulation.

## 5. Demonstration program and its timing

The element is programmable, so the testbenches need a program. `tb/cm_asm_pkg.sv`
holds instruction encoders and a small 4-round Feistel-style test cipher that
uses every feature of the datapath. For each round:

```
R' = ((((T0[R.b0] ^ K) + T1[R.b1]) ^ T2[R.b2]) + T3[R.b3])
     ^ mulmod(R[15:0], K[15:0]) ^ (L <<< 5)          L' = R
```

Its tables are `T0[i] = (i + K) ^ 0x1A5A5` and `Tk[i] = (i ^ K) <<< 8k`.
The CREATE handler builds them with SBW, four tables per loop iteration. It
stores K in data word 768, which is part of the context. ENCRYPT runs the
rounds. DECRYPT runs the inverse rounds, `L = (R ^ F(L)) >>> 5` and
`R = old L`, using one XOR-ROR combined instruction. DELETE and unknown
codes get an acknowledgement.

A round is four bundles: the four SBOX lookups; the add/xor, MULMOD and
rotate; the final combine; and the swap plus loop branch. The MULMOD holds
its bundle two extra cycles. So a round costs 3 + MUL_LAT = 6 cycles. With a
warm BTB, an ENCRYPT or DECRYPT takes **9 + 4 × 6 = 33 cycles** from the cycle RECV
accepts it to the cycle SEND offers the result. The testbenches check this
number.

The program also holds two real cipher kernels. The first is Blowfish
encryption (request code 6). Its four 256-word S-boxes are the four SBOX tables, and
`P[0..17]` sits in data words 769..786 of the context. Each of the 16
rounds computes `X = L ^ P[i]`, `R ^= F(X)` and then swaps L and R, where
`F(X) = ((S0[X.b3] + S1[X.b2]) ^ S2[X.b1]) + S3[X.b0]`. A round fits in
three bundles:

| bundle | slot 0 | slot 1 | slot 2 | slot 3 |
|---|---|---|---|---|
| 1 | XOR-SBOX byte 3 | XOR-SBOX byte 2 | XOR-SBOX byte 1 | XOR-SBOX byte 0 |
| 2 | load next P | ADD-XOR (S0+S1)^S2 | X = L ^ P | pointer + 1 |
| 3 | | ADD-XOR into R | loop count | branch (every second round) |

Each XOR-SBOX pair in bundle 1 recomputes `L ^ P` in the pre-logic stage of
its own unit, so no bundle waits for X. The loop holds two rounds with the
roles of the L and R registers exchanged, so the swap costs nothing. A warm
block takes 9 + 16 × 3 = 57 cycles. For comparison, the hand schedule for
the 4-wide combining machine that this design follows takes four cycles per
round. The tests use generated S-boxes and P values. The real key schedule
(P and S initialised from the digits of pi, then about 520 encryptions) is
set-up code for the host and is not included.

The second is IDEA encryption (request code 7), the multiply-bound case. A
block is four 16-bit words, `{X1,X2}` in word 0 and `{X3,X4}` in word 1.
It runs 8 rounds and the output transformation. A round needs six 16-bit
subkeys. These sit in the SBOX tables rather than in data memory, because
only slot 0 can load. Round i's subkeys are at index `3i + j`, and each SBOX
instruction picks byte j of one index register, which steps by `0x030303`
per round. Values are kept correct only in their low 16 bits: MULMOD reads
16 bits, and addition and xor carry no information downwards, so the loop
needs no masking. Only the output is masked. A round is six bundles:

| bundle | slot 0 | slot 1 | slot 2 | slot 3 |
|---|---|---|---|---|
| 1 | a = X1 ⊙ Z1 | d = X4 ⊙ Z4 | b = (c' ^ f') + Z2 | c = X3 + Z3 |
| 2 | Z5 lookup | Z6 lookup | e = a ^ c | f = b ^ d |
| 3 | e = e ⊙ Z5 | | index step | round count |
| 4 | next Z2 | f = f + e | next Z1 | next Z4 |
| 5 | next Z3 | f = f ⊙ Z6 | | |
| 6 | X4 = (e+f) ^ d | X3 = (e+f) ^ b | X1 = a ^ f | branch |

Here ⊙ is multiplication modulo 2^16+1 (MULMOD). The new X2 = c ^ f is never
written: the next round's bundle 1 folds it into an XOR-ADD pair. Three
MULMOD bundles hold EX for three cycles each, so a round takes 12 cycles.
The hand schedule this design follows takes 14. A warm block takes
14 + 8 × 12 = 110 cycles. The handler is spread over the bundles left free by the others,
and its last bundle falls through, by address wrap-around, to RECV at
bundle 0.

The other production kernels (3DES, Rijndael, RC6, Twofish and others) are
not part of this repository.

## 6. Extension units for a general-purpose core

| Unit | Function | Timing |
|---|---|---|
| `rot_xor_unit` | ROL/ROR by register; ROLX/RORX = rotate by constant, then XOR with the old destination. 64-bit, or 32-bit with zero-extension | combinational |
| `xbox_unit` | destination byte `bsel` gets bit j = `src[map[6j+5:6j]]`; other bytes zero. Eight XBOXes ORed give any 64-bit permutation | combinational |
| `long_unit #(.MUL_LAT(4))` | MULMOD | `done` in the 4th cycle counting the start cycle |
| `sbox_sector_cache` | 1 KB single-tag SBOX cache, 32 sectors of 32 bytes. The tag is the table address [31:10] | hit answers the next cycle |

On a miss the sector cache requests the 32-byte sector (`fill_req`,
`fill_addr`) and answers when `fill_valid` returns it. An access to a
different table flushes all sectors and takes the new tag. `sync` (the
SBOXSYNC instruction) clears all sector valid bits, so later accesses
re-fetch. `flush` (a task switch) invalidates the tag. The cache is
read-only, so nothing is ever written back. The low five bits of `fill_addr`
are always zero (sector aligned).

## 7. Parameters

| Parameter | Default | Where |
|---|---|---|
| `NUM_PE` | 4 | `cm_top` — this design's choice |
| `INQ_DEPTH`, `OUTQ_DEPTH` | 16 | `cm_top` — this design's choice |
| `WIDTH` | 4 slots | `cm_pkg` |
| `IMEM_BUNDLES` | 64 (1 KB) | `cm_pe` |
| `DMEM_WORDS` | 1024 (4 KB) | `cm_pe` |
| `BTB_ENTRIES` | 16 | `cm_pe` |
| `NUM_MUL`, `MUL_LAT` | 2, 3 | `cm_pe` |
| `NUM_SESS`, `CTX_WORDS` | 8, 1280 (5 KB) | `cm_pkg` / `keystore` |

## 8. Design choices and departures

These are this design's own decisions. The published architecture does not
fix them, or describes them differently:

* **Numeric encoding.** The bit layout of instructions, the SPECIAL class
  (memory, branches, SBW, mailbox operations) and the slot restrictions
  (memory in slot 0, control in slot 3) are this design's.
* **Request interface.** The request/response formats, the RECV vector table
  at bundle 8 and the administration port are this design's. The host bus
  (for example PCI) is not modelled: the queues have plain ready/valid ports,
  and `adm_*` writes memories directly instead of through queued
  administration packets.
* **Redirecting an element.** The host redirects an element by holding
  its `adm_run` low, writing a bundle address with `adm_pc_we`/`adm_pc`
  (the element is chosen by `adm_pe`), and raising `adm_run` again. The
  element then starts at that bundle. The address resets to 0, where a
  program usually sits in RECV.
* **Keystore.** It is an on-chip array with one word per cycle. A 5 KB switch
  therefore takes 1281 cycles. An RDRAM-backed store, which the original
  system study assumes, would take about 720 ns.
* **Scheduler.** The coherence rule (ks_cur, waiting, invalidation on
  CREATE) is this design's. So is the fixed-priority output merge.
* **Multiplier.** The long operations stall the whole bundle instead of
  issuing around it. MULMOD reduces a 16 × 16 product with the usual
  "low minus high" correction.
* **SBOX tables.** Inside the element, each slot owns one table. Tables are
  filled by SBW or by a context load. The element has no data cache, so the
  sector-cache fill logic exists only in the extension unit.
* **Not included.** The host processor, the out-of-order core that would
  carry the extension units, and the public-key engines are outside this
  design.

## 9. Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each
compares against values computed independently in the testbench. Each ends
with `TB_RESULT checks=N failures=M` and has a watchdog. Highlights:

* `tb_long_unit`: results against `%`-based references, and `done` exactly
  in cycle MUL_LAT.
* `tb_keystore`: save/load contents, zero load of unknown sessions, and a
  switch time of CTX_WORDS + 1 cycles.
* `tb_request_scheduler`: a reference model of the selection rule, switches,
  waiting, sharing from a current keystore copy, and CREATE invalidation.
* `tb_cm_pe`: one element running the demonstration program. It checks
  every table word, encrypt results against the reference cipher, the
  33-cycle warm latency, multiplier stalls of MUL_LAT−1 cycles and SEND
  stalls. It loads a context through the context port, and checks that
  DECRYPT undoes ENCRYPT and matches the reference inverse. Finally it
  redirects the element to a small routine at bundle 60 and checks that the
  routine runs and the element returns to RECV. The Blowfish kernel is
  checked against a reference Blowfish, with a 57-cycle warm latency. The
  IDEA kernel gets subkeys from the IDEA key schedule. It is checked
  against a reference IDEA that reproduces the published test vector, with
  a 110-cycle warm latency.
* `tb_cm_top`: the whole system at its default size. It loads all four
  elements and sends about 250 requests over six sessions, so contexts are
  saved and restored. The traffic includes a DELETE and re-CREATE with a new
  key, every fifth request a DECRYPT, and a held-off output queue. Every
  result is checked by tag. It also
  checks that every mechanism happened: context switch, write-back, affinity
  and LRU dispatch, waiting, shared sessions, input-queue full, output
  backpressure, send stall, merge conflict, multiplier stall, mispredict,
  correct prediction, bypass and sector-cache hit/miss. It further checks the
  1281-cycle switch, the 33-cycle encrypt, and the MULMOD unit's latency of 4.

* `tb_cm_workloads`: the two traffic patterns the system is sized for, on
  the full system.
  * **Disk volume.** One session whose tables the host writes into the
    keystore; eight 512-byte sectors (256 blocks). All four elements serve
    the volume at once. The steady state is 9.9 cycles per 16-byte block,
    against 8.25 for a perfect four-way split. The difference is dispatch and
    queue overhead.
  * **Network.** Three CBC-chained connections, each sending two 1500-byte
    packets (94 blocks each), one block at a time. Each block makes a
    36-cycle round trip: 33 cycles of encryption plus the two queues. That
    is about 3,400 cycles per packet per connection, and the connections run
    side by side on different elements.

### Simulating

Any testbench builds with plain Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/cm_pkg.sv tb/cm_asm_pkg.sv tb/tb_cm_top.sv --top-module tb_cm_top
./obj_dir/Vtb_cm_top
```

`tb/cm_asm_pkg.sv` is needed only by `tb_cm_pe`, `tb_cm_top` and `tb_cm_workloads`. The system
test simulates about 190,000 cycles and finishes in a few seconds.

### Changing things

* To write your own program, use the encoders in `cm_asm_pkg` (`ins`,
  `spc`, `ldi`, `bnd`). Load it through `adm_imem_*` with `adm_run` low,
  then raise `adm_run`. The test program fills all 64 bundles. To make room,
  drop handlers you do not need. Keep branches whose BTB index (bundle
  number mod 16) collides with a busy loop branch out of hot loops.
* `NUM_PE` can be changed freely. The testbench's mechanism probes assume 4.
* Changing `CTX_WORDS` or the context layout also means changing the
  context address map in `cm_pe`.
