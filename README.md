# SCION / EPIC L1 border-router data plane in SystemVerilog

SCION is a path-aware Internet architecture: the sender writes the whole inter-domain
path into every packet as a list of *hop fields*, one per autonomous system (AS) on the
way, and each hop field carries a short MAC that only the issuing AS can compute. A
border router therefore keeps no routing state for remote destinations. It reads its own
hop field out of the packet, checks that hop field's MAC, and sends the packet out of the
interface the hop field names.

EPIC L1 hardens this scheme. The MAC also covers a per-packet timestamp and the source
host, so a hop-validation value cannot be reused for other packets. It can no longer be
looked up in a precomputed table: the router must run a block cipher on every packet, at
line rate. The idea behind this design is to use a cipher small enough for one pass
through a match/action pipeline. That cipher is the **Simplified Even-Mansour (SEM)**
construction over a byte-oriented substitution/permutation/substitution network. The
router is then an ordinary packet pipeline (parser, match/action stages, deparser) with
one extra stage group that computes the MAC.

This RTL implements that router as a streaming design with one byte per clock. It accepts
SCION paths, checked with the EPIC L0 style MAC block, and EPIC paths, checked with the L1
block.

## Packet flow

```
            +------------+   header vector   +---------------------------+  decision  +-----------+
 bytes ---->| pkt_parser |------------------>| ingress_pipe (8 stages)   |----------->| decision  |
   |        +------------+                   |  0 interface check        |            |  FIFO(16) |
   |                                         |  1-5 SEM MAC (sem_mac)    |            +-----+-----+
   |                                         |  6 MAC compare, route     |                  |
   |                                         |  7 verdict, hdr_fixer     |                  v
   |        +------------------------+       +---------------------------+            +-----------+
   +------->| pkt_buffer (4096 B)    |------------------------------------------------->| deparser  |--> bytes + port
            +------------------------+                                                +-----------+
```

Every byte goes into the packet buffer and through the parser at the same time. When the
parser has seen the whole SCION header, it emits a *header vector* (`phv_t` in
`scion_pkg`). The header vector holds the fields the router needs:

- the source and destination ISD-AS;
- the first 4 bytes of each host address;
- the EPIC timestamp;
- the path meta header and its byte offset;
- the info field selected by CurrINF;
- the hop field selected by CurrHF and the one before it.

Eight clocks later the ingress pipeline produces a *decision*: a verdict, an output port
and, if the packet leaves for another AS, a new path meta header. The deparser pairs
decisions with buffered packets in arrival order. It streams each packet out, tagged with
its port and verdict, and overwrites the 4 path-meta bytes when the packet is forwarded.

| verdict (`verdict_e`) | meaning | port |
|---|---|---|
| `V_FORWARD` | valid; sent towards the next AS; CurrHF (and maybe CurrINF) advanced | interface table entry of the egress interface |
| `V_LOCAL` | valid; destination ISD-AS is this AS | host table entry of the destination host |
| `V_PARSE` | malformed header | `CPU_PORT` (128) |
| `V_IFACE` | arrived on a port other than the one its ingress interface maps to | `CPU_PORT` |
| `V_MAC` | hop-field MAC does not match | `CPU_PORT` |
| `V_NOROUTE` | no table entry for the egress interface or host | `CPU_PORT` |

No packet is dropped. Everything the router will not forward goes, unchanged, to the CPU
port, where software can generate errors or discard it.

## The MAC: Simplified Even-Mansour over a byte SPS network

```
SEM_K(M) = P1(M xor K) xor K          M, K: 128 bits
P1       = S1 . GIFT128-permutation . S0
MAC      = top 48 bits of SEM_K(M)
```

The same key whitens the block before and after the permutation. That is what makes the
Even-Mansour scheme "simplified", and it leaves a single 128-bit AS key per router
(`cfg_key`).

**Substitution layers** (`sem_sbox_layer`). Each layer is 16 independent 8-bit lookups,
and every byte position has its own table. Table `(layer l, byte position i)` is
`S(x xor c(l,i))`, where:

- `S` is the AES S-box (the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the AES
  affine map with constant 0x63);
- `c(l,i) = ((16*l + i)*37 + 11) mod 256`.

The tables are computed at elaboration by constant functions in `sem_pkg` from exp/log
tables of the generator 3. Synthesis sees 32 constant 256x8 ROMs. In a match/action
switch each of them is one exact-match table, which is why the cipher works on bytes only.
Byte 0 is bits [127:120].

**Permutation** (`sem_perm`). This is the GIFT-128 bit permutation: input bit `i` moves
to `4*floor(i/16) + 32*((3*floor((i mod 16)/4) + (i mod 4)) mod 4) + (i mod 4)`. Every
output byte takes bits from four input bytes. Without this step the two byte-wise S-box
layers would collapse into sixteen independent byte functions, so the permutation is what
makes the cipher mix bytes. In hardware it is only wiring.

**Pipeline** (`sem_mac`). There is one layer per register stage: xor K, S0, permutation,
S1, xor K. The latency is 5 and the unit accepts one block per clock. The key travels with
its block.

**MAC input block.** The block is 128 bits, most significant first. `prev` is the MAC of
hop field CurrHF-1, or 0 when CurrHF = 0.

| path type | block |
|---|---|
| SCION (1), L0 | InfoTimestamp(32), ExpTime(8), ConsIngress(16), ConsEgress(16), prev(48), 0(8) |
| EPIC (3), L1 | TsRel(32), SrcHost(32), ConsIngress(16), ConsEgress(16), prev[47:16](32) |

The router computes the MAC under the AS key and compares its top 48 bits with the 6-byte
MAC of the current hop field. The L1 block includes the packet timestamp and the source
host, so a valid MAC holds for one packet only.

## Parser

`pkt_parser` is a state machine with one state per header:

1. common header (12 B);
2. ISD-AS address header (16 B);
3. destination host and source host addresses (4·(DL+1) and 4·(SL+1) bytes);
4. EPIC timestamp block (16 B: TsRel, PckId, PHVF, LHVF), for path type 3 only;
5. path meta header (4 B);
6. info fields (8 B each);
7. hop fields (12 B each);
8. payload.

Info and hop fields are not parsed one by one. A counter walks through them and keeps the
entries at CurrINF, CurrHF and CurrHF-1. A path of any length up to 64 hop fields
therefore costs the same logic.

The parser sets `parse_err` in any of these cases:

- the version is not 0;
- the path type is neither 1 nor 3;
- segment 0 is empty, or a segment follows an empty one;
- the path has more than 64 hop fields;
- CurrINF points past the last info field;
- CurrHF lies outside segment CurrINF;
- the parsed header length differs from 4·HdrLen;
- the packet ends inside its header.

Each packet produces exactly one header vector. For a good packet it comes one clock after
the last header byte. For a bad one it comes one clock after the byte that showed the
error.

## Ingress pipeline

`ingress_pipe` has eight register stages and takes one header vector per clock:

| stage | work |
|---|---|
| 0 | The ingress interface (ConsIngress if the info field's C flag is set, else ConsEgress) is looked up in the interface table. The entry's port must equal the arrival port. Interface 0 marks a packet from inside this AS and is not checked. The MAC block is assembled. |
| 1-5 | `sem_mac` |
| 6 | MAC compare. Route lookup: if the destination ISD-AS equals `cfg_isd`/`cfg_as`, the host table is searched with the destination host; otherwise the interface table is searched with the egress interface. |
| 7 | Verdict in the priority order of the table above; output port; `hdr_fixer` result. |

`hdr_fixer` advances CurrHF by one. When the new CurrHF reaches the end of segment
CurrINF, it advances CurrINF as well.

The two tables are `lookup_table` instances:

- **Interface table:** 16-bit interface ID to port, 256 entries, two read ports.
- **Host table:** 32-bit host address to port, 1024 entries.

Both are direct-mapped on the low key bits and store the full key as a tag. The control
plane writes them one entry per clock (`*_wr_en`, `*_wr_set` = 1 to insert, 0 to delete).

## Buffering, flow control and timing

- **Input:** `in_valid`/`in_ready`. `in_port` is sampled on each packet's first byte and
  `in_last` marks its last byte.
- **Output:** `out_valid`/`out_ready`, with `out_port` and `out_verdict` held for the
  whole packet.
- **Throughput:** one byte per clock in and out. Consecutive packets leave without an idle
  cycle whenever the next packet's decision is ready. Idle output clocks occur only when
  the output has caught up with a packet whose header is still arriving. The input never
  has to wait for that.
- **Latency:** a packet's first byte can leave 10 clocks after its last header byte
  arrived. That is 1 clock for the parser register, 8 for the pipeline and 1 for the
  decision FIFO write.
- **`in_ready` falls** when the packet buffer is full. It also falls when 15 decisions are
  outstanding between parser and deparser, because very short packets could otherwise
  overrun the 16-entry decision FIFO.
- **Buffer size:** the packet buffer must be at least as large as the longest header,
  1020 bytes. Then a header can always complete and release its decision, and the buffer
  can never deadlock. The default is 4096 bytes.

Assertions check that neither FIFO overflows and that the outstanding-decision count stays
in range.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `scion_router` | `BUF_DEPTH` | 4096 | packet buffer, bytes (power of two, ≥ 1024) |
| `scion_router` | `DEC_DEPTH` | 16 | decision FIFO entries |
| `scion_router`, `ingress_pipe` | `IFT_IDX_W` | 8 | log2 of interface table entries |
| `scion_router`, `ingress_pipe` | `HOST_IDX_W` | 10 | log2 of host table entries |
| `scion_pkg` | `PORT_W`, `CPU_PORT` | 8, 128 | port numbers 0-127; 128 is the CPU |
| `scion_pkg` | `MAC_W`, `MAX_HF` | 48, 64 | hop-field MAC width, hop fields per path |

## Relation to the original design, and what is this design's own

Taken from the original router, which is a P4 program for a Tofino switch:

- the three-part structure (parser, MAC generation and check, header fixer);
- the per-packet check sequence (ingress interface, MAC, local or transit);
- SEM with one shared whitening key and n = 128;
- an S-P-S network with byte-position-dependent S-boxes and a GIFT-128-derived
  permutation;
- 6-byte MACs;
- at most 3 info fields and 64 hop fields;
- keeping only the current and previous hop field;
- sending every invalid packet to the CPU;
- eight pipeline stages.

Choices made here where the original leaves things open:

- **S-box contents:** AES S-box with per-position input offsets.
- **GIFT bit permutation:** used even though the original calls the permutation
  byte-level. A byte shuffle between byte-wise S-boxes would not mix bytes at all.
- **MAC block layouts** shown above.
- **MAC key:** the AS key, with the hop data inside the block. The EPIC L1 definition
  keys the per-packet MAC with the hop authenticator, which would take a second cipher
  pass per packet.
- **Egress interface for the next hop.** The original wording names the ingress
  interface.
- **Interface 0** means the packet came from inside the AS.
- **Checked and rewritten fields:** the set of header checks, and rewriting only the path
  meta header.
- **Serving both L0 and L1 per packet by path type.** The original builds them as two
  separate programs.
- **Sizes:** table sizes, buffer sizes, port numbering, the byte-wide datapath and the
  valid/ready handshakes.

Not implemented:

- **Timestamp freshness check.** Checking that the packet timestamp is recent is allowed
  by the protocol but not specified. The MAC does cover the timestamp.
- **SCION SegID update** for paths traversed against construction direction.
- **SCMP error generation.** The CPU gets the packet instead.
- **EPIC L2 and L3.**

**Throughput.** One instance carries 8 bits per clock, far below a 100 Gb/s port. The
12.8 Tb/s switch rate would need either a wider datapath or about 1600 instances at 1 GHz.
The RTL sustains its own rate without bubbles, but it does not reach the switch's rate.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. The models they compare against are written separately
from the RTL:

- `sem_ref_pkg` finds S-box inverses by search and builds the permutation index from bit
  fields.
- `pkt_gen_pkg` builds SCION and EPIC packets byte by byte, computes the MAC a hop field
  must carry, and computes the next path meta header.

| testbench | what it covers |
|---|---|
| `tb_sem_sbox_layer`, `tb_sem_perm`, `tb_sem_mac` | all byte values at all positions; known AES values; permutation index; cipher results and the 5-cycle latency with the key changing between blocks |
| `tb_pkt_parser` | SCION and EPIC packets, 64-hop paths, nine kinds of malformed header, field-by-field comparison, header-vector timing |
| `tb_ingress_pipe` | all six verdicts; ports; rewritten meta header; 8-cycle latency with back-to-back header vectors; table delete |
| `tb_lookup_table`, `tb_pkt_buffer`, `tb_deparser`, `tb_hdr_fixer` | table hits and misses against a model; FIFO order and full and empty flags; rewrite placement, back-pressure and gap-free streaming; segment crossings |
| `tb_workload_frames` | end to end at default sizes. Back-to-back 1500-byte and 115-byte frames on paths of up to 64 hop fields: no input stall, every byte correct. It also measures the 10-clock header-to-output latency. |
| `tb_scion_router` | end to end at default sizes. All verdicts, segment crossings, both path types, back-pressure from a full packet buffer and from a full decision queue, output stalls, and a phase in which the input must never stall while the output is always ready. |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/scion_pkg.sv rtl/sem_pkg.sv tb/sem_ref_pkg.sv tb/pkt_gen_pkg.sv \
  rtl/scion_router.sv tb/tb_scion_router.sv --top-module tb_scion_router
./obj_dir/Vtb_scion_router
```

For the other testbenches, replace the last two files with the module under test and its
testbench. Verilator finds the submodules through `-Irtl`. The end-to-end testbench takes
a few minutes to compile and under a second to run.
