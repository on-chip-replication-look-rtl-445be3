# Write-once tagged memory for on-chip Byzantine agreement (iBFT hardware)

When the low-level software of a multicore chip (a hypervisor, a microkernel)
is replicated on n = 2f+1 cores so that up to f compromised or broken replicas
cannot run a critical operation on their own, the replicas must agree on every
such operation. Between machines this is done with signed messages. On a chip,
signatures are far too slow compared with a shared-memory access, but without
them a replica could show one vote to one peer and another vote to another
(equivocation).

This RTL removes equivocation in hardware instead. Each replica owns a
**write-once ("wo") memory**: only that replica can write it, everybody can
read it, and once a value is marked as decided it cannot be changed until all
replicas agree on a reset. A replica's vote is a bit in such a memory, so
every peer that reads it sees the same, final answer. A memory may fail, but
only by crashing, visibly: its RAM carries an error-correcting code, and an
error the code cannot correct makes the memory refuse every further access.
Four small devices complete the picture: a **seal detector**, a **consensual
reset device**, a **crash device** that lets f+1 replicas silence a replica
found faulty by crashing its memory, and a **trusted copy unit** that
applies agreed values to the platform in order and only once.

The structure (one tag device in front of a block RAM per replica, a separate
reset device, a single trusted copy instance, AXI4-Lite slave ports) follows
the published iBFT FPGA proof-of-concept, run there with three soft cores
(n = 3, f = 1). Register layouts, slot and string sizes, the address map and
the handshakes are this implementation's own choices; they are marked as such
below and in each file's header.

## Files

| file | what it is |
|---|---|
| `rtl/ibft_pkg.sv` | AXI4-Lite structs, bit positions, address map, quorum function, byte ECC |
| `rtl/ibft_top.sv` | the whole design: n memory tiles, seal detector, reset and crash devices, trusted copy |
| `rtl/wo_mem_tile.sv` | one replica's write-once memory with owner and peer ports and the crash latch |
| `rtl/wo_tag_mem.sv` | the tag logic: tri-state write-once bitfields and the string write permission |
| `rtl/wo_string_ram.sv` | dual-port block RAM for the strings, ECC-protected, write enable ANDed with the permission |
| `rtl/crash_device.sv` | vote register that crashes a memory after f+1 votes against it |
| `rtl/axil_slave.sv` | AXI4-Lite slave front end used by every device port |
| `rtl/ibft_seal.sv` | per-slot f+1 detector that freezes a decided slot in all memories |
| `rtl/reset_device.sv` | vote register that resets all memories after f+1 votes |
| `rtl/trusted_copy.sv` | copies an agreed (destination, size, data) triplet to the platform |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_ibft_top` end to end |
| `tb/axil_master.sv` | simulation-only AXI4-Lite master with `write`/`read` tasks |

## How a slot is decided

The memories are divided into **slots**; each request the replicas agree on
occupies one slot in every replica's memory. A slot has two parts:

* a **string** of `STR_WORDS` 32-bit words: client id, client sequence number,
  then the request itself;
* a **bitfield** word of tri-state flags: for every replica j a prepare flag
  `P[j]` and a commit flag `C[j]`, and one accept flag `A` (ready to execute).
  Each flag is either clear, set as agreement (`P`, `C`, `A`) or set as error
  (`PE`, `CE`, `AE`), and can never move from one set state to the other.

The software running on the replicas (not part of this RTL) drives the
protocol; the hardware makes every step of it irrevocable:

1. The leader of slot x (leadership rotates) writes the client's request into
   its string for slot x and sets its `P[l]`. From then on its memory refuses
   any write to that string: peers that read it later see exactly what earlier
   readers saw.
2. Each follower reads the leader's string through the peer port, copies it
   into its own memory (so the request survives if the leader's memory fails)
   and compares it with the request in the client's buffer. On a match it sets
   `P[l]` and its own `P[k]`; on a mismatch or timeout it sets `PE[l]`.
3. Every replica checks the copies of the peers that prepared, sets `P[j]`
   for each matching one, and once f+1 `P` flags are set, sets its `C[k]`.
   It then records the peers' commits and, after f+1, sets `A`.
4. When `A` is set in f+1 memories, any replica asks the trusted copy unit to
   apply the slot. If too many replicas timed out instead, they set `AE`, and
   f+1 `AE` flags make the slot "finally skipped".

When all slots are used, the replicas write a checkpoint into a slot, check
that f+1 checkpoints match, and vote for a reset.

## The write-once memory tile

`wo_mem_tile` has three ports:

* **owner port** (`own_req/own_rsp`, AXI4-Lite read/write): the only write
  path. The system must connect it to the owning core only.
* **peer port** (`peer_req/peer_rsp`, AXI4-Lite read channels only): every
  string and bitfield can be read; AW/W on this port are ignored.
* **trusted copy read port**: a word-wide read port for the trusted copy unit,
  which shares RAM port B with the peer port and has priority.

Address map (byte addresses, 32-bit words, `ADDR_W` = 16):

| address | contents |
|---|---|
| bit 14 = 0: `(s*STR_WORDS + w)*4` | string word w of slot s |
| bit 14 = 1: `0x4000 + s*4` | bitfield of slot s |

Higher address bits are ignored. Bitfield layout for n replicas (n ≤ 7):

| bits | flag |
|---|---|
| `n-1:0` | `P[0..n-1]` agreement |
| `2n-1:n` | `C[0..n-1]` agreement |
| `2n` | `A` agreement |
| `15` | `RF`, reset just happened |
| `16 + (same positions)` | `PE`, `CE`, `AE` error forms |

For n = 3: `P` = bits 2:0, `C` = 5:3, `A` = 6, `RF` = 15, `PE` = 18:16,
`CE` = 21:19, `AE` = 22.

### Write rules

These are the heart of the design; everything else only moves data.

* **Flag write** (owner port, bitfield region). The requested bits (after
  byte strobes) are masked with the inverse of the bits already set in the
  *other* half of the tri-state and then ORed in. Writing 0s changes nothing,
  so no flag can be cleared. A request for both the agreement and the error
  form of the same flag sets neither. The write answers OKAY only if every
  requested bit is now set; otherwise SLVERR (the allowed bits are still
  set).
* **String write** (owner port, string region). The RAM write enable is the
  controller's enable ANDed with the tag logic's permission, which is 1 only
  while every flag of the slot (including `RF`) is clear. The first flag set
  in a slot freezes its string. A refused string write leaves the RAM
  untouched and answers SLVERR.
* **RF.** The consensual reset clears all flags and sets `RF` in every slot.
  While `RF` is set, a slot takes no string writes and no flag writes except
  one with bit 15 set, which clears `RF` (only the owner can do this). This
  way a replica that was still busy when the reset happened gets an error on
  its next write instead of silently writing into the new round. Power-on
  reset leaves `RF` clear.
* **Seal.** If `A` or `AE` of a slot is set in f+1 memories, the slot is sealed
  in all memories: every further flag write to it is refused. A slow replica
  can therefore not add an accept (or an error) after the majority decided;
  it learns the outcome by reading its peers. This is how this design reads
  the requirement that replicas "can no longer change flags" once the majority
  has decided. The memories are meant to perform "the equivalent" of a
  protocol step on all slots' flags, which could also be read as setting the
  error form of every flag still unset; freezing the flags was chosen because
  it makes the same guarantee without inventing errors the replicas did not
  report.

A read of a bitfield returns the word in the layout above; a read of the
string region returns RAM data. Reads never fail.

### Timing

After reset each tile first writes encoded zeros into every RAM word, one per
cycle (`SLOTS·STR_WORDS` = 1024 cycles at the default size); accesses wait
until then. Through `axil_slave`, an owner or peer access on an idle port is
accepted in the first cycle (AW and W must be valid together), reaches the device in the
next, and the response (B or R) is valid from the third cycle after
acceptance. Peer reads wait while the trusted copy unit uses RAM port B. Flags
are held in flip-flops (`SLOTS` × (4n+3) bits), strings in a `SLOTS·STR_WORDS`
× 52 block RAM (32 data bits plus the code, see below).

### Error correction and crashing

Each byte of a string word is stored as a 13-bit extended Hamming code:
position bits 1..12 with check bits at 1, 2, 4 and 8, the eight data bits at
3, 5, 6, 7, 9, 10, 11, 12, and an overall parity bit. Check bit p is the XOR
of every other position whose index has bit p set. On a read, the XOR of the
indices of all set positions (the syndrome) and the overall parity classify
the word. Odd parity means one error: it is corrected, at position
`syndrome` or in the parity bit itself. Even parity with a non-zero syndrome
means two errors, which cannot be corrected. Coding bytes rather than whole
words keeps byte-strobe writes free of read-modify-write.

A single error is corrected in the read data only; nothing scrubs the RAM in
the background. An uncorrectable error in string data being returned to the
owner, a peer or the trusted copy unit crashes the tile, as does its `crash`
input (driven by the crash device). A crashed tile:

* answers every owner and peer access, including the one that found the
  error, with SLVERR and zero data, so every replica can tell it crashed;
* takes no more writes;
* reports `crashed`, which the trusted copy unit uses to avoid it as a source;
* stays crashed until power-on reset. The consensual reset does not revive it.

Its flags keep counting for the seal and for the trusted copy's agreement
check. They were set before the crash and can no longer change, and the
protocol counts a replica with a crashed memory as one of the f faulty
ones.

## Consensual reset (`reset_device`)

One AXI4-Lite port per replica; the system must map port k only to core k.
Writing bit 0 = 1 sets that replica's write-once vote bit. A vote from a
replica whose memory still has any `RF` set is refused (SLVERR) and not
counted, so a lagging replica cannot carry a vote from the last round into
the next one. When f+1 vote bits are set, `dev_reset` pulses for one cycle (in
the cycle after the deciding vote reaches the device): every memory clears its
flags and sets `RF`, the trusted copy unit clears its executed tags, and the
votes are cleared. A read returns the votes in bits n-1:0 and a count of
resets in bits 31:16.

## Deliberate crash (`crash_device`)

A replica that has shown itself to be Byzantine can be silenced by crashing
its memory: it can then neither propose nor vote. Since that is a critical
operation, the crash device needs f+1 replicas to agree. Like the reset
device, it has one AXI4-Lite port per replica. A write sets that replica's
vote bits against memories `j` (data bits n-1:0, set-only). When f+1 replicas
have voted against memory j, `mem_crash[j]` rises in the next cycle and stays
high until power-on reset. A read returns the replica's own votes in bits
n-1:0 and the crashed memories in bits 16+n-1:16.

## Trusted copy (`trusted_copy`)

The replicas agree "out of place", in their wo memories. The trusted copy unit
transfers an agreed value to where the platform uses it (a page table entry,
a configuration register), and enforces three rules the replicas cannot
enforce on each other:

1. the slot is agreed (`A` set in f+1 memories) or finally skipped (`AE` set
   in f+1 memories);
2. the previous slot carries the executed tag (slot 0 needs none);
3. the slot does not carry the executed tag yet.

The message of a slot is read as a triplet: string word 2 is the destination
byte address, word 3 the size in words (clipped to `STR_WORDS`-4), words 4
onwards the data. Any replica writes a slot number to its own command port;
the unit handles one command at a time (round robin between ports), which
makes each copy atomic with respect to the others. If a rule is violated the
write response is SLVERR. Otherwise the slot is tagged executed, and on
agreement the data is read from the lowest-numbered memory whose `A` is set
and that has not crashed. It is written word by word through
`dst_valid/dst_addr/dst_data/dst_ready`, and the write response (OKAY) comes
when the copy is complete. If the source memory crashes in the middle of a
copy, the unit reads the same word again from the next agreeing live memory
and carries on. The commit round made sure the copies are equal. If no
agreeing memory is left alive, the command is refused: before it started,
with the slot left untagged, or mid-copy, with the slot already tagged. A skipped slot is
tagged without any write. The executed tags live inside the unit (only it can
set them) and are cleared by the consensual reset. A read of a command port at
byte address 4·s returns the executed tag of slot s in bit 31, the port's last
slot in bits 15:8 and its last result in bits 1:0 (1 copied, 2 skipped,
3 refused).

Timing: deciding takes 3 cycles after the command is picked; reading the
destination and size takes 4 cycles; then each word takes 3 cycles when the
destination is always ready.

## Top level and integration

`ibft_top` instantiates n tiles, the seal detector, the reset device and the
trusted copy unit. All of its ports are plain AXI4-Lite struct arrays
(`ibft_pkg::axil_req_t` / `axil_rsp_t`), one per replica and device:
`own_*`, `peer_*`, `rst_*`, `crash_*`, `tc_*`, plus the destination port
`dst_*` and `mem_crashed`, which shows which memories have crashed. The
cores and the interconnect that would connect to them are outside the design.
The guarantees only hold if the interconnect maps `own_*[k]`, `rst_*[k]`,
`crash_*[k]` and `tc_*[k]` to core k alone, and `peer_*` ports to the other cores for reading.
The peer port of a tile is a single port; arbitration among several reading
cores belongs to the interconnect.

Parameters of `ibft_top`:

| parameter | default | origin |
|---|---|---|
| `N` (replicas, n = 2f+1) | 3 | the proof-of-concept configuration (f = 1) |
| `SLOTS` | 64 | this design's choice; 64 bitfield words of 32 bits correspond to the 2048 flip-flops reported for the original tag logic, although only 4n+3 bits per word are used here |
| `STR_WORDS` (32-bit words per string) | 16 | this design's choice; must be a power of two |

`N` can go up to 7 with the 32-bit bitfield layout.

## What differs from the original proof-of-concept

* The original measured 65 to 106 processor cycles per tag register access
  through a soft core and an AXI interconnect; this RTL answers in 4 cycles at
  its own ports. The end-to-end latencies of the protocol depend on the cores
  and interconnect, which are not part of this design.
* The memory controller in front of the RAM is part of each tile here, not a
  separate controller block whose write enable is gated.
* One reset device is instantiated; replicating it (one per core) is
  possible but not built.
* The original protects memories against slowly building soft errors with
  ECC, scrubbing and a vendor soft-error-mitigation core, and crashes a
  memory once its ECC cannot correct. Here only the ECC and the crash are
  built; there is no scrubbing, and the code (per-byte SECDED) is this
  design's choice. The tag flip-flops are not covered by the code.
* How the replicas agree on a deliberate crash is not specified in the
  original. The crash device's f+1 vote register is this design's version.
* The executed tag of trusted copy is kept inside the trusted copy unit
  rather than in each memory's bitfield.
* The trusted copy source is the first memory with `A` set; copies are not
  cross-compared by the unit (the protocol's commit round already compared
  them).
* Checkpoints are meant to be double-buffered so that the newest one stays
  intact through a reset, but how a reset would spare it is not specified.
  Here the reset clears the tags of every slot and keeps all string contents,
  so the newest checkpoint can still be read (and is, in `tb_ibft_wrap`), but
  it is no longer write-protected once its owner clears `RF`.
* The software-only variant of write-once memory (atomic bit-set and
  compare-and-swap instructions on ordinary memory) is not hardware and is
  not included.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops with
`$finish`; each has a cycle watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_ibft_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/ibft_pkg.sv tb/tb_ibft_top.sv
./obj_dir/Vtb_ibft_top
```

Replace `tb_ibft_top` with any other testbench name. The testbenches:

* `tb_ibft_top` runs the full design at its default size (3 replicas, 64
  slots): a normal slot with all replicas, a slot with a faulty leader that is
  skipped, a slot with one late replica that catches up, a checkpoint, a
  consensual reset, clearing of all `RF` flags and a new round. It counts each
  mechanism (string lock, tri-state refusal, seal, copy, skip, copy refusal,
  catch-up, reset, `RF` blocking, stale vote) and fails if one never occurs;
  all destination writes are compared with the agreed data.
* `tb_ibft_wrap` is the buffer wrap-around workload at the default size: two
  rounds of 62 requests each with rotating leaders, every seventh leader
  faulty (its slot is skipped), trusted copy of every slot into a randomly
  stalling destination, a checkpoint alternating between slots 62 and 63,
  consensual reset, checkpoint reload and `RF` clearing. About 3,500 checks.
  The end-to-end test `tb_ibft_top` also covers crashing: two RAM bits are
  flipped in the source memory of a trusted copy, the copy completes from the
  other memory, and a memory is then crashed by two crash votes.
* `tb_wo_tag_mem` compares the tag logic with a three-state-per-flag model over
  random writes, including reset, `RF` and seal.
* `tb_wo_mem_tile`, `tb_wo_string_ram`, `tb_axil_slave`, `tb_ibft_seal`,
  `tb_reset_device`, `tb_crash_device`, `tb_trusted_copy` test their modules
  alone, including the cycle timing stated above. `tb_wo_string_ram` also
  checks the code exhaustively. It checks that any two code words differ in at
  least four bits, that every single-bit error is corrected, and that every
  double-bit error is reported.

The design is two-state clean: all state that is read is reset, and the RAM
is cleared by the sweep after reset.
