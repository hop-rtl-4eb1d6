# HOP: a processor that runs obfuscated programs

A program owner wants someone else's machine to run a program on that
machine's data without revealing anything about the program beyond an agreed
amount of work. The receiver holds the chip, can watch every pin, time every
memory access and supply any input, and still must learn nothing more than
what the program's result tells.

This RTL makes that a property of the hardware. The program arrives encrypted
and authenticated under a key that only the chip holds. Inside the chip a small RISC-V core runs
it from on-chip scratchpads. The only thing that crosses the chip boundary is
memory traffic, and that traffic has a single shape: a fixed number of
instruction slots, then exactly one access to an oblivious RAM (Path ORAM),
repeated until a fixed number of ORAM accesses `T` has been made. Because the
ORAM hides which address is touched and the schedule hides when memory is
really needed, two runs with the same `T` look alike from outside, whatever the
program and the input are. After the `T`-th access the chip releases a single
32-bit result.

Everything here is written in synthesisable SystemVerilog: the core, the
scratchpads, the scheduler, the ORAM controller, AES-128 and the encryption
units. DRAM and the host are outside the chip; the testbenches model them.

## Trust boundary and block map

```
 host (untrusted) --host port--> prog_dec_unit --> iscratchpad --> rv32_core --outp--> host
                               \-> prog_mac_unit (tag check before start)
                  \--input blocks--> loader ---------------------\      |  ^
                                                                  \     v  |
                  anm_sched (A^N M) <---- spld_unit <----> dscratchpad
                          |                    (64-byte lines)
                          v
                    oram_ctrl (Path ORAM, stash, position map, leaf PRF)
                          |
                    mem_enc_unit (AES-CTR per bucket slot)
                          |
               DRAM port (untrusted) --> external DRAM
```

`hop_top` is the chip. It has two outside ports: the host port, through which
the program, the header, the input and the start command arrive, and the DRAM
port, which carries encrypted bucket slots. Everything else is internal.

## The A^N M schedule

The core has no free-running notion of time. `anm_sched` hands it instruction
slots, each `SLOT_CYCLES = 3` cycles long. After `N` slots (default 1000) the
scheduler makes one ORAM access and then starts the next round:

- If `spld_unit` has a request waiting (a write-back or a load), that request
  is the access: a *real M*.
- Otherwise the ORAM performs a *dummy M*: it reads and rewrites a random path
  exactly as a real access would.
- While the core waits for its `spld` to finish, its slots still pass, with
  nothing done in them: these are *dummy A* slots.

`N` is meant to match one ORAM access time in instruction slots, so the core
loses little while the memory is busy, and the receiver sees a perfectly
periodic access stream.

`T` counts ORAM accesses, not cycles. The run ends after the `T`-th access,
whether the program has finished or not. A receiver that slows its DRAM down
therefore stretches the run but cannot move its end relative to the program.
`T` is chosen by the sender and travels in the encrypted header. It is public
in the sense that the number of accesses is visible anyway. If the program
finishes early it spins until `T` is reached. If `T` was too small, the result
is whatever `a0` holds at that point.

Every instruction takes the same three cycles, including loads and stores to
the scratchpad. So the instruction mix of a round does not change its length.

## spld: how data reach the core

Loads and stores of the core address only the 512 KB data scratchpad. Main
memory (the ORAM) is reached only through one added instruction:

```
spld rs1, rs2, rs3      rs1 = main-memory byte address
                        rs2 = number of 64-byte blocks
                        rs3 = scratchpad byte address (register number in instr[31:27])
opcode custom-0 (7'b0001011), R4-style: rs3 in [31:27], rs2 in [24:20], rs1 in [19:15]
```

For each block, `spld_unit` first writes the scratchpad line's current content
back to the ORAM block it came from, then loads the new block into the line.
Each of those is one ORAM access and so takes one memory slot of the schedule.
Per-line tags (valid bit plus ORAM block address) record where each line came
from. A line that spld has never filled is not written back, so it costs
nothing. The core stalls in the spld until the last block is in; the slots
spent waiting are the dummy A slots above.

This is a software-managed cache. The program decides what to keep on chip.
Programs with locality, such as a histogram with a small table, pay one ORAM
access per block brought in. Programs without locality, such as a binary
search, pay one or two ORAM accesses per probe.

Addresses are block granular: the low six bits of `rs1` and `rs3` are ignored.

## Path ORAM

`oram_ctrl` stores 512-bit blocks in a binary tree of buckets in DRAM
(`LEVELS = 25`, `Z = 4` slots per bucket). Each block is assigned a random
leaf. The block is always somewhere on the path from the root to that leaf, or
in the on-chip stash of 128 blocks. One access goes like this:

1. **New leaf.** A new leaf is drawn from AES-128 under key K2 of an access
   counter. The block's position-map entry is updated to it. A dummy access
   draws a leaf too but leaves the map alone.
2. **Path read.** All `LEVELS*Z` slots of the old leaf's path are read through
   the encryption unit. Real blocks go into the stash.
3. **Serve the request.** The requested block is read from the stash or
   written into it. A block that was never written reads as zero.
4. **Path write-back.** The path is written back from the leaf to the root.
   For each bucket the stash is scanned once and up to `Z` blocks whose leaf
   shares that bucket are placed. The rest of the bucket is filled with
   empty slots.

Every access has the same sequence of DRAM reads and writes, and its addresses
depend only on a pseudorandom leaf. The stash scan runs over all entries every
time, so the access's length does not depend on how full the stash is. With
`Z = 4` and a 128-entry stash, overflow is negligible. If it happens anyway,
the sticky `stash_overflow` output rises, because a block was lost.

The position map is flat and on chip: 2^16 entries of {valid, leaf}, 25 bits
each, or 256 KB if every entry is given a 32-bit word. The ORAM therefore holds 2^16 blocks = 4 MB of program data. Address
bits of `spld` above that are ignored. At reset the map is cleared one entry
per cycle (65536 cycles at the defaults) before the ORAM accepts an access.

**Bucket addressing.** Bucket `i` at level `l` on the path to leaf `p` is at
index `(1 << l) - 1 + (p >> (LEAF_W - l))`. Slot `s` of that bucket is DRAM
word `bucket*Z + s`. A slot holds `{valid, block address, leaf, 512 data bits}`
(553 bits at the defaults).

## Encryption

Three keys are parameters of `hop_top`, standing for keys fixed in the chip at
manufacture:

| key | used by | for |
|---|---|---|
| K1 | `prog_dec_unit`, `prog_mac_unit` | decrypting and authenticating the program and the header |
| K2 | `oram_ctrl` | the leaf PRF |
| K3 | `mem_enc_unit` | encrypting bucket slots |

All three units use one iterative AES-128 core design (`aes128_core`, 11
cycles per block; the S-box is computed as a GF(2^8) inverse plus affine map,
and round keys are expanded on the fly).

- **Memory encryption** is counter mode. Each slot write takes a fresh 64-bit
  IV from an on-chip counter. DRAM stores `{IV, slot XOR pad}`, and pad chunk
  `j` is `AES_K3({IV, 32-bit slot address, 24'h0, 8'j})`. A fresh IV on every
  write means that rewriting a slot with the same content still looks new. A
  zero IV marks a slot never written, which decrypts to an empty slot. The
  AES cores run in that case too, so latency does not depend on the data.
- **Program decryption** is counter mode with K1. Program chunk `i` (four
  instructions, the first in bits 31:0) is
  `plain XOR AES_K1({64'h484f_505f_5052_4f47, 32'h0, i})`.
  The header is chunk index `32'hFFFF_FFFF`, with `T` in plaintext bits 63:0.
- **Program authentication** is encrypt-then-MAC. `prog_mac_unit` computes
  AES-CMAC over the ciphertext chunks: program chunks in index order, then
  the header as the last block. The MAC key is `Km = AES_K1(MAC_KEY_DERIV)`,
  so K1 itself is never both the counter-mode key and the MAC key. The CMAC
  subkey is `L << 1` (XOR `0x87` if the top bit of `L = AES_Km(0)` was set).
  It is XORed into the last block. The sender's tag comes with the start
  command. Several things make the chip refuse to run: a wrong tag, a chunk
  out of order, a chunk after the header, or a second header. The chip then
  raises `auth_fail` and makes no memory access. A receiver therefore cannot
  change the program or `T`, cut the program short or extend it.

## Host protocol and run sequence

The host port is a valid/ready handshake with `host_cmd`, `host_addr` and
`host_data`:

| `host_cmd` | `host_addr` | `host_data` |
|---|---|---|
| `HCMD_PROG` (0) | chunk index | `[127:0]` encrypted chunk, written into the instruction scratchpad |
| `HCMD_HDR` (1) | - | `[127:0]` encrypted header holding `T` |
| `HCMD_INPUT` (2) | ORAM block address | `[511:0]` input block (in clear; it is the receiver's own data) |
| `HCMD_START` (3) | - | `[127:0]` MAC tag over program and header |

A run looks like this:

1. Reset the chip.
2. Wait for `host_ready` (24 cycles after reset, while the MAC subkeys are
   derived). An input block sent while the position map is still clearing
   waits in the loader, with `host_ready` low, until the ORAM is ready.
3. Send the program chunks in index order, then the header. Input blocks may
   come at any point. Each input block is written into ORAM by an ordinary
   ORAM write.
4. Send `HCMD_START` with the tag. If the tag checks out, the core starts at
   pc 0 with all registers zero. Otherwise `auth_fail` rises and nothing runs.
5. Wait for `done`. The result is register `a0` (x10), shown on `outp`, which
   stays zero until `done`. A new run needs a reset.

**Memory map seen by the program.** Instructions: byte addresses 0 to 16 KB-1
of the instruction scratchpad. Loads and stores: byte addresses 0 to 512 KB-1
of the data scratchpad; higher bits are ignored. Main memory: `spld` byte
addresses 0 to 4 MB-1, where input block `b` is at byte address `64*b`.

## The core

`rv32_core` implements RV32I: all ALU, branch, jump, load and store
instructions. FENCE, ECALL, EBREAK and unknown opcodes retire as no-ops.
There is no M extension and there are no CSRs or interrupts.

Each slot has three cycles:

1. fetch from the instruction scratchpad;
2. execute, where the data scratchpad is addressed;
3. write back.

Both scratchpads are single-cycle synchronous SRAMs. The data scratchpad has
a 32-bit word port with byte enables for the core and a 512-bit line port for
`spld_unit`; the line port wins if both are used in the same cycle.

## Parameters of `hop_top`

| parameter | default | meaning |
|---|---|---|
| `N` | 1000 | instruction slots per round |
| `SLOT_CYCLES` | 3 | cycles per instruction slot |
| `IBYTES` | 16384 | instruction scratchpad |
| `DBYTES` | 524288 | data scratchpad |
| `LEVELS` | 25 | ORAM tree levels (leaves = 2^(LEVELS-1)) |
| `Z` | 4 | slots per bucket |
| `STASH` | 128 | stash entries |
| `ADDR_W` | 16 | ORAM block address bits (position-map entries = 2^ADDR_W) |
| `K1`, `K2`, `K3` | constants | keys |

`LEAF_W`, `SLOT_BITS` and `DRAM_AW` are derived from these. At the defaults
the DRAM port is 617 bits wide (64-bit IV plus a 553-bit slot), and the DRAM
address is 27 bits (2^25-1 buckets of 4 slots).

## Where this design departs from the published HOP design

- **ORAM access time.** This controller reads and writes one slot at a time
  and scans the stash for every bucket. An access takes about 7000 cycles at
  the defaults, not the roughly 3000 the schedule was sized for. `N` stays
  at 1000. That is still secure, but the core sits idle for most of each
  ORAM access.
- **DRAM bandwidth.** The original design assumes a DRAM that moves 64 bytes
  per cycle. Here one encrypted slot is in flight at a time, with a
  request/response handshake, and this is most of the longer access time.
- **spld counts 64-byte blocks.** The original instruction takes a "number of
  memory locations" without fixing the unit. Here the unit is one ORAM block,
  which is also one scratchpad line.
- **No minimum-scratchpad check.** A program compiled for a larger scratchpad
  than the chip has is not rejected; its scratchpad addresses simply wrap.
- **The core is multi-cycle, not single-stage.** Each instruction takes a
  fixed 3-cycle slot, which is the instruction time the schedule assumes.
- **Logical memory is 4 MB, not 4 GB.** The position map is not recursive;
  see above.
- **No memory integrity checking.** There is no MAC of the position map
  (PMMAC) and no Merkle tree over memory. Tampered or replayed DRAM content is
  not detected. The program and header are authenticated; see above.
- **One MAC instead of a program Merkle root.** The whole program sits on chip,
  so a single CMAC over it replaces the Merkle root that the original scheme
  puts in the header.
- **No `sstore` or context switching.** A run cannot be interrupted and
  resumed later; the chip state is lost at reset.
- **Keys are used directly** as PRF and cipher keys. They are not derived per
  session from the program and input digests, since those digests belong to
  the missing Merkle tree.
- **Own choices** where no specification exists: the spld encoding, the
  CMAC-based authentication and its key derivation, the counter-mode constructions and IV layout, the slot format, the host command
  encoding, the header layout, the result register `a0`, and the rule that a
  line never filled by spld is not written back. The RV32I core and the AES
  core are written for this design rather than taken from existing IP.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. Needed by several testbenches:

- `tb/dram_model.sv`: a behavioural DRAM with a fixed latency and a sparse
  store, so a 25-level tree costs only the slots actually touched;
- `tb/rv_asm_pkg.sv`: RV32I and `spld` instruction encoders for writing test
  programs in SystemVerilog.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/hop_pkg.sv \
    tb/tb_hop_top.sv --top-module tb_hop_top -Mdir obj_tb_hop_top
./obj_tb_hop_top/Vtb_hop_top
```

Any other testbench is run by replacing the two names. The testbenches are:

| testbench | what it shows |
|---|---|
| `tb_aes128_core` | FIPS-197 vectors |
| `tb_prog_mac_unit` | tags against a reference CMAC for 1 to 6 blocks; a changed, swapped, dropped or added block changes the tag; setup and block timing |
| `tb_prog_dec_unit` | decryption of program chunks and the header chunk against a reference, distinct pads per chunk, 13-cycle latency |
| `tb_mem_enc_unit` | round trip through DRAM, fresh IV per write, new ciphertext on rewrite, never-written slots read as zero |
| `tb_oram_posmap` | reset sweep, read/write |
| `tb_oram_ctrl` | random reads, writes and dummy accesses against a reference memory on a small tree; every access reads and writes exactly `LEVELS*Z` slots and takes the same number of cycles |
| `tb_iscratchpad`, `tb_dscratchpad` | random accesses against a model; byte enables; line port |
| `tb_rv32_core` | RV32I programs, three-cycle slots, spld operands, nothing retires while spld is pending |
| `tb_spld_unit` | loads without write-back into empty lines, write-back before load, modified data written back, `n = 0` |
| `tb_anm_sched` | round structure, real, dummy and dummy-A events, stop after T |
| `tb_hop_top` | the whole chip on a small configuration (N = 20, 5-level tree); two runs with different inputs, identical DRAM address/write trace and run length; a wrong tag, out-of-order chunks and a changed header are each refused; every mechanism (dummy A, real M, dummy M, write-back, spld) is counted and must occur |
| `tb_hop_workloads` | findmax, binary search (hit and miss, one spld per probe) and a histogram, on the small configuration |
| `tb_hop_full` | the chip at its default parameters, one short run (T = 4); takes about 12 s |

## Files

- `rtl/hop_pkg.sv`: constants, host command type, helper function.
- `rtl/hop_top.sv`: the chip; it holds the loader FSM and the ORAM port
  multiplexer.
- `rtl/anm_sched.sv`, `rtl/rv32_core.sv`, `rtl/spld_unit.sv`: execution.
- `rtl/iscratchpad.sv`, `rtl/dscratchpad.sv`: on-chip memories.
- `rtl/oram_ctrl.sv`, `rtl/oram_posmap.sv`: Path ORAM.
- `rtl/aes128_core.sv`, `rtl/mem_enc_unit.sv`, `rtl/prog_dec_unit.sv`,
  `rtl/prog_mac_unit.sv`: cryptography.

Each file opens with a description of its interface and timing.
