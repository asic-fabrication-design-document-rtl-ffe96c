# Bitcoin mining core for an open-shuttle ASIC user area

Bitcoin mining is a search: take an 80-byte block header, hash it twice
with SHA-256, and read the result as a 256-bit number. If that number is
below the network's target, the block is valid. If it is not, change the
32-bit nonce field of the header and try again. This RTL does that search
in hardware. A management processor loads the header and a 256-bit
threshold over a 32-bit Wishbone bus and starts the search. The core then
tries nonce after nonce until one hash falls below the threshold, raises a
GPIO flag, and holds the winning hash and nonce until the firmware reads
them.

The core is sized for the user area of a shuttle harness SoC (Caravel
style). The top module is `user_project_wrapper`. Its ports are the digital
user-area pins: the Wishbone slave, 128 logic-analyzer lines and 38 GPIOs.
Everything runs on `wb_clk_i`.

It reproduces real chain data. The end-to-end testbench mines the Bitcoin
genesis block, starting three nonces below the winning one. The core misses
three times, finds nonce `0x1dac2b7c`, and returns the block hash
`000000000019d6689c085ae165831e934ff763ae46a2a6c172b3f1b60a8ce26f`. It
mines block 125552 the same way, against that block's real target.

## How a search runs

Seen from the firmware, one search goes like this:

1. After reset the controller waits with logic-analyzer bit 0 low.
2. Firmware raises `la_data_in[0]`, with `la_oenb[0]` low so the
   management side drives the line. The controller enters its load state.
3. Firmware writes the 20 header words and the 8 threshold words, one
   Wishbone cycle each. Each write is acknowledged one clock later.
4. Firmware lowers `la_data_in[0]`. The nonce counter takes the header's
   nonce field, and hashing starts.
5. On every miss, the nonce is incremented and the header is hashed again.
6. On a hit, the hash is stored, `io_out[0]` goes high and STATUS shows
   the output state. Firmware reads RESULT, NONCE and TRIES, then writes 1
   to CTRL bit 0. The controller returns to waiting.

Header and threshold writes are accepted only in the load state. At any
other time they are acknowledged and dropped, so a running search cannot be
corrupted. Reads work at any time.

### Register map

Byte offsets from `0x3000_0000`. The SEL byte lanes are honoured on header
and threshold writes.

| Offset      | Access | Contents |
|-------------|--------|----------|
| 0x00        | R/W    | header word 0: version |
| 0x04-0x20   | R/W    | header words 1-8: previous-block hash |
| 0x24-0x40   | R/W    | header words 9-16: Merkle root |
| 0x44        | R/W    | header word 17: timestamp |
| 0x48        | R/W    | header word 18: target in compact form ("bits") |
| 0x4C        | R/W    | header word 19: starting nonce |
| 0x50-0x6C   | R/W    | threshold, 256 bits, most significant word first |
| 0x70        | W      | CTRL: bit 0 = done (leave the output state) |
| 0x74        | R      | STATUS: `{found, busy, state[2:0]}` in bits 4:0 |
| 0x78        | R      | NONCE: current nonce (the winning one once found) |
| 0x7C        | R      | TRIES: nonces checked since the search started |
| 0x80-0x9C   | R      | RESULT: winning hash as a big number, most significant word first |

Unmapped addresses are acknowledged, read as 0 and ignore writes, so the
bus never hangs.

**Word encoding.** Each header word is exactly the SHA-256 message word
it becomes, which is big-endian. Bitcoin serialises its header fields
little-endian, so firmware must byte-swap each 4-byte group of the
serialised header before writing it. The genesis block's version, for
example, is written as `0x01000000`.

The nonce counter adds 1 to the nonce as a message word. Bitcoin reads
the nonce as a little-endian number, so in Bitcoin's terms the core visits
nonces in byte-swapped order. It still covers all 2^32 values before
wrapping. When the nonce space runs out, the core does not change the
timestamp or any other field. Firmware has to load a new header.

## The double SHA-256 datapath

The 640-bit header is padded to 1024 bits: a 1 bit, zeros, and the length
640. That makes two 512-bit SHA-256 blocks. The 256-bit digest of the first
hash is then padded to one more block, with length 256. Three SHA-256 units
do the three compressions (`double_sha256`):

| Unit | Message block | Chaining value | Output |
|------|---------------|----------------|--------|
| 1 | header bits 639..128 (version, previous hash, 224 bits of Merkle root) | standard IV | mid hash |
| 2 | last 32 bits of Merkle root, timestamp, bits, nonce, padding | mid hash | first SHA-256 |
| 3 | first SHA-256 + padding | standard IV | double SHA-256 |

The nonce lies entirely in the second block. So the mid hash is the same
for every nonce of one header. The controller runs unit 1 only for the
first nonce after a load. After that it starts unit 2 directly, with
`reuse_mid` set. The units run one after another, each started by the
previous unit's `done` pulse. They are not pipelined, so at most one unit
is busy at a time.

The padding is constant and wired in (`miner_pkg::HDR_PAD` and
`HASH_PAD`). Nothing computes it at run time.

## Inside one SHA-256 unit

`sha256_unit` does one compression of a padded 512-bit block, one round
per clock. A start pulse samples the block and the chaining value. The
rounds follow, then a final word-wise addition of the working variables to
the chaining value. `done` rises 65 clock edges after the edge that sampled
`start`.

- **Message expander** (`sha256_expander`). It keeps only the 16 most
  recent schedule words in a sliding window, not all 64. Each round shifts
  the window and appends
  `W[t+16] = σ1(W[t+14]) + W[t+9] + σ0(W[t+1]) + W[t]`.
  The current round always reads `window[0]`.
- **Message compressor** (`sha256_compressor`). It holds the eight working
  variables and performs the standard round:
  `T1 = h + Σ1(e) + Ch(e,f,g) + K[t] + W[t]`,
  `T2 = Σ0(a) + Maj(a,b,c)`, then `a ← T1+T2`, `e ← d+T1`, and the other
  six variables shift down.
- **Adders** (`cla_adder`). Every modular addition, 18 per unit, is a
  32-bit two-level carry-lookahead adder. Bits are grouped by four. The
  carry into each group comes straight from the group generate and
  propagate signals below it, using
  `c[j+1] = G[j] | P[j]G[j-1] | … | P[j]…P[0]c0`. Nothing ripples.

The round constants and the initial hash value are those of FIPS 180-4.
They live in `sha256_pkg`, together with the six bitwise functions.

## The target check

`comparator` is a plain unsigned 256-bit compare. Its output `valid` is
high when `target > hash`, and `hash_out` always repeats the hash. Two
things around it need care:

- **Byte order.** Bitcoin reads a block hash as a little-endian 256-bit
  number. The raw digest is therefore byte-reversed before the compare
  (`miner_pkg::byte_reverse256`). The result register stores this reversed
  form, which is the form block explorers show. A valid hash thus reads
  back with leading zero words.
- **Threshold and "bits".** The header's 32-bit "bits" field is the target
  in Bitcoin's compact form. It is hashed as part of the header but not
  decoded. The comparator uses the separate 256-bit threshold register.
  Firmware can set this to the real target, expanded as
  `mantissa × 256^(exponent−3)`, or to any easier value for testing.

The result register (`nbit_register`, 256 bits) loads `hash_out` only when
`valid` is high. As a result, it holds either zero or a winning hash.

## Controller

`miner_fsm` implements the mining state machine:

| State   | Leaves when | Goes to | Action |
|---------|-------------|---------|--------|
| RESET   | reset released | WAIT | |
| WAIT    | `la_data_in[0]` = 1 | LOAD | |
| LOAD    | `la_data_in[0]` = 0 | COMPUTE | header writes allowed; nonce counter loads the header nonce on exit |
| COMPUTE | hash `valid_out` = 1 | CHECK | one hash start on the first cycle |
| CHECK   | always (one cycle) | OUTPUT on a hit, COMPUTE on a miss | hit: store hash; miss: nonce + 1 |
| OUTPUT  | CTRL done written | WAIT | `found` = 1 |

On the first cycle of COMPUTE the controller issues one start to the
double-hash datapath. CHECK lasts a single cycle. There, a miss pulses
`nonce_inc` and a hit pulses `result_we`. `tries` counts the CHECK cycles
since the last load.

## Timing and size

- First nonce after a load: the double hash takes 197 edges (3 × 66 − 1).
  `found` rises 200 edges after the edge that sees `la_data_in[0]` low.
- Each further nonce adds 134 edges: 131 for units 2 and 3, plus CHECK and
  the restart. A search that wins on try N therefore raises `found`
  200 + 134·(N−1) edges after the start. The end-to-end testbench checks
  this count exactly.
- Coarse synthesis of the top gives about 12,300 word-level cells and
  3,076 flip-flop bits. On top of that come 1,536 bits of schedule windows
  and three 64×32-bit constant tables, which synthesis keeps as memories.
  No latches or combinational loops are reported.

## Probes and GPIO

`la_data_out` carries the following debug signals. All other bits are 0.

| Bits | Signal |
|------|--------|
| 31:0 | current nonce |
| 63:32 | word H0 of the latest double hash |
| 95:64 | word H0 of the mid hash |
| 98:96 | controller state |
| 99 | found |
| 100 | double hash valid |
| 101 | datapath busy |
| 102 | mid hash held for the current header |

`io_out[0]` is the found flag, with `io_oeb[0] = 0`. The other GPIOs are
left as inputs (`io_oeb = 1`) and driven low.

## Where this RTL departs from the original design, and why

- **SHA-256 core.** The original plan took a third-party double-SHA-256
  core and pointed to a published compact message expander for it. Neither
  core is described in enough detail to reproduce. The units here are a
  straightforward iterative FIPS 180-4 implementation. The three-unit split
  and the mid-hash feed between units follow the original datapath.
- **Adder choice.** Early notes mention a tree adder. The final adder
  trade-off chose carry lookahead, and that is what is built. The 4-bit
  grouping is a choice made here.
- **Target width.** The header stores the target as a 32-bit field, but the
  comparator needs a 256-bit target. Both are kept: the field is hashed,
  and a separate 256-bit threshold register feeds the comparator. There is
  no hardware decoder from the compact form.
- **Comparator outputs.** One requirement has the comparator pass the hash
  through unconditionally. Another has it output "1 and the hash" or
  "0 and 0". The comparator passes the hash through. The result register
  behind it gives the second behaviour.
- **Nonce counter.** It resets to 0 and steps by exactly 1 on each
  increment, as specified. A load port was added so that a search starts at
  the header's nonce. It is incremented once per missed hash, rather than
  on every cycle the comparator shows a miss.
- **Not specified originally, chosen here:** the register map, the
  one-cycle ACK, dropping writes outside the load state, the CTRL "done"
  bit (the state machine names a `done` condition without defining it),
  the byte-reversed compare, the probe assignment, synchronous active-high
  bus reset, and one SHA-256 round per clock.
- **Not built:** the harness itself (management core, logic analyzer,
  pads, clocking, PLL, power-on reset), a possible on-chip SRAM that was
  named but never specified, and a small adder/accumulator used only to try
  out the fabrication flow.

## Files

```
rtl/sha256_pkg.sv          SHA-256 constants and bitwise functions
rtl/miner_pkg.sv           header struct, padding, register map, states, byte reverse
rtl/cla_adder.sv           carry-lookahead adder
rtl/sha256_expander.sv     message schedule (16-word window)
rtl/sha256_compressor.sv   round datapath
rtl/sha256_unit.sv         one SHA-256 compression
rtl/double_sha256.sv       three units, mid-hash reuse
rtl/comparator.sv          256-bit target compare
rtl/nonce_incrementer.sv   nonce counter
rtl/nbit_register.sv       generic register
rtl/header_regs.sv         header and threshold registers
rtl/wb_slave.sv            Wishbone slave and register map
rtl/miner_fsm.sv           controller
rtl/user_project_wrapper.sv  top
tb/sha256_ref_pkg.sv       reference SHA-256 / double hash / compact-target model
tb/tb_<module>.sv          one self-checking testbench per module
```

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build and run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sha256_pkg.sv rtl/miner_pkg.sv tb/sha256_ref_pkg.sv \
  tb/tb_user_project_wrapper.sv --top-module tb_user_project_wrapper -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. The end-to-end test runs
the top at its full, default size in well under a second. It mines the
genesis block, then a random header against the threshold 2^250, then
block 125552 against its real target. It also
counts each mechanism (dropped write, header load, mid-hash computation and
reuse, nonce increment, miss, hit, return on done) and fails if any of them
never happened.

The reference model in `tb/sha256_ref_pkg.sv` does not copy the constant
tables. It derives them from their definition: the fractional parts of the
cube roots of the first 64 primes, and of the square roots of the first 8.
It computes the compression from a full 64-word schedule. The unit tests
also check the published digest of `"abc"`.

## Verification status

All twelve modules have a self-checking testbench, and all of them pass.
They cover random operands and corner cases for the adder, register,
counter and comparator. For the expander and compressor they check every
word and every round against the reference. For the unit and the double
hash they check known answers, random blocks and exact latency. For the
Wishbone slave they check ACK timing, gating, byte lanes and the read
multiplexer. For the controller they walk every state. Each testbench was
also run against a deliberately broken copy of its module, and every one
caught the break.

Not verified: gate-level behaviour, timing closure, and area in the target
130 nm library.
