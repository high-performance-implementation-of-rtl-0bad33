# Skein hash core: Threefish with selectable unrolling

This is a streaming hardware implementation of the Skein hash function. It
computes Skein-512-512 by default and Skein-256-256 with one parameter change.
Almost all of Skein's work is done by the tweakable block cipher
**Threefish**. So the design centres on one Threefish datapath that can be
built in three shapes:

| `UNROLL` | rounds per clock | subkey additions per clock | clocks per block |
|---------:|-----------------:|---------------------------:|-----------------:|
| 1 (iterative)  | 1 | 1 every fourth clock | 74 |
| 4 (4-unrolled) | 4 | 1 | 20 |
| 8 (8-unrolled, default) | 8 | 2 | 10 |

All three need the same number of registers. Going from 1 to 8 shortens the
clock count per block by a factor of 7.4, but it lengthens the critical path
by about eight MIX stages. The 8-unrolled shape also needs a key schedule
that produces two subkeys per clock. Throughput follows directly from the
table: `f_clk × 512 / 10` bit/s for the default Skein-512 build. This design
follows the architecture published as "High-performance Implementation of a
New Hash Function on FPGA". Its clock counts per block are that
architecture's.

## What Skein computes

Skein chains Threefish calls with **UBI** (Unique Block Iteration). Each
message block `M` is encrypted under the current chaining value `G` as the
key, with a 128-bit tweak `T`. The block is then XORed back in:
`G' = Threefish(G, T, M) ^ M`. A hash is three UBI passes:

1. **Configuration UBI.** For a fixed output length its result is a constant
   (the IV), so the core starts from the IV and never runs this pass.
2. **Message UBI** (type 48). It runs over the message, zero-padded to whole
   blocks. An empty message is one zero block.
3. **Output UBI** (type 63). It runs over one block holding the 8-byte
   counter 0. Its result is the digest, which is the same size as the state
   (512 or 256 bits).

The tweak of each block holds four things:

- **Bits 95:0:** the byte position at the end of this block. Padding bytes
  are not counted.
- **Bits 125:120:** the block type.
- **Bit 126:** set on the first block of a UBI pass.
- **Bit 127:** set on the final block of a UBI pass.

Inside Threefish (`NW` = 8 or 4 words of 64 bits), one round pairs up the
words and applies `MIX` to each pair. `MIX` computes
`y0 = x0 + x1`, `y1 = (x1 <<< R[d mod 8][j]) ^ y0`. The round then permutes
the words. There are 72 rounds in all. A subkey is added before every group
of four rounds, and once more at the end, so 19 subkeys are used.

Subkey `s` is built from two extended arrays:

- the key words plus a parity word `k[NW] = C240 ^ k[0] ^ … ^ k[NW-1]`;
- the tweak words plus `t2 = t0 ^ t1`.

It is rotated by `s` positions. Three of its words get something added:
`t[s mod 3]`, `t[(s+1) mod 3]` and `s` itself. The rotation amounts, the
permutations, `C240` and the IVs are the constants of the Skein specification,
version 1.3. They are in `rtl/skein_pkg.sv`.

## How a message moves through the core

```
 s_data (64b) ──► skein_interface ──blocks──► skein_ubi_fsm ──block,tweak,key sel──► skein_threefish
 m_data (64b) ◄──  (serial⇄parallel,          (tweaks, IV/chain,                     (datapath, key
                    padding, digest out)        UBI sequencing)   ◄──done───────        schedule, FSM)
                          ▲────────────────────hash_valid──┘                     result ──┘
```

Each of the three units has its own FSM. The units are coupled only by
valid/ready handshakes and two pulses: `done`, when Threefish finishes a
block, and `hash_valid`, when the output UBI has finished.

* **`skein_interface`** gathers 64-bit words into an `NW`-word block. It
  zeroes the unused bytes of the last word and the unused words of the last
  block. The finished block, with its byte count and a last flag, goes into a
  holding register. This double buffering lets the next block be gathered
  while Threefish works. Eight words arrive in 8 clocks, fewer than the 10
  clocks the 8-unrolled Threefish spends per block, so a continuous input
  stream never starves it. When the digest is ready, the interface sends it
  out word 0 first. The FSM states are INIT, STOP (first block), STOP2 (later
  blocks), WAIT (a finished block waits for the holding register, or the
  digest is awaited), PTOS (digest out) and END.
* **`skein_ubi_fsm`** offers Threefish the next block as soon as one is
  available. That is the next message block, or after the last one, the zero
  output block. It forms each block's tweak from a running 96-bit byte count
  and chooses the key: the IV for the first message block, otherwise the
  previous result. Its states say which block Threefish is working on: INIT,
  FIRST, MID, FINAL, OUT and END. END pulses `hash_valid`.
* **`skein_threefish`** performs one UBI step per block and keeps the result
  as the next chaining value.

## The Threefish datapath (`skein_threefish`)

The datapath has these registers:

- the **state** register `v_q`;
- a copy of the **original block** `orig_q`, for the feed-forward XOR;
- the key schedule's registers.

The logic of one clock is:

```
v_add   = v_q + sk1                      (subkey adder column)
UNROLL=1: v_next = round_d(v_add)        (sk1 added only when d mod 4 = 0)
UNROLL=4: v_next = four_rounds_{upper=d/4 mod 2}(v_add)
UNROLL=8: v_next = four_rounds_hi( four_rounds_lo(v_add) + sk2 )
result  = (v_q + sk1) ^ orig_q           (taken from the same adder column)
```

After the last round group, the key schedule holds subkey 18 in `sk1`. The
adder column in front of the round logic therefore also forms the final
subkey addition, and the feed-forward XOR turns its output into the UBI
result. There is no separate output adder.

**Control FSM.** INIT waits for a block and loads the state, `orig_q` and
the key schedule. MID counts `72/UNROLL` round clocks. FINISH writes
`result` and raises `done` for one clock.

For the iterative and 4-unrolled shapes, FINISH returns to INIT. A block
therefore takes `1 + 72/UNROLL + 1` clocks: 74 or 20.

The 8-unrolled shape takes the next block already during FINISH. Its key
comes straight from the feed-forward output, not from the `result`
register. That gives `1 + 9 = 10` clocks per block. The iterative and
4-unrolled shapes keep the extra INIT clock, so this long path
(round output → adder → XOR → key parity → key register) stays out of their
shorter clock period.

The rotation amount reaches `skein_mix` as a signal. In the iterative shape
it follows the round counter through a small table. In the unrolled shapes it
is a constant, and the rotator reduces to wiring.

## The key schedule as two rings (`skein_key_schedule`)

Indexing the extended key by `(s+i) mod (NW+1)` would put a wide multiplexer
in front of every subkey word. Instead, the extended key (`NW+1` words) and
the extended tweak (3 words) are held in rings of registers that rotate by one
position per subkey. The adders then always read fixed positions:

```
sk1[i]    = k[i]                i < NW-3
sk1[NW-3] = k[NW-3] + t0
sk1[NW-2] = k[NW-2] + t1
sk1[NW-1] = k[NW-1] + s
```

For two subkeys per clock (`STEP = 2`, 8-unrolled), the second subkey is read
one position further on:

```
sk2[i]    = k[i+1]
sk2[NW-3] = k[NW-2] + t1
sk2[NW-2] = k[NW-1] + t2
sk2[NW-1] = k[NW] + s + 1
```

Both rings then rotate by two positions. The parity word is computed once,
when the key is loaded.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NW` (`skein_top`, most units) | 8 | state words: 8 = Skein-512, 4 = Skein-256 |
| `UNROLL` (`skein_top`, `skein_threefish`) | 8 | 1, 4 or 8 rounds per clock |
| `STEP` (`skein_key_schedule`) | 2 | subkeys per advance; `skein_threefish` sets it from `UNROLL` |

## External interface (`skein_top`)

* **Clock and reset.** `clk`; `rst_n` is asynchronous and active-low. Every
  register is reset.
* **Message input.** Send words on `s_valid`/`s_ready`/`s_data[63:0]`. A word
  is taken on a rising edge where both `s_valid` and `s_ready` are high. The
  first message byte is in `s_data[7:0]`. Set `s_last` on the last word, and
  give its number of message bytes (1–8) in `s_nbytes`; the core ignores the
  rest of that word. An empty message is a single word with `s_last = 1` and
  `s_nbytes = 0`. Only whole-byte messages are supported.
* **Digest output.** The digest comes out on `m_valid`/`m_ready`/`m_data`,
  one word per handshake: word 0 first, bytes little-endian, and `m_last` on
  word `NW-1`. It starts a few clocks after the output UBI ends. The next
  message is accepted once the digest has been sent.
* **Latency.** A message of `n` blocks takes about `(n + 1) ×` (clocks per
  block), plus the time to gather the first block and a few clocks of
  hand-over.

## Where this design fills in or departs from the published architecture

* **Constants.** The publication names the rotation constants, C240 and the
  IV but does not print them. The values here are those of the Skein
  specification v1.3. The testbenches confirm them against published known
  answers.
* **Where the extra clocks go.** The published clock counts are 74N, 20N and
  10N. Where the clocks beyond 72/UNROLL are spent is this design's choice
  (see *Control FSM* above).
* **Parity words in the 8-unrolled key schedule.** The published 8-unrolled
  key schedule computes extra parity words in additional logic. Here the
  parity word is computed once at load time and rotated with the ring. That
  produces the same subkeys.
* **Configuration UBI.** It is never run. The IV covers one output length,
  the state size (512 bits, or 256 with `NW = 4`). Longer outputs, which
  would need more output-UBI blocks, are not built.
* **Skein's optional arguments.** Key/MAC, personalisation, tree hashing and
  bit-granular messages are not supported.
* **FSM transitions.** The state names of the three FSMs follow the
  published ones. Two transitions are this design's own:
  * The UBI FSM moves on block hand-over rather than on Threefish
    completion, because the next block is handed over before the current one
    finishes.
  * END returns to INIT, so the core can hash one message after another.
* **Handshakes and reset.** The handshakes between units, the port protocol
  and the reset style are this design's own.
* **Timing and area.** Clock frequency, LUT, slice and register figures
  depend on the FPGA flow and are not reproduced here.

## Verification

The testbenches in `tb/` are self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line. The expected values come from
`tb/skein_ref_pkg.sv`, a plain reference model of the algorithm. It indexes
subkeys directly, loops over single rounds, and computes the IV by running
the configuration UBI. It reproduces the published Threefish-256/512
all-zero vectors, both IVs, and the Skein-256-256 and Skein-512-512 digests
of the byte `0xFF`.

| testbench | what it checks |
|-----------|----------------|
| `tb_skein_mix` | MIX for every rotation amount and random operands |
| `tb_skein_four_rounds` | four rounds, both halves of the rotation cycle, NW = 8 and 4 |
| `tb_skein_key_schedule` | all 19 subkeys of random keys and tweaks, STEP = 1 and 2, NW = 8 and 4 |
| `tb_skein_threefish` | chains of UBI steps for 512/8, 512/4, 512/1 and 256/4; the result and clocks from hand-over to `done`; clocks between blocks (10/20/74) |
| `tb_skein_ubi_fsm` | tweak, key select and block order against a behavioural Threefish stand-in with random latency |
| `tb_skein_interface` | block gathering, padding, byte counts, double buffering, digest serialisation under back-pressure |
| `tb_skein_top` | default build, end to end (details below) |
| `tb_skein_top_variants` | the same end-to-end test on the other five NW × UNROLL builds |

`tb_skein_top` runs the default build end to end. It checks the known-answer
digest and digests of messages from 0 to several blocks long, with random
input gaps and output back-pressure. It also checks the 10-clock period
between blocks, and that a 12-block message with its output block takes
13 × 10 clocks of Threefish time. It counts each mechanism and fails if any never happened:

- multi-block messages;
- single-block messages;
- empty messages;
- partial last words;
- an exact block fill;
- input stall on a full buffer;
- output stall;
- IV key and chained key;
- a block taken during FINISH.

To run one testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/skein_pkg.sv tb/skein_ref_pkg.sv tb/tb_skein_top.sv --top-module tb_skein_top
./obj_dir/Vtb_skein_top
```

Each testbench takes well under a second of simulation.

Lint reports a `SYNCASYNCNET` warning. It comes from the assertions, which
use `rst_n` in `disable iff` while the flip-flops use it as an asynchronous
reset, and it is harmless. Each `rtl/` file opens with a comment on its
function, interface and timing.
