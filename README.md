# HMAC-SHA256 with two pipelined, two-operations-per-cycle SHA-256 cores

This is a hardware engine that computes HMAC-SHA256 for short messages at a
rate of one message every 8 clock cycles.

HMAC(K, m) = SHA256((K ^ opad) || SHA256((K ^ ipad) || m)). Each of the two
hashes starts with a 512-bit block that depends only on the key. The engine
hashes those two key blocks once, when a key is loaded, and stores the
resulting chaining values. After that, each message costs exactly one
SHA-256 block in an inner core and one in an outer core. This only works for
messages that fit in a single padded block, which is up to 447 bits. The
typical use is signing a 256-bit hash of a longer text.

Each core is a four-stage pipeline. Each stage runs a merged "double
operation" block, which executes two SHA-256 rounds per clock. So one block
takes 32 cycles instead of 64. With four blocks in flight, a core accepts a
new block every 8 cycles.

```
 msg ─► padding_unit ─► inner sha256_core ─► padding_register ─► outer sha256_core ─► mac
             ▲            (IV = H(K^ipad))                         (IV = H(K^opad))
 key ─► key_gen ──── K^ipad / K^opad during initialization ────────────┘
        control_unit: phase counters, NOKEY / INIT / RUN / DRAIN
```

| figure | value |
|---|---|
| throughput | one message (512-bit block) per 8 cycles = 64 bits/cycle |
| latency | 65 cycles from the padded block entering the inner core to `mac_valid_o` (32 + 1 + 32) |
| messages in flight | 4 per core + 1 in the padding register |
| key re-initialization | about 40 cycles after the pipelines drain |

At 64 bits per cycle, a 34.7 MHz clock gives 2.22 Gbit/s. That frequency is a
published FPGA result for this architecture. Timing was not evaluated for
this RTL.

## The merged double operation (`sha256_op2`)

A SHA-256 round updates eight 32-bit words, a..h. Only the new `a` and `e`
need arithmetic. The other six words are copies: b←a, c←b, d←c, f←e, g←f,
h←g.

When two rounds are chained, more of the work depends only on the inputs of
the first round:

* The first round's `h + K_t + W_t` can be formed early.
* The second round needs `h_{t+1} + K_{t+1} + W_{t+1}`, and `h_{t+1}` is just
  `g_t`. So that sum can also be formed from the block inputs, in parallel.
* Adding `d` (and, for the second round, `c`, which becomes the next `d`)
  to these sums also depends only on the inputs.

After this precomputation, the serial part is:

1. The first round's Ch/Σ1 sum gives e1. Its Σ0/Maj sum gives a1.
2. The second round's Ch/Σ1 and Σ0/Maj sums use e1 and a1.

The outputs are:

* a_{t+2} and e_{t+2}: computed by the two rounds
* b = a1, c = a, d = b
* f = e1, g = e, h = f

As written, the chain to the new `e` is six two-input adders and the chain to
the new `a` is seven. A single round needs four. The clock is slower, but two
rounds finish per cycle, so throughput goes up.

## Pipeline timing inside a core (`sha256_core`)

The four stages each own 16 of the 64 rounds. Each stage is a state register
(`st_q[s]`) followed by one `sha256_op2`.

All stages share one phase count `p = 0..7`, which comes from the control
unit. In phase `p`, stage `s` executes rounds `16s + 2p` and `16s + 2p + 1`:

* **Phases 0–6:** each stage writes its round output back into its own
  register.
* **Phase 7 (the hand-over):**
  * Each stage's output moves to the next stage's register.
  * Stage 0 loads the initial value of a newly accepted block.
  * Stage 3's result, added to its chaining value, appears combinationally
    on `out_digest_o` with `out_valid_o`.

A block accepted at edge E leaves at edge E + 32. `in_ready_o` is high only
in phase 7.

### The schedule register file (`ms_ram`)

The message schedule is held in a register file with one 64-word slot per
block in flight:

* When a block is accepted, its 16 words are written into its slot.
* Stage 0 reads W_{2p} and W_{2p+1} straight from the slot.
* Stages 1 to 3 each have a generator (`w_gen`). It computes the two words
  the stage needs in the same cycle, from seven earlier words of the slot:
  W_{t-16}, W_{t-15}, W_{t-14}, W_{t-7}, W_{t-6}, W_{t-2} and W_{t-1}. It
  then writes them back so later stages can use them.

Every word is written before it is read, so the file is not reset.

### Initial values (`constants_array`)

Each core has its own constants array. It contains the K_t table and a
256-bit register holding the stored chaining value.

A one-bit `init` flag travels with every block:

* **Key blocks** (`in_init_i = 1`) start from the standard IV. Their result
  is written into the register.
* **Message blocks** start from the stored value, and their final addition
  also uses it.

The stored value is secret: treat it like the key.

## Around the cores

* **`padding_unit`**: applies standard SHA-256 padding: the message, a `1`
  bit, zeros, and a 64-bit length. The length is `512 + msg_bits`, because
  the key block that comes first is counted. The unit holds one padded block
  in a register, so a message can be taken and padded while the key is still
  being hashed.
* **`padding_register`**: captures the inner digest on the inner core's
  hand-over edge. It presents the digest as a padded block: the digest, a
  `1` bit, zeros, and the length 768. The outer core's phase runs one cycle
  behind the inner one, so the outer core takes this block on the next edge.
  That one-cycle lag is the "+1" in the 65-cycle latency.
* **`key_gen`**: stores the key and produces `K ^ 0x36..` and `K ^ 0x5c..`.
  Keys of up to 64 bytes are given left-aligned and zero-filled. Longer keys
  must be hashed to 32 bytes outside the engine first.
* **`control_unit`**: runs the phase counter and the key state machine:
  * **NOKEY** (after reset): messages are not accepted.
  * **INIT**: each core receives its key block once, at its own hand-over.
    The two key blocks are hashed in parallel. When both chaining values are
    stored, the state moves to RUN.
  * **RUN**: messages are taken at every inner hand-over.
  * **DRAIN**: a new key was loaded during RUN. A message already padded
    and waiting in the padding unit when the key was taken still goes into
    the inner core. Intake then stops until both cores and the padding
    register are empty. So every message is signed with the key that was in
    force when `msg_ready_o` took it. A key and a message taken in the same
    cycle count as key first. Then INIT runs again.

## Top-level interface (`hmac_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_valid_i` / `key_ready_o` | in / out | 1 | key handshake; `key_ready_o` is high in NOKEY and RUN |
| `key_i` | in | 512 | key, first byte in [511:504], zero-filled |
| `msg_valid_i` / `msg_ready_o` | in / out | 1 | message handshake |
| `msg_i` | in | 512 | message, first bit in [511] |
| `msg_bits_i` | in | 9 | message length in bits, 0..447; an assertion checks the limit |
| `mac_valid_o` | out | 1 | one-cycle pulse per MAC; no back-pressure |
| `mac_o` | out | 256 | the MAC |
| `keyed_o` | out | 1 | a key is loaded and initialization is done |
| `busy_o` | out | 1 | work is in flight, or a key change is in progress |

MACs come out in the order the messages went in.

## Files

Common types and functions are in `rtl/sha256_pkg.sv`: the state struct,
K_t, the IV, and Ch, Maj, Σ and σ.

| RTL file | testbench (`tb/`) |
|---|---|
| `hmac_top.sv` | `tb_hmac_top.sv`, `tb_hmac_vectors.sv` |
| `sha256_core.sv` | `tb_sha256_core.sv` |
| `sha256_op2.sv` | `tb_sha256_op2.sv` |
| `w_gen.sv` | `tb_w_gen.sv` |
| `ms_ram.sv` | `tb_ms_ram.sv` |
| `constants_array.sv` | `tb_constants_array.sv` |
| `key_gen.sv` | `tb_key_gen.sv` |
| `padding_unit.sv` | `tb_padding_unit.sv` |
| `padding_register.sv` | `tb_padding_register.sv` |
| `control_unit.sv` | `tb_control_unit.sv` |

`tb/sha_ref_pkg.sv` is a separate, loop-based reference model of SHA-256 and
single-block HMAC. Its constant table is typed independently of the RTL.

## Simulating

Every testbench checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hmac_top \
    rtl/sha256_pkg.sv tb/sha_ref_pkg.sv rtl/*.sv tb/tb_hmac_top.sv -o sim
./obj_dir/sim
```

For another testbench, replace `tb_hmac_top` in both places. It runs in well
under a second.

`tb_hmac_top` runs the engine with its default configuration. It checks:

* both single-block RFC 4231 vectors (test cases 1 and 2);
* 56 more random keys and messages against the reference model;
* the 8-cycle intake grid and the exact 65-cycle latency of every MAC.

It also counts that each of these happened at least once:

* initialization;
* a message waiting during initialization;
* a re-key with drain;
* a full inner pipeline;
* input back-pressure.

`tb_hmac_vectors` is a longer random-vector run at the default
configuration: 480 messages over 12 keys, with random key lengths (0–64
bytes), random message lengths (every fourth one 256 bits) and random idle
gaps. It compares every MAC with the reference model.

`tb_sha256_op2` and `tb_sha256_core` also check the FIPS 180-4 `"abc"`
digest.

## Where this departs from, or adds to, the architecture it implements

The overall structure comes from the published architecture:

* the two cores with stored key-block hashes;
* four stages of 16 operations;
* the merged double operation with parallel precomputation;
* the padding register between the cores;
* 8 cycles per block and 65 cycles of latency.

The following are this implementation's own choices:

* **Control:** the shared phase count, the one-cycle lag of the outer core,
  and the four-state key sequencer, including draining before a re-key.
* **Message schedule:** the one-slot-per-block register file, with
  just-in-time generators in stages 1–3.
* **Interfaces:** the valid/ready handshakes, the bit-granular message
  length, the key format, and the registered MAC output.
* **Module split:** the architecture puts the K table, the schedule
  generators and the key generation into one "constants array and key
  generation" block per core. Here they are separate modules, and a single
  `key_gen` feeds both cores.

Not covered:

* Keys longer than 64 bytes.
* Messages longer than 447 bits. A full 512-bit message would need a second
  block.
* Clock frequency, area and power. The architecture's arguments for lower
  power (a lower clock and supply voltage at the same throughput) are about
  the implementation technology, not about the RTL.
