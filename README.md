# Flexible Speck / Simon block cipher engine

Speck and Simon are lightweight block ciphers for small devices such as
RFID tags, smart cards and sensor nodes. Speck is built from
add–rotate–XOR rounds. Simon is built from AND–rotate–XOR rounds. This RTL
implements both as iterative engines that compute one round per clock, and
it targets a short critical path in two ways:

* **Speck.** The modular addition, the slowest part of the round, is a
  **Sklansky parallel-prefix adder**. A ripple-carry adder would be slower.
* **Simon.** The three XORs of a round form a **balanced XOR tree** rather
  than a chain.

The Simon engine is **flexible**. One datapath serves the block sizes 64,
96 and 128 bits and the key sizes 128, 144, 192 and 256 bits, chosen per
block at run time. The Speck engine runs a 128-bit block with a 128-, 192-
or 256-bit key. A top-level wrapper puts both engines behind one
start/plaintext/key/ciphertext/done interface.

Only encryption is implemented.

## Supported configurations

| Cipher | block / key (bits) | word n | key words m | rounds T | select |
|---|---|---|---|---|---|
| Speck | 128/128 | 64 | 2 | 32 | `alg=ALG_SPECK`, `speck_key=SPECK_KEY_2W` |
| Speck | 128/192 | 64 | 3 | 33 | `SPECK_KEY_3W` |
| Speck | 128/256 | 64 | 4 | 34 | `SPECK_KEY_4W` |
| Simon | 64/128  | 32 | 4 | 44 | `alg=ALG_SIMON`, `simon_mode=SIMON_64_128` |
| Simon | 96/144  | 48 | 3 | 54 | `SIMON_96_144` |
| Simon | 128/128 | 64 | 2 | 68 | `SIMON_128_128` |
| Simon | 128/192 | 64 | 3 | 69 | `SIMON_128_192` |
| Simon | 128/256 | 64 | 4 | 72 | `SIMON_128_256` |

The Simon set is exactly the combinations that can be formed from the
supported block sizes (64/96/128) and key sizes (128/144/192/256). The
smaller Simon variants are not supported: 32/64, 48/72, 48/96, 64/96 and
96/96. The Speck core is parameterised by its word size `N`, so other Speck
block sizes are available by changing `N`. The top level instantiates
`N = 64`.

The round counts, the rotation amounts (Speck α = 8, β = 3; α = 7, β = 2
for n = 16) and the Simon constant sequences z2/z3/z4 are the standard
cipher definitions.

## The Speck datapath

```
            start                                  C[n-1:0]
   P[n-1:0] --1\                      +------------------------------+
   C[n-1:0] --0/--> Reg1 --+--> <<<β --> XOR <--------------------+  |
                           |                                     |  |
 P[2n-1:n] --1\            v                                     |  |
 C[2n-1:n] --0/--> Reg2 --> >>>α --> (+ mod 2^n) --> XOR k_i --+-+--> C[2n-1:n]
```

The block is held in two word registers:

* **Reg1** holds the lower word y.
* **Reg2** holds the upper word x.

When `start` is high, a 2:1 multiplexer in front of each register loads the
plaintext. In every later cycle the multiplexers feed the round output `C`
back into the same registers. One round computes:

```
x' = ((x >>> α) + y) xor k_i
y' = (y <<< β) xor x'
```

It is combinational from the registers (`speck_round`). When the last round
is reached, `C` is the ciphertext. This design captures it in an output
register `ct` and raises a one-cycle `done`.

**Key schedule (`speck_key_schedule`).** Round keys are generated on the
fly, in step with the rounds. A register `kreg` holds the current round key
k_i. A shift register of up to three stages holds the words l_i … l_{i+m-2}.
On `start` the master key is loaded, with k_0 in the lowest 64 bits and then
l_0, l_1, l_2. Each cycle then computes:

```
l_{i+m-1} = ((l_i >>> α) + k_i) xor i
k_{i+1}   = (k_i <<< β) xor l_{i+m-1}
```

This is the round function with the round index in place of the key, so
the key schedule instantiates `speck_round` (and its own Sklansky adder).
The new l word enters the shift register at stage m−2. Every other stage
moves down by one. m is taken from `key_words` at start.

## The Sklansky adder

`sklansky_adder` computes `(a + b) mod 2^N` in ceil(log2 N) prefix levels:

1. Each bit starts with a generate/propagate pair (g = a & b, p = a ^ b).
2. At level l, every bit i whose bit l is set merges its pair with the pair
   of bit `((i >> l) << l) - 1`. That is the last bit of the 2^l-bit block
   below it. This gives the Sklansky pattern: at each level, half the bits
   take the group result of one fan-out node.
3. After the last level, g[i] is the carry out of bits i..0.
4. The sum is `p ^ {g[N-2:0], 0}`. The carry into bit 0 is 0, and the
   carry out of bit N−1 is dropped.

For N = 64 that is 6 levels and a final XOR, against a 64-stage ripple
chain. The width may be any N ≥ 2. The testbench also runs a 13-bit
instance.

## The flexible Simon datapath

`simon_encrypt` has the same organisation as the Speck core: two word
registers (x, y) loaded on `start`, and the round output fed back. The
registers are 64 bits wide. For n = 32 or 48 only the low n bits are used,
and the rest are kept at zero. The mode is sampled at `start` and sets:

* the word size n,
* the number of key words m,
* the round count T,
* the constant sequence z_j.

**Round (`simon_round`).** One round computes:

```
f(x) = ((x <<< 1) & (x <<< 8)) xor (x <<< 2)
x'   = y xor f(x) xor k_i        y' = x
```

It is written as the tree `(f_and xor x<<<2) xor (y xor k)`. The `y xor k`
branch does not wait for the AND. The rotations wrap inside the low n bits.
The package helpers `rotl_w` / `rotr_w` provide the wrap. Each helper
multiplexes three fixed rotations (32, 48 and 64 bits) rather than using a
variable shifter.

**Key schedule (`simon_key_schedule`).** Four word registers hold
k_i … k_{i+m-1}. Each cycle computes:

```
t         = (k_{i+m-1} >>> 3)  [xor k_{i+1} if m = 4]
t         = t xor (t >>> 1)
k_{i+m}   = ~k_i xor t xor z_j[i mod 62] xor 3
```

The registers then shift down, and the new word enters at position m−1. A
6-bit counter walks z_j and wraps at 62.

**Packing.**

* Plaintext and ciphertext are `{x, y}` in the low 2n bits of the 128-bit
  bus. The upper bits of `ct` are zero.
* The key is m contiguous n-bit words with k_0 lowest. For example,
  Simon96/144 uses `key[143:0]`.
* Bits above the active width are ignored.

## Top level: `flex_block_cipher`

```
clk, rst_n            clock, asynchronous active-low reset
start                 begin a block (pt, key, alg and sizes are sampled on this edge)
alg                   ALG_SPECK / ALG_SIMON
speck_key             SPECK_KEY_2W / _3W / _4W
simon_mode            SIMON_64_128 … SIMON_128_256
pt[127:0], key[255:0] block and key, packed as above
ct[127:0]             latest reported ciphertext (held until the next one)
done                  one-cycle pulse: ct is new
busy                  a core is running
```

**Timing.** `start` is sampled on clock edge 0. The round with key k_i is
computed between edges i and i+1. The core captures the ciphertext on edge
T, and `done` is high in the cycle after edge T. A `start` may be given on
edge T itself, so back-to-back blocks take exactly T cycles each:

| Configuration | cycles per block | bits per cycle |
|---|---|---|
| Speck128/128 | 32 | 4.0 |
| Simon128/128 | 68 | 1.9 |
| Simon64/128 | 44 | 1.5 |

**Result routing.** This is the subtle part of the wrapper. A `start` always
replaces the block in progress. Only the selected core is started, and the
other core may still be running a block that is no longer wanted. Each core
therefore has an ownership flag:

* The flag is set when that core is started.
* The flag is cleared when the other core is started.
* A core's `done` reaches the output only if the core owned the block
  during its final round. The core's `last` output marks that final round.
* The ciphertext multiplexer switches to a core on the same edge that the
  core captures an owned result.

So a block of one cipher that ends on the same edge as a start of the other
cipher still reports. A block that was abandoned mid-way never reports. An
assertion checks that at most one core is owned at a time.

## What follows the source description, and what is this design's own

These points follow the source description:

* The Speck datapath: two registers, start-controlled input multiplexers,
  rotate / modular add / XOR with the round key / rotate / XOR.
* A Sklansky prefix adder as the modular adder.
* Loading the key words on start and generating round keys with shift
  registers, for m = 2, 3, 4.
* The XOR tree for Simon.
* The supported Simon block and key sizes.
* The 256-bit key bus width.

These are this design's own choices:

* The Sklansky adder's internal graph. The description names the adder type
  but gives no structure. The standard Sklansky prefix graph is used.
* The register-level form of the Speck key schedule. The description gives
  only the loading and shifting of key words. The standard Speck key
  expansion is used, with its adder reusing the round function.
* The entire Simon datapath and key schedule, apart from the XOR tree and
  the size set. The description gives no structure for them.
* The output register, `busy`, `done` and `last`.
* The reset, and the restart-on-start behaviour.
* All packing conventions.
* Run-time selection of m for Speck.
* Combining both ciphers behind one interface. Its routing is described
  above.

**Known departures:**

* The ciphertext is registered. In a purely combinational read-out the
  result would be available after edge T−1. Here `ct` and `done` appear
  after edge T. A new start may overlap that edge, so throughput stays at T
  cycles per block.
* Simon has no adder. Where the source suggests that Simon also uses the
  prefix adder, the XOR tree is used instead.
* Decryption, mentioned only in passing in the source, is not implemented.
* The source's simulation shows a two-bit `data_rdy[1:0]` signal. Its
  meaning is not stated, so it is not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. The expected values come
from reference models in `tb/cipher_ref_pkg.sv`. These models are
sequential functions written independently of the RTL:

* rotations bit by bit,
* addition with `+`,
* z sequences as character strings.

Checks:

* **Known-answer vectors.** The published vectors are checked for
  Speck128/128, 128/192, 128/256 and Speck64/128 (an `N = 32` instance).
  They are also checked for Simon64/128, 128/128, 128/192 and 128/256.
* **Random keys and plaintexts.** All eight configurations are run against
  the reference models, with random bits above the active widths.
* **Latency.** Every block is checked to take exactly T edges from start to
  `done`, and `busy` must stay high in between.
* **Mechanisms.** Every Speck key size, every Simon mode, algorithm
  switches, back-to-back starts and mid-block restarts are exercised.
  `tb_flex_block_cipher` counts each of these and fails if any never
  occurs.

`tb_flex_block_cipher` runs the top level at its default sizes in well
under a second.

## Simulating

Read the packages first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cipher_pkg.sv tb/cipher_ref_pkg.sv rtl/*.sv tb/tb_flex_block_cipher.sv \
    --top-module tb_flex_block_cipher -Mdir obj
./obj/Vtb_flex_block_cipher
```

To run another testbench, replace the last file and the top module with
any of these:

* `tb_sklansky_adder`
* `tb_speck_round`
* `tb_speck_key_schedule`
* `tb_speck_encrypt`
* `tb_simon_round`
* `tb_simon_key_schedule`
* `tb_simon_encrypt`

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Files

| File | Contents |
|---|---|
| `rtl/cipher_pkg.sv` | enums (`alg_e`, `speck_key_e`, `simon_mode_e`, `wsize_e`), round-count/rotation functions, z sequences, width-aware rotations |
| `rtl/sklansky_adder.sv` | parallel-prefix modular adder |
| `rtl/speck_round.sv` | combinational Speck round |
| `rtl/speck_key_schedule.sv` | on-the-fly Speck key expansion, m = 2/3/4 |
| `rtl/speck_encrypt.sv` | iterative Speck core |
| `rtl/simon_round.sv` | combinational Simon round with XOR tree |
| `rtl/simon_key_schedule.sv` | on-the-fly flexible Simon key expansion |
| `rtl/simon_encrypt.sv` | iterative flexible Simon core |
| `rtl/flex_block_cipher.sv` | top level |
| `tb/cipher_ref_pkg.sv` | reference models |
| `tb/tb_*.sv` | testbenches |

**Lint note.** Verilator reports `SYNCASYNCNET` on `rst_n` because the
assertions use the reset in `disable iff` as well as in the asynchronous
flip-flop resets. The warning is harmless.
