# SEA(n,b) loop core: a scalable block cipher, one round per clock

SEA (Scalable Encryption Algorithm) is a Feistel block cipher meant for very
small devices such as sensor nodes and RFID tags. It is built only from XOR,
word-wise addition, a 3-bit S box and rotations, and it is *parametric*: the
block size `n` (equal to the key size), the word size `b`, and the number of
rounds `nr` are all chosen by the integrator. This repository is a
synthesizable SystemVerilog implementation of a small loop architecture for
it:

* one cipher round and one key-schedule round are computed per clock cycle,
  side by side;
* no round key is ever stored: the key schedule is computed on the fly, first
  forward and then backward, so the core holds only four half-block
  registers (`L`, `R`, `KL`, `KR`) plus a round counter;
* encryption and decryption share the adder and the S box; two multiplexers
  steered by the mode bit select the path.

The default instance is SEA(126,7): 126-bit block and key, 7-bit words,
119 rounds.

## The cipher as built

A half block (`n/2` bits) is split into `NB = n/(2b)` words of `b` bits, word
0 being the least significant. `NB` must be a multiple of 3, because the
S box works on groups of three words.

| Operation | Meaning | Module |
|---|---|---|
| `X + K` | word-wise addition modulo 2^b, no carry between words | `sea_add` |
| `S(X)` | S box {0,5,6,7,4,3,1,2} applied to every bit column of each group of three words (word 3g is bit 0 of the 3-bit value, 3g+2 is bit 2) | `sea_sbox` |
| `r(X)` | in each group: word 3g rotated right by 1 bit, 3g+1 unchanged, 3g+2 rotated left by 1 bit | `sea_bit_rot` |
| `R(X)` | word rotation: word i moves to i+1, the top word to 0 (`INV=1`: the reverse) | `sea_word_rot` |

The round function is `f(X, K) = r(S(X + K))`. With it:

```
encryption round FE:  L' = R            R' = R(L) ^ f(R, K)
decryption round FD:  L' = R^-1(R ^ f(L, K))       R' = L
key round FK:         KL' = KR          KR' = KL ^ R(r(S(KR + C)))
```

FD is the exact inverse of FE under the same key. The S box is written in its
bit-sliced form (three AND/OR-XOR steps, each using the result of the
previous one), which costs a handful of gates per bit and reproduces the
table exactly.

The round constant `C` is a half block whose word 0 holds a small index (taken
modulo 2^b) and whose other words are zero.

## The key schedule and the Switch (the part to read carefully)

The key schedule is where this architecture saves memory, and it is also
what makes decryption possible without precomputing anything.

Let `s0 = (KL, KR)` be the key as loaded and `HM = (NR+1)/2` the middle
round. Round `i` works as follows:

| round `i` | round key given to the cipher (Half Exec mux) | key-register update |
|---|---|---|
| `1 .. HM-1` | `KR` | `FK(KL, KR, i)` |
| `HM` | `KR` | **Switch:** `FK(KR, KL, HM-1)`, with the halves exchanged in front of FK |
| `HM+1 .. NR` | `KL` | `FK(KL, KR, NR-i)` |

In the first half, the registers step forward through the states `s0, s1, ...,
s(HM-1)` and the cipher receives `KR(s0), KR(s1), ...`. A Feistel round can be
undone by exchanging its halves and applying it again with the same constant,
so at the middle round the Switch multiplexers exchange the halves and the
constants start to count down. From then on the registers hold the previous
states with their halves exchanged, `swap(s(HM-2)), swap(s(HM-3)), ...`, and
the Half Exec multiplexer takes `KL`, which is exactly the old `KR`. The
round-key sequence is therefore

```
KR(s0), KR(s1), ..., KR(s(HM-1)), KR(s(HM-2)), ..., KR(s1), KR(s0)
```

a palindrome. Decryption needs the encryption round keys in reverse order,
and a palindrome read backwards is itself; so decryption loads the **same
key**, runs the **same key schedule**, and only swaps FE for FD. This is why
the key schedule has no multiplexer that depends on the mode.

This only works when `NR` is odd (an even-length sequence would have to repeat
its middle key, which one FK step per cycle cannot do). The core therefore
rounds the round count up to the next odd number. The elaboration of
`sea_top` stops with an error if `NR` is even or if `n` is not a multiple of
`6b`.

## Round count

`NR` defaults to the recommended SEA round count

```
nr = 3n/4 + 2 * (n/(2b) + b/2)        (b/2 rounded down)
```

with `3n/4` rounded up when `n` is not a multiple of 4, and the result rounded
up to the next odd number (`sea_pkg::sea_default_nr`). Examples:

| n | b | words per half | NR |
|---|---|---|---|
| 48 | 4 | 6 | 53 |
| 48 | 8 | 3 | 51 |
| 72 | 4 | 9 | 77 |
| 72 | 6 | 6 | 73 |
| 72 | 12 | 3 | 73 |
| 96 | 4 | 12 | 101 |
| 108 | 6 | 9 | 105 |
| **126** | **7** | **9** | **119** (default) |
| 132 | 11 | 6 | 121 |
| 144 | 4 | 18 | 149 |
| 144 | 6 | 12 | 139 |
| 144 | 8 | 9 | 135 |
| 144 | 12 | 6 | 133 |

`NR` is a parameter of `sea_top` and may be set directly to any odd value.
A popular size, (128, 8), is not possible: it has 8 words per half, which
cannot be grouped in threes.

## Datapath and timing

```
            din ──► [ L | R ] ──► sea_round (FE/FD, Encrypt muxes) ──┐
                      ▲                                          │
                      └─────────────────────────────────────────┘
                                  ▲ rk
            key ──► [ KL | KR ] ──► Half Exec mux
                      ▲   └──► Switch muxes ──► sea_key_round ──┐
                      └─────────────────────────────────────────┘
                         sea_ctrl: round counter -> Switch, Half Exec, C, done
```

`sea_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | start an operation; taken only when idle |
| `encrypt` | in | 1 | 1 = encrypt, 0 = decrypt; sampled with `start` |
| `din` | in | N | `{L, R}`: plaintext, or ciphertext for decryption |
| `key` | in | N | `{KL, KR}` |
| `dout` | out | N | `{L, R}` after the last round |
| `busy` | out | 1 | high during the `NR` round cycles |
| `done` | out | 1 | one-cycle pulse, `dout` valid |

The clock edge that sees `start` while idle loads `din`, `key` and the mode.
The next `NR` edges each perform one round; `done` rises on the `NR`-th edge
after the load edge, together with the final value on `dout`. `dout` then
holds until the next load. `start`, `din`, `key` and `encrypt` are ignored
while `busy`. A block therefore takes `NR + 1` cycles including the load
cycle, and a new one can be started in the cycle `done` is high.

`dout` is `{L, R}` as left by the last round, with no final exchange of the
halves; decryption takes that value as its `din` and returns the plaintext in
the same `{L, R}` order.

The critical path runs from the key registers through the Half Exec
multiplexer, the word adder, the S box, the XOR and the Encrypt output
multiplexer back to the data registers; the rotations are pure wiring.

## Where this design makes its own choices

The loop structure, the FE/FD/FK rounds, the S box table, the Switch, Half
Exec and Encrypt multiplexers and the round-count formula come from the
published description of this architecture. The following are choices of
this implementation and are worth checking if you need bit-exact
compatibility with another SEA implementation:

* **Inverse rotation in decryption.** FD uses `R^-1`; this is what makes it the
  inverse of FE.
* **Key added before the S box** (`S(X + K)`), in the round and in the key round.
* **Rotation directions and the S box bit order** are the usual SEA
  definitions (see the table above).
* **Round constants** (index in word 0) and their sequence `1 .. HM-1`, then
  `HM-1 .. 0`.
* **Position of the Switch** in front of the key round of the middle round,
  and the **odd round count** that follows from it. Other SEA descriptions
  place the switch and number the constants differently. Their ciphertexts will
  then differ from this core's, although the structure is the same.
* **No final half swap**, the **start/busy/done handshake** and the
  **synchronous reset**.

No published test vectors were available to check against. Correctness here
means agreement with an independent reference model written to the same
definitions, and a decryption that recovers the plaintext.

## Files

| file | content |
|---|---|
| `rtl/sea_pkg.sv` | default round count and counter width |
| `rtl/sea_top.sv` | the core: data registers, instances, parameter checks |
| `rtl/sea_ctrl.sv` | round counter, Switch / Half Exec / constant / done |
| `rtl/sea_key_sched.sv` | key registers, Switch and Half Exec multiplexers |
| `rtl/sea_key_round.sv` | FK |
| `rtl/sea_round.sv` | FE / FD with the Encrypt multiplexers |
| `rtl/sea_add.sv`, `sea_sbox.sv`, `sea_bit_rot.sv`, `sea_word_rot.sv` | the four primitives |
| `tb/sea_ref_pkg.sv` | bit-level reference model (table-lookup S box, index-based rotations, round keys collected in a list first) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_sea_workloads` |
| `tb/sea_tb_runner.sv` | helper that exercises one core of a given size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog in case the design hangs. For example, the end-to-end test at
the default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sea_pkg.sv tb/sea_ref_pkg.sv tb/tb_sea_top.sv --top-module tb_sea_top
./obj_dir/Vtb_sea_top
```

Replace `tb_sea_top` by any other `tb_*` module to run that test.

* `tb_sea_top`: SEA(126,7) with every parameter at its default. It runs 12
  random encryptions against the reference and then decrypts each ciphertext
  with the same key. It checks the `NR`-cycle latency and that `dout` holds
  while idle. `start` is held high during some runs and the inputs are
  scrambled after the load edge; neither may disturb the result. It also
  counts Switch events, Half Exec rounds, encryptions, decryptions and ignored
  starts, and fails if any of them never occurred.
* `tb_sea_workloads`: 13 cores side by side, one for each size in the round
  count table above, each running 4 encrypt/decrypt round trips.
* Block tests: the S box is checked exhaustively on all eight input values and
  on random blocks. The rotations are checked with walking ones. The adder is
  checked for carries between words. Both round types are checked one round at
  a time, including FD(FE(x)) = x. The key schedule is checked over complete
  119-round runs. The controller's signal sequence is checked cycle by cycle.

The simulations run in seconds. To use another size, set `N` and `B` (and
optionally an odd `NR`) on `sea_top`.
