# RC4 40-bit brute-force key search

This RTL searches the 40-bit key space of RC4 for the key that produced a
known stretch of keystream. Many small key testers run in lock step. Each one
runs the RC4 key schedule on its own candidate key, then generates keystream
bytes and compares them with the five known bytes. Most wrong keys fail on the
first byte, so one key test costs **772 clock cycles**.

The architecture follows the FPGA key-search engine described in the article
"Effective Uses of FPGAs for Brute-Force Attack on RC4 Ciphers", in the
configuration that article found best. Three ideas make that configuration
cheap:

* **One RAM, two keys.** A 512 x 16 true dual-port block RAM is split by its
  address MSB into two S-boxes. Port A tests key `K`, port B tests key `K+1`.
* **Two permutations per word.** Each 16-bit word holds one entry of two
  256-entry permutations, in its high and low byte. One key scrambles one
  byte while the other byte is rewritten with the identity permutation. The
  next key uses the other byte, so the usual 256-cycle initialisation of the
  S-box disappears.
* **Read-before-write.** On a write, the RAM port returns the word that was
  there before. The swap of `S[i]` and `S[j]` therefore takes 3 cycles
  instead of 4.

With the default sizes, three engines of 64, 16 and 8 units hold 88 RAMs and
test 176 keys every 772 cycles. At the 47 MHz reported for the original FPGA
implementation, that is 176 x 47e6 / 772 = 1.07e7 keys/s. The whole 40-bit
space then takes about 28.5 hours.

## RC4 in brief

RC4 with 8-bit words keeps a permutation `S[0..255]` and two indices.

* **Key schedule (KSA):** set `S[n] = n` and `j = 0`. Then for `i = 0..255`:
  `j += S[i] + K[i mod 5]`, then swap `S[i]` and `S[j]`.
* **Keystream:** set `i = j = 0`. Each output byte does `i += 1`,
  `j += S[i]`, swaps `S[i]` and `S[j]`, and outputs `S[S[i] + S[j]]`.

All arithmetic is modulo 256. A 40-bit key has five bytes `K[0..4]`. In this
RTL, a key is a 40-bit integer whose top byte is `K[0]` and whose bottom byte
is `K[4]`. So counting the integer up changes the last key byte fastest.

## The cycle schedule of one key test

Each tester gets one RAM port, so it can make one access per cycle. The RAM
read is synchronous: data comes out in the cycle after the address, and the
datapath uses it combinationally in that cycle.

| phase | port access | work done in the same cycle |
|---|---|---|
| `KSA_RD` | read at `i` | |
| `KSA_SJ` | write `S[i]` at `j'`; old `S[j']` is read out | `j' = j + K[i mod 5] + S[i]` (`S[i]` is on `dout`) |
| `KSA_SI` | write old `S[j']` at `i` | |
| ... | repeat for `i = 0..255` | 768 cycles |
| `KS_RD` | read at `i = 1` | |
| `KS_SJ` | write `S[i]` at `j'`; old `S[j']` read out | `j' = j + S[i]`, `S[i]` kept in a register |
| `KS_SI` | write old `S[j']` at `i` | `t = S[i] + S[j']` |
| `KS_RT` | read at `t` | |
| `CHK` | read at 0 (first read of the next key) | `S[t]` on `dout` is compared with expected byte 0 |

`CHK` does two jobs. It compares the keystream byte of the key just finished.
It also acts as `KSA_RD` of `i = 0` for the next key, so a pass takes
1 + 2 + 255 x 3 + 4 = **772 cycles**. The read in `CHK` changes nothing. If the
compare asks for more keystream, the controller can still go on with the old
key.

`j` is read as 0 in the first `KSA_SJ` and the first `KS_SJ` of a key. This is
the `j = 0` that starts both phases of RC4, and it needs no separate clear.

The original implementation describes the merged step as reading `S[j]` and
writing `S[i]` in one cycle. One port cannot access two addresses at once. This
RTL gets the same 3-cycle iteration by writing `S[i]` to address `j` and using
the old `S[j]` that read-before-write returns.

## The two-byte S-box word

`ctrl.half` picks the byte in use: the high byte when `half = 0`, the low byte
when `half = 1`. Every write is a full 16-bit word, made of:

* the new value for the active byte, and
* the word's own address for the idle byte.

At the end of a key schedule, the idle byte of every word holds its address,
which is the identity permutation. Here is why:

* Every address `n` is written once as `S[i]` with `i = n`, and that write puts
  `n` into the idle byte.
* A write at `j` puts `j` into the idle byte of word `j`. That is also the
  identity entry, so it cannot break anything.

Keystream writes follow the same rule, so the idle byte stays the identity.
The controller flips `half` at each new pass, and the next keys start on a
fresh identity without an initialisation pass.

Only the very first keys of a search have no previous pass. After `start`, the
controller fills both bytes of every word with the identity. This takes
256 cycles and happens once per search.

## Engines, passes and key slots

A `key_search_engine` holds `NUM_UNITS` units, one `engine_controller` and one
40-bit `key_counter`. A unit is one RAM plus two `key_tester_datapath`s. All
testers of an engine get the same control word (`rc4_pkg::ctrl_t`) every
cycle, so they all sit in the same phase with the same `i`.

In one **pass** an engine tests `STEP = 2 x NUM_UNITS` consecutive keys:

* The counter holds the pass's first key, always a multiple of `STEP`. Key
  bytes `K[0..3]` come from the counter and are broadcast to all testers.
* Each tester holds only the last key byte `K5` in an 8-bit register. At the
  start of a pass it loads the counter's low byte ORed with its slot number.
* Unit `u` tests slot `2u` on port A and slot `2u+1` on port B.
* `NUM_UNITS` must be a power of two of at most 128, so that a pass never
  spans more than the last byte.
* `start_key` is rounded down to a multiple of `STEP`.

## Matching, extension and stopping

In `CHK` each tester compares `S[t]` with `expected[ks_byte]`. Its `hit` output
is high if this byte and every earlier byte of the same key match.

* **No tester hits** (the usual case): the counter advances by `STEP`, every
  tester loads its new `K5`, `half` flips, and the next pass goes on.
* **Some tester hits and fewer than five bytes are checked:** every tester of
  the engine generates the next keystream byte (`KS_RD..KS_RT`, then `CHK`:
  5 cycles). The other testers' results are ignored, because their `hit`
  needs all earlier bytes to match. A wrong key matches the first byte with
  probability 1/256. An engine of `n` units therefore loses about
  5 x 2n / 256 cycles per 772-cycle pass: 2.5 cycles for the 64-unit engine.
* **Some tester hits on the fifth byte:** its `found` flag sets and the engine
  stops (`done`). `found_key` is `{K[0..3], K5}` of the lowest slot that found
  a key.
* **No hit and the next pass would pass 2^40:** the engine stops with
  `exhausted`.

## Top level

`rc4_key_search_top` places `NUM_ENGINES` engines side by side with their own
start keys and merges their results:

* Each engine's `found`, `found_key`, `done`, `exhausted` and a per-pass pulse
  come out.
* `found` / `found_key` carry the lowest-numbered engine that found a key.
* `all_done` rises when every engine has stopped.

The defaults are `NUM_ENGINES = 3` and `ENGINE_UNITS = '{64, 16, 8}`. Give the
engines disjoint ranges through `start_key` to cover the key space in
parallel. The clock manager that makes the search clock on the FPGA is not
part of this RTL; drive `clk` directly.

### Using it

1. Hold `rst_n` low, then release it.
2. Put the five known keystream bytes on `expected`. These are the ciphertext
   XOR the known plaintext, or just the ciphertext for an all-zero plaintext.
3. Put each engine's first key on `start_key[e]`.
4. Pulse `start` for one cycle.

Each engine then takes:

* 1 cycle to leave IDLE;
* 256 cycles for the identity fill;
* 772 cycles per pass;
* 5 more cycles for each further keystream byte checked in a pass.

A key in pass `p` (counting from 0) is reported `256 + 772 (p + 1) + 20 + 1`
cycles after the `start` edge. `start` again from the `DONE` state begins a new
search.

## Files

| file | contents |
|---|---|
| `rtl/rc4_pkg.sv` | key and byte types, phase enum, broadcast control word, constants |
| `rtl/sbox_ram.sv` | 512 x 16 true dual-port RAM, read-before-write on both ports |
| `rtl/key_tester_datapath.sv` | per-key datapath: K5, key-byte mux, j/t adders and registers, address/data muxes, comparator, found flag |
| `rtl/key_search_unit.sv` | one RAM with two testers (keys `K`, `K+1`) |
| `rtl/key_counter.sv` | shared 40-bit pass counter |
| `rtl/engine_controller.sv` | shared sequencer (INIT, KSA, keystream, CHK, DONE) |
| `rtl/key_search_engine.sv` | controller + counter + `NUM_UNITS` units |
| `rtl/rc4_key_search_top.sv` | several engines and the merged result |
| `tb/rc4_ref_pkg.sv` | software RC4 used as the reference by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rc4_key_search_full` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rc4_pkg.sv tb/rc4_ref_pkg.sv tb/tb_rc4_key_search_full.sv \
    --top-module tb_rc4_key_search_full
./obj_dir/Vtb_rc4_key_search_full
```

The other testbenches build the same way with their own file and top name.
`tb_sbox_ram`, `tb_key_counter` and `tb_engine_controller` do not need
`tb/rc4_ref_pkg.sv`.

What the testbenches check:

* `tb_sbox_ram`: random two-port traffic against a reference array, including
  the old data returned on writes.
* `tb_key_counter`: rounding on load, stepping, holding, and the last-pass
  flag at the end of the key space.
* `tb_key_tester_datapath` and `tb_key_search_unit`: the testbench steps the
  phases itself. After each key schedule, both bytes of the S-box are compared
  with an independently computed RC4 permutation and with the identity. Then
  `hit` is checked per keystream byte, and `found` and `K5` are checked, over
  passes that alternate `half`.
* `tb_engine_controller`: every phase, `i`, `i mod 5` and `half` of a pass;
  the 772-cycle pass; the 5-cycle extension; stopping on found and on
  exhaustion.
* `tb_key_search_engine` (4 units): keys found in the expected slot at the
  predicted cycle. A first-byte collision near the end of the key space must
  be rejected, followed by exhaustion. An unaligned start key is also tried.
* `tb_rc4_key_search_top` (engines of 2, 1 and 1 units): two complete searches
  with a restart. It counts identity fills, pass switches, keystream
  extensions, found and exhausted events, and fails if any never happened.
  It also checks the RC4 reference against the published test vector for key
  `0102030405`.
* `tb_rc4_key_search_full`: the default 64/16/8 configuration, with no
  parameter overrides. The key lies in engine 1's fourth pass. Engine 1 must
  report it at exactly `256 + 4 x 772 + 21` cycles, plus 5 cycles for each
  extra keystream byte that the reference model predicts for earlier passes.
  The other engines must keep searching at one pass per 772 cycles. That is
  176 keys per 772 cycles, or 1.07e7 keys/s at 47 MHz.

## Where this RTL follows the original design, and where it does not

Taken from the original design:

* the engine/unit structure and the 64/16/8 engine sizes;
* two S-boxes per dual-port 512 x 16 RAM, for keys `K` and `K+1`;
* the high/low byte ping-pong;
* the 3-cycle read-before-write KSA iteration and the 772-cycle key test;
* the shared 40-bit key counter with 8-bit last-byte registers per tester;
* the tester's components (key-byte mux with a zero input, two adders into
  `j`, an `S[i]+S[j]` adder into `t`, address mux over `i/j/t`, data mux over
  `i/dout/j`, comparator and found flag);
* checking five keystream bytes.

Choices of this RTL, which the original does not describe:

* the exact phase encoding, and the overlap of the compare with the next
  key's first read;
* one `K5` register per key, so two per unit;
* the one-off identity fill after `start`;
* how the shared sequencer handles a partial match: all testers extend by one
  byte;
* stopping on a found key or at the end of the key space;
* rounding `start_key` down to the pass size;
* the asynchronous active-low reset;
* priority merging of the engines' results.

Not modelled:

* The FPGA clock manager.
* The mapping of multiplexers onto tristate buffers and logic. Here they are
  ordinary muxes, which synthesis maps as it sees fit.
* The Distributed-RAM and 8-bit Block-RAM variants that the original compared
  against. They would need 1028 cycles per key.
* Timing closure. The `dout -> j adder -> RAM address` path in `*_SJ` is a
  single-cycle combinational path through the RAM output, as in the
  original's one-cycle read-then-write step, and it sets the clock rate.
* `found` reports the lowest matching slot. A true RC4 key collision on all
  five bytes would also stop the search.
