# Two application-specific AES-128 cores: one for speed, one for area

AES hardware is usually tuned for one goal: very high throughput, or the
smallest possible area. This RTL holds two AES-128 cores that sit at the two
ends of that trade-off and share nothing but clock and reset:

* **High-speed core** (`aes_hs_core`). Encryption and decryption. All ten
  rounds are laid out one after the other with no loops, and the data moves
  through them as 32-bit state columns, one column per clock. A 128-bit
  block takes four clocks to enter. Blocks can follow each other without gaps
  for as long as the key stays the same. At 190 MHz this is 6080 Mbit/s.
  Round keys are computed on the fly from a 128-bit key input.
* **Low-area core** (`aes_la_core`). Encryption only. Everything is 8 bits
  wide: one S-box, a 16-byte state memory and a 4-byte shift register. The
  state is rewritten in place, byte by byte. A block takes about 1100 clocks.

The top level `aes_asa_top` instantiates both cores and brings out the ports
of each one separately (`hs_*` and `la_*`).

The two cores follow a published architecture. That description gives the
block structure, the data widths, the synchronisation idea and the
performance figures. It does not give the tap schedules, latencies, control
sequence or bus formats. Those choices are this design's own, and each one is
marked as such below and in the header comment of each file.

---

## 1. The high-speed core

### 1.1 Column stream and round chain

A block is four columns. Column `c` is bits `[127-32c -: 32]` of the block,
and row 0 of a column is its most significant byte (the FIPS-197 byte order).
The chain is:

```
din ─► ARK0 ─► [SB ─► SR ─► MC ─► ARK1] ... [SB ─► SR ─► MC ─► ARK9] ─► [SB ─► SR ─► ARK10] ─► dout
```

| unit | module | latency (clocks) |
|---|---|---|
| SubBytes / InvSubBytes (4 S-boxes) | `hs_subbytes` | 2 |
| ShiftRows / InvShiftRows | `hs_shiftrows` | 5 |
| MixColumn / InvMixColumn | `hs_mixcolumn` | 1 |
| AddRoundKey | `hs_addroundkey` | 1 |
| whole core | `aes_hs_core` | 1 + 9·9 + 8 = **90** |

Every unit handles one column per clock. The only unit that looks at more
than one column is ShiftRows, because it moves bytes between the columns of
a block (see 1.3).

### 1.2 The sync pulse

Two kinds of unit need to know which column of a block is passing through:
the row shifter, and AddRoundKey, which must add key column `n` to state
column `n`. Neither one decodes this from the data. Instead, a single **sync
pulse** is given before every data session. `sync` is high during the clock
just before column 0 of the first block. After that, each unit counts columns
modulo 4 on its own.

Each unit delays `sync` by its own latency and passes it on with the data
(`sync_in` → `sync_out`, like `valid`). So every downstream unit gets its
own pulse exactly one clock before its column 0. This gives 11 pulses for the
11 AddRoundKey units and 10 for the row shifters. All of them come from the
one pulse applied at the input.

Rules that follow from this:

* The column counters run on every clock, valid or not. A pause in the
  input must therefore last a whole number of blocks (a multiple of four
  clocks), or be followed by a new sync pulse.
* After a change of `dec` or of the key, pulse `sync` again before sending
  data.
* `rst_n` clears the valid and sync side-band registers. Without this, random
  power-up values in the side-band could re-time the counters in the middle
  of the first session.

### 1.3 Row shifting with programmable-tap shift registers

ShiftRows moves bytes within a row. In a design that processes one column at
a time, this means bytes of different input columns must arrive together in
one output column. `hs_shiftrows` does this with seven shift registers of the
SRL16 kind (`srl_tap`: a 16-deep shift register whose output stage is picked
by a 4-bit tap, so the delay is tap+1):

* row 0 goes through one register with a fixed delay;
* rows 1–3 each go through a *byte rearranging* register, whose tap changes
  every clock, and then a *variable delay* register, whose tap depends only on
  the row and the mode.

Output column `j`, row `r`, needs input column `k = (j+r) mod 4` when
encrypting, or `(j−r) mod 4` when decrypting, from the same block. If the
module latency is a constant `L`, that byte must be delayed by
`d = L + j − k` clocks. The smallest `L` that keeps every delay at 2 or more
(1 or more in each of the two chained registers) is **L = 5**. With `dmin`
the smallest delay in a row, the variable delay register delays by `dmin − 1`
and the rearranging register by `d − dmin + 1`:

| mode, row | delay d for output column j = 0,1,2,3 | rearranging delay | variable delay |
|---|---|---|---|
| any, row 0 | 5, 5, 5, 5 | – | fixed 5 |
| enc row 1 / dec row 3 | 4, 4, 4, 8 | 1, 1, 1, 5 | 3 |
| enc row 2 / dec row 2 | 3, 3, 7, 7 | 1, 1, 5, 5 | 2 |
| enc row 3 / dec row 1 | 2, 6, 6, 6 | 1, 5, 5, 5 | 1 |

The state machine is a 2-bit column counter. The sync pulse resets it
**asynchronously**, as the source architecture specifies. The taps are
computed from the counter by `always_comb` functions. The rearranging tap
looks ahead by the variable delay, so that it selects for the column that
will be at the output when the byte arrives there. The split of delays and
`L = 5` are this design's own choices.

### 1.4 Round keys: on-the-fly expansion and a 32-bit key bus

`hs_keyexp` takes the 128-bit key when `key_load` is high. It then sends all
44 expanded words `w[0..43]` on an internal 32-bit bus, one word per clock,
as (index, word) pairs. It keeps the last four words in registers. A new word
is `w[i−4] ^ w[i−1]`, or `w[i−4] ^ SubWord(RotWord(w[i−1])) ^ Rcon` when `i`
is a multiple of 4. It uses four S-boxes of its own. `key_ready` rises 45
clocks after `key_load`.

Each `hs_addroundkey` instance (parameter `ROUND` = 0..10) watches the bus
and copies the four words of its round into a 4×32-bit register storage. A
2-bit counter, reset by the sync pulse, addresses this storage. A new key
simply overwrites the storage. Data already in flight when this happens is
mixed between old and new keys, so wait for `key_ready` before starting a
new session.

### 1.5 Decryption on the same chain

Decryption uses the *equivalent inverse cipher*. The order of units is the
same (SubBytes, ShiftRows, MixColumn, AddRoundKey), with every unit switched
to its inverse by `dec`. The round keys are used in reverse order:
`ARK[ROUND]` stores round `10 − ROUND`. The keys of rounds 1..9 are passed
through InvMixColumn in the key expander before they reach the bus. So the
decryption chain needs no extra units, and the key path needs one extra
InvMixColumn. `dec` is a static setting: changing it needs a new
`key_load`, a wait for `key_ready`, and a new sync pulse.

### 1.6 Interface timing

```
clk        _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_ ...
sync       ___/‾‾‾\_______________________
din_valid  _______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ...
din              | c0 | c1 | c2 | c3 | c0'| ...     (column 0 first)
dout_valid                 90 clocks later, the same pattern
sync_out                   high in the clock before the first output column
```

---

## 2. The low-area core

### 2.1 State memory with feedback

There is no data pipeline. The 16 state bytes live in `la_state_mem`,
addressed as `4·column + row`. Any byte can be read. Every operation reads
bytes, passes them through one operation unit, and writes the result back.
The write-back multiplexer in the core picks which unit's result is stored.
The units are:

* the S-box (`aes_sbox`, combinational), shared between SubBytes and the key
  schedule;
* `la_shift_mix`: a 4-byte shift register over a byte-serial MixColumn;
* an XOR with a byte of the round key (AddRoundKey).

### 2.2 One shift register for both ShiftRows and MixColumn

`la_shift_mix` has two input paths. Path 1 (`load`) shifts in a byte from the
state memory. Path 2 (`rot`) rotates the register, so the bottom byte
re-enters at the top.

* **MixColumn.** Load a column in 4 clocks. Then, for 4 clocks, write
  `mc_out = 2·s0 ^ 3·s1 ^ s2 ^ s3` to row `i` of the column and rotate. After
  the `i`-th rotation, `s0..s3` are `a_i, a_{i+1}, ...`, so each output is
  one row of the MixColumn matrix. A full 4-input, 4-output MixColumn is
  never built.
* **ShiftRows.** Load row `r` in 4 clocks, rotate it `r` times, then write
  `sr_out` back to the row in 4 clocks while rotating. No separate ShiftRows
  unit exists.

### 2.3 Control schedule

The control unit is the FSM inside `aes_la_core`:

| phase | clocks | action |
|---|---|---|
| LOAD | 16 | plaintext bytes on `din` with `data_we`, order `4c + r` |
| ARK | 16 | `state[i] ^= rk[i]` (round key 0) |
| KEY | 16 | next round key, one byte per clock (rounds 1..10) |
| SB | 16 | `state[i] = S(state[i])` |
| SR | 30 | rows 1, 2, 3: load 4 + rotate r + write 4 |
| MC | 32 | columns 0..3: load 4 + write 4 (rounds 1..9 only) |
| ARK | 16 | AddRoundKey |
| OUT | 16 | ciphertext on `dout` with `dout_valid` |

The first output byte appears **1085 clocks** after the clock that carried
the last input byte. A block takes 1116 clocks in total, which is about
6.4 Mbit/s at 56 MHz. `busy` is high from the first processing clock until
the last output byte. Key bytes (`key_we`) and plaintext bytes (`data_we`)
share the 8-bit `din` and are accepted only while `busy` is low. Assertions
in the core report a byte offered while it is busy. The high-speed core has a
matching assertion: `din_valid` before `key_ready` is an error.

### 2.4 Byte-serial key schedule

`la_key_sched` keeps two 16-byte key arrays. One is the cipher key, loaded
with `key_we` while the core is idle. The other is the working round key.
At the start of every block the cipher key is copied into the working key, so
a key loaded once serves any number of blocks. Each KEY phase updates the
working key in place:

```
i < 4 :  k[i] ^= S(k[12 + (i+1) mod 4]) ^ (i == 0 ? Rcon : 0)
i ≥ 4 :  k[i] ^= k[i−4]        // k[i−4] already holds the new value
```

Rcon doubles in GF(2^8) after byte 15. The S-box lookups go through the
core's shared S-box.

---

## 3. Arithmetic shared by both cores

`aes_pkg` holds the GF(2^8) arithmetic, with the reduction polynomial
x^8 + x^4 + x^3 + x + 1. No S-box table is stored. `aes_sbox` computes the
inverse as x^254 = x^14 · x^240: x^14 = x^2·x^4·x^8, and x^240 is built from
x^16 by squaring. It then applies the affine transform
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse S-box
applies `rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05` first and then inverts.
With `STAGES = 1`, a register sits between the x^14 and x^240 halves. The
high-speed core uses this sub-pipelined form.

---

## 4. How far to trust it, and where it departs from the source

Verified in simulation:

* both cores against the FIPS-197 examples (appendix B and C.1);
* both cores against an independent reference model for random keys and
  blocks;
* the high-speed core's decryption of its own output, its 90-clock latency
  and its gap-free output;
* the low-area core's 1085-clock latency;
* every unit on its own, including all 256 inputs of the S-box in both
  directions.

Timing closure and FPGA resource use were not checked.

Departures and open points:

* **S-box structure.** The source uses a composite-field inverter, which it
  does not describe. This design uses a power chain in the polynomial basis.
  The function is the same; the area and delay are not.
* **Low-area throughput.** The source reports 1.98 Mbit/s at 56 MHz, which
  is about 3600 clocks per block. This schedule takes 1116 clocks. Where the
  source spends the rest is not known.
* **Memories.** The source maps the low-area state and key memories onto
  block RAM. Here they are register arrays with combinational reads. A
  synchronous-read RAM would add a clock to every memory step of the FSM.
* **Low-area decryption** is not provided; the source describes only
  encryption for that core.
* **Key length.** Only 128-bit keys (10 rounds) are supported, in both cores.
* **Row-shifter reset.** The row-shifter state machine is reset
  asynchronously by the sync pulse, as in the source. Lint therefore reports
  that `sync` is used both as a data signal and as an asynchronous reset.
  This is intended.
* **Unused clock.** `aes_sbox` has a `clk` port that is unused when
  `STAGES = 0`.

---

## 5. Files and simulation

`rtl/`:

| file | contents |
|---|---|
| `aes_pkg.sv` | GF(2^8), S-box, MixColumn functions, constants |
| `aes_sbox.sv` | computed S-box and inverse S-box |
| `hs_subbytes.sv` | high-speed unit (see 1.1) |
| `hs_shiftrows.sv` | high-speed unit (see 1.3) |
| `hs_mixcolumn.sv` | high-speed unit (see 1.1) |
| `hs_addroundkey.sv` | high-speed unit (see 1.4) |
| `hs_keyexp.sv` | high-speed key expansion (see 1.4) |
| `srl_tap.sv` | programmable-tap shift register |
| `aes_hs_core.sv` | high-speed core |
| `la_state_mem.sv` | low-area state memory |
| `la_shift_mix.sv` | low-area shift register and MixColumn |
| `la_key_sched.sv` | low-area key schedule |
| `aes_la_core.sv` | low-area core |
| `aes_asa_top.sv` | top level with both cores |

`tb/` holds `aes_ref_pkg.sv`, an independent reference AES model, and one
self-checking testbench `tb_<module>.sv` per module. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb_aes_asa_top` runs both cores end to end
at full size. It also counts key changes, mode switches, sync pulses,
gap-free output columns, low-area key loads, row rotations and MixColumn
phases, and it fails if any of these never happened. `tb_workload_rates`
runs the sustained rates: 256 high-speed blocks back to back (1024 clocks,
32 bits per clock) and 8 low-area blocks (1116 clocks each).

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes_asa_top.sv \
    --top-module tb_aes_asa_top -o sim
./obj_dir/sim
```

Swap in another `tb/tb_*.sv` and its `--top-module` name to run a different
testbench. Every testbench finishes in well under a second of CPU time.
