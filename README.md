# Tiny AES: one small core for AES-128/192/256 encryption and decryption

This is a compact, iterative AES core. It encrypts and decrypts 128-bit blocks
with 128-, 192- or 256-bit keys, all in one datapath. The core is small for three reasons:

* **One round datapath for both directions.** Decryption uses the *equivalent
  inverse cipher*. InvSubBytes and InvShiftRows commute, and InvMixColumns is
  linear. So a decryption round can run in the same order as an encryption
  round: substitute, shift, mix, add key. For that, rounds 1..Nr-1 use round
  keys that have been passed through InvMixColumns. Every unit (S-boxes,
  ShiftRows, Mix/InvMix) is built once and switched by `mode`.
* **One Mix/InvMix unit for state and keys.** InvMixColumns of the round keys
  ("MixRoundKey") runs on the same Mix/InvMix unit as the state. The two uses
  take turns, one cycle each.
* **Compact arithmetic.** The S-boxes compute the GF(2^8) inverse in the
  composite field GF((2^4)^2), and the forward and inverse S-box share that
  inverter. InvMixColumns is built as MixColumns followed by a small
  correction polynomial, so the two share most of their gates.

The key schedule runs in parallel with encryption. Round keys go into a
16 x 128-bit RAM. Encryption reads them in FIFO order as soon as each one is
written. Decryption waits for the last key and then reads them in LIFO order.
Once a key is expanded it stays in the RAM, so later blocks can use it.

## Interface

| port | width | dir | meaning |
|---|---|---|---|
| `clk`, `rst` | 1 | in | clock; synchronous, active-high reset |
| `ld_k` | 1 | in | key on the buses: `din_key_lsb` = key[127:0], `dout_key_msb_in` = key[255:128]; starts the key expansion |
| `ld_d` | 1 | in | block on `din_key_lsb`; starts a block |
| `mode` | 1 | in | 1 = encrypt, 0 = decrypt |
| `k_type` | 2 | in | 00 AES-128, 01 AES-192, 10 AES-256 (11 acts as 10) |
| `din_key_lsb` | 128 | in | data in / low key half |
| `dout_key_msb_in` | 128 | in | high key half (input side of the shared MSB bus) |
| `dout_key_msb_out` | 128 | out | result (output side of the shared MSB bus) |
| `dout_key_msb_oe` | 1 | out | drive enable for the MSB bus pads (equals `done`) |
| `done` | 1 | out | result valid; held until the next `ld_k` or `ld_d` |

Keys are right-aligned:
* An AES-128 key uses `din_key_lsb` only.
* An AES-192 key occupies bits [191:0].
* Key byte 0 is the most significant byte.
* Block byte 0 is bit range [127:120], and state column c is [127-32c -: 32], the FIPS-197 byte order.

The MSB bus is bidirectional in the intended chip. The tri-state pad belongs
outside this core, so the core provides the in, out and enable signals for it.

Protocol:
1. Pulse `ld_k` with the key, and `ld_d` with the block in the same or a later cycle.
2. Wait for `done`.
3. To process more blocks with the same key, pulse `ld_d` alone; `mode` may change between blocks.

Hold `mode` and `k_type` stable while a block is in flight.

## Datapath

```
din_key_lsb -> data buffer --XOR1 (first/last round key, DEMUX-1)--+
                                                                   v
                      +------------------------------ MUX-1 (data_en)
                      |                                      v
                      |                                    Reg1 (reg1_en)
                      |                                      v
                      |                         SubBytes / InvSubBytes (16 S-boxes)
                      |                                      v
                      |                         ShiftRows / InvShiftRows
                      |                                      v
                      |                                    Reg2
                      |                  DEMUX-2 (last_round)|----------- skip_mc_out
                      |                                      v                  |
                      |   round key --> MUX-3 / DEMUX-3 (delay_rd_fifo)         |
                      |                   Mix/InvMix unit                       |
                      |                     |         \                         |
                      |                   Reg3      MixRoundKey                  |
                      |                     |          |                         |
                      +--- XOR2 <-----------+<-- MUX-2 (mode: key / mixed key)  XOR3 <- round key
                                                                                 v
                                                                     output buffer -> dout_key_msb_out
```

Each normal round uses the datapath in three steps:
1. Reg1 → S-boxes → ShiftRows → Reg2.
2. Reg2 → Mix/InvMix → Reg3.
3. The Mix/InvMix unit then takes the round key for one cycle
   (`delay_rd_fifo` = 1). In that cycle its mode is forced to InvMix, which
   produces the MixRoundKey. This slot is in every round of both modes, but
   only decryption uses its result.

XOR2 adds Reg3 and the MUX-2 output, and the result goes back into Reg1. MUX-2
selects the plain round key for encryption and the mixed key for decryption.

In the last round, DEMUX-2 sends Reg2 around the Mix/InvMix unit. The plain
round key is added in XOR3, and the output buffer takes the result.

`aes_ctrl` is the state machine that sequences this. It fetches each round key
one cycle before it is needed, because the key RAM has a registered read. If a
key has not been written yet, it stalls the round.

## Key schedule (`aes_key_expansion`)

The key is captured in the 256-bit R register. A word-serial schedule then
produces one 32-bit key word per cycle:

```
w[i] = w[i-Nk] ^ temp
temp = SubWord(RotWord(w[i-1])) ^ Rcon    if i mod Nk = 0
     = SubWord(w[i-1])                    if Nk = 8 and i mod Nk = 4
     = w[i-1]                             otherwise
```

The main parts:
* **W shift register.** The last eight words live here, and a multiplexer taps
  w[i-Nk] at position 4, 6 or 8.
* **SubWord.** Four forward S-boxes, with RotWord applied or not by a multiplexer.
* **Rcon.** Comes from a 10-entry ROM (`aes_rcon_gen`) and is XORed into the top
  byte of the word.
* **Key RAM writes.** New words go through a 128-bit FIFO shift register, which
  writes a round key into the RAM every four cycles.

The key words first enter through R and MUX-4 over 8 cycles. During this load
phase, the first round key is written straight into the RAM. The remaining key
words of an AES-192 or AES-256 key are preloaded into the FIFO shift register.

`k_exp_done` is first high 4·Nr+10 cycles after the `ld_k` cycle, so the
expansion takes 51, 59 and 67 cycles including the `ld_k` cycle.

`aes_key_ram` is the 16 x 128 RAM. Writes go in order. Reads are in order
(FIFO) when `mode` = 1 and from the last key (LIFO) when `mode` = 0. Reading
does not remove keys. A new `ld_d` restarts the read order, which is how a
stored key is reused.

## S-box in GF((2^4)^2) (`aes_sbox`)

The byte is mapped by the isomorphism δ into GF((2^4)^2), with these field choices:

| level | field | reduction polynomial | constant |
|---|---|---|---|
| outer | GF((2^4)^2) | x^2 + x + λ | λ = {1100} |
| middle | GF(2^4) | x^2 + x + φ over GF(2^2) | φ = {10} |
| inner | GF(2^2) | x^2 + x + 1 | |

Let b be the high nibble and c the low nibble, and e = b ^ c. The inverse is
computed as:

```
d = b^2 · λ,   f = e · c,   h = d ^ f,   i = h^-1  (in GF(2^4))
result high nibble = b · i,   low nibble = e · i
```

δ^-1 then maps the result back to GF(2^8).

In a single `aes_sbox`, the forward and inverse S-box share the inverter:
* For decryption, the inverse affine map is applied before the inverter.
* For encryption, the affine map is applied after it.

The δ used here is derived for exactly these field constants. It follows from
the root β = {95} of the AES polynomial. Its 8x8 matrix, and δ^-1, are written
out as XOR equations in the module. All 256 inputs are checked against the
standard table in the testbench.

## Mix/InvMix unit (`aes_mix_columns`)

MixColumns multiplies each column by c(X) = {03}X^3 + X^2 + X + {02}. The
inverse is d(X) = c(X)·f(X) with f(X) = {04}X^2 + {05}. InvMixColumns is
therefore MixColumns followed by f:

```
o_j = b_j ^ {04}·(b_j ^ b_(j+2))
```

The term {04}(b0^b2) is shared by output bytes 0 and 2, and {04}(b1^b3) by
bytes 1 and 3. The mode selects whether the correction is applied.

## Timing

Latencies are counted from the cycle with `ld_k` to the first cycle with
`done`, with `ld_d` one cycle after `ld_k`. The "reference figures" column
gives the cycle counts published for this architecture.

| | AES-128 | AES-192 | AES-256 | reference figures |
|---|---|---|---|---|
| key expansion | 51 | 59 | 67 | 51 / 59 / 67 (4·Nr+11) |
| encryption, fresh key | 53 | 59 | 65 | 55 / 63 / 71 (4·Nr+15) |
| decryption, fresh key | 82 | 96 | 110 | 86 / 100 / 114 |
| any block, key already stored (from the `ld_d` cycle) | 33 | 39 | 45 | not given |

Notes on these numbers:
* **Encryption.** It overlaps the key expansion and stalls while the next round
  key is not yet written. For AES-256 it finishes before the expansion does.
* **Decryption.** It cannot start until the last round key exists, so it takes
  3·Nr+1 cycles after `k_exp_done`.
* **Why the counts differ from the reference.** The round schedule here takes
  three cycles per round: Reg2, Reg3, and the MixRoundKey slot. This is this
  design's own choice, and the reference does not give its cycle-level
  control. The counts therefore do not match the reference exactly; every
  count is at or below it.

## Departures and own choices

Differences from the reference design:
* **S-boxes in the key schedule.** The reference intends S-boxes to be shared
  between the round datapath and the key schedule. Here the key schedule has
  its own four S-boxes, because it runs at the same time as encryption.
* **Control timing.** The control state machine and the exact cycle timing of
  the key schedule are this design's own. Only the control signal names and
  the datapath structure follow the reference architecture.
* **Isomorphism matrix.** The δ matrix is derived, not taken from the
  reference (see the S-box section).
* **MUX-2 selection.** MUX-2 is wired the way AES requires: the plain key for
  encryption and the mixed key for decryption.

Left out:
* The LUT-based S-box and the parallel InvMixColumns decomposition are not
  built. They are alternatives that the reference only compares against.
* The bidirectional pad is not part of the RTL.

Behaviour not specified by the reference:
* `k_type` = 11 acts as AES-256.
* Rcon addresses past the tenth constant saturate.
* `done` stays high until the next load.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, key-size helpers, GF(2), GF(2^2), GF(2^4) arithmetic |
| `rtl/aes_sbox.sv` | composite-field S-box / inverse S-box |
| `rtl/aes_sub_bytes.sv` | 16 S-boxes |
| `rtl/aes_shift_rows.sv` | ShiftRows / InvShiftRows |
| `rtl/aes_mix_column.sv`, `rtl/aes_mix_columns.sv` | Mix/InvMix for one column, and for the state |
| `rtl/aes_rcon_gen.sv` | Rcon ROM and address counter |
| `rtl/aes_key_ram.sv` | 16 x 128 FIFO/LIFO round-key RAM |
| `rtl/aes_key_expansion.sv` | key schedule |
| `rtl/aes_ctrl.sv` | round control FSM |
| `rtl/tiny_aes_top.sv` | the core |
| `tb/aes_ref_pkg.sv` | plain behavioural AES reference used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog stops it if it hangs.

To run the core's end-to-end test:

```
verilator --binary --timing --assert --top-module tb_tiny_aes_top -Itb \
    rtl/aes_pkg.sv rtl/aes_sbox.sv rtl/aes_sub_bytes.sv rtl/aes_shift_rows.sv \
    rtl/aes_mix_column.sv rtl/aes_mix_columns.sv rtl/aes_rcon_gen.sv \
    rtl/aes_key_ram.sv rtl/aes_key_expansion.sv rtl/aes_ctrl.sv rtl/tiny_aes_top.sv \
    tb/aes_ref_pkg.sv tb/tb_tiny_aes_top.sv
./obj_dir/Vtb_tiny_aes_top
```

Other testbenches build the same way: change `--top-module` and the last file.

What the end-to-end test checks:
* It runs the FIPS-197 example vectors for all three key sizes, in both directions.
* It runs random keys and blocks, each with a fresh key followed by three
  blocks that reuse the stored key with random modes.
* It checks the latencies above.
* It counts the mechanisms that occurred and fails if any never did: the
  encryption stall on a missing key, decryption waiting for the expansion, key
  reuse, a mode switch on a stored key, the last-round MixColumns bypass, and
  each key size, and a reset in the middle of a decryption.

Reference results come from `tb/aes_ref_pkg.sv`. It is a plain software-style
AES, written separately from the RTL: tables are computed from x^254 and the
affine map, and it uses the straightforward (not the equivalent) inverse cipher.
