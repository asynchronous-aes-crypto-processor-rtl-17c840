# Balanced dual-rail AES crypto-processor (32-bit data path)

This is an AES encryption engine (FIPS-197, 128-bit blocks, 128/192/256-bit keys) designed for
resistance to differential power analysis (DPA). It follows the style of quasi-delay-insensitive
(QDI) asynchronous circuits. Every data bit travels on two wires (dual rail). Every GF(2^4)
element inside the S-box travels on sixteen wires, exactly one of them high (1-of-16). Each
valid code word has the same number of high wires. All operators are XOR-like rendezvous/OR
networks that map one valid code word to another. Between two data tokens every wire returns
to zero (the four-phase, return-to-zero protocol). So each operation switches the same number
of wires whatever the key and data are, and the logic-level power profile does not depend on
the data.

The cipher works on one state column (4 bytes) at a time. A round takes four steps, so a
128-bit-key block takes 40 loop iterations. Round keys are expanded on the fly by a key
scheduler on its own 32-bit dual-rail path. A synchronous register file and two interface types
(binary to dual rail, dual rail to binary) connect the engine to an ordinary clocked host.

## How to read the timing: a clocked model of a clockless circuit

The circuit this RTL describes has no clock. Modules talk over channels with a request (the
data becoming valid) and an acknowledge. The RTL keeps all of the following:

* the codes: dual rail `{A1,A0}` with `01` = 0, `10` = 1, `00` = spacer (invalid), and 1-of-16;
* the four-phase protocol on every channel: data valid, ack up, data back to spacer, ack down;
* completion detection (a word is taken only when every bit has one rail high);
* rendezvous joins (the Muller C-element, `c_element`, and AND-joins of per-lane flags).

Storage, however, changes on a clock edge. `c_element` is a flip-flop that rises when all its
inputs are high, falls when all are low, and otherwise holds. So every C-element has a delay of
one clock. A QDI circuit is correct for any gate delay, so this is one legal timing of the
clockless circuit. It lets the design be simulated with plain Verilator and synthesised with
standard tools. Clock counts in this README are counts of these model steps, not nanoseconds.

Inside the combinational function blocks (S-box, MixColumns, XORs) the C-elements are written
as AND terms. The model settles each protocol phase completely within one clock, so their
hysteresis is never needed there. Real stateful C-elements are used where the protocol needs
storage: in `half_buffer` and its completion tree.

### The four-phase step of the cipher

`aes_core` advances in steps of two clocks:

| clock  | `eval` | what the data path sees                                               |
|--------|--------|-----------------------------------------------------------------------|
| first  | 1      | registered operands (state column, ShiftRows bytes, key word) in dual rail |
| second | 0      | all inputs forced to the spacer; every rail of S-box, MixColumns and AddKey returns to 0 |

Results are latched at the end of the evaluate clock. The key scheduler receives `eval` and
gates its own data path in the same way. In simulation, `aes_core` asserts that the data path
is all-spacer in every return-to-zero clock. The end-to-end testbench checks that the S-box
inputs and outputs are complete code words of constant weight (32 of 64 rails high) in every
evaluate clock.

### Data-independent switching, measured

`tb_aes_top` counts the rail transitions of one block. It samples these nodes: the S-box
inputs and outputs, one internal 1-of-16 node, the ShiftRows outputs, MixColumns, AddRoundKey,
the key S-boxes and the key-expansion sum. The count is the same for every plaintext and key:
19 344 transitions per 128-bit-key block, 22 432 for 192 bits and 25 520 for 256 bits. It
depends only on the key length.

Two details make the count exact:

* When a block ends, the core leaves `eval` low, so its data path rests at the spacer.
* The key-expansion path stays at the spacer while a new key is being loaded. Otherwise the
  previous key's words would pass through the key S-boxes once more. The transition count of a
  block would then depend on the previous key.

## Cipher data path (`aes_core`)

```
 plaintext channel ─► Addkey0 ─┐
                               ▼
                          col_reg (4 bytes)
                               │
                     4 × bytesub (S-box)
                               │
               ShiftRows: C0  C1  C2  C3   (3 bytes each)
                               │
               ┌───────────────┴───────────────┐
         mixcolumns_dr                   (last round)
               │                               │
         Addroundkey ─► col_reg          Addlastkey ─► ciphertext channel
```

`addkey` is a 32-bit dual-rail XOR. It is instantiated three times (Addkey0, Addroundkey,
Addlastkey). Key words are consumed strictly in the order w[0], w[1], ...: four by Addkey0,
then one per loop iteration.

### ShiftRows on a column stream (`shiftrows_ci`)

This is the least obvious part. Columns arrive one per step. Row r of output column c must be
row r of input column (c+r) mod 4, so output column 0 needs input column 3 (from row 3). The
output of a round therefore starts in the step in which input column 3 arrives. It continues
over the next three steps, while the columns of the next round, coming round the loop one step
later, already flow in. With arrivals at steps 4n+k and departures at steps 4n+3+c:

| row | delay of each byte (steps) | bytes held in steady state |
|-----|----------------------------|----------------------------|
| 0   | 3, 3, 3, 3                 | 3                          |
| 1   | 2, 2, 2, 6                 | 3                          |
| 2   | 1, 1, 5, 5                 | 3                          |
| 3   | 0, 4, 4, 4                 | 3                          |

Each `shiftrows_ci` instance therefore has exactly three byte registers, 12 bytes in total. Row
3's column-3 byte passes straight through. A row can hold bytes of two rounds with the same
column index (row 1 holds column 0 of rounds n and n+1 for one step). So a small state machine
tags every stored byte with its column index and round parity. A departure reads the register
whose tag matches. An arrival writes into a free register, or into the one being read in the
same step.

Each Ci reports `out_valid` (its byte for the next output column is present) and two room
flags: room if no byte departs, and room if the departure happens. The core joins the four
blocks' flags with an AND (a rendezvous). A departure happens when all four have their byte, a
key word is ready, and `col_reg` is free or is being emptied in this step. In the last round the
departure also waits for the output channel to be idle. Resulting timing: rounds 1…Nr run
without a stall, one column per two-clock step, 8 clocks per round.

## S-box in the composite field (`bytesub`)

`bytesub` computes the GF(2^8) inverse in GF((2^4)^2), a = ah·x + al, with the extension
polynomial x² + x + {e} over GF(2^4) mod x⁴+x+1:

    d      = (ah²·{e} + ah·al + al²)⁻¹
    a⁻¹    = (ah·d)·x + (ah + al)·d

Pipeline of blocks: `fonc_map` (XOR network) → `conv_dr_to_mr16` ×2 → GF(2^4) stage on the
1-of-16 code → `conv_mr16_to_dr` ×2 → `fonc_inv_map` → `affine_dr`.

In the 1-of-16 code, any bijection on field elements is only a wire permutation. So
`square_mr16`, `mult_e_mr16` and `inverse_mr16` contain no gates; their wiring is computed at
elaboration time from the field arithmetic in `aes_async_pkg`. `xor_mr16` and `mult_mr16` are
arrays of 256 rendezvous terms ORed into 16 outputs. For each valid input pair exactly one
term fires.

`affine_dr` uses 16 dual-rail XORs with shared pair sums. Adding the constant {63} costs
nothing: inverting a dual-rail bit swaps its rails.

## MixColumns (`mixcolumns_dr`, `xtime_dr`, `xor8_sb`)

    M0 = 02(a^b) ^ b ^ c ^ d     M1 = 02(b^c) ^ a ^ c ^ d
    M2 = 02(c^d) ^ a ^ b ^ d     M3 = 02(d^a) ^ a ^ b ^ c

`xtime_dr` always applies the reduction (it XORs the old MSB into bits 1, 3 and 4), so its
activity does not depend on the MSB.

## Key schedule (`aes_key`, `key_fifo`, `xor_rc`)

`key_fifo` holds the last Nk words, w[j] at the head and w[j+Nk−1] at the tail. The head is the
word offered to the cipher. When it is consumed, the scheduler shifts in
w[j+Nk] = w[j] ^ g(w[j+Nk−1]). The choice of g:

* when j mod Nk = 0: g = `xor_rc`(SubWord(w)), i.e. RotWord plus Rcon on lane 0;
* when Nk = 8 and j mod Nk = 4: g = SubWord(w);
* otherwise: g = w.

The four key S-boxes are evaluated every step. Rcon is a dual-rail byte advanced by `xtime_dr`
after each use.

## Host view: register file and interfaces

| address | register | notes |
|---------|----------|-------|
| 0       | Mode     | [1:0] key length (0: 128, 1: 192, 2: 256; 3 is treated as 0); [2] start (write 1; reads 0); [3] done flag (read only; cleared by start) |
| 1–8     | plaintext, 8 × 16 bit | register r holds byte 2r in [7:0] and byte 2r+1 in [15:8] |
| 9–24    | key, 16 × 16 bit | same byte order; a 128-bit key uses 9–16 |
| 25–32   | ciphertext, 8 × 16 bit | read only, written by the engine |

Byte 4c+i of the block is row i of state column c, as in FIPS-197. The bus (`addr`, `wr`,
`wdata`, `rdata`) takes one write per clock and reads combinationally.

Sequence of one block:

1. The host writes the Mode register with the start bit set.
2. The plaintext (4 words) is sent through one `sync_async_if` and the Nk key words through
   another. Each word travels as a dual-rail token through a `half_buffer`.
3. The core runs 4·Nr iterations.
4. `async_sync_if` converts the four ciphertext tokens back to binary and writes them into the
   register file.
5. The done flag is set.

Simulated time from the start write to the flag: **142 / 172 / 202 clocks** for 128 / 192 /
256-bit keys. Of that, 80 / 96 / 112 clocks are loop iterations; the rest is transferring the
words through the interfaces.

## Verifying and simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. The testbenches use `tb/aes_ref_pkg.sv`, a behavioural
AES written independently of the RTL: the S-box is found by searching for the GF(2^8) inverse,
and the cipher works on a byte array.

* Combinational blocks are tested exhaustively where the input space allows it (S-box, affine,
  xtime, all 1-of-16 operators), and with random data otherwise. The field maps are checked by
  their homomorphism property, not against a copy of their matrix.
* Handshake blocks are tested with four-phase partners that acknowledge after random delays.
* `tb_aes_top` runs the three FIPS-197 appendix C examples and random blocks for every key
  length through the host bus, with the design at its default size. It also checks the
  iteration count and the balance properties described above. It counts how often the key
  lengths, the row-3 ShiftRows bypass, the SubWord-only key step and the Rcon steps happened,
  and fails if any never happened. `+RANDOM=<n>` sets the number of random blocks (default 30).

To run a testbench with Verilator, give it the RTL package, the testbench package and the
search paths:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/aes_async_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Lint a module the same way with `--lint-only -Wall`.

## Where this RTL departs from, or adds to, the reference architecture

* **Clocked model** of the clockless circuit, as described above. Gate-level transition
  balancing is by construction (dual-rail XOR and 1-of-16 rendezvous only). The
  synthesis-time check of balance of the original flow is replaced by the simulation checks
  above. Electrical balancing (cell sizes, wire lengths) is out of scope.
* **ShiftRows byte order.** The original description of the Ci blocks lists output packets
  (0,4,8,12), (1,5,9,13), …, which is a transposition. This design implements the standard
  ShiftRows, which the NIST vectors require.
* **Key FIFO.** It is built from clocked dual-rail word registers that advance together, not
  from a self-timed chain of half-buffers.
* **Affine transform.** It uses 16 dual-rail XORs; the original counts 17.
* **Dual-rail XOR.** It has no built-in output half-buffer; storage sits where the data path
  needs it.
* **Own choices** where the source is silent:
  * the GF(2^4) polynomial x⁴+x+1 and the isomorphism matrices;
  * the Mode bit layout, address map and byte order;
  * the separate plaintext and key interfaces;
  * the loop register `col_reg` in addition to the 12 ShiftRows bytes;
  * the reset behaviour (asynchronous, active low, everything to the spacer).
* **Not built:** the 8-bit and 128-bit data-path variants, which serve only for comparison;
  the analogue figures (supply voltage, current, nanosecond timings), which have no RTL
  meaning; decryption, which is not described; the balanced dual-rail AND cell, an example
  of the balancing method that no part of the AES data path needs.
