# Rijndael processor: one round per clock, every block and key length

This is a hardware implementation of the Rijndael block cipher in its full
generality: blocks of 128, 192 or 256 bits and keys of 128, 192 or 256 bits,
in any of the nine combinations, for both encryption and decryption. AES is
the 128-bit-block subset of this. The core is not pipelined. It keeps the
whole state in one 256-bit register and completes one full round in each
clock, so a block takes Nr clocks (10, 12 or 14). All round keys are computed
once, right after the key is loaded, and held in a 3840-bit store. After that,
blocks stream through with no further key work.

The chip talks to the outside world through a 16-bit synchronous port in
each direction plus a `busy` flag. Input, processing and output overlap:
while one block is in the rounds, the next is being read and the previous one
is being sent out.

## Modes and round counts

The 4-bit `mode` input selects the block and key lengths:
`mode = 3 * key_code + data_code`, where code 0/1/2 means 128/192/256 bits.

| mode | block | key | Nb | Nk | Nr |
|------|-------|-----|----|----|----|
| 0 | 128 | 128 | 4 | 4 | 10 |
| 1 | 192 | 128 | 6 | 4 | 12 |
| 2 | 256 | 128 | 8 | 4 | 14 |
| 3 | 128 | 192 | 4 | 6 | 12 |
| 4 | 192 | 192 | 6 | 6 | 12 |
| 5 | 256 | 192 | 8 | 6 | 14 |
| 6 | 128 | 256 | 4 | 8 | 14 |
| 7 | 192 | 256 | 6 | 8 | 14 |
| 8 | 256 | 256 | 8 | 8 | 14 |

Nb and Nk count 32-bit columns, and Nr = max(Nb, Nk) + 6. Codes 9 to 15 are
not defined; this implementation treats them as mode 0. The mode and `e_nd`
(1 = encrypt, 0 = decrypt) are sampled only while `reset` is high. Changing
either one means resetting the chip and loading the key again.

## Data layout

A block is handled as 32 bytes (`state_t` in `rijndael_pkg`). Byte *i* is
row *i* mod 4 of column *i* / 4. This is also the order in which bytes
cross the 16-bit ports: word *k* carries byte 2*k* in bits 15:8 and byte 2*k*+1
in bits 7:0. For blocks shorter than 256 bits, the columns at and above Nb are
unused. They are kept at zero on input and masked on output.

## Interface and protocol

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high; latches `mode` and `e_nd` |
| `mode` | in | 4 | mode, see the table above |
| `e_nd` | in | 1 | 1 = encrypt, 0 = decrypt |
| `data_valid_in` | in | 1 | `data_in` holds a word |
| `data_in` | in | 16 | key words, then data words |
| `data_valid_out` | out | 1 | `data_out` holds a result word |
| `data_out` | out | 16 | result words |
| `busy` | out | 1 | no input word is taken in this clock |

The sequence after reset is as follows:

1. Send 2·Nk key words. A word is taken on a rising edge where
   `data_valid_in` is high and `busy` is low. A word offered while `busy` is
   high is ignored, and must be held until `busy` falls.
2. `busy` rises and stays high while the round keys are generated. That
   takes ceil(Nb·(Nr+1) / chunk) + 2 clocks after the last key word. The chunk
   is 6 words per clock for 192-bit keys and 4 otherwise, so the wait is at
   most 32 clocks (30 of them expansion), for 256-bit blocks with 128- or 256-bit keys.
3. Send blocks of 2·Nb words each. When the input buffer holds a complete
   block that the core cannot take yet, `busy` is high.
4. Each result appears as 2·Nb consecutive words with `data_valid_out` high.
   For a block that reaches an idle core, the first result word comes Nr+1
   clocks after the edge that took the block's last input word.

`busy` is a combinational function of registers only, so it can be sampled
just before the clock edge in the usual way.

## The round datapaths

There are two independent datapaths. Only the one selected by `e_nd` is
clocked with data.

**Encryption** (`encrypt_module`). The register input is a multiplexer
followed by a key addition:

    reg <= (load ? data : MixColumn(ShiftRow(ByteSub(reg)))) ^ round_key
    enc_out = ShiftRow(ByteSub(reg)) ^ last_round_key

This is the key idea of the timing. The final round has no MixColumn, so it is
not written back into the register. Instead it is computed on a separate
output path in the same clock in which the next block is loaded with its
initial key addition. Round 0 (the initial key addition) and the final round
therefore cost no clocks of their own. A block costs exactly Nr clocks: one
load clock plus Nr-1 full rounds in the register, and the final round
happens during the next block's load clock.

**Decryption** (`decrypt_module`) uses the equivalent order, with the key
addition at the register output:

    x        = reg ^ round_key
    reg     <= InvByteSub(InvShiftRow(load ? data ^ last_round_key : InvMixColumn(x)))
    dec_out  = x              (with round key 0)

The first inverse round, which has no InvMixColumn, is folded into the load.
The plaintext is taken from the XOR at the register output. Decryption
therefore has the same Nr-clock cost and the same overlap as encryption.

The round functions are combinational modules:

- `sbox`, `inv_sbox`, and the 32-wide arrays `s_box_logic_32` and
  `inv_s_box_logic_256`. Each S-box is logic, not a table. It computes the
  GF(2^8) inverse as a^254 (a product of squares) and then the affine map. The
  affine map uses constant 63 for the forward box. The inverse box applies the
  inverse affine map (constant 05) first and then the inverse. Synthesis is left
  to flatten this into gates.
- `shiftrow` and `inv_shiftrow` rotate rows 1, 2 and 3 by 1, 2, 3 columns
  for 128- and 192-bit blocks, and by 1, 3, 4 columns for 256-bit blocks. Every
  row is a multiplexer selected by Nb, because the wrap-around point also
  depends on the block length.
- `xtime` multiplies by x. `mixcolumn` is one column built from four `xtime`
  units and XORs (03·a = xtime(a) ^ a). `mixcolumn_256` has eight of these.
- `inv_mixcolumn` and `inv_mixcolumn_256` use the coefficients 0E, 0B, 0D and
  09. None of these is built as a chain of xtime units. Each product is a sum of
  direct multiplications by x, x^2 and x^3, for example 0D·a = x^3·a ^ x^2·a ^ a.
  In each of these, the modulo reduction is one XOR level: the bits shifted out
  of the top select the terms 1B, 36 and 6C (x^8, x^9, x^10 mod m(x)). This
  keeps the inverse column about as shallow as the forward one.

## Key generator

`key_generator` contains three parts.

- **`key_expansion`** holds a window of the last Nk expanded words. In each
  clock it produces one chunk of new words with a single 4-byte SubWord. A
  chunk is 4 words for 128-bit keys, 6 words for 192-bit keys, and half a key
  length (4 words) for 256-bit keys. In the 256-bit case the second half uses
  the extra SubWord without rotation or round constant that the algorithm
  requires there. The cipher key itself is emitted as the first chunk or
  chunks, so the store sees one uniform stream.
- **`key_storage`** is a 120-word (3840-bit) shift register. That is exactly
  Nb·(Nr+1) words for the largest case (Nb = 8, Nr = 14). Each chunk shifts
  in at the top, so no addresses are needed. After G words have been stored,
  word *g* sits at position 120 − G + *g*.
- **`key_selection`** picks the Nb words of one round key from the store and
  registers them, together with the last round key (Nr). The controller asks
  for the index one clock ahead, so the datapaths see a registered key with no
  selection delay in the round path.

Expansion costs 11 to 30 clocks, depending on the mode.

## Controller

`controller` holds these state registers:

- the 5-bit mode register (mode plus `e_nd`);
- a 4-bit round counter;
- 4-bit word counters for the input and the output port;
- a phase (key input, key expansion, data);
- two flags: input buffer full, and core active.

A full buffer is loaded into the core when the core is idle, or in the clock
in which it finishes its last round. The finished block is copied into the
output buffer in the clock after its final round. From there it goes out 16 bits
per clock. An assertion checks that a result never overwrites one that is
still being sent. With the input rate of one word per clock this cannot
happen, because a block needs 2·Nb input clocks and the output needs 2·Nb
clocks too.

Round key indices run ascending (1 … Nr−1, then 0, ready for the next load)
for encryption and descending (Nr−1 … 0) for decryption.

## Throughput

The core rate is Nb·32 bits per Nr clocks. Through the 16-bit pins, a
steady stream also needs 2·Nb clocks to move each block in or out. So a
stream runs at one block per max(Nr, 2·Nb) clocks. Only the 256-bit block
modes are limited by the pins (16 clocks against 14). At a 132 MHz clock:

| block | key | Nr | core Gbit/s | pins Gbit/s |
|-------|-----|----|-------------|-------------|
| 128 | 128 | 10 | 1.69 | 1.69 |
| 128 | 192 | 12 | 1.41 | 1.41 |
| 128 | 256 | 14 | 1.21 | 1.21 |
| 192 | 128/192 | 12 | 2.11 | 2.11 |
| 192 | 256 | 14 | 1.81 | 1.81 |
| 256 | any | 14 | 2.41 | 2.11 |

A generic yosys synthesis of the top gives 5681 flip-flop bits and about 28.7k
cells. Most of the cells are in the 64 S-boxes, since each datapath has 32.

## Where this implementation departs from the reference design

- **Key store organisation.** The reference design organises the 3840 bits as
  20 stages of 192 bits. 128-bit chunks are then grouped, three per two shifts.
  Here, the same 3840 bits are a store of 120 32-bit words that shifts by 4
  or 6 words. The size is the same, and so is the absence of addressing.
- **ShiftRow multiplexing.** The reference design multiplexes only rows 2 and 3
  by block length. Here every row is selected by Nb, because the wrap-around
  column differs between 128-, 192- and 256-bit blocks.
- **Round key width.** A round key has Nb words (the block length), as the
  algorithm requires, whatever the key length.
- **Own choices where the reference design is silent:**
  - reset polarity and timing;
  - the byte order on the 16-bit ports;
  - the behaviour of undefined mode codes;
  - ignoring words offered while `busy` is high;
  - masking of unused columns;
  - the internal structure of the S-boxes and of the key expansion.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares its module against `tb/rijndael_ref_pkg.sv`, a behavioural model
written separately from the RTL. That model finds S-box values by exhaustive
inverse search, multiplies by a 9-bit shift-and-reduce, and runs the cipher
round by round for any Nb and Nk. The model is itself checked against the
standard AES known-answer vectors. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- The combinational units are checked exhaustively (xtime, the S-boxes) or on
  random states for every Nb.
- `encrypt_module` and `decrypt_module` are checked round by round and for
  back-to-back block overlap.
- `key_expansion`, `key_storage`, `key_selection` and `key_generator` are
  checked against the model's expanded key for all nine modes, including the
  expansion clock counts.
- `controller` is checked clock by clock against the protocol rules: word acceptance, busy, load-to-result spacing, round key order and output words.

`tb_rijndael_processor` runs the whole chip at its real size through its pins:

- the 128-bit-block known answers for all three key lengths, in both
  directions;
- an all-ones 192-bit block encrypted with an all-ones 128-bit key;
- an all-zero 128-bit block decrypted with an all-zero key;
- every one of the nine modes in both directions, with random keys and four
  blocks each.

It checks:

- every result;
- the key-expansion `busy` time;
- the Nr+1 latency;
- the max(Nr, 2·Nb) streaming period.

It also counts each mechanism and fails if any never happened:

- busy during expansion;
- busy on a full buffer;
- a block loaded in its predecessor's finishing clock;
- input and output words moving in the same clock;
- both directions and all modes.

To run a testbench with plain Verilator (5.x):

    verilator --binary --timing -Wno-fatal --top-module tb_rijndael_processor \
        -y rtl -y tb rtl/rijndael_pkg.sv tb/rijndael_ref_pkg.sv \
        tb/tb_rijndael_processor.sv
    ./obj_dir/Vtb_rijndael_processor

The two packages are named first. Verilator then finds every other module in
`rtl/` through `-y`. Replace the testbench name to run any other unit test.
Add `--assert` to enable the controller's overrun assertion.

## File map

- `rtl/rijndael_pkg.sv`: types, mode decoding, GF(2^8) helpers
- `rtl/rijndael_processor.sv`: top level
- `rtl/controller.sv`, `rtl/input_buffer.sv`, `rtl/output_buffer.sv`
- `rtl/encrypt_module.sv`, `rtl/decrypt_module.sv`
- `rtl/key_generator.sv`, `rtl/key_expansion.sv`, `rtl/key_storage.sv`,
  `rtl/key_selection.sv`
- round functions: `sbox`, `inv_sbox`, `s_box_logic_32`,
  `inv_s_box_logic_256`, `shiftrow`, `inv_shiftrow`, `xtime`, `mixcolumn`,
  `mixcolumn_256`, `inv_mixcolumn`, `inv_mixcolumn_256`
- `tb/`: one testbench per module and the reference model
