# AES-128 encryptor with 32-bit packet datapath

This is a compact AES-128 encryption engine. It does one round per clock
and generates round keys on the fly. The 128-bit state lives in a single
register. In every intermediate round the state is cut into four 32-bit
packets, one per AES column, and four identical 32-bit round units work on
them side by side. A separate 128-bit unit handles the last round, which
has no MixColumns. The key schedule runs alongside the rounds: it keeps only
the current round key and derives the next one in the clock that uses it.
The engine never stores the expanded key.

Plaintext and key enter as four 32-bit packets each, and the ciphertext
leaves as four 32-bit packets. A 32-bit bus or processor can therefore feed
and drain the engine without a 128-bit port. Only encryption is implemented.
Decryption, and the 192- and 256-bit key sizes, are not part of this design.

## Data flow

```
 in_data[31:0] ─┐   aes_packet_in        aes_enc_core                          aes_packet_out
 in_key [31:0] ─┴─► 2 x 128-bit    ──►  ┌─────────────────────────────────┐    128-bit
                    shift registers     │ round register (128)            │──► shift register ──► out_data[31:0]
                                        │   load: pt ^ key                │    4 packets,
                                        │   rounds 1..9: 4x aes_round_unit │    out_ready pops
                                        │   round 10:   aes_last_round    │
                                        │ aes_key_expansion (key, rcon)   │
                                        │ aes_ctrl (en, round counter)    │
                                        └─────────────────────────────────┘
```

| Module | Role |
|---|---|
| `aes128_enc_top` | Top level: input registers, then round datapath, then output register |
| `aes_packet_in` | Collects 4 plaintext packets and 4 key packets (in the same clocks) into two 128-bit registers |
| `aes_enc_core` | 128-bit round register, ShiftRows wiring, four round units, last round, key expansion, controller |
| `aes_round_unit` | 64 bits in (data column, key word), 32 bits out: SubBytes, MixColumns, AddRoundKey |
| `aes_mix_column` | MixColumns of one column, GF(2^8) `xtime` and XOR |
| `aes_sbox` | 256 x 8 S-box look-up table |
| `aes_last_round` | 128-bit SubBytes, ShiftRows and AddRoundKey with round key 10 |
| `aes_key_expansion` | Current round key and round constant registers, next-key logic with 4 S-boxes |
| `aes_ctrl` | IDLE / RUN / DONE sequencer with round counter and enable |
| `aes_pkg` | Types, GF(2^8) functions, S-box table generator, ShiftRows permutation |

## How a round is cut into 32-bit packets

This is the one non-obvious part of the datapath. SubBytes and MixColumns
work on bytes or columns, so they split cleanly into four 32-bit lanes.
ShiftRows does not split: it moves bytes between columns. The design
therefore does ShiftRows first, as fixed wiring out of the round register.
`aes_pkg::shift_rows` gives output byte `i` as input byte
`(i + 4*(i mod 4)) mod 16`, with byte 0 in bits 127:120. Packet `c` is
column `c` of the shifted state. Once the bytes are in place, each round unit
needs only its own 32 bits:

```
packet c  = ShiftRows(state)[127-32c -: 32]
unit c    = MixColumn( S(b0) S(b1) S(b2) S(b3) ) ^ round_key[127-32c -: 32]
```

AES applies ShiftRows after SubBytes, but the two steps commute because
SubBytes works on each byte alone. Doing the permutation first gives the same
result. The last round uses the same order of operations on all 128 bits,
without MixColumns.

Byte order follows FIPS-197 throughout: byte 0 of the block is the most
significant byte, and column `c` is the 32-bit word at bits `127-32c -: 32`.
Row 0 of each column sits in that word's top byte.

## On-the-fly key schedule

`aes_key_expansion` holds two registers: `key_q` (the current round key,
128 bits) and `rcon_q` (the round constant, 8 bits). Combinational logic
computes the next round key from them:

```
t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
n0 = w0 ^ t;  n1 = w1 ^ n0;  n2 = w2 ^ n1;  n3 = w3 ^ n2
```

The `load` input copies the cipher key into `key_q` and sets `rcon_q = 01`,
in the same clock that the round register takes `plaintext ^ key`. On each
round step the datapath consumes `rk_next` as that round's key. Then
`key_q` takes `rk_next`, and `rcon_q` is doubled in GF(2^8) (01, 02, 04, ...,
80, 1b, 36). Round `r` therefore always sees round key `r`, produced
combinationally in its own clock. The critical path is one S-box plus a
four-deep XOR chain in the key logic, which runs beside the round unit.

## The S-box table

`aes_sbox` is a 256 x 8 constant array read by address, so the read is
combinational. The array is not typed in. At elaboration,
`aes_pkg::build_sbox_table()` fills it from the S-box definition: the
inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (computed as a^254, with 0 mapped
to 0), then the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. Synthesis sees a
constant ROM. There are 36 copies: 16 in the round units, 16 in the last
round and 4 in the key schedule.

## Interface and timing

Top-level ports (`PKT_W = 32`):

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `en` | in | enables the round register and key schedule. While low, a block in progress holds its state |
| `in_valid` / `in_ready` | in / out | handshake for one plaintext packet plus one key packet |
| `in_data`, `in_key` | in | plaintext and key packets, most significant word first |
| `out_valid` / `out_ready` | out / in | handshake for one ciphertext packet. `out_ready` is the external read control |
| `out_data` | out | ciphertext packet, most significant word first |
| `busy` | out | the round datapath is running a block |

Timing, with `en` high and no back-pressure:

* Clock 0: the input register takes the fourth packet pair.
* Clock 1: the round register takes `plaintext ^ key`.
* Clocks 2 to 11: rounds 1 to 10, one per clock.
* Clock 12: the output register takes the ciphertext. `out_valid` is high
  in the following cycle.

So the first ciphertext packet is valid 12 clocks after the last input
packet was taken, and the rest follow one per clock.

The input register can load the next block while the current one is in the
rounds. The output register drains while the next block runs. Each block
keeps the core busy for 12 clocks: load, 10 rounds, and one clock to hand
over the result. Sustained throughput is therefore one block per 12 clocks,
about 10.7 bits per clock.

Handshake rules:

* A full input register holds its block, with `in_ready` low, until the
  core is idle.
* A finished ciphertext stays in the round register until the output
  register is empty.
* Data offered with `*_valid` must not change until it is taken. Assertions
  in `aes_packet_in` and `aes_packet_out` check this for the blocks they
  offer.

`en` affects only the round datapath. The packet registers keep working
while it is low.

## Design choices

These points are choices made for this implementation. The description the
design was built from does not settle them, or settles them inconsistently.

* **Last round without MixColumns.** One written description of the last
  round lists MixColumns among its steps. The block diagram shows only byte
  substitution with rotation followed by AddRoundKey, as does standard AES.
  The block diagram is followed here. The result matches the reference
  example below and the FIPS-197 test vectors.
* **Standard S-box.** A GF(2^4) "modified" S-box is also mentioned for a
  related low-power variant. This design uses the 256 x 8 table of standard
  AES.
* **Iterative, not a 10-stage pipeline.** The description calls the design
  pipelined. Its diagram feeds the four column units back into the round
  register for rounds 1 to 9. That is built here: one block in flight,
  with the four 32-bit columns processed in parallel.
* **Own choices:** one round per clock, the combinational S-box read, the
  IDLE/RUN/DONE controller, the valid/ready handshakes, the packet order
  (most significant word first) and the synchronous reset.

## Reference example

The design's own single-block example is plaintext `0x…1e`, key `0x…28` (all
other bits zero). It gives ciphertext `0f616d50c446315ce92998849766cc2a`,
which is standard AES-128. The end-to-end and core testbenches check this
block along with FIPS-197 Appendix B and C.1.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Expected
values come from `tb/aes_ref_pkg.sv`, a reference model written
independently of the RTL:

* its S-box is found by searching for inverses, not by exponentiation;
* it keeps the state as a 4 x 4 byte matrix;
* it expands all 44 key words up front.

On top of the reference model, the testbenches use the printed FIPS-197
values. Coverage:

* all 256 S-box entries;
* MixColumns example columns;
* round keys 1 and 10 of Appendix A.1;
* round 1 and round 10 of Appendix B;
* latency and `en` stalls in the controller and core;
* back-pressure on both packet registers.

`tb_aes128_enc_top` runs 200 blocks through the top level at its default
parameters. It uses random input gaps, random `out_ready` with occasional
long pauses, and random clocks with `en` low. It checks the 12-clock latency
on the first block. It counts each of these events and fails if any never
happened:

* input back-pressure;
* output back-pressure;
* the core holding a finished block;
* `en` freezing a block in progress;
* loading the next block during the rounds.

It ends with a burst of back-to-back blocks, which must come out exactly 12
clocks apart.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_enc_top.sv \
    --top-module tb_aes128_enc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The simulator has two
states, so every register has a reset or an initial value.

## Not included

* Decryption (inverse cipher) and the 192/256-bit key variants. They are
  outside this encryptor.
* FPGA placement, timing and power figures. These depend on the target
  device and tool flow.
