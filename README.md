# Triple-DES and AES cores for a PCI block-cipher accelerator FPGA

This RTL implements the FPGA logic of a small PCI accelerator card for
secret-key block ciphers. The card pairs one mid-size FPGA with a PCI
controller and an 8-bit local bus. The FPGA holds either of two cipher
engines: two-key Triple-DES and AES with 128-, 192- or 256-bit keys. Both
engines use the *basic* (loop) style, which suits a small device. One piece
of round hardware is reused for every round of a block. One block is in
flight at a time, and there are no pipeline registers that would let
several blocks overlap.

The organisation follows the paper "Implementation of AES and Triple-DES
cryptography using a PCI-based FPGA board" (block diagrams of the Triple-DES
loop, the AES core and the AES round loop). The cipher algorithms follow
FIPS 46-3 (DES) and FIPS-197 (AES). Widths, handshakes, reset and the exact
cycle schedule are not given by that description. They are choices made
here, and each is listed below.

`crypto_fpga_top` puts both engines side by side. Each engine brings its own
ports out, and they share only `clk` and `rst_n`.

## Triple-DES: two DES units in a loop

```
 key bytes ─► 64-bit key reg ─┬─► key schedule K1 ──16×48──┐
                              └─► key schedule K2 ──16×48──┼──────────┐
 text bytes ─► 64-bit text reg ─► MUX ─► Round(Enc) ─┬─► Round(Dec) ──┘
                                   ▲   (16 rounds)   │   (16 rounds)
                                   └─────────────────┼──── loop-back ◄┘
                                                     └─► output MUX ─► 8-bit reg ─► bytes
```

- **Two DES units.** `des_unrolled` is one complete DES: the initial
  permutation, sixteen `des_round` instances in a row, and the final
  permutation. Two identical copies form the loop, Round(Enc) and Round(Dec).
  A DES unit decrypts when it gets its sixteen round keys in reverse order,
  so the K2 schedule hands its keys to Round(Dec) reversed.
- **One loop trip.** A block enters through the multiplexer. It passes
  Round(Enc) with K1, then Round(Dec) with K2, and comes back round to the
  multiplexer. It then passes Round(Enc) with K1 a second time and goes to the
  output. That is E-D-E encryption with K3 = K1, which is two-key Triple-DES.
  A `second_pass` flag tells Round(Enc)'s output where to go.
- **Decryption uses the same path.** When `decrypt` is sampled high, both
  schedules swap their key order. The trip then computes
  D(K1) → E(K2) → D(K1).
- **A register after every round.** The sixteen rounds of a unit are
  unrolled, and each round is followed by a register, so the clock period is
  that of a single round. A block therefore takes 3 × 16 = 48 cycles. The
  per-round register is a choice made here: a purely combinational 32-round
  path could not reach the ~69 MHz reported for this engine.
- **Key loading.** Both keys reach the engine through one 64-bit key
  register. Each key schedule keeps its own copy, taken from that register
  on `key_load_k1` or `key_load_k2`. The schedule itself (PC-1, rotations,
  PC-2) is wiring after that copy.

**Timing (`tdes_core`).**

| Event | When |
|---|---|
| Text block loaded | 8 cycles, one byte per `din_valid` |
| `start` | Starts the block. It is ignored while `busy`, and `busy` falls the cycle after `done`. A stream of blocks therefore runs at one block per 49 cycles. |
| `done` | High in the 48th cycle after the start cycle |
| Result bytes | In the 8-bit output register, with `dout_valid`, in cycles 2 to 9 after `done` |

## AES: one round, a key RAM and the equivalent inverse cipher

```
 key bytes ─► 256-bit reg ─► 3-in-1 key schedule ─► key-storing RAM (15 × 128, sync read)
                                                          │
                                     ┌── InvMixColumns ◄──┤
                                     ▼                    ▼
                                    MUX (decrypt, inner rounds only)
                                     │
 text bytes ─► 128-bit reg ─► MUX ─► state reg ─► AddRoundKey ─┬─► output reg ─► out MUX ─► 8-bit reg
                               ▲                               ├─► Sub/Shift/Mix    (encrypt)
                               └───────────────────────────────┴─► InvSub/InvShift/InvMix (decrypt)
```

- **Round loop (`aes_round_scheduler`).** The state register holds the block.
  Each round adds the round key and then applies either the encryption or the
  decryption transforms (`aes_enc_round` or `aes_dec_round`). The result goes
  back into the state register. In the final round, MixColumns or
  InvMixColumns is skipped. After the last AddRoundKey, the state goes into
  the output register instead.
- **Decryption has the same shape as encryption.** It uses the *equivalent
  inverse cipher*: AddRoundKey comes first in every round, just as in
  encryption. For that to be correct, the round keys of the inner rounds
  (1 … Nr−1) are passed through InvMixColumns as they leave the RAM. A
  multiplexer selects the plain key for the first and last AddRoundKey. The
  RAM is read backwards, from round key Nr down to 0.
- **Two cycles per round.** The key RAM has a synchronous read, like an FPGA
  block RAM. Each AddRoundKey step therefore takes one cycle to fetch its key
  and one to use it. One block takes **2·Nr + 3** clock edges: the edge that
  loads the block, then 2·(Nr+1) edges. That is 23, 27 and 31 cycles for
  128-, 192- and 256-bit keys. At 30 MHz these give 167, 142 and 124 Mbit/s,
  which are exactly the throughputs reported for the original
  implementation.
- **3-in-1 key schedule (`aes_key_schedule`).** It expands a 128-, 192- or
  256-bit key with one datapath, producing one 32-bit word per clock. A
  window of the last eight words supplies w[i−1] and w[i−Nk]. Every fourth
  word completes a round key, which is written to the RAM at its round
  number. `key_size` is sampled when `key_expand` starts the expansion, which
  takes 44, 52 or 60 cycles. Once the schedule is stored, any number of
  blocks in either direction can use it. Changing the key or its size means
  running the expansion again.
- **S-boxes computed, not typed in.** `aes_pkg` builds the S-box and its
  inverse at elaboration from their definition. That definition is the
  inverse in GF(2⁸) modulo x⁸+x⁴+x³+x+1, then the affine map
  `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. Synthesis turns
  them into 256-entry ROMs.

**Timing (`aes_core`).**

| Event | When |
|---|---|
| Key loaded | Send the 16, 24 or 32 key bytes. The last ones sent form the key, first byte most significant. Then pulse `key_expand` with `key_size`. |
| Key ready | `key_done` pulses when expansion is finished. `start` is ignored while `key_busy`. |
| Text block | 16 bytes on `din_byte`/`din_valid`, then `start` with `decrypt`. `start` is accepted in the `done` cycle, so a stream runs at one block per 2·Nr+3 cycles. |
| `done` | In the cycle after the (2·Nr+3)-th edge, counted from the edge that ends the start cycle |
| Result bytes | The 16 bytes follow in cycles 2 to 17 after `done` |

## Host side: 8-bit ports

On the card, the host reaches the FPGA through an 8-bit, 16 MHz local bus.
Both engines therefore take keys and text one byte per clock into wide shift
registers (`byte_shift_in`). They return results through a byte multiplexer
and an 8-bit output register (`byte_shift_out`). Bytes are most significant
first in both directions. The strobe-style handshake is defined here; the
card's actual local-bus protocol is not modelled.

## How far the RTL matches the original implementation

| | Original implementation (XCV300-4) | This RTL |
|---|---|---|
| Triple-DES clock / throughput | 69 MHz / 83 Mbit/s (≈ 53 cycles per block) | 48 cycles per block; in a stream a new block starts every 49 cycles, i.e. 90 Mbit/s at 69 MHz |
| AES-128 / 192 / 256 throughput at 30 MHz | 167 / 142 / 124 Mbit/s | 23 / 27 / 31 cycles per block = 167 / 142 / 124 Mbit/s |

These are the points where the RTL departs from the original description or
adds its own choices:

- **Triple-DES cycle count.** The extra ~5 cycles per block of the original
  are not described, so they are not reproduced.
- **Triple-DES round-key link.** The block diagram labels the key-schedule
  outputs 32 bits wide. DES round keys are 48 bits, and an unrolled unit needs
  all sixteen at once, so the link here is 16 × 48 bits.
- **Two-key Triple-DES only.** The original describes only the E-D-E form
  with keys K1 and K2. Three-key and E-E-E variants are not built.
- **AES block size.** Only 128-bit blocks are built. The Rijndael block sizes
  of 192 and 256 bits are not.
- **FPGA resources.** Block-RAM use and slice counts of the original cannot
  be compared. The S-boxes here are ROMs generated by synthesis, and the key
  RAM is a plain array.
- **Both engines at once.** On the card, the FPGA is configured with one
  engine at a time. Here both sit in one top level.
- **Reset.** All registers use an asynchronous active-low reset. The key RAM
  contents are not reset.

**Not included.** The PCI controller, IO controller, local-bus controller and
configuration SRAM of the card are separate devices whose behaviour is not
specified. The host PC is also outside this design.

## Files

| File | Contents |
|---|---|
| `rtl/des_pkg.sv` | DES tables (IP, FP, E, P, PC-1, PC-2, S-boxes) and bit-level functions |
| `rtl/des_round.sv` | One Feistel round |
| `rtl/des_unrolled.sv` | 16 registered rounds with IP/FP |
| `rtl/des_key_schedule.sv` | Key register and 16 round keys, either order |
| `rtl/tdes_core.sv` | The E-D-E loop with byte ports |
| `rtl/aes_pkg.sv` | AES types, computed S-boxes, the transforms |
| `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv` | Round transforms |
| `rtl/aes_key_schedule.sv` | 3-in-1 key expansion |
| `rtl/aes_key_ram.sv` | Key-storing RAM |
| `rtl/aes_round_scheduler.sv` | The AES round loop |
| `rtl/aes_core.sv` | AES with byte ports |
| `rtl/byte_shift_in.sv`, `rtl/byte_shift_out.sv` | 8-bit port registers |
| `rtl/crypto_fpga_top.sv` | Both engines side by side |

Every module has a self-checking testbench `tb/tb_<module>.sv`. The
testbenches compare against known answers: the FIPS-197 Appendix C examples,
the classic DES worked example (key 133457799BBCDFF1), and random vectors from
a software implementation of DES, Triple-DES and AES. Each testbench also
checks the cycle counts given above. `tb/aes_vectors_pkg.sv` holds the shared
AES vectors.

`tb_crypto_fpga_top` drives both engines at the same time at default
parameters. It runs 5 Triple-DES keys (encrypt and decrypt each) and 12 AES
keys across all three sizes. It also makes each of these happen at least once
and counts them:

- the Triple-DES loop-back;
- ignored starts while busy and during key expansion;
- key-size switches;
- key reuse;
- both engines busy together.

`tb_workload_throughput` streams six blocks through each engine and
configuration. The next block's bytes are loaded while the current block is processed. The testbench checks
the sustained period of 49 cycles (Triple-DES) and 23, 27 and 31 cycles
(AES-128, 192 and 256), and prints the resulting rates.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/des_pkg.sv rtl/aes_pkg.sv tb/aes_vectors_pkg.sv \
  tb/tb_crypto_fpga_top.sv --top-module tb_crypto_fpga_top -Mdir obj
./obj/Vtb_crypto_fpga_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. For a single
block, use the same command with its testbench and `--top-module`. The
packages are listed explicitly; `-y` finds every module by its file name.
