# RC6 crypto-coprocessor with on-chip key expansion

This is an RC6 block-cipher coprocessor. A small microcontroller hands it
encrypted IPSec payload and gets plaintext back, or the reverse. The
microcontroller handles the protocol layers (PPP framing, IPv6, the
authentication header) in firmware. The FPGA does only the cipher work: it
takes 128-bit blocks one bit at a time over a handshaked link, runs RC6-32/20/16
on them, and returns the result the same way.

Most RC6 FPGA designs load precomputed round keys from outside. This one runs
the RC6 key expansion itself, so a new 128-bit user key is enough to rekey it.
The cost is time: after each key change the cipher waits 177 clock cycles
before it takes data.

The RTL is SystemVerilog-2017 and synthesizable. It has no vendor primitives.
The cipher core does one RC6 round per clock.

## RC6 in brief, and the byte order used everywhere

RC6-w/r/b has a word size w, a round count r and a key length of b bytes. This
design uses w = 32, r = 20 and b = 16, the AES-candidate configuration. A block
is four 32-bit words A, B, C, D.

**Byte order.** Byte 0 of a block or key is the low byte of A (or of key word
L[0]), and byte 15 is the high byte of D. On every 128-bit port this means:

| bits     | word |
|----------|------|
| [31:0]   | A    |
| [63:32]  | B    |
| [95:64]  | C    |
| [127:96] | D    |

Bits [7:0] hold byte 0. A byte string written left to right, such as
`00 11 22 ...`, therefore appears byte-reversed in a Verilog hex literal. The
testbench function `bytes_le` does this conversion.

**Key expansion.** The key bytes fill words L[0..c-1] little-endian (c = 4).
S[0..43] is seeded with S[i] = P32 + i·Q32, where P32 = B7E15163 and
Q32 = 9E3779B9. Then 132 mixing steps run:

```
A = S[i] = (S[i] + A + B) <<< 3
B = L[j] = (L[j] + A + B) <<< (A + B)
i = (i+1) mod 44, j = (j+1) mod c
```

**Encryption.**

```
B += S[0]
D += S[1]
for i = 1..20:
    t = f(B) <<< 5
    u = f(D) <<< 5
    A = ((A ^ t) <<< u) + S[2i]
    C = ((C ^ u) <<< t) + S[2i+1]
    (A,B,C,D) = (B,C,D,A)
A += S[42]
C += S[43]
```

Here f(X) = X(2X+1) mod 2^32. Decryption runs the same steps backwards, with
subtraction and right rotation.

## Block flow through the coprocessor

```
 MCU bit link        rc6_serial_in         rc6_main               rc6_serial_out      MCU bit link
 req/ack/data  -->  4 x 32-bit buffers --> key schedule + cipher --> 4 x 32-bit regs --> req/ack/data
 key_sel, dec        (block + tag)          (key_reg in front)      full -> back-pressure
```

`rc6_coprocessor` is the top. It contains these blocks:

- **`rc6_serial_in`** collects 128 bits into four 32-bit buffers. The first bit
  received is bit 0 of A and the last is bit 31 of D. When the block is
  complete, it presents it together with two tag bits: `mcu_key_sel` (the frame
  is a key) and `mcu_dec` (decrypt this data frame). The tag bits are sampled
  with the last bit. While a finished block waits, the next bit is not
  acknowledged, so the sender stalls.
- **Key register** (top-level logic). After reset it holds `DEFAULT_KEY` and
  offers it to the cipher, so the unit works with a pre-agreed key and no key
  transfer. A key frame replaces the key and the expansion runs again. A key
  that is waiting is taken before any waiting data.
- **`rc6_main`** is the cipher with its key schedule (see below).
- **`rc6_serial_out`** takes the result in one cycle and returns it bit by bit
  on request, in the same bit order as the input. `full` stays high until the
  last bit has gone, and the cipher holds its next result until then.
  `fpga_sout_valid` tells the microcontroller that a result is waiting.

### The bit handshakes

Both links use a four-phase request/acknowledge handshake, so the
microcontroller's clock need not be related to `clk`. The `req` lines go
through two-flip-flop synchronizers (`rc6_sync`). The data and tag lines are
sampled only while `req` is high, and the sender keeps them stable during that
time.

| phase | input link (MCU sends)                            | output link (MCU receives)                       |
|-------|---------------------------------------------------|--------------------------------------------------|
| 1     | MCU sets `mcu_sin_data` and the tags, raises `mcu_sin_req` | MCU raises `mcu_sout_req`                 |
| 2     | FPGA shifts the bit in, raises `fpga_sin_ack`     | FPGA drives `fpga_sout_data`, raises `fpga_sout_ack` |
| 3     | MCU lowers `mcu_sin_req`                          | MCU reads the bit, lowers `mcu_sout_req`         |
| 4     | FPGA lowers `fpga_sin_ack`                        | FPGA lowers `fpga_sout_ack`, moves to the next bit |

The synchronizers make each bit take at least about six `clk` cycles. In
practice the microcontroller sets the link speed.

## The main unit: `rc6_main`

Its ports follow the classic cipher-unit pin list:

| pins                    | meaning |
|-------------------------|---------|
| `key_in`, `key_avail`, `key_read` | The key is taken in the cycle where `key_read` is high. |
| `data_in`, `data_avail`, `data_read`, `enc_dec` | The block and the direction are taken in the cycle where `data_read` is high. `enc_dec` = 0 encrypts and 1 decrypts. |
| `data_out`, `data_write`, `full` | The result is valid while `data_write` is high. `data_write` waits while `full` is high. |
| `ready` | High once the key expansion has finished. |

All signals are synchronous to `clk`. `rst` is synchronous and active high. It
clears the control state and the handshake flags. It does not clear data
registers or the S array, because nothing reads those before they are written.

Inside the main unit:

- **`rc6_control`** is one state machine (IDLE, INIT, MIX, READY, ROUND, POST,
  WRITE) with two counters. `cnt` is the S-word index during key expansion and
  the round index during a block. `pass` counts the three mixing passes.
- **`rc6_key_schedule`** holds L[0..3], the A and B registers and the
  init-value register. It does one S word per clock: first the 44 init writes
  S[i] = P32 + i·Q32 (a running sum), then 132 mixing steps. Each mixing step
  does both updates, A then B, in one cycle. The variable rotation by (A+B)
  reuses the barrel rotator.
- **`rc6_key_store`** is S[0..43], split into an even bank and an odd bank of 22
  words each. Pair port k returns S[2k] and S[2k+1] together, which is what a
  round or a whitening step needs. The key schedule uses a separate one-word
  port. Reads are asynchronous, which maps onto FPGA distributed RAM.
- **`rc6_datapath`** applies the first whitening step on the way into the round
  register, through a multiplexer that otherwise feeds back the core output.
  It applies the last whitening step on the way into the output register.
  Encryption adds S[0]/S[1] first and S[42]/S[43] last. Decryption subtracts
  S[43]/S[42] from C/A first and S[1]/S[0] from D/B last.

### Timing

| event                                  | cycles (r = 20) | formula |
|----------------------------------------|-----------------|---------|
| `key_read` to `ready`                  | 177             | 1 + 4(2r+4) |
| `data_read` to `data_write` (`full` low) | 22            | r + 2 |
| new block accepted after `data_write`  | next cycle      | |

For a block, the key pair read from the store is pair 0 or 21 at load, pair i
(encryption) or pair 21−i (decryption) in round i, and pair 21 or 0 at the end.
A new key can only be taken between blocks. The cipher does not run while the
key expansion runs.

## The round hardware: `rc6_core`, `rc6_quad`, `rc6_rotator`

This is where the area goes, and the part that needs the closest reading.

**`rc6_quad`** computes f(X) = X(2X+1) = 2X² + X mod 2^32 without a
general multiplier. X² is the sum of the diagonal terms x_i·2^(2i) plus each
cross term x_i·x_j·2^(i+j+1) with i < j, counted once. After doubling, row i of
the array holds:

- bit 2i+1 = x_i (the diagonal term);
- bit i+j+2 = x_i AND x_j for every j > i (the cross terms).

Everything at or above bit 32 is dropped. The 32 rows and X are summed. About
a quarter of the partial-product bits of a full 32×32 multiplier survive.

**`rc6_rotator`** is a 5-stage logarithmic barrel rotator. Stage k rotates left
by 2^k when bit k of the amount is set, so each output bit of each stage is one
2-to-1 multiplexer: 160 in total, instead of thirty-two 32-to-1 multiplexers.
It only rotates left. A right rotation by n is a left rotation by (−n mod 32).

**`rc6_core`** is one round for either direction. It shares two `rc6_quad`
units and two rotators between encryption and decryption:

| | encryption | decryption |
|---|---|---|
| words seen by the datapath | (A,B,C,D) as they are | (A,B,C,D) ← (D,A,B,C) first |
| f inputs | B, D | the permuted B and D |
| rotator A input, amount | A ^ t, u | A − S[2i], −u |
| after rotator A | + S[2i] | ^ t |
| rotator C input, amount | C ^ u, t | C − S[2i+1], −t |
| after rotator C | + S[2i+1] | ^ u |
| output | (B, C′, D, A′) | (A′, B, C′, D) |

The fixed rotations (by 5 after f, and by 3 in the key schedule) are wiring.
The round is fully combinational. The whole critical path (squarer → rotator
→ adder) lies between the round register and itself.

## Configuration

| parameter | where | default | notes |
|---|---|---|---|
| `ROUNDS` | `rc6_coprocessor`, `rc6_main`, `rc6_control`, `rc6_key_store` | 20 | S holds 2·ROUNDS+4 words. |
| `KEY_BYTES` | `rc6_main`, `rc6_key_schedule` | 16 | The schedule handles any length up to 8·ROUNDS+16 bytes (tested with 16, 24 and 32). The coprocessor's serial key frame is 128 bits, so the top fixes 16. |
| `DEFAULT_KEY` | `rc6_coprocessor` | bytes `98 76 54 32 10 ab cd ef 98 76 54 32 10 ab cd ef` | Key expanded after reset. |
| `WIDTH` | `rc6_quad`, `rc6_rotator` | 32 | The rest of the design is fixed at w = 32 (`rc6_pkg::W`). |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.
`tb/rc6_ref_pkg.sv` is an independent behavioural model of RC6. It uses a full
64-bit product for f and shift-based rotations, so it shares no structure with
the RTL.

- The cipher is checked against the two published RC6-32/20/16 vectors:
  - the zero key and zero block give `8f c3 a5 36 56 b1 f7 78 c1 29 df 4e 98 48 a4 1e`;
  - key `01 23 45 67 89 ab cd ef 01 12 23 34 45 56 67 78` with block
    `02 13 24 ... f1` gives `52 4e 19 2f 47 15 c6 23 1f 51 f6 36 7e a4 3f 18`.
- Random keys and blocks are checked against the model in both directions.
- The cycle counts are checked: 177 cycles to `ready` and 22 cycles per block.
  So are the key-pair address sequences, the back-pressure from `full`, and
  sender stalls on the input link.
- `tb_rc6_coprocessor` runs the top at its default parameters, with a
  behavioural microcontroller on both bit links at random speeds. It starts
  from the built-in key, then encrypts and decrypts the plaintext
  `07 59 78 AB DE A7 86 39 46 BC FA 27 3D 76 3D EC`. It switches direction
  between frames, sends a new key frame, and lets results back up so that both
  the cipher and the sender stall. It counts each of these events and fails if
  one never happens.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/rc6_pkg.sv tb/rc6_ref_pkg.sv \
    tb/tb_rc6_coprocessor.sv --top-module tb_rc6_coprocessor -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each testbench finishes in well
under a second.

## Where this design makes its own choices

The cipher arithmetic, the key expansion, the squarer, the barrel rotator,
the even/odd key-pair read and the block-diagram order (whitening, round
register with input multiplexer, output register) follow the original design.
The following are this implementation's choices:

- **Handshakes.** The original calls only for "a handshake" between the
  microcontroller and the FPGA. The four-phase per-bit protocol, the
  synchronizers, the bit order, the `mcu_key_sel`/`mcu_dec` tag lines and
  `fpga_sout_valid` are all choices made here.
- **Keys.** Expanding a built-in key after reset stands in for the
  pre-agreed key of the original system, which had no key negotiation.
  Rekeying over the link is an addition.
- **Cycle counts.** One key word per clock, one round per clock and the state
  list of the control unit are choices made here. The original gives no cycle
  counts. Its control unit uses a 5-bit counter; here the S-word index needs 6
  bits for 44 words, and the round/pair index fits in 5.
- **Order inside a round.** The prose description of the original core puts
  the XOR with t and u after the barrel shifter. The RC6 algorithm puts it
  before the rotation. The algorithm is followed here, which is what makes the
  reference vectors pass.
- **Reference vector.** The example run that accompanies the original design
  (key `98 76 54 32 10 ab cd ef` twice, input
  `07 59 78 AB DE A7 86 39 46 BC FA 27 3D 76 3D EC`) reports the cipher text
  `2D E1 68 4C 26 58 B2 E7 89 2D 76 33 C4 E6 A5 A6`. The RC6 algorithm does not
  produce that value under any byte or word ordering of key and block tried
  here. This design implements standard RC6, confirmed by the published
  vectors above, so it will not reproduce that cipher text.
- **One unit for both directions.** Encryption and decryption share one main
  unit, selected per block. The original system description speaks of an
  encryptor and a decryptor between the same input and output stages.

## Not included

- The microcontroller (a Philips P89C51RD2) and its firmware. That firmware
  builds and checks PPP frames carrying IPv6 packets with an authentication
  header, and talks to the PC and the terminal. `tb_rc6_coprocessor` models
  only its side of the two bit links.
- The PC software and the serial terminal.
- Faster key expansion, where the first round keys are used while the rest are
  still being generated. This was suggested as future work and is not built.
  Key expansion is strictly before encryption.
- Fit on the original target device, a Xilinx Spartan-3E XC3S500E, is not
  established here. Generic synthesis gives about 650 flip-flops and 1.7 Kbit
  of distributed memory. The LUT count needs vendor tools.
