# Iterative DES and Twofish block-cipher cores

This is synthesizable SystemVerilog for two symmetric block ciphers as they are
usually built on a small FPGA: **DES** (64-bit block, 56-bit effective key) and
**Twofish** (128-bit block, 128-bit key). Both cores are *iterative*. One round
of the cipher is built as combinational logic. Each clock cycle, the round's
output is fed back into a state register. This costs one round's worth of logic
and 16 cycles per block, instead of 16 copies of the round.

The design follows an FPGA study that put DES on a Spartan-3E board and analysed
the Twofish round components there. It keeps that study's module split and
names: key scheduling, data path, round block, E expansion, key addition and
S-boxes for DES; q permutations, MDS, h-function, PHT, F function, encryption
and decryption rounds, Reed-Solomon and key schedules for Twofish. Where the
study gives only a module's name or its function, the missing details come from
the DES and Twofish standards. Those places are listed under
[Departures and choices](#departures-and-choices).

There are three cipher cores and a display driver, side by side in `crypto_top`:

| core | module | what it does | latency |
|---|---|---|---|
| DES | `des_cipher_top` | DES encrypt/decrypt, `lddata` / `core_busy` / `des_out_rdy` | 17 cycles |
| DES with modes | `des_core` | single, double or triple DES (EDE), clock enable `CEN` | 18 / 35 / 52 cycles |
| Twofish | `twofish_cipher` | Twofish-128 encrypt/decrypt, `start` / `busy` / `done` | 19 cycles |
| LCD | `lcd_des` | shows the DES result as 16 hex digits on a 2x16 character LCD | about 1 s per refresh at 50 MHz |

## DES

### Data path (`des_datapath`, `des_round`)

When a block is loaded, it passes through the initial permutation IP. Its two
halves go into a left register and a right register. Each round cycle computes

    L' = R
    R' = L xor P( S( E(R) xor K_n ) )

in `des_round`. This module is made of `des_expansion` (32 to 48 bits),
`des_add_key` (a 48-bit XOR), `des_sbox_bank` (eight `des_sbox` instances, each
a 64x4 ROM) and the P permutation. Both half registers load at the same clock
edge. In the 16th round cycle the result is swapped to R16 L16, passed through
IP^-1 and stored in the output register. The same data path decrypts when the
sub-keys come in reverse order.

All permutations (IP, IP^-1, E, P, PC-1, PC-2) are functions in `des_pkg`. They
use the standard's tables, so they synthesize to plain wiring.

**Bit order.** DES numbers bits 1..64 from the left. In every DES module,
DES bit *n* of an N-bit value is at index N-*n*, so bit 1 is the MSB. A block
written in hex as `0123456789ABCDEF` is therefore the literal `64'h0123456789ABCDEF`.

### Key schedule (`des_key_schedule`)

The key schedule does not shift the key register round by round. It stores
PC-1(key), which is C0 D0, once. Each of the 16 sub-keys is then fixed wiring
of that register: both 28-bit halves rotated left by the *cumulative* shift of
rounds 1..n (1, 2, 4, 6, 8, 10, 12, 14, 15, 17, 19, 21, 23, 25, 27, 28), then
PC-2. A 48-bit 16:1 multiplexer selects the sub-key of the current round. So
decryption needs no reverse-rotating hardware: the controller just counts the
select down instead of up.

### Control and timing (`des_cipher_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clock`, `reset` | in | 1 | clock; synchronous active-high reset |
| `function_select` | in | 1 | 1 = encrypt, 0 = decrypt |
| `lddata` | in | 1 | load request, accepted only when `core_busy` is low |
| `data_in`, `key_in` | in | 64 | block and key, sampled with an accepted `lddata` |
| `data_out` | out | 64 | result block, registered |
| `core_busy` | out | 1 | high during the 16 round cycles |
| `des_out_rdy` | out | 1 | result valid; stays high until the next accepted load |

```
cycle      0        1      2   ...   16      17
lddata     1
core_busy  0        1      1   ...    1       0
key_select          0      1   ...   15            (encrypt; 15..0 when decrypting)
des_out_rdy                                   1    data_out valid
```

A load request that arrives while `core_busy` is high is ignored. An assertion
checks that no round runs before the key register has been loaded.

### Single, double and triple DES (`des_core`)

`des_core` has the pin list of a classic DES core: `CLK`, `RESET`, `CEN`,
`START`, `ED`, `MODE[1:0]`, `K1`, `K2`, `K3`, `D`, `Q` and `READY`. It reuses
`des_key_schedule` and `des_datapath`, and runs one to three passes in a row:

| MODE | encrypt (ED=1) | decrypt (ED=0) |
|---|---|---|
| 0 single | E(K1) | D(K1) |
| 1 double | E(K1), E(K2) | D(K2), D(K1) |
| 2 triple | E(K1), D(K2), E(K3) | D(K3), E(K2), D(K1) |

MODE 3 behaves like MODE 0. Each pass has a load cycle, which stores that
pass's key and block, followed by 16 round cycles. A later pass reads its block
from `Q`, the previous pass's output. `CEN` low freezes every register, and
while it is low the core ignores its inputs. READY goes high after the START
cycle plus 17 enabled cycles per pass.

## Twofish

### Round structure (`twofish_enc_round`, `twofish_f`)

The 128-bit block is handled as four 32-bit words R0..R3. Before the first
round, input whitening XORs them with K0..K3. Each round then computes

    (F0, F1) = F(R0, R1)
    R0' = ROR(R2 xor F0, 1)
    R1' = ROL(R3, 1) xor F1
    R2' = R0,  R3' = R1

`twofish_enc_round` has the ports `in1..in4`, `s_first`, `s_second`,
`key_up` (K_{2r+8}), `key_down` (K_{2r+9}) and `out1..out4`.

The F function (`twofish_f`) works as follows:

1. R0 goes through one h-function. R1 is first rotated left by 8, then goes
   through a second h-function.
2. The two results are mixed by a pseudo-Hadamard transform (`twofish_pht`):
   a' = a+b, b' = a+2b, both mod 2^32.
3. K_{2r+8} is added to the first output and K_{2r+9} to the second.

Every addition is a ripple chain of the 1-bit full adder `twofish_adder`, built
by the helper `twofish_add32`. This is the slowest path in the core: the chain
runs through the h-function, the PHT and the key addition.

### h-function, q permutations and MDS (`twofish_h`, `twofish_q`, `twofish_mds`)

This is the least obvious part of the design. `twofish_h` has four byte-wide
S-boxes. Each one is three fixed 8-bit permutations in series, with a key byte
XORed in between:

| S-box | 1st | XOR | 2nd | XOR | 3rd |
|---|---|---|---|---|---|
| 0 | q0 | s_first byte 0 | q0 | s_second byte 0 | q1 |
| 1 | q1 | s_first byte 1 | q0 | s_second byte 1 | q0 |
| 2 | q0 | s_first byte 2 | q1 | s_second byte 2 | q1 |
| 3 | q1 | s_first byte 3 | q1 | s_second byte 3 | q0 |

In the rounds, `s_first`/`s_second` are the key-dependent words S0/S1. In the
key schedule, the same unit is used with key words instead.

The permutations q0 and q1 are not stored as 256-entry tables. `twofish_q`
builds each one from four 4-bit t-boxes (16x4 ROMs, in `twofish_pkg`). The byte
is split into nibbles a (high) and b (low). Two mixing steps follow:

    a' = a xor b
    b' = a xor ROR4(b, 1) xor (8a mod 16)

The first mix is followed by t0 on a' and t1 on b'. The second mix is followed
by t2 and t3. The output is 16*t3 + t2. q0 and q1 differ only in their t-box
contents.

`twofish_mds` then multiplies the four S-box bytes by the MDS matrix over
GF(2^8), with polynomial x^8+x^6+x^5+x^3+1:

    [01 EF 5B 5B; 5B EF EF 01; EF 5B 01 EF; EF 01 EF 5B]

Only multiplication by 5B and by EF needs logic: one `twofish_gf_mul` instance
of each per input byte.

### Key material, computed on the fly

The core keeps only the four key words M0..M3 in a register. Everything else is
combinational:

* **S-box keys** (`twofish_s_keys`, `twofish_rs`): S0 = RS(key bytes 0..7) and
  S1 = RS(key bytes 8..15). RS is the 4x8 Reed-Solomon matrix over GF(2^8),
  with polynomial x^8+x^6+x^3+x^2+1. Its entries are the 24 constant multipliers
  01, A4, 55, 87, 5A, 58, DB, 9E, 56, 82, F3, 1E, C6, 68, E5, 02, A1, FC, C1, 47,
  AE, 3D, 19 and 03.
* **Expanded key words** (`twofish_keysched`): for an index i, with
  rho = 0x01010101:

      A = h(2i*rho; M2, M0)
      B = ROL(h((2i+1)*rho; M3, M1), 8)
      K_2i = A + B
      K_2i+1 = ROL(A + 2B, 9)

  `twofish_whit_keysched` uses four of these steps, for i = 0..3, to make the
  whitening keys K0..K7. The cipher uses one more step for the round keys, with
  i = r+4.

This trades speed for area. No 40-word key table is stored, but every round
cycle evaluates the key h-functions and the data h-functions one after the
other.

### Decryption (`twofish_dec_round`)

`twofish_dec_round` is the exact inverse of the encryption round. Its inputs
are the words as the encryption round produced them, (R_{r,0}, R_{r,1},
R_{r+1,0}, R_{r+1,1}). It computes F on the first two words and restores:

    out1 = ROL(in3, 1) xor F0
    out2 = ROR(in4 xor F1, 1)
    out3 = in1,  out4 = in2

Feeding the outputs back with the keys of round r-1 undoes the previous round.
So decryption uses the same state register as encryption:

1. whiten with K4..K7;
2. run rounds 15 down to 0;
3. whiten the output with K0..K3.

### Control, timing and byte order (`twofish_cipher`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `start` | in | 1 | accepted when idle; key, block and `encrypt` are sampled with it |
| `encrypt` | in | 1 | 1 = encrypt, 0 = decrypt |
| `key_in`, `data_in` | in | 128 | key and block |
| `data_out` | out | 128 | result, registered |
| `busy`, `done` | out | 1 | operation in progress; result valid (held until the next start) |

The core takes 19 cycles per block:

1. the start cycle;
2. one whitening cycle;
3. 16 round cycles;
4. one output cycle, which undoes the last swap, applies output whitening and
   stores `data_out`.

**Byte order.** Blocks and keys are 16 bytes, with byte 0 in bits 127:120 (the
order in which test vectors are written). Inside a word, bytes are packed
little-endian: P_i = b(4i) + 2^8 b(4i+1) + 2^16 b(4i+2) + 2^24 b(4i+3). With this
order, the all-zero key and block encrypt to the published value
`9F589F5CF6122C32B6BFEC2F2AE8C35A`.

## Character LCD driver (`lcd_des`)

On the board, the DES result is read from a 2x16 character LCD, which has an
HD44780-type controller and a 4-bit bus. `lcd_des` writes `des_data_out` on the
first line as 16 hex digits. It has no processor and no state machine.
Everything is driven by one 26-bit free-running counter:

* the top 6 bits are a step number, 0..63;
* the next 2 bits split each step into quarters;
* a 64-entry ROM of 6-bit words `{write, rs, nibble}` says what each step sends.

In a step that writes, `lcd_rs` and `lcd_d` are valid for the whole step, and
`lcd_e` is high only in the second quarter. At 50 MHz one step is about 21 ms.
That is longer than any delay the controller needs, so no busy flag is read
and `lcd_rw` stays 0. The ROM sequence is:

| steps | bus writes |
|---|---|
| 0 | nothing (power-on wait) |
| 1-4 | 3, 3, 3, 2: wake up, select the 4-bit bus |
| 5-12 | 28, 06, 0C, 01: two lines, auto-increment, display on, clear |
| 13-14 | 80: cursor to line 1, column 0 |
| 15-46 | 16 characters, upper nibble first |
| 47-63 | nothing |

For the character steps, the ROM only marks the step as data. The character
itself is made from one nibble of the value: `0x30 + d` for 0-9 and `0x37 + d`
for A-F. The value is sampled during step 13, so one line never mixes two
results. After step 63 the counter jumps back to step 13, so the display
follows new results about once a second. `sf_ce0` is held at 1: on the
Spartan-3E board the LCD shares its data lines with a parallel flash, and this
keeps the flash disabled. For simulation, the parameter `CNT_W` (in
`crypto_top`: `LCD_CNT_W`) shortens the counter. Only the pacing changes.

## Departures and choices

These are the points where the RTL had to choose something, or differs from
the design it is modelled on:

* **DES S-boxes and E table.** The tables are those of the DES standard. The
  RTL reproduces the full worked example of the standard key
  `133457799BBCDFF1` and block `0123456789ABCDEF`: all 16 sub-keys, L0/R0, the
  first round, and the cipher-text `85E813540F0AB405`.
* **Handshakes.** The source names the pins of both DES cores, but does not
  give their cycle behaviour. The following are choices of this design:
  * load only when idle;
  * a ready flag that holds until the next load;
  * registered outputs;
  * one round per clock. This matches the source's waveform, where the sub-key
    select steps once per clock.
* **Multi-mode DES.** The triple-DES key order (encrypt-decrypt-encrypt), the
  double-DES order, MODE 3 behaving like single DES, and a reload through IP
  on every pass are all choices of this design.
* **Twofish key schedule.** The source names the Reed-Solomon block, the key
  schedule blocks and the constant multipliers, but does not describe what they
  compute. They follow the Twofish specification, which is what makes the
  published test vectors come out.
* **Iterative Twofish core.** The source analyses the Twofish round
  components separately. The complete core (`twofish_cipher`) with its
  controller is this design's own assembly of those components.
* **Key lengths.** Only 128-bit Twofish keys are supported. 192- and 256-bit
  keys would need three or four key words in every h-function.
* **LCD driver.** The source reports only the driver's size: a 64x6 ROM, a
  26-bit counter and eight output pins. Its display presumably showed a fixed
  text. Everything else about `lcd_des` is this design's own choice:
  * the command sequence and the step timing;
  * the refresh loop and the reset;
  * a live 64-bit `value` input.
* **Not included:** pin constraints and other board-specific files.

## Simulating

Each block has a self-checking testbench in `tb/`. The testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
an independent software model of DES and Twofish, or from published vectors,
and are written into the testbench. The end-to-end test `tb_crypto_top` runs
all three cores at once on the shared clock. It checks their results and
latencies, and counts that each mechanism happened at least once:

* DES encrypt and decrypt;
* a load ignored while busy;
* single, double and triple DES;
* a `CEN` stall;
* Twofish encrypt and decrypt;
* a first LCD bus write.

The end-to-end test runs with the top's default parameters. The LCD counter
therefore has its full 26 bits, and the test waits about 1.3 million cycles for
that first write; the full run takes about half a minute.
`tb_lcd_des` checks the whole LCD command and character stream with a shorter
counter.

To run a testbench with Verilator 5 (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert --top-module tb_crypto_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/des_pkg.sv rtl/twofish_pkg.sv \
  tb/tb_crypto_top.sv -o sim && ./obj_dir/sim
```

Replace `tb_crypto_top` with any other `tb_<module>` to test one block. The
cipher cores have no size parameters: their only parameters select one S-box,
one q permutation or one GF(2^8) constant. The LCD counter width is the only
timing parameter.

## Files

| file | contents |
|---|---|
| `rtl/des_pkg.sv` | DES tables and permutation functions |
| `rtl/des_sbox.sv`, `des_sbox_bank.sv` | one S-box, and the bank of eight |
| `rtl/des_expansion.sv`, `des_add_key.sv`, `des_round.sv` | f-function parts and one Feistel round |
| `rtl/des_key_schedule.sv` | PC-1 register, sub-key wiring, 16:1 mux |
| `rtl/des_datapath.sv` | IP, half registers, IP^-1 output register |
| `rtl/des_cipher_top.sv` | DES core with control |
| `rtl/des_core.sv` | single/double/triple DES core |
| `rtl/twofish_pkg.sv` | t-boxes, GF(2^8) multiply, rotations, byte packing |
| `rtl/twofish_q.sv`, `twofish_gf_mul.sv`, `twofish_mds.sv`, `twofish_h.sv` | S-box and h-function parts |
| `rtl/twofish_adder.sv`, `twofish_add32.sv`, `twofish_pht.sv`, `twofish_f.sv` | adders, PHT, F function |
| `rtl/twofish_enc_round.sv`, `twofish_dec_round.sv` | one round each way |
| `rtl/twofish_rs.sv`, `twofish_s_keys.sv`, `twofish_keysched.sv`, `twofish_whit_keysched.sv` | key material |
| `rtl/twofish_cipher.sv` | iterative Twofish core with control |
| `rtl/lcd_des.sv` | character LCD driver |
| `rtl/crypto_top.sv` | the three cores and the LCD driver side by side |
