# AES-128 with visual-cryptography shares

This design encrypts a 128-bit block with AES-128. It then reads the
ciphertext as a small black-and-white image and splits that image into two
random-looking *shares*. Neither share alone tells anything about the
ciphertext. Laid on top of each other, the shares show it again.
Decryption runs the chain backwards: the two shares are stacked, which gives
the ciphertext back, and the AES inverse cipher turns that into the plaintext.

The AES part is an iterative, one-round-per-clock core that runs both the
cipher and the inverse cipher. Its MixColumns step can be built in two ways,
chosen by a parameter:

- a shift-and-XOR network (the default);
- a logarithm/antilogarithm table multiplier.

Both give bit-identical results. They differ only in the circuit they
synthesize to.

```
            encrypt                                        decrypt
 in_block ──► aes_core ──► out_block (ciphertext)     in_share1 ─┐
              (cipher)  └─► vc_encode ──► out_share1   in_share2 ─┴► vc_decode ──► aes_core ──► out_block
                              ▲         └► out_share2                  (stack)   (inverse     (plaintext)
                           in_rnd (latched)                                        cipher)
```

## The state matrix and byte order

AES works on 16 bytes arranged as a 4x4 matrix, filled **column by column**.
Byte *i* of a 128-bit bus is at row `i % 4`, column `i / 4`, and byte 0 is in
bits `[127:120]`. This is the order of the FIPS-197 test vectors. So
`128'h00112233_...` puts `00 11 22 33` in column 0. The helpers
`aes_pkg::state_byte` and `aes_pkg::with_byte` give row/column access. Every
unit uses them or the same index formula, `127 - 8*(4*c + r)`.

## The four transformations

| step | encryption | decryption |
|---|---|---|
| AddRoundKey (`add_round_key`) | state XOR round key, byte by byte | same |
| SubBytes (`sub_bytes`, `sbox`) | each byte through the S-box | each byte through the inverse S-box |
| ShiftRows (`shift_rows`) | row *N* rotated left by *N*-1 bytes | rotated right |
| MixColumns (`mix_columns_*`) | each column times `02 03 01 01` (circulant) | times `0E 0B 0D 09` (circulant) |

Each step is a combinational module with an `inv_i` input that selects the
decryption variant. The S-box and inverse S-box are 256-byte ROMs. Their
contents are computed at elaboration time by `aes_pkg::make_table`, so there
is no table file to keep in step. The computation follows the standard
definition: S(a) is the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`, applied to
b = a⁻¹ in GF(2⁸) (with 0⁻¹ = 0).

## The round datapath (aes_core)

One set of round hardware is reused for all ten rounds. A 128-bit register
holds the state between them. A cipher key is loaded first. The key schedule
then computes and stores all eleven round keys K0..K10 (see below).

When a block is accepted, the first key addition happens as it is loaded:
`state <= block ^ K0` for encryption, or `block ^ K10` for decryption. Each
following clock does one round:

```
encryption, r = 1..10:  state <= AddRoundKey(MixColumns(ShiftRows(SubBytes(state))), K_r)
                        (no MixColumns in round 10)
decryption, r = 9..0:   state <= InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(state)), K_r))
                        (no InvMixColumns in round 0)
```

Some points about how one datapath serves both directions:

- **SubBytes and ShiftRows are shared.** SubBytes changes byte values and
  ShiftRows only moves bytes, so their order does not matter. One `sub_bytes`
  unit followed by one `shift_rows` unit serves both directions, with `inv_i`
  set to the mode.
- **MixColumns and the key addition swap places.** In encryption MixColumns
  comes before the key addition. In the inverse cipher it comes after. There
  is one MixColumns unit, with its input multiplexed. There are two key adders
  (`u_ark_enc`, `u_ark_dec`), not one shared adder. A shared adder would make
  a structural combinational loop through the two multiplexers, even though no
  mode ever uses it.
- **The round counter** counts up 1..10 for encryption and down 9..0 for
  decryption. It indexes the round-key array directly.
- **The last round** skips MixColumns. It is detected as `rnd == 10` for
  encryption and `rnd == 0` for decryption.

The controller has three states: IDLE, RUN (ten clocks) and DONE. In DONE the
result waits until `out_ready_i`. An assertion checks that a result offered
and not taken stays unchanged.

## Key schedule (key_expansion)

The key schedule is the AES-128 one from FIPS-197. Each round key is four
32-bit words w0..w3, and the next key is:

```
t   = SubWord(RotWord(w3)) ^ {rcon, 00, 00, 00}
w0' = w0 ^ t,  w1' = w1 ^ w0',  w2' = w2 ^ w1',  w3' = w3 ^ w2'
```

`rcon` starts at `01` and is doubled in GF(2⁸) each round (…, `80`, `1B`,
`36`). One key is produced per clock, using four forward S-boxes. All eleven
keys are kept in registers (11 × 128 flip-flops), because the inverse cipher
reads them in reverse order.

A key load takes 10 clocks. During that time the core accepts no blocks. Keys
can be changed only when no block is in flight.

## MixColumns two ways

Both versions compute the same matrix products in GF(2⁸), modulo
x⁸+x⁴+x³+x+1.

**Shifts and XORs (`mix_columns_add_shift`, default).** Multiplying by `02`
(called *xtime*) is a left shift. If the bit shifted out was 1, the result is
XORed with `1B`. Applying xtime two or three times gives `04` and `08`. The
constants then split into sums, and GF(2⁸) addition is XOR:

- `03` = `02`^`01`
- `09` = `08`^`01`
- `0B` = `08`^`02`^`01`
- `0D` = `08`^`04`^`01`
- `0E` = `08`^`04`^`02`

There are no tables. The logic is a few levels of XOR per output bit.

**Log/antilog tables (`mix_columns_lut`, `gf_mul_lut`).** Every nonzero
element of GF(2⁸) is a power of the generator `03`. So the product of two
nonzero bytes is `x·y = E(L(x) + L(y))`, where:

- L is the logarithm table, base 03;
- E is the antilogarithm table, E(i) = 03ⁱ.

Both tables are also built by `aes_pkg::make_table`. E is made by stepping
x → x·03 = xtime(x) ^ x, and L is its inverse.

The sum of two logarithms can reach 508. A sum above 255 is brought back into
range by subtracting 255, because 03²⁵⁵ = 01. A sum of exactly 255 needs no
special case, since the table holds E(255) = 01. L(0) does not exist, so a
zero operand forces the product to zero.

`mix_columns_lut` uses 64 such multipliers: one per state byte and matrix
entry. Each multiplier reads the tables three times. This circuit is larger
and slower than the shift-and-XOR version. Published FPGA results for the two
approaches agree: about 33 % against 13 % of the device, 24.3 mW against
11.1 mW, and 12.7 ns against 4.4 ns. That is why the shift-and-XOR version
is the default.

## Visual-cryptography shares (vc_encode, vc_decode)

This is a 2-out-of-2 scheme in the style of Naor and Shamir. Each pixel (one
ciphertext bit, 1 = black) becomes two sub-pixels in each share:

- **Share 1** always gets one black and one white sub-pixel. A random bit
  chooses which comes first: `rnd = 0` gives `10`, `rnd = 1` gives `01`.
- **Share 2** copies share 1's pattern for a white pixel. For a black pixel
  it takes the complement.

Each share by itself is a uniformly random pattern.

**Stacking** (OR of the sub-pixels) gives one black sub-pixel for a white
pixel and two for a black one. `vc_decode` therefore recovers a pixel as the
AND of its two stacked sub-pixels. It also raises `bad_o` if any share pixel
is not exactly one black and one white sub-pixel. A correctly made share never
has such a pixel.

Pixel *i* occupies bits `2i+1:2i` of a share. A 128-bit ciphertext therefore
gives two 256-bit shares.

The random bits come from outside, on `in_rnd_i`, one per pixel. The top
latches them with each encryption request, so the shares stay stable while
the result waits. For real use they must be fresh and unpredictable for every
block.

## Interface and timing (aes_vc_top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_valid_i` / `key_ready_o` | in / out | 1 | load `key_i` when both are high |
| `key_i` | in | 128 | cipher key |
| `in_valid_i` / `in_ready_o` | in / out | 1 | request handshake |
| `in_decrypt_i` | in | 1 | 0: encrypt `in_block_i`; 1: decrypt the block held by the two shares |
| `in_block_i` | in | 128 | plaintext (encryption) |
| `in_share1_i`, `in_share2_i` | in | 256 | the two shares of a ciphertext (decryption) |
| `in_rnd_i` | in | 128 | random bits for the shares (encryption) |
| `in_share_bad_o` | out | 1 | the input shares hold a malformed pixel (combinational) |
| `out_valid_o` / `out_ready_i` | out / in | 1 | result handshake; the result is held until taken |
| `out_decrypt_o` | out | 1 | mode of the result |
| `out_block_o` | out | 128 | ciphertext or plaintext |
| `out_share1_o`, `out_share2_o` | out | 256 | shares of the ciphertext (valid when `out_decrypt_o` = 0) |

Parameter: `MIX_IMPL`, of type `aes_pkg::mix_impl_e`. It is `MIX_ADD_SHIFT`
(default) or `MIX_LUT`.

Timing:

- **Key load:** after a key handshake, `in_ready_o` stays low for 10 clocks
  while the round keys are computed. After reset no block is accepted until a
  key has been loaded.
- **Latency:** for a request accepted at clock edge 0, `out_valid_o` rises
  after edge 10. That is one clock per AES round. The share encoder and
  decoder are combinational.
- **Throughput:** the core holds one block at a time. It takes the next
  request in the clock after the result is taken, so the rate is one block
  per 12 clocks with `out_ready_i` held high.
- **Loading a key and a block together:** if `key_valid_i` and `in_valid_i`
  are high in the same clock, the key wins. `in_ready_o` is low in that clock.

`aes_core` has the same handshakes and timing without the share ports. Use
it on its own for plain AES-128.

## Design choices and departures

The following are choices made for this RTL, not dictated by the method it
implements:

- **Both directions in one core.** The reference implementation does
  encryption in software and only decryption in hardware. Here both are
  hardware.
- **Architecture.** The architecture is iterative, one round per clock, with
  valid/ready handshakes. The reset style is synchronous and active low.
- **Round structure and key schedule.** These follow FIPS-197: an initial key
  addition, nine full rounds, and a final round without MixColumns. The
  method's description lists the four steps of a typical round only.
- **Visual cryptography in hardware.** The shares are made in hardware, one
  pixel per ciphertext bit. How the ciphertext is turned into an image, and
  the image size, are this design's choices.
- **Share decoding.** The decoder (stacking plus the malformed-share flag) is
  this design's own. The method names the visual step on the decryption path
  but does not say how the shares are combined.
- **Not included: forming the input block from a username and password.**
  The method builds the block by converting the username's characters into
  the 4x4 matrix and embedding the password in it. That step is host software
  and its embedding rule is not defined, so the top takes the finished
  128-bit block.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | block/byte types, `NR`, `mix_impl_e`, state indexing, `xtime`, table generator `make_table` |
| `rtl/aes_vc_top.sv` | top: core plus share encoder and decoder |
| `rtl/aes_core.sv` | iterative cipher / inverse cipher with controller |
| `rtl/key_expansion.sv` | AES-128 key schedule, 11 stored round keys |
| `rtl/add_round_key.sv`, `rtl/sub_bytes.sv`, `rtl/sbox.sv`, `rtl/shift_rows.sv` | round steps |
| `rtl/mix_columns_add_shift.sv` | MixColumns by shifts and XORs |
| `rtl/mix_columns_lut.sv`, `rtl/gf_mul_lut.sv` | MixColumns by log/antilog tables |
| `rtl/sbox_rom.sv` | 256 × 8 ROM holding one of the four tables (parameter `TABLE`) |
| `rtl/vc_encode.sv`, `rtl/vc_decode.sv` | share generation and stacking |
| `tb/aes_ref_pkg.sv` | independent reference model (GF arithmetic, S-box from the inverse, full AES) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_aes_vc_full` |

## Simulating

For example, for the end-to-end test, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_vc_top.sv --top-module tb_aes_vc_top
./obj_dir/Vtb_aes_vc_top
```

Verilator finds the other modules through `-Irtl`. Every testbench ends with a
line `TB_RESULT checks=N failures=M`. A watchdog stops a run that hangs and
counts it as a failure.

## Verification

Each testbench compares against values computed independently of the RTL.
The reference model in `tb/aes_ref_pkg.sv` multiplies in GF(2⁸) by shift and
add. It builds the S-box from a⁻¹ = a²⁵⁴ and the affine map.

| testbench | what it checks |
|---|---|
| `tb_gf_mul_lut` | all 65,536 operand pairs |
| `tb_sub_bytes` | every byte value in both directions |
| `tb_mix_columns_*` | FIPS-197 example columns, and InvMixColumns undoing MixColumns |
| `tb_shift_rows` | the rotation pattern of each row, and the inverse undoing the forward shift |
| `tb_key_expansion` | the FIPS-197 Appendix A.1 schedule, and the 10-clock schedule time |
| `tb_aes_core` | FIPS-197 Appendix B and C.1 vectors and random keys and blocks in both directions; the 10-clock latency; results held under back-pressure |
| `tb_aes_vc_top` | both `MIX_IMPL` variants in lockstep; encryption with share generation; decryption from the generated shares; key reloads; back-pressure; malformed-share detection. It counts each of these events and fails if one never happens |
| `tb_aes_vc_full` | the top at default parameters on the FIPS-197 Appendix B example, through the shares and back |

All testbenches pass with Verilator 5. All RTL files pass Verilator lint and
the slang front end of Yosys.

Not verified: timing closure and area on any FPGA or process, and the
statistical quality of shares made from a given random source.
