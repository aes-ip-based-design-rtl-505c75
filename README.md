# C-AES: an AES coprocessor with run-time configurable field and matrices

This is an AES block-cipher coprocessor in which the algorithm's constants are
inputs, not fixed logic. Four things can be changed at run time:

- the irreducible polynomial m(x) that defines GF(2^8);
- the 8x8 affine matrix A of SubBytes;
- the affine constant c_A of SubBytes;
- the row vector c(x) of the MixColumns matrix.

A host that loads the standard values (m = 0x1B, the FIPS-197 affine
transform, c = {02,03,01,01}) gets standard AES. Any other valid set gives a
private AES variant with the same structure. Both directions are supported,
with 128-, 192- and 256-bit keys, in ECB and CBC modes. Round keys are
produced on the fly, so no round-key memory is needed. Each round takes one
clock, so a block takes Nr = 10 / 12 / 14 cycles.

The design follows the architecture of a 2006 NCTU thesis by Tsung-Yao Pai
("IP-based design and chip implementation of the AES coprocessor with
configurable parameters"). It is a fresh SystemVerilog implementation. Where
the original left things open, it makes its own choices, which are marked
below.

## The main idea: working in a changed basis

The usual way to make SubBytes cheap is to invert in the composite field
GF((2^4)^2) rather than in GF(2^8). When m(x) is fixed, the change of basis
is a constant matrix. Here m(x) is a parameter, so the change of basis is a
general 8x8 GF(2) matrix δ' (written `d` in the code). A single S-box is:

    S(x) = A · δ'^-1 · Inv(δ' · x) ⊕ c_A        (Inv: inversion in GF((2^4)^2))

Doing this in every round would put three 8x8 matrix multipliers in series
per byte, plus the MixColumns multipliers. Instead, the cipher engine keeps
the whole state in the composite basis for all rounds. The matrices that
follow the inverter in one round, and those that precede it in the next, are
multiplied together once, when the parameters are loaded.

With D = δ' and Di = δ'^-1:

| | encryption | decryption |
|---|---|---|
| enter the loop | R' = D·(x ⊕ K0) | R' = D·A^-1·(x ⊕ K_Nr) |
| one round | R' ← MC'(Inv(SR(R')) ⊕ c'_A) ⊕ D·K_i | R' ← IMC'(Inv(ISR(R') ⊕ c'_A) ⊕ D·K_{Nr-i}) |
| leave the loop | A·Di·p ⊕ K_Nr | Di·p |

The symbols in the table are:

- c'_A = D·A^-1·c_A.
- MC' is MixColumns with each coefficient matrix C_k replaced by D·C_k·A·Di.
- IMC' uses D·A^-1·C_k·Di, where C_k is built from the InvMixColumns row.
- p is the state after the last round's key addition, before the output
  matrix.

A coefficient c becomes a matrix by multiplying it by x repeatedly:
C_c = [c, xtime(c), ..., xtime^7(c)] modulo m(x). So the MixColumns step
becomes a plain GF(2) matrix product, and the basis changes fold into it.

As a result, the round loop per byte holds only:

1. ShiftRows (wiring);
2. an XOR;
3. the composite-field inverter;
4. an XOR;
5. one row of four 8x8 matrix products (MC');
6. a final XOR.

Encryption and decryption share the same hardware. Only the two XOR
positions, the ShiftRows direction and the stored matrices change.

The round key is still produced in the normal polynomial basis. It is
carried into the composite basis by 16 byte matrices D·K inside the engine.

## Composite-field inverter (`caes_gf_inv`)

The field is GF(2^4) with q0(y) = y^4 + y + 1. It is extended by
q1(x) = x^2 + x + ω, with ω = {1001}. A byte is s = s_h·x + s_l, with s_h in
bits 7..4.

The inverse is computed as:

- Θ = (s_h²·ω ⊕ (s_h ⊕ s_l)·s_l)^-1
- s^-1 = (s_h·Θ)·x + (s_h ⊕ s_l)·Θ

This takes a squarer, a constant multiply by ω, three GF(2^4) multipliers
and one GF(2^4) inverter. The GF(2^4) inverse is formed as a^14 = a²·a⁴·a⁸
from squarers and two multipliers. Because the field is fixed here, none of
this depends on the parameters.

## Matrix convention and `caes_matmul8`

Every 8x8 matrix is a 64-bit value made of eight columns. Column j, the image
of input bit j, sits in bits 8j+7..8j. A product y = M·x is the XOR of the
columns whose input bit is set. The same unit serves three purposes:

- basis changes;
- the affine transform;
- multiplication by a field constant.

The configurable S-box (`caes_sbox`) is matmul(D) → inverter →
matmul(A·Di) ⊕ c_A. It is used only in the key generator, four times.

## Parameter loading (`caes_param_init`)

The host sends ten 32-bit words. A matrix takes two words, and the first word
holds columns 7..4.

| word | content |
|---|---|
| 1 | {16'h0, c_A, m(x)[7:0]} (the x^8 term is implicit) |
| 2 | {c0, c1, c2, c3}: the first row of the MixColumns matrix (encryption) or of the InvMixColumns matrix (decryption), e.g. 02030101 / 0E0B0D09 |
| 3–4 | A^-1 |
| 5–6 | δ' |
| 7–8 | δ'^-1 |
| 9–10 | A |

The host computes A^-1, δ' and δ'^-1 itself. To find δ', take any root β
of m(x) in GF((2^4)^2) and set column j of δ' to β^j. Then δ'^-1 is its
inverse over GF(2). `tb/caes_ref_pkg.sv` does exactly this in
`find_delta`.

The engine computes one matrix product per clock on one shared 64-bit matrix
unit. That unit is eight `caes_matmul8`s, one per column. The schedule has 18
steps:

| step | what happens |
|---|---|
| 2 | C_cj for j = 0..3, by xtime |
| 6 | D·A^-1 |
| 7 | c'_A |
| 10 | A·Di |
| 11–14 | (D or D·A^-1)·C_cj |
| 15–18 | ·(A·Di or Di) |

Steps 1 to 10 overlap with the word transfers. Steps 11 to 18 run on the
eight clocks after word 10. `ready` therefore rises 8 cycles after the last
parameter word, 18 cycles after the first when the words come back to back.

The merged MixColumns matrices depend on the direction. For that reason the
direction is fixed when the parameters are loaded.

## Round key generator (`caes_keygen`, `caes_key_ctrl`)

One generator handles all three key lengths. It produces one 128-bit round
key per clock, in forward order for encryption and in reverse order for
decryption. It has eight 32-bit registers LR0..LR7, which hold a sliding
window of the expanded key, W = w[4i .. 4i+Nk-1]. The round key K(i) is
always W[0..3].

- **Forward step:** four new words are computed with the usual recurrence,
  w[j] = w[j-Nk] ⊕ (g(w[j-1]) or w[j-1]). The window then shifts by four.
- **Backward step:** the same recurrence is solved for the older word,
  w[j-Nk] = w[j] ⊕ ..., for k = 3 down to 0.

In any run of four consecutive words, at most one needs SubWord. So a
single unit is shared: a RotWord multiplexer, four configurable S-boxes and
an Rcon XOR. Which word needs SubWord, and with or without RotWord, depends
only on the step number s:

| key length | which word gets SubWord | Rcon index |
|---|---|---|
| 128-bit | word 0 of every step, rotated | s+1 |
| 192-bit, s mod 3 = 0 | word 0, rotated | (4s+6)/6 |
| 192-bit, s mod 3 = 1 | word 2, rotated | (4s+8)/6 |
| 192-bit, s mod 3 = 2 | none | no Rcon |
| 256-bit, even s | word 0, rotated | s/2+1 |
| 256-bit, odd s | word 0, SubWord only | no Rcon |

The input to the shared unit is chosen so that it never depends on the
unit's own output:

- In a 128-bit backward step it is W2 ⊕ W3.
- In a 192-bit forward step with the S-box at word 2, it is W0 ⊕ W1 ⊕ W5.

Rcon(i) = x^(i-1) reduced modulo the configured m(x).

Decryption has to start from the end of the schedule. After a key is loaded
in decryption mode, the key expansion controller runs the generator forward
for Nr cycles. It then stores the final window w[4Nr .. 4Nr+Nk-1] in a second
bank of registers. Each decryption block reloads that window and steps
backward. The controller's step counter is used modulo 3 (192-bit keys) or
modulo 2 (256-bit keys); this takes the place of explicit phase states.

## Host interface (`caes_io_if`, `caes_out_buf`)

| pin | dir | meaning |
|---|---|---|
| clk, reset | in | clock; asynchronous active-high reset |
| ready, wdata[31:0] | in | write strobe and data |
| wait_buffer | out | high: the write in this cycle is not accepted |
| key_change | in | the next transfer starts with a new key |
| cbc | in | 1 = CBC, 0 = ECB |
| key_length[1:0] | in | 00 = 128, 01 = 192, 10 = 256 |
| ende | in | 0 = encrypt, 1 = decrypt |
| oe | in | read enable |
| rdone, rdata[31:0] | out | read data valid, read data |
| working | out | a block is in the cipher engine |

Writes go to an address pointer that walks through up to four segments:
parameters (10 words), key (4/6/8), IV (4, only in CBC mode), text (4).
Which segments a transfer covers is decided when its first word arrives:

- after reset: everything, i.e. 18/20/22 words, plus 4 in CBC mode;
- with key_change high: key (+IV) and text, i.e. 8/10/12 (+4) words;
- otherwise: one 4-word text block.

The mode pins are sampled at the start of a transfer that carries a key;
ende is sampled only at a full initialization. Every block and key word is
sent most-significant word first. The first text word is state bytes
0..3, i.e. column 0, as in FIPS-197.

`wait_buffer` is high in two cases:

- a complete text block is waiting for the engine, which also covers the
  time the key generator spends precomputing the final key;
- the next transfer would load a key or parameters while the engine is still
  busy.

While `wait_buffer` is high the host simply holds its word.

Results go into two 128-bit buffers used in turn. While `oe` is high and a
buffer is full, one word per clock comes out on `rdata`, with `rdone` high.
`rdone` follows `oe` combinationally.

## Block sequencing and CBC (`caes_main_ctrl`)

A block starts when four conditions hold:

- a text block is waiting;
- the parameters and the key are ready;
- an output buffer is free;
- the engine is idle.

A block can also start in the last round of the previous block, in the same
cycle that block's result is written, provided both output buffers are
free. So a continuous stream runs at Nr cycles per block. At 250 MHz that
is 3.2 / 2.67 / 2.29 Gbit/s for 128 / 192 / 256-bit keys.

In CBC the chain register starts from the IV.

- **Encryption:** the engine input is text ⊕ chain, and the ciphertext
  becomes the next chain value. The next block's input depends on the result
  being written, so CBC encryption does not start back to back. It runs at
  Nr+1 cycles per block.
- **Decryption:** the engine output is XORed with the chain, and the received
  ciphertext becomes the next chain value. It runs at the full rate.

## Top level (`caes_top`)

The top wires the blocks together: the I/O interface, the parameter
initialization engine, the main controller, the key expansion controller,
the key generator, the cipher engine and the output buffers. The key input
of the engine's input converter depends on the direction:

- encryption: the first four key words;
- decryption: the stored final round key.

Synthesised with yosys' generic flow, the design is about 2,200 flip-flops.

## Departures from the original design

- **Direction pin.** An `ende` pin was added, because the original pin list
  has no direction input. Changing direction needs a new initialization,
  because the merged MixColumns matrices are direction-specific.
- **Decryption row vector.** For decryption the host loads the
  InvMixColumns row (e.g. 0E0B0D09) in word 2. The hardware does not derive
  it.
- **Key generator.** It uses the sliding-window scheme above, not the
  original's rearranged per-register round functions. The cost is about the
  same: one SubWord unit and eight registers plus an eight-word final-key
  bank. For 192-bit keys, one forward step chains three XORs before the
  S-box, where the original precomputes a sum.
- **Output converter.** In encryption, the last round key is added after the
  output matrix A·δ'^-1.
- **Word formats and transfer protocol.** The packing of parameter words,
  the word order and the reduced bus protocol are this design's choices. The
  bus protocol is a READY/WDATA write strobe with wait, and an OE/RDONE read;
  no AHB address decoding is built.
- **CBC encryption rate.** CBC encryption runs at Nr+1 cycles per block.
- **Not included.** Scan insertion, pads and the prototyping host system are
  not part of this RTL.

## Files

- `rtl/caes_pkg.sv`: shared types, the parameter struct `caes_params_t`, and
  GF(2) matrix and GF(2^4) helper functions.
- `rtl/caes_*.sv`: one module per file, as named above.
- `tb/caes_ref_pkg.sv`: an independent reference model. It contains the
  configurable AES in plain GF(2^8) arithmetic, a FIPS-197-style key
  expansion, random valid parameter sets (irreducible m(x), invertible A and
  MixColumns matrices), basis search and the parameter-word packing.
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_caes_top` runs the whole coprocessor at its default size. It covers:

- FIPS-197 known answers for all three key lengths in both directions;
- random parameter sets;
- ECB and CBC;
- key changes;
- back-to-back streams with the Nr-cycle spacing checked;
- output back-pressure through `oe`.

It counts how often each of these happened, and it fails if one never did.

## Simulating

Any testbench builds with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/caes_pkg.sv tb/caes_ref_pkg.sv tb/tb_caes_top.sv \
        --top-module tb_caes_top -o sim
    ./obj_dir/sim

Replace `tb_caes_top` with any other `tb_*` module to test one block. The
full top-level test takes well under a second.
