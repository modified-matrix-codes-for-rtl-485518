# Modified matrix code for adjacent-error protection of memory words

Radiation upsets in dense memories often flip several neighbouring bits at
once. This design protects each memory word with a *modified matrix code*
(MMC). The data word is treated as a two-row matrix, and three kinds of parity
are stored with it:

- a vertical parity bit per column;
- a Hamming code per row;
- an extended-Hamming bit per row, which is the parity of the row's data.

A run of adjacent errors that stays inside one row shows up in the vertical
syndrome as the exact error pattern. Once the decoder knows which row is hit,
it corrects the row by XOR-ing it with that syndrome.

The hard part is deciding which row is in error. The code comes with three
decoding methods, and this RTL builds all of them side by side:

| method | uses | row decision | corrects (8-bit data) |
|---|---|---|---|
| 1 | dH, dV | row parity only; both rows when it is silent | odd bursts up to 3 |
| 2 | dH, dV, dR | row parity; else the "dR xor dV" fill rule | bursts up to 3, on all-zero/all-one rows |
| 3 | dH, dV, dR | row parity **or** row Hamming syndrome | any burst up to 4 inside a row |

Method 3 is the recommended one. Methods 1 and 2 are kept because they are
smaller and show what each piece of the syndrome contributes.

## The codeword

For K data bits, each row holds K/2 bits: the lower row is `D[K/2-1:0]` and the
upper row is `D[K-1:K/2]`. Each row needs M Hamming bits, where M is the
smallest value with 2^M >= K/2 + M + 1.

```
V[i]  = D[i] ^ D[i+K/2]                      i = 0 .. K/2-1
H[r]  = xor of the data bits of row r        r = 0, 1
R[r][j] = xor of the row-r data bits whose Hamming position has bit j set
```

For K = 8 these are `R0 = D0^D1^D3`, `R1 = D0^D2^D3`, `R2 = D1^D2^D3` (and the
same on D7..D4 for R3..R5), `H0 = ^D[3:0]`, `H1 = ^D[7:4]` and `V[i] = D[i]^D[i+4]`.
Note that H covers only the row's data, not the Hamming bits.

Each row is stored as an ordinary Hamming codeword: check bits go at the
power-of-two positions and data bits fill the other positions in ascending
order. The row's H bit sits on top of its row. The upper row sits above the
lower row, and the vertical bits are at the top of the word. For K = 8
(bit 19 first):

```
V3 V2 V1 V0 | H1 D7 D6 D5 R5 D4 R4 R3 | H0 D3 D2 D1 R2 D0 R1 R0
```

For example, data `00000001` is stored as `0001 00000000 10000111`.

| K | M per row | parity bits, methods 2/3 | codeword n | parity bits, method 1 only | n |
|---|---|---|---|---|---|
| 8  | 3 | 12 | 20  | 6  | 14 |
| 16 | 4 | 18 | 34  | 10 | 26 |
| 32 | 5 | 28 | 60  | 18 | 50 |
| 64 | 6 | 46 | 110 | 34 | 98 |

The right-hand columns describe the encoder without Hamming bits
(`mmc_encoder` with `WITH_R = 0`). It packs each row as data followed by H, and
the rows are followed by V. That packing is a choice of this design.

## Syndromes and the three correction rules

The decoder recomputes H', V' and R' from the data it reads and forms
`dH = H ^ H'`, `dV = V ^ V'` and `dR = R ^ R'`. For a burst inside one row:

- dV is exactly the error pattern, shifted to column positions;
- dH of that row is 1 when the number of errors is odd;
- dR of that row is the Hamming syndrome of the burst. It is non-zero for every
  burst at K = 8 and K = 16, but not always at larger K (see below).

Each rule works row by row (`corrector_m1/2/3`):

- **Method 1.** With dH = 01, only the lower row is XOR-ed with dV. With
  dH = 10, only the upper row is. With dH = 00 the row is unknown, so *both*
  rows are XOR-ed with dV. This fixes the right row and copies the error
  pattern into the other one. dH = 11 is handled like 00.
- **Method 2.** A row with dH set is XOR-ed with dV. A row with dH clear but a
  non-zero dR is overwritten with a single bit replicated across the row:
  `^dR[row] ^ ^dV`. Any other row is passed through.
- **Method 3.** A row is flagged when `dH[row] | (dR[row] != 0)`. A flagged row
  is XOR-ed with dV; any other row is passed through.

Worked 8-bit cases: the stored word is `00000000`, and 0 to 8 adjacent errors
start at D0. Because the stored word is zero, the dH/dR/dV columns equal
H'/R'/V' of the read data.

| read | dH | dR | dV | method 1 | method 2 | method 3 |
|---|---|---|---|---|---|---|
| 00000000 | 00 | 000000 | 0000 | 00000000 | 00000000 | 00000000 |
| 00000001 | 01 | 000011 | 0001 | 00000000 | 00000000 | 00000000 |
| 00000011 | 00 | 000110 | 0011 | 00110000 | 00000000 | 00000000 |
| 00000111 | 01 | 000000 | 0111 | 00000000 | 00000000 | 00000000 |
| 00001111 | 00 | 000111 | 1111 | 11110000 | 00001111 | 00000000 |
| 00011111 | 10 | 011111 | 1110 | 11111111 | 11110000 | 11110001 |
| 00111111 | 00 | 110111 | 1100 | 11110011 | 00001111 | 11110011 |
| 01111111 | 10 | 000111 | 1000 | 11111111 | 11110000 | 11110111 |
| 11111111 | 00 | 111111 | 0000 | 11111111 | 11111111 | 11111111 |

## What the methods really guarantee

The rules above reproduce the published worked cases. Beyond them, on
arbitrary stored data, these are the limits (checked by simulation):

- **Method 3** corrects, for any data, any single-bit error anywhere in the
  codeword. It also corrects any burst of adjacent data errors inside one row
  whose length is odd or whose Hamming syndrome is non-zero. At K = 8 and
  K = 16, that covers every burst up to K/2 bits. At K = 32 and K = 64, some
  even bursts have a zero row syndrome: one example is the 10 bits D9..D0 at
  K = 32. Such a burst leaves dH and dR silent, so the row goes uncorrected.
  Counted from bit 0, the longest burst always corrected is 9 at K = 32 and
  K = 64, not K/2. The published capability of "K/2 adjacent errors" therefore
  holds here only for 8 and 16 bits.
- **Method 1** corrects single data errors and odd bursts of up to K/2 - 1
  bits in one row, for any data and any K. It does not correct even bursts,
  and it turns a single error in a V bit into two data errors (dH = 00, so both
  rows are flipped).
- **Method 2** handles the odd cases like method 1. Its even-error rule
  writes one constant bit over the whole row. That restores the row only if
  the row held all zeros (when the fill bit is 0) or all ones (when it is 1).
  On zero data it corrects bursts of 2 but not 4 at every width. The claimed
  "K/2 - 1" reach at 16/32/64 bits is not achieved with this rule. A single
  error in an R bit of a row with mixed data also corrupts that row.
- Bursts that cross from the lower row into the upper row are outside what
  any of the methods is meant to handle.

Two published values disagree with the simulated waveforms of the same
method, and this RTL resolves them as follows:

- Method 2, read `00011111`: the table gives `11111111`, the waveform
  `11110000`. The per-row rule above gives `11110000`, so that value is used.
- Method 1, reads `00000011`, `00001111`, `00111111`: the waveform shows the
  data unchanged, while the table and the worked description XOR both rows with dV.
  The description and table are followed.

## Hardware organisation

```
mmc_top
 ├─ mmc_encoder            parity_encoder + horizontal vector Hamming (HVHC) placement
 │   └─ parity_encoder
 ├─ ecc_memory             DEPTH x n-bit words, sync write/read, upset port
 └─ mmc_decoder x3         METHOD = 1, 2, 3, all reading the same word
     ├─ hvhc_decoder       split codeword, recompute H' V' R'
     │   └─ parity_encoder
     ├─ xor_block          dH, dV, dR
     └─ corrector_m1 | corrector_m2 | corrector_m3
```

`mmc_pkg` holds the layout functions: `ham_bits`, `row_len`, `cw_len`,
`data_pos`, `data_off`, `chk_off`, plus the `method_e` enum. Every module is
parameterised by K, and the codeword width follows from K.

**Timing of `mmc_top`.** The encoder and decoders are combinational. A write
(`we`, `waddr`, `wdata`) is stored at the clock edge. A read with `re` returns
the stored codeword in `rcode` one cycle later, with `rvalid = 1`. The word is
held until the next read. `dout`, `err`, `fixed`, `dh`, `dv` and `dr` come
combinationally from that registered word and from the `method` input (1, 2 or
3; any other value selects 3). The three per-method results are also brought
out as `dout_m1`, `dout_m2` and `dout_m3`. `upset_en` / `upset_addr` /
`upset_mask` XOR a mask into one stored word, to model soft errors. A write to
the same word in the same cycle wins. `rst_n` is an asynchronous, active-low
reset of the read register and `rvalid`; the memory array is not reset.

**Choices of this design, not of the method:** memory depth (16 words), the
one-cycle synchronous read, the upset port, sharing one stored word between
all three decoders with a method select, the `err` / `fixed` flags, the
handling of dH = 11, and the bit packing of the encoder without Hamming bits.

Size at K = 8 (yosys coarse synthesis of `mmc_top`): about 80 word-level
cells plus a 16 x 20-bit memory.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. The
reference model in `tb/mmc_ref_pkg.sv` builds codewords by walking the Hamming
positions and does not share code with the RTL. `tb/mmc_vectors_pkg.sv` holds
the worked 8-bit cases.

| testbench | what it covers |
|---|---|
| `tb_parity_encoder` | K = 8 exhaustively against the parity equations; K = 16/32/64 random |
| `tb_mmc_encoder` | K = 8 exhaustively against the bit layout, the example word, 14-bit variant, widths 34/60/110 |
| `tb_hvhc_decoder`, `tb_xor_block` | field split, recomputation, syndromes |
| `tb_corrector_m1/2/3` | the worked cases; random syndromes at K = 16 |
| `tb_mmc_decoder` | worked cases end to end; random errors; the guarantees listed above at K = 8 and 16 |
| `tb_ecc_memory` | latency, hold, upsets, write/upset collision |
| `tb_mmc_top` | default size (K = 8, 16 words): clean reads, worked cases, random upsets with method switching, collision; counts each mechanism |
| `tb_mmc_widths` | K = 8/16/32/64: codeword width, every in-row burst for every method against the reference, and the measured burst reach |

Running one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/mmc_pkg.sv tb/mmc_ref_pkg.sv tb/mmc_vectors_pkg.sv tb/tb_mmc_top.sv \
  --top-module tb_mmc_top -o sim && ./obj_dir/sim
```

Each testbench takes well under a second.

## Changing it

- Data width: `mmc_top #(.K(16))` (K must be even; 8, 16, 32 and 64 are
  tested). All field widths follow from `mmc_pkg`.
- Depth: `DEPTH`.
- A single-method memory: instantiate `mmc_encoder`, `ecc_memory` and one
  `mmc_decoder #(.METHOD(METHOD_3))`. For method 1 alone, `WITH_R = 0` on
  both the encoder and the decoder drops the Hamming bits from the stored
  word.
