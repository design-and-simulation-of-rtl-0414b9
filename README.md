# DSSC: a 16+16 bit error-correcting code for multiple cell upsets

A single particle strike in a dense memory often flips several neighbouring
cells at once: a multiple cell upset (MCU). Hamming-style SEC-DED codes cannot
cope with that. The Data Segmentation Section Code (DSSC) spends 16 redundancy
bits on a 16-bit data word. In exchange it corrects any upset pattern that
stays inside two adjacent bit columns of the word, when the data is viewed as
a 4x4 matrix. Only XOR gates are used. Encoding and decoding are single
combinational networks, with no clock and no state.

This repository holds synthesizable SystemVerilog for the encoder and the
decoder, a top level that joins them, and self-checking testbenches.

## The data matrix and the codeword

The 16 data bits form four groups A, B, C and D of four bits each. Each group
is one row of a matrix, and the bit position inside a group is the column:

```
            col1 col2 col3 col4
  group A:   A1   A2   A3   A4      A1 = d[0]  ... A4 = d[3]
  group B:   B1   B2   B3   B4      B1 = d[4]  ... B4 = d[7]
  group C:   C1   C2   C3   C4      C1 = d[8]  ... C4 = d[11]
  group D:   D1   D2   D3   D4      D1 = d[12] ... D4 = d[15]
```

The 16 redundancy bits are XORs of data bits:

| bits | definition | what it covers |
|---|---|---|
| Di1, Di2 | A1^B2^C1^D2, A2^B1^C2^D1 | the two "diagonals" of columns 1-2 |
| Di3, Di4 | A3^B4^C3^D4, A4^B3^C4^D3 | the two diagonals of columns 3-4 |
| P1..P4 | Aj^Bj^Cj^Dj | parity of column j |
| CbX13, CbX24 | X1^X3, X2^X4 for X = A..D | two check bits per group |

The 32-bit codeword keeps the data unchanged in bits 15:0. The redundancy goes
in bits 31:16, one nibble per matrix row:

| codeword bits | contents (MSB to LSB) |
|---|---|
| 19:16 | CbA24, CbA13, Di2, Di1 |
| 23:20 | CbB24, CbB13, Di4, Di3 |
| 27:24 | CbC24, CbC13, P2, P1 |
| 31:28 | CbD24, CbD13, P4, P3 |

Example: data `16'h1b3a` encodes to `32'h47c01b3a`. If cell D3 (bit 14) of
the stored word flips, the result is `32'h47c05b3a`, and that decodes back to
`16'h1b3a`. Both vectors are checked by the testbenches.

The bit numbering is this design's own choice. The code's definition only
names the bits. This layout reproduces the published encoder example, and it
agrees with the published list of the encoder's critical input-to-output
paths. A different layout would give a different, equally valid code with
incompatible codewords.

## Decoding

Decoding has three steps. Each step is a module.

**1. Syndromes** (`dssc_syndrome`). The decoder recomputes the 16 redundancy
bits from the received data and XORs them with the stored ones. This gives
four bit vectors: SDi (4 bits), SP (4 bits), SCb13 (4 bits) and SCb24 (4 bits).

**2. Conditions and region selection** (`dssc_region_select`). This is the
core of the decoder. A correction is attempted when either of two conditions
holds:

- (i) some SDi or SP bit is set;
- (ii) two or more SCb bits are set.

If exactly one SCb bit is set and SDi and SP are clean, then only a stored
check bit was hit. In that case the data is left alone.

The data matrix has three correction regions, each made of two adjacent
columns:

| region | columns | SCbX13 corrects | SCbX24 corrects |
|---|---|---|---|
| 1 | 1-2 | X1 | X2 |
| 2 | 3-4 | X3 | X4 |
| 3 | 2-3 | X3 | X2 |

Suppose every wrong bit lies inside one region. Then each check bit of a
group covers exactly one column of that region. So SCb is an exact map of
the wrong bits: SCbX13 says whether the region's bit of row X in the 1/3 pair
is wrong, and SCbX24 does the same for the 2/4 pair. What is still unknown is
which region the errors are in. The diagonal and parity syndromes answer
that.

For each region, the selector places the SCb map on that region's columns.
Because the code is linear, it runs that candidate error pattern through the
same redundancy equations. This predicts the SDi and SP that such an error
would have caused. The first region, tried in the order 1, 2, 3, whose
prediction equals the observed SDi and SP is selected. The three predictions
are computed in parallel by three instances of `dssc_redundancy`.

If the conditions hold but no region matches, nothing is corrected.
`uncorr_o` is then raised, unless exactly one syndrome bit is set. A single
set syndrome bit means a single upset of a stored Di or P bit, and the data
is intact.

**3. XOR and shift** (`dssc_xor_shift`). The SCb map is shifted onto the
selected region's two columns and XORed onto the received data.

### What gets corrected

A region has 255 non-zero error patterns. Because the code is linear, whether
a pattern is corrected depends only on the pattern, not on the data.

- **Region 1 (columns 1-2):** all 255 patterns are corrected.
- **Region 2 (columns 3-4):** 224 of 255 are corrected.
- **Region 3 (columns 2-3):** 171 of 255 are corrected.
- **Single-bit upsets:** all 32 positions of the codeword are handled. A
  data-bit upset is corrected. A redundancy-bit upset leaves the data alone.
- **Adjacent double upsets:** every horizontal or vertical pair of
  neighbouring data cells is corrected.
- **Adjacent triple and quadruple upsets:** of the straight lines of 3 cells,
  8 of 16 are corrected; of 4 cells, 2 of 8.

Every region-2 or region-3 pattern that is missed has the same syndrome as a
pattern tried earlier. One example: A1+C1 and A3+C3 both leave SDi and SP
clean and set only SCbA13 and SCbC13. No decoder could separate such pairs, so
the region order only decides which member of each pair wins. The order 1, 2,
3 is this design's choice.

Errors outside any single region, or in data and redundancy at once, may be
miscorrected. Like any code with this much redundancy, DSSC gives no
detection guarantee for them.

## Modules

| module | role |
|---|---|
| `dssc_pkg` | widths, `red_t` (named redundancy/syndrome bits), `region_e`, codeword field packing, region placement function |
| `dssc_redundancy` | the XOR equations; used by the encoder, the syndrome unit and three times in the region selector |
| `dssc_encoder` | `data_i[15:0]` -> `code_o[31:0]` |
| `dssc_syndrome` | `code_i[31:0]` -> received data + syndromes |
| `dssc_region_select` | decoding conditions, region choice, status flags |
| `dssc_xor_shift` | applies the correction |
| `dssc_decoder` | the three decoding steps |
| `dssc_top` | encoder and decoder side by side |

`dssc_top` has a write side and a read side. On the write side, `data_i` goes
in and `code_o` comes out, to be stored in memory. On the read side, `code_i`
is the word read back, and `data_o` is the corrected data.

The memory itself is not part of this design. Neither is the physical upset.
Both sit between `code_o` and `code_i`.

The decoder also reports status:

- `err_o`: some syndrome bit is set.
- `corrected_o`: data bits were flipped.
- `uncorr_o`: a data error was seen that no region explains.
- `cond_i_o` and `cond_ii_o`: which decoding condition held.
- `region_o`: the region that was corrected.

A user who only needs the data can leave all of these open.

**Timing:** all outputs are combinational functions of the inputs, valid in
the same cycle. To pipeline the codec, register `code_i` and/or `data_o`
around `dssc_decoder`. The logic depth is small: the encoder is two levels of
4-input XOR. The decoder adds one comparison and one 3-way priority choice
after the syndromes.

## Where this design makes its own choices

- **Bit layout:** the numbering of data and redundancy bits in the codeword
  (see above).
- **Reading of the conditions:** the decoding conditions are taken as
  "(i) or (ii)", and "several SCb bits" is taken to mean two or more.
- **Region-selection rule:** choosing the region by predicting SDi and SP,
  and the priority order 1, 2, 3.
- **Status outputs:** the `uncorr_o` flag and the other status outputs are
  additions. The original decoder only maps 32 bits to 16 bits.
- **No registers:** the design has no registers at all.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. A watchdog counts a failure if the
testbench hangs. `tb/tb_dssc_ref_pkg.sv` is an independent reference model.
It writes every equation out with literal bit numbers, and it decodes by brute
force, trying all 3 x 255 region patterns.

| testbench | what it covers |
|---|---|
| `tb_dssc_redundancy`, `tb_dssc_encoder` | all 65536 data words, plus the published example |
| `tb_dssc_syndrome`, `tb_dssc_xor_shift` | random words, error masks and regions |
| `tb_dssc_region_select` | all 65536 syndrome values against the reference |
| `tb_dssc_decoder` | the published example; all single and adjacent double upsets; every region-1 pattern; 20000 random cases against the reference |
| `tb_dssc_top` | 200 rounds of 64 words through encoder, upset and decoder; counts each decoder mechanism and fails if one never happens |

Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dssc_pkg.sv tb/tb_dssc_ref_pkg.sv tb/tb_dssc_top.sv \
    --top-module tb_dssc_top --Mdir obj_top
./obj_top/Vtb_dssc_top
```

Replace `tb_dssc_top` with any other testbench name to run that one. Every
testbench finishes in well under a second.
