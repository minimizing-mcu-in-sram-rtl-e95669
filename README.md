# Decimal matrix code (DMC) protected SRAM

A particle strike on a dense SRAM often flips several neighbouring cells at
once: a multiple cell upset (MCU). A single-error-correcting Hamming code
cannot repair that. The decimal matrix code handles it with two kinds of
check bits:

- An **integer sum** of pairs of 4-bit symbols, which shows *which symbols*
  were hit.
- A **column XOR** between two rows, which shows *which bits* flipped.

Together they can repair a burst of up to four adjacent flipped cells, and
many wider patterns. The RTL here is a 32-bit-word memory protected this way.
It also uses **encoder reuse**: one encoder computes the check bits on a
write, and on a read it recomputes them from the stored data. That is the
first half of the decoder, so no second copy is needed.

## The code

A 32-bit word `D` is split into eight 4-bit symbols, `sym[s] = D[4s+3:4s]`.
They are placed in a logical 2 x 4 matrix. The arrangement is logical only:
the memory stores the word as an ordinary row of cells.

```
            column of symbols:   3        2        1        0
  row 0                       D15..12  D11..8   D7..4    D3..0      (symbols 3 2 1 0)
  row 1                       D31..28  D27..24  D23..20  D19..16    (symbols 7 6 5 4)
```

**Horizontal check bits H (20 bits).** Each row has two groups. A group is
the 5-bit unsigned sum of two symbols of that row, two columns apart. The
fifth bit is the carry.

| group | bits      | value                 |
|-------|-----------|-----------------------|
| 0     | H4..H0    | D3..D0  + D11..D8     |
| 1     | H9..H5    | D7..D4  + D15..D12    |
| 2     | H14..H10  | D19..D16 + D27..D24   |
| 3     | H19..H15  | D23..D20 + D31..D28   |

**Vertical check bits V (16 bits).** One per bit column:
`V[i] = D[i] ^ D[i+16]`.

A stored codeword is 32 + 20 + 16 = 68 bits. That is a high overhead, and the
price of this code's correction power.

## Decoding: syndromes, locating and correcting

On a read, the received data `D'` goes through the encoder again, giving
`H'` and `V'`. Then:

1. **Syndromes.**
   - `dH[g] = H'[g] - H[g]` is a 5-bit difference per group. It is nonzero
     exactly when that group's sum changed.
   - `S = V' ^ V` marks every column whose parity changed.
2. **Locating.** Data bit `j` is marked in error when both conditions hold:
   - the group that covers its symbol has `dH != 0`;
   - the column syndrome `S[j mod 16]` is set.

   The horizontal syndrome picks the row and symbol. The vertical syndrome
   picks the bit.
3. **Correcting.** Marked bits are inverted: `D_correct = D' ^ L`.

Worked example, used in the testbenches. Symbol 0 = `1100` and symbol 2 =
`0110`, so group 0 = `10010`. A strike flips symbol 0 to `1111` and symbol 2
to `0111`. Then:

- `H'` = `10110`, so `dH` = `00100`, which is nonzero.
- `S` has bits 0, 1 and 8 set.
- Group 1 sees no change.

So bits 0, 1 and 8 are inverted, and the original word comes back.

### What is corrected and what is not

This is the part that needs the most care when you rely on the design.

- **Any pattern confined to one symbol** (1 to 4 bits) is always corrected.
  Such a pattern always changes that symbol's group sum, and it never puts
  two errors in one column.
- **Several symbols** are corrected when all three of these hold:
  - every group that holds errors changes its sum;
  - no bit column is hit in both rows;
  - no hit column sits, in the other row, under a symbol whose group also
    changed.
- It fails in these cases:
  - **Errors in both symbols of one group that leave the sum unchanged**
    (for example, +1 in one symbol and -1 in the other). `dH` is zero and the
    errors go uncorrected.
  - **The same column hit in both rows.** The two flips cancel in `S`.
  - **A column hit in row 0 while a group in row 1 also changed** (or the
    reverse). The bit in the other row is blamed as well and wrongly
    inverted.
- **Upsets in the check bits alone.**
  - An upset of H bits only, or of V bits only, raises `err_detected`.
    Nothing is inverted and the data comes back intact.
  - Upsets in both H and V at once can cause a wrong correction.

There is no "uncorrectable" flag. `err_detected` means only that some
syndrome was nonzero. `err_corrected` means that at least one bit was
inverted. Random multi-bit patterns spread over the whole word (about four
bits on average) are corrected about one time in three. Adjacent-cell bursts
within a symbol are always corrected.

## Encoder reuse

`dmc_ert_codec` holds one `dmc_encoder` with a 2:1 multiplexer in front of
it, steered by the enable `en` (`dmc_pkg::ert_mode_e`):

| access | `en`          | encoder input  | encoder output used for          |
|--------|---------------|----------------|----------------------------------|
| write  | `EN_ENCODE`   | write data     | H and V stored with the word     |
| read   | `EN_SYNDROME` | data read back | `H'` and `V'` for the syndromes  |

The syndrome calculator, locator and corrector follow the encoder. A write
and a read never need the encoder in the same cycle: reads are combinational
through the array, so one access per cycle never conflicts.

## Memory interface and timing (`dmc_memory`)

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk`, `rst_n`  | in  | 1     | clock; asynchronous active-low reset of the output registers |
| `we`            | in  | 1     | write `wdata` to `addr` at this clock edge |
| `re`            | in  | 1     | read `addr`; result one cycle later |
| `addr`          | in  | 8     | word address (256 words) |
| `wdata`         | in  | 32    | write data |
| `rdata`         | out | 32    | corrected read data |
| `rvalid`        | out | 1     | high for one cycle, one cycle after `re` |
| `err_detected`  | out | 1     | a syndrome of that read was nonzero |
| `err_corrected` | out | 1     | bits were inverted in that read |
| `upset_en/addr/mask` | in | 1/8/68 | flip the masked bits of a stored codeword |

- **Single port, one access per cycle.** `we` and `re` together violate an
  assertion. If both are high, the write is performed and the read is
  dropped.
- **Reads.** The array is read combinationally. Decoding and correction
  happen in the same cycle, and the results are registered. Read latency is
  one cycle.
- **Upset port.** The `upset_*` inputs emulate particle strikes for
  reliability testing. The mask uses the codeword layout `{V, H, D}`, with
  `D` at bit 0. A write to the same word in the same cycle takes priority.
  Leave `upset_en` low in a real use.
- **Reset.** The array is not reset. Write a word before you read it.

The data width follows the symbol width parameter `M`: 8*M data bits,
4*(M+1) H bits and 4*M V bits. The default is `M = 4`. The 2 x 4 symbol
arrangement and the pairing of symbols two columns apart are fixed. `ADDR_W`
sets the depth.

## Files

| file | content |
|------|---------|
| `rtl/dmc_pkg.sv` | sizes, symbol-to-group mapping, `ert_mode_e` |
| `rtl/dmc_sym_adder.sv` | 4-bit + 4-bit -> 5-bit group adder |
| `rtl/dmc_encoder.sv` | four adders (H), 16 XORs (V), data copy (U) |
| `rtl/dmc_syndrome.sv` | group subtractors (dH) and XORs (S) |
| `rtl/dmc_locator.sv` | error-bit mask from dH and S, detection flag |
| `rtl/dmc_corrector.sv` | inverts the located bits |
| `rtl/dmc_ert_codec.sv` | shared encoder plus decoder chain |
| `rtl/dmc_sram.sv` | storage array with upset-injection port |
| `rtl/dmc_memory.sv` | top: codec, information array (32 bits), redundancy array (36 bits) |
| `tb/dmc_ref_pkg.sv` | reference equations and the correctability rule above |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator, for example:

```
verilator --binary --timing --assert --top-module dmc_memory_tb \
    rtl/dmc_pkg.sv tb/dmc_ref_pkg.sv rtl/*.sv tb/dmc_memory_tb.sv
./obj_dir/Vdmc_memory_tb
```

`dmc_memory_tb` runs the top at its default size, in well under a second. It
does the following:

- fills all 256 words and reads them back clean;
- replays the worked example;
- injects 400 random bursts inside single symbols;
- injects 100 two-symbol upsets within a row;
- injects 100 single check-bit upsets;
- injects 400 random patterns, judged by the reference rule.

It checks the data, both flags and the one-cycle latency. It also counts each
kind of event and fails if one never happened. `dmc_ert_codec_tb` does the
same at the codec level with exhaustive single-symbol bursts.

## Where this design makes its own choices

The code itself comes from the DMC construction: the symbol layout, the
group sums, the column XOR, the subtraction syndrome, the correction by
inverting located bits, and the shared encoder steered by the read/write
enable. The following are this design's own choices:

- **The locating rule.** It is applied bit by bit, as described above. Its
  limits in the "not corrected" list follow from it.
- **Syndrome width.** The horizontal syndrome is kept 5 bits wide, modulo
  32. Only its being zero or nonzero is used.
- **Memory size.** 256 words.
- **Timing.** A combinational array read, a registered output, one access
  per cycle, and an asynchronous reset of the output registers only.
- **Extra ports.** The `err_detected` and `err_corrected` flags and the
  upset-injection port.
- **The storage.** It is a plain register array, not an SRAM macro. No cell-
  or circuit-level SRAM design is included.

Not included: the Hamming and Reed-Solomon codes that DMC is usually compared
against, the other symbol arrangements (2 x 2 with 8-bit symbols, 4 x 4 with
2- or 4-bit symbols), and any area, power or delay figures.
