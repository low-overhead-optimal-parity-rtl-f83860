# Optimal parity codes for burst-error correction in memory words

Radiation can flip several neighbouring cells of an embedded memory at once.
These codes protect a 64-bit memory word so that a burst of up to 31 adjacent
flipped bits is corrected in a single, purely combinational pass when the
word is read. They use far fewer check bits than the 3-D parity (horizontal,
vertical and diagonal) codes they replace. This RTL implements all four
variants of the scheme, called optimal parity codes 1 to 4 (OPC-1 to OPC-4),
each as an encoder and a decoder. The top level runs all four side by side:
each code has its own encoder, code-word memory and decoder.

## The idea: a 2 x 32 matrix

The 64-bit word `d` is seen as two rows of 32 bits:

```
row 1 (upper):  d[63] ... d[33] d[32]
row 0 (lower):  d[31] ... d[1]  d[0]
```

Every code stores two kinds of check bits next to the data:

* **Vertical bits `V` (32 bits, the same in all four codes).** Each is the parity
  of one column: `V[i] = d[i] ^ d[i+32]`. On a read, the vertical syndrome
  `S = V_recomputed ^ V_stored` has a 1 in every column where exactly one of the
  two rows was hit. If the error lies in one row only, `S` is exactly that
  row's error pattern.
* **Horizontal bits `H` (the four codes differ here).** These only say *which
  row* was hit. The lower half of `H` is computed from row 0 and the upper half
  from row 1. So the horizontal syndrome `Hdiff = H_recomputed ^ H_stored`
  points at a row.

The decoder corrects by XORing `S` onto the row that `Hdiff` points at. This
"vector adjustment" uses `{S, 32'b0}` for row 1 and `{32'b0, S}` for row 0. A
burst of up to 31 adjacent bits fits inside one row, which gives the (N/2)-1
capability for N = 64. A burst that straddles bits 31/32 puts errors in both
rows. It is not corrected, and it is miscorrected if only one row's `H` bits
change.

## The four codes

| Code | Horizontal bits | H bits | Check bits | Code rate k/n | Overhead r/k |
|------|-----------------|--------|------------|---------------|--------------|
| OPC-1 | four 9-bit byte sums: `d[7:0]+d[23:16]`, `d[15:8]+d[31:24]` (row 0), `d[39:32]+d[55:48]`, `d[47:40]+d[63:56]` (row 1) | 36 | 68 | 48.5 % | 106.3 % |
| OPC-2 | two 17-bit sums of 16-bit halves: `d[15:0]+d[31:16]` (row 0), `d[47:32]+d[63:48]` (row 1) | 34 | 66 | 49.2 % | 103.1 % |
| OPC-3 | six Hamming(38,32) check bits per row | 12 | 44 | 59.3 % | 68.8 % |
| OPC-4 | one even-parity bit per row: `H[0] = ^d[31:0]`, `H[1] = ^d[63:32]` | 2 | 34 | 65.3 % | 53.1 % |

`H` is packed with row 0 in the low bits, in the order listed. For OPC-3, the
data bits of a row fill the non-power-of-two positions 3, 5, 6, 7, 9, ... of a
38-bit Hamming code word. Check bit k is the XOR of the data bits whose
position has bit k set. Check bit 0 therefore covers data bits
0, 1, 3, 4, 6, 8, 10, 11, 13, 15, 17, 19, 21, 23, 25, 26, 28, 30.

OPC-4 is the cheapest and the recommended variant. In the published FPGA
results it also had the smallest encoder (30 LUTs). Its decoder (80 LUTs)
tied with OPC-3's for the smallest.

## What gets corrected, and what does not

The decoder does the following, all combinationally:

1. It recomputes `H` and `V` from the word read, using an instance of its own
   encoder. This is called encoder reuse.
2. It forms `Hdiff` and `S`.
3. If both are zero, the word passes unchanged.
4. If only the row-1 half of `Hdiff` is non-zero, the output is
   `dataread ^ {S, 32'b0}`.
5. If only the row-0 half is non-zero, the output is `dataread ^ {32'b0, S}`.
6. If both halves or neither half is non-zero, the word passes unchanged.
   The published pseudo-code does not cover these two cases; this behaviour
   is this design's choice.
7. With `en` low the output is zero. With `en` low the encoder also outputs
   zero check bits.

A burst is therefore corrected only if it changes the `H` bits of its row.
That depends on the code:

* **OPC-4 (row parity)** corrects exactly the bursts with an odd number of
  flipped bits. An even-length burst leaves the row parity unchanged, and the
  corrupted word passes through. For a zero word with LSB bursts of 23, 24, 25,
  26 and 27 bits, the outputs are 0, `0000000000ffffff`, 0,
  `0000000003ffffff` and 0.
* **OPC-1 and OPC-2 (sums)** see bursts of both even and odd length. In
  principle a burst is missed when its changes to the two added fields cancel
  in the sum, but the sweep below found no such case.
* **OPC-3 (Hamming)** misses a burst whose positions XOR to zero. For
  example, data bits 0, 1 and 2 sit at positions 3, 5 and 6, and 3^5^6 = 0.

The sweep testbench `tb_opc_burst_sweep` tries every in-row burst of 1 to 31
bits (1054 per word) on 12 stored words. These are the share of bursts each
code corrected:

| Code | In-row bursts corrected |
|------|-------------------------|
| OPC-1 | 100 % |
| OPC-2 | 100 % |
| OPC-3 | 95.0 % |
| OPC-4 | 51.6 % (exactly the odd lengths) |

None of the codes reports an error or an uncorrectable word. The only output
is the (possibly corrected) data, as in the original scheme. An upset of only
the stored `H` bits leaves `S = 0`, and an upset of only the stored `V` bits
leaves `Hdiff = 0`; either way the data passes unchanged. Upsets of both `H`
and `V` bits can cause a miscorrection.

## Memory path (`opc_edac_top`)

```
datain -> opcN_encoder -> codeword_memory {H, V, data} -> opcN_decoder -> dataout_opcN   (N = 1..4)
```

* `codeword_memory` is a plain synchronous RAM with `2**ADDR_W` words
  (default 64). It has one write port and one read port. A read returns the
  word one clock after `re`, and `rvalid` is high in that cycle. Only `rvalid`
  is reset.
* The write port also has an **upset** command (`upset`, `upset_mask`). It
  XORs the mask into the stored data bits, modelling a multiple-cell upset,
  so that the correction path can be exercised in simulation and on hardware.
  The check bits are not touched by it. `we` wins over `upset` in the same
  cycle.
* The four channels share all controls, so one write stores the same word
  under all four codes. One read returns four independently corrected words.
* Latency: the encoder and decoder add no cycles. Data written at a clock edge
  can be read from the next cycle on, and the corrected word appears one cycle
  after `re`.

The original block diagram places an additional "horizontal vector Hamming"
encoder and decoder stage between the parity codec and the memory. Its
construction is not specified, so it is not part of this RTL. The parity
encoder writes straight into the memory.

## Where this RTL departs from or completes the published description

* OPC-2: only "16-bit addition, 34 H bits" is specified. Adding the two 16-bit
  halves of each row is this design's choice, by analogy with OPC-1.
* OPC-3: only the first Hamming equation is specified. Check bits 1 to 5 follow
  the standard Hamming(38,32) construction that equation belongs to. The
  ordering of the two rows inside `H` is this design's choice.
* OPC-4: the construction follows from its stated sizes (2 + 32 check bits)
  and its worked examples (an upper-row burst of 31 bits gives `Hdiff = 2'b10`;
  even bursts are not corrected). It is read as one parity bit per row.
* Row selection when `Hdiff` points at both rows (see above).
* Memory depth, ports, read latency and the upset port are this design's
  choices.
* The area and power figures of the FPGA implementation are not reproduced.

## Files

| File | Contents |
|------|----------|
| `rtl/opc_pkg.sv` | widths, vertical-bit, Hamming-row and vector-adjustment functions |
| `rtl/opcN_encoder.sv` | encoder of code N (combinational) |
| `rtl/opcN_decoder.sv` | decoder of code N (combinational, reuses the encoder) |
| `rtl/codeword_memory.sv` | code-word RAM with upset port |
| `rtl/opc_edac_top.sv` | four encode/store/decode channels |
| `tb/tb_opc_ref_pkg.sv` | independent reference model of all four codes |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the run hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl --top-module tb_opc_edac_top \
    rtl/opc_pkg.sv tb/tb_opc_ref_pkg.sv tb/tb_opc_edac_top.sv -Mdir obj -o sim
./obj/sim
```

Swap in `tb_opcN_encoder`, `tb_opcN_decoder` or `tb_codeword_memory` for the
unit tests, or `tb_opc_burst_sweep` for the exhaustive burst sweep. Each runs
in well under a second.

* **Codec testbenches.** They check the worked examples, including a zero word
  read back with its upper 31 bits set, which every code corrects to zero. The
  OPC-4 tests also check the 23- to 27-bit LSB bursts. Thousands of random
  words are then compared with the reference model. For bursts inside one
  row, the expected output is the original word when the burst changes that
  row's `H` bits and the corrupted word otherwise. Boundary-crossing bursts,
  random patterns, check-bit upsets and `en` low are also covered.
* **Top-level testbench.** It runs at the default size and covers writes,
  upsets, reads, corrections in each row, uncorrected even bursts,
  cross-row bursts and disabled reads. It counts a failure if any of these
  never happens, and it checks the one-cycle read latency.

To change the memory depth, override `ADDR_W` on `opc_edac_top`. The codes
themselves are fixed at 64 data bits by `opc_pkg`.
