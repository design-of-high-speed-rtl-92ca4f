# HS-LP-HA adder: an approximate adder with a carry-free low half

Most of the delay and switching energy of a ripple-carry adder is in its carry chain. Some
applications can absorb a small error in the least significant bits of a sum, for example
signal processing for communications, control, biomedical or seismic data. For those, this
adder drops the carry chain in the low-order bits. The high-speed, low-power, high-accuracy
(HS-LP-HA) adder splits each operand into two sets that are worked on at the same time:

* the **accurate set**, the high-order bits, is added exactly by an ordinary ripple-carry adder;
* the **inaccurate set**, the low-order bits, is combined bit by bit with a few gates and no
  carry. Nothing passes from this set into the accurate set.

So the critical path is the carry chain of the accurate set only. At the default size that is 8
bits instead of 16. The result is one bit wider than the operands. Its high part is the exact sum
of the high-order operand bits, and its low part is an estimate of the low-order sum.

The default configuration is a 16-bit adder: 8 accurate bits and 8 inaccurate bits. The
inaccurate byte is made of two 4-bit nibbles.

```
 a[15:8] b[15:8]            a[7:4] b[7:4]              a[3:0] b[3:0]
     |      |                   |     |                    |     |
 +------------------+   +--------------------+   +-------------------+
 |  accurate_rca    |   |   upper_nibble     |   |  lower_nibble_or  |
 |  8 mirror full   |   |   4 selection cells|   |  4 OR cells       |
 |  adders, cin = 0 |   |   flag chain LSB->MSB  |                   |
 +------------------+   +--------------------+   +-------------------+
     |                           |                        |
 sum[16:8]                   sum[7:4]                 sum[3:0]
                       \______ inaccurate_lower_byte ______/
```

## How the inaccurate byte is formed

This part is the heart of the design, and the one that is easy to misread.

**Lower nibble, bits 3..0.** Each sum bit is `a[i] | b[i]`. A 1+1 counts as 1, and the carry it
should produce is dropped.

**Upper nibble, bits 7..4.** The nibble is scanned from its LSB (bit 4) towards its MSB (bit 7).
Each sum bit is `a[i] | b[i]` until the scan reaches the first position where both operand bits
are 1. That position and every higher position in the nibble give 1. If no position holds two 1s,
the whole nibble is the OR of the operands. Forcing 1s makes up, roughly, for the carry that the
lost 1+1 should have sent upwards.

In hardware, every upper-nibble bit is one cell (`upper_nibble_cell`):

```
set_out = (a & b) | set_in        // the flag: a 1+1 here or below
s       = set_out ? 1 : (a | b)   // 2:1 mux: forced 1, or OR
```

`set_in` of bit 4 is tied to 0. Each other cell takes `set_out` of the cell below it. The flag
chain is four gates long, and it is the longest path in the inaccurate byte.

Two worked examples (operands split as accurate byte | upper nibble | lower nibble):

| | A | B | result | value | exact |
|---|---|---|---|---|---|
| forced-1 path | `10110011 1001 1010` | `01101001 0001 0011` | `100011100 1111 1011` | 72955 | 72877 |
| OR-only path | `10110011 1001 1010` | `01101001 0000 0011` | `100011100 1001 1011` | 72859 | 72861 |

In the first example, bit 4 holds 1 in both operands, so the whole upper nibble becomes `1111`.
In the second, no upper-nibble position holds two 1s, so the nibble is `1001 | 0000`.

### Error

The low byte of the result is always between 0 and 255. The exact low-order sum is between 0 and
510, so the result is always within 255 of the exact sum:

* the worst low result is `0xFF + 0xFF -> 255` (exact 510);
* the worst high result is `0x10 + 0x10 -> 240` (exact 32).

The error measure used for this design is the mean relative error magnitude,
`mean(|exact - result| / exact)`. Accuracy is `(1 - that) x 100 %`. Some measured values:

* for uniformly random 16-bit operands, accuracy is about 99.86 % (the end-to-end testbench
  prints its own figure for its vector set);
* for the first worked example alone, accuracy is 99.89 %;
* when both operands are below 256, the whole result comes from the inaccurate byte, and
  accuracy falls to about 72 %.

So the adder suits data whose values are usually large compared with 2^INACC_BITS.

## The accurate set: mirror full adders

`accurate_rca` is a plain ripple-carry adder. Its carry-in is tied to 0, and its carry-out
becomes the result's MSB. Its cell, `mirror_full_adder`, is written in the carry-first form of
the 24-transistor mirror adder:

```
co_n = ~(a & b | ci & (a | b))
s    = a & b & ci | co_n & (a | b | ci)
```

The mirror adder is chosen because of its transistor-level properties: few transistors, equal
N and P networks, and a small carry node. RTL cannot keep any of those; synthesis maps the cell
to whatever the target library offers. The RTL keeps the Boolean structure, so that a
gate-level or custom flow can see what is intended. Between cells the carry is passed in true
polarity.

## Parameters

All sizes come from `hs_lp_ha_pkg` and can be overridden on `hs_lp_ha_adder`:

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 16 | operand width; the result is `WIDTH+1` bits |
| `INACC_BITS` | 8 | width of the carry-free low-order set |
| `OR_BITS` | 4 | low bits of that set that are plain OR; the rest are selection cells |

The two sets need not be equal. A wider adder, for example 32 bits, only needs new parameter
values. No split is fixed for 32 bits: the widened testbench checks both 16+16 (8 OR bits) and
24+8 (4 OR bits). A larger `INACC_BITS` shortens the carry chain but raises the error bound.

## Interface and timing

`hs_lp_ha_adder` has no clock and no reset. It is purely combinational.

| port | dir | width | |
|---|---|---|---|
| `a`, `b` | in | `WIDTH` | operands |
| `sum` | out | `WIDTH+1` | approximate sum |
| `set_flag` | out | 1 | the upper-nibble flag chain fired (forced-1 path taken) |

`set_flag` is an added observation output. It can be left unconnected.

## Files

| file | content |
|---|---|
| `rtl/hs_lp_ha_pkg.sv` | default sizes |
| `rtl/mirror_full_adder.sv` | carry-first full adder cell |
| `rtl/accurate_rca.sv` | ripple-carry adder of the accurate set |
| `rtl/lower_nibble_or.sv` | OR cells of the lowest bits |
| `rtl/upper_nibble_cell.sv` | one selection cell (OR / forced 1, flag in and out) |
| `rtl/upper_nibble.sv` | chain of selection cells |
| `rtl/inaccurate_lower_byte.sv` | the two nibbles together |
| `rtl/hs_lp_ha_adder.sv` | top level |
| `tb/hs_lp_ha_ref_pkg.sv` | bit-serial reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_hs_lp_ha_adder_w32` |

## Verification

Each testbench compares the RTL against values that it works out on its own:

* arithmetic for the full adder and the ripple-carry adder;
* a truth table for the selection cell;
* the bit-serial model in `hs_lp_ha_ref_pkg` for the nibbles, the byte and the adder.

Coverage by module:

* **Small blocks.** The cells, the nibbles, the 8-bit ripple-carry adder and the inaccurate byte
  are checked exhaustively.
* **`tb_hs_lp_ha_adder`** runs the top at its default parameters. It checks both worked examples
  bit for bit. Then it runs all 65536 low-byte pairs under random high bytes, and 200000 random
  operand pairs. It also checks the 255 error bound on every vector.
* **Mechanism counts.** The testbenches count each mechanism and fail if one never occurs: the
  forced-1 path, the OR-only path, a carry-out, and a carry rippling through all eight accurate
  cells.
* **`tb_hs_lp_ha_adder_w32`** checks two 32-bit configurations.

Each testbench prints one line, `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hs_lp_ha_pkg.sv tb/hs_lp_ha_ref_pkg.sv tb/tb_hs_lp_ha_adder.sv \
    --top-module tb_hs_lp_ha_adder -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second.

## What is interpreted, and what is left out

* **Scan direction in the upper nibble.** The rule "if any two input bits are 1, set the sum
  bits to 1, otherwise continue the OR" can also be read as "one 1+1 anywhere forces the whole
  nibble to 1". Here it is built as a chain that starts at the nibble's LSB, with its input tied
  to 0, so a 1+1 forces its own position and the positions above it. In the worked example the
  two readings agree. To get the other reading, drive every cell's `set_in` from an OR of all
  four `a & b` terms.
* **The 2:1 mux** in the selection cell selects between `a | b` and a constant 1. Its select is
  the flag.
* **No carry crosses between the sets.** The carry-in of the accurate set is 0. Both worked
  examples show the high part unchanged by the low bytes.
* **Circuit-level results are left out.** Transistor sizes, the transistor counts, and the power
  and delay figures measured in a 0.12 um process describe a custom-circuit implementation. They
  have no RTL equivalent and are not reproduced.
* **`set_flag`** is an addition for observation. It is not part of the original design.
