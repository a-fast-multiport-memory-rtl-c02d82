# Dual-port RAM from single-port cells, with conflicts turned into correctable erasures

A dual-port RAM normally needs either dual-ported storage cells (large and slow) or time
multiplexing of a single-ported array (half the bandwidth, or random stalls when the two ports
collide). This design takes a third route. The storage is split into small **single-port
bins**. Each bin can serve only one port per cycle. When both ports need the same bin, one port
simply loses that bin's bit. The bits of a word are spread over the bins using arithmetic in a
Galois field, so that **two different words share a bin in at most one column**. A collision
therefore costs the losing port at most one bit, and the memory knows which bit it is. One
parity bit per word is enough to restore a bit whose position is known (an *erasure*). Both
ports get correct data every cycle, with a fixed latency and no stalls.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is parameterised. Its default is a
16-word memory with 4 stored bits per word (3 data bits and a parity bit), organised as 4 columns
of 4 bins of 4 bits each.

## Organisation: columns and bins

A word is stored as `B` bits: `B-1` data bits and one parity bit. Every stored bit position is
its own **column**, or bit plane: column `y` holds bit `y` of every word. The data bits occupy
columns `0 .. B-2` and the parity bit occupies column `B-1`.

The address `x` has `N0+N1` bits and is split into two parts:

* `x0`, the upper `N0` bits, picks a bin;
* `x1`, the lower `N1` bits, is the bit offset inside the bin.

Each column has `2**N0` bins of `2**N1` bits, so a column stores exactly `2**(N0+N1)` bits, one
per word.

In a plain memory, bit `y` of word `x` would sit in bin `x0` of every column. Two ports reading
different words with the same `x0` would then collide in *every* column. This design instead
gives each column its own mapping:

```
bin(x0, x1, y) = x0 (+) x1 (*) y          arithmetic in GF(2^N0)
```

The offset inside the bin stays `x1`.

## The addressing rule, and why it bounds the damage

In `GF(2^N0)`, addition `(+)` is bitwise XOR. Multiplication `(*)` is carry-less polynomial
multiplication, reduced modulo a primitive polynomial of degree `N0`. `mpmem_pkg` lists one
polynomial for each `N0` from 1 to 16; the default `N0 = 2` uses `x^2 + x + 1`. The column
index `y` is used directly as a field element. The offset `x1` becomes a field element by
placing its `N1` bits at the top of an `N0`-bit value, with zeros below.

As a function of `y`, the bin index is a straight line with intercept `x0` and slope `x1`. Two
different addresses are two different lines, and two different lines meet at most once.
Therefore two different addresses land in the same bin in at most one column. The offset is
part of the address, so the two words' bits never share a *cell*. They may, however, share a
*bin*, and a single-port bin can serve only one of them.

For the default size (`N0 = N1 = 2`, field elements 0..3, where 2·2 = 3, 2·3 = 1 and 3·3 = 2),
the bins used by each column are:

| address | col 0 | col 1 | col 2 | col 3 (parity) |
|---------|-------|-------|-------|----------------|
| 1001    | 2     | 3     | 0     | 1              |
| 0111    | 1     | 2     | 0     | 3              |

Suppose port A reads 1001 and port B reads 0111 in the same cycle. The two words meet only in
column 2, at bin 0. Port A keeps that bin, so port B's bit 2 is erased and then rebuilt from
parity.

At this small size every column index is used, so any two addresses with different `x1` meet
in exactly one column. Two addresses with the same `x1` never meet.

The rule needs `B` distinct field elements, so `B <= 2**N0`. It also needs `N1 <= N0`. Both
limits are checked at elaboration.

Each column has one address generator per port (`gf_bin_addr`). Since `y` is a constant for a
column, the generator reduces to a fixed XOR network. Its output goes to a one-hot decoder
(`bin_decoder`) that selects the bin.

## Who wins a bin

Each bin (`dp_bin`) is one single-port array of `2**N1` bits. It has a 2:1 multiplexer that
feeds it the offset, read/write and write bit of whichever port owns it in that cycle.

| ports selecting the bin | outcome |
|---|---|
| one port | that port is served |
| both, same cell, at most one writes | one access serves both; a reader gets the bit being written, or the bit read |
| both, otherwise, port B writes and port A reads | **port B** is served; port A's bit is erased (`e_a`) |
| both, otherwise | **port A** is served; port B's bit is erased (`e`) |

"Same cell" means the same address, so this row covers two reads of one word and a read of the
word being written.

A writer always wins a bin against a reader. A write therefore never loses a bit, and every
stored word keeps a valid parity bit. This is why only one port may write per cycle: two
conflicting writes would leave a word with a wrong bit and nothing to mark it. An assertion in
`mpmem_dp` flags both ports writing in the same cycle. If it happens anyway, port A wins the
shared bin and port B's word is stored with one stale bit.

Each column ORs its bins' read bits and erasure flags. An unselected or losing bin drives 0.
The result is one read bit and one erasure flag per port per column.

## Erasure correction

Every word is stored with **odd** parity. `parity_gen` computes the parity bit as the XNOR of the
data bits, on each port's write path.

On the read path, `erasure_corrector` receives the `B` bits read and the `B` column erasure
flags. It fills the flagged position with `NOT(XOR of the other bits)`. For example, the 9-bit
word `01?110100` must have a 1 in place of the `?`.

The addressing guarantees at most one flagged column per port, and `mpmem_dp` asserts this.
Either port can lose a bin: port B to a port A access, or port A to a writing port B. Each port
therefore has its own corrector.

## Interface and timing (`mpmem_dp`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, which makes every word zero with parity 1 |
| `a_addr`, `b_addr` | in | `N0+N1` | address, `x0` in the upper bits |
| `a_rw_n`, `b_rw_n` | in | 1 | 1 = read, 0 = write |
| `a_wdata`, `b_wdata` | in | `B-1` | write data |
| `a_rdata`, `b_rdata` | out | `B-1` | read data, corrected |
| `a_corrected`, `b_corrected` | out | 1 | this read had an erased bit filled from parity |

* Both ports issue a request on every rising edge; there is no idle state, and an unused port
  simply reads.
* Writes complete at that edge.
* Read data and the `corrected` flags appear in the following cycle. The latency is always
  exactly one cycle, with or without a conflict.
* `rdata` is meaningful only for a read request.
* A read of the address the other port writes in the same cycle returns the new data.
* Rule of use: at most one port writes per cycle. Either port may be the writer.

| parameter | default | meaning |
|---|---|---|
| `N0` | 2 | bin-index bits: `2**N0` bins per column (at most 16) |
| `N1` | 2 | offset bits: `2**N1` bits per bin; `N1 <= N0` |
| `B`  | 4 | stored bits per word, parity included; `2 <= B <= 2**N0` |

For byte-wide data use, for example, `N0 = 4, N1 = 4, B = 9`: 256 words of 8 data bits.

## Cost

Compared with a single-port array of the same size, the design adds:

* a second address generator and decoder per column;
* a 2:1 input multiplexer and one erasure flag per bin;
* one parity column;
* a parity generator and an erasure corrector per port.

The storage cells stay single-ported, and the data path is never time-multiplexed.

## Files

| file | content |
|---|---|
| `rtl/mpmem_pkg.sv` | field polynomials and GF multiplication function |
| `rtl/gf_bin_addr.sv` | `bin = x0 ^ (x1 * y)` for one column |
| `rtl/bin_decoder.sv` | bin index to one-hot bin selects |
| `rtl/dp_bin.sv` | single-port bin with two-port front end, priority and erasure outputs |
| `rtl/mem_column.sv` | one column: 2 address generators, 2 decoders, `2**N0` bins |
| `rtl/parity_gen.sv` | odd-parity bit |
| `rtl/erasure_corrector.sv` | single-erasure fill from parity |
| `rtl/mpmem_dp.sv` | the memory (top) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mpmem_dp_b9` (256 x 8-bit size) |
| `tb/tb_ref_pkg.sv` | independent GF reference for the testbenches |

## Verification

Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog. The tests compare
against reference models written separately from the RTL. The GF reference multiplies fully and
then divides by the polynomial; the RTL instead reduces after each shift.

* `tb_gf_bin_addr` checks every address and column at two sizes (`N0 = N1 = 2`;
  `N0 = 3, N1 = 2`). It also checks that every pair of distinct addresses shares at most one
  bin.
* `tb_dp_bin` and `tb_mem_column` run random two-port traffic against cell-level models,
  including the ownership and erasure rules. Each conflict case must occur at least once.
* `tb_parity_gen` tests exhaustively. `tb_erasure_corrector` tests every 9-bit codeword with
  every erased position and garbage in it, plus the worked example above.
* `tb_mpmem_dp` runs the default-size memory through these phases:
  * reset contents;
  * a fill through port A;
  * every pair of distinct addresses read at once;
  * 20,000 cycles of random traffic with either port writing.

  It checks every read one cycle after the request, and predicts the `corrected` flags. It
  counts corrections on both ports, conflict-free pairs, same-address reads, reads of a word
  being written, and writes through each port; each must occur. `tb_mpmem_dp_b9` runs the same
  test at 256 words × 8 data bits.

To run one test with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mpmem_pkg.sv tb/tb_ref_pkg.sv \
    rtl/*.sv tb/tb_mpmem_dp.sv --top-module tb_mpmem_dp
./obj_dir/Vtb_mpmem_dp
```

## Design choices and limits

These points are choices made for this RTL, not part of the underlying scheme:

* **Clocked, registered read.** The scheme itself is timing-agnostic. This RTL registers the
  bin outputs (one-cycle read latency) and performs writes at the clock edge.
* **Separate read and write buses** replace the bidirectional data bus of a classic RAM part.
* **Either port may write** (one per cycle). This adds the writer-priority rule, and with it an
  erasure flag and a corrector on port A. If you only ever write through port A, port A's
  corrector never acts and could be removed.
* **Read of a word being written** returns the new word.
* **Reset** initialises the whole array (as flip-flops), so reads before any write are valid.
  A real SRAM macro would not do this; without a reset, fill the memory before reading it.
* **Field polynomial, column numbering** (`y = 0 .. B-1`, parity last) and the placement of
  `x1` in the upper bits of the field element are arbitrary. Any injective embedding and any
  irreducible polynomial keep the one-overlap property.
* **Not included:**
  * memories with more than two ports;
  * two writes in the same cycle.

  Both generalise the scheme. With `p` ports a word can lose up to `p-1` bits, or twice that if
  every port may write, so they need an erasure code stronger than a single parity bit. That
  code is not specified here.
* The bins are written as flip-flop arrays, so synthesis maps them to registers. For a real
  macro-based build, replace the array inside `dp_bin` with a single-port SRAM wrapper. Keep the
  front-end multiplexer and the erasure logic.
