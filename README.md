# Approximate SRAM compute-in-memory PE

A processing element (PE) for digital compute-in-memory. The PE keeps one
operand of each multiplication, typically the weights, in a small SRAM array.
It streams the other operand past that array and multiplies word by word in
a multiplier placed next to the memory. Neural-network and image workloads
tolerate small arithmetic errors, so the multiplier can be swapped for
cheaper approximate ones that save area and power. The RTL provides three
interchangeable multipliers behind one PE:

| `MULT_KIND`     | multiplier                                        | error                                   |
|-----------------|---------------------------------------------------|-----------------------------------------|
| `MULT_EXACT`    | partial products reduced by exact 4-2 compressors | none                                    |
| `MULT_APPROX42` | same tree, approximate compressors in the 8 low columns | small, never above the true product |
| `MULT_LOG`      | logarithmic with error compensation (default) | about 1.5 % mean relative error, both signs |

The architecture follows the OpenACiM/OpenACM approximate CiM compiler
(FreePDK45 / OpenROAD flow). The compiler generates a PE with exactly this
block set, pin list and choice of multipliers. This is an independent RTL
implementation of that architecture. It is not the compiler's output, and
where the published description leaves details open, the choices below are
this implementation's own.

## Block structure

```
                +-----------------------------------------------------------+
 CLK, RST_N --->|  pe_macro                                                 |
 PE_CE -------->|  pe_ctrl ---- ce/we/addr ----> sram_macro                 |
 INIT_ENABLE -->|     |                          (ROWS x COLS x BANKS)      |
 INIT_DONE <----|     | load                      WD_IN ^      | RD_OUT     |
                |     v                                 |      v (stored)   |
 DATA_IN ------>|  input_buffer ----------- operand ----+--> multiplier      |
                |                                            (MULT_KIND)    |
 DATA_OUT <-----|  output_buffer <------- product, mult_valid -----+        |
 VALID_OUT <----|                                                           |
                +-----------------------------------------------------------+
```

| file | role |
|------|------|
| `rtl/acim_pkg.sv` | `mult_kind_e` enum that selects the multiplier |
| `rtl/pe_macro.sv` | top level; selects the multiplier at elaboration |
| `rtl/pe_ctrl.sv` | sequencing of initialisation and streaming |
| `rtl/input_buffer.sv`, `rtl/output_buffer.sv` | one-stage I/O registers |
| `rtl/sram_macro.sv` | logical model of the banked 6T SRAM macro |
| `rtl/cmp42_mult.sv` | compressor-tree multiplier (exact or approximate) |
| `rtl/cmp42_exact.sv`, `rtl/full_adder.sv` | exact 4-2 compressor from two full adders |
| `rtl/cmp42_approx.sv` | approximate 4-2 compressor |
| `rtl/log_mult.sv` | logarithmic multiplier = `lm_ap` + `lm_ep` + OR + adder |
| `rtl/lm_ap.sv` | approximate-part element (leading-one logic, shifts, Adder1/2, decoder) |
| `rtl/lm_ep.sv` | error-part element (compare, nearest-one rounding, shift) |

## Using the PE

Parameters of `pe_macro`: `ROWS` (16), `COLS` (8), `WORD` (8), `BANKS` (1),
`MULT_KIND` (`MULT_LOG`), `APPROX_COLS` (8), `SIGNED` (0). The array holds
`DEPTH = BANKS * ROWS * COLS / WORD` words of `WORD` bits. The default holds
16 bytes. `DATA_OUT` is `2*WORD` bits wide.

Arithmetic is unsigned by default. With `SIGNED = 1`, `DATA_IN`, the stored
words and `DATA_OUT` are two's complement. The multiplier then gets the two
magnitudes, and the product is negated when the signs differ. So each
multiplier keeps its unsigned error behaviour, mirrored around zero. The
magnitude of -2^(WORD-1) is 2^(WORD-1), which still fits in `WORD` bits.
`WORD` can be any width of at least 2.

1. **Load.** Raise `INIT_ENABLE` and present the `DEPTH` words on `DATA_IN`,
   one per clock cycle while `INIT_ENABLE` is high. Dropping `INIT_ENABLE`
   pauses the load. Words beyond the `DEPTH`-th are ignored. Word *i* goes
   to address *i*. `INIT_DONE` rises two cycles after the last word was
   presented and stays high.
2. **Stream.** Once `INIT_DONE` is high, each cycle with `PE_CE` high takes
   `DATA_IN` as an operand and multiplies it with the next stored word. The
   stored words are used in order 0, 1, …, `DEPTH-1`, 0, …. The product
   appears on `DATA_OUT` with `VALID_OUT` high exactly two cycles later.
   Throughput is one product per cycle, and `PE_CE` low simply stalls.
   `PE_CE` is ignored while `INIT_ENABLE` is high.
3. **Reload.** A new rising edge of `INIT_ENABLE` after a completed load
   clears `INIT_DONE` and restarts at address 0. The read pointer also
   returns to 0.

Pipeline: in cycle *t* the input buffer captures the operand and the SRAM
reads the stored word, both on the same edge. In cycle *t+1* both are at the
combinational multiplier, and the output buffer registers the product. Reset
(`RST_N`, asynchronous, active low) clears the control state and the buffers
but not the SRAM contents. During a load, the word captured in cycle *t* is
written on the edge that ends cycle *t+1*, so loads and reads never compete
for the single SRAM port. An assertion in `pe_ctrl` checks this.

## The SRAM model

`sram_macro` has the interface of a FakeRAM-style abstract macro: `CLK`,
`CE_IN`, `WE_IN`, `ADDR_IN`, `WD_IN`, `RD_OUT`. This lets the real macro
replace it in a place-and-route flow. Internally it models the logical part
of a banked 6T array:

- The address splits, low to high, into a column-mux select, a row and a
  bank.
- A row decoder raises one word line. The selected row goes to the column
  multiplexer.
- Each row stores `COLS/WORD` words interleaved bit by bit. Bit *j* of word
  *m* is in column `j*MUX + m`.
- On a clock edge with `CE_IN` high, a write stores `WD_IN`, and a read
  loads the data latches. `RD_OUT` holds the last read value across idle
  cycles and writes.

The macro's circuits (precharge, sense amplifiers, word-line and write
drivers, and the replica-bitline timing controller) and the 6T cell itself
have no logic function of their own. They are not modelled beyond this
one-cycle access. The timing knobs of the real macro, such as sense-enable
and precharge timing, therefore do not appear here. Neither does any
subarray split within a bank.

## Compressor-tree multipliers

`cmp42_mult #(N, APPROX_COLS)` works in three steps:

1. **Partial products.** N rows, row *j* = `a & {N{b[j]}}` shifted by *j*.
2. **Reduction.** At each level the rows are taken four at a time. In
   every column, one 4-2 compressor turns the four bits into a sum bit (same
   column) and a carry (next column). The exact compressor also passes a
   `cout` into the `cin` of the neighbouring column's compressor. `cout`
   does not depend on `cin`, so this chain does not ripple. Each group of
   four rows becomes two. Three left-over rows go through a row of full
   adders, and one or two left-over rows pass to the next level unchanged.
   Levels repeat until two rows remain: 8 → 4 → 2 for 8 bits, and
   12 → 6 → 4 → 2 for 12 bits.
3. **Final addition** of the last two rows by a carry-propagate adder.

The exact compressor is two cascaded full adders, with
`x1+x2+x3+x4+cin = s + 2(c+cout)`. Columns `0 … APPROX_COLS-1` use
`cmp42_approx` instead. It has no carry chain, and `2c + s` equals the
number of ones saturated at 3, so it errs by −1 only for input `1111`.
This compressor function is this implementation's choice. The published
evaluation uses a specific compressor from the literature ("Yang1"), whose
equations are not reproduced here. Any other approximate compressor with the
same ports can be dropped into `cmp42_approx.sv`.

Error bound: an approximate compressor in column *i* can only lose 2^i.
For a power-of-two `N` there are `N/2 − 1` compressors per column over all
levels. With approximation in columns 0…7, the product is therefore never
above `a*b` and never more than `(N/2 − 1) · 255` below it.

Differences from the published design: it places HAs, FAs and compressors
column by column in an irregular dot diagram. Here the tree is a regular
row-group tree that is easy to parameterise. The position of the approximation
(the eight low columns) and the kinds of cells used are the same, but the
number of cells and the exact error distribution differ.

## Logarithmic multiplier with compensation

This is the least obvious part of the design. Write each operand as a power
of two plus a remainder: `A = 2^k1 + qa` and `B = 2^k2 + qb`, where *k* is
the position of the leading one and `q < 2^k`. Then, exactly,

```
A*B = 2^(k1+k2) + qa*2^k2 + qb*2^k1 + qa*qb
      \_____ approximate part (AP) _____/  \_ error part (EP) _/
```

Keeping only the AP needs nothing but leading-one detection, shifts and
additions. This is the core of Mitchell's logarithmic multiplier, but on its
own it always underestimates, by up to 25 % when both remainders approach
2^k. This design also estimates the EP without a multiplier:

- **Compare and round the larger remainder.** Let `Q1 = max(qa, qb)` and
  `Q2 = min(qa, qb)`. Round `Q1` to the nearest power of two. If its
  leading one is at *k*, it rounds up to `2^(k+1)` when bit *k−1* is set,
  and down to `2^k` otherwise. Then `round(Q1)*Q2` is just `Q2` shifted
  left. Rounding the larger operand rather than the smaller gives the lower
  worst-case error of the EP estimate: 3·4^(n−3) instead of
  4^(n−2) − 2^(n−3) for *n*-bit operands. At 8 bits, `tb_lm_ep` measures
  3072 and 4064 over all remainder pairs.
- **No adder for the compensation.** Suppose `Q1` comes from A. Then
  `round(Q1) ≤ 2^k1` and `Q2 < 2^k2`, so `round(Q1)*Q2 < 2^(k1+k2)`. The
  same holds with A and B swapped. Since `2^(k1+k2)` is a single one bit
  above all bits of the compensation, the two are combined with a bitwise OR.

```
P = ( 2^(k1+k2) | round(Q1)*Q2 ) + ( qa<<k2 + qb<<k1 )
```

Hardware mapping:

- **`lm_ap`** has, per operand, a leading-one detector (one-hot) and a
  priority encoder that give *k*. An XOR with the one-hot vector strips the
  leading one to give *q*. Adder1 adds `k1+k2`, and a decoder turns the sum
  into `2^(k1+k2)`. Two barrel shifters form `qa<<k2` and `qb<<k1`, and
  Adder2 adds them.
- **`lm_ep`** has a comparator whose two multiplexers pick `Q1` and `Q2`. A
  nearest-one detector gives the one-hot `round(Q1)`, a priority encoder
  gives its exponent, and a barrel shifter shifts `Q2`.
- **`log_mult`** has the OR gate and Adder3. A zero operand has no leading
  one, so this implementation forces the product to 0 in that case.
  `COMPENSATE = 0` drops the EP and leaves the AP alone, which is useful
  as a reference.

The result can be above or below the true product. The errors are roughly
zero-mean, which helps when many products are accumulated.

## Measured accuracy

These are the testbenches' own measurements, with uniformly random or
synthetic operands:

| | mean relative error | other |
|---|---|---|
| log, 8-bit, all operand pairs | 1.48 % (AP only, without compensation: 8.9 %) | |
| log, 16 / 32-bit PEs, random operands | 1.6 % / 1.5 % | |
| approx 4-2, 8-bit PE | 1.4e-4 | 1821 of 65536 products inexact, max error 568 |
| approx 4-2, 16 / 32-bit PEs | 2.6e-8 / 3.4e-16 | |
| 32×32 multiply-blend image (8-bit) | | PSNR: approx 4-2 72.2 dB, log 37.6 dB, AP only 26.7 dB |
| log, 32-bit signed conv-layer products | 1.73 % (8155 over, 7973 under) | |
| 32×32 Sobel edge image (16-bit signed) | | PSNR: approx 4-2 68.6 dB, log 53.0 dB |

## Configurations and workloads

| configuration | parameters | holds |
|---|---|---|
| 16×8 array, 8-bit (default) | `ROWS=16 COLS=8 WORD=8` | 16 words |
| 32×16 array, 16-bit | `ROWS=32 COLS=16 WORD=16` | 32 words |
| 64×32 array, 32-bit | `ROWS=64 COLS=32 WORD=32` | 64 words |

All three configurations are simulated with each multiplier in
`tb/tb_pe_sizes.sv`. Image blending with an 8-bit unsigned multiplier runs on
the default PE (`tb/tb_blend.sv`).

Sobel edge detection runs on 16-bit signed PEs (`tb/tb_edge.sv`, `WORD=16`,
`SIGNED=1`). Both the convolution and the squaring run on the PEs. For the
convolution, the SRAM holds the Gx and Gy kernels, and each pixel's 3×3
window is streamed twice. The square root is computed exactly in the
testbench. The kernel holds only 0, ±1 and ±2, so every multiplier gives
exact gradients. The approximation shows up only in the squares.

CNN inference with 32-bit fixed-point arithmetic (ResNet-18 in the
published evaluation) is covered only by a scaled-down piece,
`tb/tb_conv_layer.sv`. It runs one 3×3 convolution layer with ReLU on 32-bit
signed PEs (`ROWS=64 COLS=32 WORD=32 SIGNED=1`), in Q16.16 with random data.
The layer has 7 input channels of 10×10 and 4 output channels of 8×8. Each
output channel's 63 weights fill one SRAM load. A whole network is out of
reach: a single PE holds at most 64 words, a network has millions of
weights, and no system that tiles work over many PEs is described. The
testbench checks every product. It also checks that the log multiplier's
errors go in both directions, so they tend to cancel in a sum rather than
pile up.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/acim_pkg.sv tb/tb_ref_pkg.sv tb/tb_pe_macro.sv --top-module tb_pe_macro
./obj_dir/Vtb_pe_macro
```

| testbench | what it covers |
|---|---|
| `tb_pe_macro` | all three multipliers end to end. It checks loads with a pause, ignored extra words, random stalls, address wrap, reload, the two-cycle latency, every product, and rounding in both directions. |
| `tb_pe_macro_full` | default PE with no parameter overrides: full load, 48 products back to back |
| `tb_pe_sizes` | the 8/16/32-bit array configurations × three multipliers |
| `tb_blend` | image-blending workload, PSNR checks |
| `tb_edge` | Sobel edge-detection workload on 16-bit signed PEs, PSNR checks |
| `tb_conv_layer` | one 3×3 convolution layer in 32-bit signed fixed point |
| `tb_pe_signed` | signed mode: every signed 8-bit operand pair on all three multipliers |
| `tb_pe_ctrl`, `tb_sram_macro`, `tb_input_buffer`, `tb_output_buffer` | unit tests |
| `tb_cmp42_exact`, `tb_cmp42_approx`, `tb_cmp42_mult` | compressors exhaustively; the tree exhaustively at 3, 5, 6, 7 and 8 bits and randomly at 12, 16 and 32 bits |
| `tb_lm_ap`, `tb_lm_ep`, `tb_log_mult` | log-multiplier parts exhaustively at 8 bits, plus random 16/32-bit checks |

`tb/tb_ref_pkg.sv` holds the integer reference models: leading-one position,
nearest power of two, and the compensated log product.
