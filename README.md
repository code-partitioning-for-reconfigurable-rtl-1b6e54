# Separable 2D image convolution on a two-FPGA reconfigurable processor

This design computes a 2D convolution of a single-precision image with a
separable 21 x 21 kernel, the core of a stellar-photometry code that convolves
a synthetic image with a damped sinc. Because the kernel is separable,
`h[i,j] = Hc[i] * Hr[j]`, the 2D convolution becomes a 21-tap 1D
convolution along every row followed by a 21-tap 1D convolution down every
column:

    R[m,n] = sum_j A[m, n+j] * Hr[j]          (row pass)
    B[m,n] = sum_i R[m+i, n] * Hc[i]          (column pass)

with pixels beyond the last row or column read as zero. The output has the
size of the input.

The main idea is how the work is split across the system. The host
makes **one** call, and the whole algorithm then runs on a MAP-style
reconfigurable processor. That processor has two user FPGAs and six 64-bit x
4 MB on-board memory banks A-F. The host does not copy or transpose the
image, and the DMA engine runs only once per image in each direction:

* the **primary FPGA** loads both kernels and the image into on-board
  memory, does the row pass from banks A-C into banks D-F, hands over, and
  finally DMAs the result back;
* the **secondary FPGA** waits for the hand-over and does the column pass
  from banks D-F back into banks A-C.

Each chip has room for two fully unrolled 21-tap floating-point
convolutions. That is 42 multipliers and 40 adders per chip, so each pass
produces two output pixels per clock cycle.

## Data layout and address map

All on-board memory (OBM) traffic uses one *linear word address*:
`bank = addr >> 19`, `offset = addr & (2^19-1)`. Banks A, B and C are therefore
one contiguous 12 MB region (words 0 .. 3*2^19-1), and so are D, E and F.

| Region | Contents |
|---|---|
| A-C, word `m*N/2 + k` | input pixels `(m, 2k)` in bits 31:0 and `(m, 2k+1)` in bits 63:32; later the final result, same layout |
| D-F, same offsets | row-pass result |
| E, words 0-10 | column kernel Hc (two coefficients per word, coefficient 0 in bits 31:0) |
| F, words 0-10 | row kernel Hr |

The host's common memory uses the same layout: the image is stored row after
row with two pixels per 64-bit word, and each kernel takes 11 words. The image
must have an even width N, and `M*N/2` must not exceed `3*2^19` words, which
is the 12 MB of A-C. The largest square image that fits is 1772 x 1772. A call
with any other size finishes at once with `err` set.

The kernels sit in banks E and F, which the row pass later overwrites. For
that reason the primary chip starts writing row results only after the
secondary chip has reported that its kernel is copied (see the call sequence
below).

## The row datapath: a window that moves by two pixels

`row_conv_engine` is the heart of the primary chip. Each OBM word carries two
neighbouring pixels of a row, so the engine takes one word per cycle into a
22-pixel register window that shifts down by **two** positions:

```
             new word: pixels 2k, 2k+1
                          |
 win[0] win[1] ... win[19] win[20] win[21]     (shift by 2 each word)
 \________ dot unit 0 ________/               -> output p   = 2k-20
        \________ dot unit 1 ________/        -> output p+1 = 2k-19
```

Unit 0 sees `win[0..20]` and unit 1 sees `win[1..21]`. After word `k` has
entered, the pair of outputs `(2k-20, 2k-19)` is produced. Words `k < 10`
therefore give no valid output. After the `N/2` real words of a row, the
controller feeds 10 zero words to flush the zero-extended tail. A row takes
`N/2 + 10` cycles. Each word carries a tag (a write enable and the
destination address) through the pipeline. The controller uses the tag to
write the result word to D-F seven cycles later. Pipeline registers are the
only state, and no stall is ever needed. The engine reads one word and writes
one word per cycle, on different banks.

`col_conv_engine` does the same job down the columns. A word read from row m
holds a pixel of column n and one of column n+1. So the secondary chip
processes columns in **adjacent pairs**, with one 21-pixel window per column,
each shifting by **one** pixel per word. The two results go back into one word
with the same layout. A column pair takes `M + 20` cycles, because 20 zero
words flush the tail. The read address steps by `N/2` words per row.

Each output is one `conv_dot21`: 21 multipliers followed by a balanced adder
tree of 20 adders. The tree adds neighbours pairwise, and at each level an odd
element is carried up through a register. The latency is 1 + 5 = 6 cycles, and
a new set of 21 inputs can enter every cycle. The summation order is fixed.
Results are therefore bit-exact and reproducible, but they can differ in the
last bits from a sequential loop over the taps.

## Floating-point units

`fp32_mul` and `fp32_add` are single-precision units, each with one pipeline
stage. They round to nearest, ties to even. Subnormal inputs are read as
zero, and subnormal results are flushed to zero, as FPGA floating-point cores
commonly do. Infinity and NaN are handled in a simplified IEEE manner. The
original system used vendor area-optimised macros whose internals are not
public. These units match that function, not the macros' area or latency.

## Call sequence and the master/slave hand-over

| Step | Primary FPGA | Secondary FPGA |
|---|---|---|
| 1 | DMA Hc -> bank E, DMA Hr -> bank F, pulse `sec_load` | idle |
| 2 | copy Hr from F into registers | copy Hc from E into registers, pulse `coef_ok` |
| 3 | DMA the image -> A-C (one transfer) | wait |
| 4 | wait for `coef_ok` (if not yet seen) | wait |
| 5 | row pass A-C -> D-F, then drain the pipeline | wait |
| 6 | pulse `sec_go`, wait | column pass D-F -> A-C, pulse `done` |
| 7 | DMA A-C -> host (one transfer), pulse `done` | idle |

`obm_interconnect` connects five masters to the six banks: the DMA engine, the
read and write sides of the primary chip, and the read and write sides of the
secondary chip. The call sequence never lets two masters use one bank in the
same cycle. If that happened anyway, the lowest-numbered port would win, the
`obm_conflict` output would rise, and an assertion would fire in simulation.

`dma_engine` moves blocks of words between common memory and OBM. Common
memory uses a request/grant handshake with in-order read returns. The engine
issues reads back to back. On the way out it uses a 4-entry skid buffer. It
moves one word per cycle whenever the memory grants every cycle.

## Timing

At one word per cycle in every phase, a call takes about

    2*(11 + latency)              kernel DMAs
    + M*N/2                       image in
    + M*(N/2 + 10)                row pass
    + N/2*(M + 20)                column pass
    + M*N/2                       image out

cycles. In simulation with a memory that grants every request, a
1024 x 1024 image takes 2,117,723 cycles (21 ms at the FPGAs' 100 MHz) and
1772 x 1772 takes 6,315,502 cycles (63 ms). Both are close to the roughly
22 ms and 65 ms of MAP execution time measured for this partitioning on the
original hardware. The cost of starting a call on the host, about 0.135 s on
the original platform, lies outside this RTL.

## How far to trust it, and where it departs

* The two-chip split, the bank use in each phase, the two parallel 21-tap
  units per chip, the shift-by-two row window, the 64-bit x 4 MB banks and the
  12 MB image limit all follow the system described for this partitioning.
* The following are this design's own choices: the column datapath (adjacent
  column pairs), the zero extension at the image edges, the pixel packing, the
  address map, the kernel hand-shake that protects bank E, the one-cycle bank
  read latency, the DMA engine and its host handshake, and all pipeline
  depths.
* The floating-point units stand in for vendor macros (see above).
* The host CPU, the host interface board, the switch, the control FPGA and
  the 4 MB inter-FPGA memory are not modelled. Common memory appears only as
  a testbench model.
* The OBM banks are written as memory arrays (6 x 4 MB). For an FPGA or ASIC
  flow, replace `obm_bank` with the real memory interface.
* Every block has a self-checking testbench. The end-to-end tests compare
  every output pixel, bit for bit, with an independent reference. That
  reference computes each multiply and add in double precision and rounds it
  to single precision, in the same summation order as the hardware. Image
  sizes tested: 24x12, 3x50, 1x2, 40x64, 1024x1024 and 1772x1772. The tests
  also cover rejected sizes (odd width, and 1774x1774 as too large).

## Files

`rtl/` holds one module or package per file:

* `map_pkg` holds the shared constants and types: `TAPS`, the bank geometry,
  and the `obm_req_t`, `host_req_t` and `dma_cmd_t` structs.
* The datapath is `fp32_mul`, `fp32_add`, `conv_dot21`, `row_conv_engine` and
  `col_conv_engine`.
* The chips are `coef_loader`, `primary_fpga` and `secondary_fpga`.
* The memory system is `obm_bank`, `obm_interconnect` and `dma_engine`.
* `map_top` is the top level.

`tb/` holds one testbench per module (`<module>_tb`) and `map_top_workload_tb`,
which runs the two large images. Some files there are for the testbenches
only:

* `fp_ref_pkg` is the reference arithmetic.
* `host_mem_model` models common memory, with random grant and latency.
* `obm_model` is a sparse bank model used by the chip-level tests.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/map_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/host_mem_model.sv tb/map_top_tb.sv \
  --top-module map_top_tb -Mdir obj_map_top
./obj_map_top/Vmap_top_tb
```

Block tests follow the same pattern: list the packages, the block and the
modules it uses, the testbench, and `tb/obm_model.sv` for `primary_fpga_tb`
and `secondary_fpga_tb`. `map_top_tb` runs in a few seconds.
`map_top_workload_tb` (1024x1024 and 1772x1772) needs about a minute and
about 100 MB of memory.

To change the kernel width, set `TAPS` in `map_pkg` to another odd value up
to 31. The flush lengths follow it automatically; the row window needs an odd
width to line up pairs of outputs, and the 10-cycle drain covers adder trees
of up to five levels. To change the image-size limit, change `BANK_AW` and
the size check in `primary_fpga`.
