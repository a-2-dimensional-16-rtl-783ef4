# 2-D 16 x 16 DCT core with bit-serial distributed arithmetic

This is a real-time 2-D transform core for video. It computes the 16 x 16 point *Modified
Symmetric DCT* (MSDCT) of a stream of image blocks and takes one pixel every two clock cycles, so
a 512 x 512 image at 32 frames/s needs a 16.8 MHz clock. It has no multipliers. One 1-D
processor holds sixteen small ROM-plus-accumulator units (distributed arithmetic, DA), and
together they compute a complete 16-point transform every 16 cycles by processing their inputs
one bit at a time. The processor alternates between a row of the current block and a column of
the previous block, so nothing ever idles. A 256-word memory holds the row results and performs
the transposition between the two passes.

The architecture follows a published 2 um CMOS chip design, rebuilt here as synthesizable
SystemVerilog. These things follow that design: the block structure, the 16-bit data and 10-bit
coefficient word lengths, the pre-add/pre-subtract symmetry, the carry-save accumulator with
pipeline registers, and the four-step row/column schedule. Everything else is this
implementation's own choice and is marked as such below and in each file's header: the port
protocol, the numeric scaling and rounding, the memory addressing, the exact counters and reset.

## The transform

For N = 16 points:

    X(k) = sqrt(2/(N-1)) * sum_{n=0}^{N-1} c_n x(n) cos(n k pi / (N-1)),   c_0 = c_15 = 1/2, others 1

The matrix is its own inverse (T*T = I), so the same core computes the inverse transform as
well. The 2-D transform is 16 row transforms followed by 16 column transforms.

Row k of the matrix is symmetric about its centre for even k and antisymmetric for odd k.
Every output is therefore an 8-term inner product of the mirrored sums or differences:

    X(k) = sum_{n=0}^{7} a_kn * (x(n) + x(15-n))   k even
    X(k) = sum_{n=0}^{7} a_kn * (x(n) - x(15-n))   k odd

This cuts each DA processor's ROM from 2^16 to 2^8 = 256 words.

## Distributed arithmetic in one processor

The inputs u_n of an inner product arrive bit-serially, least significant bit first, all eight
in parallel. In cycle j the eight bits u_n[j] form a ROM address, and the ROM returns
F_j = sum_n a_kn * u_n[j]. The inner product is then

    y = sum_{j=0}^{14} F_j 2^j  -  F_15 2^15        (bit 15 is the two's complement sign bit)

This is evaluated by Horner's rule: add F_j, shift right one place, repeat, and subtract on the
sign-bit cycle. The ROM contents are computed at elaboration in `dct_pkg`. Each coefficient
is rounded to a_kn = round(128 * sqrt(2/15) * c_n * cos(n k pi/15)), and the word at address
`a` is the sum of the a_kn whose address bit is set. Every word fits the 10-bit ROM word; the
largest is 352. Seven fraction bits are the most that fit.

### The carry-save accumulator (`csa_alu`)

This is the part that takes the most care. The accumulator is W = 10 bit slices wide, not 16
plus 10, because each cycle's finished low-order bit leaves the accumulator instead of being
kept. Each slice has a full adder whose three inputs are:
- the ROM bit, inverted on the sign-bit cycle;
- the slice's own carry register;
- the sum register of the slice above.

The sum therefore moves down one slice per cycle: that is the division by two. The top slice
feeds its own sum back, which sign-extends the value. No carry ever ripples, so the critical path
is one full adder.

Why this is exact: three signed W-bit words added bitwise give a sum word s and a carry word cy
with `S + C + F = s + 2*cy` exactly, as signed values. So `floor((S + C + F) / 2) = (s >>> 1) + cy`,
and the bit shifted out is `s[0]`. The pair (sum register, carry register) represents the running
value without error and cannot overflow. Over the 16 cycles the low-order result bits leave one
per cycle from slice 0. What is left in the two registers is the high-order part.

Three details that are this implementation's own:

- **The "+1" of the sign-bit subtraction.** Subtracting F is adding ~F + 1, but the adders have
  no spare input for the 1. On the sign-bit cycle the low bit leaving slice 0 is inverted, and
  when it was 1 the carry register of the output adder (below) starts at 1. This is the same as
  adding one at that bit position.
- **Rounding.** The sum register is cleared to 64 (half an output LSB) instead of 0. That
  constant passes through unchanged into the result, so the output is rounded to nearest
  instead of truncated.
- **Keeping the output word in one slot.** On the sign-bit cycle the sum and carry words are
  copied into pipeline registers, and the accumulator restarts at once for the next product.
  Nine of the low-order bits (result bits 7..15) are kept in a small register and copied along
  with them. During the next 16 cycles a multiplexer sends out first those nine bits, then seven
  bits (result bits 16..22) from a serial full adder that sums the pipelined sum and carry
  words. Each processor therefore emits result bits [22:7] of y + 64 in exactly the 16-cycle slot
  after the input, while the next product is being accumulated.

Bits [22:7] means the output is the transform at the same scale as the input (the ROM has 7
fraction bits), rounded to an integer and kept to 16 bits.

### The 1-D processor (`dct1d_processor`)

The processor has eight bit-serial pre-adders and eight pre-subtractors (`serial_preadd`: a
combinational sum bit and one carry flip-flop). They feed 16 DA processors (`da_processor` = `dap_rom` +
`csa_alu`): the sums drive the even outputs, the differences the odd outputs. Input words go in
over 16 cycles and results come out over the next 16, with a new transform starting every 16
cycles.

## Schedule, transposition and the intermediate memory

Time runs in 16-cycle slots, taken in pairs (a 32-cycle *period*). All four shift register
banks (SRB1 to SRB4, each 16 words of 16 bits) spend one slot in a word-parallel transfer and
one slot shifting bits:

| slot in period | 1DDP input | SRB1 | SRB2 | SRB3 | SRB4 | memory (IRM) |
|---|---|---|---|---|---|---|
| first (cycles 0-15)  | row from SRB1 | shifts out | writes to IRM | loads from IRM | receives column result | read + overwrite |
| second (16-31)       | column from SRB3 | takes `din` | receives row result | shifts out | drives `dout` | idle |

A row loaded in period p is transformed in p+1. Its result is written to the memory in p+2,
during the same cycles in which a column of the *previous* block is read out. The memory has a
single address port. In each of those cycles it returns the old word at the address and stores the
new row's word there. The new block's rows therefore take the place of the old block's columns,
so each block is stored transposed relative to the one before. The address pattern alternates
between row-major and column-major from block to block (`irm_colmajor`). No second memory and
no dual port is needed. Two blocks are always in flight: the rows of block n are being
transformed while the columns of block n-1 are.

Latency: column c of block n leaves in period 16(n+1) + c + 3. After reset, input word 0 of
block 0 is taken in cycle 16 and the first valid output word appears in cycle 624, 608 cycles
later.

## Interface of `dct2d_chip`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | single clock; asynchronous active-low reset |
| `din` | in | 16 | pixel, sampled at the rising edge while `in_load` is high |
| `in_load`, `in_row`, `in_col` | out | 1, 4, 4 | `din` is taken now, for this row/column of the current block |
| `dout` | out | 16 | coefficient, two's complement |
| `out_valid`, `out_k`, `out_col` | out | 1, 4, 4 | `dout` holds X(vertical freq `out_k`, horizontal freq `out_col`) |

The core runs freely and never stalls. After reset, the source must supply blocks back to back,
16 words in every second slot, in raster order within the block. Results leave one column per
period, 16 words in every second slot.

## Number format and precision

- All data words are 16-bit two's complement. There is no overflow detection, so inputs must
  leave guard bits. With 8-bit pixels the largest 2-D coefficient is about 255 * 30 = 7650 and
  all pre-additions and intermediate results fit easily.
- Forward results are bit-exact with the word-level model: integer coefficients, inner product,
  and rounding after each pass.
- The 10-bit coefficient word limits accuracy. Coefficients are steps of 1/128 on values up to
  0.37, so a forward transform is within about 1 % of the exact MSDCT. A forward-then-inverse
  round trip of an 8-bit image comes back within about 30 grey levels at block corners and
  about 4 on average. With 8 or 10 fraction bits the error would drop to about 5 or 2 levels,
  but the words would no longer fit 10 bits. `COEF_W` and `COEF_FRAC` in `dct_pkg` are the
  knobs; `csa_alu` requires `COEF_FRAC <= COEF_W + 1`.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | sizes (N = 16, data 16 bits, coefficient 10 bits, 7 fraction bits), coefficient and ROM-word functions |
| `rtl/dct2d_chip.sv` | top: banks, 1-D processor, memory, control, data multiplexers |
| `rtl/dct_control.sv` | slot/period counters, bank enables, memory address pattern, I/O strobes |
| `rtl/dct1d_processor.sv` | pre-adders/subtractors and 16 DA processors |
| `rtl/serial_preadd.sv` | bit-serial adder or subtractor |
| `rtl/da_processor.sv` | one DA processor: ROM + accumulator |
| `rtl/dap_rom.sv` | 256 x 10 ROM, contents computed at elaboration |
| `rtl/csa_alu.sv` | carry-save accumulator, pipeline registers, output adder and multiplexer |
| `rtl/srb.sv`, `rtl/srb_cell.sv` | shift register bank built from a one-bit cell with serial and parallel input and output |
| `rtl/irm.sv` | 256 x 16 single-port memory, read-then-overwrite in one cycle |

Every module has a testbench `tb/tb_<module>.sv`. `tb_dct1d_processor_n8` also runs the 1-D
processor as an 8-point transform (N = 8: eight processors with 16-word ROMs), which shows the
structure is not tied to 16 points. The word-level reference model is in
`tb/tb_dct_ref_pkg.sv`, and it recomputes the coefficients independently. Two testbenches exercise the whole core at
its default sizes:
- `tb_dct2d_chip` checks six blocks (random, a ±255 checkerboard, an impulse). Every output must
  be bit-exact and close to the real-valued MSDCT. It also checks the latency, the output rate
  and that both memory address patterns occur.
- `tb_dct2d_image` streams a complete 512 x 512 image: 1024 blocks in 524,288 cycles. The
  output of one core is fed into a second core that inverts the transform, and the
  reconstruction is compared with the original image.

## Simulating

With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_dct2d_chip.sv --top tb_dct2d_chip
    obj_dir/Vtb_dct2d_chip

Replace the testbench name to run another. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops on a watchdog if it hangs. All of them finish in a
few seconds. Files are found by module name (`-y`), so each module, package and testbench lives
in a file of its own name.

## Where this differs from the silicon

- The original banks and ALU registers are dynamic logic clocked by three non-overlapping phases.
  Here every storage element is an edge-triggered flip-flop on one clock. The cell keeps its
  serial and parallel inputs and outputs.
- In silicon two DA processors share one ROM row decoder. Here each ROM is a separate constant
  array.
- The intermediate memory was a RAM-compiler macro. Here it is an array with a combinational
  read, so synthesis maps it to whatever memory the target offers.
- Pads, I/O buffers and clock-phase generation are not included.
- The original fixes the 16-cycle, four-step schedule for rows and columns but not how the
  memory avoids a read/write conflict. The read-then-overwrite scheme above is one consistent
  realisation. So is the collection of low-order result bits that lets each result leave in a
  single 16-cycle slot.
