# A 2-D DCT without a transposition memory

This is a streaming 2-D discrete cosine transform (DCT) for image and video
coding. Pixels arrive in raster order, one row after another. The design takes
one pixel per clock cycle, and each processing element (PE) does only one
multiply-add per cycle.

Most 2-D DCT chips first transform the rows of an M x M block, store the
result in a transposition RAM and then transform the columns. This design has
no such RAM. It works on strips of T image rows, not on square blocks.

- Each image row of a strip goes to its own first-stage PE.
- Each first-stage PE computes the 1-D DCT of its row, one T-pixel block at a
  time.
- Its results go straight down to a second-stage PE.
- The second-stage PEs form a chain. Each PE adds its row's share to every
  column sum and passes the partial sums on to the next PE.
- The last PE of the chain emits finished coefficients, one per cycle.

The partial sums are the only data that moves between PEs. They are always
produced and consumed in the same order, so FIFOs are the only links needed
and there is no global schedule. One chip with 2 x 4 PEs is a 4 x 4 DCT. Four
chips in a chain form a 16 x 16 DCT at the same pixel rate.

## The arithmetic

Take a T x T block U. Its transform is `V = A U Aᵀ`, where A is the
orthonormal DCT-II matrix:

    A[k][j] = s(k) · cos((2j+1)·k·π / 2T),   s(0) = √(1/T),  s(k>0) = √(2/T)

The design splits this into two stages, each a sum built up term by term.

**Row stage (first-stage PE r, one image row).** For each pixel x at position
j = 0..T-1 of a block, the PE spends T cycles (k = 0..T-1) updating T running
sums, the *r state variables*:

    j = 0        r_k  = A[k][0]·x
    0 < j < T-1  r_k += A[k][j]·x
    j = T-1      y_k  = A[k][T-1]·x + r_k     → sent down, k = 0..T-1

The r values live in the PE's R-FIFO. They are read and rewritten in the same
order (k = 0..T-1) at every pixel. They never leave the PE.

**Column stage (second-stage PE r, position r in the chain).** Each y taken
from the Y-FIFO costs T cycles, one for each output row k:

    q_k = A[k][r]·y + q_k(from PE r-1)        → sent to PE r+1

The head of the chain (r = 0) adds zero. The tail (r = T-1) rounds the sum to
the output coefficient `V[k][l]`. These *q state variables* travel through
the Q-FIFO of the next PE. The tail therefore emits, for each block, column l
(`V[0][l] … V[T-1][l]`) for l = 0..T-1. Blocks come out left to right and
strips top to bottom. The output is the transform in column order, with no
transposition.

## The array

```
 pixels (raster order)
   │ input controller: row t of each strip → first-stage PE t
   ├───────────┬───────────┬───────────┐
 ┌─▼──┐      ┌─▼──┐      ┌─▼──┐      ┌─▼──┐   first stage (row DCTs)
 │PE 0│      │PE 1│      │PE 2│      │PE 3│   I/O buffer + R-FIFO
 └─┬──┘      └─┬──┘      └─┬──┘      └─┬──┘
   │ y         │ y         │ y         │ y
 ┌─▼──┐  q   ┌─▼──┐  q   ┌─▼──┐  q   ┌─▼──┐   second stage (column sums)
 │PE 4├─────►│PE 5├─────►│PE 6├─────►│PE 7├──► coefficients (or q to next chip)
 └────┘      └────┘      └────┘      └────┘   Y-FIFO + Q-FIFO
```

Every PE has the same datapath (`dct_pe`, `dct_mac`):

- an operand MUX: a pixel from the I/O buffer, or a y from the Y-FIFO;
- a coefficient buffer (`dct_coef_rom`);
- a multiplier;
- an addend MUX: zero, r from the R-FIFO, or q from the Q-FIFO;
- an adder. Its output is y, r, q or the final coefficient, depending on the
  PE's role.

The `ROLE` parameter sets which of these a PE uses. It instantiates only the
buffers that role needs.

## Timing and buffer sizing

This section explains why the buffers have the sizes they do.

- **Rate.** A first-stage PE spends T cycles per pixel. It gets one row out of
  every T, so the T first-stage PEs together take one pixel per cycle. A
  second-stage PE spends T cycles per y. The rows of a strip reach their PEs
  one row time (N cycles) apart, so the second stage also keeps up. The
  output rate is one coefficient per cycle.
- **I/O buffer (N words).** A row arrives at one pixel per cycle but is used at
  one pixel per T cycles. The first-stage PE must therefore buffer up to
  N·(1 − 1/T) pixels. The next row for that PE arrives T rows later, just as
  it finishes the current one.
- **Q-FIFO (N + 2T words).** The y values of row r+1 arrive one row time
  after those of row r. During that time PE r has already produced about N
  q values for PE r+1, and they must wait. This is the only real storage the
  scheme needs: about one row per link. No T x T block memory is needed.
- **Y-FIFO (2T words).** The T values y_k of a block are completed during the
  block's last pixel. They come out in a burst of T cycles every T² cycles,
  which averages one y every T cycles. The second stage takes one y every T
  cycles.
- **Latency.** The last coefficient of a strip appears about T·N cycles after
  the strip's first pixel. That is about 4.1k cycles for the 4 x 4 DCT and 21k
  cycles for the 16 x 16 DCT, with N = 1024.

With these depths and the output always ready, the design accepts one pixel
every cycle indefinitely. The testbenches check this on a full 1024 x 1024
frame. Every link is a valid/ready handshake. If the output is held off,
back-pressure travels up the chain to the input and no data is lost.

## Cascading chips (16 x 16 from four 4 x 4 chips)

`dct_system` chains `CHIPS` copies of `dct_chip`, which gives a transform of
size T = M·CHIPS.

- All chips share the input bus.
- Chip c owns rows c·M … c·M+M-1 of each strip. It accepts and drops the
  other rows.
- A pixel is accepted only when every chip can take it, so all chips count
  rows alike.
- The tail of one chip's second-stage chain feeds the Q-FIFO of the next
  chip's first second-stage PE.
- The q word between chips is the raw 32-bit partial sum. Only the last chip
  rounds it to a coefficient.

Each PE then computes T-point coefficients. In this RTL the coefficient table
is fixed at elaboration from `T`, so a slice of a cascade is a separately
parameterised chip, not a reloaded one.

## Interfaces

`dct_system` (top):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_data`, `in_ready` | in/in/out | 1/8/1 | unsigned pixels, raster order, N per row, image height a multiple of T |
| `out_valid`, `out_data`, `out_ready` | out/out/in | 1/16/1 | signed integer DCT coefficients, in the order given above |
| `strip_done` | out | 1 | pulses when the last pixel of a strip is accepted |

`in_ready` does not depend on `in_valid`. `out_valid` is only raised while
`out_ready` is high, because a result is only formed when it can be
delivered.

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | pixels per image row; sizes the I/O buffers and Q-FIFOs |
| `M` | 4 | PEs per stage on one chip |
| `CHIPS` | 1 | chained chips; the transform is (M·CHIPS) x (M·CHIPS) |

`dct_chip` also has the cascade parameters `T`, `ROW_BASE`, `CHAIN_HEAD` and
`CHAIN_TAIL`, the buffer depths, and a q input stream (`q_in_*`). On a tail
chip `out_data` is the coefficient sign-extended to 32 bits. On any other chip
it is the raw q word.

## Number formats and accuracy

| quantity | format |
|---|---|
| pixel | 8-bit unsigned |
| coefficient A | 14-bit signed, 12 fractional bits, rounded to nearest |
| y (row-stage result) | 16-bit signed, 4 fractional bits, rounded |
| r, q state variables | 32-bit signed, no rounding along the chain |
| output coefficient | 16-bit signed integer, rounded |

The testbenches compare the outputs against two models. Against the same
fixed-point model they match bit for bit. Against the exact real-valued DCT
they are within ±2 for 4-, 8- and 16-point transforms. The widths are
constants in `dct_pkg` and are not protected against overflow. They are
sufficient for 8-bit pixels up to T = 16 (|y| ≤ 1020·2⁴, |q| < 2³¹).

## Design choices and departures

These points are choices made for this RTL:

- **Handshakes and buffer depths.** The architecture only asks for FIFOs
  between asynchronously running PEs. The valid/ready protocol and all depths
  are choices made here.
- **Word widths and rounding.** All widths and rounding points are choices
  made here.
- **Coefficient buffer.** It is a read-only table computed at elaboration, not
  a loadable memory.
- **y output timing.** The y values of a block leave in a burst at the end of
  the block, not spread evenly. The average rate is the same.
- **Single-stage PE not included.** A PE can compute both stages in turn, in
  an arrangement with data partitioning only and no algorithm partitioning.
  That variant is not included. The two-stage arrangement described here
  replaces it.
- **No cascade error checks.** There is no error detection for a mis-set
  cascade. All chips must use the same N and the same T.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | widths, PE roles, coefficient function |
| `rtl/dct_fifo.sv` | first-word-fall-through FIFO, used for all PE buffers |
| `rtl/dct_coef_rom.sv` | coefficient buffer |
| `rtl/dct_mac.sv` | operand MUX, multiplier, addend MUX, adder |
| `rtl/dct_pe.sv` | processing element (row stage or column stage) |
| `rtl/dct_input_ctrl.sv` | row/column counters steering pixels to PEs |
| `rtl/dct_chip.sv` | 2 x M PE array, one chip |
| `rtl/dct_system.sv` | top: chain of chips |
| `tb/dct_tb_pkg.sv` | reference models (fixed-point and real DCT) |
| `tb/dct_stream_bench.sv` | stimulus and checker for a whole system or chip |
| `tb/*_tb.sv` | one self-checking testbench per module, plus the frame tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops. With
Verilator 5, the package files go first:

```
verilator --binary --timing --assert -Wno-fatal --top-module dct_system_tb \
  rtl/dct_pkg.sv tb/dct_tb_pkg.sv rtl/dct_fifo.sv rtl/dct_coef_rom.sv rtl/dct_mac.sv \
  rtl/dct_pe.sv rtl/dct_input_ctrl.sv rtl/dct_chip.sv rtl/dct_system.sv \
  tb/dct_stream_bench.sv tb/dct_system_tb.sv
./obj_dir/Vdct_system_tb
```

| testbench | what it covers |
|---|---|
| `dct_fifo_tb` | random traffic against a queue model, including push and pop on a full FIFO |
| `dct_coef_rom_tb` | every entry of the 4-, 8- and 16-point tables; orthonormality |
| `dct_mac_tb` | all MUX settings with random operands |
| `dct_pe_tb` | row PE and a head→tail column pair against models; one block per T² cycles; back-pressure |
| `dct_input_ctrl_tb` | row steering for a cascade slice, dropped foreign rows, `strip_done` |
| `dct_chip_tb` | one chip as a 4 x 4 DCT; two chips wired into an 8 x 8 DCT |
| `dct_system_tb` | 4 x 4 and 16 x 16 systems end to end, real-time phase then random gaps and back-pressure; counts stalls, held outputs, strips and chip-to-chip q transfers |
| `dct_system_full_tb` | the top at default parameters, two 1024-pixel strips |
| `dct_frame_tb` | a full 1024 x 1024 frame through the 4 x 4 and the 16 x 16 system, no stall allowed |

The frame test takes a few seconds. All the others take well under a second.
