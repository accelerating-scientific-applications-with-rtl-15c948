# Floating-point kernels for an FPGA reconfigurable processor

This RTL rebuilds the user logic of three scientific kernels. They were
mapped onto the FPGAs of an SRC-6 style reconfigurable processor ("MAP"). On
that board two large user FPGAs (Xilinx XC2V6000 class) sit beside six 4 MB,
64-bit on-board memory banks (OBM), and all logic runs from a fixed 100 MHz
clock. Each kernel is written in IEEE-754 double precision:

| kernel | module | idea |
|---|---|---|
| Matrix multiply, "Algorithm 1" | `mm_mac_array` | a linear array of 16 multiply-accumulate units, one per element of a 4 x 4 result tile, with operands travelling from MAC to MAC |
| Matrix multiply, "Algorithm 2" | `mm_delay_pipe` | B in parallel block-RAM banks and the current row of A in registers, giving one dot product per clock |
| Complex FFT (the `CFFTF` routine of a spectral shallow-water climate model) | `cfftf_engine` | a single radix-2 butterfly working through many vectors held in one on-board memory bank |

`src6_map_kernels` is the top. It places the three kernels side by side so
that they can be built and simulated together. On the real board only one
kernel at a time would be loaded into an FPGA.

The source design fixes the structure of each kernel: the 16-MAC array and
its data flow, the parallel B banks with a registered A row, and the FFT's
memory arrangement with one butterfly and two clocks per butterfly. Most
widths, handshakes, the TRIG table layout, the FFT index order and all
control timing are choices made here. Each file's header comment says which
parts are which.

## Number format: `fp_add`, `fp_mul`, `fp_mac`

Every kernel works on binary64 numbers. `fp_add` and `fp_mul` are
combinational and parameterised by exponent and fraction width (defaults 11
and 52). They round to nearest, ties to even, and their results match a
host's double arithmetic bit for bit for normal numbers. They depart from
full IEEE-754 in these ways:

- Subnormal inputs are read as zero, and results below the normal range are flushed to zero.
- Every NaN result is the default quiet NaN.
- There are no exception flags.

`fp_mac` builds `acc <= acc + a*b` from one multiplier and one adder. It
rounds twice, because the multiply and add are not fused. It takes one term
every clock, which is the rate behind the "one multiply and one add per MAC
per clock" peak-performance figure. `clr` starts a new sum without a bubble.

The units have no internal pipeline registers. A 64-bit multiply followed by
a 64-bit add in one clock will not close timing at 100 MHz on an FPGA of that
generation. Pipelining the FP units is the first change a hardware build
would need. The kernels would then need their control retimed, and the MAC
accumulators interleaved or split.

## Matrix multiply with a MAC array (`mm_mac_array`)

MAC m (m = 0..15, numbered left to right) owns element
`C(m/4, m%4)`.

1. A and B are written into block RAM through the load port. A is stored by
   columns and B by rows, so word k holds column k of A and row k of B.
2. After `start`, word k = 0..KDIM-1 is read, one per clock, and enters
   MAC 0 as a packet.
3. Each MAC takes its own `a` and `b` lanes from the packet and accumulates
   their product. The packet moves one MAC to the right every clock, so MAC j
   handles step k at clock k + j.
4. When the last packet has left MAC 15, all 16 sums are copied into a
   result chain. The chain shifts right to left, and results leave at MAC 0
   in row-major order (`c11` first).

Timing: count the edge that samples `start` as edge 0.

- The MACs are busy from edge 2 to edge KDIM + 16.
- The first result appears after edge KDIM + 18.
- `done` comes with the last result after edge KDIM + 33. That is 37 clocks
  for a 4 x 4 product.

`KDIM` (default 4) sets the length of the dot products. The testbench also
runs `KDIM = 16`.

## Matrix multiply with a delay pipeline (`mm_delay_pipe`)

B is split into `DIM` banks, and bank r holds row r of B. Reading one address
i therefore returns column i of B (`b1(i)..b4(i)`) in one clock. A arrives
once, as a row-major valid/ready stream, and goes into a shift register (the
"delay pipeline"). When four elements have arrived, they move into the
active-row registers `a1..a4`, and the next row starts streaming in behind
them.

For each column i the unit forms
`c = ((a1*b1(i) + a2*b2(i)) + a3*b3(i)) + a4*b4(i)` in three stages: bank
read, four parallel products, then the sum chain.

Throughput is one element of C per clock within a row and DIM + 1 clocks per
row. `a_ready` drops while a full row waits for the multipliers, which
stalls the A stream.

## FFT engine (`cfftf_engine`)

### What it computes

Y is an array of `MVECS` complex column vectors in one OBM bank:

- Column v starts `CJUMP` points after column v-1.
- Each vector has N = 2^`log2n` points, with 2 <= N <= 2048.
- Each point takes two 64-bit words: real part at the even address,
  imaginary part at the odd one.

The engine replaces every vector with its forward DFT,
`X[k] = sum x[n] exp(-2*pi*i*n*k/N)`, in natural order. Only powers of two
are supported, and every pass is radix 2.

### Memory arrangement

| array | where | size at defaults |
|---|---|---|
| Y (input and output) | one OBM bank, through `obm_*` | up to 2^19 words (4 MB) |
| TRIG (twiddles) | block RAM, loaded by the host | 1024 x 128 bit |
| VA (pass input) | block RAM | 2048 x 128 bit |
| VB (pass output) | block RAM | 2048 x 128 bit |

`TRIG[m]` must hold `exp(-2*pi*i*m/N)` for m < N/2, for the N being
transformed. The host writes it through `trig_we` while the engine is idle.

### Per-vector sequence

| phase (`state_o`) | action | clocks |
|---|---|---|
| `FFT_LOAD` | read 2N OBM words into VA | 2N + 1 |
| `FFT_BFLY` | one radix-2 pass from VA to VB | N + 3 |
| `FFT_COPY` | copy VB to VA (after every pass but the last) | N + 1 |
| `FFT_STORE` | write VB back over the vector | 2N + 1 |

These run for `log2n` passes per vector, then for each following vector.
`done` pulses when the last vector has been stored.

### A pass

Pass s has NBLOCK = 2^s blocks of stride INCREM = N/2^(s+1), so
NBLOCK x INCREM = N/2. For block k and offset i:

```
x0 = VA[i + 2k*INCREM]          x1 = VA[i + 2k*INCREM + INCREM]
VB[i + k*INCREM]        = x0 + x1
VB[i + k*INCREM + N/2]  = (x0 - x1) * TRIG[i * NBLOCK]
```

This is a self-sorting (Stockham) decimation-in-frequency order, so no bit
reversal is needed at either end. The two inputs of a butterfly live in the
same single-read-port RAM, so they are read on two consecutive clocks.
`fft_butterfly` (4 adders, 4 multipliers and 2 more adders) then produces
both outputs. They are written to VB on the next two clocks, overlapped with
the next butterfly's reads. One butterfly therefore finishes every two
clocks, the figure the source design's analysis is built on.

### Performance

A 1024-point vector needs 10 passes of 512 butterflies at 2 clocks each,
10,240 clocks at the least. Loading, copying and storing roughly double that.
Simulated clock counts for 256 vectors, converted at 100 MHz:

| N | clocks | time |
|---|---|---|
| 256 | 1,253,634 | 12.5 ms |
| 512 | 2,761,986 | 27.6 ms |
| 1024 | 6,039,810 | 60.4 ms |
| 2048 (2 x 128 vectors) | 13,118,724 | 131.2 ms |

These are close to the computation times measured for the original
floating-point implementation: 14.2, 28.9, 60.6 and 129.0 ms.

256 vectors of 2048 points (8 MB) do not fit one 4 MB bank, so they have to
be transformed in two calls. A single butterfly is slower than the host
processor at every size. The way to speed it up is to replicate the engine:
two per FPGA, on all four FPGAs.

## Top level and ports

`src6_map_kernels` has parameters `MM_DIM = 4`, `MM_KDIM = 4` and
`LOG2N_MAX = 11`. Its port groups are the kernels' own ports, renamed:

- `mm1_*` for `mm_mac_array`
- `mm2_*` for `mm_delay_pipe`
- `fft_*` for `cfftf_engine`

The FFT's memory port (`fft_obm_addr/re/we/wdata/rdata`) is 64 bits wide and
expects read data one clock after `re`. It connects to an on-board memory
bank, which is not part of this RTL.

`rst_n` is an asynchronous, active-low reset. Loads and starts are accepted
only while a kernel is idle, and assertions check this in simulation.

Shared types live in `src6_pkg`: `fp64_t`, the complex `cplx_t` with fields
`re` and `im`, and the FFT phase enum.

## Simulating

Each testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/src6_pkg.sv tb/tb_src6_map_kernels.sv --top-module tb_src6_map_kernels
./obj_dir/Vtb_src6_map_kernels
```

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_mul` | 4,000 random operations each, bit-exact against the simulator's doubles; rounding ties, zeros, infinities, NaN, overflow |
| `tb_fp_mac` | 200 random dot products, bit-exact |
| `tb_fft_butterfly` | 2,000 random butterflies, bit-exact |
| `tb_mm_mac_array` | 4 x 4 products at KDIM 4 and 16, result order, the clock count |
| `tb_mm_delay_pipe` | 4 x 4 products at full rate and with a gappy A stream, one result per clock |
| `tb_cfftf_engine` | N = 2..64 with several vectors and column gaps; every phase's clock count; untouched memory between columns |
| `tb_src6_map_kernels` | the top at its default sizes (a 2048-point FFT included), and that every mechanism occurs: MAC hand-off, right-to-left drain, A-stream stall, row hand-over, FFT load, pass, copy, store and next vector |
| `tb_pstswm_fft` | the climate-model workload: 256 vectors at N = 256, 512, 1024 and 2048, compared with a reference FFT; runs in about half a minute |

FFT results are compared with a tolerance of 1e-12 to 1e-11 of the largest
output. The matrix and FP results are compared exactly.

`tb/obm_bank_model.sv` is a simple behavioural model of one on-board memory
bank. It has a one-clock read latency and backdoor `poke`/`peek` access.

## Limits and departures

- **FP units.** They are not pipelined and not fully IEEE-754 (see above).
  The original used the vendor's floating-point macros, whose internals are
  not known.
- **FFT index order, TRIG layout and memory layout.** These are this
  design's. The original reuses the climate code's own in-place algorithm,
  whose exact index arithmetic is not reproduced here. The original also
  packs 32-bit real and imaginary parts into one 64-bit word only in its
  integer variants.
- **FFT block RAM.** At the default 2048-point capacity, TRIG, VA and VB
  hold 640 Kbit. That is about 36 of the FPGA's 18 Kbit block RAMs, whereas
  the original floating-point engine reports 12. For a smaller maximum
  vector length, lower `LOG2N_MAX`: each step down halves all three arrays.
- **The 32-bit integer FFT variant is not built.** That variant mixes radix-4
  and radix-2 passes, and its fixed-point scaling is unspecified.
- **The molecular-dynamics force kernel is not built.** Its force law and
  data layout are unspecified.
- **Matrix sizes.** Both matrix kernels work on one 4 x 4 tile. Blocking a
  larger matrix into tiles is left to the caller.
- **Board hardware is outside this RTL:** the memory banks, the board
  controller, the chain ports and the host link.
