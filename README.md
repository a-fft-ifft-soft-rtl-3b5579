# Parameterised FFT/IFFT core for OFDM modems

OFDM standards use discrete Fourier transforms of many sizes: 64 points for
IEEE 802.11a and HiperLAN/2, 256 to 2048 for DAB, 2048 and 8192 for DVB-T,
and 512 to 8192 for ADSL and VDSL. This core computes an N-point FFT or
IFFT on complex fixed-point samples. The size, word lengths, coefficient
precision and direction are SystemVerilog parameters, so one source covers
all of these standards. The core comes in two architectures that trade speed
against area:

* **SDF pipeline** (`fft_sdf_pipeline`). Single-path delay-feedback, built
  from radix-2/4/8 butterfly stages. It takes and delivers one complex
  sample per clock with no gaps between frames. The output is in
  bit-reversed order.
* **Memory-based core** (`fft_mem`). One radix-2 butterfly works in place
  on two frame buffers in turn. It has a valid/ready input, delivers output
  in natural order, and needs log2(N)/2 clocks per sample.

`fft_ip_top` holds both, side by side, with one set of parameters. A real
product would normally keep only the one it needs.

## The pipeline: radix-2/4/8 SDF

### Butterfly stages

A radix-2 SDF butterfly with delay D works on a stream in blocks of 2D
samples (`sdf_bf`):

* During the first D samples of a block, each input goes into a D-word
  feedback FIFO (`delay_line`). The word that drops out of the FIFO is
  passed downstream.
* During the second D samples, the FIFO head `a` and the new input `b` are
  combined. `(a+b)/2` goes downstream and `(a-b)/2` goes back into the FIFO.
  The FIFO sends those differences on during the first half of the next
  block.

Every butterfly therefore emits one sample per input sample, after a latency
of D samples. An N-point decimation-in-frequency (DIF) FFT is log2(N) such
butterflies with delays N/2, N/4, ..., 1. The butterflies need twiddle
factors between them.

### Where the twiddles go

The point of the radix-2/4/8 (radix-2^3) decomposition is how the twiddles
are placed. Take three consecutive butterflies that work on a sub-transform
of length L, with delays L/2, L/4 and L/8. Write the index inside the
sub-transform as n = (L/2)n1 + (L/4)n2 + (L/8)n3 + m. Split the usual DIF
twiddles so that most of them become trivial constants:

| after        | multiply by                    | hardware                               |
|--------------|--------------------------------|----------------------------------------|
| PE1 (L/2)    | (-j)^(n2·k1)                   | swap re/im and negate (`pe1`)          |
| PE2 (L/4)    | W8^(n3·(k1+2k2))               | 1, W8, -j or W8^3 (`coef_const_mult`)  |
| PE3 (L/8)    | W_L^(m·(k1+2k2+4k3))           | general complex multiply from a ROM (`tw_mult`) |

Only one stage in three needs a real multiplier and a coefficient table. The
W8 and W8^3 factors contain √2/2. `coef_const_mult` builds those products
from shifts and adds: it takes the first CL terms of the signed-power-of-two
expansion

    √2/2 ≈ 2^0 − 2^-2 − 2^-5 − 2^-6 + 2^-8 + 2^-14 + 2^-16 − 2^-20

CL = 8, the default, uses all eight terms and gives an error below 2^-22.
Smaller CL gives a cheaper, less accurate unit.

Each stage finds its constant from its own output position counter. Call the
position inside the block `pos`, and let `LB = log2(L)`:

* PE1 applies −j when `pos[LB-1] & pos[LB-2]` is 1.
* PE2 selects W8 exponent `{pos[LB-2], pos[LB-1]}` when `pos[LB-3]` is 1, and 1 otherwise.
* `tw_mult` forms `e = m · bitrev(k)` from its own counter and reads W_L^e
  from `twiddle_rom`.

### Group structure

For N = 2^n with n = 3q + r, the pipeline is built as follows:

* A head stage, depending on r:
  * r = 1: a lone radix-2 butterfly;
  * r = 2: a radix-2/4 group, which is PE1 followed by a plain butterfly.
* Then q radix-2/4/8 groups (`r248_group`).
* A ROM twiddle multiplier between any two consecutive groups.

The default N = 128 is laid out like this:

    radix-2 (64) → ROM× → PE1 (32) → PE2 (16) → PE3 (8) → ROM× → PE1 (4) → PE2 (2) → PE3 (1)

The feedback memory totals N−1 words.

### Ordering and timing

Input is in natural order. Output is the spectrum in bit-reversed order, and
`out_idx` carries the frequency index of each output sample. The latency is
fixed: the first output appears after N−1 accepted inputs plus one register
per butterfly and per ROM multiplier. Frame f+1 can follow frame f directly.
The pipeline has no flush of its own: the end of a frame comes out while the
next frame, or N dummy samples, is being fed in. `in_valid` can drop at any
time and the whole pipeline simply waits.

## The memory-based core

### Blocks

* `sp_conv` pairs two input samples.
* Two `fft_ram` banks hold N words each. Each has two combinational read
  ports and two write ports.
* `bf2_pe` is one radix-2 DIF butterfly with its twiddle multiply.
* `twiddle_rom` is shared with the pipeline's design.
* `mfft_addr_gen` forms the addresses.
* `ps_conv` turns a pair back into two samples.
* `mfft_ctrl` sequences everything.

### Bank states and turns

Each bank goes around LOAD → READY → DONE → LOAD:

* **Load:** N/2 input pairs are written to addresses (2i, 2i+1).
* **Compute:** log2(N) in-place DIF passes of N/2 butterflies each run, one
  butterfly per clock. In pass s, with h = N/2^(s+1), butterfly b reads
  and writes the pair (a, a + h), where a = (b div h)·2h + (b mod h). Its
  twiddle index is `(b mod h)·2^s`.
* **Unload:** a pair is read every other clock from addresses bitrev(2i)
  and bitrev(2i)+N/2. Those are bins 2i and 2i+1, so the output comes out
  in natural order.

The controller passes three turns (load, compute, unload) from bank to bank.
Each bank has only one role at a time, and frames keep their order. While
one bank is computed, the other is unloaded and then reloaded. With N ≥ 16
the butterfly therefore never waits: a frame is accepted every N·log2(N)/2
clocks. At N = 8, one bank's round trip through load, compute and unload
takes longer than two compute times, and the rate falls slightly.

### Handshake and timing

* `in_ready` is high while a bank is free to load. It drops while both banks
  are occupied.
* The output has no back-pressure. N samples come out on consecutive clocks,
  with `out_idx` counting 0..N−1.
* When the PE is idle, the first result leaves N·log2(N)/2 + 2 clocks after
  the last input sample was taken.

## Fixed point, scaling and the inverse transform

* Data are WL-bit two's complement. Both parts are scaled as fractions of
  2^(WL−1).
* Every butterfly computes (a±b)/2 with rounding. An N-point FFT therefore
  returns DFT/N, and the IFFT returns the exact inverse DFT, with no growth
  in word length.
* Twiddle entries are round(W·2^CW) and are CW+2 bits wide, so +1.0 fits.
  Products are rounded back to WL bits.
* Every result saturates instead of wrapping. Inputs inside the disc
  |x| < 2^(WL−1) never saturate. Inputs in the corners of the square can.
* The IFFT uses the forward datapath. Real and imaginary parts are swapped
  at the core's input and output, because swap∘DFT∘swap is N times the
  inverse DFT.
* Measured accuracy against a double-precision DFT, at WL = 16 and CW = 14,
  is within about log2(N)/2 LSB. The largest errors seen were about 2.5 LSB
  at N = 128 and under 4 LSB at N = 8192.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N`    | 128        | transform size, a power of two from 8 to 8192 (checked at elaboration) |
| `WL`   | 16         | I/O word length; 8, 16, 32 and 64 all elaborate, 8 and 16 are simulated. For wide words raise `CW` too, or the twiddle precision limits accuracy |
| `CW`   | 14         | coefficient fraction bits of the ROM twiddles |
| `CL`   | 8          | number of shift-add terms used for √2/2 (1..8) |
| `FUNC` | `FUNC_FFT` | `FUNC_FFT` or `FUNC_IFFT` (`fft_pkg::fft_func_e`) |

Reset (`rst_n`) is asynchronous and active low. It clears counters, states
and valid flags. The data stores (`delay_line`, `fft_ram`) are not reset,
because no value is read from them before it has been written.

## Files

* `rtl/fft_pkg.sv` has the shared types, the √2/2 expansion, the rounding
  and saturation helpers, and the constant cos/sin functions that fill the
  twiddle ROM at elaboration.
* Pipeline: `fft_sdf_pipeline` → `r248_group` → `pe1`, `pe2`
  (+ `coef_const_mult`), and `sdf_bf` (+ `delay_line`). It also uses
  `tw_mult` (+ `twiddle_rom`).
* Memory core: `fft_mem` → `sp_conv`, `mfft_ctrl`, `mfft_addr_gen`,
  `fft_ram` ×2, `bf2_pe`, `twiddle_rom`, `ps_conv`.
* Top: `fft_ip_top`.

Every file opens with a comment block on its function, its timing and its
design choices.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog if
something hangs. Expected values come from a double-precision DFT in
`tb/fft_tb_pkg.sv` or from a direct model of the block. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fft_pkg.sv tb/fft_tb_pkg.sv tb/tb_fft_ip_top.sv --top-module tb_fft_ip_top
    ./obj_dir/Vtb_fft_ip_top

Add `-GN=<size>` or `-GWL=<8..16>` to run the size-generic testbenches at another size.
`tb_fft_sdf_pipeline` and `tb_fft_mem` take both.

* `tb_fft_ip_top` runs both cores, in both directions, end to end. It counts
  every mechanism and fails if any of them never happened:
  * input stalls;
  * back-to-back frames;
  * PE1's −j;
  * each of PE2's three constant twiddles;
  * ROM twiddles;
  * back-pressure on the memory core.
* `tb_fft_ip_top_full` runs the top with every parameter at its default.
* `tb_fft_workloads` builds the top at every size the standards use
  (64, 256, 512, 1024, 2048, 4096 and 8192) and at 8. It checks accuracy,
  the pipeline's gap-free output and the memory core's frame time.

All testbenches pass under Verilator with random initial register values.

## Relation to the original design and open points

* **Architectures.** The original describes both architectures and the
  radix-2/4/8 processing elements. The insides of the memory-based core are
  not described beyond a block diagram (S/P, RAM, butterfly, coefficient
  ROM, address generator, controller, P/S) and the words "continuous flow".
  This implementation makes the following choices of its own:
  * the radix-2 butterfly;
  * the two ping-pong banks;
  * the two-port RAMs;
  * the addressing;
  * the controller.
* **Coefficient parameters.** CL ("coefficient effective length", 1..8) is
  read as the number of signed-power-of-two terms of √2/2. CW ("coefficient
  weight") is read as the fraction bits of the ROM coefficients. Both
  readings are this design's own.
* **Output order and flushing.** The pipeline's output is left in
  bit-reversed order with an index. There is no reorder buffer. Flushing
  the last frame means feeding N more samples.
* **Binary-point position.** The fixed-point "position" (integer/fraction
  split) of the original's parameter table is not a parameter here. The
  datapath treats data as fractions and scales by 1/N, so the split only
  changes how a user interprets the numbers.
* **Not included.** The generator software (parameter entry, GUI, HDL and
  synthesis-script output) is not hardware and is not included. Its range
  check on N is kept as an elaboration-time assertion.
* **Sizes.** The default build is N = 128. Sizes from the standards are
  built by changing `N`. A 2048-point DVB-T or DAB core runs on the pipeline
  at a clock equal to the sample rate, or on the memory core at log2(N)/2
  times it.
* **Not done.** No synthesis results (area, clock rate) have been measured.
