# Radix-2 FFT butterfly as three single-cycle Nios II custom instructions

A radix-2 decimation-in-time FFT spends nearly all its time in the butterfly:

    X0 = x0 + W*x1
    X1 = x0 - W*x1        W = exp(-j*2*pi*k/N)

On a soft processor this is four multiplies and six adds or subtracts, plus
packing and unpacking, for every one of the (N/2)*log2(N) butterflies. This
RTL moves the butterfly arithmetic into combinational custom instructions of
a Nios II processor. The processor keeps everything else in software: the
bit-reversal permutation, the stage and butterfly loops, and the fixed-point
twiddle factors.

A combinational custom instruction takes two 32-bit operands and returns one
32-bit result in the same cycle. No single instruction can return a whole
complex butterfly, so the work is split into three instructions:

| opcode | module          | operation                                     |
|-------:|-----------------|-----------------------------------------------|
| 1      | `ci_multiplier` | low 32 bits of signed `dataa * datab`         |
| 3      | `calculate_x0`  | `{Re X0, Im X0}` from x0 and four products    |
| 4      | `calculate_x1`  | `{Re X1, Im X1}` from x0 and four products    |

One butterfly costs six instructions: four multiplies, then `calculate_x0`,
then `calculate_x1`.

## Arithmetic of one butterfly

Write x0 = a + jb, x1 = c + jd and W = cos + j*sin. The software computes the
angle as -2*pi*k/N, so the sign of the forward transform is already in `sin`.
Then:

    Re X0 = a + c*cos - d*sin        Re X1 = a - c*cos + d*sin
    Im X0 = b + c*sin + d*cos        Im X1 = b - c*sin - d*cos

The four products come from the multiplier instruction. The software passes
the twiddle as a Q16 fixed-point integer (`(int)(cos * 65536)`, truncated
toward zero) and the sample as a plain integer. It then divides each 32-bit
product by 65536 in C, which truncates toward zero. The multiplier does no
scaling, rounding or saturation.

The software then packs the x0 components and the four scaled products into
the two operands of `calculate_x0` and `calculate_x1`. Both instructions take
the same pair of operands:

| bits  | `dataa`        | `datab`        |
|-------|----------------|----------------|
| 31:21 | c*sin (11 bit) | d*cos (11 bit) |
| 20:10 | c*cos (11 bit) | d*sin (11 bit) |
| 9:0   | a (10 bit)     | b (10 bit)     |

The result is `{real[15:0], imag[15:0]}`. Inside, each field is sign-extended
to 16 bits. The module adds or subtracts the fields in the order shown above
and wraps modulo 2^16. `fft_ci_pkg` gives the layouts as packed structs
(`opnd_a_t`, `opnd_b_t`, `cplx_out_t`).

### Dynamic range: the main limit of this scheme

The field widths, not the transform length, limit what this unit can
compute correctly. At every stage of the transform:

* each x0 component must lie in -512..511, since it must fit the 10-bit field;
* each scaled product must lie in -1024..1023, since it must fit an 11-bit field;
* each butterfly output must fit in 16 bits. This always holds when the two
  rules above hold.

Nothing in the hardware detects a value out of range. A wider value is
truncated to its field, and the result is silently wrong. Data grows by up to
a factor of 2 per stage. With arbitrary input, the worst-case bound is
therefore |x| <= 511 / 2^(log2 N - 1): about 8 for N = 128, and 0 for
N = 4096.

In practice, what fits depends on the signal:

* An impulse keeps its magnitude through every stage. A magnitude up to about
  360 works at any length.
* Random data grows roughly like the square root of the number of stages
  combined. Components in {-1, 0, 1} fit at N = 4096.

Truncation error also builds up. Each stage can add up to about 2 LSB to a
value. For random data, the errors feeding one output bin add up like a
random walk, about sqrt(N) LSB. Software that needs more range must
pre-scale its input or scale between stages. Scaling between stages is not
part of this design.

## Interface and timing

`fft_ci_top` has the ports of a Nios II combinational custom-instruction
master:

| port        | dir | width | meaning                                        |
|-------------|-----|------:|------------------------------------------------|
| `ci_n`      | in  | 8     | instruction index n                            |
| `ci_dataa`  | in  | 32    | operand from register rA                       |
| `ci_datab`  | in  | 32    | operand from register rB                       |
| `ci_result` | out | 32    | result for register rC                         |

All three instructions are purely combinational. They have no clock, reset,
`start` or `done` signal. The result is valid in the cycle the operands are
presented, so they use zero extra clock cycles.

`ci_interconnect` compares `n` with each slave's opcode and returns the
matching slave's result. An index that belongs to no slave returns zero.
Opcodes are set by the top's parameters `OPC_MULT`, `OPC_X0` and `OPC_X1`,
with defaults 1, 3 and 4. The interconnect checks at elaboration that no two
opcodes are equal. A run-time assertion checks that at most one slave is
selected.

Hierarchy:

    fft_ci_top
      ci_multiplier    (opcode OPC_MULT)
      calculate_x0     (opcode OPC_X0)
      calculate_x1     (opcode OPC_X1)
      ci_interconnect  (selects by ci_n)
    fft_ci_pkg         (widths, default opcodes, operand structs)

After coarse synthesis the unit has one 32x32 multiplier, four 16-bit add or
subtract chains, three 8-bit comparators and a 32-bit result multiplexer. It
has no flip-flops.

## Driving it from software

Per butterfly (i, j = i + N/2^s stride) the processor issues:

    p_cc = CI(1, w_re, re[j]) / 65536     // c*cos
    p_ds = CI(1, w_im, im[j]) / 65536     // d*sin
    p_dc = CI(1, w_re, im[j]) / 65536     // d*cos
    p_cs = CI(1, w_im, re[j]) / 65536     // c*sin
    A = (p_cs & 0x7FF) << 21 | (p_cc & 0x7FF) << 10 | (re[i] & 0x3FF)
    B = (p_dc & 0x7FF) << 21 | (p_ds & 0x7FF) << 10 | (im[i] & 0x3FF)
    r0 = CI(3, A, B);  re[i] = (int16_t)(r0 >> 16);  im[i] = (int16_t)r0
    r1 = CI(4, A, B);  re[j] = (int16_t)(r1 >> 16);  im[j] = (int16_t)r1

`w_re` and `w_im` are `(int)(cos(-2*pi*m/step) * 65536)` and the matching
sine term.

## Where this RTL departs from the original description

* **Sign of b in X1.** One worked expansion of the original design gives the
  imaginary part of X1 as `-b - c*sin - d*cos`. That contradicts the defining
  equation X1 = x0 - W*x1 and the reference software butterfly, and it would
  give wrong spectra for complex input. A purely real two-point test does not
  show the error. `calculate_x1` computes `b - c*sin - d*cos`.
* **Order of the d products in `datab`.** The field description puts d*sin in
  bits 20:10 and d*cos in bits 31:21. One published software listing packs
  them the other way round. This RTL follows the field description. Software
  must pack d*cos into the top field.
* **Signedness and overflow** were left open. Here all fields are two's
  complement and all sums wrap.
* **Unused opcodes** return zero. The original system left this to its
  generated interconnect.
* A clocked variant of the butterfly instruction appears only in a
  simulation capture. Its registers and timing are not described, so it is
  not reproduced. The combinational instructions are the design.

## What is not included

The original system also contains:

* a Nios II/gen2 processor;
* 4 KB of on-chip RAM at 0x0200_0000;
* an SDRAM controller at 0x0100_0000-0x01ff_ffff;
* a system/SDRAM PLL;
* a JTAG UART at 0x0200_2000, on IRQ 0;
* an interval timer at 0x0000_0000, on IRQ 1;
* the generated Avalon interconnect.

All of these are vendor components, and none of them is designed here. Only
the processor connects to this unit, through the four ports above. The FFT
control loop is software by design. The testbench plays that part.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_ci_multiplier`: corner cases, Q16 twiddle products and random operands.
  Each result is checked against a 64-bit product.
* `tb_calculate_x0`, `tb_calculate_x1`: field extremes, the two-point example
  (inputs 2 and 6 give 8 and -4) and 5000 random field sets. Each result is
  checked against integer arithmetic.
* `tb_ci_interconnect`: all 256 values of n with random slave results.
* `tb_fft_ci_top`: the whole unit at its default parameters. The testbench
  acts as the processor and runs complete FFTs through the instruction port:
  * the two-point example;
  * random 8-point and 128-point inputs;
  * impulses at N = 128, 256, 512, 1024 and 4096;
  * random {-1, 0, 1} inputs at N = 256, 512, 1024 and 4096.

  Every butterfly is compared bit for bit with a software butterfly that uses
  the same fixed-point steps. Every spectrum is compared with the exact DFT,
  within the rounding bounds above. The testbench also checks that each
  result is ready in its issue cycle and that the cycle count is
  6*(N/2)*log2(N). It counts each mechanism and fails if one never occurs:
  * each opcode;
  * an unused opcode;
  * negative fields;
  * negative results.

  The whole run takes well under a second.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/fft_ci_pkg.sv tb/tb_fft_ci_top.sv --top-module tb_fft_ci_top \
        --Mdir obj_top -o sim
    ./obj_top/sim

For any other testbench, replace `tb_fft_ci_top` with its name.

## Changing the design

* **Opcodes:** set the parameters of `fft_ci_top`. They must be distinct.
* **Field widths:** `X_W`, `P_W` and `OUT_W` in `fft_ci_pkg`. The operand
  layout needs `X_W + 2*P_W == 32`, and the result layout needs
  `2*OUT_W == 32`. Wider x0 fields give more dynamic range but leave less
  room for the products.
* **Adding instructions:** instantiate another slave in `fft_ci_top`. Then
  raise `N_SLAVES` of `ci_interconnect` and append its opcode to `OPCODES`.
