# Hybrid form FIR filter with variable-size partitioning

An FIR filter computes

    y[n] = h[0]·x[n] + h[1]·x[n-1] + ... + h[N]·x[n-N]

and has two textbook hardware forms. The **direct form** delays the input and
adds all N+1 products in one adder chain. It has few wide registers, but its
critical path runs through every adder. The **transposed form** puts the delays
on the output side, between the adders. Its critical path is a single
multiply-add, but it needs N wide registers to carry partial sums.

This design sits between the two. The taps are split into *subsections*.
Inside a subsection the products are added in direct form. Between
subsections there is one register on the output branch, as in the transposed
form. Each subsection's length can be chosen on its own. That length sets the
trade-off between critical path (adders per subsection), the number of wide
partial-sum registers (one per subsection boundary) and fan-out. All products
come from a single multiple-constant-multiplication (MCM) block that sees the
whole coefficient matrix.

The default build is an eighth-order filter (nine taps) in three subsections
of three taps each. Any tap count and any partition can be built by setting
parameters.

## How the delays are shared

This is the part of the structure that is least obvious. The output of
subsection k passes through k output-branch registers before it reaches
y[n]. Each of those registers replaces one input-branch delay. So coefficient
j, which sits in subsection k, needs only j−k input delays:

    coefficient j in subsection k:  (j − k) input delays + k output delays = j

For the default 3+3+3 partition:

| coefficient | h0 | h1 | h2 | h3 | h4 | h5 | h6 | h7 | h8 |
|---|---|---|---|---|---|---|---|---|---|
| subsection k | 0 | 0 | 0 | 1 | 1 | 1 | 2 | 2 | 2 |
| input delays (tap index) | 0 | 1 | 2 | 2 | 3 | 4 | 4 | 5 | 6 |
| output-branch registers | 0 | 0 | 0 | 1 | 1 | 1 | 2 | 2 | 2 |

A subsection's last tap and the next subsection's first tap read the same
delay-line node: h2/h3 share x[n-2], and h5/h6 share x[n-4]. So the input
delay line has NTAPS−NSEC registers (6 here, not 8). The output branch has
NSEC−1 wide registers (2 here, not 8). Because two coefficients read the same
sample, the multiplier block is a matrix: rows are subsections, columns are
positions within a subsection. Products can then be shared along rows, along
columns and between whole rows.

The two limiting partitions are the classical forms:

* one subsection of N+1 taps is the direct form: N input registers, no
  output registers;
* N+1 subsections of one tap each is the transposed form: no input
  registers, N output registers.

Both are legal parameter settings and both are tested.

## Variable partitioning

`SEC_LEN[k]` is the length of subsection k. The lengths need not be equal.
They must be nonzero and sum to `NTAPS`; elaboration stops with an error
otherwise. An uneven partition is how a tap count that is not a multiple of
the nominal length is handled. For example, order 16 (17 taps) is built as
3+3+3+3+3+2. The partition is fixed when the filter is built. This RTL has no
logic that changes the partition while the filter runs.

## Modules

| file | role |
|---|---|
| `rtl/hybrid_fir_pkg.sv` | default word lengths, the default partition and coefficient set |
| `rtl/hybrid_fir.sv` | top level: wires the delay line, the MCM block and the subsections |
| `rtl/tap_delay_line.sv` | shared input branch: `tap[d] = x[n-d]`, NTAPS−NSEC registers |
| `rtl/matrix_mcm.sv` | all products: `prod[j] = COEFS[j] · tap[j−k(j)]` |
| `rtl/filter_subsection.sv` | adder chain of one subsection, with the output-branch register when `REG_OUT` is set |

Within a subsection, the partial sum from the later subsection enters at the
adder of its last tap. It then runs toward tap 0. Subsection 0 has no register
and drives `y_out`. Every other subsection registers its sum before handing it
on.

`matrix_mcm` writes each product as a multiplication by a constant. It leaves
the shift-and-add decomposition, and any sharing between coefficients, to
synthesis. A hand-optimised adder graph for a particular coefficient set would
slot in here with the same ports.

## Interface and timing (`hybrid_fir`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low; clears the filter history |
| `in_valid` | in | 1 | sample strobe: the rising edge takes `x_in`; low stalls every register |
| `x_in` | in | `DATA_W` | input sample, signed |
| `out_valid` | out | 1 | equals `in_valid` |
| `y_out` | out | `DATA_W+COEF_W+clog2(NTAPS)` | output sample, signed, full precision |

* Latency is zero cycles. `y_out` is the output for the sample currently on
  `x_in` and is valid in the same cycle. The path from `x_in` through the MCM
  block and subsection 0's adders to `y_out` is combinational, as in the
  structure's output branch. If a registered output is needed, place a
  register after `y_out`. Its critical path then runs through one multiplier
  plus `SEC_LEN[0]` adders.
* One sample per clock at most. The filter's state advances only on cycles
  with `in_valid` high.
* Arithmetic is two's complement at full precision. The output width holds
  the worst-case sum, so nothing rounds, saturates or overflows.

Parameters: `DATA_W` (16), `COEF_W` (16), `NTAPS` (9), `NSEC` (3),
`SEC_LEN` (`'{3,3,3}`), `COEFS` (nine Q15 values). `COEFS` and `SEC_LEN` must
be overridden together with `NTAPS`/`NSEC`.

The default coefficients are a Hamming-windowed low-pass with cut-off 0.2 of
the sample rate, in Q15, symmetric (linear phase) and summing to 32768 (unity
DC gain):
`-201, -445, 1679, 8705, 13292, 8705, 1679, -445, -201`.

## What is taken from the structure, and what is this design's own choice

Taken from the hybrid form structure:

* the split into subsections with direct-form adder chains;
* one output-branch register between neighbouring subsections;
* the shared input-branch nodes between subsections;
* the single matrix MCM block;
* subsections of different lengths;
* the eighth-order, three-by-three example as the default.

Chosen here, because the structure leaves these open:

* 16-bit signed fixed-point samples and coefficients, with a full-precision
  output;
* the coefficient values;
* the `in_valid` strobe and its stall behaviour;
* the asynchronous reset;
* the unregistered output;
* writing the MCM block as plain constant multiplications rather than a
  specific adder graph.

Not provided:

* **Run-time adaptive partitioning.** The partition cannot change with the
  input signal. No decision rule or switching mechanism is defined for it, so
  the partition is a build-time parameter.
* **A particular MCM optimisation algorithm.** Adder counts depend on
  synthesis, not on a specific common-subexpression method.
* **Power.** No power or FPGA-resource figures are reproduced. The structure
  was evaluated for power on a Virtex-4 FPGA at orders 8 to 128, with an
  average reduction of about 30% against the transposed form. That result
  depends on the coefficient sets and tools used there, which are not part of
  this RTL.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb/tb_tap_delay_line.sv` | every tap against a software shift register, with random enables and a mid-run reset |
| `tb/tb_matrix_mcm.sv` | every product for the default matrix and for an uneven 2+4+3 matrix with full-scale coefficients; the expected tap for each coefficient is written out by hand |
| `tb/tb_filter_subsection.sv` | combinational and registered sums with extreme values, hold on stall, asynchronous reset |
| `tb/tb_hybrid_fir.sv` | default build: impulse response equals the coefficients, step settles at 1000·Σh, random traffic with stalls and a reset. Also builds 2+4+3, 9×1 (transposed form), 1×9 (direct form) and an uneven 14-tap filter. Counts each mechanism (stall, reset, uneven partition, direct form, transposed form, partial sum crossing a subsection register) and fails if any never occurred |
| `tb/tb_hybrid_fir_full.sv` | the default build with no parameter overrides: impulse response, then 3000 cycles of random and full-scale samples with stalls |
| `tb/tb_hybrid_fir_orders.sv` | orders 8, 16, 32, 64 and 128 (9 to 129 taps, subsections of three, remainder in the last), each against a direct convolution |
| `tb/tb_fir_case.sv` | helper used by the two filter-level benches: builds one configuration, drives it and checks it |

All reference values are computed in the testbenches by direct convolution
over the accepted samples, independently of the RTL's structure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/hybrid_fir_pkg.sv rtl/tap_delay_line.sv rtl/matrix_mcm.sv \
        rtl/filter_subsection.sv rtl/hybrid_fir.sv tb/tb_fir_case.sv \
        tb/tb_hybrid_fir.sv --top-module tb_hybrid_fir -o sim
    ./obj_dir/sim

Swap the last testbench file and `--top-module` to run another bench. The
unit benches need only the package and their own module. Every bench runs in
well under a second.

To build a different filter, override `NTAPS`, `NSEC`, `SEC_LEN` and `COEFS`
together, for example:

    hybrid_fir #(.NTAPS(17), .NSEC(6), .SEC_LEN('{3,3,3,3,3,2}), .COEFS(my_coefs)) u_fir (...);

Lint reports unused `clk`, `rst_n` and `en` on the first subsection. That
subsection has no register, so those ports are intentionally unconnected
inside it.
