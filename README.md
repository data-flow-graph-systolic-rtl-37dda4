# Systolic FIR filters derived from a data-flow graph

This RTL builds two systolic arrays for the same 3-tap FIR filter

    y(n) = a0*x(n) + a1*x(n-1) + a2*x(n-2)

Both arrays come from the same method. You start from a data-flow graph (DFG) of the filter.
The graph is a row of identical blocks, and each block is a multiplier, an adder and one stream
operator. You then work out on which clock periods each arc of the finished array would carry a
valid datum. Each block becomes one cell. The only logic left in a cell is the multiplier and the
adder, plus clocked buffers on its inputs. Everything else the graph expressed is handled in one
of three ways:

- delay buffers on some arcs between cells;
- the initial value of a buffer;
- the clock periods at which the array's inputs and outputs are sampled.

The two arrays:

| | `fir_uni_array` | `fir_bidir_array` |
|---|---|---|
| sample flow | left to right, same as the partial sums | right to left, against the partial sums |
| stream operator in the graph | REST (drop the first element) | FBY (put a value in front of a stream) |
| extra buffers between cells | one per cell boundary, on the partial-sum arc | none |
| throughput | one result per clock period | one result every two periods |
| first result | period 6 | period 3 |
| latency from x(n) to y(n) | 3 periods (TAPS) | 1 period |

`sa_fir_top` puts the two side by side. They share only the clock and the reset.

## Systolic pattern streams: the timing model

A **systolic pattern stream (SPS)** is a bit string with one bit per clock period. It is attached
to one arc of the array. A 1 means the arc carries a valid datum in that period. Every arc in
these two arrays has a pattern of the form

    0^k (1)*     k empty periods, then a valid datum every period
    0^k (10)*    k empty periods, then a valid datum every second period

Periods are counted from the cycle after the `start` pulse, which is period 0. The patterns were
derived under these rules:

- a buffer delays by exactly one period;
- the adder and the multiplier take no time;
- each cell's buffers sit at its input ports.

**Unidirectional array (3 taps).** `|` marks a cell boundary.

    partial sum: 0(1)*  -> cell -> 00(1)*  | B | 0^3(1)* -> cell -> 0^4(1)* | B | 0^5(1)* -> cell -> 0^6(1)*
    samples    : (1)*   -> cell -> 00(1)*  |   |         -> cell -> 0^4(1)* |   |         -> cell -> 0^6(1)*

At each boundary the partial-sum pattern lags one period behind what the next cell needs. The
method fixes this with one buffer `B` on that arc. In general there is one buffer per period of
difference between the first valid data at the two ends. The sample arc needs no extra buffer.

Each REST node in the graph drops the first element of the sample stream. In hardware the REST
node is gone: the array drops those elements simply by not sampling the output before period 6.

**Bidirectional array (3 taps).** Cells are read left to right.

    partial sum (rightward): (10)*   -> 0(10)*  -> 00(10)*  -> 0^3(10)*   (output)
    samples     (leftward) : 0(10)*  <- 00(10)* <- 0^3(10)* <- 00(10)*    (input at the right)

Here the samples and the partial sums travel towards each other, and the loop through two
neighbouring cells is two periods long. A sample therefore meets a new partial sum only every
second period, so valid data come every other period. Adjacent arcs already agree, so no extra
buffers are needed.

This graph was made from the first one by turning each REST on the rightward sample stream into
an FBY on a leftward stream. FBY(0, X) is the stream "0, then X". Every cell except the rightmost
has one. The FBY is realized as the **initial value 0 of the cell's sample buffer**. `start`
restores that value.

## Cells (`sa_cell`)

Every cell has the same datapath:

    y_buf <= y_in        x_buf <= x_in          (clocked input buffers)
    y_out  = y_buf + w * x_buf                  (combinational)
    x_out  = x_buf

`w` is a weight register. It is loaded through the array's `w_we`/`w_idx`/`w_data` port and kept
across `start`. Cell j, counted from the left, holds a(TAPS-1-j): a2, a1, a0 for three taps. The
cell does not know which way the samples flow; the array wires `x_in`/`x_out` to the left or
right neighbour. Buffers are `sa_buffer` instances: chains of positive-edge registers with an
initial value, which is loaded by `rst_n` and by `clr`.

## Using the arrays

Both arrays have the same ports. Widths are given for the defaults.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: clears the data buffers to their initial values and restarts all patterns |
| `w_we`, `w_idx`, `w_data` | in | 1, 2, 16 | write weight a(`w_idx`) |
| `x_in` | in | 16 | signed sample |
| `x_take` | out | 1 | the array reads `x_in` in this period |
| `y_out`, `y_valid` | out | 34, 1 | signed result, and the periods in which it is one |
| `x_out`, `x_out_valid` | out | 16, 1 | sample stream leaving the array, and its pattern |

The sampling patterns are made by `sps_gen`, a small counter that starts from `start`. Each
pattern has the form 0^PREFIX (1 0^(PERIOD-1))*.

**Unidirectional.** `x_take` is high in every period from period 0. The host sends TAPS zeros
and then x(1), x(2), ... one per period. The zeros come from the graph's input stream: one is
dropped by the first REST, and the others are the filter's zero initial conditions. `y_valid`
rises in period 2·TAPS (6) and stays high. y(n) appears in period n + 2·TAPS − 1. `x_out`
carries x(1), x(2), ... under the same valid signal.

**Bidirectional.** `x_take` is high in periods TAPS−1, TAPS+1, ... (2, 4, 6, ... for three taps).
The host offers x(n) in the n-th of those periods. Outside them the array feeds zero internally,
so what the host drives there does not matter. y(n) appears one period after x(n) is taken, with
`y_valid` high in periods TAPS, TAPS+2, .... `x_out` is valid in periods 1, 3, 5, .... It carries
TAPS−1 zeros, which are the FBY values, and then x(1), x(2), ....

Weights can be written at any time. A weight is used from the edge that writes it, so to get
clean results, write the weights before `start`.

## Parameters

| parameter | default | notes |
|---|---|---|
| `TAPS` | 3 | the filter of the method's example; any value ≥ 1 works |
| `DATA_W`, `COEF_W` | 16 | sample and weight width, signed; these widths are this design's choice |
| `ACC_W` | 34 | `DATA_W + COEF_W + clog2(TAPS+1)`: full precision, no rounding or overflow |
| `IDX_W` | 2 | width of `w_idx` |

The method works the 3-tap filter out in full. For other tap counts these arrays use patterns
derived the same way:

- unidirectional: output 0^(2·TAPS)(1)*;
- bidirectional: input 0^(TAPS−1)(10)* and output 0^TAPS(10)*.

The testbenches check 2 and 5 taps as well as 3.

## What is this design's own choice

The method fixes four things: the structure of each array, the buffer counts, the sampling
patterns, and the use of initial values for FBY. The rest was chosen here:

- word widths, signed arithmetic and full-precision partial sums;
- the weight-load port;
- the asynchronous reset and the `start` pulse that defines period 0;
- the pattern counters that produce `x_take`, `y_valid` and `x_out_valid`;
- feeding zero instead of `x_in` outside `x_take`. In the bidirectional array this is what keeps
  the FBY zeros intact.

The outputs are combinational from the last cell's adder, as the array's output arc has no buffer.
Register them outside if they must meet a timing boundary. Buffers are single-edge registers; the
n-phase clocking the method allows as an alternative is not built. The two arrays in
`fir_uni_array` and `fir_bidir_array` have assertions: the unidirectional output, once started,
continues every period, and the bidirectional input and output strobes are never high in two
periods in a row.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_sa_buffer`, `tb_sa_cell`, `tb_sps_gen` check the building blocks against reference models:
  a delay line, y + w·x, and the pattern formula.
- `tb_fir_uni_array` and `tb_fir_bidir_array` each run arrays of 3, 2 and 5 taps through
  `tb_uni_runner`/`tb_bidir_runner`. The runners load random weights and random 16-bit samples.
  They compare every result with a direct evaluation of the FIR sum, and every strobe with its
  pattern, period by period. They restart the array in the middle of a stream. The bidirectional
  runner drives random values between samples, and checks the FBY zeros on `x_out`.
- `tb_sa_fir_top` runs the top at default parameters with both arrays working at once: 200
  samples per run, 4 runs each. It fails if any of these never happened: full-rate and half-rate
  results, restarts in flight, weight reloads, ignored input periods, FBY zeros. It also checks
  that the bidirectional array needs more than 1.5 times as many cycles for the same work.

All of them pass.

To simulate with Verilator, for example the top:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sa_pkg.sv \
        tb/tb_sa_fir_top.sv --top-module tb_sa_fir_top -Mdir obj -o sim
    ./obj/sim

Any other testbench runs the same way with its own name. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl rtl/sa_pkg.sv rtl/<module>.sv --top-module <module>`.
Lint reports that `rst_n` is used both as an asynchronous reset and in the assertions'
`disable iff`. This is expected and harmless.

## Files

- `rtl/sa_pkg.sv`: default sizes and the accumulator-width function
- `rtl/sa_buffer.sv`: pipelining buffer with initial value
- `rtl/sa_cell.sv`: systolic cell
- `rtl/sps_gen.sv`: sampling-pattern counter
- `rtl/fir_uni_array.sv`, `rtl/fir_bidir_array.sv`: the two arrays
- `rtl/sa_fir_top.sv`: both arrays side by side
- `tb/`: the testbenches named above, plus the two runners
