# Decision-tree LUT FIR filter (16 taps, multiplier-free)

This is a 16-tap direct-form FIR filter,

    y[n] = sum_{t=0..15} h[t] * x[n-t]

with 8-bit signed samples and 16-bit signed coefficients. It has no
multiplier. Each tap product is built from a small look-up table that holds
only four odd multiples of the current coefficient: A, 3A, 5A and 7A. A
decision tree turns a 4-bit multiplier digit into "take this odd multiple,
shift it left by s, and optionally subtract it from 16A". Those three
operations give every multiple from 1A to 16A. A single accumulator (the
`y` register) collects the products one tap at a time.

The default coefficients are an even-symmetric (linear-phase) low-pass set:

    3, 6, 0, -16, -19, 12, 76, 128, 128, 76, 12, -19, -16, 0, 6, 3

## The coefficient table and its decision tree

The look-up table is addressed by a 4-bit code. The 16 codes stand for these
multiples of the coefficient A:

| code | multiple | code | multiple |
|------|----------|------|----------|
| 0000 | 1A       | 1000 | 15A      |
| 0001 | 2A       | 1001 | 14A      |
| 0010 | 3A       | 1010 | 13A      |
| 0011 | 4A       | 1011 | 12A      |
| 0100 | 5A       | 1100 | 11A      |
| 0101 | 6A       | 1101 | 10A      |
| 0110 | 7A       | 1110 | 9A       |
| 0111 | 8A       | 1111 | 16A      |

Two properties shrink this 16-word table to 4 stored words.

1. **Mirror (complement) symmetry.** In each row the right-hand multiple is
   16A minus the left-hand one: 15A = 16A - 1A, ..., 9A = 16A - 7A. The
   upper codes 1000..1110 are therefore produced by the complement unit as
   `(A << 4) - m`, where m is the multiple of the mirrored lower code
   (`xxx + 1`). The last row (8A, 16A) has no mirror partner. Both are
   powers of two.
2. **Shift property.** Every remaining multiple m in {1..8, 16} is an odd
   number times a power of two:

   | stored odd multiple | derived by shifting      |
   |---------------------|--------------------------|
   | A   (code 0000)     | 2A, 4A, 8A, 16A (<<1..4) |
   | 3A  (code 0010)     | 6A, 12A (<<1, <<2)       |
   | 5A  (code 0100)     | 10A (<<1)                |
   | 7A  (code 0110)     | 14A (<<1)                |

   The stored entry is selected by `odd_sel` (0..3 for A, 3A, 5A, 7A). For
   an odd multiple this is code bits [2:1].

`decision_tree_gen` decodes a code into `{odd_sel, shamt, complement}`
(the `dt_instr_t` struct in `dtg_pkg`). The data path is:

    odd_mult_lut --odd_sel--> lut_shifter --shamt--> complement_unit --> k*A
    (A,3A,5A,7A)              (x1..x16)              (16A - m when set)

`odd_mult_lut` fills its four words when the coefficient is loaded. It uses
one adder or subtractor per word: 3A = 2A + A, 5A = 4A + A, 7A = 8A - A.
The words are 21 bits wide (`MULT_W`), which covers 16A and 16A - m for any
16-bit A.

## How a sample is filtered

Each tap product h[t] * x[n-t] is computed a nibble at a time:

* x = 16 * x_hi + x_lo. The low nibble `x_lo` is unsigned (0..15). The high
  nibble `x_hi` is signed (-8..7).
* For each nibble, its magnitude becomes a table code. Magnitudes 1..8 map
  to codes 0000..0111 and 9..15 to codes 1110..1000 (the `encode_nibble`
  and `factor_code` functions in `dtg_pkg`). A zero nibble adds nothing.
  A negative high nibble subtracts its product. The high nibble's product is
  weighted by 16.

`fir_controller` sequences one sample like this:

| state | cycles | action                                                          |
|-------|--------|-----------------------------------------------------------------|
| IDLE  | 1      | `in_ready`=1. On `in_valid`: shift x into the delay line, clear y, tap = 0 |
| LOAD  | 1/tap  | h[tap] from `coeff_rom` is loaded into `odd_mult_lut`           |
| LO    | 1/tap  | y += h[tap] * x_lo[n-tap]                                      |
| HI    | 1/tap  | y += 16 * h[tap] * x_hi[n-tap], then advance the tap            |
| DONE  | 1      | copy y to `y_out`                                                |

One sample therefore takes 1 + 3*16 + 1 = **50 clock cycles**. Call the
edge that accepts a sample edge 0. `y_valid` rises on edge 49, and the next
sample can be accepted on edge 50. The result is kept at full precision:
28 bits = 8 + 16 + log2(16). Nothing is rounded and nothing overflows.

## Blocks

| module              | role |
|---------------------|------|
| `dtg_fir_top`       | top level; wires the blocks and splits samples into nibbles |
| `fir_controller`    | state machine above |
| `addr_gen`          | tap counter, shared by the coefficient ROM and the delay line |
| `coeff_rom`         | 16 x 16-bit coefficient store (parameter `H`), asynchronous read |
| `sample_delay_line` | the z^-1 chain: 16 x 8-bit shift register with a tap-select read port |
| `coeff_lut_unit`    | the decision-tree multiplier: `odd_mult_lut`, `decision_tree_gen`, `lut_shifter` and `complement_unit` |
| `mac_accumulator`   | the y register: signed, weighted accumulation and output capture |
| `dtg_pkg`           | sizes, types (`dt_instr_t`, `nib_op_t`) and the code-mapping functions |

The tap counter and the controller serve both the coefficient ROM and the
LUT multiplier. The multiplier has no sequencer of its own.

## Interface

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock |
| `rst`      | in  | 1     | synchronous reset, active high; clears the delay line, y and the FSM |
| `in_valid` | in  | 1     | `x_in` holds a sample |
| `in_ready` | out | 1     | filter idle; the sample is taken on an edge where both are high |
| `x_in`     | in  | 8     | signed sample |
| `y_valid`  | out | 1     | one-cycle pulse; `y_out` holds y for the last accepted sample |
| `y_out`    | out | 28    | signed result; holds its value until the next pulse |

The delay line starts from zeros after reset. The first outputs are those of
a filter started from rest.

## What is specified and what is chosen here

These parts follow the design as specified:

* the 16-tap direct form, 8-bit samples and 16-bit coefficient words;
* the benchmark coefficient set;
* the 16-code coefficient table;
* the four stored odd multiples;
* the shift tree and the 16A-minus complement rule;
* a controller, address generator, coefficient ROM, register/shift
  register with a multiplexer, and an accumulator whose y register starts
  each output at zero.

These are the implementation's own choices:

* **Multiplier digits.** The design does not say what the 4-bit code
  multiplies against. Here it is a nibble of the sample, and A is the tap
  coefficient.
* **One product lane.** A waveform of the original design suggests four
  lanes working in parallel. Their count and organisation are not specified,
  so only one lane is built. Four lanes would cut the 50 cycles per sample
  roughly by four.
* **Schedule and handshake.** The nibble-serial schedule and the
  `in_valid`/`in_ready`/`y_valid` handshake are this implementation's.
* **Output width.** The output is 28 bits at full precision. The original
  design shows a 16-bit output, with no truncation rule.
* **Coefficient ROM.** All 16 coefficients are stored. The ROM does not use
  the coefficients' own symmetry.
* **Reset.** Reset is synchronous and active high.
* **Not built:** a 16-bit "desired" input seen in the original waveforms,
  because its function is not described.

The original FPGA build reported 62 flip-flops, 414 LUTs and 16 DSP blocks
on a Zynq-7000. This RTL uses no multiplier at all. The original build also
reported 19 I/Os; this top has 41 I/O bits, because of the wider output and
the handshake.
Neither the timing nor the device figures were reproduced.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
ends by printing `TB_RESULT checks=N failures=M`. The ones that matter most:

* `tb_decision_tree_gen`, `tb_coeff_lut_unit`: all 16 codes, for random and
  extreme coefficients, checked against the table above.
* `tb_dtg_fir_top`: 260 samples at the default parameters. It uses an
  impulse (the output reproduces h), runs of -128 and 127, and random data
  with random gaps. Every output is compared with a direct convolution. It
  checks that each output arrives exactly 49 edges after its sample is
  accepted. It also counts the direct, shifted, complement, zero-nibble,
  negative-nibble and 8A paths and back-pressure, and fails if any of them
  never occurs.
* `tb_dtg_fir_workloads`: two filters with other coefficient sets, side by
  side. One uses the 7-tap set {-1, 0, 9, 16, 9, 0, -1}, zero-padded. The
  other uses a set spanning the full 16-bit range.

To simulate with Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/dtg_pkg.sv tb/tb_dtg_fir_top.sv --top-module tb_dtg_fir_top
    ./obj_dir/Vtb_dtg_fir_top

Any other testbench works the same way. Use `-Wno-fatal` if lint warnings
should not stop the build.

## Changing the design

* **Other coefficients:** override `H` on `dtg_fir_top` with a
  `dtg_pkg::coef_set_t` (16 signed 16-bit words). Pad shorter filters with
  zeros.
* **Tap count:** `N_TAPS` in `dtg_pkg` sets the ROM depth, the delay-line
  depth, the tap counter and the accumulator width together.
* **Sample width:** the nibble split assumes 8-bit samples, so `DATA_W` = 8.
  Wider samples would need more nibble phases in `fir_controller`, one
  more state per nibble.
