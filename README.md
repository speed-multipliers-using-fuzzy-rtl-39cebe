# BCS FIR filter: constant-coefficient filtering without multipliers

This is a direct-form FIR filter,

    y[n] = sum_{i=0}^{TAPS-1} h_i * x[n-i]

with constant coefficients. No tap uses a hardware multiplier. Each product
h_i * x is built from a few adders and multiplexers, using **Binary Common
Subexpressions (BCS)**. The design takes one 8-bit sample per clock and
gives one 16-bit output per clock. By default it has 10 taps, with
coefficients 2, 3, 4, 5, 5, 4, 3, 2, 0, 0.

## The BCS idea

Cut a coefficient magnitude into 4-bit digits. Every non-zero 4-bit digit
is one of eight odd values shifted left by 0 to 3 places:

| odd term | binary | digits that use it            |
|---------:|:-------|:------------------------------|
| 1        | 1      | 0001, 0010, 0100, 1000        |
| 3        | 11     | 0011, 0110, 1100              |
| 5        | 101    | 0101, 1010                    |
| 7        | 111    | 0111, 1110                    |
| 9        | 1001   | 1001                          |
| 11       | 1011   | 1011                          |
| 13       | 1101   | 1101                          |
| 15       | 1111   | 1111                          |

So a tap needs only the eight odd multiples 1x, 3x, ..., 15x of its sample.
For each digit, it picks one of these and shifts it. The odd multiples share
subexpressions: 3x (`11`) and 5x (`101`) are built once and reused.

    3x  = x  + 2x        5x  = x  + 4x        7x  = 3x + 4x
    9x  = x  + 8x        11x = 3x + 8x        13x = 5x + 8x       15x = 7x + 8x

Seven adders make all eight terms. The product of a digit d = t << s with x
is then just term t, shifted s places (a 4:1 multiplexer). The digit
products of one tap are added with weights 16^j.

## Datapath

```
fir_in ─► tap_delay_line ─► x[n-i] ─► bcs_multiplier (one per tap) ─► |h_i|·x[n-i]
                                        pre_shifter   x,2x,4x,8x, 3x,5x
                                        bcs_ppg       1x,3x,…,15x
                                        bcs_mux ×2    digit·x per 4-bit digit
COEFS ─► coef_coder ─► sign + coded digits ─┘
                                                     │
             bcs_accumulator: Σ over h_i>0  and  Σ over h_i<0 (magnitudes)
                                                     │
             twos_comp_unit:  y = pos_sum + (~neg_sum + 1)
                                                     │
                                   output register ─► fir_tap_out
```

| module            | role |
|-------------------|------|
| `bcs_pkg`         | coded-digit type `bcs_digit_t` {zero, term, shift}, digit encoder |
| `coef_coder`      | signed coefficient → sign flag + coded 4-bit digits of the magnitude |
| `tap_delay_line`  | shift register of x[n-k], one stage per tap |
| `pre_shifter`     | x, 2x, 4x, 8x, sign-extended by 4 bits, and the base terms 3x, 5x |
| `bcs_ppg`         | the eight odd BCS terms 1x…15x (five more adders) |
| `bcs_mux`         | one digit: term select, then 4:1 shift multiplexer; 0 for a zero digit |
| `bcs_multiplier`  | one tap (sub filter): \|h_i\|·x, exact |
| `bcs_accumulator` | sums all tap products, kept apart by coefficient sign |
| `twos_comp_unit`  | negates the negative-coefficient sum and adds it |
| `bcs_fir_filter`  | top: wiring and output register |

### Coefficient signs

A tap multiplies only by the *magnitude* of its coefficient. The sign goes
with the tap's product to the accumulator. There the product joins either
the positive sum or the negative sum. A single two's complement unit (invert,
add 1) then subtracts the negative sum. This keeps the per-tap hardware the
same for positive and negative coefficients. The range −128 … 127 is coded
exactly, including −128, whose magnitude 128 is the digit pair 1000 0000.

### Constant folding

The coefficients are the parameter `COEFS`. `coef_coder` and the multiplexer
selects are therefore constants, and synthesis reduces each tap to its few
adders. All the logic is still written out, so the structure stays visible
and the blocks can be tested on their own with variable codes.

## Interface and timing

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | one sample per rising edge |
| `rst`         | in  | 1     | synchronous, active high; clears the delay line and the output |
| `fir_in`      | in  | 8     | sample x[n], two's complement |
| `fir_tap_out` | out | 16    | y[n], two's complement, registered |

A sample presented at clock edge t enters x[n] at that edge. It first
contributes to `fir_tap_out` after edge t+1, so the latency is 2 clocks.
There is no handshake: a new sample is taken on every clock. With a
constant input of 5 after reset, the default filter gives
10, 25, 45, 70, 95, 115, 130, 140, and then stays at 140.

Parameters of `bcs_fir_filter`:

| parameter | default | meaning |
|-----------|---------|---------|
| `IN_W`    | 8  | input sample width |
| `COEF_W`  | 8  | coefficient width, two's complement (2 BCS digits) |
| `TAPS`    | 10 | number of taps |
| `OUT_W`   | 16 | output width |
| `COEFS`   | `'{2,3,4,5,5,4,3,2,0,0}` | h_0 … h_{TAPS-1}; must have TAPS entries |

Inside, each tap product is exact, and so is the sum (`IN_W + COEF_W +
clog2(TAPS)` bits). Only the output drops the top bits, so it wraps modulo
2^16. With the default coefficients the output cannot overflow: |y| ≤ 28·128.

## What is taken as given, and what is chosen here

Taken from the description of the filter:
- the chain of pre-shifting, multiplexer, accumulator and two's complement unit;
- coded coefficients feeding the multiplexer;
- the 4-bit BCS terms and their sharing;
- 10 taps;
- the 8-bit input;
- the coefficients 2, 3, 4, 5, 5, 4, 3, 2 of the first eight taps;
- the step response to an input of 5, ending at 140.

The 16-bit output makes the pin count 26, the same as the published
implementation.

Chosen here, where the description says nothing:
- The last two coefficients are 0. Only eight coefficient values are
  given for the 10-tap filter, and zeros keep the final output at 140.
- Input and coefficients are two's complement. Signs are handled in the
  accumulator and the two's complement unit, as described above.
- Coefficients are 8 bits wide, and digits are coded as (zero, term, shift).
- The multiplexer stage has a term selector in front of the 4:1 shift
  multiplexer.
- There is a direct-form delay line, with all products and the sum done
  in one clock and only the output registered.
- Reset is synchronous and active high. On overflow the output wraps.
- The pre-shifter produces shifted copies of the input and the two base
  terms 3x and 5x. It does not recode the input: no consistent recoding
  rule was given for it.

Not reproduced: the FPGA results of the published implementation (370 logic
elements, 85 registers and 312.79 MHz on a Cyclone III). This RTL
synthesizes to 80 flip-flops. Those are eight 8-bit delay-line stages and
the 16-bit output register. The last two stages feed only the
zero-coefficient taps, so synthesis removes them.

## Simulation

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. `tb/bcs_ref_pkg.sv` holds a reference digit
coder for them; it finds each digit's code by search. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bcs_pkg.sv tb/bcs_ref_pkg.sv \
    rtl/*.sv tb/tb_bcs_fir_filter.sv --top-module tb_bcs_fir_filter
./obj_dir/Vtb_bcs_fir_filter
```

- `tb_bcs_fir_filter_full` uses the default filter, with no parameter
  overrides. It replays the constant-input-5 run and checks the tap
  products (10, 15, 20, 25, 25, 20, 15, 10, 0, 0), the rising output and the
  2-clock latency. It then checks 2000 random samples against a
  multiply-accumulate model.
- `tb_bcs_fir_filter` runs 10 taps with coefficients 3, −5, 7, 9, −11, 13,
  15, 8, −108, 90. It checks the impulse response and the latency, random
  streams, an overflowing input pattern and a reset in mid-stream. It also
  counts how often each mechanism is used: each of the 8 terms, each of
  the 4 shifts, zero digits, the negative-coefficient path and output
  wrap. It fails if any of them never happens.
- The unit testbenches cover their blocks exhaustively over 8-bit values
  where that is practical: all coefficients, all inputs, and all
  input × magnitude pairs for `bcs_multiplier`.
