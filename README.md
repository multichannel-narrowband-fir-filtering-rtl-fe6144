# Eight-channel narrowband FIR filter with one shared datapath

A software-radio receiver often has to run the same narrowband FIR filter on
several channels, while its FPGA clock (100 MHz here) is around a thousand
times faster than each channel's sample rate (up to 100–300 kHz). The filter
hardware therefore has plenty of time per sample, and what matters is area.
This design builds **one** filter datapath and shares it between **eight**
channels. Each channel keeps only its own 17-sample history. A sample arrives
tagged with its channel number. That channel's history shifts it in, and the
shared datapath computes that channel's output before the next sample is taken.

The filter is

    y(n) = sum_{k=0}^{16} h(k) x(n-k)

It has 17 taps. Samples and coefficients are 16-bit two's complement,
accumulation is 40-bit and the result is a saturated 32-bit word. These are
the formats of a common DSP multiply-accumulate unit, kept so that a software
version on such a DSP gives bit-identical results.

## Three things that keep it small

1. **One datapath for all channels.** The only per-channel hardware is
   8 × 17 × 16 = 2176 flip-flops of sample history (`fir_data_store`). A
   channel multiplexer feeds the history of the channel being filtered to the
   datapath.
2. **Symmetric folding.** The low-pass coefficients are symmetric,
   h(k) = h(16−k). So only 9 values are stored (`fir_coef_store`). The two
   samples that share a coefficient are added before the multiplication
   (`fir_preadder`):

       y(n) = sum_{k=0}^{7} h(k) (x(n-k) + x(n-16+k))  +  h(8) x(n-8)

   That makes 9 multiplications instead of 17. The pre-added operand is
   17 bits wide.
3. **Shift-add multipliers.** Each multiplier (`fir_seq_mult`) is one adder
   and two shift registers. It takes one coefficient bit per clock, so a
   16-bit coefficient takes 16 steps. There is no array or tree multiplier.

## The sequential multiplier

`fir_seq_mult` forms a × b. The multiplicand a is the signed 17-bit pre-added
pair and the multiplier b is the signed 16-bit coefficient. The partial
product is held in two registers: an 18-bit high part `hi` and the
multiplier register `lo`, which shift right together. In step i (i = 0..15)
the block looks at the bit of b now in `lo[0]`:

* If the bit is 1, a is added to `hi`. In the last step, which looks at b's
  sign bit, a is **subtracted** instead, because in two's complement that
  bit weighs −2^15.
* The 19-bit sum {`hi`+addend} then shifts right by one place, arithmetically.
  Its lowest bit moves into the top of `lo`, and the bit of b just used drops
  out of the bottom.

After 16 steps, {`hi`[16:0], `lo`} is the exact 33-bit signed product. The
operation needs no correction step and no operand conversion. The sum is
worked out one bit wider than `hi`, so the last step cannot overflow, even
for a = −2^16 and b = −2^15.

Timing: a one-cycle `start` loads the operands. The 16 steps follow on the
next 16 edges, and `done` is high for one cycle, 17 cycles after the start
cycle. The product stays valid until the next `start`.

## How a sample moves through the filter

`fir_ctrl` runs the sequence. `N_MUL` multipliers ("lanes") work side by
side. Lane j of group g handles coefficient k = g·N_MUL + j and the tap pair
x(n−k), x(n−16+k). The default is N_MUL = 9, so all nine multiplications run
at once in one group:

| cycle (A = accepting cycle) | what happens |
|---|---|
| A | `in_valid && in_ready`: the channel's history shifts in the sample, the channel number is latched, the accumulator is cleared |
| A+1 | every lane pre-adds its tap pair and picks its coefficient; all multipliers start |
| A+2 … A+18 | the multipliers step; `done` comes in A+18 |
| A+19 … A+27 | one product per cycle is added into the 40-bit accumulator, k = 0..8 |
| A+28 | `out_valid` for one cycle with `out_ch`; `out_data` is the saturated accumulator |
| A+29 | `in_ready` again |

In general, with G = ceil(9 / N_MUL) groups, the result comes
1 + 18·G + 9 cycles after acceptance. That is 28 cycles for N_MUL = 9
(one sample every 29 cycles) and 172 cycles for N_MUL = 1 (one sample every
173 cycles). `N_MUL` is the area/speed knob:

* N_MUL = 9 follows the arrangement this filter was planned around:
  parallel sequential multiplications, then one final 40-bit add per
  product.
* N_MUL = 1 is a single shared multiply-accumulate unit.

At 100 MHz with the default, eight channels at 100 kHz each use 23 % of the
clock cycles, and at 300 kHz each 70 %. With N_MUL = 1, eight channels at
100 kHz each would need 138 % and do not fit. (If the sample rate is meant
as the total over all channels, the margin is eight times larger.)

The accumulator has 8 guard bits above the 32-bit result range. A partial sum
may leave the 32-bit range as long as the final sum comes back into it. Only
the final value is saturated (`fir_saturate`). The worst case,
17 × 2^15 × 2^15 ≈ 1.8·10^10, is far below 2^39, so the 40-bit register
never wraps. The result is the integer value of the sum, with no scaling
shift. `out_sat` flags a result that was clamped to 0x7FFF_FFFF or
0x8000_0000.

## Interface of `fir_mc_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears histories, coefficients, accumulator) |
| `in_valid`, `in_ready` | in/out | 1 | sample handshake; accepted on a clock edge where both are high |
| `in_ch` | in | 3 | channel of the sample |
| `in_data` | in | 16 | sample x(n) |
| `coef_we`, `coef_addr`, `coef_data` | in | 1, 4, 16 | write distinct coefficient `coef_addr` (0..8): entry k is h(k) = h(16−k), entry 8 is the centre tap h(8); addresses 9..15 are ignored |
| `out_valid` | out | 1 | result strobe, one cycle |
| `out_ch` | out | 3 | channel of the result |
| `out_data` | out | 32 | saturated y(n) |
| `out_sat` | out | 1 | the result was clamped |

The coefficients reset to zero and must be loaded before use. A coefficient
write takes effect at the next edge. Make writes while `in_ready` is high, or
a sample being filtered may see a mix of old and new coefficients.

Parameters: `N_CH` (8), `N_TAPS` (17), `N_MUL` (9). The word sizes are in
`fir_pkg`. Any `N_TAPS` works; odd lengths have a centre tap that is not
paired.

## Modules

| file | role |
|---|---|
| `rtl/fir_pkg.sv` | sizes and the controller state type |
| `rtl/fir_mc_top.sv` | top level: wiring and per-lane tap/coefficient selection |
| `rtl/fir_ctrl.sv` | sequencer (accept, load, multiply, accumulate, output) |
| `rtl/fir_data_store.sv` | 8 × 17 sample shift registers with a channel read mux |
| `rtl/fir_coef_store.sv` | 9 coefficient registers with a write port |
| `rtl/fir_preadder.sv` | adds a symmetric tap pair (17-bit result) |
| `rtl/fir_seq_mult.sv` | 17 × 16-bit shift-add multiplier, 16 steps |
| `rtl/fir_accumulator.sv` | 40-bit accumulator with clear |
| `rtl/fir_saturate.sv` | 40-to-32-bit saturation |

Each file opens with a description of its behaviour and timing.

## Simulation

Every block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. For example, to build and run the
end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/tb_fir_mc_top.sv \
              --top-module tb_fir_mc_top -o sim
    ./obj_dir/sim

The same works for every other `tb/tb_*.sv`. Pass `rtl/fir_pkg.sv` first;
`-Irtl` finds the modules.

* `tb_fir_mc_top` runs the filter at its default size. It compares every
  output (value, channel, saturation flag, latency) with a 64-bit reference
  model of the unfolded 17-tap sum. It covers:
  * an impulse response, which must reproduce h(0..16) and then zeros;
  * about 400 random samples on all eight channels, offered back to back so
    that the input is held off while the filter is busy;
  * coefficient reloads;
  * positive and negative saturation;
  * a case where the partial sum passes +2^31 and then comes back to 65536,
    which needs the guard bits.

  It counts each of these events and fails if one never happened.
* `tb_fir_mc_top_serial` runs the same test with N_MUL = 1.
* `tb_fir_ctrl` checks the sequencer with 9, 4 and 1 lanes. With 4 lanes the
  last group is only partly used.
* `tb_fir_seq_mult` checks corner operands and random operands, and that the
  multiplier takes exactly 17 cycles.
* The other testbenches check their block against a model.

The simulator used has only two-valued logic, so everything that is read is
reset or initialised.

## Where the design makes its own choices

* **33-bit products.** The DSP format is a 32-bit product. Pre-adding two
  16-bit samples gives a 17-bit operand, so the product here is 33 bits,
  sign-extended into the 40-bit accumulator. The result is exact:
  h·(a+b) equals h·a + h·b, so it matches a DSP that forms each 32-bit
  product separately and sums them in 40 bits.
* **How many multipliers.** The filter was planned both as "one MAC shared by
  all channels" and as "16 sequential multiplications in parallel, then 16
  final adds" (16 counts the taps before folding). With folding the second
  becomes 9 parallel multipliers, which is the default. `N_MUL = 1` gives the
  first. Both are tested.
* **Handshake, coefficient port, reset values, state sequence, `out_sat`.**
  These are this design's own. The coefficients of the intended low-pass
  filter are not part of the design; load your own.
* **Not included.** There is no software version of the filter, no
  vendor-generated filter core for comparison, and no attempt to use FPGA
  constant-coefficient multipliers. Timing closure at 100 MHz and the FPGA
  resource count have not been checked with FPGA tools. Generic synthesis
  gives about 2900 flip-flops, of which 2176 hold sample history.
