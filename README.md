# One circuit for FM0 and Manchester line codes

FM0 and Manchester are two-level line codes used on the downlink of dedicated
short-range communication (DSRC) and RFID links. Both send every data bit as two
half-bit levels, so the line toggles often and its average stays near zero (it is
"dc-balanced"). A transmitter that has to offer both codes usually contains two encoders
side by side, and half of that logic sits idle whichever code is in use.

This RTL describes an encoder in which every gate and the only flip-flop work in both
modes. It has two multiplexers, one XNOR, one inverter and one flip-flop. Two
transformations get it there; together they are called similarity-oriented logic
simplification (SOLS):

* **Area-compact retiming.** FM0 needs only the level of the previous half bit, so one
  flip-flop is enough.
* **Balance logic operation sharing.** The FM0 and Manchester equations turn out to have
  the same shape, so one set of gates computes both.

## The two codes

Each data bit `X` takes one period of the bit clock `CLK`. The first half of the bit is
sent while `CLK` is high and the second half while it is low. Call the two halves of
bit *t* `A(t)` and `B(t)`.

| code       | first half `A(t)` | second half `B(t)`   | meaning                                      |
|------------|-------------------|----------------------|----------------------------------------------|
| FM0        | `~B(t-1)`         | `X xor B(t-1)`       | the level always changes at a bit boundary; a 0 also changes it in mid-bit, a 1 holds it |
| Manchester | `~X`              | `X`                  | `code = X xor CLK`: a 0 is sent high then low, a 1 is sent low then high |

Example with the bits 0,1,1,0,1, where the level before the first bit is high:

```
X            0    1    1    0    1
FM0          01   00   11   01   00
Manchester   10   01   01   10   01
```

The Manchester polarity used here is `X xor CLK`, so a 0 is sent as high then low.
Some texts use the opposite polarity (1 = high then low). To get it, invert `x` at the
input.

## How one circuit makes both

Compare the rows of the table.

* **First half.** Both codes send the inverse of one operand: `B(t-1)` for FM0, `X`
  for Manchester. A 2:1 mux (MUX_2, selected by `mode`) picks the operand, and one
  inverter serves both codes.
* **Second half.** `X xor B(t-1)` is FM0's second half. If `B(t-1)` is forced to 0 it
  becomes `X`, which is Manchester's second half. So one XOR gate serves both codes,
  provided the stored level is held at 0 in Manchester mode. The active-low clear
  `clr_n` of the flip-flop does that, so no mux is needed.
* **Choosing the half.** A mux selected by `CLK` itself (MUX_1) sends the first-half
  value while `CLK` is high and the second-half value while it is low.
* **Storage.** The flip-flop (DFFB) sits behind MUX_1 and loads on the rising edge. At
  that moment MUX_1 has been showing the second half `B(t)` for the whole low phase, so
  DFFB stores `B(t)`. It then serves as `B(t-1)` for the next bit. An earlier
  arrangement with a second flip-flop for `A(t)` is not needed.
* **Balanced paths.** The first-half path has a mux and an inverter, while the
  second-half path has only the XOR. The unequal delays can make MUX_1 glitch. In the
  balanced form, the XOR becomes an XNOR and the inverter moves behind MUX_1, where
  both paths share it. Each path then has one gate before MUX_1.

```
            mode                       clk
              |                         |
  b_prev --0|MUX_2|--a_pre---------1|MUX_1|--mux1--[inv]--+---> code
  x -------1|     |                 |     |               |
                              +---0|     |               |
  x -----\                    |                          |
          XNOR ---b_pre-------+                          |
  b_prev -/                   +---[inv]--- b_next --> DFFB D
                                                 DFFB Q = b_prev  (posedge clk, clr_n)
```

### Control settings

| code                    | `mode` | `clr_n` |
|-------------------------|--------|---------|
| FM0                     | 0      | 1       |
| Manchester              | 1      | 0       |
| initialisation (in FM0) | 0      | 0 for at least one period |

`mode` and `clr_n` are separate inputs because `clr_n` has a second job:
initialisation. If `clr_n` were derived from `mode`, the encoder could not be
initialised in FM0 mode. A controller outside this RTL is expected to drive both lines.
After a clear, the stored level is 0, so the first FM0 bit starts high.

## Timing

`code` is combinational from `clk`, `x`, `mode` and the flip-flop, so it changes on both
clock edges. The clock is a data input here, and that is the design's principle. Keep
this in mind when constraining it: the clock net also drives MUX_1's select, and
`code` is a generated waveform at twice the bit rate.

* Change `x` (and `mode`/`clr_n`) just after a rising edge. Hold `x` for the full
  period.
* The bit goes out with no latency. The first half appears as soon as `CLK` rises and
  the second as soon as it falls. The state update lags by one cycle: the second half
  of bit *t* reaches DFFB at the rising edge that starts bit *t+1*.

## Departure from the drawn circuit

In the drawing, DFFB's D input is the output of the shared inverter, the same net as
`code`. That works in silicon only because MUX_1 switches a little after the flip-flop
has sampled. In a zero-delay RTL simulation the two happen in the same step, and the
result would depend on event order.

`sols_fm0_manchester_encoder` therefore feeds D from the inverted XNOR output, named
`b_next`. That is the value MUX_1 shows throughout the low phase. The function is
identical. An immediate assertion checks that `b_next == code` whenever `clk` is low.
After synthesis, the netlist has two inverters where the drawing shares one.

Other choices not fixed by the source description:

* **Clear type.** The clear of DFFB is asynchronous, active low.
* **Manchester polarity.** It follows the `X xor CLK` equation, as described above.

## Files

| file | contents |
|------|----------|
| `rtl/sols_pkg.sv` | `coding_mode_e` (`MODE_FM0`, `MODE_MANCHESTER`) and `clr_n_for()`, the clear level that goes with each mode |
| `rtl/sols_logic_a.sv` | MUX_2, the operand select for the first half |
| `rtl/sols_logic_b.sv` | the XNOR for the second half |
| `rtl/sols_dff_b.sv` | DFFB, positive edge, asynchronous active-low clear |
| `rtl/sols_fm0_manchester_encoder.sv` | top: the blocks above, MUX_1 and the shared inverter |
| `tb/tb_*.sv` | one self-checking testbench per module |

The top has no parameters. Synthesis gives one flip-flop with asynchronous reset, two
2:1 muxes, one XNOR and two inverters (the second inverter comes from the D-input
choice above).

## Verification

* **MUX_2 and the XNOR.** Their testbenches try every input combination.
* **DFFB.** The testbench checks 200 random captures. It also checks that the clear
  acts in mid-period without waiting for an edge, and that q stays 0 over an edge
  while `clr_n` is low.
* **The top.** `tb_sols_fm0_manchester_encoder` samples `code` twice in each half
  period. It compares every bit with a model written from the coding rules, not from
  the circuit. It runs:
  * the five-bit example above in both codes;
  * 4000 random bits with random switches between the codes and random one-period
    clears in FM0 mode.

  It counts FM0 bits, Manchester bits, mid-bit transitions, held levels, boundary
  transitions, switches in each direction, clears and the two examples. Any of these
  that never happens counts as a failure.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sols_pkg.sv rtl/sols_logic_a.sv \
  rtl/sols_logic_b.sv rtl/sols_dff_b.sv rtl/sols_fm0_manchester_encoder.sv \
  tb/tb_sols_fm0_manchester_encoder.sv --top-module tb_sols_fm0_manchester_encoder
./obj_dir/Vtb_sols_fm0_manchester_encoder
```

What is not verified:

* glitch behaviour, delay balance, transistor count and power;
* whether a given process meets a bit rate. DSRC rates go up to 27 Mb/s, so the clock
  must run at the bit rate. With a few gate delays per half period that is unlikely
  to be a problem, but no timing analysis was done.

## Not included

These parts of a DSRC transceiver are outside this RTL:

* the microprocessor;
* the RF front ends;
* the rest of the transmit baseband (modulation, error correction, synchronisation);
* the receiver, including any FM0/Manchester decoder;
* the controller that drives `mode` and `clr_n`.
