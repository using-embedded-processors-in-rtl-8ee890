# Iris-flower perceptron behind a processor's I/O ports

A small multilayer perceptron (MLP) is built here as combinational logic and
attached to an embedded processor as a few I/O ports. The network classifies
iris flowers. It takes four measurements (sepal length, sepal width, petal
length, petal width) and decides among three species: setosa, versicolor and
virginica. The network does the arithmetic. The processor runs the rest of
the application and needs only five I/O instructions per sample: write the
four measurements, then read the result. Training is done off-line, and the
weights are built into the circuit as constants.

The design is a soft-core-processor system on an FPGA. The processor and its
other peripherals are not part of this RTL. The processor's I/O bus appears
as ports of the top module.

## Structure

```
             nios_nn_system (top)
  bus_* ───► nn_pio ── rn_in[0..3] (4 x 16 bit) ──► mlp_net ── saida[2:0] ──► pins
  ◄────────      ▲                                    │
                 └──────────── rn_out[2:0] ◄──────────┘

  mlp_net:  ent_a..ent_d ─┬─► neuro1_sc x4 (hidden) ─┬─► neuro2_sc x3 (output) ─► saida[k]
                          (busses: every input goes   (every hidden output goes
                           to every hidden neuron)     to every output neuron)
  neuro1_sc: 4 multipliers ─► adder (+ bias) ─► pwl_sigmoid ─► 16-bit output
  neuro2_sc: neuro1_sc ─► "output >= 0.5" ─► 1-bit output
```

| file | role |
|---|---|
| `rtl/nn_pkg.sv` | sizes, number format, port numbers, default (iris) weights |
| `rtl/pwl_sigmoid.sv` | piecewise-linear transfer function |
| `rtl/neuro1_sc.sv` | hidden neuron, 16-bit output |
| `rtl/neuro2_sc.sv` | output neuron, 1-bit output |
| `rtl/mlp_net.sv` | the 4-4-3 network, purely combinational |
| `rtl/nn_pio.sv` | processor I/O ports: four input registers, one result port |
| `rtl/nios_nn_system.sv` | top: ports + network |

The module names `neuro1_sc` and `neuro2_sc` and the port names `ent1..ent4`,
`ent_a..ent_d` and `saida` are those of the original schematic. In
Portuguese, *entrada* means input and *saída* means output.

## The network

The network has three layers: 4 inputs, 4 hidden neurons and 3 output neurons.
The input layer does no arithmetic, so it is only wiring. Each input bus fans
out to all four hidden neurons, and each hidden output fans out to all three
output neurons.

A neuron computes `f(w0*x0 + w1*x1 + w2*x2 + w3*x3 + b)` with four parallel
multipliers and one adder. Hidden neurons pass `f` on as a 16-bit value.
Output neurons produce one bit: 1 when `f >= 0.5`, which is the same as
`sum >= 0`. The three output bits form the 3-bit result, bit k for class k.

### Number format

Every bus carries 16-bit two's-complement fixed-point numbers in Q8.8 format
(8 fraction bits), so 1.0 is 256. This covers -128 to +127.996 with a step of
1/256, which is enough for measurements in centimetres. Inside a neuron:

* each Q8.8 × Q8.8 product is kept as a full 32-bit Q16.16 value;
* the bias is shifted left by 8 bits to line it up with the products;
* the sum is 35 bits wide, so it cannot overflow for any inputs;
* the transfer function takes this Q16.16 sum and returns a Q8.8 value from
  0 to 256.

The 16-bit bus width comes from the original design. The position of the
binary point is this design's choice: the original only says that its
floating-point values were converted to integers. `DATA_W` and `FRAC_W` are
parameters, but the default weights in `nn_pkg` are written for Q8.8.

### Transfer function

The logistic sigmoid is replaced by three straight pieces:

```
f(x) = 0            x <= -2
f(x) = 0.5 + x/4    -2 < x < 2
f(x) = 1            x >= 2
```

The middle piece has the sigmoid's value at 0, and it reaches 0 and 1 at
±2. The original design uses this function. In hardware it needs two
comparisons and one arithmetic right shift. The shift does the division by
4 and the change from Q16.16 to Q8.8 in one step (a shift by 10). The shift
rounds toward minus infinity.

### Weights

The original trained weights are not known. The defaults in `nn_pkg` are a
small hand-set network. It separates the classes with the two usual
petal-based boundaries:

| neuron | function |
|---|---|
| hidden 0 | f(2·(PL − 2.5)): petal longer than 2.5 cm (not setosa) |
| hidden 1 | f(4·(PL + 2·PW − 8.45)): virginica side |
| hidden 2 | f(−4·(PL + 2·PW − 8.45)): versicolor side |
| hidden 3 | f(−2·(PL − 2.5)): setosa |
| out 0, setosa | h3 − 0.5 ≥ 0 |
| out 1, versicolor | h0 + h2 − 1.5 ≥ 0 |
| out 2, virginica | h0 + h1 − 1.5 ≥ 0 |

PL is petal length and PW is petal width, both in cm. The sepal inputs get
weight 0; their multipliers remain in the RTL and synthesis removes them. To load other weights,
override the `HID_W`, `HID_B`, `OUT_W` and `OUT_B` parameters of `mlp_net`.
These are packed arrays indexed `[neuron][input]`, and each value is the real
weight × 256. In a packed constant the highest index is written first; see
`nn_pkg`.

Inputs near a class boundary can set no result bit or more than one. The
software must handle those cases. For example, a petal length of exactly
2.5 cm sets both the setosa bit and the versicolor bit.

## The processor interface

The program on the processor classifies one sample like this:

```
out(port 1, sepal length); out(port 2, sepal width);
out(port 3, petal length); out(port 4, petal width);
result = in(port 5);
```

`nn_pio` implements these ports on a simple port-mapped bus. This bus is this
design's own; the original used the processor vendor's parallel-I/O
peripherals. The bus works as follows:

* **Write:** `bus_write` is high for one clock, together with `bus_addr`
  (1..4) and `bus_wdata`. The low 16 bits are stored at that clock edge, and
  the network sees them from then on.
* **Read:** `bus_read` is high for one clock. One clock later, `bus_rvalid`
  is high and `bus_rdata` holds the value:
  * port 5 returns the 3-bit result, zero-extended;
  * ports 1..4 return the value last written to them;
  * every other address reads 0.
* **Rules:** a write and a read in the same clock are not allowed; an
  assertion checks this. Reset is synchronous and active low, and it clears
  the four input registers.

The network's result also goes straight to the `saida` output pins.

### Timing

The network has no clock. A new input set gives a new result after the logic
delay. On the original FPGA, that delay was 32 ns. With the bus above, the
result is ready for any read that comes at least one clock after the last
write, as long as the network's delay fits in one clock period. At 40 MHz the
period is 25 ns, so the design needs a technology where the network settles
within that time. Otherwise, leave one idle clock between the last write and
the read.

The original processor takes 4 clocks per `out` and 8 clocks per `in`. One
classification therefore takes 4·4 + 8 = 24 clocks, which is 600 ns at
40 MHz. The end-to-end testbench models that instruction timing and checks
the 24 clocks.

## Where this design departs from the original, or fills gaps

* **Weights:** hand-set, not the original's trained values.
* **Number format:** Q8.8 is assumed.
* **Output neuron:** its one-bit result is `f >= 0.5`. The original's output
  neurons give one bit each, but how that bit is formed is not given.
* **Bit order:** the class-to-bit order is assumed (0 setosa, 1 versicolor,
  2 virginica).
* **Bus:** the bus protocol, the reset behaviour and reading back ports 1..4
  are this design's own.
* **Division:** the original lists dividers among its building blocks. Here
  the only division, x/4, is a shift.
* **Not built:** the processor, its UART, LEDs, buttons, display and
  external-memory bus. The processor's I/O bus is a set of top-level ports.
* **Not tested:** the original's 32 ns network delay is a property of its
  FPGA, and these tests cannot check it.
* **Training:** on-chip training is not part of this design. The original
  also trains off-line.

## Verification

Every module has a self-checking testbench in `tb/`. The reference model in
`tb/nn_ref_pkg.sv` recomputes each neuron in real arithmetic from its own copy
of the weight table. It rounds only where the hardware rounds.

| testbench | what it checks |
|---|---|
| `tb_pwl_sigmoid` | breakpoints, the values either side of them, random values; all three pieces |
| `tb_neuro1_sc` | a neuron with nonzero weights on every input, at both saturation levels, on the linear piece, and at the extremes of the input range |
| `tb_neuro2_sc` | the decision bit exactly at sum = 0 and one step below, plus random inputs |
| `tb_mlp_net` | 15 iris records (5 per class) must give their true class, and 3000 random inputs must match the model |
| `tb_nn_pio` | reset values, writes, read-back, ignored addresses, result port, `bus_rvalid` timing |
| `tb_nios_nn_system` | the full system with default parameters, driven by a model of the processor's `out` and `in` timing: the 15 iris records, two boundary cases, 400 random samples, 24 clocks per classification, result pins equal to the port value |

`tb_nios_nn_system` counts how often each mechanism occurs: writes to each
port, result reads, each class bit, no class, several classes, and each piece
of the transfer function. A mechanism that never occurs counts as a failure.
The iris tests use 15 well-known records of the public data set, not all 150.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/nn_pkg.sv tb/nn_ref_pkg.sv tb/tb_nios_nn_system.sv --top-module tb_nios_nn_system
./obj_dir/Vtb_nios_nn_system
```

Each testbench ends with the line `TB_RESULT checks=N failures=M`. Every
testbench runs in well under a second.
