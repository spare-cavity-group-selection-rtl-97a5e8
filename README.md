# Spare Cavity Group Selection (SCGS)

A ring accelerator has ten 10 MHz accelerating cavities (named C36, C46, C51,
C56, C66, C76, C81, C86, C91, C96), and one spare. The cavities are split into
frequency groups. Each group runs at its own harmonic number. When a cavity
fails, the spare takes its place, and the spare must then run at the
frequency of the failed cavity's group. The SCGS module does this in logic.
It learns which cavity was replaced and looks up that cavity's group. It then
hands the spare's RF source the timing or frequency information of that
group, and only that group.

There are up to four groups. Today two or three are used; the fourth is
reserved. Each cavity's group is set by hand on a BCD rotary switch on the
front panel, so regrouping the cavities needs no change to the logic.

The module works in one of two modes, set by a jumper (SW1):

* **Serial mode.** Each group has a serial input (S1..S4) carrying its
  harmonic number as a pulse train. The train of the selected group is copied
  to two identical serial outputs. These feed a multi-harmonic RF source.
* **Pulses mode** (jumper fitted). Each group has a pulse input (P1..P4). A
  pulse on the selected group's input gives a 1 µs pulse on that group's
  output (G1..G4). This selects the right frequency source.

## Finding the group

The voltage program selector names the replaced cavity on a 10-bit parallel
bus, `cstatus_n`. The bus is active low: the replaced cavity's line is low
and all other lines are high. Bit 0 is C36 and bit 9 is C96, in front-panel
order.

Each cavity has a switch value `grc[c]`, 3 bits wide:

| switch | meaning        |
|--------|----------------|
| 0      | in no group    |
| 1..4   | group 1..4     |
| 5..7   | in no group (not a valid setting) |

`scgs_radio` searches the status bus from bit 0 upward. It takes the first
low line it finds, and that cavity's switch value becomes the **selected
group**. The result is given in two forms:

* `grsel`: a one-hot group select. It lights the group LEDs GR1..GR4 and
  appears on test points TP1..TP4.
* `sel_code`: the switch value itself, or 0 when there is no valid group.

The bus should have at most one low line. If several lines are low, the
lowest-numbered cavity wins. That tie-break is a choice of this design. If
no line is low, or the cavity's switch is 0, no group is selected. Both
outputs then stay quiet in either mode.

## The serial path

The serial path has no clock and stores nothing. An 8-to-1 data selector
(`mux74151`, the function of a 74151 TTL part) is wired as follows:

* Data inputs D1..D4 carry S1..S4.
* D0 and D5..D7 are tied low.
* The select is `sel_code`.

A switch value of *k* therefore picks Sk without any decoding. A value with
no group picks a grounded input. The selector's strobe is asserted only in
serial mode with a valid group. Its output drives both serial outputs.

Because the path is combinational, the pulse train passes through unchanged,
with only gate delay. The module never decodes the harmonic number. For
reference, each frame is made of 16 return-to-zero pulses, sent MSB first:

* one bit every 250 ns;
* a 0 is a 62.5 ns pulse and a 1 is a 125 ns pulse;
* the first 6 bits are the integer part of *h* and the last 10 bits are its
  fraction;
* frames repeat no faster than once every 5 µs.

The testbenches generate and decode this format (`tb/gfas_tx.sv`,
`tb/gfas_rx.sv`). The decoder reads a pulse longer than 93.75 ns as a 1.

## The pulses path

In pulses mode, `start[k] = pulse_in[k] & grsel[k]`. A pulse on a group that
is not selected goes nowhere. Each START line drives a one-shot
(`monostable`), which makes a 1 µs pulse on its rising edge. This output
width is set by `PULSE_NS = 1000`. The input pulses are about 2 µs long.

The one-shot is a timed behavioural model. The real parts are RC-timed chips
outside the programmable logic, so this model cannot be synthesized. It
ignores a new edge while its output is high (non-retriggerable); that is
a choice of this design.

In serial mode no START is produced. In pulses mode the serial outputs stay
low. Disabling the other mode's outputs is also a choice of this design.

## Other outputs

* `aux_out_n`: a copy of the status bus, in the same active-low polarity.
* `cavity_led`: the status bus inverted, so 1 means the LED is lit.
* `tp_pulse`: the received pulses P1..P4, on test points TP11, TP16, TP17 and
  TP18 in that order.

## Hierarchy and files

```
scgs_module        whole module at logic level (top; simulation only)
├── scgs_unit      the programmable-logic part (synthesizable)
│   ├── scgs_radio     group extraction, mux select/strobe, START gating
│   └── mux74151       8-to-1 data selector with strobe
└── monostable x4  1 µs one-shots (behavioural model)
scgs_pkg           NUM_CAVITIES=10, NUM_GROUPS=4, GRC_W=3, grc_t
```

Some parts are not modelled, and the top's ports stand for the logic-level
signals on either side of them:

* the input buffers for the pulses, which are about 20 V into 50 Ω;
* the opto-couplers on S1..S4;
* the 50 Ω line drivers and the LED drivers;
* the switches and the LEDs themselves.

The original device also holds a 74175 quad D flip-flop, which is unused in
that release. It is left out here.

For an FPGA or CPLD, synthesize `scgs_unit`. Build the 1 µs one-shots
outside it, or replace them with a clocked counter.

## Top-level ports (`scgs_module`)

| port          | dir | width  | meaning |
|---------------|-----|--------|---------|
| `cstatus_n`   | in  | 10     | replaced cavity, active low; bit 0 = C36 |
| `grc`         | in  | 10 × 3 | rotary switch value per cavity |
| `pulses_mode` | in  | 1      | 1 = pulses mode (SW1 fitted), 0 = serial mode |
| `pulse_in`    | in  | 4      | P1..P4 |
| `serial_in`   | in  | 4      | S1..S4 |
| `g_out`       | out | 4      | G1..G4, 1 µs pulses |
| `serial_out`  | out | 2      | serial outputs 1 and 2, identical |
| `gr_led`      | out | 4      | group LEDs |
| `cavity_led`  | out | 10     | replaced-cavity LEDs |
| `aux_out_n`   | out | 10     | auxiliary copy of `cstatus_n` |
| `tp_grsel`    | out | 4      | TP1..TP4 |
| `tp_pulse`    | out | 4      | TP11, TP16, TP17, TP18 |

## How far to trust it

These parts follow the source description:

* the ten active-low status lines, switch values 0..4, and four groups;
* the two modes and what each one produces;
* the two identical serial outputs and the auxiliary copy;
* the 1 µs output pulses;
* the use of an 8-to-1 selector for the serial data;
* the signals on the test points.

These parts are this design's own choices, because the source does not give
them:

* how the selector is wired (D1..D4 = S1..S4, with the switch value as the
  select);
* the tie-break between several replaced cavities;
* treating switch values 5..7 as no group;
* disabling the outputs of the mode that is not in use;
* the LED and test-point polarity and order;
* the one-shot being non-retriggerable.

The source gives the function of the group-extraction logic, not its
gates.

## Simulating

Every testbench checks itself. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/scgs_pkg.sv \
    tb/tb_scgs_module.sv --top-module tb_scgs_module
./obj_dir/Vtb_scgs_module
```

| testbench         | what it covers |
|-------------------|----------------|
| `tb_mux74151`     | all 4096 input combinations |
| `tb_scgs_radio`   | every cavity × switch value × mode × pulse pattern, then 5000 random cases against a reference model, including several or no cavities replaced |
| `tb_monostable`   | 1 µs width for short and long triggers; a second edge does not stretch the pulse |
| `tb_scgs_unit`    | serial routing of distinct frames from all four inputs at once, for every cavity and group; pulses mode; LEDs, auxiliary copy and test points |
| `tb_scgs_module`  | end-to-end bench procedure at default sizes: for every cavity and every switch value 0..4, each pulse input in turn (G output timing checked to the picosecond), then serial frames with *h* = 8.0, 16.0 and a random word on both outputs. It counts serial routing, pulse routing, blocked pulses, no group, no cavity and mode switches, and fails if any of them never happens. |

The full run takes a few seconds.
