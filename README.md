# Double-edge serializer and deserializer for an on-chip serial link

Wide on-chip buses cost area, power and crosstalk. This design replaces an
8-bit parallel connection with one 1.25 Gb/s serial wire. The transmitter is
an 8:1 serializer and the receiver is a 1:8 deserializer. In both, every
storage element samples on **both edges of its clock**, or the two halves of
a stage do so between them. The fastest clock that has to be distributed is
therefore 625 MHz, half the bit rate. The serializer's slower ranks run at
312.5 MHz and 156.25 MHz. No separate multiplexer or latch cells are needed
besides the flip-flops.

| quantity | value |
|---|---|
| parallel word | 8 bits, D1 sent first |
| line rate | 1.25 Gb/s (bit time 800 ps, `fclk` = 1.25 GHz) |
| word rate | 156.25 MHz (`fclk/8`) |
| serializer clocks | `fclk/2`, `fclk/4`, `fclk/8` = 625, 312.5, 156.25 MHz |
| deserializer clock | `fclk/2` = 625 MHz |
| serializer storage | 7 double-edge cells = 7 rising-edge + 7 falling-edge flops |
| deserializer storage | 4 rising-edge + 4 falling-edge flops |
| serializer latency | 7 bit times from the word clock's rising edge to D1 on the line |

## The double-edge cell (`detff`)

The whole serializer is built from one cell with two data inputs and one
output:

```
            +---------+
  d1 ------>| netff   |--q_neg--+
            +---------+         |
                                +--> q = clk ? q_pos : q_neg
            +---------+         |
  d2 ------>| petff   |--q_pos--+
            +---------+
```

- `d1` is taken on the **falling** edge and shown on `q` while `clk` is low.
- `d2` is taken on the **rising** edge and shown on `q` while `clk` is high.

In silicon both flops are master-slave registers built from clocked-CMOS
(C2MOS) stages. Their output stages are tri-stated and share one node, and
only the stage whose phase it is drives that node. In RTL this is the clock
level selecting between the two flops. One cell therefore emits two bits per
clock period: it is a 2:1 serializer clocked at half its output rate. A
conventional double-edge flop does the same with two rising-edge flops, a
latch and a 2:1 multiplexer, four cells against two.

`petff` and `netff` are the two plain flops, rising-edge and falling-edge
(`rtl/petff.sv`, `rtl/netff.sv`). The deserializer also uses them directly.

## The serializer tree (`serializer`)

Seven cells form a binary tree:

```
  D1,D5 -> [cell fclk/8] --\
                            [cell fclk/4] --\
  D3,D7 -> [cell fclk/8] --/                 \
                                              [cell fclk/2] --> dout
  D2,D6 -> [cell fclk/8] --\                 /
                            [cell fclk/4] --/
  D4,D8 -> [cell fclk/8] --/
```

In each pair the first input goes to the cell's `d1`, taken on the falling
edge, and the second to `d2`, taken on the rising edge. Each rank doubles the
bit rate of the rank before it. The output cell shows the upper branch while
`fclk/2` is low and the lower branch while it is high. So odd bits (D1, D3,
D5, D7) come from the upper half of the tree and even bits from the lower
half.

### Why the inputs are reordered

The leaves do not take the bits in order. They take the pairs (D1,D5),
(D3,D7), (D2,D6), (D4,D8). Read left to right this is D1..D8 by
**bit-reversed index**: 0,4,2,6,1,5,3,7. A tree of 2:1 stages interleaves
its inputs this way, so feeding them bit-reversed makes the line carry
D1, D2, ..., D8 in natural order. Nothing downstream has to reorder. The RTL
computes this order from the index, so the same code builds trees of other
depths (parameter `LEVELS`, word width `2**LEVELS`).

### One word through the tree

Times are in bit times (800 ps), from a rising edge of `fclk/8` at t = 0.
A word presented just after that edge must stay until the next one, at t = 8.

| event | time |
|---|---|
| leaves take D1..D4 (falling edge of `fclk/8`) | 4 |
| leaves take D5..D8 (rising edge of `fclk/8`) | 8 |
| D1 on the line | 7 to 8 |
| Dk on the line | 6+k to 7+k |
| D8 on the line | 14 to 15, then D1 of the next word |

Take D1 as an example. The leaf takes it at t = 4 and shows it while
`fclk/8` is low (4 to 8). The middle cell takes it on the falling edge of
`fclk/4` at t = 6 and shows it from 6 to 8. The output cell takes it on the
falling edge of `fclk/2` at t = 7 and drives it from 7 to 8.

### The clocks must ripple

Several of these samples happen at an instant when the feeding cell's own
clock also has an edge. For example, at t = 8 the output cell takes D2 from
the lower middle cell on the rising edge of `fclk/2`. At that same instant
`fclk/4` rises and the middle cell switches to its other half. The sample must
see the value from *before* that switch. So every slower clock has to change
slightly *after* the faster clock's rising edge. A ripple divider gives this
ordering: each stage toggles on the rising edge of the previous one.
`clock_divider` is such a divider. In simulation the gap is one non-blocking
update. In silicon it is a hold-time condition: the divider stage's
clock-to-output delay must cover the sampling cell's hold time. Do not derive
the three clocks from a synchronous counter whose outputs switch together.

## The deserializer (`deserializer`)

The serial input feeds two 4-stage shift registers, both on `fclk/2`:

```
  din -> [petff] -> [petff] -> [petff] -> [petff]     rising edges
            D7        D5        D3        D1
  din -> [netff] -> [netff] -> [netff] -> [netff]     falling edges
            D8        D6        D4        D2
```

Odd bits are taken on rising edges and even bits on falling edges. So a
625 MHz clock receives 1.25 Gb/s, and each register shifts at half the bit
rate. The flop outputs are the parallel outputs: there is no output
register. After the falling edge that takes D8, `dout` holds the whole word
for one bit time, until the next rising edge shifts the odd chain. This
happens once every four clock periods (156.25 MHz). Logic that consumes the
word must sample it in that window, for instance with a register on the next
rising edge of a word-rate clock positioned there.

The deserializer has no framing of its own. D1 must arrive on a rising edge,
and which rising edge starts a word is fixed by the clock it receives.

## The link (`serdes_top`)

`serdes_top` holds the transmitter (`clock_divider` and `serializer`) and
the receiver (`deserializer`). The analog parts of a link lie between them:
an oscillator for `fclk`, a line encoder and driver, the differential line,
and a receiver front end with a phase detector. These are outside the RTL,
and their connection points are ports:

| port | dir | meaning |
|---|---|---|
| `fclk` | in | 1.25 GHz bit clock |
| `rst_n` | in | asynchronous reset of the clock divider (all divided clocks to 0) |
| `tx_data[7:0]` | in | word to send, D1 in bit 0; change it just after each rising edge of `tx_clk_div[2]` |
| `tx_clk_div[2:0]` | out | `fclk/2`, `fclk/4`, `fclk/8`; bit 2 is the word clock |
| `tx_serial` | out | serial stream to the line driver |
| `rx_clk` | in | recovered 625 MHz clock: rising edges mid-D1/D3/D5/D7, falling edges mid-D2/D4/D6/D8 |
| `rx_serial` | in | recovered serial data |
| `rx_data[7:0]` | out | received word, D1 in bit 0 |

For a loopback, connect `tx_serial` to `rx_serial`. Drive `rx_clk` with
`tx_clk_div[0]` delayed by three quarters of its period (1200 ps). A word
launched at a word-clock rising edge is then complete on `rx_data` from 14.5
to 15.5 bit times after that edge.

## Where this RTL goes beyond its source

The structure of every block was given: the cell, the tree and its input
order, the two shift chains, and the clock rates. These points were filled
in here:

- **Which input of the cell uses which edge.** It was read from the cell's
  transistor schematic: `d1` on the falling edge, `d2` on the rising edge.
  This is the assignment that gives the stated D1..D8 output order.
- **Flip-flops.** The C2MOS transistor circuits are modelled as ideal
  edge-triggered flops. The shared output node of the cell is modelled as a
  clock-level select.
- **Clock generation.** Only the three frequencies were given. The ripple
  divider, its phase order and its reset are this design's choice.
- **Reset.** No block of the datapath has a reset. The first serialized word
  and the first received word after power-up are arbitrary.
- **Receive clock and framing.** These are left to the (absent) phase
  detector and provided by the testbench.
- **Word width** is a parameter (`LEVELS` for the serializer, `WIDTH` for the
  deserializer). The defaults are 8 bits. The serializer was also simulated
  at 4 and 16 bits.
- **Timing** is checked only in zero-delay simulation at the nominal clock
  periods. Whether a given process meets 1.25 GHz is not analysed.

Every RTL file is synthesizable. Yosys maps the serializer to 14 flip-flops
and 7 clock-selected multiplexers, and the deserializer to 8 flip-flops.

## Testbenches

All are self-checking and end with one `TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `petff_tb`, `netff_tb` | sampling edge; no transparency in the other phase; no reload on the other edge |
| `detff_tb` | each phase shows the right input, as sampled on the right edge; inputs changing mid-phase |
| `clock_divider_tb` | every output against a toggle-count model; periods of 1600, 3200 and 6400 ps; reset twice |
| `serializer_tb` | bit-by-bit stream of 4-, 8- and 16-bit trees against the expected order; latency W-1; one word per slow-clock period; starts with the five fixed patterns |
| `deserializer_tb` | all eight outputs after every clock edge against the bits sent; word spacing 6400 ps; fixed patterns, then random |
| `serdes_top_tb` | full link at default size, loopback: line bit by bit and received words; counts bits sent in each clock half, bits taken on each receive edge and each fixed pattern received |
| `serdes_patterns_tb` | full link with each of the patterns 00000000, 01010101, 11010110, 10101010, 11111111 held for 64 words |

`serializer_check` is a helper module used by `serializer_tb`. Delays are in
ps; every file declares `timeunit 1ps`.

To run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb --top-module serdes_top_tb tb/serdes_top_tb.sv
./obj_dir/Vserdes_top_tb
```

Replace `serdes_top_tb` with any testbench name above. Each runs in well under
a second.
