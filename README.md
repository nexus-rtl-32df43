# Nexus crossbar interconnect in SystemVerilog

Nexus is a system-on-chip interconnect that links many modules, each with its
own clock. The modules share no clock, and their frequencies and phases need
not be related. In the original design, everything between the modules is
asynchronous (quasi-delay-insensitive) logic. That covers the long wires
across the chip, the central 16-port crossbar, and the arbitration for its
outputs. Each module meets this fabric only at a small clock domain converter
next to the module. So there is no global clock to distribute, and there is
only one place per transfer where a signal crosses into a clock domain.

This repository holds a synthesizable RTL model of that system at its
standard size:

- 16 ports;
- 36-bit data words plus a tail bit;
- 4-bit TO/FROM port numbers;
- two pipelined repeaters on every link.

It includes the crossbar and its control units, the converters, the
repeaters, and the loopback and built-in self-test logic used in production
test. The asynchronous fabric is modelled as clocked logic (see "Modelling
the asynchronous fabric with a clock" below). Read that section before
trusting any cycle counts.

## Bursts, TO and FROM

Traffic is one-way **bursts**. A burst has one or more words, and the last
word has `tail = 1`. A 4-bit control value travels beside the first word:

```
            word 1         word 2   ...  word N
data (36)   D1             D2            DN
tail (1)    0              0             1
ctl  (4)    TO  (entering) -             -
            FROM (leaving)
```

The sender puts the destination port (TO) on the first word. The crossbar
replaces it with the source port (FROM) on the way out. A burst is routed as
a whole. Once it wins its output, no other burst can enter that output until
its tail word has passed. Bursts are never split, interleaved, duplicated or
dropped. Between one source and one destination, bursts arrive in the order
they were sent. A read is built from two bursts: a request one way and a
completion back.

At a module, each direction is a request/grant FIFO channel on the module's
own clock. On a rising edge with both Request and Grant high, one word moves.
Either side can stall. At the top level these are `tx_*` (module to Nexus)
and `rx_*` (Nexus to module). The `ctl` field is TO on `tx` and FROM on `rx`.
It is only meaningful on a burst's first word, and `rx_ctl` is 0 on later
words.

## Path of a burst

```
module p --tx--> nx_loopback -> nx_s2a ==link==> nx_crossbar ==link==> nx_a2s -> nx_loopback --rx--> module q
                 (module clock)    |  (fabric)                 (fabric)  |   (module clock q)
                                   word channel + TO channel     word channel + FROM channel
```

`nx_link` is a chain of `NREP` pipelined repeaters. Each link direction has
two channels:

- a word channel: 36 data bits and the tail bit;
- a control channel: TO on the way in, FROM on the way out.

Each channel has its own repeater chain.

## Inside the crossbar

The crossbar (`nx_crossbar`) is split into small units joined by channels:

```
TO[i] -> input control i --S--> split repeat i --sa,sb--> +--------------------+
               |                                          |  datapath grid     | -> data/tail out j
               +-- request (1 of 256 wires) -->           |  9 x 4-bit slices  |
                                   output control j       |  + 1-bit tail      |
FROM[j] <------------------------------+--M--> merge repeat j --ma,mb-------> +--------------------+
data/tail in i -------------------------------------------------------------> (row i)
```

**Datapath grid** (`nx_xbar_grid`, `nx_xbar_datapath`). Each input drives a
row and each output collects from a column. A port number travels as two
1-of-4 codes, a low digit and a high digit. In each code exactly one of four
wires is high, and all four low means "no value". At grid point (i, j) a
*hit* is the AND of four wires:

- the row's split low digit selects j;
- the row's split high digit selects j;
- the column's merge low digit selects i;
- the column's merge high digit selects i.

On a hit, row i's data drives column j's bus, and column j's ready returns
to row i. The 36 data bits are nine identical 4-bit grids. The tail bit has a
1-bit grid of its own. All slices see the same codes, so they move a word
together.

**Repeat until tail** (`nx_repeat`). The control units make one port number
per *burst*, but the grid needs one for every *word*. A repeat unit holds the
number and shows it to the grid until the datapath reports that a word with
tail = 1 has passed on its row or column. It then drops the number, and may
take the next one in the same clock. Only the repeat units know where a burst
ends; the grid knows nothing of burst length.

**Input control** (`nx_input_control`) takes a TO and does two things:

- it passes TO to its split repeat as S;
- it raises one request wire to the output control of port TO.

**Output control** (`nx_output_control`) grants one requesting input and
acknowledges it. It then sends that input's number both as FROM, toward the
destination module, and as M, to its merge repeat. When several requests
arrive in the same clock, the winner is picked round-robin.

**The deadlock rule.** Suppose an input could have requests pending at two
outputs at once. Each request might win at either output first. Two inputs
that ask for the same two outputs in opposite order could then each win the
output they are not ready to use, and both would block forever. So an input
control takes no new TO until its previous request has been acknowledged.
This "at most one request outstanding" rule costs little. Arbitration happens
once per burst and is pipelined with the data. In the tests, back-to-back
2-word bursts from one input to alternating outputs still move one word per
clock.

## Clock domain converters

`nx_s2a` (module to fabric) and `nx_a2s` (fabric to module) share one
decision circuit, `nx_sync_control`, which runs in the module clock domain.

Each converter has `SLOTS` word registers (default 2), used in ring order.
Each slot has two toggles:

- the module side flips its toggle when it writes (S2A) or reads (A2S) the
  slot;
- the fabric side flips its toggle when it does its half of the transfer.

Only the fabric toggle of the current slot is sampled into the module clock
domain. So each transfer has **one** potentially metastable sample, however
wide the word is. A word is written in one step and announced only after
that, so its bits are never sampled while they change.

- **S2A:** every slot starts free, which is the stock of initial tokens.
  Grant is high while the current slot is free. A word taken on a rising edge
  goes into the slot, and the fabric side sends it as a TO token (first word
  only) followed by the word.
- **A2S:** a slot is filled when the whole word has arrived, together with
  FROM on a first word. Request is high while the current slot is full.

**Resolution time.** `res_full_cycle` sets how long the sample may take to
settle:

| `res_full_cycle` | sampled on    | time to settle | Request rises after the fabric hands over a word |
|------------------|---------------|----------------|---------------------------------------------------|
| 0                | falling edge  | half a clock   | 1/2 to 3/2 clocks                                  |
| 1                | rising edge   | a full clock   | 1 to 2 clocks                                      |

Use 0 for low-latency, lower-frequency modules. Use 1 for fast clocks, where
a longer settling time buys a much longer mean time between failures.

In the original converters, the asynchronous side has no clock. In this
model the fabric side runs on `clk_x`, so the module-side toggles reach it
through a two-flip-flop synchronizer. That adds fabric-side latency which the
original does not have.

## Pipelined repeaters

A long wire would slow the handshake of the asynchronous original. A
pipelined repeater (`nx_pipelined_repeater`) splits it into two shorter
handshakes. It is a half buffer: at any time its input or its output is
empty, so it holds at most one token and never accepts a new one while
holding one. The RTL keeps this rule exactly, and an assertion checks it.

## Test support

- **Loopback** (`nx_loopback`, one per port, `lb_en`). The module is cut off,
  and each burst that arrives is sent straight back out. On the first word,
  FROM and data bits [3:0] swap places: the old data bits become the new TO,
  and the old FROM goes into the data. A burst can therefore carry its next
  hop inside its first word.
- **BIST** (`nx_bist`, on port `BIST_PORT` = 15, `bist_en`). It launches a
  burst to port A whose first word carries B. With A and B in loopback, the
  burst goes 15 -> A -> B -> 15. The BIST bounces it out again in the same
  way, `bist_iters` times in all, then checks the returned burst against the
  expected pattern:
  - word k (k > 0) is seed + k;
  - the first word is {seed[35:4], A}, with FROM = B.

  A broken link usually stops the burst, which shows as `bist_done` never
  rising. Corrupted data sets `bist_error`.

## Modelling the asynchronous fabric with a clock

The original fabric has no clock. Data travels on 1-of-4 rails with an
acknowledge wire and a four-phase return-to-zero handshake, built from
domino logic and C-elements. Synthesizable RTL cannot express that, so this
model keeps the *protocol* and replaces the *timing*:

- Every fabric channel is a valid/ready token channel sampled on one clock,
  `clk_x`. A transfer on a rising edge stands for one complete handshake.
- One `clk_x` period stands for half a handshake. A half-buffer repeater
  therefore passes one token every two clocks, and a link with repeaters
  carries one word per two `clk_x` cycles.
- 1-of-4 codes are kept where their meaning matters: the split and merge
  controls of the grid are real 1-of-4 codes, and "neutral" means no
  connection. Data words are carried in binary with a valid bit.
- The fabric clock is unrelated to every module clock, so the converters'
  clock crossing is real and is tested with unrelated clocks.

Results you can rely on:

- burst atomicity and ordering;
- arbitration, flow control and the deadlock rule;
- FROM/TO handling, loopback and BIST;
- the converters' one-sample-per-transfer clock crossing and their
  1/2–3/2-cycle Request latency.

Numbers that are artifacts of the model:

- latency through the fabric counted in `clk_x` cycles: an idle crossbar
  needs three fabric clock edges from TO to the first word out, and each
  repeater adds one;
- throughput in words per `clk_x`;
- anything to do with power, area or frequency.

The original's rates and latencies (1.35 GHz, 2 ns through the interconnect)
are properties of its circuits, not of this RTL.

## Parameters

| module      | parameter   | default | meaning                                   |
|-------------|-------------|---------|-------------------------------------------|
| `nexus_top` | `NPORTS`    | 16      | ports (at most 16: two 1-of-4 digits)     |
|             | `DATA_W`    | 36      | data bits per word, a multiple of 4       |
|             | `CTRL_W`    | 4       | TO/FROM width, at least log2(NPORTS)      |
|             | `NREP`      | 2       | pipelined repeaters per link direction    |
|             | `SLOTS`     | 2       | word registers per converter (own choice) |
|             | `BIST_PORT` | 15      | port that carries the BIST (own choice)   |

The shared constants and the 1-of-4 helpers are in `nexus_pkg`.

## Where this model departs from the original

Changed or added:

- The fabric is clocked (see above).
- The transistor-level arbiter and metastability filters become flip-flops
  and a round-robin arbiter. The original grants the *first* request to
  arrive. Here, requests that arrive in the same clock are resolved
  round-robin, and a request that arrived earlier while the output was busy
  gets no priority.
- The S2A does not assume that the fabric finishes a handshake within one
  module clock. It waits for the slot to be handed back, which is safe at any
  clock ratio.
- The split/merge controls reach all datapath slices directly. The original
  pipelines their distribution.
- The grid's output bus is true-polarity AND-OR logic, not an inverted
  precharged bus.
- The BIST checks the final burst itself. In the original, the result is
  read out through a scan chain on the synchronous side.
- The burst pattern, the iteration and length widths, which data bits the
  loopback swaps (bits [3:0]), the slot count and the reset scheme are this
  model's own choices. A single active-low reset is applied asynchronously to
  every domain.

Not modelled:

- the modules themselves and their PLLs;
- the pipelined completion-detection trees of the converters (a word arrives
  whole in the token model);
- the noise, timing and fault-grading methods.

## Files

| file                        | contents                                         |
|-----------------------------|--------------------------------------------------|
| `rtl/nexus_pkg.sv`          | constants, 1-of-4 encode/decode                  |
| `rtl/nexus_top.sv`          | whole interconnect                               |
| `rtl/nx_crossbar.sv`        | crossbar: controls, repeats, datapath            |
| `rtl/nx_xbar_datapath.sv`   | 9 x 4-bit slices + tail slice, tail copies       |
| `rtl/nx_xbar_grid.sv`       | one grid slice with 1-of-4 hit logic             |
| `rtl/nx_repeat.sv`          | repeat-until-tail                                |
| `rtl/nx_input_control.sv`   | TO -> S + request, one outstanding               |
| `rtl/nx_output_control.sv`  | arbitration -> FROM + M                          |
| `rtl/nx_sync_control.sv`    | converter decision circuit, 1/2 or 1 cycle       |
| `rtl/nx_s2a.sv`, `rtl/nx_a2s.sv` | clock domain converters                     |
| `rtl/nx_pipelined_repeater.sv`, `rtl/nx_link.sv` | half buffer, repeater chain |
| `rtl/nx_loopback.sv`, `rtl/nx_bist.sv` | test support                          |
| `tb/tb_<module>.sv`         | self-checking testbench for each module          |

## Simulating

Every testbench checks itself. It prints one line,
`TB_RESULT checks=<n> failures=<m>`, and stops on its own, with a watchdog
in case the design hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    rtl/nexus_pkg.sv tb/tb_nexus_top.sv -y rtl --top-module tb_nexus_top -o sim
./obj_dir/sim
```

Replace `tb_nexus_top` with any other testbench name. Assertions on the
handshake rules are active with `--assert`. `-Wno-fatal` keeps Verilator's
style warnings from stopping the build; the testbenches drive per-port
signals from per-port clocks, which it reports as multiple drivers. Each
testbench starts with a comment saying what it checks.

`tb_nexus_top` runs the full default configuration end to end, in about 15
seconds including the build. All 16 modules run on different clocks and send random bursts to
random destinations. The run covers both resolution modes, and then a BIST
round trip through two ports in loopback. Every word is checked for
delivery, order, FROM and tail. The test also counts each mechanism and fails
if one never happened: output contention, sender stalls, receiver stalls,
multi-word bursts, repeater backpressure, loopback bounces and a BIST run.
