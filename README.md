# EDWARD: event-driven pixel readout with clockless, non-priority arbitration

A pixel or strip detector has many channels, and only a few of them hold a
hit at any moment. EDWARD (Event Driven With Access and Reset Decoder) lets
the channels with data share one data bus without a clock in the channel
array and without any fixed priority between channels:

* a channel with data raises a **request**;
* an asynchronous **arbitration tree** of two-input cells, each built around
  a Seitz arbiter (a mutual-exclusion element), chooses among requests by
  their **arrival time**. It then steers **acknowledge tokens** down to the
  chosen channel;
* tokens are the pulses of a clock `clko`, divided from the serialization
  clock. Each token moves the channel one **readout phase** forward, and each
  phase puts a different data bank on the bus;
* the token after the last phase **resets** the channel. The tree then hands
  the token to the next requesting channel;
* the only clocked logic is at the periphery. It latches the bus once per
  token, flags empty words and serializes the data.

This repository is synthesizable SystemVerilog for one 8 x 8 channel group.
The one exception is the Seitz arbiter, an analog custom cell that is given
here as a behavioural model. Each block also has a self-checking testbench.

## Block map

```
            rdy/clr/cfg/be_data (per channel, from the back-end)
                          |
   +----------------------v-----------------------+
   | 64 x edw_channel  (controller + phaser)      |--req-->+--------------+
   |   flip-flops clocked by their ack token      |<--ack--| edw_arb_tree |--rqo-->
   +----------------------+-----------------------+        | 63 x         |
                          | bus_en / bus_dat               | edw_arb_cell |<--clko--+
          +---------------v---------------+                +--------------+         |
          | edw_pull_net x2 (channel field,|                                        |
          | group field) + group bank      |                  +---------------+     |
          +---------------+---------------+                   | edw_token_gen |-----+
                          | 14-bit bus                        +-------+-------+
                  +-------v--------+   latch_en                       |
                  |  edw_output    |<---------------------------------+
                  +-------+--------+
                          +--> word / word_stb / word_empty, sdo / sfrm
```

| file | what it is |
|---|---|
| `rtl/edw_pkg.sv` | default sizes and the pull pattern |
| `rtl/edw_channel.sv` | in-channel logic: request controller, phaser, output gates, reset procedure |
| `rtl/edw_seitz_arbiter.sv` | behavioural model of the Seitz arbiter with metastability filter |
| `rtl/edw_arb_cell.sv` | two-input arbitration cell, fair or unfair (`FAIR`) |
| `rtl/edw_arb_tree.sv` | binary tree of cells over `N` channels |
| `rtl/edw_pull_net.sv` | shared bus with pull-up/down pattern and collision flag |
| `rtl/edw_token_gen.sv` | `clk` divider that makes the token clock `clko` and the latch strobe |
| `rtl/edw_output.sv` | output latch, empty-word flag, serializer |
| `rtl/edw_top.sv` | the 8 x 8 group wired together |

## The channel: one token edge per phase

`edw_channel` has no clock. Its flip-flops use the rising edge of the
channel's `ack` input, which is a token routed by the tree.

* `req = rdy & ~fin`. The request rises as soon as the back-end raises `rdy`.
* The **phaser** is a chain of `NPH` one-hot flip-flops. The first token edge
  seen while `req` is high starts phase 0. Each later token edge moves to the
  next phase. `cfg` sets the number of phases to `cfg + 1`.
* `rdo` is the phaser state. It enables exactly one data bank. Bank 0 is the
  channel address; banks 1..3 are back-end words.
* `end_o` is high during the last phase. The token after it is the **reset
  token**: it clears the phaser and sets `fin`. Setting `fin` drops `req`.
* `fin` is also `clr` towards the back-end. The back-end answers by dropping
  `rdy`, and that falling edge clears `fin`. `fin` is stored as two toggle
  flip-flops: one toggled by the reset token, one by the falling edge of
  `rdy`. Both are cleared only by `rst_n`.

A bank stays enabled from its token edge until the next token edge, and not
only while `ack` is high. So the bus is stable when the periphery latches it
just before the next token. A transaction with `cfg = c` therefore puts
`c + 1` words on the bus on `c + 1` consecutive tokens and frees the bus on
the next token.

## Arbitration without priority, and why the cells need two stages

This is the part of the design that takes the most care.

**Stage 1.** Each cell has a Seitz arbiter between its two inputs `req[1:0]`.
The first request to arrive is granted, and its grant `g[x]` stays high until
that request falls. When two requests are too close in time to tell apart,
the arbiter needs extra time to leave its metastable state. The model
(`edw_seitz_arbiter`) takes `T_META_PS` longer in that case and picks a winner
at random. Its grants never overlap and never glitch, as the metastability
filter guarantees in silicon. No channel has a built-in priority.

**The hazard.** Suppose `ack[x] = acki & g[x]` and `rqo` simply follows the
grants. When the served request ends, `g` passes from one input to the other
while a token may still be present. `rqo` may also dip, so the parent can
pull the token away. A channel can then see a fragment of a token that is not
exclusive to it, and two channels drive the bus at once.

**Stage 2** decides when the steering register `sel` may follow `g`. There are
two flavours, chosen with the `FAIR` parameter.

* **Unfair cell (`FAIR = 0`, the default).** `rqo = req[0] | req[1]`, so while
  the other input is waiting, `rqo` stays high through the switch. `sel`
  follows `g` whenever `g` names a request, even while a token is present.
  `sel` holds its value when `g` is empty and a token is present. The result
  is that the reset token of one channel is rerouted *locally* and becomes the
  first token of the neighbour. The token is reused, so no bus slot is lost.
  The price is fairness: the next channel is the nearest requester in the
  tree, and a subtree with a steady supply of requests can keep the token
  away from the other half.

  One race needs an extra guard. Suppose the served request ends a few
  picoseconds before the other input's request arrives. `rqo` then dips
  briefly, and the parent may already be moving the token elsewhere. A local
  reroute at that moment would hand a fragment of the token to a second
  channel, and two channels would drive the bus. The cell therefore keeps a
  `dropped` flag (a latch): it is set if `rqo` is low at any time while the
  token is present, and cleared when the token goes away. While `dropped` is
  set, `sel` is frozen, and the late request waits for the next token. Only
  a request that was already pending when the previous one ended gets the
  reused token.
* **Fair cell (`FAIR = 1`).** A second Seitz arbiter arbitrates between "a
  routed token is present" (`acki & |sel`) and "sel must change" (`g != sel`).
  A token that is present blocks the change, so a token is never redirected.
  It has to expire first, and the next one starts from the top of the tree.
  `rqo = |(req & g)` drops as soon as the served request ends, so the parents
  re-arbitrate and another subtree can win. Each handover costs one token:
  the reset token's word is empty.

In the fair flavour, a token that is present while `sel` selects nothing goes
to a new request at once. The channel then sees a shortened token; this is
safe because its flip-flops only need the edge. In the unfair flavour the
same request waits for the next token, because `rqo` was low during the
present one.

`edw_arb_tree` places the cells in `log2(N)` levels. Cell `i` of level `l`
serves lines `2i` and `2i+1` of level `l+1`. Level `log2(N)` is the channels
and the root's `acki` is `clko`. In silicon, the levels alternate the cells'
logic polarity to save inverters. That is logically the same as the single
polarity used here.

## Empty words: the pull-up/down network

`rqo` is not synchronized with the tokens. A request that arrives just as a
token expires may miss it, so the periphery cannot use `rqo` to tell a real
word from an idle bus. Instead, every bus line has a weak pull. With no bank
enabled, the bus shows a fixed **pull pattern** that no channel can produce:

* the bus word is `{group address[7:0], channel field[5:0]}`;
* the group field is pulled up, and the channel field is pulled down, so the
  empty word is `{8'hFF, 6'h00}`;
* the group bank drives the real group address whenever a channel of the group
  drives the bus, so the group address `8'hFF` is reserved.

`edw_pull_net` resolves the bus as the OR of the enabled drivers, or the pull
pattern when none is enabled. Its `conflict` output flags two enabled drivers;
this never happens in a correct design, and the testbenches check it.

## Synchronization and output

`edw_token_gen` divides `clk` by `tok_div`, and `clko` is high for the first
`tok_high` cycles of each period. Both settings are run-time inputs, so the
token rate and the token lifetime can be fitted to the bus width and to the
worst-case delay through the tree. `latch_en` is high in the last cycle of
each period. On that clock edge, `edw_output` latches the bus (the word of
the token that is ending), and the next token starts on the same edge.

`edw_output` then gives:

* `word` and a one-cycle `word_stb`, once per token;
* `word_empty`, set when the word equals the pull pattern, for discarding it
  on chip;
* the same 14 bits on `sdo`, MSB first, in the 14 clock cycles after the
  latch. `sfrm` marks the first bit. The serial stream carries empty words
  too, so they can be discarded off chip. `tok_div` must be at least 14.

Example (`tok_div = 16`, unfair tree): channel 42 with `cfg = 3` requests,
then channel 5 with `cfg = 1` requests 1 ns later. The six tokens after the
request produce the words `{G,42} {G,d1} {G,d2} {G,d3} {G,5} {G,d1'}` with no
empty word in between. The first word appears one token period after the
request.

## Parameters and ports of `edw_top`

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 64 | channels (8 x 8); a power of two |
| `NPH` | 4 | phaser flip-flops = most phases per transaction |
| `CW` | 6 | channel field width (channel address) |
| `GW` | 8 | group address width |
| `FAIR` | 0 | 0: unfair cells (token reuse), 1: fair cells |
| `DIVW` | 8 | width of `tok_div` / `tok_high` |

Ports: `clk`, `rst_n` (active low; asynchronous for the channels and the
periphery), `tok_div`, `tok_high`, `group_addr`. Per channel there are `rdy`
(in), `clr` (out), `cfg[1:0]` (phases − 1) and `be_data[2:0][5:0]` (the words
for phases 1..3). The outputs are `rqo`, `clko`, `word`, `word_stb`,
`word_empty`, `sdo`, `sfrm` and `bus_conflict`.

Back-end contract: raise `rdy` with the data already valid, and keep the data
stable until `clr` rises. Then drop `rdy`. Raise `rdy` again only for a new
event.

## Where this RTL follows its source and where it chooses

These points follow the architecture as published: the block structure; the
phaser clocked by token edges, with programmable length, one-hot bank select,
an end flag and a reset by the next token; arbitration by arrival time with
Seitz arbiters; two-stage cells in a fair and an unfair flavour; empty words
marked by bus pulls; the token clock divided from the serialization clock,
with data latched before each token; 64 channels, 6-bit channel addresses and
8-bit group addresses.

These are choices of this RTL:

* the gate-level equations of the cells (`sel` enable, `rqo`, the unfair
  cell's `dropped` guard);
* 4 phases;
* the word layout and the pull pattern;
* the rdy/clr handshake;
* `end_o` being set in the last phase, not after it;
* the serial format;
* the reset;
* the unfair cell as the default.

The unfair default rests on the reported token reuse between two channels
with no dead time, which only the unfair cell gives.

Limitations:

* **Seitz arbiter** (`edw_seitz_arbiter`) is a behavioural model with
  delays (`T_RES_PS` = 137 ps, `T_META_PS` = 411 ps, both chosen freely). It is
  not synthesizable. Synthesis needs the real custom cell instantiated in its
  place. Every other file is synthesizable.
* Asynchronous logic in a two-state, event-driven simulator: the steering
  registers are latches, and the whole tree's timing comes only from the
  arbiter delays. The models do not check minimum token width, wire delays or
  metastability in `sel`.
* **Analog data.** In silicon, the banks can also pass an analog voltage
  through transmission gates. Here every bank is a digital word.
* **Starvation** with unfair cells under sustained load is a property of that
  flavour, not a defect. Under the random load of `tb_edw_top`, one event
  waited while 200 to 500 other transactions completed. With `FAIR = 1`, the
  longest wait was 63 other transactions (N − 1: every other channel once at
  most). Use `FAIR = 1` where bounded waiting matters.
* The analog back-end (peak finder, ADC) is outside the design; its signals
  are ports.
* The plain cell with a single Seitz arbiter and no second stage is not
  provided. It can glitch `rqo` while a token is routed, which is the very
  fault the two-stage cells exist to prevent.
* In the unfair cell, the second stage is the `dropped` latch together with
  `rqo = |req`, not a second Seitz arbiter. Its internal gates are not
  published, so this is one of several circuits that meet the rule "reroute
  only while `rqo` cannot change".

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/edw_pkg.sv tb/tb_edw_top.sv --top-module tb_edw_top
./obj_dir/Vtb_edw_top
```

| testbench | what it shows |
|---|---|
| `tb_edw_top` | full default group, unfair tree: a burst of 64 simultaneous events, then random ones. Every word, every serial bit and each event's single readout are checked. It counts multi-phase transactions, empty words, a tie at the root arbiter, contention and token reuse, and requires each of them to happen. |
| `tb_edw_top_fair` | the same with `FAIR = 1`; on every handover the reset token's word must be empty, and no event may wait for more than 63 other transactions |
| `tb_edw_two_channel` | two channels with different phase counts: the exact word sequence, token reuse and latency |
| `tb_edw_channel` | phases for every `cfg`, the end flag, the reset procedure, the handshake, a token already high when the request comes |
| `tb_edw_seitz_arbiter` | first-come grant, hold until release, resolution of ties both ways |
| `tb_edw_arb_cell` | unfair: local reroute with `rqo` steady, and no reroute after an `rqo` glitch (request 39 ps late); fair: no redirect while a token is present, with an `rqo` dip |
| `tb_edw_arb_tree` | 8-channel trees of both flavours: exclusive tokens, everyone served, token reuse only when unfair |
| `tb_edw_pull_net`, `tb_edw_token_gen`, `tb_edw_output` | pull pattern and collisions; period, duty cycle and latch timing; latch, empty flag and serial bits |

`tb_edw_top` runs the full default configuration in a few seconds of wall
time. Verilator may warn that `ph` is used as both a synchronous and an
asynchronous signal; this is harmless and comes from the one-hot assertion
that is sampled on the falling token edge.
