# AM++ associative memory board in SystemVerilog

The AM++ board does the pattern-recognition step of a hardware track trigger
(the Silicon Vertex Tracker of the CDF experiment). A detector layer is
divided into *superstrips*, coarse groups of channels, and a *hit* is the
address of a superstrip that fired. A *road* is a stored coarse trajectory:
one superstrip per layer over six layers (five silicon layers plus a drift
chamber track, the XFT layer). The board holds a bank of roads in
associative memory chips. Each incoming hit is compared with every stored
road at the same time, and the board puts out the roads in which enough
layers fired. Downstream logic then fits tracks only inside those roads.

This repository is a synthesizable SystemVerilog model of that board: the
associative memory chip, the LAMB daughter boards with their chip chains and
GLUE chip, the Input Control and TOP GLUE chips, and the board top. It
follows the published description of the AM++ board and its drawings. Where
that description is silent, the choices made here are stated below and in
each file's header.

## One event, seen from outside

The board runs on a single 40 MHz clock (`clk`) with an active-low
asynchronous reset (`rst_n`). A sequencer drives one event like this:

1. **Init.** Strobe `init_i`. An `OP_INIT` OPCODE reaches every chip. The
   chips clear the event's match state and load the default criterion:
   threshold `cfg_thr_i` and required layers `cfg_req_i`.
2. **Input.** Send the hits one per cycle on the P3 bus (`p3_valid_i`,
   `p3_layer_i`, `p3_ss_i`). Roads that pass the default criterion start
   leaving on the road bus at once, because hit input and road output use
   separate buses.
3. **End-of-Hit.** Strobe `eoh_i` after the last hit. An `OP_DEC_THR`
   OPCODE with data word `cfg_thr_dec_i` lowers the threshold. Each chip
   chain applies it as soon as that chain has sent all its roads for the
   default criterion.
4. **Output.** Read road packets from `road_data_o` with the DA/SA handshake.
   `road_end_o` pulses when all roads of one criterion are out.
   `event_done_o` pulses with the last one.

A road *matches* when the number of fired layers reaches THR (the
threshold) and every layer enabled in `required_layers` has fired. Bit 0 of
`required_layers` selects the XFT layer (layer 0) and bit 1 selects layer 5.
Two read-out modes come from the configuration alone:

| mode      | `cfg_thr_i` | `cfg_thr_dec_i` | what comes out                                       |
|-----------|-------------|-----------------|------------------------------------------------------|
| ordered   | 6           | 5               | all 5/5 silicon + XFT roads (some during input), then the 4/5 ones |
| unordered | 7           | 5               | nothing during input; after End-of-Hit, all roads together |

A chip sends each road at most once per event. Lowering THR therefore
releases only roads that had not yet passed.

## Road packets and the DA/SA handshake

Every road bus carries 18-bit words: between two chips, from a chain to the
GLUE, from a LAMB to the TOP GLUE, and out to P3. A road is a two-word packet.
The first word is the Road-ADD; the second is the bitmap, whose low six bits
hold one fired-layer flag per layer.

Two signals control each hop:

- **DA** (Data Available) goes from sender to receiver. It means a whole
  packet is ready.
- **SA** (Space Available) goes from receiver to sender. It means there is
  room for a whole packet.

A transfer starts on a rising edge where DA and SA are both high, with the
Road-ADD word on the bus. The bitmap word follows on the next cycle, whatever
DA and SA do. Senders keep DA low during the bitmap cycle. A receiver
therefore offers SA only if it can absorb two words with no more
flow control. Every block here that sends on a road bus raises DA only when
it can also supply the bitmap word on the next cycle.

On the board these control lines are active low. The RTL uses active-high
signals.

Road-ADD layout at the default sizes:
`{LAMB[1:0], chain[1:0], chip[1:0], pattern[11:0]}`. This is also the value
to put on `pat_chip_i`/`pat_addr_i` to load that pattern.

## Keeping matching criteria apart

This is the least obvious part of the design. It lives in the LAMB GLUE
(`glue.sv`, `glue_opc_ctrl.sv`) and, one level up, in the TOP GLUE.

A LAMB has four chains of chips. Roads move down a chain one chip at a
time, so a chain with many roads can take much longer to empty than the
others. The GLUE therefore has one OPCODE engine per chain, so that a chain
that has emptied can move to the next criterion while the others are still
sending. The rule it must keep is that roads of different criteria never
mix on the output: every 5/5 road leaves before any 4/5 road.

**Opcode FIFO.** OPCODE words from the TOP GLUE pass an input register and
enter a three-word FIFO. Three words is exactly one event's worth: `OP_INIT`,
then `OP_DEC_THR` and its data word. All four engines read all three words in
parallel. Each engine keeps its own offset, pointing at the next OPCODE it
will send.

**When an OPCODE is processed.** An engine sends its next OPCODE only when
the current one is *processed*. That needs two conditions together:

- at least `N_WAIT` cycles have passed, so that roads caused by the OPCODE
  (or by the last hits) have had time to raise wired_DA; and
- the chain's wired-OR Data Available (`GLUEwired_DA`) is low, so the chain
  holds no road.

A two-word OPCODE is sent only when both words are in the FIFO, on two
consecutive cycles. The `OP_INIT` criterion covers the whole hit input, so it
cannot close while hits may still arrive. Here it can close only once the
following OPCODE is queued (that OPCODE is sent on End-of-Hit), and the
`N_WAIT` count starts at that point. When an OPCODE is processed, the engine
pulses its Road_end to the Main FSM.

**Main FSM.** For each chain the FSM counts the OPCODEs that chain has
processed and the GLUE has not yet retired. Only chains whose count is zero
get SA, because only they are still on the oldest criterion. A chain that has
moved ahead keeps its new roads until the others catch up. When every chain
has processed the oldest OPCODE and the GLUE road path is empty, the FSM
does three things:

- removes that OPCODE (one or two words) from the FIFO;
- pulses `road_end_o` to the TOP GLUE;
- releases the chains that had moved ahead.

The TOP GLUE applies the same counting to the four LAMBs before it merges
their roads onto P3.

For the processed test to work, wired_DA must mean "this chip holds any
road, including one buffered for the chain", not only "has a matched road
not yet read". Each chip's `wired_da_o` is defined that way, so a low
`GLUEwired_DA` means the whole chain is empty.

## Blocks and their timing

```
am_board
├── input_control      P3 serial hit bus -> six layer buses (1 cycle); VME test source
├── pipeline_reg x4    hit + OPCODE buses in front of each LAMB (1 cycle)
├── lamb x4
│   ├── indi x12       one per layer and half-LAMB, registered fan-out (1 cycle)
│   ├── amchip x16     4 chains x 4 chips, road buses daisy-chained
│   └── glue           road_merge + Opcode FIFO + 4 x glue_opc_ctrl + Main FSM
└── top_glue           OPCODE broadcast, road_merge of the 4 LAMBs (+ VME test source), Road_end / event_done
```

- **amchip.** A hit captured at edge *k* updates the bitmaps at *k*+1. At
  *k*+2 the road can be taken for read-out and `wired_da_o` rises. Roads are
  read out lowest pattern first. An upstream packet passes through the chip's
  one-packet input buffer in three cycles. The chip alternates between its
  own roads and upstream ones.
- **road_merge** (used in both GLUEs). The structure is multiplexer, input
  register, two-word FIFO, output register, so a word needs at least three
  cycles from input to output. SA goes to one input at a time, round robin,
  and only while the path holds at most two words.
- **Hit path.** A hit takes four cycles from P3 to a chip's hit register
  (Input Control, pipeline register, INDI, chip). An OPCODE takes at least
  four cycles to reach a GLUE FIFO. End-of-Hit strobed after the last hit
  therefore cannot overtake that hit.

Shared widths, the OPCODE encoding and the matching function are in
`am_pkg.sv`:

- `OP_NOP` = 0, `OP_INIT` = 1, `OP_DEC_THR` = 2 (a two-word OPCODE).
- Hits have 12-bit superstrips and 3-bit layer numbers.

## Sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `CHIPS`   | 4       | chips per chain. Only the 16 top-face sockets of a LAMB are used in this configuration; the LAMB has 32 sockets, up to 8 per chain. |
| `NPATT`   | 4096    | patterns per chip. The real chip holds about 5000; 4096 makes 64 chips fill the 18-bit Road-ADD exactly. |
| `N_WAIT`  | 8       | cycles an OPCODE must be out before its chain may be declared empty; covers the chip's 2-cycle wired_DA latency plus the pipeline. |

The default board holds 64 chips × 4096 = 262,144 patterns. The upgrade
target quoted for the system is 512 × 10³ patterns per detector wedge, and
the full board has 128 sockets. Building `CHIPS = 8` gives 128 chips, but
then the 6-bit chip prefix overflows the 18-bit Road-ADD unless `NPATT` is
lowered to 2048.

The chip's associative memory is modelled as a register array with a
compare per pattern and layer. It synthesizes to a very large flat netlist,
not to a CAM macro.

## What is not modelled, and other departures

- **Pattern loading.** On the board, patterns are loaded over JTAG: a VME
  slave drives eight daisy chains of four chips per LAMB, 32 chains in
  parallel. Here a parallel write port (`pat_we_i`, `pat_chip_i`,
  `pat_addr_i`, `pat_ss_i`) takes its place. The JTAG/boundary-scan logic
  and the VME slave are not modelled.
- **Test mode.** There are two separate switches. `test_mode_i` makes the
  Input Control take hits from the VME port (`vme_valid_i`, `vme_layer_i`,
  `vme_ss_i`) instead of P3; the rest of the board runs normally.
  `test_road_i` makes the TOP GLUE hold the LAMB roads back and send packets
  written from VME instead. A packet is written as two words on `vme_road_i`
  with `vme_road_we_i`, Road-ADD first, while `vme_road_rdy_o` is high. It then
  leaves on P3 through the normal DA/SA path. Only the hit and road ports
  are modelled, not the VME slave behind them.
- **Outside the board.** The sequencer (AMS), clock distribution, bus
  transceivers and connectors are outside the RTL.
- **Internals not taken from the board description.** Several inner details
  of the AM chip are this model's own: the buffer sizes, the read-out order,
  the 2-cycle match latency, and the rule that a road is sent once per
  event. The OPCODE encoding, the hit word format, the choice of layer 5 as
  the second required layer, the Road-ADD layout, `event_done_o`, the
  `OP_INIT` closing rule and the VME road write protocol are also this
  model's own.

## Simulating

Each file in `tb/` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Each also has a
watchdog that stops a hung run. The simulator used is two-state; every
register that is read is reset.

```
verilator --binary --timing --assert -Irtl -Itb rtl/am_pkg.sv tb/tb_am_board.sv \
          --top-module tb_am_board -o sim --Mdir obj && ./obj/sim
```

Other modules are found through `-Irtl`. Replace the testbench name to run
another one.

| testbench | what it checks |
|-----------|----------------|
| `tb_amchip` | Covers the 6/6 road during input, then only the new 5/6 road after `OP_DEC_THR` to 5. A road without XFT never comes. Also checks upstream pass-through, the 2-cycle wired_DA latency, and the `OP_INIT` clear. |
| `tb_glue_opc_ctrl` | Checks that `OP_INIT` stays open until the next OPCODE is queued, that a two-word OPCODE is not split, and that the close comes exactly `N_WAIT`+1 cycles later and waits for wired_DA. |
| `tb_glue` | Uses behavioural chains. Checks that no road of the second criterion leaves before the first Road_end, that every packet is whole and sent once, and the 3-cycle road path. One chain must move on before another. |
| `tb_lamb` | Runs one LAMB, 2 chips per chain with 8 patterns each, over random events. Every road is checked against a reference built by matching hits to patterns: address, bitmap and criterion. |
| `tb_top_glue` | Uses behavioural LAMBs. Checks the OPCODE words, that criteria do not mix across LAMBs, and `event_done_o`. Then checks the road test mode: VME packets reach P3 whole and in order, and a LAMB road stays held until test mode ends. |
| `tb_input_control`, `tb_indi`, `tb_pipeline_reg` | Cover the simple stages. |
| `tb_am_board` | Runs the whole board at 2 chips per chain and 16 patterns per chip. It runs eight events: ordered and unordered, from P3 and in test mode, under random P3 back-pressure. It also counts that each mechanism happened: roads during input, chains switching criterion at different times, held streams, pass-through, a full Opcode FIFO. At the end, four packets are sent from VME through the TOP GLUE in road test mode. |
| `tb_am_board_full` | One ordered event with every default size: 262,144 patterns, all of them loaded. Also runs the road test mode. Build and run take under a minute. |

All of these pass. Each testbench has also been shown to fail against a
deliberately broken copy of its module.
