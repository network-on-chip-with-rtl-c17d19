# Ring network-on-chip with a tunable data rate

A small system-on-chip in which five unrelated processing blocks (a FIFO
buffer, a seven-segment display decoder, a 4-bit ADC, a digital PLL and a
Kogge-Stone adder) share one on-chip ring network. A 4-bit configuration
number chooses, from a look-up table, which blocks take part and how fast the
network and the blocks run. On every configuration change a small state
machine disconnects everything. It then connects the blocks one at a time in
order of their priority, and restarts the clock at the new rate. Running the
blocks at a lower rate, or not at all, is how the design saves power.

The RTL follows a published design description. That description names the
blocks and the connection algorithm and shows simulation traces. It says
little about how the blocks exchange data, so the ring protocol, the flit
format and the data path through the nodes are this design's own (see
"Where this design fills gaps").

## Block map

```
                 cfg[3:0]
                    |
             +--------------+   lut_cfg    +------------+
             | node_config  |------------->| config_lut |
             |     _fsm     |<-------------|  16 records|
             +--------------+   record     +------------+
              | node_on  | gate_en, rate
              |          v
              |   +------------------+  tick (clock enable), clk_out
              |   | clock_tree_synth |---------------------------------+
              |   +------------------+                                  |
              v                                                         v
   +---------------------------- ring (one flit slot per stop) ------------------+
   | stop 1 FIFO -> stop 2 7-seg -> stop 3 ADC (+exit) -> stop 4 DPLL -> stop 5 adder -> stop 1 |
   +-------------------------------------------------------------------------------------------+
       sync_fifo    seven_seg_decoder     adc_pcm            dpll          kogge_stone_adder
```

| Node | Id | Module | Role in the data path |
|------|----|--------|-----------------------|
| FIFO | 1 | `sync_fifo` (8 x 16) | buffers flits and sends them on; `fifo_hold` stalls its output |
| Seven-segment decoder | 2 | `seven_seg_decoder` | shows the low nibble of each flit and passes the flit on |
| ADC | 3 | `adc_pcm` | the source: sends `data_size` 4-bit PCM codes per configuration |
| DPLL | 4 | `dpll` | carries no data; locks `dpll_fout` to `pll_ref` x divider |
| Adder | 5 | `kogge_stone_adder` (4 bit) | replaces each code by code + previous code (5-bit result) |

The ring's exit port (destination 0) sits at the ADC's stop. Flits that leave
there appear on `exit_valid` / `exit_data` / `exit_src`.

## The configuration record

`noc_pkg::cfg_entry_t` packs the four fields of a "net configuration":

| Field | Width | Meaning |
|-------|-------|---------|
| `data_index` | 4 | the configuration number itself |
| `data_size` | 8 | number of ADC codes sent in this configuration |
| `data_rate` | 3 | the network runs at the global clock divided by 2^rate |
| `ctrl.prio` | 5 x 4 | priority of each node; 0 means "not connected" |
| `ctrl.dpll_n` | 8 | DPLL feedback divider (output = reference x dpll_n) |

`config_lut` is a combinational ROM of 16 such records. In configuration 0100
the priorities are FIFO 9, decoder 7, ADC 6, DPLL 5 and adder 0. Those are the
only table values with an outside source. The other fifteen records were
chosen so that, between them, they switch every node on and off and use rates
0 to 5. Configuration 0000 connects nothing. A record with the ADC switched
off must have `data_size = 0`, or `run_done` never rises. Edit the `case` in
`config_lut.sv` to change the table.

## Reconfiguration: the priority algorithm

`node_config_fsm` has three states:

1. **RUN**: steady operation with the clock gate open. A change of `cfg`
   moves it to LOAD and closes the gate, so the trigger pulses stop.
2. **LOAD** (1 cycle): registers the record, disconnects all nodes and
   pulses `reconfig`. The ADC's sample counter reloads. The adder's and the
   decoder's output registers are cleared.
3. **CONNECT** (1 cycle per node, plus 1): each cycle it finds the
   unconnected node with the highest priority that is at least `PRIO_MIN`
   (default 1). Ties go to the lower node number. It connects that node and
   reports it on `conn_strobe` / `conn_id`. When no such node is left, it
   opens the gate and returns to RUN.

So a new configuration takes 2 + (number of connected nodes) cycles before
the first trigger pulse can come. The first pulse then follows 2^rate cycles
later. Nodes that are not connected get no clock enable at all. Their ring
stops still pass traffic through (a "bypass").

## Clock tree and data rate

`clock_tree_synth` is a chain of simple parts:

- a free-running counter, which is also the clock divider (bit k is the
  global clock divided by 2^(k+1));
- a one-hot AND-gate decoder that picks the divided clock for `rate`;
- a hold/release latch. It is transparent while the picked clock is low and
  gates that clock into `clk_out`;
- a trigger pulse `tick`: one global-clock cycle long, once every 2^rate
  cycles, and only while the gate is open;
- a counter of trigger pulses.

The counter restarts whenever the rate changes or the gate closes, so a new
rate always begins with a whole period. `node_tick[i]` is `tick` for every
connected node.

All logic runs on the single global clock and uses `tick` as a clock enable,
so there are no clock-domain crossings. `clk_out` is the tunable clock itself,
brought out for observation. The one latch in the design is the gate latch;
it is intended.

## The ring

Each `ring_router` owns one output register (a single flit slot). A flit
`{valid, dst, src, data}` moves one stop per tick. At each stop, the incoming
flit is handled by the first of these rules that applies:

1. **exit**: `dst == 0` at the exit stop;
2. **eject**: `dst` is this stop, the node is connected and ready;
3. **drop**: `dst` is a node that is not connected (it could never be
   delivered; counted in `cnt_drop`);
4. **forward**: otherwise it is forwarded. If this stop's node is off, that is
   a bypass (`cnt_bypass`). If the flit was for this node but the node was
   busy, it goes round again (`cnt_recirc`).

A local node may inject only when the slot would otherwise stay empty, so
traffic already on the ring always goes first.

**Where flits go.** A node sends its result to the next connected data node
in ring order after itself (adder, FIFO, decoder; the DPLL is skipped). If
there is none before the walk comes back to the ADC, the result goes to the
exit. With every node on, the path is ADC -> adder -> FIFO -> decoder -> exit.
With only the ADC on, codes go straight to the exit.

**Back-pressure and deadlock.** The adder and the decoder can always accept a
flit. When they eject one, their slot is free in that same tick, so their
pending result leaves as the new flit arrives. A full FIFO still accepts a
flit if its pending word can leave in the same tick: it reads and writes in
one cycle. Without this rule, a ring full of flits waiting for a full FIFO
would lock up. While `fifo_hold` is high, a full FIFO refuses flits and they
go round the ring until it is released.

**Ordering.** Flits stay in order as long as nobody has to go round again.
Flits that did go round may reach their node in a different order. The
end-to-end test therefore compares that part as a multiset.

Flits on the ring when the configuration changes survive. The rules above
then drop those addressed to nodes that are no longer connected. The FIFO's
contents survive a reconfiguration and resume once the FIFO is connected
again.

## The nodes

- **`kogge_stone_adder`**: bit generate `a & b` and propagate `a ^ b`, then
  log2(WIDTH) prefix stages (G = G_hi | P_hi & G_lo, P = P_hi & P_lo), with
  the carry-in folded into bit 0. The sum bit is propagate XOR the carry into
  that bit. It is combinational and has any width; the default is 4.
- **`adc_pcm`**: an RTL stand-in for an ADC. A triangle generator (8-bit,
  step 5) stands for the analog input. A sampling pulse fires every
  `SAMPLE_DIV` enabled cycles, and `samp_out` shows the pulse-amplitude
  signal. The quantizer truncates the sample to 4 bits, and `pcm_valid`
  strobes the code two enabled cycles after the pulse.
- **`dpll`**: a phase accumulator (16 bits) acts as the digitally
  controlled oscillator. A sampled phase-frequency detector produces UP and
  DN: UP means the reference edge came first, DN means the divided output
  came first. A proportional-integral filter (integrator +/- KI per cycle of
  error, proportional kick +/- KP) sets the frequency word. `locked` rises
  after 8 phase errors in a row of at most 2 cycles. With a 64-cycle
  reference it locks within about 6,000 to 16,000 cycles for dividers 1 and 2.
- **`seven_seg_decoder`**: segments `{g,f,e,d,c,b,a}`, active high,
  registered. An OFF/ON state follows the node's connection, and digits are
  taken only while it is ON.
- **`sync_fifo`**: a single clock, with pointers one bit wider than the
  address, and registered read data. An assertion checks that the fill level
  never exceeds the depth.

## Where this design fills gaps

These parts come from the source description: the five blocks and their
widths (4-bit adder, 4-bit ADC, 8-bit FIFO data, 8-bit PLL select); the ring
of five nodes; the clock tree's parts; the power-of-two division; the four
record fields; the priority algorithm (connect high priorities, highest
first); and the two decoder patterns 1 -> 0000110 and 2 -> 1011011.

These are this design's choices:

- the flit format and the slotted-ring rules;
- the data path through the nodes;
- the adder's "code + previous code" role and the DPLL's data-less role;
- "high priority" meaning non-zero;
- the whole table apart from configuration 0100's priorities;
- the FIFO depth (16);
- the DPLL's detector, filter and gains;
- the ADC's signal shape and sampling period;
- the use of a clock enable instead of divided clocks for the logic;
- a synchronous, active-low reset throughout.

The DPLL's three extra oscillator outputs seen in the source traces are not
reproduced. The decoder has one segment output, not two identical ones.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_kogge_stone_adder` | all 512 input combinations at 4 bits, random 16-bit sums |
| `tb_sync_fifo` | random traffic against a queue model; full after exactly 16 writes |
| `tb_seven_seg_decoder` | all 16 patterns against a segment table; OFF/ON behaviour |
| `tb_adc_pcm` | triangle, sample spacing, PAM output, codes against a model |
| `tb_dpll` | lock and output frequency for dividers 1 and 2 |
| `tb_clock_tree_synth` | tick spacing 2^rate for rates 0 to 5, clock period, gating, distribution |
| `tb_config_lut` | record fields, configuration 0100, coverage of on/off |
| `tb_node_config_fsm` | connection order, connected set, reconfiguration time |
| `tb_ring_router` | 4,000 random cycles against a rule model; every rule exercised |
| `tb_noc_top` | end to end at default parameters, below |
| `tb_noc_config_sequence` | configurations 0001, 0010, 0100 in turn: connection order, ON/OFF set, tick and clock period per rate, all codes delivered |

`tb_noc_top` runs 14 configurations. A model predicts every exit value and the
test compares them in order. It holds the FIFO until it overflows into
recirculation, then drains it. It locks the DPLL and measures its output
period. Finally it switches configuration while flits are in flight, to
provoke drops. It fails if any mechanism (reconfiguration, several rates,
adder use, bypass, FIFO full, recirculation, drop, DPLL lock) never happened.
It takes well under a second.

Simulate one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/noc_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top
./obj_dir/Vtb_noc_top
```

Every file in `rtl/` lints with `verilator --lint-only -Wall` (warnings only
for unused bits and unused package constants).

## Changing it

- **Table**: edit `config_lut.sv`. The priorities are listed as
  `pv(fifo, seg, adc, dpll, adder)`.
- **Sizes**: `noc_top` parameters `FIFO_DEPTH` and `ADC_SAMPLE_DIV`. Widths
  shared by all modules are in `noc_pkg`.
- **"High" threshold**: `node_config_fsm` parameter `PRIO_MIN`.
- **DPLL loop**: `dpll` parameters `FCENTER`, `KI`, `KP`, `LOCK_TOL`,
  `LOCK_CNT`. The free-running frequency is FCENTER / 65536 of the clock.
