# CBR/VBR traffic Generator/Monitor for a QoS router

This is synthesizable SystemVerilog for a hardware traffic generator and monitor. It is meant to sit
next to a QoS router (an SMMR-class router with many virtual channels per link) on one FPGA and load
it with realistic traffic. For every router port there is one generator. Each generator drives one
stream per virtual channel (VC) and can make three kinds of traffic:

* **CBR**: constant bit rate, one flit every C flit cycles.
* **VBR**: an average CBR reserve (CBR_a) plus a peak reserve (PBR). The PBR flits go out back to
  back, as soon as the link has room.
* **BE**: best effort, which fills whatever the QoS streams leave.

Each generator is also an ideal drain for the traffic that arrives on its port, and returns a credit
for every data flit it drains. A monitor samples the state of every stream at a programmable rate
and writes the samples to external SRAM. All experiment settings come from a table in external SRAM,
so the hardware only has to be built once.

The central part is the per-port **link scheduler**. Once per flit cycle it picks the VC that sends
next. One sub-scheduler per VC works out whether that VC may send and with what priority, and a
pipelined MAX network picks the winner. Most of this document is about that scheduler.

## Link timing

| unit | size |
|---|---|
| phit | 16 bits, one per clock on each link |
| flit | 64 phits |
| flit cycle | 65 phits: one data flit, then one flow-control (credit) phit |
| round | K = 2048 flit cycles; bandwidth reserves are counted per round |

A CBR stream with rate C gets 1/C of the link. Its reserve per round is K/C flits.

All links run in step: flit cycles start in the same clock on every port. The router is expected to
deliver flits with a latency of whole flit cycles. Inside a flit cycle the phits are laid out as
follows (this layout is a choice of this implementation):

| phase | phit |
|---|---|
| 0 | header `{type[15:13], 5'b0, vc[7:0]}`; types IDLE 0, SYNC 1, QOS 2, BE 3, CONNECT 4, CONFIRM 5 |
| 1 | route `{PORT_OUT, VC_OUT}` (for CONNECT: `{own port, vc}`) |
| 2 | time stamp: low 16 bits of the sender's flit-cycle count |
| 3..63 | payload `{vc, phase}` |
| 64 | credit `{valid[15], 7'b0, vc[7:0]}` |

A flit cycle with nothing to send carries all zeros. The VC number in a header is the VC on that
link. A generator's VC index *i* is link VC *i* in both directions.

## The scheduler, per VC

### Transmit conditions (`control_mask`)

Each VC keeps these counters:

* **rate counter**: signed, 16 bits.
* **CBR_BW remained**: CBR_a flits left in this round.
* **PBR counter**: PBR flits left in this round.
* **bank credit**: free buffer slots downstream.
* **connection state**.

A connected QoS VC may send:

```
CBR flit  if credits != 0 and CBR_BW_remained > 0 and rate_counter < 1
PBR flit  if credits != 0 and not (the CBR condition above) and PBR_counter > 0
```

A BE VC may send whenever it holds a credit. A QoS VC with no PBR reserve is plain CBR.

The counters are updated once per flit cycle, when the scheduler's choice for the next flit cycle is
known:

| event | rate counter | CBR_BW remained | PBR counter | credit |
|---|---|---|---|---|
| CBR flit chosen | + T_DELAY − 1 | − 1 | | − 1 |
| PBR flit chosen | − 1 | | − 1 | − 1 |
| BE flit chosen | | | | − 1 |
| nothing for this VC | − 1 | | | |
| end of round | | reload | reload | |
| credit phit arrives | | | | + 1 |

Two details matter here:

* **The rate counter acts as a deadline.** When a CBR flit is late, the counter keeps going negative.
  The VC then sends back to back until it has caught up, up to its per-round CBR reserve.
* **The counter keeps counting during PBR flits.** A VBR stream's CBR_a part therefore keeps its
  exact rate while the PBR burst uses the rest of the link. With a 25 % CBR_a reserve and a
  128-flit PBR reserve, the burst takes about 75 % of the link and ends near flit cycle 170.

The rate counter starts at I_DELAY, which lets an unfinished experiment be resumed. It only counts
once the connection is established.

### Priority (`siabp`)

This is a modified SIABP priority. The CBR priority of a VC starts at its CBR reserve (flits per
round). While a due CBR flit waits, a queuing-delay counter runs. Each time that counter reaches the
next power of two, held in the NPW2 register, the priority doubles (it saturates at 4095). The
priority therefore grows roughly as delay divided by the flit inter-arrival time. Sending a CBR flit
sets the delay back to 1 and reloads the base priority. A PBR entry uses the PBR reserve left as its
priority. All of these registers are 12 bits.

### Entry in the priority vector (`subscheduler`)

Each VC offers the MAX network a key `{kind, priority}`. The kinds rank as follows:

CONFIRM (5) > CONNECT (4) > CBR (3) > PBR (2) > BE (1) > none (0)

The priority only decides between VCs of the same kind. As a result, a due CBR flit of any VC beats
any PBR flit, and BE only gets slots that no QoS flit wants.

## The scheduler, per port

`scheduler` holds NVC sub-schedulers and one `max_network`. The MAX network is a tree of two-input
maximum stages with one register per level. Its result comes out log2(NVC) clocks after the vector
goes in, and on equal keys the lower VC index wins.

`gen_ctrl` sequences one scheduling per flit cycle. The flit sent in cycle *f* was chosen during
cycle *f−1*:

| phase (clock in the flit cycle) | action |
|---|---|
| 0 | sub-schedulers latch their entries (`local_start`) |
| 5 | vector enters the MAX network (`max_start`) |
| 5 + log2(NVC) | winner out (`high_valid`) |
| 6 + log2(NVC) | `cred_dec`: every VC's counters are updated; `do_reset` as well in the last flit cycle of a round |
| 10 + log2(NVC) | the winner becomes the next candidate; `lnk_ok` tells the monitor it may sample |
| 64 → 0 | the candidate goes to the output module for the new flit cycle |

This gives 5 clocks of local scheduling, log2(NVC) clocks of selection and 5 clocks of update and
output synchronisation: 12 clocks with 4 VCs. That is well inside the 65-clock flit cycle, even with
hundreds of VCs.

## Credits, connections, sync flits

* **Data flits and credits.** The input module (`pqti`) reads the header of every arriving flit.
  For a QoS or BE data flit it tells the output module (`pqto`) to send a credit for that VC in
  phase 64 of the same flit cycle. A credit phit that arrives is passed to the sub-scheduler of the
  VC it names.
* **Connection set-up.** A QoS VC must be connected before it sends data. It sends one CONNECT
  flit. The far generator answers with a CONFIRM on the same VC, and the VC then counts as
  connected. Both flits go through the MAX network above all data, and neither uses a credit.
* **Sync flits** are accepted and counted, and nothing else is done with them.
* **Starting credits.** Each VC starts with `INIT_CREDITS` = 4 credits. A credit comes back about
  two flit cycles after the decision that used it, so 3 credits are enough to keep one VC sending
  back to back. With fewer credits, or a slow router, VCs stall and catch up later.

## Configuration table and monitor records

`init_tables` reads the table bank from word 0 upward, one word per clock, with data one clock after
the address. The table is laid out like this:

```
word (port*NVC + vc)*9 + f    f = 0 STATE (0 off, 1 QoS, 2 BE), 1 BW_CBR, 2 BW_PBR, 3 PORT_OUT,
                                  4 VC_OUT, 5 PORT_IN, 6 VC_IN, 7 T_DELAY, 8 I_DELAY
word PORTS*NVC*9              N_CYCLES_MT   sample every N flit cycles
word PORTS*NVC*9 + 1          N_CYCLES_TOT  number of samples
```

Each field is broadcast to the generators as a Bus_CONF word `{we, port, vc, field, data}`. When
the table has been loaded, all generators start together.

Every N_CYCLES_MT flit cycles, the `monitor` snapshots all PORTS×NVC streams. It then writes one
record per clock to three banks, all at address `sample*PORTS*NVC + port*NVC + vc`:

* **R delay**: the CBR rate counter, sign-extended. A value ≤ 0 means a CBR flit is due or late.
* **PBR remaining**: the PBR reserve left in the round.
* **Jitter**: |R delay − R delay of the previous sample|, and 0 in the first sample.

It stops after N_CYCLES_TOT samples. A sweep takes PORTS×NVC clocks. With N_CYCLES_MT = 1 it must
finish within one 65-clock flit cycle, which holds up to PORTS×NVC = 64.

## Files

| file | part |
|---|---|
| `rtl/gm_pkg.sv` | sizes, flit and kind encodings, configuration and Bus_CONF/Bus_monitor records |
| `rtl/gm_top.sv` | top: loader, PORTS generators, monitor |
| `rtl/generator.sv` | one port: configuration registers, pqti, scheduler, gen_ctrl, pqto |
| `rtl/pqti.sv`, `rtl/pqto.sv` | link input and output |
| `rtl/gen_ctrl.sv` | flit-cycle timing, scheduling sequence, rounds |
| `rtl/scheduler.sv`, `rtl/subscheduler.sv`, `rtl/control_mask.sv`, `rtl/siabp.sv`, `rtl/max_network.sv` | link scheduler |
| `rtl/init_tables.sv`, `rtl/monitor.sv` | SRAM table loader and sample writer |

The top-level ports are: `start`; the table bank (`tbl_addr`, `tbl_re`, `tbl_rdata`); the three
write banks (`rd_*`, `pb_*`, `jt_*`); the router links `phit_in[PORTS]` and `phit_out[PORTS]`; and
the status outputs `running`, `samples` and `mon_done`.

Top-level parameters:

| parameter | default | meaning |
|---|---|---|
| `PORTS` | 2 | router ports, one generator each |
| `NVC` | 4 | VCs per port (power of two, 2 to 128) |
| `K` | 2048 | flit cycles per round |
| `INIT_CREDITS` | 4 | credits per VC at start |

The defaults are the two-port, four-VC setup used to evaluate this design. NVC = 8, 16 and 32 also
elaborate and are the scaling points of interest.

## Simulating

Each testbench in `tb/` checks itself and ends with `TB_RESULT checks=N failures=M`. To build and
run one with Verilator, for example the full system:

```
verilator --binary --timing --assert -Irtl rtl/gm_pkg.sv rtl/*.sv tb/tb_gm_top.sv \
          --top-module tb_gm_top -o sim && ./obj_dir/sim
```

(`-Wno-fatal` silences the unused-signal warnings.)

`tb_gm_top` runs the whole design at its default sizes for 2448 flit cycles (about 160 k clocks,
well under a second). The testbench models the SRAM banks, and an ideal router crosses the two ports.

* **Port 0** carries mixed traffic: CBR 1/16 and 1/4 on VC0 and VC3, and VBR 1/16 + 16 PBR and
  1/8 + 16 PBR on VC1 and VC2.
* **Port 1** carries one VBR stream (CBR_a 1/4 + 128 PBR) on VC1 and BE on VC0.

It checks:

* the connection set-up;
* a credit for every drained flit;
* the flits per VC in a round, against the configured reserves;
* the PBR burst in round 1 and again in round 2;
* that BE fills every slot left;
* a credit stall, forced by the router holding credits back;
* a sync flit;
* all monitor records.

`tb_gm_scaling` runs the whole design at NVC = 8, 16 and 32 side by side. Every VC of both ports
carries CBR at 1/(2·NVC) of the link. It checks each VC's flit count after connection and the
monitor records (2 × 32 records fill 64 of the 65 clocks in a flit cycle).

The unit testbenches (`tb_<module>.sv`) check each block against models written from the rules
above. They include exact strobe phases in `tb_gen_ctrl` and random vectors in `tb_max_network`.

## Deviations and open points

These points are interpretations or additions of this implementation, not fixed by the design it
follows:

* **PBR flits and the rate counter.** The per-VC update rules say a PBR flit changes only the PBR
  counter. Here the rate counter also keeps counting down in PBR cycles, and a PBR flit uses a
  credit like any data flit. Without this, a VBR stream could not keep its CBR_a rate during its
  burst, which the reference results show it does.
* **Rate counter step.** "Add T_DELAY" and the per-cycle decrement of the same flit cycle are merged
  into +T_DELAY−1, so T_DELAY = C gives exactly 1/C of the link.
* **CBR above PBR across VCs.** The precedence of CBR over PBR is applied between VCs as well as
  within one VC.
* **Round reload of PBR.** The PBR reserve is reloaded every round, like the CBR reserve.
* **MAX network.** It is a plain pipelined maximum tree with log2(N) stages, not a specific bitonic
  wiring.
* **Padded scheduling spans.** The two 5-clock spans of the scheduling latency are kept as
  specified. The work they stand for takes one clock here, and the rest is waiting.
* **Monitor quantities.** R delay and jitter are defined as above. The reference design only names
  them.
* **Not fixed by the reference design.** The connection set-up protocol, the flit and credit
  encodings, the table layout and SRAM timing, Bus_CONF, the starting credit count and all counter
  widths other than the 12-bit SIABP registers.
* **Outside this design.** The router itself, the external SRAM and the host that fills the table
  and reads the samples. The "SMMR reconfiguration" of the credit phit is just phase 64 of the link
  here.
