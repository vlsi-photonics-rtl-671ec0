# TE03 optoelectronic Switch IC: data path and BUSY BIT arbitration

Sixteen processor boards, with four processors each, share an optical ring.
The ring carries 64 optical paths of 12 bits each at 1 Gb/s per line. It
also carries a FRAME line and four BUSY BIT lines. Each board has one Switch
IC. The IC lets any of the board's four processors (electrical ports A to D)
put its data onto any of the 64 outgoing paths. It passes every other path on
unchanged to the next board, and it hands the data arriving on paths 0 to 3 to
ports A to D. In effect the ring is one large multiplexer spread over 16 chips.

Two senders must never write the same path. This is prevented by the **BUSY
BIT protocol**: one busy bit per destination processor travels round the ring
in a serial stream, and a node may only use a destination whose busy bit it
has taken ("grabbed"). The protocol is the hardest part of the design, so
most of this text is about it.

This repository holds synthesizable SystemVerilog for the digital part of the
IC, with a self-checking testbench for every module. The analog parts are not
modelled: receivers, drivers, terminations, clock delay lines and duty-cycle
controls.

## Top level: `switch_ic`

```
 path_in[64][12] --(optical clock)--> rx_demux --+
                                                 v
 port_in[4][12]  --(internal clock)-> rx_demux --> switch_core --> tx_mux --> path_out[64][12]
                                                 |  (2x2 chains)  `-> tx_mux --> port_out[4][12]
                                 dp_ctrl_regs ---+
 frame_in / busy_in[4] (main or spare) --> busy_bit_unit --> frame_out / busy_out[4], teo, giro
 eclk_in, oclk_main, oclk_spare --> clk_select --> oclk, iclk, ooclk, eoclk
```

| Parameter  | Default | Meaning |
|------------|---------|---------|
| `NPATH`    | 64      | optical paths |
| `NPORT`    | 4       | electrical ports (processors per board) |
| `PW`       | 12      | bits per path and port (8 data, 1 frame, 2 parity, 1 control; the switch does not look inside) |
| `BB_LANES` | 4       | BUSY BIT lines |
| `BB_BITS`  | 16      | busy bits per line (one FRAME covers all lines) |

`rtl/sw_pkg.sv` holds these defaults and the FRAME state enum.

## Data path

### Double data rate lines and latency

Every line carries two bits per clock cycle, one per clock phase. Inside the
chip each path and port is a `2*PW` = 24-bit word at the clock rate. Bit pair
`[1:0]` of a line is {bit sent while the clock is low, bit sent while the
clock is high}. The high-phase bit comes first.

| Cycle | Stage | Module |
|-------|-------|--------|
| 1 | demultiplex: rising-edge and falling-edge flip-flops, pair registered | `rx_demux` |
| 2 | core input register; optical data cross into the internal clock here | `switch_core` / `phase_sync` |
| 3 | core output register | `switch_core` |
| 4 | output register; the pair is sent bit by bit on the two clock phases | `tx_mux` |

A pair sampled at rising edge *k* appears on the output from edge *k+4*. The
first bit is driven while the clock is high, the second while it is low.

### Switch core

Each optical path runs through a chain of four 2x2 switches, one per port, in
the order A, B, C, D. Port *p* drives path *n* when bit *n* of port *p*'s
64-bit control register is set. If several ports are enabled on one path, the
last one in the chain wins (D over C over B over A). Otherwise the path flows
through unchanged. Port *n*'s output is always input path *n*.

Two loop-backs are used during clock initialization. Both drive PORT B:

* `lb_port`: PORT A input to PORT B output. This checks the electrical input
  timing.
* `lb_path0`: PATH 0 input to PORT B output. This checks the optical input
  timing. It wins if both are set.

### Control registers (`dp_ctrl_regs`)

The host writes one latch bit per clock cycle:

* `eioo = {port[1:0], path[5:0]}` selects the bit.
* `dp_val` is the value written.
* `dpcrl` is the write strobe.
* With `sll` high, the write goes to a loop-back latch instead. `eioo[0]`
  picks which one: 1 for `lb_path0`, 0 for `lb_port`.

`rst` clears all latches, so every path flows through. A new setting changes
the output data 2 cycles after the write edge.

## Clocks (`clk_select`, `phase_sync`)

| Select | Low | High |
|--------|-----|------|
| `oics` | main optical clock line | spare optical clock line |
| `ics`  | internal clock = optical input clock | internal clock = electrical input clock |
| `oocs` | optical output clock = electrical input clock | optical output clock = internal clock |
| `cps`  | optical data taken into the internal domain on the rising edge | taken half a cycle earlier, on the falling edge |
| `tbps` | the same choice for the FRAME and BUSY BIT lines | |

The reference board clocks its IC electrically (`ics`=1). All other boards
run on the clock received optically (`ics`=0). The optical receivers (the
data demux and the FRAME/BUSY receive registers) always run on the buffered
optical input clock. Everything after the crossing runs on the internal clock.
The 0/180 degree select is how the initialization procedure avoids sampling
the optical data while it changes. The original design shifts the clock by
180 degrees. Here a falling-edge register is inserted instead, which gives
the same choice of edge.

The electrical output clock `eoclk` is the internal clock.

## BUSY BIT protocol

### The stream

The FRAME line is high for as many cycles as there are busy bits in a stream
(16 here). The busy bits travel on the BUSY BIT lines during those same
cycles:

* The first bit of the stream belongs to the highest-numbered processor.
* Processor *i* of lane *l* is global busy bit `l*16 + i`, and is host index
  `bbi = l*16 + i`.
* A busy bit of 1 means some node holds that processor.

Outside the FRAME the BUSY BIT lines carry nothing of meaning.

### What a node does with each bit (`busy_lane`)

Each lane has three N-bit registers:

| Register | Contents | Behaviour |
|----------|----------|-----------|
| request interface (`req_if_reg`) | what the host wants | set / reset one bit with `bbs` / `bbr` at index `bbi` |
| request | copy used while the FRAME passes | loads the request interface register while the FRAME is low; shifts up by one per FRAME cycle, 0 entering at the bottom; `REQUEST` = top bit |
| grab | what this node holds | holds while the FRAME is low; shifts up during the FRAME, taking in the new grab bit |

Each FRAME cycle does this for the bit passing by, with `G` = top bit of the
grab register:

```
grab_new = REQUEST & (~BUSY_IN | G)        // taken if free, kept if already ours
BUSY_OUT = REQUEST | (BUSY_IN & ~G)        // requested: busy; ours but no longer requested: freed
```

| REQUEST | BUSY_IN | G | BUSY_OUT | grab_new | Meaning |
|---|---|---|---|---|---|
| 0 | 0 | x | 0 | 0 | not wanted, free |
| 0 | 1 | 0 | 1 | 0 | held by someone else |
| 0 | 1 | 1 | 0 | 0 | **release**: we held it and no longer want it |
| 1 | 0 | x | 1 | 1 | **grab**: free, now ours |
| 1 | 1 | 0 | 1 | 0 | **denied**: held elsewhere; we try again next time round |
| 1 | 1 | 1 | 1 | 1 | we hold it and keep it |

After a FRAME has passed, the grab register lines up with processor numbers
again. The host reads it through the grab interface register (`grab_if_reg`).
Pulling `lgi_n` low copies it, and `gis` selects the bit shown on `giro`. Do
this between FRAMEs.

A request stays set until the host resets it. The node then grabs the
processor the first time the stream passes with that bit free. It releases the
processor the first time the stream passes after the request is reset.

### Creating the FRAME (`frame_ctrl`)

One node is the master (`mic`=1). It owns the FRAME:

| State | Entered when | FRAME sent on |
|-------|--------------|---------------|
| `FR_PASS` | always on a non-master; on the master after creation | the incoming FRAME |
| `FR_INIT` | master with `fc_in` high | 0. The ring drains of any old FRAME. |
| `FR_CREATE` | `fc_in` falls, the incoming FRAME is low, and `REQUEST` of lane 0 is high | `REQUEST`, plus one more cycle |

While creating, the master sends lane 0's request register as the FRAME.
With *m* leading ones from the top, the FRAME is *m*+1 cycles long. The master
then sends the incoming FRAME again (`FR_PASS`). To create a 16-bit FRAME:

1. Hold `fc_in` high for at least one ring round trip.
2. Set lane 0 requests 15 to 1.
3. Drop `fc_in`.
4. Once the FRAME has gone round, reset those requests. The master grabbed
   them during creation, so this frees them on the next pass.

If `fc_in` falls with request bit 15 of lane 0 clear, no FRAME is made and the
master goes straight to pass-through. All four lanes share the one FRAME.

### Line code and latency (`busy_bit_unit`)

The optical links are AC-coupled, so FRAME and BUSY BIT bits are sent as a
transition code:

* A 1 toggles the line; a 0 leaves it (`bb_encode`).
* The receiver recovers the bits as the XOR of successive samples
  (`bb_decode`).

A bit entering a node leaves it 5 internal clock cycles later:

| Cycles | Stage |
|--------|-------|
| 2 | receive registers, optical clock |
| 1 | crossing into the internal clock, `tbps` phase |
| 1 | decode |
| 1 | encode, after the same-cycle protocol logic |

A ring of 16 nodes therefore has an 80-cycle round trip.

`in_inv` inverts the decoded FRAME and BUSY BIT inputs. It is a test-chip
feature and is tied off in `switch_ic`. `teo` is the decoded FRAME as the node
sees it, for the processor board.

### Timing a grab

A request strobed with `bbs` enters the request interface register at the next
rising edge, and the request register copies it while the FRAME is low. The
worst case has the bit just missed. It is then a full round trip plus the
stream length, plus the host registers: 16 x 5 + 16 + 3 = 99 cycles. The
ring testbench measures this bound.

## Host interface of `switch_ic`

| Signal | Width | Function |
|--------|-------|----------|
| `rst` | 1 | synchronous reset on the internal clock; hold at least 3 cycles |
| `eioo`, `sll`, `dpcrl`, `dp_val` | 8, 1, 1, 1 | switch and loop-back latches |
| `bbi`, `bbs`, `bbr` | 6, 1, 1 | set / reset the request for busy bit `bbi`; never both strobes together (an assertion checks) |
| `lgi_n`, `gis`, `giro` | 1, 6, 1 | copy the grab register, select and read one bit |
| `mic`, `fc_in` | 1, 1 | master, FRAME reset / create |
| `tbps`, `cps` | 1, 1 | capture phase of FRAME/BUSY lines, of optical data |
| `ics`, `oocs`, `oics` | 1, 1, 1 | clock selects |
| `tis`, `bis` | 1, 1 | spare FRAME line, spare BUSY BIT lines |
| `teo` | 1 | decoded FRAME for the board |
| `fstate` | 2 | FRAME logic state, for observation |

## Files

| File | Contents |
|------|----------|
| `rtl/sw_pkg.sv` | sizes and FRAME state type |
| `rtl/switch_ic.sv` | top level |
| `rtl/rx_demux.sv`, `rtl/tx_mux.sv` | 1:2 demux receiver, 2:1 output mux |
| `rtl/phase_sync.sv` | 0/180 degree clock-domain retiming |
| `rtl/clk_select.sv` | clock source muxes |
| `rtl/switch_core.sv`, `rtl/dp_ctrl_regs.sv` | 2x2 switch chains, their control latches |
| `rtl/busy_bit_unit.sv` | complete BUSY BIT node |
| `rtl/busy_lane.sv`, `rtl/frame_ctrl.sv` | per-lane protocol registers, FRAME logic |
| `rtl/req_if_reg.sv`, `rtl/grab_if_reg.sv` | host-side request and grab registers |
| `rtl/bb_encode.sv`, `rtl/bb_decode.sv` | line code |
| `tb/tb_<module>.sv` | one testbench per module (`tb_bb_codec` covers both codec halves) |
| `tb/tb_switch_ic.sv` | full-size end-to-end test |
| `tb/tb_busy_ring.sv` | 16-node, 64-processor ring under random traffic |

## Verification

Every testbench computes expected values on its own and prints
`TB_RESULT checks=N failures=M`. Each has a watchdog. To run one with
Verilator 5, from the repository root:

```
verilator --binary --timing --assert rtl/sw_pkg.sv $(ls rtl/*.sv | grep -v sw_pkg) \
          tb/tb_switch_ic.sv --top-module tb_switch_ic
obj_dir/Vtb_switch_ic
```

* `tb_switch_ic` runs the top at full default size: 64 x 12-bit paths and
  4 x 16 busy bits. It drives random data on every line and both clock phases,
  and checks every output half-cycle against a reference model. The test
  covers:
  * flow-through, port insertion and several ports on one path
  * PATH n to PORT n, and both loop-backs
  * `cps`, `ics`, `oocs`, and `oics` with the main clock stopped
  * reset
  * a BUSY BIT ring closed through a 75-cycle delay with one modelled peer
    node: FRAME reset and creation, circulation period and length, grab,
    release, denial while the peer holds a processor, GIRO reads, and the
    spare FRAME/BUSY lines while the main lines carry noise, and a grab and
    release with the FRAME/BUSY lines captured on the falling edge (`tbps`)

  It counts each of these and fails if one never happened. It takes about
  a second.
* `tb_busy_ring` builds a ring of 16 `busy_bit_unit`s (64 processors). It
  measures uncontended grab latency against the bound above. It then runs
  random request / hold / release traffic from all nodes and checks:
  * no processor is ever held by two nodes
  * only requested processors are grabbed
  * every request is eventually served
  * the FRAME period is 80 cycles
* The module testbenches check the cycle-level behaviour of each block. The
  BUSY BIT ones replay the specification's 4-bit examples:
  * request `<3>,<0>` on a free stream gives `1001`
  * releasing `<3>` on an all-busy stream gives `0111`
  * FRAME creation lengths 2 to 4

## Departures from the specification and choices made here

* **Grab equation.** It was printed without the inversion of BUSY_IN, but
  the worked examples need the inverted form, which is used here.
* **FRAME length.** The equations give a created FRAME of *m* bits; the
  prose and timing diagram give *m*+1. *m*+1 is built.
* **Request truth table.** The table swaps the set and reset columns
  relative to the prose. The prose is followed: `bbs` sets, `bbr` resets.
* **BUSY BIT node latency.** It is 5 cycles, the test-chip budget. A
  planning estimate elsewhere asks for 4, to match the data path.
* **Clock edges.** The request register was described as loading on the
  falling edge. All registers here use the rising edge, except the falling-edge
  halves of the DDR receivers and of `phase_sync`.
* **Multi-lane layout.** Four lanes of 16 bits share one FRAME.
  `bbi[5:4]` picks the lane, and lane 0 sets the created FRAME's length.
  The specification lists four BUSY BIT lines and 6-bit indices but not
  this arrangement.
* **Line code.** A transition code was chosen for the unspecified AC-coupling
  code. The test chips also accepted unencoded input; this decoder does not.
* **Input inversion.** `in_inv` acts on the decoded bits, and the top ties
  it off.
* **Switch priority.** Enabling several ports on one path is resolved by
  chain order, D last. The specification does not say it is forbidden.
* **Loop-back latches.** Their addressing under `sll` (`eioo[0]`) and the
  `dp_val` data line are this design's own.
* **Grab register set / clear.** `busy_lane` and `busy_bit_unit` have
  `grab_set` / `grab_clr` inputs, as the test chip had. The top ties them off;
  its `rst` clears the grab registers.
* **Polarities.** `mic` is active high, as in the host list; the test chip's
  `MS+` was active low. `gstat` and `giro` are 1 for "grabbed".
* **Analog parts.** Delay elements, duty-cycle control, LVDS receivers and
  drivers, terminations and the clock tree are not modelled.
