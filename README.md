# BW switch: a backtracking, wave-pipelined circuit switch for networks-on-chip

A network-on-chip that must give *hard* throughput guarantees is easiest to
build with circuit switching: once an end-to-end path is reserved, data flows
at the full link rate with no queues, no jitter and no loss. The two hard parts
are setting such paths up at run time without a central controller and
without deadlock, and moving data through each switch fast enough that a long
circuit behaves almost like a dedicated wire.

The BW (backtracking wave-pipeline) switch addresses both:

* **Backtracking path set-up.** A *probe* carrying the destination address is
  sent ahead of the data. At each switch it takes a *profitable* link (one that
  brings it closer to the destination on the torus). If every profitable link is
  busy, or the next switch reports that the path beyond it is blocked, the probe
  does not wait: it *backtracks* one hop and the previous switch tries another
  profitable link. This is a depth-first search over minimal paths. It needs no
  extra control network, and since nothing ever waits for a resource held by
  another probe, it cannot deadlock.
* **Wave-pipelined data path.** Once the circuit is acknowledged, data travels
  together with its *source clock*. Inside the switch, data and clock go through
  a small transmitter stage, a purely combinational mux crossbar and a receiver
  stage, all timed by that travelling clock. The switch's own clock never
  touches the data.

This repository holds synthesizable SystemVerilog for one five-port switch
(16 data bits per link) and testbenches for each block, for the whole switch
and for a 4x4 torus built from it.

## Ports, links and the handshake

Each switch has five bidirectional ports: **0 = IP** (the local core, through
its wrapper), **1 = North, 2 = East, 3 = South, 4 = West**. East of switch A
connects to West of the switch on its right, North to South of the one above,
with wrap-around at the edges (torus).

Per port and per direction there are three signal groups:

| signal | width | meaning |
|---|---|---|
| `data_in[p]` / `data_out[p]` | 17 | bits 16:1 data, bit 0 the source clock that travels with them |
| `req_in[p]` / `req_out[p]` | 1 | 1 = circuit requested or held, 0 = idle / release |
| `ans_in[p]` / `ans_out[p]` | 2 | answer going back against the request |

Answer codes (`bw_pkg::ans_e`):

| code | name | meaning |
|---|---|---|
| `00` | idle | nothing to report; the probe is still advancing |
| `01` | ack | circuit complete, destination ready for data |
| `10` | blocked | no path from here: the probe must backtrack |
| `11` | busy | destination busy or not ready (may also appear during transmission) |

A communication has three phases:

1. **Set-up.** The source wrapper puts the probe header on the data lines
   (destination x in data bits [1:0], y in [3:2] for the default 4x4 torus, i.e.
   link bits [2:1] and [4:3]), keeps its source clock running and raises `req`.
   It waits for a non-idle answer.
2. **Transmission.** On `01` it streams words, one per source-clock period,
   and keeps `req` high. A `11` during this phase means "receiver not ready";
   the circuit stays up, and `01` means ready again.
3. **Release.** The source drops `req`. Every switch on the path frees its
   output and drops its own `req_out`, one clock per hop. On `10` or `11`
   during set-up, the source also drops `req` and may retry later.

## How the path set-up works inside a switch

This is the heart of the design. It is spread over three kinds of block
(`bw_ctrl_in`, `bw_arbiter`, `bw_ctrl_out`), which talk over the buses named in
the block diagram below.

```
            request bus             control bus
 req_in ─► bw_ctrl_in ×5 ───────► bw_arbiter ───────► bw_ctrl_out ×5 ─► req_out
 ans_in ◄─            ◄─────────            ◄───────                ◄─ ans_out
            grant & answer bus      monitor bus
                                        │ crossbar control bus
 data_in ─► bw_tx_circuit ×5 ─► bw_crossbar (5 muxes) ─► bw_rx_circuit ×5 ─► data_out
```

**Input controller (`bw_ctrl_in`), one per port.** It has four states:

* `IDLE`: when `req_in` rises, it latches the destination from the header
  and clears its *tried* mask.
* `ROUTE`: it requests the set of profitable outputs, minus the tried ones
  and minus its own port (no U-turns).
* `FWD`: it holds one output and copies that output's answer upstream. A
  downstream `10` releases the output, adds it to *tried*, and returns to
  `ROUTE`. This is the backtrack.
* `FAIL`: it answers `10` upstream until `req_in` falls. It enters `FAIL`
  when the arbiter finds no available output in the mask, either because all
  profitable outputs are busy or because all have already failed.

Profitable outputs are those that shorten the wrap-around distance:

* East if `(dst_x - my_x) mod NX` is at most `NX/2`.
* West if it is at least `NX/2`. Both are profitable exactly half-way round.
* North and South follow the same rule with y and `NY`.
* At the destination itself, only the IP port is profitable.

**Arbiter (`bw_arbiter`).** Grants are decided within one cycle:

* It visits the requesting inputs in round-robin order.
* Each input gets the lowest-numbered output in its mask that is not held
  and that its output controller reports as free.
* An input whose mask contains no such output gets `blocked` in the same
  cycle.
* An input that only lost a race to another input in that cycle simply asks
  again in the next one.

The arbiter keeps an owner table for the outputs. That table drives the
crossbar's select and enable lines, and it routes each output's answer back
to the input that holds it.

**Output controller (`bw_ctrl_out`).** After being allocated, it waits
`HDR_DELAY` clocks before raising `req_out`. This gives the header time to
pass the transmitter, crossbar and receiver stages, which are timed by the
source clock, not by `clk`. On release it drops `req_out`. It then reports
the port as free only once the neighbour's answer has returned to `00`, so a
later probe never reads a stale answer.

**Timing at default parameters** (one `clk` per registered step):

* `req_out` of the next hop rises `HDR_DELAY + 2` = 6 clocks after the first
  clock edge that sees `req_in`.
* An answer travels back through a switch in 2 clocks. It is registered once
  in the output controller and once in the input controller.
* A release travels forward in 1 clock per switch.
* A backtrack takes 2 clocks: the blocked answer is seen, the output is
  released and the next output is requested. Allocating the new output takes
  1 more clock.

## The data path: transmitter, crossbar, receiver

* `bw_tx_circuit`: one per input. Its flip-flops are clocked by the rising
  edge of the incoming source clock (link bit 0). It passes that clock on
  next to the data.
* `bw_crossbar`: one 4-to-1 mux per output, fed by the four other ports. It
  carries all 17 wires of the link, clock included, so data and clock see
  nearly the same delay. An output that is not connected drives zeros.
* `bw_rx_circuit`: one per output. Its flip-flops are clocked by the
  *falling* edge of the clock that came through the crossbar, which realigns
  the data to that clock before it leaves the switch.

A word that the source launches on a falling edge of its clock is captured
by the transmitter on the next rising edge. The receiver then captures it on
the next falling edge. The data therefore crosses a switch in half a
source-clock period, and leaves it one period after it entered, center-aligned
to the clock as it was on the way in. Nothing in this path depends on `clk`,
and the crossbar delay only needs to match between data and clock.

Constraints that the user must respect:

* The source clock must run, with the header on the data lines, during
  set-up.
* `HDR_DELAY` clocks must cover at least one full source-clock period, so
  that the header is stable at the next switch when its request arrives. At
  the default of 4 clocks, a source clock period of up to 3 `clk` periods is
  safe.
* After its last word, the source should keep its clock running for about
  one source-clock period per hop before dropping `req`. The release travels
  faster (one `clk` per hop) than the data.

## Files

| file | contents |
|---|---|
| `rtl/bw_pkg.sv` | port and answer enums, the profitable-direction function |
| `rtl/bw_switch.sv` | top level: 5 × (ctrl_in, ctrl_out, tx, rx), arbiter, crossbar |
| `rtl/bw_ctrl_in.sv` | input-port controller (probe routing, backtracking) |
| `rtl/bw_ctrl_out.sv` | output-port controller (request timing, drain) |
| `rtl/bw_arbiter.sv` | output allocation, owner table, crossbar control |
| `rtl/bw_crossbar.sv` | mux crossbar |
| `rtl/bw_tx_circuit.sv`, `rtl/bw_rx_circuit.sv` | internal transceiver stages |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/tb_bw_switch.sv` | whole switch at default parameters, scripted neighbours |
| `tb/tb_bw_torus.sv`, `tb/bw_wrapper_model.sv` | 4x4 torus with behavioural IP wrappers |

Parameters of `bw_switch`:

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 16 | data bits per link (the link adds a clock wire) |
| `NX`, `NY` | 4, 4 | torus size; sets the address widths |
| `HDR_DELAY` | 4 | clocks from output allocation to `req_out` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
A watchdog counts a failure if a testbench hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bw_pkg.sv tb/tb_bw_switch.sv --top-module tb_bw_switch -o sim
./obj_dir/sim
```

Replace `tb_bw_switch` with any other `tb_*` module.

* `tb_bw_switch`: runs one switch at its default parameters. It drives
  these cases and counts each one:
  * a probe that backtracks from a blocked East link and is acknowledged on
    West;
  * blocking caused by a link that is already held;
  * a blocked answer sent upstream;
  * a busy destination;
  * delivery to the IP port;
  * two simultaneous circuits;
  * "not ready" during transmission;
  * release and reuse of an output.

  It checks every data word and the latencies given above.
* `tb_bw_torus`: builds a 4x4 torus of switches. Each of the 16 nodes sends
  20 messages of 16 words to random destinations. The destinations sometimes
  answer busy, and the sources retry after a random back-off. The test checks
  that all 320 messages arrive complete and in order, and that the run ends
  without deadlock. A typical run shows about a thousand backtracks inside the
  network.

## What follows the published design and what is this implementation's own

Taken from the published BW switch:

* five bidirectional ports and their numbering;
* the 1-bit request and 2-bit answer, with the codes above;
* probe set-up that backtracks instead of waiting, over profitable links only;
* a torus topology;
* the split into per-port input and output controllers, an arbiter and a mux
  crossbar, with the buses named as above;
* source-clocked transmitter and receiver stages around a crossbar that
  forwards data together with its clock;
* 16-bit data.

Chosen here, because the published description leaves them open:

* the header layout, and carrying the header on the data lines;
* the torus size;
* the controllers' state machines and the tried-port mask;
* the arbitration policy;
* `HDR_DELAY` and the drain phase;
* the clock edges used in the Tx stage (rising) and the Rx stage (falling);
* the all-zero idle value of the crossbar;
* registering the answers (one clock per hop);
* an asynchronous active-low reset.

The control logic assumes that all switches share one `clk`. A
mesochronous or asynchronous network would need synchronizers on `req` and
`ans`, and those are not included.

## Not included

* The external link transceivers. They are mixed-signal circuits designed
  separately, and meet the switch at `data_in`/`data_out`.
* The IP-side network wrapper. Only its handshake behaviour is defined, and
  `tb/bw_wrapper_model.sv` models that behaviour for simulation.
* The clock buffers that match delays along the clock path. In RTL they are
  plain wires, and their delay matching is a physical-design task.

Lint notes:

* Verilator reports `SYNCASYNCNET` on `rst_n`, because the assertions use it
  synchronously while the flip-flops use it as an asynchronous reset.
* It reports the same on `data_in`, because bit 0 of each link is a clock
  while the other bits are data. Both are intended.
