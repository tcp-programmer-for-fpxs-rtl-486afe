# Cell arbitrator for a TCP-driven FPGA programmer

An FPGA on a network port extender can be reconfigured by control cells
that carry its bit file. This design sends those control cells over an
ordinary TCP connection. A programmer circuit on one FPGA sits in the path of
the TCP flow. Protocol wrappers and a TCP splitter take the flow apart into
two flows:

* the **outgoing TCP flow** (ATM VCI 50). It goes on unchanged, apart from
  the TTL and checksums, towards the TCP server or the next programmer in a
  chain.
* the **client flow** (VCI 34). These are the payload bytes of the TCP
  stream. They are already formatted as 14-word ATM control cells addressed
  to the network interface of the device being reprogrammed.

Both flows must leave through the single RAD-switch transmit port. The
network interface downstream cannot accept cells back to back. This
repository holds the RTL of the **arbitrator** that joins the two flows:

* It buffers each flow in its own 32 x 4096 FIFO.
* It sends whole cells, and always sends a TCP cell first if one is ready.
* It waits a fixed number of idle clocks after every cell.
* It pushes back on the client flow when the client FIFO nears full.

The wrappers, the splitter and the network interface are existing
components. They are not part of this RTL. Their arbitrator-side signals are
the ports of the top module.

```
               tcpmod_sod, tcpmod_data ──► tcp_fsm ──► gen_fifo (TCP_GEN) ──┐
  TCP splitter                                                              ├─► read_selector ──► d_sw_xmit, soc_sw_xmit
               appl_tde, appl_data ─────► cc_fsm  ──► gen_fifo (CTRL_GEN) ─┘         │
               ◄──────────────────────────────────────── tca_out_app ◄──────────────┘
```

## Words and cells

The port carries 32-bit words, one per clock. A cell is 14 words:

* a header word holding the VCI (for example `0x00000220` for VCI 0x22 = 34);
* a HEC word;
* twelve payload words, which are 48 bytes.

`tcp_prog_pkg` holds the width, the cell length (`CELL_WORDS = 14`) and the
state types.

The two flows are framed differently:

* The **TCP flow** marks the first word of each cell with `tcpmod_sod`, high
  for one clock. The 14 words must arrive on consecutive clocks.
* The **client flow** has no cell marker. `appl_tde` is high for every valid
  word, and a burst may be any length. Cell boundaries are known only by
  counting words from reset. For this reason the client flow must only ever
  carry whole 14-word cells in total.

## Write side: `tcp_fsm` and `cc_fsm`

Each controller is a two-state machine, START and ACTIVE, that writes its
flow into its FIFO. Outputs are registered, so a word reaches the FIFO one
clock after it is presented.

* **`tcp_fsm`** leaves START on `tcpmod_sod`. It writes the first word and
  counts words. When the count reaches 14 it looks at `tcpmod_sod` again:
  * if high, a back-to-back cell is starting, and the controller stays ACTIVE
    with the count restarted;
  * if low, it returns to START.

  Words between cells are never written.
* **`cc_fsm`** is ACTIVE while `appl_tde` is high and writes every word in
  that time. It keeps no count.

Both controllers hold their `fifo_init` output high during reset and for one
clock after it. This clears the FIFO.

## Buffers: `gen_fifo`

`gen_fifo` is a single-clock FIFO with parameters `WIDTH = 32` and
`DEPTH = 4096`.

* Reads are registered: `dout` shows the word one clock after `re`.
* `count` gives the fill level. It changes one clock after the write or read
  that changes it.
* The flags `empty`, `almost_empty`, `full` and `almost_full` are also
  provided.
* A write to a full FIFO is dropped, and a read of an empty FIFO is ignored.
* `init` clears the FIFO synchronously.

The storage array has no reset, so it can map onto block RAM.

## Read side: `read_selector`

This is the part that decides the timing of the output. It has two states:

* **START** is a sleep state. A delay counter runs for `START_COUNT` clocks
  (150 by default) after each cell. Once the delay has run out, the selector
  starts a cell as soon as a FIFO holds a complete cell (at least 14 words).
  * If the TCP FIFO holds one, it is chosen. This happens even when the client
    FIFO has been waiting longer.
  * Otherwise the client FIFO is chosen.

  The choice is stored in a one-bit flag: 0 for TCP, 1 for client.
* **ACTIVE** raises the read enable of the chosen FIFO for exactly 14 clocks,
  then returns to START with the delay counter cleared.

Output timing:

| event | clock |
|---|---|
| decision in START (cell available, delay over) | d |
| first read enable | d+1 |
| first word on `d_sw_xmit`, `soc_sw_xmit` high for this clock only | d+3 |
| last word of the cell | d+16 |
| next possible decision | d+14+`START_COUNT` |

* When cells are waiting, a new cell starts every 14 + `START_COUNT` clocks,
  which is 164 clocks at the defaults.
* Outside cells, `d_sw_xmit` is zero.
* After reset the first cell also waits `START_COUNT` clocks.

The gap protects the input buffer of the network interface downstream. Change
`START_COUNT` to trade throughput against that buffer.

**Back-pressure.** `tca_out_app` ("transmit cell available") is registered.
It is low while the client FIFO holds `TCA_THRESHOLD` words or more (3000 by
default), and goes high again as soon as the level falls below that. There
is no hysteresis. The upstream is expected to stop all traffic while it is
low. The TCP FIFO then empties first, because TCP has priority, and after
that the client FIFO drains. Nothing limits the TCP flow itself. The TCP
FIFO relies on the TCP flow needing less than the output capacity.

The selector contains these assertions:

* a read never finds its FIFO empty;
* `soc_sw_xmit` is never high for two clocks in a row.

## Throughput

At the defaults the port carries at most one cell every 164 clocks. At the
71.777 MHz clock this logic was reported to reach, that is 10.9 cells in
25 µs.

A client that sends 400 bytes of payload every 25 µs produces about
17.1 cells in that time:

* 7.1 client control cells, from the 400 bytes;
* 10 cells of the forwarded TCP frame: 448 bytes with the IP and TCP headers
  and the AAL5 trailer.

So the client FIFO grows until TCA throttles the sender. In simulation, over
150 such packets, the delivered client rate averaged 279 bytes
per 25 µs, counting the unthrottled start. Every word arrived intact and in order. The TCP flow on its own
(10 cells per 25 µs) fits within the output capacity.

## Choices made in this RTL

The behaviour described above (two-state machines, 14-word cells, TCP
priority, 150-clock gap, 3000-word TCA threshold) is the intended
architecture. The following are decisions of this implementation:

* **Full cell means 14 words or more.** A new cell is started when a FIFO
  holds at least 14 words. A stricter "more than 14" rule would strand the
  last cell of a transfer.
* **Client cells are not blocked by a partial TCP cell.** The client FIFO is
  served whenever the TCP FIFO lacks a complete cell, even if the TCP FIFO is
  not empty. So a TCP cell that is still being written does not hold back a
  waiting client cell.
* **Resets.** The reset is asynchronous and active low (`rad_reset_l`). The
  FIFO init pulse lasts one clock after reset.
* **Latencies.** All registered latencies given above, and the zero idle
  output, are this design's own.
* **Unused end-of-frame input.** `appl_eof` is a port of the interface, but
  the arbitrator's behaviour does not use it.
* **FIFOs.** The FIFOs keep one fill count, because both sides share one
  clock. Overflowing writes are dropped.

## Not included

The following are outside this RTL:

* the control-cell processor, which passes traffic through unused;
* the cell, frame and IP protocol wrappers;
* the TCP splitter;
* the network interface device and its programmer logic;
* the configuration SRAM;
* the switch.

The ports of `arbitrator` are the signals exchanged with the splitter and the
network interface.

## Files

| file | contents |
|---|---|
| `rtl/tcp_prog_pkg.sv` | word type, `CELL_WORDS`, state and flow enums |
| `rtl/gen_fifo.sv` | synchronous FIFO |
| `rtl/tcp_fsm.sv` | TCP-flow write controller |
| `rtl/cc_fsm.sv` | client-flow write controller |
| `rtl/read_selector.sv` | cell scheduler and TCA |
| `rtl/arbitrator.sv` | top: two controllers, two FIFOs, selector |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_rate_workload.sv` | the 400-bytes-per-25-µs transfer at default sizes |

Top parameters, with their defaults:

* `FIFO_DEPTH` = 4096
* `START_COUNT` = 150
* `TCA_THRESHOLD` = 3000

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself after
a watchdog limit. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/tcp_prog_pkg.sv rtl/gen_fifo.sv rtl/tcp_fsm.sv rtl/cc_fsm.sv \
  rtl/read_selector.sv rtl/arbitrator.sv tb/tb_arbitrator.sv \
  --top-module tb_arbitrator
./obj_dir/Vtb_arbitrator
```

Each testbench checks different things:

* `tb_arbitrator` runs at the default sizes. It checks:
  * word order in both flows;
  * TCP priority;
  * the exact cell spacing;
  * the exact TCA level, worked out from the words sent.

  It also requires each of these to occur at least once: back-to-back TCP
  cells, TCP chosen over a waiting client cell, the gap enforced, and TCA
  dropped and raised again.
* `tb_read_selector` uses small sizes (`START_COUNT = 10`,
  `TCA_THRESHOLD = 40`) and behavioural FIFOs.
* `tb_gen_fifo` compares the FIFO against a queue model at a depth of 16.
* `tb_tcp_fsm` and `tb_cc_fsm` check each written word and its one-clock
  latency.

All of them finish in seconds.
