# Dual priority buffered delta-2 switch fabric

This is the RTL of a packet switch for two traffic classes, high and low priority, whose
multistage interconnection network (MIN) keeps the two classes apart inside every switching
element. Usually a switch handles priority only at its inputs: two queues per input port
and a single priority fabric behind them. Then a high priority packet that is already inside
the fabric still waits behind low priority packets that block links and buffers. In this
design every buffer of every 2×2 switching element (SE) has one queue per class, and high
priority packets win every contention. As a result:

* high priority traffic sees exactly the network it would see if no low priority traffic
  existed. Its throughput and also its delay, down to the cycle of every packet, do not
  depend on the low priority load;
* low priority traffic uses every link that high priority traffic leaves idle. This includes
  links whose high priority packet cannot move because the next stage is full. The total
  throughput of the fabric therefore goes up when both classes are present. For a 64×64
  network at full load it rises from 0.39 to 0.54 packets per output per cycle (measured on
  this RTL, see below);
* under a hot spot, a high priority source gets the bandwidth it asks for rather than a 1/N
  share.

## Structure

```
dp_system                   N x N switch (top)
 |- dp_input_port  x N      high and low priority input FIFO, strict priority admission
 |   `- pkt_fifo   x 2
 `- dp_min                  N x N delta-2 network, N = 2**N_STAGES
     |- dp_se      x N/2 per stage, N_STAGES stages
     `- arb_lfsr   x one per SE (random tie-breaking)
min_pkg                     prio_e class type, link permutation and routing functions
```

Default size: `N_STAGES = 6`, which gives a 64×64 switch with 6 stages of 32 SEs (192 SEs in
all), 16-bit payload and 16-packet input FIFOs.

## The dual priority switching element (`dp_se`)

This is the heart of the design and the part that takes most care to read.

Each of the two input links ends in a buffer with two one-packet queues, `hq` (high) and
`lq` (low). An arriving packet goes to the queue of its class. A 2×2 non-blocking matrix
connects the four queues to the two output links. The routing bit of the packet in a queue
(bit `SEL_BIT` of the packet word) selects its output.

Each output link carries at most one packet per cycle. Every cycle, each output does this:

1. It looks at the high priority queues whose packet heads for this output. If there are
   two, one random bit picks the winner. The winner is sent if the downstream high priority
   queue accepts (`out_ready_h`).
2. Only if no high priority packet is sent on this output, it does the same for the low
   priority queues, using `out_ready_l`.

Three consequences follow, and the testbenches check each of them:

* **Low priority bypass.** A high priority packet that is blocked downstream does not hold
  its output. A low priority packet from either input may use that output in the same
  cycle.
* **Dual send.** One input buffer may send two packets in one cycle: its high priority packet
  on one output and its low priority packet on the other. The other buffer then sends
  nothing, because both outputs are in use.
* **Independent classes.** Nothing that happens to low priority packets affects which high
  priority packet moves. The random bits for high and low priority ties are separate.

**Acceptance.** A queue accepts a new packet when it is empty or when its packet leaves in
the same cycle:

```
in_ready_h[i] = !hq_valid[i] | (high packet of input i sent this cycle)
in_ready_l[i] = !lq_valid[i] | (low  packet of input i sent this cycle)
```

So a stream of packets moves one stage per cycle without bubbles. The acceptance outputs
depend combinationally on `out_ready_*` and on `rnd`, never on `in_valid`.

## Flow control across the network

The network runs a two-phase cycle. First the acceptance information flows from the last
stage back to the first. Then the packets move. In RTL this is a combinational chain: the
last stage sees permanent acceptance, because network outputs are never blocked. The
`in_ready_*` signals of stage k are the `out_ready_*` signals of stage k-1, through the link
permutation. All packets move on the clock edge. Nothing is dropped inside the network.

Cost: the critical path runs from the last stage to the first input port through every
stage, so it grows linearly with `N_STAGES`. A faster implementation would have to register
the acceptance signals. That changes the acceptance rule, so this design does not do it.

`out_valid` on an SE output means "a packet is transferred on this link in this cycle". It
is only raised when the matching ready is high, so the receiver must take the packet.
Assertions in `dp_se` check both sides of this rule.

## Topology and routing (`dp_min`, `min_pkg`)

Links of a stage are numbered `l = 2*j + p`, where j is the SE and p its port. Output link
`l` of stage s (counted 1..n) feeds input link `l` of stage s+1, with bit 0 and bit `n-s`
of `l` exchanged (`min_pkg::next_link`). For the 8×8 network this pairs SE j with SE j+2
between stages 1 and 2, and SE j with SE j+1 between stages 2 and 3. Stage s steers on
destination bit `n-s`, most significant bit first (`min_pkg::route_bit`). Every input then
has exactly one path to every output, and a packet leaves on the network output equal to
its address.

Same-priority conflicts are resolved at random. Each SE has a 16-bit maximal-length LFSR
(`arb_lfsr`, x^16+x^14+x^13+x^11+1) that advances four steps per cycle and supplies four
fresh bits: one per output for each class. The seeds come from the `SEED` parameter and the
SE position (`min_pkg::se_seed`).

## Input ports (`dp_input_port`, `pkt_fifo`)

Each system input takes at most one packet per cycle and stores it in the FIFO of its
class. Each cycle the port offers one packet to the network:

* the head of the high priority FIFO, if the network input accepts high priority packets;
* otherwise the head of the low priority FIFO, if the network input accepts low priority
  packets. "Otherwise" also covers a high priority head that cannot enter.

The FIFOs are show-ahead circular buffers of `FIFO_DEPTH` packets. An arrival whose FIFO is
full is refused (`in_ready` low). A source that must not lose packets holds the packet until
`in_ready` is high.

## Interfaces and timing

`dp_system` ports (N = 2**N_STAGES, arrays indexed by input or output number):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset that empties all queues and FIFOs and reloads the LFSRs |
| `in_valid[i]`, `in_prio[i]`, `in_dest[i]`, `in_data[i]` | in | 1, `prio_e`, N_STAGES, DATA_W | packet arriving at input i |
| `in_ready[i]` | out | 1 | the FIFO of the offered class has room (combinational in `in_prio`) |
| `out_valid[o]`, `out_prio[o]`, `out_dest[o]`, `out_data[o]` | out | 1, `prio_e`, N_STAGES, DATA_W | packet leaving output o in this cycle; `out_dest[o] == o` |

`prio_e` is `PRIO_HIGH = 1`, `PRIO_LOW = 0`. Outputs cannot be stalled.

Latency with no contention: a packet that arrives at edge t leaves in the cycle that ends at
edge t + 1 + N_STAGES. It spends one cycle in the input FIFO and one cycle per stage, so the
default size takes 7 cycles. Each link and each queue carries one packet per cycle.

Parameters of `dp_system`: `N_STAGES` (6), `DATA_W` (16), `FIFO_DEPTH` (16) and `SEED`
(16'hACE1).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_arb_lfsr` | every output bit against a software LFSR model; full period 65535; bits balanced |
| `tb_pkt_fifo` | head, full, empty and count against a queue model, depth 5 (pointer wrap), random traffic |
| `tb_dp_input_port` | admission decision and arrival acceptance against a model, every cycle; requires high-first admission, low priority admitted past a blocked high priority head, and full FIFOs to occur |
| `tb_dp_se` | cycle-accurate model of the four queues: every output, class, packet and acceptance signal, every cycle, for 20000 random cycles; requires conflicts of both classes, low priority bypass, dual send and low priority held back by high priority |
| `tb_dp_min` | 16×16 network with a scoreboard: each packet delivered once, to its address, class unchanged, in order per source/class/destination; isolated packets take exactly N_STAGES cycles; hot spot (below); uniform mixed traffic; SE mechanisms counted |
| `tb_dp_system` | the default 64×64 system end to end, described below |
| `tb_dp_throughput` | saturation throughput at full uniform load for several high priority shares, one load below saturation, and a hot-spot load sweep; 64×64 as written, `NS` selects the size |

`tb_dp_system` runs at the default parameters:

* isolated packets take exactly `N_STAGES + 1` cycles;
* hot spot: all 64 inputs send to output 0 at load 0.5, input 0 with high priority and the
  others with low priority. Output 0 carries about 1500 high and 1500 low priority packets
  in 3000 cycles, so high priority gets its full 0.5. With a single priority fabric it would
  get 1/64 of the output;
* uniform traffic with high priority load 0.1 is run twice from reset with identical high
  priority arrivals: once alone, and once with low priority load 0.5 added. The added load
  pushes the total load above saturation. Every one of the roughly 16000 high priority
  packets must have the same delay in both runs, and they do;
* every accepted packet is delivered once, to the right output, with its class.

Measured saturation throughput (packets per output per cycle, every input offered one packet
per cycle):

| network | high priority only | G_h = 0.5 | G_h = 0.3 | G_h = 0.1 |
|---|---|---|---|---|
| 64×64 | 0.387 | 0.541 (high 0.389) | 0.496 | 0.417 (high 0.100) |

Hot spot sweep (every input sends to output 0 at the same load, input 0 with high priority):
output 0 carries 0.246, 0.488, 0.764 and 1.000 high priority packets per cycle at loads 0.25,
0.5, 0.75 and 1, and low priority traffic fills the rest of every cycle.

Below saturation both classes are carried in full: with G_h = 0.1 and G_l = 0.2 the
measured throughput is 0.100 high and 0.201 low priority.

The single-class value agrees with the roughly 0.39 expected for a 64×64 single buffered
delta-2 network. With two classes, the high priority throughput stays at the single-class
saturation value, and low priority fills in up to about 40% more. Setting `NS = 10` in
`tb_dp_throughput` selects the 1024×1024 network (5120 SEs). Its generated C++ model is
very large: with a single compile job it did not finish building within 20 minutes, so use a
parallel build (`verilator -j 0 ...`). The largest network simulated for this release is
64×64. The pass bands that the testbench uses for 1024×1024 have not been run.


## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dp_system \
  rtl/min_pkg.sv rtl/arb_lfsr.sv rtl/dp_se.sv rtl/dp_min.sv rtl/pkt_fifo.sv \
  rtl/dp_input_port.sv rtl/dp_system.sv tb/tb_dp_system.sv
./obj_dir/Vtb_dp_system
```

For other testbenches, change the top module and the testbench file. A testbench only needs
the RTL files below its block. Building the 64×64 system testbench takes about two minutes,
because it monitors all 192 SEs through hierarchical references, and it simulates in under
a second. `tb_dp_system` and `tb_dp_min` read internal signals of the SEs and input ports
(`hq_valid`, `h_leave`, `l_go`, `h_send`, ...) to count how often each mechanism occurs.
Keep those names if you change the RTL, or adjust the monitors.

To change the size, set `N_STAGES` on `dp_system`. Any value of 1 or more works. The payload
width, the FIFO depth and the random seed are free.

## Departures and design choices

* **Finite input FIFOs.** The architecture assumes unbounded input FIFOs, so no packet is
  ever lost. Here each FIFO holds `FIFO_DEPTH = 16` packets, and an arrival to a full FIFO is
  refused.
* **Link wiring.** The wiring was generalised from an unlabelled 8×8 drawing. Which output of
  an SE goes straight and which crosses cannot be read from it, so port 0 goes straight. Any
  other delta wiring gives the same performance, but it routes on a different bit order.
* **Random source.** Conflicts only have to be resolved at random. The LFSR, its polynomial
  and the seed derivation are choices of this design.
* **Packet format.** The packet word `{dest, data}`, the 16-bit payload, the class signal
  beside the packet and the synchronous reset are not specified by the architecture.
* **Input FIFO latency.** A packet always spends at least one cycle in its input FIFO.
* **Scope.** Not included: the single priority fabric that serves as the baseline for
  comparison, and the analytical Markov performance model, which is not hardware. Delay and
  throughput statistics are gathered by the testbenches, not by the RTL.
