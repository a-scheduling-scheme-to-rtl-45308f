# MQAS router with Iterative Probabilistic Scheduling

An input-queued router cannot send its packets straight through. When two inputs hold
packets for the same output, only one can go in a given time slot. If every input keeps
a single FIFO, a blocked packet at the head also holds up every packet behind it, even
packets for idle outputs. This is head-of-line blocking, and it limits a large switch
with uniform traffic to about 58.6 % throughput. Output queuing avoids the problem, but
then each output memory must accept packets N times faster than the line rate.

This design combines the two in a *multistage queuing and scheduling* (MQAS) router:

* **Stage 1, virtual output queues (VOQs).** Every input port keeps a separate queue
  for each output port, giving N x N queues in all. A packet waits only behind packets
  going to the same output.
* **Iterative Probabilistic Scheduling (IPS).** In each time slot a scheduler pairs
  inputs with outputs so that no input sends twice and no output receives twice. For
  each output it gives the slot to the contending packet with the largest weight.
* **Switching fabric.** An N x N crossbar moves all the scheduled packets at the same
  time.
* **Stage 2, output queues.** Each output port has a plain FIFO that feeds its output
  link. Contention was already resolved at the inputs, so at most one packet per slot
  enters an output queue. No speed-up is needed.

The RTL is synthesizable SystemVerilog. The top module is `mqas_router`, a 16 x 16 router
by default.

## The IPS weight and probability

Each VOQ that is not empty requests its output. The packet at its head gets the weight

    WP(i,j) = 2 * eBW(i,j) + 1 * eQ(i,j)

* `eBW` is the estimated bandwidth of the packet: its size in bytes.
* `eQ` is its estimated waiting time: the current time-slot number minus the slot in
  which VOQ (i,j) last sent a packet.

Large packets get priority, but the weight of every waiting queue grows by one each
slot. A queue of small packets therefore wins in the end, so nothing starves. The two
terms are added as they are, bytes plus slots, with no scaling. With sizes of 40 to 1500
bytes, the size term dominates until a queue has waited for up to about 3000 slots.

The transmission probability of a contender for output j is its share of the total
weight:

    P(i,j) = WP(i,j) / sum over contending inputs k of WP(k,j)

All contenders of one output share the same denominator. The packet with the highest
probability is therefore the packet with the highest weight. The hardware selects on the
weight directly, with a comparator tree. It needs no divider for the selection. The
probability is still computed for the winner, by an 8-bit restoring long division
(`ips_prob`). It travels with the packet as part of its *HBWP tag* ("highest bandwidth
packet"). The tag is an unsigned Q1.8 value, in which 256 means 1.0.

## One time slot, cycle by cycle (`ips_scheduler`)

The scheduler is iterative: it handles **one output port per clock cycle**.

1. Contenders for output j are the inputs that request j and are not yet matched in this
   slot.
2. An output is *active* when all of the following hold:
   * it has not been visited in this slot;
   * its output queue is not full;
   * it has at least one contender.
3. In each cycle the scheduler takes the first active output, searching from a rotating
   start pointer. For that output it does the following in one cycle:
   * sums the contenders' weights;
   * picks the contender with the largest weight (the lowest input number wins a tie);
   * computes that contender's probability;
   * records the match and the probability;
   * marks the input as matched and the output as visited.
4. When no output is active, `slot_end` is high for one cycle. This is the **transfer
   cycle**. At its clock edge the following happen together:
   * each granted input pops its head packet;
   * the crossbar carries the packet to its output queue, with the HBWP tag added;
   * the VOQ's last-service time is set to the current slot;
   * the scheduler clears the matching, advances the slot counter `slot_now` and moves
     the start pointer on by one output.

A slot therefore lasts *grants + 1* cycles: at least 1 cycle, and N + 1 cycles when every
output is matched. This is the O(N) running time of IPS. An idle router still counts
slots, one per clock, so the waiting time keeps growing.

The result is a *maximal* matching. An output is left unmatched only when all the inputs
that request it were already taken by outputs visited earlier. The rotating start pointer
spreads that disadvantage over all outputs.

The request and weight inputs must hold still during a slot. Queues change only in the
transfer cycle, so the only change mid-slot is a new arrival into an empty VOQ. The
scheduler may then use that packet, and it is still there at the transfer.

## Blocks

| module | role |
|---|---|
| `mqas_pkg` | packet descriptor `pkt_t` (id, source, destination, size), tagged packet `tagged_pkt_t` (adds the HBWP flag and the Q1.8 probability), widths, helper functions |
| `mqas_router` | top: N input ports, scheduler, crossbar, N output queues |
| `voq_input_port` | N VOQs of one input, request vector, per-VOQ last-service time, an `ips_weight` per VOQ, pop of the granted head |
| `ips_weight` | `WP = 2*size + (now - last_service)` |
| `ips_prob` | `floor(256*wp/sum)`, or 256 when `wp == sum` |
| `ips_scheduler` | the iterative matching described above, slot counter |
| `crossbar` | one N:1 multiplexer per output, selected by the matching |
| `output_queue` | FIFO to the output link, with a valid/ready handshake and a `full` flag for the scheduler |
| `pkt_fifo` | generic show-ahead FIFO, used by both queue stages |

## Interfaces of `mqas_router`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset. Reset empties all queues and zeroes the slot counter and the last-service times. |
| `in_valid[N]`, `in_pkt[N]` | in | one arriving packet per input per clock. `in_pkt.dst` must already hold the output port; `src` is overwritten with the input number. |
| `in_drop[N]` | out | high in the arrival cycle if the packet was discarded: its VOQ was full, or `dst >= N` |
| `out_valid[N]`, `out_ready[N]`, `out_pkt[N]` | out/in/out | output links. A packet leaves at a clock edge where both valid and ready are high. It stays on `out_pkt` until taken. |
| `slot_end` | out | transfer cycle of the current time slot |
| `slot_now` | out | time-slot counter (32 bits) |

Parameters: `N` = 16 ports, `VOQ_DEPTH` = 8 packets per VOQ, `OQ_DEPTH` = 16 packets per
output queue, and `TIME_W` = 32 bits of slot counter. The descriptor widths are in
`mqas_pkg`: 8-bit port numbers, 11-bit sizes (up to 2047 bytes) and 16-bit ids.

Latency: a packet that arrives in a cycle can be scheduled in the slot that is running,
if its output has not yet been visited. Otherwise it waits for the next slot. After the
transfer edge it appears on the output link one cycle later.

At the default size, coarse synthesis gives about 11.9k word-level cells, 3.3k flip-flop
bits and 93k bits of queue memory. The memory is 256 VOQs of 8 entries each, plus 16
output queues.

## What is specified and what is chosen here

These parts follow the MQAS/IPS scheme:
* the two queuing stages;
* N VOQs per input;
* requests from the non-empty VOQs;
* the weight formula with its factors 2 and 1;
* the waiting time measured from the queue's last service;
* the probability as a share of the summed weights;
* granting the highest probability, at most one input per output;
* the HBWP tag;
* FIFO service at the outputs.

These are choices of this design, where the scheme says nothing:
* **Packets are descriptors.** Payload bytes are not stored or moved. Destination
  lookup, policing, classification, shaping and link-layer framing are left outside the
  router. An arriving packet must already carry its output port.
* **One grant per input per slot.** The scheme grants one input per output. This design
  also stops a matched input from contending at later outputs in the same slot, so the
  crossbar match is conflict-free and each input sends at most one packet per slot.
* **Visit order and tie-break.** Outputs are visited in a rotating order, and equal
  weights go to the lower input number.
* **The sum in the probability** covers only the inputs still contending when the output
  is visited.
* **Timing.** The cycle-level slot structure is this design's own: one cycle per grant,
  then one transfer cycle.
* **Overflow and back-pressure.** A packet for a full VOQ is dropped. An output whose
  queue is full is skipped. Output links use valid/ready.
* **Sizes.** All queue depths and field widths are chosen here. The scheme gives no
  memory sizes. The weight mixes bytes and slots without scaling, exactly as the
  formula is written.
* **Wrap-around.** The waiting time is computed modulo 2^32 slots.
* **The HBWP flag is always 1** on packets that leave the router, because only tagged
  packets are ever transferred. It is kept as an explicit bit of the output format.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ips_weight` | weight against 64-bit integer arithmetic, including counter wrap-around |
| `tb_ips_prob` | Q1.8 probability against integer division; lone contender gives 1.0 |
| `tb_crossbar` | random permutations with idle inputs and unconnected outputs |
| `tb_output_queue` | FIFO order, `full` at DEPTH, link back-pressure |
| `tb_voq_input_port` | requests, weights, drops, head/pop and last-service times, against a queue model |
| `tb_ips_scheduler` | full matching and probabilities against an independent model of IPS; slot length = grants + 1 cycles; N = 5 to test pointer wrap |
| `tb_mqas_router` | default 16 x 16 router, uniform / hot-spot / stalled-output phases with a scoreboard (see below) |
| `tb_mqas_router_load` | latency-utilisation sweep at the default size (see below) |
| `tb_mqas_router_starvation` | starvation bound derived from the weight formula (see below) |

In `tb_mqas_router`, every accepted packet must leave exactly once, on the right output,
in order within its input/output pair. The test also counts seven events and fails if any
of them never happened:
* a VOQ overflow;
* a full output queue being skipped;
* output contention;
* an already-matched input being passed over;
* a smaller packet winning because of its waiting time;
* a probability below 1;
* link back-pressure.

`tb_mqas_router_load` offers independent Bernoulli arrivals with probability U per input
per slot, with uniform destinations. Each output link sends one packet per slot. The
test measures the carried load and the latency in slots at the default size:

| offered U | carried | mean latency (slots) | drops |
|---|---|---|---|
| 0.20 | 0.203 | 1.8 | 0 |
| 0.40 | 0.400 | 1.5 | 0 |
| 0.60 | 0.603 | 2.1 | 0 |
| 0.80 | 0.799 | 4.4 | 0 |
| 0.90 | 0.899 | 10.4 | 62 |
| 0.95 | 0.938 | 18.8 | 364 |

Throughput stays far above the 58.6 % head-of-line limit of a single FIFO per input. The
drops at U >= 0.9 come from the 8-packet VOQs. The longest slot observed was 17 cycles,
which is N + 1.

`tb_mqas_router_starvation` checks the starvation bound. Fifteen inputs keep output 0
saturated with 1500-byte packets, and input 0 sends one 40-byte packet. The fifteen
large-packet queues tie on size, so they take turns, and the winner has waited about 15
slots. Its weight is then 3000 + 15. The small packet's weight is 80 + (slots since its
queue was last served). The formula therefore predicts that the small packet wins after
3015 - 80 = 2935 slots. The simulation shows exactly 2935 slots, with 2934 large packets
sent in between. The test accepts 2935 +- 20.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/mqas_pkg.sv tb/tb_mqas_router.sv --top-module tb_mqas_router
    obj_dir/Vtb_mqas_router

Replace the testbench name to run the others. `--assert` enables the protocol
assertions in the RTL:
* the matching is consistent between the input side and the output side;
* every grant finds a packet;
* no packet is pushed into a full output queue;
* a packet on an output link stays stable until it is taken.

Limits of what was verified:
* The RTL was linted and simulated, and put through a coarse synthesis pass. It was not
  taken through timing closure.
* The comparator tree and the divider in the scheduler are a single combinational stage.
  That stage will limit the clock rate at large N.
