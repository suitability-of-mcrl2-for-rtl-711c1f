# A 2×2 packet switch with collision priority

This is a small packet switch with two inputs and two outputs. Each input
and each output has its own FIFO buffer. A 32-bit packet enters an input
buffer and is moved to the output buffer that its first bit selects. It
then waits there until the outside takes it. The buffers are simple. What
makes the switch interesting is the rule that decides, in every clock cycle,
which of the two head packets may move. The rule has to meet three demands
that pull against each other:

* **Throughput.** A packet that can move must move. When the two inputs
  feed different outputs, both transfer in the same cycle.
* **Priority.** When the two head packets compete for one resource, exactly
  one of them moves. Which one is fixed by a priority rule.
* **One operation per buffer per cycle.** In a cycle, a buffer either takes
  a packet, gives one away, or does nothing.

The switch comes in three variants of increasing difficulty. They share all
the hardware and differ only in the priority rule. `switch_top` holds all
three side by side.

| index | variant | collision on | winner |
|---|---|---|---|
| 0 | Simplified (`SW_SIMPLIFIED`) | same output (C1) | input 0 |
| 1 | Original (`SW_ORIGINAL`) | same output (C1), or both packets interesting (C2) | input 0 |
| 2 | Modified (`SW_MODIFIED`) | C1 or C2 | input 0 if C1 holds; input 1 if only C2 holds |

A packet is *interesting* when its second, third and fourth bits are all
zero. The Original and Modified switches count interesting packets as they
are transferred. The counter can add only one per cycle. That is why two
interesting packets never move in the same cycle, even when they go to
different outputs.

## Packet format

| bits | meaning |
|---|---|
| `[0]` | first bit: destination output (0 or 1) |
| `[3:1]` | second to fourth bit: all zero means *interesting* |
| `[31:4]` | payload, carried unchanged |

The rules only speak of the "first" to "fourth" bit. Mapping the first bit
to bit 0 is this implementation's choice. To use another layout, change
`pkt_dest` and `pkt_interesting` in `rtl/sw_pkg.sv`.

## The transfer decision (`sw_transfer_ctrl`)

This is the core of the design. It is purely combinational. Each cycle it
looks at the two input heads and at the two output `full` flags:

```
can[i]  = input i holds a packet  and  output dest(head[i]) is not full
C1      = dest(head[0]) == dest(head[1])
C2      = variant != Simplified  and  both heads interesting
collide = can[0] and can[1] and (C1 or C2)
winner  = 1 if (Modified and not C1 and C2) else 0
send[i] = can[i], except that the loser of a collision does not send
```

The loser keeps its packet and tries again in the next cycle. An output
buffer receives from at most one input per cycle, because a C1 collision
always has a single winner.

Priority only decides between two transfers that are **both possible**. If
input 0's packet waits for a full output, input 1 may still transfer to the
other output in that cycle, even if both packets are interesting. This is
the behaviour the informal rules ask for ("one packet is delayed while the
other is routed"). A stricter reading of the rules would let input 1 move
only when input 0 is empty or moves at the same time. That reading would
block input 1 behind a stalled input 0, and it was not adopted here.

## One operation per cycle: who yields

The rules say that a buffer does one thing per cycle, but not who wins when
two things are possible. This design lets the internal transfer win, on
both sides of the switch:

* **Input buffer.** An input buffer that sends in a cycle drops
  `enter_ready` for that cycle. A new packet waits one cycle.
* **Output buffer.** An output buffer that receives in a cycle drops
  `leave_valid` for that cycle. The outside waits one cycle.

As a result, the transfer decision never has to look at what the outside
is doing. It only needs `full` from each output. This choice cannot starve
the outside:

* An output that receives every cycle fills up. Once it is full, it stops
  receiving, and packets can leave.
* An input that sends every cycle empties. Once it is empty, it takes new
  packets.

One consequence: an input buffer fed back-to-back with packets that flow
straight through takes a packet only every other cycle. That is the
one-operation rule at work, not a bug.

## Blocks

| file | role |
|---|---|
| `rtl/sw_pkg.sv` | packet type, `NPORT`, variant enum, `pkt_dest`, `pkt_interesting` |
| `rtl/sw_input_buffer.sv` | input FIFO: circular array, read pointer and occupancy count |
| `rtl/sw_output_buffer.sv` | output FIFO, plus an `inc` pulse when it receives an interesting packet |
| `rtl/sw_transfer_ctrl.sv` | the transfer decision above |
| `rtl/sw_counter.sv` | interesting-packet counter, at most +1 per cycle |
| `rtl/sw_switch.sv` | one complete switch; `VARIANT` selects the rule; no counter for Simplified |
| `rtl/switch_top.sv` | the three variants side by side, ports indexed `[variant][buffer]` |

Interesting packets are detected at the output buffers, on receipt. The
`inc` pulses of both outputs are ORed into the single counter.

## Interfaces and timing

Every outside port is a valid/ready pair per buffer:

* **In:** `enter_valid`, `enter_ready` and `enter_pkt`. A packet is taken
  at a clock edge where `enter_valid && enter_ready`.
* **Out:** `leave_valid`, `leave_ready` and `leave_pkt`. A packet leaves
  at a clock edge where `leave_valid && leave_ready`.

A packet entered into an empty switch at edge *t* is transferred at edge
*t+1*. It is offered at the output (`leave_valid`) from just after *t+1*,
and can leave at edge *t+2*. `int_count` is registered and counts a
transfer from the cycle after it.

Reset is synchronous and active low (`rst_n`). It empties all buffers and
clears the counter. `int_count` of the Simplified switch (index 0) is a
constant zero.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `CAP` | 3 | capacity of every buffer, in packets; any value ≥ 1 works |
| `CNT_W` | 32 | counter width; the counter wraps around |
| `VARIANT` | `SW_ORIGINAL` | on `sw_switch` and `sw_transfer_ctrl` only |

The packet width (32) is fixed in `sw_pkg`. `CAP = 3` is the capacity for
which the switch's properties were checked formally. `CNT_W` is this
design's own choice.

## Checked properties

Assertions in the RTL encode the switch's safety properties:

* no buffer overflows (`sw_output_buffer`: no receive when full);
* an input buffer never sends when empty, nor enters and sends in the same
  cycle;
* no two packets go into the same output in one cycle (`sw_switch`);
* never two interesting packets in one cycle (`sw_switch` and `sw_counter`,
  Original and Modified);
* maximal progress: an input that can transfer and does not lose a
  collision always transfers (`sw_switch`).

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `tb/tb_switch_top.sv` | All three variants at default parameters for 20,000 cycles of random traffic. An independent cycle-accurate queue model is compared every cycle on `enter_ready`, `leave_valid`, `leave_pkt` and `int_count`. Phases of slow and fast draining make buffers fill and empty. It counts, and requires, every mechanism per variant: simultaneous transfers, same-output collisions, interesting-packet collisions won by input 0 (Original) and by input 1 (Modified), output-full stalls, input-full refusals, enters and leaves that yield to a transfer, counted packets, and the "one interesting packet blocked by a full output" case. At the end, inputs stop and outputs drain; the switch must come out empty, with nothing stuck or lost. |
| `tb/tb_switch_cap_sweep.sv` | The same random test and drain at buffer capacities 1, 2, 4 and 5, all three variants. |
| `tb/switch_checker.sv` | Not a testbench on its own. It holds the stimulus, the reference model and the mechanism counters that the two tests above share. |
| `tb/tb_sw_switch.sv` | Directed scenarios on all three variants: the two-cycle latency, same-output order, the interesting-pair order per variant, the blocked-output case, and back-pressure. |
| `tb/tb_sw_transfer_ctrl.sv` | All 256 combinations of valid, full, destination and interesting bits, for each variant, against a case-by-case statement of the rules. |
| `tb/tb_sw_input_buffer.sv`, `tb/tb_sw_output_buffer.sv` | Random operation against a queue model, including full, empty and yield cases. |
| `tb/tb_sw_counter.sv` | Counting and wrap-around, with an 8-bit counter. |

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/sw_pkg.sv tb/tb_switch_top.sv \
          --top-module tb_switch_top -o sim
./obj_dir/sim
```

Replace `tb_switch_top` with any other testbench name. The package must be
read first.

## Where this design makes its own choices

* Bit 0 is the "first bit", and bits 3:1 are the second to fourth bits.
* The outside handshake is valid/ready.
* Reset is synchronous and active low.
* The counter is 32 bits wide and wraps around.
* A transfer beats an outside enter or leave in the same buffer.
* Priority applies only when both transfers are possible; a stalled input 0
  does not block input 1 (see above).
* The permission scheme between the two input buffers, where each tells the
  other what it may do, is realised as one central combinational function.
  It makes the same decisions, except in the stalled-input case above.
* The three variants are three separate instances, not a run-time mode.
  The rules describe them as separate designs.
