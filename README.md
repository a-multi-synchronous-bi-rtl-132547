# MBiNoC: a bidirectional-link network-on-chip router for multi-clock systems

In a conventional mesh network-on-chip two neighbouring routers are joined by
two one-way links, one in each direction. When traffic is uneven, one of them
sits idle while the other is saturated. This router instead joins neighbours
with **two bidirectional channels**. Each channel is turned around at run time
toward the side that has data. A router with a burst to send can therefore use
both channels, doubling the bandwidth it has toward that neighbour.

Every router also runs in **its own clock domain**, as in a globally
asynchronous, locally synchronous (GALS) chip. As a result, every input buffer
is a dual-clock FIFO, and the signals that turn a channel around cross clock
domains through two-flip-flop synchronizers.

This repository holds synthesizable SystemVerilog for:

- the router;
- its sub-blocks;
- a two-router network that shows a live link between two clock domains.

Self-checking testbenches cover every block.

## Ports, channels and the link

The router has five ports: N, E, S, W and L (local). Each port has two
channels, numbered 0 and 1. Each channel carries, from whichever end is driving
it:

- a 64-bit flit;
- a `valid` bit.

Two wires run the other way:

- the receiving FIFO's `ready`;
- each end's channel request `op_req`.

These are bundled in the `ch_out_t` (driven) and `ch_in_t` (received) structs
of `mbinoc_pkg`. An end also raises `oe` while it drives a channel.

Real bidirectional wires would need tri-state drivers. Two-state simulation and
FPGA fabric have none, so `bidir_channel` models a wire as a multiplexer:

- whichever end has `oe` high drives the data and valid;
- `conflict` flags a cycle in which both ends drive.

With the protocol below, `conflict` must never rise, and the testbenches check
this.

### Priority and normal ends

Each channel has a **priority end** and a **normal end**:

- The priority end owns the channel after reset.
- It keeps the channel while it has data to send.
- It must give the channel up when it is idle and the other end asks for it.

In a router, channel 0 of every port is priority-mode and channel 1 is
normal-mode. The link crosses them: channel 0 of one router meets channel 1 of
its neighbour (see `mbinoc_top`). As a result, between two routers each one
starts out owning one channel, and either can win the second.

## The direction protocol (`dcc_asm`, `dyn_channel_ctrl`)

Each channel end runs a three-state machine: FREE, INITIAL and DELAY.

Its inputs are:

- `direction_control`: this end has a flit for the channel;
- `ip_req_sync`: the far end's request, after a 2FF synchronizer.

Its output `op_req` is registered and sent to the far end.

**Priority mode** starts in FREE, owning the channel, with `op_req` =
`direction_control`.

1. It stays in FREE while it has data or while the far end does not ask.
2. When it is idle and the far end asks, it goes to INITIAL. There it gives up
   the channel with `op_req = 0` and clears its counter.
3. As soon as it has data again it goes to DELAY, with `op_req = 1`, which asks
   for the channel back.
4. It returns to FREE after the counter reaches `PRI_DELAY` (4). DELAY
   therefore lasts 5 cycles.

**Normal mode** starts in INITIAL (`op_req = 0`, not owning).

1. When it has data and the far end is not asking, it goes to DELAY.
2. It goes back to INITIAL if the far end asks during the delay.
3. After `NORM_DELAY`+1 (9) cycles in DELAY it goes to FREE and owns the channel.
4. In FREE it drives the channel until the far request rises, then drops back
   to INITIAL at once.

An end drives a channel only in FREE (`own`). The DELAY states exist so that
the end giving a channel up has stopped driving before the other end starts.

**Clock-ratio limit.** A request travels from one end to the other through:

- the sender's output register;
- two receiver synchronizer flops;
- the receiver's state register.

That is about three receiver cycles. The priority end waits `PRI_DELAY` of its
own cycles before it drives again. So the handshake is safe only if
`PRI_DELAY · T_priority ≥ 3 · T_normal`. With the default of 4, the normal
end's clock may be at most about 4/3 slower than the priority end's. The
normal-mode delay of 8 leaves more margin in the other direction (up to about
5/3).

For neighbours whose clocks differ more, raise `PRI_DELAY` and `NORM_DELAY`
together. The testbenches keep every pair of neighbouring clocks within 4:3 and
check that no channel is ever driven from both ends.

Because the two requests are sampled asynchronously, a small window remains in
which both ends change their minds in the same few cycles. The delays make this
window harmless within the ratio above. Outside it, they do not.

`dyn_channel_ctrl` holds the two machines of one port, the synchronizer on the
far requests and the `op_req` output register. It gives the switch allocator:

- `direction_control`: the channel points outward;
- `arbitration_request`: the channel points outward and this router wants it.

### Talker and listener

`talker_asm` and `listener_asm` are the minimal form of the same idea: a
four-phase request/acknowledge handshake between two clock domains, each
direction through a 2FF synchronizer.

1. The talker raises its request.
2. The listener answers with its own.
3. The talker drops its request.
4. The listener drops its answer.

`mbinoc_top` includes one such pair between the two router clocks. `hs_done`
counts completed handshakes.

## The dual-clock FIFO (`ms_fifo`)

Each input channel is buffered in a FIFO whose write side runs on the
neighbour's clock, which is forwarded with the link. Its read side runs on the
router's own clock. Flow control is ready/valid on both sides:

- push = `in_valid & out_ready`;
- pop = `in_ready & out_valid`.

The FIFO is built from five parts:

- **`fifo_regfile`** is the storage. It writes on `wclk` and reads
  combinationally, so the head word is visible as soon as `out_valid` is high
  (first-word fall-through).
- **`ready_full_gen`** is the write side. It keeps a binary write pointer one
  bit wider than the address, plus a registered Gray-coded copy. It converts
  the synchronized Gray read pointer back to binary. The FIFO is **full** when
  the top bits of the two pointers differ and the rest are equal.
- **`valid_empty_gen`** is the read side, the mirror of the write side. The
  FIFO is **empty** when the read pointer equals the synchronized write
  pointer.
- **Two `sync_2ff` synchronizers** carry the Gray pointers across.

Only one bit of a Gray pointer changes per step, so a synchronizer never
captures a pointer that is wrong by more than one position. The Gray copy is
loaded from the *next* binary value, so it changes on the same edge as the
binary pointer and no logic sits in front of the synchronizer.

A word written on a `wclk` edge becomes visible to the reader two `rclk` edges
later, plus whatever is left of the current `rclk` period. The full and empty
flags are pessimistic: after a pop, the writer sees the freed space about two
`wclk` edges later.

Default size: 16 words × 16 bits for the stand-alone FIFO. The router uses
32 × 64, two per port.

## Inside the router (`mbinoc_router`)

A flit passes through these stages:

1. **Input port controller** (`input_port_ctrl`). It holds two FIFOs (one per
   channel), the route computation for each FIFO's front flit, and the port's
   direction control. Each FIFO acts as one virtual channel (VC). There are
   10 VCs in all.
2. **Route computation** (`route_compute`). XY routing: first along X (east or
   west), then along Y (north or south), then local.
3. **VC allocation** (`vc_allocator`, separable input-first). Each input VC
   whose front flit is a head asks for one of the two channels of its routed
   output port.
   - It prefers a channel that already points outward.
   - A round-robin arbiter per output channel picks one requester.
   - The winner holds the output channel until its tail flit has crossed the
     switch (wormhole switching).

   The parameter `VA_STYLE` selects one of two other allocators with the same
   interface:
   - `1`, `vc_allocator_of` (separable output-first). Every free channel
     grants one of the VCs routed to its port. A VC granted by both channels
     takes the outward one.
   - `2`, `vc_allocator_wf` (wavefront). This finds a maximal matching in one
     cycle by sweeping the request matrix diagonal by diagonal from a rotating
     start. It makes a first sweep over outward channels only.
4. **Switch allocation** (`switch_allocator`). A VC is eligible when all of
   these hold:
   - it holds a channel;
   - it has a flit;
   - the channel points outward;
   - the far FIFO is ready.

   One round-robin arbiter per input port picks between its two VCs. Output
   channels need no second arbitration, because each is held by at most one VC.
5. **Crossbar** (`crossbar`). One multiplexer per output channel.
6. **Output port controller** (`output_port_ctrl`). It drives a channel's data,
   `valid` and `oe` only while the channel points outward. It reports the
   downstream FIFO's `ready` to the switch allocator.

A head flit can leave the router on the third rising edge of `clk` after it
was written into the input FIFO: two edges for the pointer synchronizer and one
for VC allocation. After that, each input port can send one flit per cycle.

### Which channels a router asks for

A channel is requested (`want`) only when both of these hold:

- a packet that holds it has a flit waiting;
- the far FIFO on that channel has room.

Without the second condition, two routers whose buffers are full toward each
other could each keep a channel they cannot use. Each would then wait for the
other forever. With it, a blocked end yields its channel, and the neighbour can
drain. The two-router and single-router testbenches run with one sink stalled
for thousands of cycles to exercise this.

### Flit format

| bits  | field |
|-------|-------|
| 63    | head  |
| 62    | tail  |
| 61:58 | destination X |
| 57:54 | destination Y |
| 53:0  | payload |

A one-flit packet has both head and tail set.

## The two-router network (`mbinoc_top`)

The top module contains:

- router 0 at (0,0), clocked by `clk0`;
- router 1 at (1,0), clocked by `clk1`;
- the link between them: router 0's east port and router 1's west port, through
  two `bidir_channel`s with the channel numbers crossed;
- the talker/listener pair, between the two clocks.

Every other port (four per router) is brought out as `ext_clk`, `ext_rst_n`,
`ext_in` and `ext_out`, indexed `[router][port][channel]`. These are where
network interfaces or further routers connect. Each such port's clock is the
clock of whatever drives it.

Status outputs:

- `dir_outward`, `dir_delay` and `busy_out` per router channel;
- `link_conflict` for the two link channels.

All state resets asynchronously on active-low resets, each in its own clock
domain.

## Where this departs from the original description

- **Normal-mode delay.** One description of the normal-mode machine gives an
  8-cycle delay and another gives 4. This design uses 8 (`NORM_DELAY`). The
  priority-mode delay is 4 (`PRI_DELAY`). Both are parameters.
- **Leaving the normal-mode DELAY state.** One description sends the normal
  end back to INITIAL when the far request is *low*. Everywhere else a request
  is signalled *high*. This design returns to INITIAL when the far end
  requests, i.e. when the synchronized request is 1.
- **Channel demand.** Gating channel requests with the far FIFO's `ready` is
  this design's own addition, made to avoid the deadlock described above.
- **Routing and switching.** XY routing, wormhole switching, the flit format,
  the allocators' internal structure and the choice of channel 0 as
  priority-mode are this design's own choices. The original names these blocks
  but does not define them.
- **Tri-states.** Bidirectional wires are modelled with multiplexers
  (`bidir_channel`) instead of tri-state drivers.
- **Receive gating.** The original port drawing also disables the receive
  path while this end drives. Here only the sender gates `valid`, with its own
  direction. Gating at the receiver would bring this router's direction signal
  unsynchronized into a FIFO write side that runs in the neighbour's clock.
- **Not built.** The error-reporting modules of the port controllers are not
  built, because their function is not defined. Nor is a separate flow-control
  interface; the FIFOs' ready/valid does that job. Nor are network interfaces.
- **Allocator choice.** All three VC allocator styles are provided. Which
  one the original router used is not stated; input-first is the default
  here.
- **Clock ratio.** The safe clock-ratio limit above is a property of the
  protocol with these delays. It is not a limit stated by the original.

## Simulating

Every file is standalone SystemVerilog 2017. Each module is in `rtl/<name>.sv`.
Shared types are in `rtl/mbinoc_pkg.sv`. A testbench for block `X` is
`tb/tb_X.sv` (the talker and listener share `tb/tb_talker_listener.sv`).
`tb/tb_nic.sv` is a traffic source and sink used by the router and network
testbenches.

With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl rtl/mbinoc_pkg.sv tb/tb_mbinoc_top.sv \
  --top-module tb_mbinoc_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. A watchdog
counts a failure if the test hangs.

`tb_mbinoc_top` runs the network at its default parameters:

- 32-flit buffers;
- router clock periods of 10 and 12;
- five traffic endpoints with clock periods from 9 to 13.

Two phases of traffic, 200 packets in all, check that every packet arrives once,
whole and in order, and that no channel is ever driven from both ends. The test
also counts, and fails if any never happens:

- each router taking a link channel from the other;
- priority yields;
- delay states;
- full buffers;
- flits stalled on a full far buffer;
- switch arbitration between two VCs;
- traffic both ways over the link;
- completed talker/listener handshakes.

`tb_mbinoc_router` is the equivalent test for a single router, with an endpoint
on each of its five ports. Its `VA_STYLE` localparam picks the allocator
style; the test passes with all three.

Lint with `verilator --lint-only -Wall` reports the following, each explained
in the opening comment of the file concerned:

- a false combinational loop through the link structs (UNOPTFLAT);
- a reset used both by flip-flops and by assertions (SYNCASYNCNET);
- constant comparisons at coordinate 0 (UNSIGNED);
- some unused bits (UNUSEDSIGNAL).
