# Chained omega combining network

Many processors in a shared-memory machine often hit the same memory word
at the same moment: a lock, a counter, or a shared queue index. In a plain
multistage network those requests pile up along the path to one memory
module. The queues then fill, and traffic to every other module is blocked
as well (tree saturation). A *combining* network removes the pile-up at its
source. When two requests for the same word meet in a switch queue, the
switch merges them into one request and remembers that it did. When the
single reply comes back, the switch splits it into two replies again.

An omega network has a single path between each processor and each memory
module, so one broken link cuts processors off. This design adds *chain
links* between the switches of each stage. A request whose output link is
faulty can walk sideways to a neighbouring switch that reaches the same
part of the next stage. The request also carries a short record of the
detour. The reply uses that record to walk back the same way, so it still
meets the wait buffers where combining happened. Combining therefore keeps
working while links are broken.

This repository holds synthesizable SystemVerilog for the whole network:

- the switch;
- its combining queues, wait buffer and return queues;
- the N-port top level.

It also holds self-checking testbenches for each of these.

## Topology

With N = 2^n ports there are n stages (0 … n−1), each with N/2 switches.
Links are numbered 0 … N−1 between any two stages.

- **Inputs.** Switch X of a stage reads link X on input 0 and link X + N/2 on input 1.
- **Outputs.** Output p of switch X drives link 2X + p.
- **Edges.** The same perfect-shuffle wiring joins the processors to stage 0. The outputs of the last stage go straight to memory modules 2X + p.

Chains exist in stages 0 … n−2 and run inside a stage:

| direction | switch X of stage i sends to |
|-----------|------------------------------|
| forward (requests) | (X + 2^i) mod N/2 |
| return (replies) | (X − 2^i) mod N/2 |

The switches of one chain have the same low i bits. Those are exactly the
switches whose outputs reach the same group of switches in stage i+1.
Stage i therefore has 2^i chains of N/2^(i+1) switches each. In the last
stage each group would be a single switch, so that stage has no chain.

For example, with N = 8:

- stage 0 is one ring 0→1→2→3→0;
- stage 1 has the two rings 0↔2 and 1↔3;
- stage 2 has no chain.

## Packets and the chain-out record

Every link carries one `ccn_pkt_t` per clock, defined in `rtl/ccn_pkg.sv`:

| field | bits | meaning |
|-------|------|---------|
| `op` | 2 | load, store, Fetch&Add |
| `s` | 6 | processor tag S; changed by detours |
| `d` | 6 | memory-module tag D |
| `c` | 5 | c_i = 1: the request detoured in stage i |
| `l` | 15 | L_0 … L_{n−2}, packed; L_i has n−1−i bits |
| `pe`, `seq` | 6 + 4 | issuing processor and its request number; never changed |
| `addr` | 10 | word within the memory module |
| `data` | 32 | operand of a request, value of a reply |

Tag bit t_0 is the most significant bit. Stage i looks at bit t_i.

In stage i a request sits in the switch {s_{i+1} … s_{n−1}, d_0 … d_{i−1}}. The
reply travels back through the same switches by reading bit s_i in stage i.
A detour breaks this rule, and the record repairs it.

**Forward detour.** When a request leaves switch x on the forward chain of
stage i:

1. If c_i = 0, the switch sets c_i and stores the high n−1−i bits of x in L_i.
   These are the bits that came from S. L_i marks where the request first
   left its normal path.
2. The switch replaces the high bits s_{i+1} … s_{n−1} of S with those of the
   next switch. The reply will then return to the switch that actually sent
   the request on.
3. If the next switch is the one stored in L_i, the request has been all the
   way round its chain and every switch there has a faulty link. The switch
   drops the request and raises a `disconnect` event.

**Return path.** In stage i the switch routes a reply as follows:

- If c_i = 1 and this switch is not L_i, the reply goes onto the return
  chain, which runs the opposite way.
- If c_i = 1 and this switch is L_i, the switch copies L_i back into S.
  It then routes by s_i.
- If c_i = 0, the switch routes by s_i.

The record costs n−1 bits for C plus Σ(n−1−i) bits for the L fields. For
N = 64 that is 5 + 15 = 20 bits.

## The switch (`ccn_switch`)

Each switch has three inputs and three outputs in each direction: two
links and one chain.

### Forward part

- **Input latches.** Two input latches and one chain-in latch accept one
  request each.
- **Routing.** Bit d_i selects the combining queue. The chain-in latch has
  priority. The two link latches take turns, round-robin. Each queue accepts
  one request per clock. A request that cannot enter waits in its latch, and
  a `fwd_block` event is raised.
- **Combining queues.** There is one combining queue per output link.
  - An arriving request is compared with every entry except the head. The
    head is already committed to the link.
  - Two requests can merge if they use the same operation (both loads or
    both Fetch&Adds), the same module and the same word.
  - On a merge, the queued entry keeps its place and the arriving request
    disappears from the queue.
  - For a Fetch&Add the two operands are added.
  - The queue writes a record to the wait buffer: the key of the surviving
    request, the whole header of the absorbed one, and the surviving
    request's operand *before* the sum.
  - One entry absorbs at most DEGREE−1 requests in one switch.
- **Output.** The head of a queue goes out on its link. If the link is
  faulty, the head goes through the single chain-out latch instead, and the
  record update above is applied on the way out.

### Return part

- **Input latches.** Two input latches and one return chain-in latch accept
  one reply each.
- **Decombining.** Each latched reply is looked up in the wait buffer by the
  key of its request.
  - While records for the reply exist, the switch produces one extra reply
    per clock from a record. The extra reply carries the absorbed request's
    own header.
  - For a Fetch&Add the extra reply's value is the reply's value plus the
    stored operand. For a load it is the same word.
  - The original reply stays latched until all of its records are used.
- **Routing.** Each reply is then routed as described above, into one of two
  plain FIFOs (`ccn_normal_queue`) or onto the return chain.

### Why a merged reply is correct

A Fetch&Add returns the old value of the word and adds the operand. Suppose
A (operand a) waits in a queue and B (operand b) merges into it.
The memory sees one request with operand a+b and returns the old value v.

- A gets v.
- B gets v + a, as if B had executed right after A.

Merges in later stages nest the same way. The combined outcome therefore
always equals some serial order of the original requests. Loads simply
share the one value.

### Why a record stores the absorbed request's whole header

Two requests that meet in a queue may have reached the switch by different
paths. One may have come in on a chain link, for example. Each reply has to
follow its own request's path back, so the record keeps that request's S, C
and L. For the same reason records are found by the surviving request's
issuing processor and request number. They are not found by the S tag,
which detours rewrite.

## Timing and flow control

- **Links.** Every link is valid/ready. A packet moves at a clock edge where
  both signals are high.
- **Switch latency.** An idle switch takes two clocks per direction: one
  into the latch and one into the queue or out of it.
- **Round trip.** A load in an idle network of n stages takes 4n + 1 clocks,
  counting the one clock the testbench's memory takes. That is 25 clocks for
  N = 64 and 13 for N = 8.
- **Detour cost.** A detour costs two extra clocks per chain hop in each
  direction.
- **Decombining rate.** Decombining releases one reply per clock.
- **Return chain and combinational paths.** A reply that passes straight
  through the return chain-in latch onto the return chain-out refills the
  latch one clock later. This keeps every combinational path out of the
  chain rings.
- **Reset.** Reset is asynchronous and active low.

## Sizes and parameters

| parameter | default | notes |
|-----------|---------|-------|
| `N` (network) | 64 | up to 64; the packet fields are sized for 6-bit tags |
| `FQ_DEPTH` | 4 | combining-queue entries |
| `DEGREE` | 2 | at most DEGREE requests merged into one per switch; 3 also works |
| `RQ_DEPTH` | 4 | return-queue entries |
| `WB_DEPTH` | 8 | wait-buffer records per switch |

`ADDR_W`, `DATA_W` and `SEQ_W` in the package set the word address, data
and request-number widths. `SEQ_W` = 4 allows 16 outstanding requests per
processor.

## Departures and limits

- **Finite buffers.** The original analysis treats the wait buffers and
  return queues as unbounded. Here they have 8 and 4 entries.
  - A queue stops combining while its wait buffer has fewer than two free
    records.
  - A full return queue holds replies back in the latches.
  - Under heavy hot-spot load, delays can therefore be higher than in the
    original analysis.
- **Chaining is for faults only.** A request takes the chain only because
  its link is faulty. Sending a request to the chain because its queue is
  full, as a congestion measure, is not built.
- **No chain in the last stage.** A request whose last-stage link is faulty
  is dropped and reported as disconnected.
- **Processor-side links cannot fail.** Only switch output links can be
  marked faulty. A fault affects requests and replies alike.
- **Simple combining queue.** The combining queue is a plain shifting
  array that compares against every entry. It is not the multi-register
  organisation sometimes used for combining queues in the literature.

## Files

| file | contents |
|------|----------|
| `rtl/ccn_pkg.sv` | packet, record and event types; helper functions |
| `rtl/ccn_normal_queue.sv` | return FIFO |
| `rtl/ccn_combining_queue.sv` | merging forward queue |
| `rtl/ccn_wait_buffer.sv` | associative record store, three lookup ports |
| `rtl/ccn_switch.sv` | 3×3 chained combining switch |
| `rtl/ccn_network.sv` | N-port network, top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

### Outputs

`ccn_network` brings out the processor and memory sides as valid/ready
arrays. The memory modules themselves are not part of the RTL.

`events[i][X]` gives per-switch pulses for:

- combining;
- decombining;
- forward chaining;
- return chaining;
- disconnection;
- blocking.

### The end-to-end testbench

`tb_ccn_network` plays the processors and the memory modules. It checks the
following:

- Every reply reaches the processor that issued it, exactly once.
- Every load returns the right word.
- The Fetch&Add replies to a hot word are exactly 0 … K−1.
- The idle round-trip time is 4n + 1 clocks.
- The record of a stage-0 detour is correct.
- It repeats the traffic with both output links of switch 0 of each stage
  i = 0 … n−2 faulty. It also runs one double fault that forces two chain
  hops and one fault pair that disconnects a chain.
- It counts combining, decombining, both kinds of chaining, multi-hop
  chaining, disconnection and blocking, and fails if any of them never
  occurs.

It runs at N = 16 with DEGREE = 3, so up to three requests merge in one
switch. The two localparams at its top select other sizes. It also passes at
N = 8 and at N = 32 with DEGREE = 2. N = 32 is the largest size simulated.
The default N = 64 network passes lint, but no simulation at that size is
included. Verilator's C++ build time grows steeply with N: about 10 seconds
at N = 16 and about 4 minutes at N = 32.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl rtl/ccn_pkg.sv rtl/ccn_normal_queue.sv \
    rtl/ccn_combining_queue.sv rtl/ccn_wait_buffer.sv rtl/ccn_switch.sv \
    rtl/ccn_network.sv tb/tb_ccn_network.sv --top-module tb_ccn_network \
    -o sim && ./obj_dir/sim
```

Run from the repository root. The unit testbenches need only the package
and their own module plus its sub-modules.

## Known warnings

- **Assertions.** The handshake assertions sample the reset, which lint
  reports as a signal used both synchronously and asynchronously.
- **Wait-buffer `full` output.** The switch does not use the wait buffer's
  `full` output. The output exists for testing.
