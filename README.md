# Switching networks for a fault tolerant digital telephone exchange

This RTL is the central switching network of a digital telephone exchange,
scaled up from a 256 half call prototype to 4096 half calls. In a half call
one subscriber's 4-bit speech symbol goes one way, once per frame. Symbols
arrive in time slots on serial PCM lines. The network must move the symbol in
slot *s* of incoming line *a* to slot *t* of outgoing line *b*, for any
pairing, and it must never block.

The main design is a **time–space–time (TST)** network: 16 lines of 256
channels. A first time switch on each incoming line moves every symbol to a
free internal slot. A 16 × 16 space switch then sends it to the right
outgoing line. A third-stage time switch there moves it to its outgoing slot.
The internal lines carry twice as many slots as the external ones (512
against 256), which is what makes the network non-blocking.

The exchange's central network is four such TST networks in lock-step
(`central_network`). The (4,2) code turns each speech sample into four
4-bit symbols, and each symbol has its own network, so each network is a
fault isolation area. A fault in one network damages only one symbol of a
codeword, which the decoders behind the network can correct. Each network
has its own connection memory port, written by its own slice of the
(also fourfold) control system, which normally writes the same connections
into all four.

Three alternatives from the same study stand beside it in the top module,
`exchange_top`:

* a **TSSST** network: 64 lines of 64 channels with a three-stage 8-16-8
  space network (SSS) in the middle, to spread the wiring of one big space
  switch over smaller elements;
* a **parallel time switch element**: a 32-slot time switch with no data
  memory, made of a shift register chain and a pipelined multiplexer tree;
* a **time-shared bus space switch**: 4 × 4, where the incoming lines take
  turns on one 4-bit bus instead of being wired to every output.

The symbols are 4 bits because the exchange protects its data with a (4,2)
symbol error correcting code. The network just carries those symbols. The
coders and decoders, the PCM synchronisation in front of the network, and the
control computer that decides the connections are not included. The control
computer writes connection memories through the `cfg_*` ports.

## Time slots and the one counter

Every network runs from one clock at the internal bit rate and one free
running counter, `tsc` (`tsc_counter`). Its fields:

| bits of `tsc`   | meaning                                                     |
|-----------------|-------------------------------------------------------------|
| `[1:0]` = q     | bit within an internal slot (4 clocks, one bit per clock)   |
| `[2:0]` = p     | phase within an external slot (8 clocks)                    |
| `[W-1:2]`       | internal slot number (0 … 2·CH−1)                           |
| `[W-1:3]`       | external slot number (0 … CH−1)                             |

External lines (`rx`, `tx`) run at half the internal rate. Each of the 4 bits
of a symbol is held for 2 clocks, most significant bit first. So external
slot *e* occupies exactly internal slots 2*e* and 2*e*+1. `frame_start` is
high when `tsc` is 0. For the default TST network `tsc` is 11 bits and a
frame is 2048 clocks. The exchange's 16 Mbit/s internal rate would make this
a 16 MHz clock.

## The TST network and how a connection is set up

Each of the four networks, `tst_network`, contains 16 `time_switch_t1`, one `space_switch` and
16 `time_switch_t2`, all addressed by the same counter.

**First stage (`time_switch_t1`).** The incoming symbol is shifted into a
register. At p0 of each external slot it is written into the data memory
RAMD (256 × 4) at the address of the current external slot. The memory is
therefore written in order, but one slot late. The connection memory CRAM
(512 × 8) is read in order, twice per external slot (p0, p4). Each word it
gives is a RAMD address, which is read at p1/p5. The word is loaded into the
output shift register at q3 and leaves during the next internal slot.

**Space stage (`space_switch`).** Each of the 16 internal lines has a
1-to-16 demultiplexer and its own connection memory (512 × 4) that names the
outgoing line for each internal slot. Each outgoing line is the OR of the
demultiplexer outputs that can reach it (`demux_1ton`, `or_n`). The bit path
is combinational. The memories are read at q3 of slot *j* for slot *j*+1, so
the selects change exactly on the slot boundary.

**Third stage (`time_switch_t2`).** Every incoming internal slot is shifted in
and written into RAMD (512 × 4) at the address of the internal slot after it
arrived. CRAM (256 × 9), read once per external slot at p1, names the RAMD
word to send. The word is read at p2, loaded at p7 and sent out at the
external rate during the next external slot.

These delays add up to the rule the control system must follow. To connect
incoming (*a*, *s*) to outgoing (*b*, *t*) through a free internal slot *k*,
it writes three words (all slot numbers modulo the frame):

```
T1[a].CRAM[k]      = s + 1      symbol on the line in slot s is stored at s+1
S.CRAM[a][k + 1]   = b          the word is on the internal wire in slot k+1
T2[b].CRAM[t - 1]  = k + 2      stored at k+2, sent one external slot later
```

Internal slot *k* must be free both on incoming line *a* and on outgoing
line *b*. With twice as many internal slots as channels such a slot always
exists after rearranging. The testbenches find the slots for a full
permutation by edge colouring the bipartite line graph
(`tb/tb_route_pkg.sv`). In each internal slot the space mapping must be
one-to-one. Two inputs sent to one output would be ORed together.

A call therefore takes about one frame plus four external slots from `rx` to
`tx`. The exact figure depends on *s*, *k* and *t*. The testbench checks every
bit against the symbol that was sent in the right slot, so a latency error
shows up as a failure.

## Writing connection memories

Each network has one configuration port:

* `cfg_target`: first time stage, space stage or last time stage (`tse_pkg::cfg_target_e`);
* `cfg_line`: which line (for the space stage, the incoming line);
* `cfg_addr` / `cfg_data`: the address and the word.

A memory can only take a write in its free phase: p2/p6 for T1, p5 for T2,
q1 for the space stages. So the port uses a valid/ready handshake. Hold
`cfg_valid` and the fields stable until `cfg_ready` is high at a rising edge.
An assertion in each element checks this. A write waits at most 7 clocks. A
full set-up of 4096 connections (8192 space words plus 8192 time-switch
words) takes about 65,000 clocks, or 32 frames.

## TSSST and the SSS 8-16-8 network

A 64 × 64 demultiplexer/OR switch would need 64 × 64 = 4096 wires between
its demultiplexers and OR gates. `sss_network` replaces it with a Clos
network of three stages:

* 8 first-stage 8 × 16 elements;
* 16 middle 8 × 8 elements;
* 8 last-stage 16 × 8 elements.

Each element is a `space_nxm_tot`: a `space_nxm` (demultiplexers and ORs)
whose select bus comes straight from the output of its own 128-word control
RAM (`sram_sp`). The select words are 32, 24 and 48 bits wide; in each, input
*i*'s field is `[i·log2(M) +: log2(M)]`. The links run from output *m* of
first-stage element *i* to input *i* of middle element *m*, and from output
*o* of middle element *m* to input *m* of last-stage element *o*. The
network has twice as many middle elements as inputs per outer element, so
any permutation can be routed in every slot. The testbench splits each slot's
permutation into matchings to do the routing. All RAMs are read together at
q3 for the next slot. One select word is written per request at q1, with
`cfg_stage` and `cfg_elem` picking the RAM.

`tssst_network` puts 64 first-stage and 64 third-stage time switches of 64
channels (128 internal slots) around it, using the same connection rules as
the TST network. It has the same 4096 half call capacity, and its RAM totals
131072 bits in the space stage.

## The parallel time switch element

This is the least obvious design here. It switches a 32-slot frame of 4-bit
samples without any data memory.

1. Samples shift into a chain of 32 registers, one per clock (`PIPO0_EN`).
2. When the counter is 0 the whole chain is copied into 32 frame registers
   (`PIPO1_EN`).
3. A binary tree of 2-to-1 multiplexers picks one frame register per clock
   and sends it to `par_out`. The tree has a register after every level
   (`PIPO2_EN`).

The structure is recursive. A `ptse_mux2` holds two shift registers, two
frame registers, a 4-bit 2-to-1 multiplexer (`mux21x4bus`) and an output
register. A MuxN is two MuxN/2 whose chains are joined, plus one more
multiplexer and register. `ptse_muxn` builds this as a flat tree of N/2 Mux2
leaves. The registers are `npipo4bus` cells: four `nfbff` flip-flops with
enable feedback.

Because the tree is pipelined, the select bit for level *k* must arrive *k*
clocks after the bit for level 1. Storing pre-skewed words in the control
RAM would mean rewriting several entries per connection. Instead `ptse_sel`
delays SEL bit *k* by *k* clocks, so the control RAM holds plain numbers and
one write changes one connection. `parallel_tse` stores, for each outgoing
slot *n*, the incoming slot *i* it carries. It reads that entry one clock
before the tree needs it and turns it into a chain position: the sample that
arrived first is furthest from the input, so the position is the bitwise
inverse of *i*. One incoming slot may feed several outgoing slots.

Timing: incoming slot *i* of frame *f* leaves in outgoing slot *n* of frame
*f*+1. It is on `par_out` in the clock where the slot counter equals
(*n* + log2 N + 1) mod N, and `out_slot` gives *n* at that moment. At
N = 64 this structure has (5·32 + 31)·4 = 764 flip-flops, the same count the
source report gives for its Mux64.

## The time-shared bus space switch

`tsb_space_switch` is a 4 × 4 space switch without a wire from every input
to every output. In each internal slot the four incoming words take turns on
one bus, one per clock. `tsc[1:0]` selects the buffer that drives the bus
(MUXS), and the control RAM, addressed by {slot, turn}, names the output
register that loads it (DEMUX). The output registers are `npipo4` cells
(4-bit enable registers with one pin per bit) on the bus lines. After the fourth turn the output registers
are copied to `out_word`, which holds them for the whole next slot. An
output loaded by no turn gives 0. An output loaded twice keeps the last
turn's word. The control RAM is read every clock and can be written in any
clock, so it needs no handshake.

## Departures from the source and what is missing

* **Phase plans are this design's own.** The source gives the required
  rates (one write and two reads per external slot in the first stage) and
  the slot delays (a symbol sent in slot N−1 is stored at location N; N+2 on
  arrival in the third stage; one slot out). It does not give readable
  cycle-level timing, so the phase plans are chosen to meet those delays.
* **Third stage and TSSST.** The third time switch and the TSSST network are
  only named and sized in the source. Their memory sizes follow its RAM area
  tables. The inside of T2 mirrors T1.
* **SSS middle stage.** One table in the source lists the 16 middle elements
  as "8 ×" but multiplies out to 16. Sixteen are built.
* **RAMs** are behavioural arrays with a synchronous read and a held output.
  The generator's self-test pins (BIST) are not modelled.
* **Parallel element.** The source shows the datapath and explains the need
  for module SEL. The enable sequence, the control RAM contents and size (32
  × 5 bits, where the source's Mux64 lists a 128 × 6 RAM) and the slot
  numbering are chosen here.
* **Time-shared bus.** One bus turn per clock. The 8 × 8 version, which
  needs two turns per clock and interleaved control RAMs, is not built, and
  neither is the multiple-bus variant.
* **Not built:** the 32 Mbit/s time switch with interleaved RAMs (only a
  concept in the source), the (4,2) codec, PCM synchronisation, RAM
  self-test, and the control system. The testbenches play the control
  system's role.
* **Reset.** An asynchronous active-low `rst_n` clears the counters and
  registers. Memories are not reset and must be written before use.

## Simulating

Every block has a self-checking testbench, `tb/tb_<module>.sv`, that prints
`TB_RESULT checks=… failures=…`. The top's testbench `tb_exchange_top` runs
all four designs at their default sizes. It first sets up a full 4096-call
permutation in all four TST networks (written through their four ports in
parallel, with different symbols in each) and in the TSSST network. It then
re-routes 64 half calls on the running TST networks. It checks every bit of every outgoing channel,
and checks the parallel element and the bus switch sample by sample. It also
counts the mechanisms and fails if one never happened:

* handshake stalls;
* connections that wrap around the frame;
* re-routes;
* use of the SSS middle elements;
* frame loads;
* multicast;
* live rewrites;
* bus turns, idle outputs and doubly loaded outputs.

It takes about one second with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/tse_pkg.sv tb/tb_route_pkg.sv tb/tb_exchange_top.sv \
  --top-module tb_exchange_top -o sim
./obj_dir/sim
```

For any other block, replace the testbench name. Two more testbenches run
the sizes the source tabulates. `tb_tst_network_sizes` runs the
prototype's 4 × 64 network (256 half calls) next to the 16 × 256 one.
`tb_parallel_tse_sizes` runs the parallel element as Mux2, Mux4, Mux8,
Mux16, Mux32 and Mux64. Their per-size checkers are `tb/tst_size_check.sv`
and `tb/ptse_size_check.sv`. `tb_route_pkg.sv` is only
needed by the network testbenches. The parameters of the networks (`N`,
`CH`, `SLOTS`) can be changed, but the connection rules assume the counter
layout above.
