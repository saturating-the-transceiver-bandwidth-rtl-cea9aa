# GCQ switch fabric: memory that switches

This is synthesizable SystemVerilog for a 16-port packet switch fabric built on the
combined-input, grouped-crosspoint-queued (GCQ) organization. The architecture comes from
Dai and Zhu, "Saturating the Transceiver Bandwidth: Switch Fabric Design on FPGAs" (FPGA 2012).
Where that description stops, this RTL fills the gaps with its own choices, and the section
"Departures and own choices" lists them.

## The idea

A buffered crossbar with one buffer per crosspoint scales badly on an FPGA: N ports need N²
buffers, and block RAMs run out long before transceivers do. However, an FPGA block RAM runs
several times faster than the flit rate of a 10 Gb/s port. With 32-byte flits a port delivers
one flit per 25 ns (40 MHz), and a dual-port block RAM is easily clocked at 160 MHz. So one
simple-dual-port memory can take a write from each of **S = 4** inputs and serve a read to each
of **S** outputs in every port cycle, by giving every port its own time slot.

Such a memory, together with per-output address queues, is a complete S x S output-queued switch.
This design calls it a **memory based switch (MBS)**. The N x N crossbar then becomes an
(N/S) x (N/S) array of MBSs:

* the number of buffers falls by S², here from 256 to 16;
* each input needs only N/S virtual output queues (VOQs), one per column of MBSs;
* input and output schedulers shrink from N-to-1 to N/S-to-1;
* inside an MBS, space is allocated dynamically, so one busy output can *borrow* buffer space
  that the other outputs are not using.

With the defaults (N = 16, S = 4, 256-bit flits, 576-flit = 18 KB buffer per MBS) the switch
carries 16 x 10 Gb/s.

## Data path

```
            port clock (40 MHz)  |             core clock (160 MHz)               | port clock
                                 |                                                |
 in[0..3] --> input_port (4 VOQs,| row_serializer 0 --reg--> MBS(0,0) --reg--> MBS(0,1) ... MBS(0,3)
              dual-clock FIFOs) ====> slot mux + credits                          |
 in[4..7] --> input_port ...     | row_serializer 1 --reg--> MBS(1,0) ...         |
   ...                           |        ...                  |                  |
                                 |            column 0: MBS(0..3,0) --> output_mux 0..3 --> out[0..3]
                                 |            column 1: MBS(0..3,1) --> output_mux 4..7 --> out[4..7]
```

MBS(r, c) holds the flits that go from the inputs of row r (inputs 4r..4r+3) to the outputs of
column c (outputs 4c..4c+3). One free-running slot counter `phase` (0..S-1, core clock) drives
both sides:

* **Input slots.** In core cycles where `phase == s`, input `4r+s` owns row r's bus. Its
  round-robin scheduler (`voq_scheduler`) picks a VOQ. The flit is popped and registered onto
  the bus. The bus is one 256-bit broadcast, cut by a register in front of every MBS, so
  MBS(r, k) sees the flit k+1 core cycles after it was sent. This replaces four 256-bit buses
  at 40 MHz with one at 160 MHz.
* **Output slots.** In core cycles where `phase == t`, output `4c+t` owns the read port of
  every MBS in column c. Its round-robin scheduler (`output_mux`) grants one MBS that holds a
  flit for it. The flit leaves one cycle later through a small dual-clock FIFO to the port clock.

Each input and each output therefore gets exactly one flit slot per port cycle, and the switch
runs at line rate. Under a full-load permutation the testbench measures 8000 flits in 500 port
cycles on 16 outputs, which is 100 %.

## Inside a memory based switch (`mbs`)

This is the part that needs the most care. Every core cycle an MBS can do one write and one read.

**Write.** A flit whose destination mask names an output of this column gets the next address
from the **free address pool**. It is written into the **shared buffer** at that address. The
address is pushed into the **output pointer queue** of each named output, in the same cycle.
Port A of the **address recycle bin** stores the flit's destination vector, which has one lane
per local output. A multicast flit is stored once and queued several times.

**Read.** On a grant for output `t`, queue `t` is popped and the buffer is read at the head
address. Port B of the recycle bin clears lane `t` of that address's vector.

**Recycling.** The recycle bin is a true-dual-port memory in *write-first* mode: port B writes
the cleared lane and in the same access returns the *updated* vector, one cycle later. Clears
of the same address in consecutive cycles therefore each see the previous ones. This happens
when the copies of a multicast flit leave through several outputs back to back. When the
returned vector is all zero, the check logic raises `free`. The address then goes back to the
pool, and one credit goes back to the row that sent the flit. Lanes are 1 bit wide by default,
which matches a block RAM whose port B writes 1 bit and reads S bits. `LANE_W = 8` gives the
byte-enable form of the same structure.

Timing inside the MBS: a stored flit can be granted in the next cycle, the data appears one
cycle after the grant, and `free` appears one cycle after the last clear.

```
cycle      0          1            2            3
write      store A    -            -            -
read       -          grant t0     grant t1     -        (A is multicast to t0, t1)
data out   -          -            A (to t0)    A (to t1)
recycle    -          -            vec=0010     vec=0000 -> free, credit back
```

## Flow control and back-pressure

* **Input side.** `in_ready` drops when the VOQ that the flit needs is full (16 entries).
* **Crossbar.** The row serializer keeps one credit counter per MBS of its row. The counter
  starts at the buffer size (576), drops by one for every flit sent to that MBS, and rises when
  the MBS recycles an address, `CREDIT_DLY = 2` core cycles later. A VOQ may send only when
  every MBS its flit goes to has a credit. No MBS is ever offered a flit it cannot store, and
  the four inputs of a row share each buffer without any fixed partition. `credit_stall[r]`
  pulses when row r's slot owner has flits queued but none can go.
* **Output side.** An output grants only while its 8-entry output FIFO, counting the flit in
  flight, has room. A stalled output (`out_ready` low) keeps its flits in the shared buffers.
  When the buffer fills, the credits stop the inputs.

## Multicast

`in_dest` is an N-bit mask with any number of bits set. The flit enters the VOQ of the lowest
output group in its mask. The row bus is a broadcast, so every MBS of the row whose group
appears in the mask stores the flit. The flit is sent only when all those MBSs have credit.
Within an MBS the flit is stored once and freed after its last copy has left.

Ordering: flits from one input to one output leave in order when they sat in the same VOQ. A
multicast flit queued under a lower group can pass, or be passed by, unicast flits in another
VOQ of the same input.

## Interface of `gcq_switch`

| port | dir | width | clock | meaning |
|---|---|---|---|---|
| `clk_port`, `rst_port` | in | 1 | – | port clock, synchronous active-high reset |
| `clk_core`, `rst_core` | in | 1 | – | core clock (at least S x port clock for line rate), its reset |
| `in_valid[i]`, `in_ready[i]` | in/out | N | port | valid/ready handshake per input; a flit is taken on a rising edge with both high |
| `in_dest[i]` | in | N x N | port | destination mask, must not be zero |
| `in_data[i]` | in | N x 256 | port | flit payload |
| `out_valid[o]`, `out_ready[o]` | out/in | N | port | valid/ready handshake per output |
| `out_data[o]` | out | N x 256 | port | flit payload |
| `mbs_free[r][c]` | out | (N/S)² x 10 | core | free addresses in MBS(r, c) |
| `row_credit[r][c]` | out | (N/S)² x 10 | core | credits row r holds for MBS(r, c) |
| `credit_stall[r]` | out | N/S | core | row r lost a slot for lack of credit |

Hold both resets high together for a few port-clock cycles. Through an idle switch a flit takes
5 port cycles (125 ns at 40 MHz) from input handshake to output valid. Most of that is the two
clock-domain crossings. The published implementation reports 250 ns port to port.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N` | 16 | published 16x16 build |
| `S` | 4 | published speedup; the core clock must be S x the port clock |
| `DATA_W` | 256 | published 32-byte flit |
| `BUF_DEPTH` | 576 | 18 KB shared buffer / 32 B |
| `IQ_DEPTH` | 16 | own choice (power of two) |
| `OQ_DEPTH` | 8 | own choice (power of two) |
| `CREDIT_DLY` | 2 | credit delay of the published simulation model |
| `LANE_W` | 1 | 1-bit lanes; 8 for the byte-enable form |

`N` must be a multiple of `S`. The defaults live in `rtl/gcq_pkg.sv`.

## Files

| file | block |
|---|---|
| `gcq_switch.sv` | top: slot counter, inputs, rows, MBS array, outputs |
| `input_port.sv` | N/S VOQs of one input (dual-clock FIFOs) |
| `voq_scheduler.sv` | per-input round-robin VOQ choice with credit check |
| `row_serializer.sv` | slot mux, credit counters, pipelined broadcast bus of one row |
| `mbs.sv` | memory based switch |
| `shared_buffer.sv` | 576 x 256 simple-dual-port data memory |
| `free_addr_pool.sv` | free address supply (fill counter + recycled-address FIFO) |
| `output_ptr_queues.sv` | S address FIFOs with multicast push |
| `addr_recycle_bin.sv` | write-first destination-vector memory and zero check |
| `output_mux.sv` | per-output round-robin MBS choice and output FIFO |
| `async_fifo.sv` | Gray-pointer dual-clock FIFO |
| `sync_fifo.sv`, `rr_arbiter.sv` | helpers |

## Departures and own choices

The following points are choices of this RTL. The original description does not settle them.

* **Flit header.** Every flit carries its N-bit destination mask beside the 256-bit payload.
  Flits are switched one by one. A multi-flit packet is simply a run of flits with the same
  mask, and flits of different inputs may interleave at an output.
* **Credits.** Flow control between the input queues and the crossbar uses one credit per free
  buffer address, counted per MBS at each row. The source only names credit-based flow control
  in its simulation model.
* **Schedulers.** The input and output schedulers are round robin. The source gives their size
  but not their policy.
* **Free address pool.** It is one queue shared by the S inputs, which take turns. The source
  mentions "multiple free address queues" in one block RAM. A shared queue keeps buffer
  borrowing among inputs.
* **Zero check.** The check logic raises `free` when the vector read back is zero, which is an
  inverted OR.
* **Output FIFOs.** The output-side clock crossing is a small dual-clock FIFO per output, and
  outputs accept back-pressure (`out_ready`).
* **Status ports.** `mbs_free`, `row_credit` and `credit_stall` are additions for monitoring.
* **Block RAM mapping.** Memories are plain arrays. The shared buffer is one 256-bit array
  rather than eight 36-bit block RAMs. The pointer queues and the recycled-address FIFO use
  asynchronous reads, which a synthesis tool will map to distributed RAM or registers unless
  they are retimed to registered reads.

Not part of the RTL: the serial transceivers and line logic, which the published design assumes
exist, and the clock generation. Both clocks are inputs. The original work also studies a
network of many chips, a 3-level fat tree of 192 sixteen-port switches. That network is not
built at full size. `tb_gcq_fat_tree` simulates the same shape with 48 eight-port switches.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
          rtl/gcq_pkg.sv tb/tb_gcq_switch.sv --top-module tb_gcq_switch
./obj_dir/Vtb_gcq_switch
```

Replace the testbench name to run another block. `tb_gcq_switch` runs the full-size switch with
default parameters through five phases:

1. single flits for latency, which must be 10 port cycles or less;
2. a full-load permutation, which must reach at least 98 % line rate;
3. random unicast and multicast traffic with output stalls;
4. a hotspot that fills one MBS and exhausts its credits;
5. a drain.

A scoreboard checks every copy of every flit. The testbench also requires that multicast within
and across groups, credit stalls, input and output back-pressure, outputs switching between MBS
rows, buffer borrowing beyond 576/4 flits, and a full buffer each happen at least once. It takes
about 10 s.

`tb_gcq_workloads` runs eight switch configurations side by side under uniform random
(Bernoulli) traffic, each in its own `gcq_traffic_bench` with its own clocks. Each configuration gets 500 port cycles of warm-up
and a 2000-cycle measurement window, then drains. One run gave:

| config | size, S | buffer per MBS | VOQ depth | packet | offered | accepted | mean latency (port cycles) |
|---|---|---|---|---|---|---|---|
| A | 16, 4 | 576 | 16 | 1 flit | 0.95 | 0.95 | 14 |
| B | 16, 4 | 64 | 16 | 1 flit | 0.90 | 0.90 | 10 |
| C | 16, 4 | 8 | 16 | 1 flit | 0.80 | 0.80 | 8 |
| D | 16, 4 | 576 | 16 | 16 flits | 0.83 | 0.81 | 77 |
| E | 16, 4 | 64 | 16 | 16 flits | 0.79 | 0.78 | 65 |
| F | 16, 4 | 16 | 32 | 1 flit | 1.00 | 0.97 | 53 |
| G | 9, 3 | 576 | 16 | 1 flit | 0.90 | 0.90 | 11 |
| H | 16, 8 | 64 | 16 | 1 flit | 0.95 | 0.95 | 12 |

Latency counts from the cycle a flit is generated, so it includes the wait in the source queue.
With long packets the offered load within a short window varies. The testbench checks every
flit, checks that buffers and credits are restored, and checks that single-flit traffic below
saturation is fully carried. At full load (config F) it requires at least 90 %. The whole run
takes about a minute, most of it compilation.

`tb_gcq_fat_tree` builds a network of switches: a 3-level fat tree (4-ary 3-tree) of 48
eight-port switches with S = 4 and 32-flit buffers, serving 64 hosts. Routing goes to the
nearest common ancestor. A flit climbs through an up port chosen by a hash of its source and
sequence number, with independent bits at each level, and then descends along its destination's
digits. The routing sits in the bench: it sets `in_dest` on every switch input. Under
single-flit uniform traffic one run carried 0.60 at load 0.6 (mean latency 24 port cycles) and
0.90 at load 0.9 (30 port cycles). Flits of one flow may take different paths through the
tree, so the bench checks exactly-once delivery rather than order. It takes about a minute,
most of it compilation.

`tb_addr_recycle_bin` replays the published write-first timing example, with lane enables
0001, 0010 and 1000 on one address. It then runs random multicast clearing on the 1-bit-lane and byte-lane forms side by side.
