# Garbled-circuit overlay for network-attached FPGAs

Garbled circuits (Yao's protocol) let two parties compute a Boolean function
of their private inputs while revealing only the result. The garbler gives
every wire two random 128-bit *labels*, one per truth value. For every AND gate
it encrypts the output labels under the input labels, which gives a small
*garbled table*. This is expensive: each AND gate costs four AES encryptions,
and a K-means or PageRank computation becomes a netlist with millions to
hundreds of millions of gates.

This RTL is an FPGA *overlay* for the garbler. The hardware is fixed: 8 garbled
AND gates, each with its own AES-128 core, and 8 free-XOR gates. The circuit
arrives as data: software lays the netlist out in HBM as a list of *batches*
of independent gates, and the overlay works through them. A new circuit needs
only new memory contents, not a new bitstream. One circuit can also be split
between two FPGAs on a 100 GbE switch. Each FPGA then garbles part of every
circuit layer and sends the labels the other side needs straight to it as UDP
packets, with no host involved.

`gc_overlay_top` is one FPGA's kernel. Two instances joined by a network make
the two-FPGA system.

## Garbling scheme

The overlay uses three standard optimisations:

* **Free-XOR.** A wire's two labels are `W0` and `W1 = W0 ^ delta`, where
  `delta` is one global offset. An XOR gate's output zero-label is then
  `A0 ^ B0`. It needs no encryption and no table.
* **Point-and-permute.** Bit 0 of `delta` is 1, so bit 0 of a label (its
  *colour*) differs between a wire's two labels. The evaluator uses the colours
  to pick a table row without learning the wire's value.
* **Row reduction.** The output label is defined so that the table row for
  colours (0,0) is all zero. That row is not stored, which leaves three
  ciphertexts per AND gate.

`garbled_and_gate` implements the following. `pa = A0[0]` and `pb = B0[0]`.
For the colour pair `(i,j)`, with `r = 2i + j`, the input labels are
`A = A0 ^ ((i^pa) ? delta : 0)` and `B = B0 ^ ((j^pb) ? delta : 0)`. It forms

```
K  = rotl(A,1) ^ rotl(B,2) ^ T          T = {node_id, batch, unit}
Hr = AES_key(K) ^ K
C0 = H0 ^ ((pa & pb) ? delta : 0)       output zero-label
ct[r-1] = Hr ^ C0 ^ (((i^pa) & (j^pb)) ? delta : 0)     r = 1, 2, 3
```

The evaluator holds one label per input, with colours `(i,j)`. It computes
`H(A,B,T)`, and for `r != 0` XORs in `ct[r-1]`. The result is the output label
for `a AND b`. The hash and the tweak are this design's choices; the source
does not give them. The tweak `T` is the 128-bit value
`{80'b0, node_id[7:0], batch[31:0], 5'b0, unit[2:0]}`. It is unique for every
gate on each FPGA, and the evaluator can recompute it from the gate's position.
`tb/aes_ref_pkg.sv` contains an independent reference garbler and evaluator.

## Execution: batches and descriptors

Preprocessing sorts the netlist into layers in breadth-first order, so the
gates of one layer do not depend on each other. It then cuts the layers into
batches that fit the hardware. A batch is 16 descriptors of 16 bytes each, in
consecutive 128-bit HBM words from `netlist_base + 16*batch`. Slots 0-7 hold
AND operations and slots 8-15 hold XOR operations.

| bits     | field      | meaning                                              |
|----------|------------|------------------------------------------------------|
| 127:96   | `in0_addr` | address of input 0                                   |
| 95:64    | `in1_addr` | address of input 1                                   |
| 63:32    | `out_addr` | address of the output                                |
| 31:30    | `in0_type` | memory of input 0 (table below)                      |
| 29:28    | `in1_type` | memory of input 1                                    |
| 27:26    | `out_type` | memory of the output                                 |
| 25:5     | reserved   |                                                      |
| 4        | `send`     | also send the output label to the other FPGA         |
| 3        | `valid`    | slot holds an operation (0: empty slot)              |
| 2:0      | `unit`     | which of the 8 AND (or XOR) gates runs it            |

The source gives the three addresses, the fact that the last word holds the
memory types and the gate id, and the 2-bit type codes. The exact bit
positions and the `send` and `valid` flags are this design's own choices.

For each batch, `gc_batch_engine` runs four phases in order:

1. **FETCH**: read the 16 descriptors and file each valid one under its
   `unit`.
2. **READ**: read both input labels of each valid operation from the memory
   named by its type.
3. **COMPUTE**: start all 8 AND gates and the XOR array together, then wait
   for all of them. An AND gate takes 49 cycles.
4. **WRITE**: for each operation in unit order (ANDs first), write the output
   label. For an AND gate, also append its three table rows to HBM from
   `gt_base` onwards, 3 words per gate in batch-then-unit order. If `send` is
   set, queue the label for the network.

Inside FETCH, READ and WRITE the memory requests are pipelined. An issue
pointer sends requests back to back, up to the router's limit of 8 in flight.
A separate retire pointer walks the same steps and takes the answers, which
come back in request order. Network pushes happen at retire time. The phases
themselves do not overlap, and one batch does not overlap the next: a batch's
reads start only after every write of the previous batch has been answered, so
reads that follow writes between layers are always safe. At 20 cycles of HBM
latency, a full batch takes roughly 300-350 cycles, most of it the 49-cycle
AND gates and the HBM round trips at each phase boundary. Overlapping one
batch's fetch and read with the previous batch's computation is the obvious
next step.

## Where labels live

| code | memory      | in this RTL                                          |
|------|-------------|------------------------------------------------------|
| 00   | HBM         | off-chip, through the `hbm_*` port (word address)    |
| 01   | BRAM        | `wire_ram`, 50,000 labels, read latency 4            |
| 10   | URAM        | `wire_ram`, 6,400 labels (100 KB), read latency 8    |
| 11   | network BRAM| `net_rx_buffer`, 1,024 labels received from the peer |

The host puts global inputs and the netlist in HBM. Preprocessing decides which
intermediate labels go on chip: it scores each wire by use frequency divided by
lifetime and keeps the high scorers in BRAM. The hardware only follows the
addresses it is given. The on-chip read latencies (4 cycles for BRAM, 8 for
URAM) stand for the pipelining that cascaded block RAMs need on the target.
BRAM depth trades capacity against clock rate: measured clocks were 266, 214
and 167 MHz for 50k, 100k and 200k labels. 50k is the default here.
`wire_mem_router` steers each request by its type code. Every request gets
exactly one answer, and answers come back in request order.

## Two FPGAs

The partitioner cuts *horizontally*: every layer is divided between the two
FPGAs, so both work at the same time. A vertical cut would make one FPGA wait
for the other. The hardware supports this as follows.

* **Sending.** A gate whose output the other FPGA needs has `send` set. The
  label is queued in `net_tx_sender` as soon as it is written. It leaves as one
  packet `{dest, src, kind, 128-bit label}` to `dest_id`, with at least
  `tx_gap` idle cycles between packets (the *time between packets* kernel
  argument).
* **Receiving, arrival-order addressing.** Packets arrive in the order they
  were sent. The receiver stores the k-th received label at network address k,
  so no address travels in the packet. Preprocessing knows the sender's write
  order and gives every remote input its arrival index as a type-11 address.
* **Waiting.** A read of network address `a` waits while `a >= count`, the
  number of labels received so far. This wait is the only synchronisation
  between the FPGAs during a run. The testbench generates each FPGA's batch
  `L` so that it uses only labels from layers before `L`. With that order the
  wait cannot deadlock.
* **Handshake.** With `two_fpga = 1`, the engine sends a HELLO packet at
  `start` and waits for the peer's HELLO before its first batch. The `cycles`
  counter starts after this point. The receiver remembers a HELLO that arrives
  before the local start.

The network BRAM, the FIFO and the HELLO flag are cleared only by reset, so
reset the kernel between runs.

## Module map

```
gc_overlay_top                 one FPGA kernel (top)
├── gc_batch_engine            batch FSM, handshake, counters
│   ├── garbled_and_gate ×8    one AND gate each
│   │   └── aes128_core        iterative AES-128, 11 cycles per block
│   └── free_xor_array         8 XOR lanes, 1 cycle
├── wire_mem_router            type-prefix routing, network wait
├── wire_ram  (u_bram)         BRAM labels
├── wire_ram  (u_uram)         URAM labels
├── net_rx_buffer              network BRAM + handshake flag
└── net_tx_sender              network state machine, packet gap
rtl/gc_pkg.sv                  shared types: label, descriptor, packets
rtl/aes_pkg.sv                 AES round functions, S-box computed from GF(2^8)
```

## Interfaces and timing

* **Kernel arguments** are sampled at `start`: `two_fpga`, `node_id`,
  `dest_id`, `tx_gap`, `netlist_base`, `num_batches`, `gt_base`, `delta` (bit 0
  forced to 1) and `aes_key`. `done` rises at the end of the run and stays high
  until the next `start`. `cycles`, `and_count`, `xor_count`, `packets_sent`,
  `labels_received`, `net_wait_cycles` and `tx_gap_cycles` report on the run.
* **HBM port**: the overlay sends a request `{we, addr, wdata}` with
  valid/ready. The memory answers every request, writes included, in order,
  with one `hbm_rsp_valid` cycle. Any latency and back-pressure work.
* **Network ports**: valid/ready packet streams. The receive side is always
  ready.
* **Latencies**: AES core, 11 cycles from start to done. AND gate, 49 cycles
  (1 + 4 hashes x 12). XOR array, 1 cycle. Router: a request is passed to its
  memory in the cycle it is accepted, and a new one can follow every cycle,
  with up to 8 in flight. Answers (`rsp_valid`, held until `rsp_ready`) come
  back in request order. An on-chip read is answered after the memory's read
  latency at the earliest, an on-chip write in the next cycle, and an HBM
  request when HBM responds.
* **Reset** is asynchronous and active-low. It clears all control state but
  not the memory contents.

## Simulation

All files are SystemVerilog-2017. To simulate a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gc_pkg.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_gc_overlay_top.sv \
    --top-module tb_gc_overlay_top -o sim && ./obj_dir/sim
```

Swap in another `tb/tb_*.sv` and its top module to run a different test. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_aes128_core`       | FIPS-197 vectors, 50 random blocks against the reference, 11-cycle latency |
| `tb_garbled_and_gate`  | C0 and the 3 rows against the reference garbler; all 4 input combinations evaluate to the AND label; 49-cycle latency |
| `tb_free_xor_array`    | per-lane XOR, masked lanes hold, 1-cycle latency |
| `tb_wire_ram`          | random read/write against a shadow copy, exact read latency |
| `tb_net_rx_buffer`     | arrival-order storage, count, HELLO flag, overflow |
| `tb_net_tx_sender`     | packet order and fields under random back-pressure; minimum spacing `gap+1`; FIFO full |
| `tb_wire_mem_router`   | all four memory types with real memories and an HBM model, first one request at a time, then a back-to-back burst with answers refused at random; order, data, at least 4 requests in flight, reads of late network labels stall |
| `tb_gc_overlay_top`    | the whole system at default sizes (below) |
| `tb_gc_workloads`      | two-FPGA speed-up on a PageRank-shaped and a K-means-shaped circuit (below) |

`tb_gc_overlay_top` generates a random 14-layer circuit and splits each layer
between two overlay instances. It places labels in all three memories, marks
cross-cut labels for sending, and numbers them in arrival order. Each instance
gets its own HBM model, with random back-pressure and 20 cycles of latency.
The two are joined by link models with 40 cycles of latency. The test starts
FPGA 1 200 cycles late, so FPGA 0 must wait in the handshake. It checks every
output label in place and every table row in HBM. It then evaluates the
circuit from the tables the hardware wrote, for random inputs, and compares
the decoded results with plain Boolean evaluation. A second run repeats this
in single-FPGA mode. The test also counts that each mechanism happened at
least once: handshake wait, network-label wait, packet gap, HBM back-pressure,
reads of all four memories, writes of three, empty slots, all 8 AND gates busy
together, and single mode.

`tb_gc_workloads` generates two circuits of about 300 gates in 12 layers. The
first is shaped like the PageRank workloads: its two halves never share a
label. The second is shaped like the K-means workloads: about 3% of the
inputs come from the other half. The test runs each circuit on one overlay,
with every layer as two batches, and on two overlays, with each half-layer as
one batch. It checks all results in both runs and requires a speed-up of at
least 1.8 (single-FPGA cycles over the slower FPGA's cycles). The speed-up
measured is 1.99-2.01 for the two circuits. Only 7-8 labels cross the cut in
each direction, and they arrive long before they are needed, so no read waits
for the network.

## Departures from the published system, and limits

* **Schedule.** The published overlay keeps its gates as busy as the memory
  bandwidth allows. This engine pipelines memory requests only inside a phase
  and never overlaps batches (see above), so its cycle counts are not
  comparable with the published ones. On the test circuits it spends roughly
  27 cycles per gate, where the published numbers are about 17.
* **Garbling details.** The hash, the tweak, the row order, where the garbled
  tables go, and forcing `delta[0]` to 1 are this design's choices. The source
  names the techniques but not these details.
* **Descriptor layout.** The bit positions in the control word and the `send`
  and `valid` flags are this design's choices. The source describes the
  send/receive bookkeeping only as a map kept by preprocessing.
* **URAM.** URAM is instantiated because the address code reserves it.
  Measured results favoured HBM + BRAM alone, so a build without URAM would
  only need the code 10 to go unused.
* **Sizes.** The network BRAM (1,024 labels) and the transmit FIFO (16) are
  assumed sizes. The largest published cross-FPGA traffic is 128 labels per
  FPGA.
* **Outside this RTL.** HBM, the UDP/Ethernet stack and switch, the
  host/PCIe shell, and all preprocessing software (netlist generation,
  layering, FM partitioning, memory allocation) are not included. The
  testbench models HBM and the network, and does the preprocessing itself.
* **Two FPGAs only.** Each instance talks to one peer (`dest_id`).
