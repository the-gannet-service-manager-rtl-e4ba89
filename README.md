# Gannet Service Manager

In a Gannet system on chip, every IP block (a *service core*) sits on a
network on chip behind a small controller, the **Service Manager**. The
cores are not programmed one by one. The system instead sends the program
across the network as packets: compiled subtasks, requests to run them, and
the data they produce. Each Service Manager stores the code it receives,
starts a subtask when it is asked to, and sends requests out for the
subtask's arguments. It collects the argument data as it comes back, hands
the finished argument list to its core, and sends the core's result to
whoever asked for it. The dataflow control is therefore spread over all
the Service Managers; the cores only compute.

This repository holds synthesizable SystemVerilog for one Service Manager
with its data memory, plus self-checking testbenches. The top module is
`gannet_sm`.

## Packets and symbols

Every packet carries three header words followed by a payload. Traffic is
32-bit LocalLink: active-low `sof_n`, `eof_n`, `src_rdy_n` and `dst_rdy_n`.
A word moves on a clock edge where both readies are low.

| word | contents |
|------|----------|
| H0 | `[31:29]` packet type, `[23:16]` destination service, `[15:8]` source service, `[7:0]` payload length |
| H1 | `[7:0]` *return-to*: the service that should receive the result |
| H2 | *return-as*: the symbol under which the result is returned. A code packet puts the symbol naming its subtask here. |

There are three packet types (`gannet_pkg::pkt_type_e`):

- `P_CODE = 1`: a code packet. Its payload is the symbols of one subtask.
- `P_REF = 3`: a reference packet. Its payload is the reference symbol of the subtask to run.
- `P_DATA = 4`: a data packet. It carries a result back to the service that asked for it.

Any other type is read in full and thrown away.

A program is a tree of subtasks, written like `R0 => (S R1 R2 C1 R3 R4)`.
Here `S` is the service (the operation), `R1..R4` are references to other
subtasks whose results are the arguments, and `C1` is a constant. Each
symbol is one 32-bit word:

| bits | field |
|------|-------|
| `[31:29]` | kind: `K_S = 0` service, `K_R = 4` reference, `K_B = 6` constant |
| `[27]` | extended: more words of the constant follow |
| `[23:16]` | service id. For a reference, this is the service that holds the referenced code. |
| `[7:0]` | for an extended constant, the number of extension words |
| `[6:0]` | address: the code chunk and symbol-table slot |

### Chunks

The code memory and the data memory both have 1024 words. Each is cut into
128 chunks of 8 words, and a 7-bit address names a chunk.

- **Code.** A code packet for chunk *n* is stored at `n*8 ..`.
- **Data.** A data packet returned as reference symbol *n* is stored at data
  words `n*8 .. n*8+7`.
- **Constants.** A subtask's constants go into its own chunk's area in the
  data memory.

## How the blocks work together

```
            +--> CodeWrite ------> CodeMemory ---+
 network    |       |  ^ CodeStatusMemory        |
 ---------> DeMux ---+--> ActivateSubtask <------+ --> ParseSubtask --+--> subtask queue --> core
            |                                      |   |   |         |
            +--> DataWrite <-- SymbolTable <-------+   |   |         +--> reference packets --+
                    |                                  |   v                                  |
                    +-------------> DataMemory <--------+ (constants)      core reads <--+    |
                                                                                          |    v
 network <--------------------------------- OutputMux <--- Packetisation <-- result queue <-- core
```

- **`sm_demux`**: routes each incoming packet by the type field of H0. The
  routing is combinational, and the choice is held from `sof` to `eof`.
- **`code_write`**: stores the payload of a code packet at its chunk. At the
  last word it records the chunk as present, with its length, in
  **`code_status_memory`**. One cycle later it raises `req_actv` for that
  chunk. A chunk that is loaded again, while already present, raises no
  `req_actv`.
- **`activate_subtask`**: takes reference packets. When the referenced chunk
  is present, the subtask is activated at once. Activation streams the
  chunk's words out of **`code_memory`**, one per cycle, and passes the
  return-to id, return-as symbol and chunk number on side signals.
  - When the chunk is absent, the reference is *parked* in a one-entry
    slot. The matching `req_actv` from `code_write` releases it, so a
    reference may arrive before its code.
  - While the slot is occupied, a second reference whose code is also
    absent waits at the input. Because all packet types share the input
    link, this holds back every later packet, code packets included.
- **`parse_subtask`**: takes one symbol per cycle.
  - **Service symbols** are queued for the core.
  - **Reference symbols**:
    - set their slot in **`symbol_table`** to present;
    - queue an argument word holding the slot's data-memory address;
    - send a 4-word reference packet (3 header words plus the symbol) to
      the service named in the symbol. The input waits for those four
      words.
  - **Constants**, with their extension words, are written into the data
    memory, and their address is queued.
  - After the last symbol, the return-to and return-as words close the
    record, and `subtask_ready` pulses.
- **`data_write`**: looks up the symbol table slot of a data packet's H2
  symbol. The payload, at most 8 words, is stored if the slot is present.
  Otherwise it is dropped: nobody asked for it.
- **`packetisation`**: for each `result_ready` pulse, reads one result
  record from the result queue and sends it as a data packet.
- **`output_mux`**: merges reference packets and result packets onto the
  outgoing link.
  - The output is locked for a whole packet.
  - When both sources wait, they take turns.
  - It adds no delay.
- **`sync_fifo`**: the subtask and result queues (32 entries each).
- **`data_memory`**: 1024 x 32 with three ports.
  - **A**: writes from `data_write`. Port A wins if both write ports hit
    the same word.
  - **B**: writes from `parse_subtask`.
  - **C**: a synchronous read port for the core.

The LocalLink bundles inside the top are instances of the interface `ll_if`.
It carries an assertion that a source holds its word until that word is
taken. Types and field helpers live in `gannet_pkg`.

## Timing of one activation

The critical path of the design is the time from a subtask's code arriving
to its argument requests leaving. Take the example subtask
`R0 => (S R1 R2 C1 R3 R4)`, with `C1` three words long, whose reference
packet came first and is parked:

| cycles | what happens |
|--------|--------------|
| 11 | the code packet enters (3 header + 8 payload words), one word per cycle |
| 9 | `req_actv`, status check, code-memory read latency, and the parsing cycles that are not hidden behind outgoing words (the service symbol and the constant with its extension words) |
| 16 | four reference packets of 4 words leave, one word per cycle |

From the first code word in to the last reference word out takes **36
cycles**, which is 20 + 4 per reference packet. The end-to-end testbench
measures this and fails if it is different.

## Core interface

- **Subtask queue** (`subtask_rd`, `subtask_data[32:0]`, `subtask_empty`,
  `subtask_ready`). One subtask is a record of 33-bit words, in this order:
  - the service symbol;
  - one argument word per argument, `{kind[31:29], 0, data-memory address[9:0]}`;
  - the return-to id;
  - the return-as symbol, with bit 32 set.

  `subtask_ready` pulses once the whole record is queued. Argument data is
  read through `core_dm_rd_en` / `core_dm_addr`, with `core_dm_data` valid
  one cycle later.
- **Result queue** (`result_wr`, `result_data`, `result_full`,
  `result_ready`). The core writes these words:
  - `{16'b0, length[15:8], destination service[7:0]}`;
  - the return-as symbol;
  - `length` payload words.

  It then pulses `result_ready` once.

All control state is reset by the synchronous active-low `rst_n`. The code
status and the symbol table are cleared too; memory contents are not.

## What is this design's own choice

The block structure, its connections, and these numbers follow the
original description of the Service Manager:

- three header words;
- 32-bit LocalLink with active-low controls;
- 1024-word memories;
- 8-word data chunks;
- a 7-bit symbol address;
- the 36-cycle activation.

The following were not specified and were chosen here:

- the bit layout of headers and symbols, and the type and kind codes;
- the queue record formats and the queue depths (32);
- the `SERVICE_ID` parameter (default 1);
- data-memory port priority;
- output arbitration;
- reset behaviour;
- the one-entry parking slot for early references.

Known departures:

- **Data chunk placement.** The original simulation shows data chunk 5 at
  words 41..48. Here chunk *n* is at `n*8 .. n*8+7` (40..47 for chunk 5).
- **Constants.** The original stores constants at a data-memory address
  whose rule is not given. Here they go into the subtask's own chunk area.
- **Symbol words.** The reference symbols in the original simulation have
  `111` in bits `[7:5]`, and only their low five bits match the slot they
  name. The meaning of those upper bits is not known. This design reads
  the full `[6:0]` as the address, so those exact words would name
  different slots here.
- **Symbol table.** It is never cleared except by reset. A result arriving
  for a slot that was requested once is always accepted.
- **Parking slot.** Two references whose code has not yet arrived must not
  be in flight at once. The second one holds the shared input, so the
  code that would release the first can never enter, and the Service
  Manager hangs until reset. The system is meant to load code before it
  sends references, so this case only arises when that order is broken.
- **Latency in the original summary.** The original also quotes 30 cycles
  as the activation latency. This design meets the detailed 36-cycle
  breakdown instead.
- **Not built:**
  - a table of active subtasks, proposed only as future work;
  - the network interface;
  - the service core itself.

## Files

- `rtl/gannet_pkg.sv`: shared types, packet and symbol field helpers.
- `rtl/ll_if.sv`: LocalLink interface with a hold assertion.
- `rtl/gannet_sm.sv`: the top.
- `rtl/sm_demux.sv`, `code_write.sv`, `activate_subtask.sv`,
  `parse_subtask.sv`, `data_write.sv`, `packetisation.sv`,
  `output_mux.sv`: the Service Manager blocks.
- `rtl/code_memory.sv`, `code_status_memory.sv`, `symbol_table.sv`,
  `data_memory.sv`, `sync_fifo.sv`: memories, tables and queues.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/ll_source.sv` and `tb/ll_sink.sv` are LocalLink drivers with random
  gaps and back-pressure.

`tb/tb_gannet_sm.sv` runs the top at its default sizes. It walks through
this sequence:

1. A data packet arrives early and is dropped.
2. A reference arrives before its code and is parked.
3. The example code packet arrives, the subtask is activated, and the
   36-cycle check runs.
4. Four reference packets leave.
5. The constant is found in the data memory.
6. Argument data is stored.
7. A behavioural core computes a result, and the result is sent as a data
   packet.
8. A second activation runs under output back-pressure and contention.
9. A packet of unknown type is discarded.

The testbench counts every one of these events and fails if any never
happens.

`tb/tb_gannet_sm_random.sv` also runs the top at its default sizes, under
random traffic. A reference model in the testbench predicts every output.

- **Subtasks.** 60 random subtasks mix references, plain constants and
  extended constants. In half of them the reference comes before the code,
  so the reference is parked.
- **Results.** A behavioural core checks each subtask record and returns
  30 results at random times.
- **Data.** 80 data packets go to random symbol slots.
- **Link conditions.** The input has random gaps, and the output applies
  random back-pressure.
- **Final check.** The testbench reads back every data-memory word the
  model wrote, and compares every event count with the model.

At most one reference is parked at a time, because the single parking
slot can stall otherwise (see above).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/gannet_pkg.sv tb/tb_gannet_sm.sv --top-module tb_gannet_sm
./obj_dir/Vtb_gannet_sm
```

Replace `tb_gannet_sm` with any other `tb_<module>` to test one block. Each
run takes well under a second.
