# An FPGA worker that trains many small neural networks at once

Hyper-parameter searches and feature-selection studies train many small
models on the same data. On a CPU or GPU each model reads every sample
again. This worker keeps up to eight models on one FPGA board and trains
them all on the same sample as it arrives. The sample is stored once in
on-chip block RAM. Every model of the sample's data pipeline reads it from
there, while its weights, gradients and scratch values live in a shared
SDRAM.

The RTL is a complete worker behind two sets of pins: an SPI link to a host
computer and the pins of a 16-bit SDR SDRAM. Through the link a host can
assign models, stream samples, and read back losses and trained weights.
Each model runs one step of stochastic gradient descent (SGD) per sample:
forward pass, MSE loss, backward pass, weight update. The arithmetic is
Q16.16 fixed point.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). The
testbenches run on Verilator 5.

## Block structure

```
 SPI pins ─ spi_slave ─ data_pipeline_router ──┬─ model_manager 0 ─┐
                              │                ├─ model_manager 1 ─┤  job + 3 handles
                              │                └─ ...          7 ──┤
                              │                                    fpu_bank
                              │                              (fpu_job_manager x 8)
                              │ handle 0         handles 1..24 │
                              └──────────────── mmu ───────────┘
                       25 x mem_port_controller (one-line cache)
                    rr_arbiter ─ sdram_controller ─ SDRAM pins
                    rr_arbiter ─ m9k_controller ─ m9k_ram
```

| Module | Role |
|---|---|
| `worker_top` | Wires the blocks together. Brings out the SPI and SDRAM pins, plus one-cycle event outputs for counting. |
| `spi_slave` | SPI mode 0 client. It turns bytes into `rx_valid` pulses and sends reply bytes or a status byte. |
| `data_pipeline_router` | Packet decoder. It stores models in SDRAM and samples in block RAM, and sends commands to the Model Managers. It also streams their exports back to the host. |
| `model_manager` | One per model. It walks the model's layer list and issues one FPU job per operation. It also exports the loss or the whole model. |
| `fpu_bank` | Holds the Job Managers. A Job Manager may serve any Model Manager port, and the bank settles ties. |
| `fpu_job_manager` | Searches the ports for a waiting job. It runs the job by streaming operands through three memory handles into one multiply-accumulate unit. |
| `mmu` | One port controller per memory handle, two round-robin arbiters and the two memory controllers. |
| `mem_port_controller` | One-line write-back cache for a handle, with read-through, write-through and flush. |
| `rr_arbiter` | Round-robin grant. The grant is held while the owner keeps requesting. |
| `sdram_controller` | SDRAM power-up, refresh, and closed-page single-word reads and writes. |
| `m9k_controller`, `m9k_ram` | Block RAM access with a two-clock acknowledge. The RAM has a one-clock read. |
| `ml_pkg` | Shared types (memory handle structs, job, commands), model-image offsets, and the fixed-point multiply. |

## Memory handles and the one memory space

All storage is one space of 2^24 32-bit words. Bit 23 of the address
selects the memory:

- Addresses 0x000000 to 0x7FFFFF are SDRAM: 8 Mi words, or 32 MB.
- Addresses 0x800000 upward are block RAM: 16 Ki words at the default size.

Nothing in the worker addresses memory directly. Every client holds a
*memory handle*, which is a region plus the signals to access it:

- `mh_req_t`, driven by the client:
  - `region_begin` and `region_end` (end exclusive).
  - `ptr`, an absolute address inside the region.
  - The strobes `r_en`, `w_en` and `flush`.
  - The modifiers `read_through` and `write_through`.
  - `data_store`.
- `mh_rsp_t`, driven by the memory side: `avail`, `done` and `data_load`.

A strobe is held until `done` pulses for one cycle, with the read data
arriving alongside it.

The MMU has one port per handle, 25 at the default size:

- Port 0 belongs to the router.
- Ports 1+3i, 2+3i and 3+3i belong to Model Manager i.

While a job runs, the Job Manager serving Model Manager i drives that
Model Manager's three handles. The bank's multiplexer hands them over.

**Port caches.** Each port keeps one line of `LINE` (8) aligned words, with
a dirty bit per word.

- A hit is answered from the line in two clocks, without using the shared
  memory.
- A miss first writes back the dirty words of the old line, then fills the
  new line from memory.
- `read_through` and `write_through` go straight to memory on a miss. On a
  hit they also keep the cached copy current.
- `flush` writes back the line and empties it.

**Why the caches can be lazy, and where they must not be.** Handle regions
never overlap while they are in use, so no port can see another port's
stale copy during a job. Between jobs, the same words are reached through
other handles. For example, one layer's output is the next layer's input.
For this reason every job ends by flushing all three of its handles. The
router writes models and samples with `write_through`, so they are in
memory before any Model Manager is told about them. With these two rules
the caches never need to talk to each other.

**Arbitration.** Each port controller requests the SDRAM or the block RAM
arbiter, according to bit 23 of the address it needs. Once granted, it
keeps the controller for a whole line write-back or fill, then releases it
for one cycle. The arbiter then moves on round-robin, so a busy port cannot
starve the others.

## One training step

A model is a *model image*: a block of words in SDRAM that the host sends
once. Offsets below are word offsets from the image's base address.

| Offset | Content |
|---|---|
| 0 | number of layers L |
| 1 | learning rate λ (Q16.16, **negative**, see below) |
| 2 | number of outputs |
| 3 | loss of the last step (written by the worker) |
| 4 + 8l ... | descriptor of layer l: type (1 linear, 2 ReLU), inputs, outputs, offset of parameters, offset of output z, offset of output gradient dz, offset of gradients dW/db |
| anywhere after | W stored column-major (W[o][i] at i·n_out + o), then b; z, dz, dW then db |

Offsets are added to the base with 24-bit wrap-around. A scratch area such
as z, dz or dW can therefore be placed in block RAM by choosing the offset
so that the sum lands above 0x800000.

The sample region holds x followed by the target y. For a sample, the
Model Manager issues these jobs in order:

1. Forward pass: for each layer, `LIN_FWD` (z = W·x + b) or `RELU_FWD`.
   Layer l reads the previous layer's z, and layer 0 reads x.
2. `MSE_FWD`, which stores L = Σ (y − ŷ)² in header word 3.
3. `MSE_BWD`, which gives dŷ_i = −2 (y_i − ŷ_i).
4. For each layer from last to first:
   - Linear layer: `LIN_WGRAD` (dW = dz·xᵀ), then `LIN_BGRAD` (db = dz).
     Then `LIN_BWD` (dx = Wᵀ·dz into the previous layer's dz; skipped for
     layer 0). Then `LIN_WUPD` (W = W + λ·dW) and `LIN_BUPD` (b = b + λ·db).
   - ReLU layer: `RELU_BWD` (dx = dz where x > 0, otherwise 0).

The update is written as W + λ·dW, so the host stores a negative learning
rate to descend.

A job is an opcode, two sizes and a scalar, plus three handles:

- h1 and h2 are the operands.
- h3 is the result. Update jobs write back through h1.

The Job Manager runs every operation as the same nested loop:

- an optional pre-read,
- an inner loop that reads A and B,
- a multiply-accumulate,
- a write,
- a post-write.

It performs about one multiply-accumulate per two operand reads, so a job's
time is set by memory, not arithmetic.

**Job Managers.** A Job Manager in SEARCHING steps `portno` round-robin
over the ports. When it finds a port with a waiting job that no other
manager holds, it claims the port (FOUND). If two managers want the same
port, the lower-numbered one wins. When the job is done it pulses `done`
on that port and searches on from the next port.

## Host protocol on the SPI link

SPI mode 0, most significant bit first, bytes only. Multi-byte fields are
big-endian.

| Packet | Bytes | Effect |
|---|---|---|
| no-op | `00` | nothing; used to clock out replies |
| ASN_MODEL | `01 dp n[4] word[4]×n` | store an n-word model image in SDRAM; the lowest-numbered free Model Manager takes it and joins data pipeline `dp` |
| SAMPLE | `02 dp n[4] word[4]×n` | store x,y in the block RAM buffer; every Model Manager of pipeline `dp` trains on it |
| GET_METRIC | `03 mm` | reply with Model Manager `mm`'s loss word |
| GET_MODEL | `04 mm` | reply with `mm`'s whole model image |

Models are placed one after another from SDRAM address 0. Space is never
freed.

A *data pipeline* is the feature transformation (for example identity or
grayscale) that the host applies to raw inputs before sending them. The
worker sees only the pipeline's id, and uses it to decide which models
train on a sample.

A reply is the marker byte `A5` followed by the words. When the worker has
nothing to send, it returns the status byte, whose top four bits are always
zero, so `A5` cannot be a status byte:

| Bit | Meaning |
|---|---|
| 0 | busy: a packet is being handled |
| 1 | training: a Model Manager is training |
| 2 | overflow (sticky): a word arrived with the 16-word queue full, or a header arrived while busy |
| 3 | error (sticky): a model arrived and no Model Manager was free; the model was dropped |

The link runs at up to 15.6 MHz, which is only 3.2 system clocks per bit at
50 MHz. For this reason the SPI shift registers are clocked by the SPI
clock itself. Received bytes cross into the system clock through a toggle
and a two-flop synchroniser.

The transmit side runs one byte behind:

1. Halfway through each byte, the byte that will go out next is captured.
2. Only right after such a capture may the router stage a new data byte.

A host must follow these rules:

- Before sending the next packet, read status (send no-ops) until busy is
  clear. A sample waits in the router until the previous training of its
  pipeline is over. While it waits, the 16-word queue fills and further
  bytes are lost.
- To read a reply, send no-ops and skip status bytes until `A5`.
- Leave a pause of about 2 µs (100 system clocks) between the reply's
  bytes. A reply word may
  need an SDRAM line fill before it can be staged. Without the pause, a
  status byte can appear in place of a reply byte.

## SDRAM controller

The controller targets a 32 MB, 16-bit SDR SDRAM (4 banks, 8192 rows) at
50 MHz.

**Power-up.** It waits `INIT_WAIT` clocks (100 µs), precharges all banks,
runs two auto-refreshes, and sets the mode register (burst length 2, CAS
latency 2).

**Refresh.** An auto-refresh runs every `REFRESH_INTERVAL` (390) clocks,
between commands.

**Access.** Each 32-bit word is one activate, then a two-beat read or write
with auto-precharge, low half first. The address map is:

- bank = a[22:21]
- row = a[20:8]
- column = {a[7:0], 0}

A read takes 11 clocks from request to acknowledge, and a write takes 10.
The pins split the data bus into `sd_dq_out`, `sd_dq_oe` and `sd_dq_in`, so
the tristate pad sits outside this RTL.

## Measured performance

Cycle counts are from simulation of `worker_top` at its default parameters
(`tb_workload_5x5`).
Each run is one SGD step of a 5×5 linear layer with MSE loss, timed from
the first Model Manager starting to the last one finishing:

| models in parallel | scratch in SDRAM | scratch in block RAM |
|---|---|---|
| 1 | 7 616 | 5 133 |
| 2 | 12 644 | 8 101 |
| 4 | 24 205 | 15 341 |
| 8 | 48 302 | 30 368 |

Time grows almost linearly with the number of models, because every model's
weights go through the one SDRAM controller. The shared SDRAM bus is the
bottleneck, and the port caches only soften it. Putting the scratch areas
in block RAM saves about a third. The weights still travel over the SDRAM
bus.

## Parameters

| Parameter (worker_top) | Default | Meaning |
|---|---|---|
| `NUM_MM` | 8 | Model Managers (models trained at once) |
| `NUM_JM` | `NUM_MM` | Job Managers in the FPU Bank |
| `LINE` | 8 | words per port cache line |
| `M9K_WORDS` | 16384 | block RAM words (64 KB, 64 M9K blocks of a Cyclone IV EP4CE22) |
| `WQ` | 16 | router word queue depth |
| `SD_INIT_WAIT` | 5000 | SDRAM power-up wait in clocks |
| `SD_REFRESH` | 390 | clocks between auto-refreshes |

At the defaults the block RAM synthesises as 524 288 bits of memory. The
rest of the design is about 10 k flip-flops.

## Where this design follows its source and where it departs

The design follows its source in:

- the block structure: SPI client, Data Pipeline Router, Model Managers, an
  FPU Bank of one Job Manager per Model Manager, and an MMU with per-handle
  port controllers and round-robin SDRAM and M9K controllers;
- the memory handle signals;
- the lazy write-back cache policy;
- writing models to SDRAM and samples to on-chip memory;
- the Model Manager and Job Manager states;
- the list of FPU operations: linear, ReLU and MSE, forward, backward and
  update;
- eight models per board;
- the 15.6 MHz SPI link and the 50 MHz clock.

This design's own choices are:

- **Number format.** Q16.16 fixed point, with one multiplier per Job
  Manager.
- **Handle flush.** A flush request was added to the handle. Every job ends
  with one, and that is what keeps the caches coherent.
- **Formats.** The packet format, status byte, model-image layout and
  descriptor format.
- **Scope.** Only the first layer skips the input gradient.
- **Bias gradient.** It is db = dz, the gradient of z = Wx + b.
- **MSE gradient.** It is taken per output: −2 (y_i − ŷ_i).
- **Job Manager assignment.** Job Managers are not fixed to one Model
  Manager. Any manager may take any waiting port. With one manager per
  port, each job is picked up within a few clocks.
- **Sample buffer.** There is one sample buffer. A new sample waits for the
  previous one's training to end, rather than being queued.
- **Supported layers.** Convolution, pooling and softmax are not supported.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Compile the package first, then the reference package, then the rest. For
example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_worker_top \
  rtl/ml_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v ml_pkg) \
  tb/tb_handle_mem.sv tb/sdram_model.sv tb/tb_worker_top.sv -o sim
./obj_dir/sim
```

| Testbench | What it shows |
|---|---|
| `tb_worker_top` | End to end through the pins, with 2 Model Managers. Two models are trained on three samples. Losses and both whole images are compared word by word with the reference SGD step (`tb_ref_pkg`). The testbench counts assignment, sample hand-out, training, Job Manager steps, cache hits and misses, concurrent training, SDRAM refresh and commands, every Model Manager state, and the training and error status bits. |
| `tb_worker_top_full` | The same flow at every default parameter, with eight models. |
| `tb_workload_5x5` | The performance table above: one SGD step of a 5x5 layer for 1, 2, 4 and 8 models, with scratch in SDRAM and in block RAM. It checks that block RAM scratch is faster and that identical copies report identical losses. |
| `tb_model_manager` | Three training steps bit-exact against the reference, plus export and reassignment. |
| `tb_fpu_job_manager`, `tb_fpu_bank` | Every operation against a software model, and port sharing between managers. |
| `tb_mmu`, `tb_mem_port_controller` | Random reads, writes and flushes per port against a shadow copy, with real SDRAM timing and contention. |
| `tb_sdram_controller` | Init sequence, refresh rate, read and write latency, and protocol rules (via `sdram_model`). |
| `tb_rr_arbiter`, `tb_m9k_controller`, `tb_m9k_ram` | Fairness and held grant; acknowledge timing and data. |
| `tb_spi_slave`, `tb_data_pipeline_router` | Byte framing at the real clock ratio; packet handling, placement, pipeline selection, waiting, export, and the error and overflow bits. |

`sdram_model` is a behavioural SDR SDRAM. It checks command timing, counts
commands and reports protocol errors. `tb_handle_mem` is a memory with
random latency behind memory handles, used by the block testbenches.
