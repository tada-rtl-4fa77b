# Task-decoupling interconnect for battery-less IoT nodes

A battery-less sensor node runs on harvested energy, so it runs in bursts and
loses its state whenever the storage capacitor drains. Different slices of a
typical IoT application also suit very different microcontrollers: a low-power
16-bit MCU for sensing and baseband generation, an MCU with an FPU for signal
processing, an MCU with a neural-network accelerator for inference. This design
lets each slice (a *task*) run on the MCU best suited to it, with each MCU on
its own capacitor, by putting a small interconnect between them:

* tasks never share memory; they only hand each other messages through the
  interconnect (decoupled in **space**);
* messages wait in **non-volatile** FIFO queues, so a producer and its
  consumer never need to be powered at the same time (decoupled in **time**).

The interconnect is reached over SPI. It keeps one FIFO queue per
producer/consumer pair of MCUs, fixed when the hardware is built, and offers
three operations that map one-to-one onto a tiny driver API:

| API call                     | what the interconnect does                                   |
|------------------------------|--------------------------------------------------------------|
| `push(message, size)`        | append one item to the caller's outgoing queue               |
| `pull(message, size, id)`    | remove the oldest item of the queue from MCU `id` to caller  |
| `status(id)`                 | report whether those queues can take / give an item          |

GPIO lines tell every MCU whether data is waiting or space is free, and a
wake-up line lets an MCU that found the interconnect not ready sleep until it is.

## Block structure

```
            per-MCU SPI pins                       per-MCU GPIO lines
                 |                                        ^
          +--------------+     +-----------+      +--------------+
          | spi_port_mux |---->| spi_slave |      | status_gpio  |
          +--------------+     +-----------+      +--------------+
             caller id |        bytes |  ^ reply bytes    ^ full/empty
                       v              v  |                 |
                    +--------------------------+    +-------------+
                    |      mem_ctrl_fsm        |<-->| queue_table |
                    +--------------------------+    +-------------+
                         | set-up / abort
                         v
                    +----------+       +-----------------+
      SPI bytes <-->| dma_ctrl |<----->| nvm_fifo_buffer |
                    +----------+       +-----------------+
```

| module             | role |
|--------------------|------|
| `tada_interconnect`| top level, wires everything below |
| `spi_port_mux`     | serves one MCU at a time; the served port number is the caller's identity |
| `spi_slave`        | SPI mode-0 target, byte receive, one-byte transmit holding register |
| `mem_ctrl_fsm`     | transaction decoder, queue checks, DMA set-up, commits, result/status bytes |
| `dma_ctrl`         | moves message bodies between SPI and NVM without the state machine |
| `nvm_fifo_buffer`  | 64 KB byte memory holding the queues; never reset |
| `queue_table`      | head/tail/count per queue; cleared only by `fmt` |
| `status_gpio`      | `data_ready`, `space_ready`, `wake` per MCU |
| `tada_pkg`         | opcodes, result codes, status flag bits, queue configuration type |

The split into SPI controller, DMA controller, a memory-control state machine
and an NVM FIFO buffer follows the reference architecture; the port mux, the
queue table as a separate block and the GPIO block are this design's own
partitioning.

## Persistence and the commit rule

This is the part that makes the design work on intermittent power, and the
part to understand before changing anything.

* `rst_n` stands for *power coming back*. It clears the SPI controller, the
  port mux, the DMA, the state machine and the wake flags. The interconnect
  is meant to have no energy store of its own. It is powered from the
  capacitor of whichever MCU is using it, so it may be reset between any two
  transactions. `tb_full_size_phm` does exactly that.
* The NVM array and the queue pointers (`head`, `tail`, `count` in
  `queue_table`) are **not** touched by `rst_n`. In silicon they would live in
  non-volatile storage; in the RTL they are registers without a reset. They
  are cleared only by `fmt`, which is meant to be pulsed once when the system is
  first deployed. (In simulation they start random until `fmt` is applied.)
* A queue changes only by a one-cycle **commit** issued after a complete
  message has crossed the link:
  * a push commits (tail advances) when its last data byte has been received
    and written to NVM;
  * a pull commits (head advances) when the MCU has clocked in the last data
    byte.

  If CS_n rises early, because the MCU's own capacitor ran out, or the
  interconnect loses power, nothing is committed. A half-written item is
  invisible, and a half-read item is delivered again by the next pull. This
  gives each task's exchange with the interconnect all-or-nothing semantics.

The queue pointers are updated in one clock edge. A power failure exactly on
that edge is outside what the RTL models; an FRAM implementation would need
the usual double-buffered pointer update.

## Queues and their configuration

Queues are fixed at build time through the `QCFG` parameter, an array of
`tada_pkg::queue_cfg_t` entries `{src, dst, item_bytes, depth}` built with
`tada_pkg::qcfg(src, dst, item_bytes, depth)`. Queue regions are laid out back
to back from NVM address 0. An elaboration check stops the build if they do not
fit in `NVM_BYTES`. Every queue holds items of one fixed size. A push or pull
whose length differs from that size is refused with `RES_BADLEN`. A push goes
to the first queue whose producer is the caller, because a push names no
destination.

The default build is a three-stage image-classification pipeline:

| queue | producer -> consumer          | item        | depth | bytes  |
|-------|-------------------------------|-------------|-------|--------|
| 0     | MCU 0 (camera) -> MCU 1 (inference) | 64x64 bytes | 15 | 61,440 |
| 1     | MCU 1 (inference) -> MCU 2 (radio)  | 4 bytes     | 15 | 60     |

That is 61,500 of the 65,536 NVM bytes. The other two pipelines the design was
sized for need only a parameter override:

```systemverilog
import tada_pkg::*;
// environment monitoring: sensing+processing MCU -> radio MCU
tada_interconnect #(.N_MCU(2), .N_QUEUES(1),
                    .QCFG('{qcfg(0, 1, 4, 700)})) u_env (...);
// activity recognition: accelerometer MCU -> inference MCU -> radio MCU
tada_interconnect #(.N_MCU(3), .N_QUEUES(2),
                    .QCFG('{qcfg(0, 1, 4, 700), qcfg(1, 2, 4, 700)})) u_har (...);
```

## SPI transactions

Mode 0 (MOSI sampled on the rising SCLK edge, MISO changes after the falling
edge), MSB first. Byte 0 is `{opcode[1:0], id[5:0]}` with `OP_PUSH = 01`,
`OP_PULL = 10`, `OP_STATUS = 11`. Lengths are 16-bit, big-endian.

```
PUSH    MOSI: 40     len_hi len_lo d0 .. d(len-1)  xx
        MISO: --     --     --     --    --        result
PULL    MOSI: 80|id  len_hi len_lo xx    xx .. xx
        MISO: --     --     --     result d0 .. d(len-1)
STATUS  MOSI: C0|id  xx     xx       xx
        MISO: --     flags  count_hi count_lo
```

Result codes: `RES_OK 01`, `RES_FULL 02`, `RES_EMPTY 03`, `RES_NOQUEUE 04`,
`RES_BADLEN 05`. Status flags: bit 0 an item waits in queue id->caller, bit 1
the caller's outgoing queue has space, bit 2 queue id->caller exists, bit 3 the
caller has an outgoing queue. `count` is the number of items in queue
id->caller.

A refused push still clocks its data bytes (they are discarded) and then
returns the reason. A refused pull returns the reason and then zeros. An MCU is
expected to call `status` first, as its *pre-execution check*, and to run
its task only if the interconnect can take its output or give it input.

### Timing rules for the MCU side

* `clk` must be at least 10 times the SCLK frequency, i.e. each SCLK half
  period spans at least 5 clock cycles. The SPI pins are oversampled through
  two-flop synchronisers, and every reply byte is placed in the holding
  register within a few cycles of the byte before it.
* After lowering CS_n, wait at least 8 `clk` cycles before the first SCLK edge
  (port grant and synchronisation).
* Only one MCU is served at a time. An MCU that lowers CS_n while another one is
  being served is refused for that whole transaction: it reads zeros and its
  `spi_collision` bit is high. It must raise CS_n and retry. On a tie the
  lowest-numbered port wins.

At SCLK = clk/10, moving one 4,096-byte item takes about 328,000 clock cycles
(80 cycles per byte, 4,100 bytes with header and result).

## GPIO lines

Per MCU `i`:

* `gpio_data_ready[i]`: some queue consumed by `i` holds an item;
* `gpio_space_ready[i]`: the queue `i` pushes into has a free slot;
* `gpio_wake[i]`: set when either of those rises, cleared when `i`'s next SPI
  transaction is granted.

The ready lines are computed from the persistent queue state, so they are
valid right after power-up. A wake-up can be raised by a push that has
committed while the producer still holds its link for the result byte. The
woken MCU may therefore be refused once (`spi_collision`) and should retry
after a short delay.

## Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; power-on reset (control state only) |
| `fmt` | in | 1 | empty all queues |
| `spi_sclk`, `spi_cs_n`, `spi_mosi` | in | N_MCU | SPI from each MCU |
| `spi_miso` | out | N_MCU | SPI to each MCU |
| `gpio_data_ready`, `gpio_space_ready`, `gpio_wake` | out | N_MCU | see above |
| `q_count` | out | 16 x N_QUEUES | items per queue (observation) |
| `spi_collision` | out | N_MCU | MCU refused, another one is served |
| `op_done`, `op_res` | out | 1, 8 | pulse and result code when a push or pull completes |

Parameters: `N_MCU` (3), `N_QUEUES` (2), `QCFG` (see above), `NVM_BYTES`
(65536). MCU ids are 6 bits, so up to 64 MCUs.

## Where this departs from the reference system, and what is assumed

* The reference interconnect is firmware on a low-power MCU with built-in
  FRAM, its SPI and its DMA. This is a custom circuit with the same semantics.
  The NVM is an ordinary memory array that reset never clears. An FRAM macro
  with the same ports would replace it in silicon. FRAM timing, endurance and
  power-down behaviour are not modelled.
* The driver API declares an 8-bit message size, but image items are 4,096
  bytes. This design uses a 16-bit length.
* Items have a fixed size per queue; there are no variable-length messages.
* The SPI framing, result codes, status format, commit points, port
  arbitration, GPIO set and wake rule are this design's choices. The reference
  system names these functions but does not specify them.
* Everything outside the interconnect is not in this RTL: the MCUs, radios,
  backscatter tag, sensors, harvesters, capacitors and the MCU-side
  driver. `tb/mcu_spi_model.sv` models the bus side of the driver for
  simulation.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb rtl/tada_pkg.sv \
          tb/tb_tada_interconnect.sv --top-module tb_tada_interconnect
./obj_dir/Vtb_tada_interconnect
```

| testbench | what it covers |
|-----------|----------------|
| `tb_tada_interconnect` | small configuration, three MCU models. Covers push, pull, full, empty, wrong size, missing queue, cut-short push and pull, power failure with data kept, wrap-around, status, wake-up and refused second MCU. Each one is counted and must occur |
| `tb_full_size_phm` | default parameters: 15 images fill queue 0 and a 16th is refused. Then a power failure. Then all images pass through both stages, byte-checked (about 10 M cycles, seconds in Verilator) |
| `tb_workloads_aem_har` | 700 x 32-bit queues. In the single-queue pipeline the producer checks `status` before each push and gives up when there is no space, so the queue saturates at 700 items; the consumer then drains it in order. In the two-queue pipeline 700 samples pass through both stages |
| `tb_spi_slave`, `tb_spi_port_mux`, `tb_dma_ctrl`, `tb_nvm_fifo_buffer`, `tb_queue_table`, `tb_mem_ctrl_fsm`, `tb_status_gpio` | one block each, against reference models |

`tb/mcu_spi_model.sv` provides `push`, `pull` and `status` tasks, with
optional early CS_n release for testing cut-short transfers. Use it to write
new scenarios.
