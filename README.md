# A hardware automaton for scratch pad memory heaps and stacks

A scratch pad memory (SPM) is a small on-chip SRAM with single-cycle access, placed in its own
part of the address space. Unlike a cache, nothing in hardware decides what lives in it: software
does. This design moves part of that work into a small coprocessor. The coprocessor sits next to
the processor core and the SPM. Each task of a multitasking operating system gets a *frame* in the
SPM: a heap that grows upwards and a stack that grows downwards, towards each other. The processor
sends the coprocessor one instruction: "load from task 3's heap", "push this word on task 1's
stack". The coprocessor then does the rest:

- it finds the task's bookkeeping record, the *profiler*, in the SPM;
- it performs the access;
- it moves the pointers;
- it tells the processor when the words just written must be copied to DRAM by DMA, or when the
  frame is full.

The operating system keeps the decisions: which task owns which frame, when to start a DMA copy,
and what to do with a full frame.

The RTL follows a published FPGA implementation: a MicroBlaze soft processor, a 128 KB dual-port
block RAM as the SPM, and the coprocessor ("SPM_IP") on the block RAM's second port. Where the
published description is silent, this RTL makes its own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## System structure

```
                 Direct FSL (32-bit word link, no FIFO)
  processor  <-------------------------------->  spm_ip  ---- port B ----+
     |                                                                   |
     |   bus (PLB)                                                  spm_bram (128 KB)
     +---- BRAM controller ------------------------------ port A ----+   |
     +---- dma_controller -- (owns port A while dreq & dgrant) ------+---+
     +---- DDR2 controller --- DRAM (256 MB)
```

`spm_system` is the top. It holds three blocks:

| module | role |
|---|---|
| `spm_ip` | the coprocessor: four units, U1 to U4, described below |
| `spm_bram` | the SPM: a true dual-port RAM of 32-bit words with byte enables and a registered read |
| `dma_controller` | block copies between DRAM and the SPM, started by the operating system |

The processor, the bus, the bus's BRAM controller, the DDR2 controller and the interrupt
controller are not part of the RTL. Their signals are ports of `spm_system`:

- `fsl_*` and `interrupt`: the Direct FSL link to the processor;
- `plb_bram_*`: port A of the SPM as the BRAM controller drives it;
- `dma_*`, `dreq`, `dgrant`: the DMA command, its status and the bus request/grant;
- `dram_*`: the DMA controller's DRAM port.

Port A goes to the DMA controller while `dreq` and `dgrant` are both high, and to the bus
otherwise. Everything runs on one clock with a synchronous, active-high reset.

## Memory layout the coprocessor relies on

All addresses are byte addresses. One word is 4 bytes.

| item | default | meaning |
|---|---|---|
| SPM window | `0x8A22_0000` .. `0x8A23_FFFF` (`SPM_BASE`, `SPM_BYTES` = 128 KB) | an address outside it is not an SPM access |
| profiler table | `PROFILER_TABLE` = `0x8A23_0000` | entry `PROFILER_TABLE + 4*TASK_ID` holds the address of the task's profiler |
| profiler + 0 | `HEAP_CURR_PTR_SPM` | the task's heap top in the SPM |
| profiler + 4 | `STAK_CURR_PTR_SPM` | the task's stack top in the SPM |
| profiler + 8 | `HEAP_CURR_PTR_DRAM` | the matching place in the task's DRAM backup storage (BS) |
| profiler + 12 | `STAK_CURR_PTR_DRAM` | the same for the stack |

The operating system writes the profiler table and the profilers. It can use direct writes over
the FSL link or the bus. Frame allocation lives in DRAM structures that only software manages.
Those structures record which frame is free and which task owns which frame.

The SPM uses only address bits [16:2] to pick a word. The two low bits of a pointer are ignored,
so a pointer such as `0x8A22_000F` addresses the word at `0x8A22_000C`. The published example
uses such pointers, and they behave the same way here.

## The instruction protocol (Direct FSL)

The processor writes 32-bit words with `fsl_m_write`. It must hold each word while `fsl_m_full` is
high. Every request starts with an instruction word:

```
 31 30 | 29 .. 26 | 25 .. 23 | 22 .. 0
  CMD  | TASK_ID  | REQUEST  | ignored
```

| CMD | REQUEST | words after the instruction | what happens | answer |
|---|---|---|---|---|
| `00` | – | data, then address | direct write of the data into the SPM | none; outside the SPM: the address, control bit low |
| `11` | `001` heap load | – | reads the word at the heap top | the word |
| `11` | `010` heap store | data | writes at heap top + 4, moves both heap pointers up by 4 | `0xAAAAAAAA`, or `0xEEEEEEEE` when full |
| `11` | `011` stack push | data | writes at stack top − 4, moves both stack pointers down by 4 | `0xAAAAAAAA`, or `0xEEEEEEEE` when full |
| `11` | `100` stack pull | – | reads the word at the stack top, moves both stack pointers up by 4 | the word |

Other CMD values and REQUEST codes are dropped. Answers appear on `fsl_s_data` with
`fsl_s_exists` and `interrupt` high. They stay there until the processor pulses `fsl_s_read`, and
the link holds one word at a time. `fsl_s_control` is high for data and codes. It is low when
the coprocessor returns an address it could not serve: a direct write outside the SPM window, or
a task pointer that points outside it. The operating system must serve such a request from DRAM.

The answer codes tell the operating system what to do next:

- **`0xAAAAAAAA`**: the word just stored or pushed exists only in the SPM. Copy it to the task's
  backup storage. The DRAM pointers in the profiler have already moved, and they give the
  destination. `tb_spm_system` does exactly this with the DMA controller after every such answer.
  It then checks that DRAM holds the word.
- **`0xEEEEEEEE`**: the heap and the stack of this frame have met. The operating system gives the
  task another frame if the SPM has a free one. Otherwise the task moves to its backup storage in
  DRAM.

## Inside the coprocessor (`spm_ip`)

| unit | module | job |
|---|---|---|
| U1 | `instruction_decoder` | collects FSL words, decodes them, pulses a direct write or starts U2 |
| U2 | `spm_handler` | the state machine that serves one task request |
| U3 | `cpu_interface` | holds the answer on the FSL slave side until it is read |
| U4 | `spm_interface` | owns BRAM port B; direct writes from U1 take priority over U2's accesses |

The handler is the heart of the design. For each task request it goes through these steps:

1. **Profiler load**: five reads. The first read fetches the profiler address from the table. The
   next four fetch the heap/stack pointers for SPM and DRAM. The pointers are loaded again for
   every request, so several tasks can share the coprocessor without any state held between
   requests.
2. **Decision**: one cycle.
   - A store or push needs room: heap top + 4 < stack top. When there is no room, the handler
     answers `0xEEEEEEEE` and changes nothing.
   - An access whose word address falls outside the SPM window is returned to the processor.
3. **Access**: one read or write.
4. **Pointer write-back**: for store, push and pull. Two writes to the profiler: the SPM pointer
   and the DRAM pointer.
5. **Answer** to U3, after waiting if U3 still holds an unread word.

Each SPM access takes two cycles: the request is accepted in one cycle and answered in the next.
From the start pulse to the answer strobe, with U3 free:

| request | cycles |
|---|---|
| heap load | 14 |
| store, push or pull that is performed | 18 |
| full frame, or address outside the SPM | 12 |

`fsl_m_full` is high while the handler works. A new instruction therefore waits until the
previous one has been answered.

## The DMA controller

`dma_controller` copies `len_words` words between `spm_addr` and `dram_addr`. The direction
follows a simple chart:

- A copy towards the SPM runs only when the SPM is not full (`spm_not_full`, an input from the
  operating system).
- Otherwise, and for any copy not towards the SPM, it copies SPM words out to the backup storage.
  `to_bs` reports which way the copy went.

Before touching the buses it raises `dreq` and waits for the processor's `dgrant`. When the last
word is done it drops `dreq`, which frees the buses, and pulses `done` in the same cycle. Each word
costs:

- towards the SPM: one DRAM access plus 1 cycle;
- towards the backup storage: one DRAM access plus 2 cycles.

A DRAM access is the DRAM wait plus 2 cycles.

## Departures and own choices

These come from the published description:

- the overall structure and the four units;
- the port names of `spm_ip`;
- the 128 KB SPM;
- the word order of a direct write, CMD `00` and `11`;
- REQUEST `001` for a heap load and `010` for a heap store;
- the profiler contents and the order they are read in;
- the heap and stack pointer arithmetic;
- the two answer codes;
- the DMA decision chart and the DGRANT handshake;
- the example values that the testbenches replay:
  - heap load returns `0xCCCCDDDD`;
  - a store of `0xF2222222` lands at `0x8A220013` and moves the DRAM heap pointer to `0x90000103`;
  - a push moves the stack pointers to `0x8A22005B` and `0x900010EB`.

These are choices made here:

- **Bit positions** of CMD, TASK_ID and REQUEST. REQUEST codes `011` (push) and `100` (pull).
- **The SPM window and table base.** These were reconstructed from the published example's
  addresses. They are parameters.
- **Full test on the moved pointer.** The published test is "heap pointer < stack pointer". Here
  the test is applied after the pointer would move: heap + 4 < stack. With the literal test, a
  store could overwrite the word at the top of the stack.
- **Pull.** Reading at the stack top and moving both stack pointers up by 4 is a choice made here.
  A pull on an empty stack is not detected, because the profiler does not record the stack base.
- **Out-of-SPM requests.** They are returned to the processor as an address with the control bit
  low. The published design only says such a request is "sent back" to the next memory level.
- **FSL handshake.** The answer is held until `fsl_s_read`, and `fsl_m_full` is used for
  back-pressure. `fsl_m_clk`, `fsl_s_clk` and `fsl_m_control` exist on the port list but are
  not used: the link is treated as synchronous to `fsl_clk`.
- **The DMA controller** is a plain word-by-word engine written to the published decision chart.
  The published system uses a vendor DMA core on the bus instead. The port A multiplexer in
  `spm_system` stands in for the bus arbitration.

Not built:

- The processor and the operating system: the frame table, the backup storage allocation, and
  the FREE/MALLOC procedures, which are software.
- The bus and its BRAM controller, the DDR2 controller and memory, the interrupt controller and
  the timer.
- A chip-select input of the coprocessor. It is named in a block sketch but is absent from its
  port list.
- Sharing one SPM among several cores. This is mentioned as a goal but not described as
  hardware.
- No comparison of sizes or speed with the published FPGA results is attempted. The published
  coprocessor used 591 flip-flops and 972 LUTs on a Virtex-5.

## Files

`rtl/` holds the following:

| file | contents |
|---|---|
| `spm_pkg.sv` | encodings, codes and default addresses |
| `spm_bram.sv` | the SPM |
| `instruction_decoder.sv`, `spm_handler.sv`, `cpu_interface.sv`, `spm_interface.sv` | units U1 to U4 |
| `spm_ip.sv` | the coprocessor |
| `dma_controller.sv` | the DMA controller |
| `spm_system.sv` | the top |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`) and a behavioural DRAM model
(`dram_model.sv`). Each testbench prints `TB_RESULT checks=N failures=M` and stops.

- `tb_spm_handler` checks every answer and the cycle count of every request against a reference
  model. It also checks the memory contents.
- `tb_spm_system` runs the whole subsystem at its default size. It counts each mechanism, and
  fails if any one never happened. The mechanisms are:
  - direct write, and redirected direct write;
  - the four task requests, full frame, redirected task address;
  - FSL back-pressure;
  - the three DMA branches, waiting for the grant;
  - bus access to the SPM.

## Simulating

With Verilator 5, from the repository root (here for the top; use any `tb_<name>` the same way):

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb rtl/spm_pkg.sv \
    rtl/spm_bram.sv rtl/instruction_decoder.sv rtl/spm_handler.sv rtl/cpu_interface.sv \
    rtl/spm_interface.sv rtl/spm_ip.sv rtl/dma_controller.sv rtl/spm_system.sv \
    tb/dram_model.sv tb/tb_spm_system.sv --top-module tb_spm_system -o sim
./obj_dir/sim
```

Every testbench ends in well under a second of simulation time.

Lint warnings:

- `spm_bram` writes one array from two clocked processes. This is the usual true dual-port RAM
  template, and Verilator reports it as a multi-driven signal.
- Unused-input warnings refer to the FSL clock and control pins listed above.
