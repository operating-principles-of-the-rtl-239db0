# VME MultiKron interface board in SystemVerilog

The MultiKron is a performance measurement chip. A program under test
triggers a measurement by writing to a memory-mapped "probe" address on the
chip. The chip then emits a 16-byte Trace Sample that holds a header, the
probe data, a timestamp and a Source Address register. This board lets a
computer that has a VME bus but no MultiKron of its own use one:

- It maps the chip into the VME address space.
- It widens the 32-bit VME path to the chip's 48-bit input and 64-bit output.
- It catches the chip's Sample stream in a FIFO.
- It stores the Samples in 16 MB of local memory (up to 1,048,576 Samples),
  or sends them over a cable to a second computer.

This RTL describes the board's logic as synchronous SystemVerilog around
one 40 MHz clock. The MultiKron chip, the commercial DRAM controller and the
SBus card at the far end of the cable are not part of the RTL. They appear
as ports, and the testbenches use a behavioural MultiKron model.

## Address map

The board answers in a 32 MB window whose base is set by the `BASE_ADDR`
parameter (default `2000_0000` hex). Every access is an aligned 32-bit word.
The address modifier and the byte lanes are ignored, and block transfers are
not supported. Offsets are relative to the base:

| offset | access | function |
|---|---|---|
| `000_0000`–`0FF_FFFC` | R/W | local Sample memory, 4 M words |
| `100_0000`–`100_01FC` | R/W | MultiKron, 128 words (chip address = offset[8:2]) |
| `100_0400` | W | Control register (24 bits, below) |
| `100_0404` | W | Counter Input register IRC[15:0] |
| `100_0408`, `100_040C` | W | not used (acknowledged, ignored) |
| `100_0410` | W | Sample address pointer |
| `100_0414` | W | high-order input register (MultiKron data bits 47:32) |
| `100_0418` | W | FPULSE: let one network byte through in Single Pulse Mode |
| `100_041C` | W | RESET the board's Sample path and the MultiKron |
| `100_0500` | R | Status register |
| `100_0504` | R | FIFO TEST register FQ[15:0] |
| `100_0508`, `100_050C` | R | not used (read 0) |
| `100_0510` | R | Sample address pointer |
| `100_0514` | R | high-order output register (MultiKron data bits 63:32) |
| `100_0518` | R | board version, `03` |

The board never answers a read of a write-only offset or any offset missing
from this table. The VME bus timer then ends the cycle.

Control register bits: 7:0 ICPU (CPU ID lines), 8 MANPUL, 9 MANSW, 10 MEMW
(store Samples locally), 11 DROP, 12 EXT_RSC, 13 EXT_CPU, 17:16 WAIT (MultiKron
wait states), 18 NOTESTB, 19 TEST2, 20 OUTEN, 21 SPM, 22 LOCAL, 23 NOWRAP.
The normal operating value is `D50C01`. It stores Samples locally as a simple
buffer with DROP, takes the CPU ID and counter inputs from the registers,
uses CPU ID line 0, sets one wait state and enables the MultiKron outputs.

Status register bits: 7:0 TST (MultiKron TEST2 output), 9 EFB (0 = FIFO
empty), 10 FFB (0 = FIFO full), 11 NETRDY, 15:12 WSB (index of the next byte
of the word being packed, 0 = most significant), 19 SMWREQ (a Sample word is
on its way to memory), 21 MEMFULL.

## The 32/48/64-bit MultiKron path

The chip takes up to 48 bits per write and returns 64 bits per read. Two
holding registers make up the difference:

- To write 48 bits, software first writes bits 47:32 to the high-order input
  register, then writes bits 31:0 to the MultiKron address. The board then
  presents all 48 bits at once. The register keeps its value afterwards, so a
  plain 32-bit write also carries it. This is harmless, because the chip
  ignores the upper bits of a 32-bit operation.
- Every MultiKron read returns bits 31:0 on the VME bus and loads bits 63:32
  into the high-order output register. Software can then read that register
  at its own address.

Nothing makes the two halves indivisible. An interrupt or another processor
can change a holding register between the two accesses. Time-critical
probes should therefore use 32-bit data only.

A MultiKron access holds `mk_cs` until the chip raises `mk_ready`, and the
VME cycle waits for it. This is how the chip's wait states stretch a bus
cycle. It is also how a full internal FIFO in the chip can hold the
processor off.

## Sample flow

```
MultiKron net ──► mib_net_if ──► mib_fifo (1024 x 16) ──► mib_fifo_reader
  (byte+eos+parity,   NETRDY / SPM                          │   │    │
   20 MHz)                                                  │   │    └─► FQ test register (MANPUL)
                                                            │   └─► mib_ext_sbus_if ─► 16-bit cable (LOCAL=0, 10 MHz)
                                                            ▼
                                        mib_sample_packer (4 bytes → 32-bit word, holding register)
                                                            ▼
                                        mib_mem_pointer (placement, full/wrap/drop policy)
                                                            ▼
                         VME ──────────► mib_mem_arbiter ─► mib_local_mem (4 banks x 1M x 32)
```

- **Into the FIFO.** The chip sends one byte per transfer, with an
  end-of-Sample flag and odd parity. A FIFO entry is
  `{6'b0, parity, eos, data}`. A transfer takes place on a 20 MHz clock
  enable, when the chip offers a byte (`net_valid`) and the board is ready
  (`netrdy`). Normally `netrdy` is simply "FIFO not full". The FIFO holds 64
  Samples, and when it fills, the chip stops sending.
- **Single Pulse Mode (SPM = 1).** The chip sees the board as never ready,
  except that each write to FPULSE lets exactly one byte through.
- **Out of the FIFO.** Only one consumer drains the FIFO at a time. In order
  of priority:
  1. A MANPUL leading edge moves one entry into the FIFO TEST register.
  2. A MANSW leading edge moves four entries to memory. They are stored even
     if storage is disabled or memory is full.
  3. With LOCAL = 1 and MEMW = 1, entries go to local memory at 20 MHz.
  4. With LOCAL = 0, entries go to the cable at 10 MHz.

  The manual controls act only on a 0→1 change. Software must clear the bit
  before it can use it again.
- **Packing.** Four consecutive data bytes form one memory word, the first
  byte in bits 31:24. A 16-byte Sample therefore fills four words exactly.
  The finished word waits in a pipeline holding register while the next one
  is assembled.
- **Placement.** The Sample address pointer is a 24-bit byte address, a
  multiple of 4, that always names the next free word. When the last word
  (`FFFFFC`) has been written:
  - *Simple buffer* (NOWRAP = 1): MEMFULL is set and the pointer stays where
    it is. With DROP = 1, further words are discarded, so the FIFO keeps
    draining. With DROP = 0 they wait, the FIFO fills, and the chip is
    stopped. Memory keeps the oldest data.
  - *Circular buffer* (NOWRAP = 0): the pointer wraps to 0 and MEMFULL shows
    that the wrap happened. Memory keeps the newest data.
- **Pointer interlock.** A pointer write while sampling is enabled (LOCAL and
  MEMW) or while a word is on its way (SMWREQ) would scramble the stored
  data. The board refuses such a write with BERR*. To move the pointer,
  software clears MEMW, waits for SMWREQ = 0, writes the pointer and enables
  storage again. A pointer write also clears MEMFULL.
- **Arbitration.** CPU reads and writes of local memory are interleaved with
  Sample stores. When both are waiting, grants alternate. Each access takes
  three clocks, so stores alone reach 13.3 M words/s. That is well above the
  5 M words/s of a 20 MHz byte stream.

## Reset

VME SYSRESET* resets the whole board. The Control and Counter Input
registers clear to 0, so software must load `D50C01` or another value.
Writing RESET clears the FIFO, the packer, the cable interface and the
manual/SPM state, and holds `mk_reset` high for 8 clocks. It does not clear
the Control register, so the WAIT setting is present when the chip leaves
reset, which is when the chip reads it. It also does not clear the Sample
pointer or MEMFULL.

## Modules

| module | role |
|---|---|
| `mib_pkg` | address offsets, operation codes, control register struct, internal bus structs |
| `mib_top` | the board: wires everything below together |
| `mib_clkgen` | 20/10 MHz clock enables, SYSRESET* synchroniser |
| `mib_vme_decoder` | VME slave handshake and address decoding; answers RESET, version and unused offsets |
| `mib_control_reg` | Control and Counter Input registers, MANPUL/MANSW edge pulses |
| `mib_mk_bus_if` | MultiKron bus cycles, high-order input and output registers, MultiKron reset |
| `mib_mux2` | CPU ID (8 bits) and resource counter (16 bits) source selection |
| `mib_net_if` | network receive, NETRDY, Single Pulse Mode |
| `mib_fifo` | 1024 x 16 FIFO, first-word fall-through |
| `mib_fifo_reader` | FIFO consumer selection, FIFO TEST register |
| `mib_sample_packer` | byte-to-word packing, pipeline holding register, WSB, SMWREQ |
| `mib_ext_sbus_if` | byte pairs onto the 16-bit external cable |
| `mib_mem_pointer` | Sample address pointer, simple/circular buffer, DROP, interlock |
| `mib_mem_arbiter` | memory sharing between Sample stores and the CPU |
| `mib_local_mem` | 16 MB memory, four banks of 1M x 32 |
| `mib_status_reg` | Status register |

Inside the board, the decoder issues one request per VME cycle
(`mib_breq_t`: a one-clock `req`, the decoded operation, the word offset and
the write data). The target that owns the operation answers one or more
clocks later with `ack` or `err` and its read data (`mib_brsp_t`). All other
targets drive zeros, and `mib_top` ORs the responses together. To add a
register, add an offset and an operation code in `mib_pkg`, decode it in
`mib_vme_decoder` and answer it in one target.

Top-level parameters: `BASE_ADDR`, `FIFO_DEPTH` (1024), `BANK_WORDS`
(1,048,576), `BANKS` (4) and `MK_RESET_CYCLES` (8). All the defaults are the
board's own sizes except the reset pulse length, which is this design's
choice.

## Choices this RTL makes

The board's descriptions leave these points open, and the RTL settles them
as follows:

- **Clocks.** There is one clock, and the 20 MHz and 10 MHz FIFO clocks are
  enables of it. The FIFO is therefore single-clock. The board derives all
  its clocks from one oscillator, so no clock crossing is lost.
- **MultiKron pins.** The network uses a valid/ready handshake and the bus
  uses a `cs`/`ready` handshake. The chip's real pin timing is not modelled.
  MultiKron data bits 63:48 are driven 0 on writes.
- **Cable.** The external cable uses a valid/ready handshake, with the first
  byte in bits 15:8.
- **FIFO entry layout.** The entry is `{6'b0, parity, eos, data}`. Parity is
  carried but not checked.
- **Register fields.** WSB is a binary index (0–3) in a 4-bit field. SMWREQ
  also covers a partly assembled word.
- **Simple buffer end.** The pointer holds at the last word. A forced
  (MANSW) store into a full simple buffer overwrites that word. Switching a
  full simple buffer to circular mode without rewriting the pointer
  therefore places the next word on `FFFFFC` before wrapping to 0.
- **Single Pulse Mode.** A pending FPULSE waits while the FIFO is full
  instead of overflowing it.
- **FPULSE address.** FPULSE is at `100_0418`. One description of the SPM bit
  gives `100_0018`, but that offset lies inside local memory.
- **Local memory timing.** Local memory is synchronous arrays with one clock
  of read latency. DRAM refresh does not appear, because the DRAM controller
  hides it.
- **Reset values.** The Control register resets to 0, not to `D50C01`.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mib_pkg.sv tb/tb_mib_top.sv --top-module tb_mib_top -Mdir obj -o sim
./obj/sim
```

- **`tb_mib_top`** runs the whole board against `tb/mk_model.sv` (a
  behavioural MultiKron with probe, Source Address and counter registers and
  a small internal FIFO). It uses a 64-word memory and a 64-entry FIFO so
  that every limit is reached quickly. It drives everything through VME
  cycles, compares memory and cable contents byte for byte with what the
  model sent, and counts each mechanism: wide MultiKron access, RESET, both
  counter and CPU ID sources, local storage, interlock, full with DROP,
  backpressure, wrap, SPM, MANPUL, MANSW, cable, VME stall, TEST2 and CPU
  memory access.
- **`tb_mib_top_full`** uses the default sizes. It stores 64 Samples (one
  full FIFO) in the 16 MB memory, checks all 256 words, then fills the top of
  memory and checks that the board stops at `FFFFFC` with MEMFULL set.
- **`tb_mib_million`** also uses the default sizes. It streams 1,048,592
  Samples (16 MB plus one Sample) through the board in simple-buffer mode
  with DROP set, checks the first and last Sample and a spread of words in
  between against what the model sent, the pointer and MEMFULL, then
  switches to the circular buffer and checks that new Samples overwrite the
  start of memory. It takes about half a minute in verilator.
- **The block testbenches** check rates and latencies where they matter.
  Among them: one network byte per 20 MHz period, one cable byte per 10 MHz
  period, one-clock register answers, wait states stretching MultiKron
  cycles, and CPU accesses never waiting for more than one store.
