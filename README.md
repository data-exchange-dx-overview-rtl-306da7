# DX: a data exchange for a DSP read-out driver

A read-out driver board has several DPUs, each a DSP with its own memory.
It also has a host processor (the HPU) and an output link to the read-out
system (the ROL). The DSPs must exchange blocks of data with each other, with
the HPU and with the link, and none of them should wait on a shared bus
protocol while doing it. DX solves this with one shared 32-bit bus, the
**DX Front Bus**. A single master FPGA schedules the bus from an instruction
stream written by the HPU. Every DPU's interface FPGA follows that same
instruction stream in lock step, so each device knows in every cycle who
drives the bus and who must capture the word. There is no arbitration or
addressing on the bus. A DSP only fills source FIFOs and empties
destination FIFOs by DMA.

A copy of the instruction stream, with the data it moved, goes on to a
back-end FPGA. That FPGA forwards data to the read-out link, and it returns a
selectable **trace** of the activity to the HPU in fixed 16-word frames.

This repository holds one side of that system as synthesizable
SystemVerilog. It has six DPU interfaces, the master and the back end. The
whole design runs on a single clock.

```
 HPU ──> dxf_fpga ──────── DX Front Bus (DXC cmd, DXD[31:0], serial status) ──┐
         │ Instruction FIFO 256x32          │         │              │        │
         │ front supervisor             dxd_fpga  dxd_fpga  ...  dxd_fpga (x6)
         │ Output FIFO 512x40            (DSP EMIF: source FIFOs, dest FIFOs,
         │ back sequencer ──> Host FIFO   registers, interrupts, EIOCLK)
         v
   DX Internal Bus (WR, FIRST, LAST, D, tag)
         v
      dxb_fpga: Input FIFO -> input sequencer -> ROL FIFO -> read-out link
                                              -> trace framer -> return stream -> HPU
                              TIS / TMTS frames from the transition module ---^
```

## Instructions

The HPU writes 32-bit instructions into the DXF Instruction FIFO. Bits 31:28
hold the opcode.

| opcode | instruction | words that follow on the bus |
|---|---|---|
| 0010 | DX_RunSequence | one source block after another, in the order of Sequence register Q |
| 0100 | DX_WriteData | `c` parameter words taken from the instruction stream |
| 0110 | DX_WriteReg | one value word written to a register index in the selected devices |
| 1000 | DX_ReadReg | one register word from each device in Sequence register Q |
| 1010 | DX_ReadRegDXB | none on the front bus; the DXB answers on the return stream |
| 0000 | misc | DX_Nop, DX_WriteRegDXB, trace mode, Host FIFO and back-end destination |

Field layout of the front-bus instructions:
- Bits 13:8 form a DPU bit mask. They select the destinations, or the register targets.
- Bit 14 (F) sends the data to the back end as well.
- Bit 15 selects destination FIFO 0 or 1.
- Bit 24 (K) is the control bit that goes with the data to the read-out link.

A Sequence register holds up to eight 4-bit source entries, used from the
lowest nibble up. Each entry is `{FIFO#, DPU#}`. The value `1111` ends the
list.

## The front bus protocol

The DXC command lines carry one of eight codes (`rtl/dx_pkg.sv`). The codes
are split across the `_inst`, `_end` and `_last` families, so every device
can follow the bus phase from the commands alone:

- **Instruction word.** The DXF drives `write_inst_first` and then, for
  multi-word instructions, `write_inst`. Two `nop` cycles follow, so the
  pipeline can settle and the bus can fall back to a known state.
- **Source turns.** During DX_RunSequence or DX_ReadReg, each listed source
  drives in turn:
  - `write` / `nop` in the body of its block;
  - `write_end` / `nop_end` two words before the end;
  - `write_last` / `nop_last` on its last word.

  The `_end` code tells the next source to get ready. A two-cycle tail lets
  it take over the bus without a gap, because every DXD registers its
  outputs and inputs.
- **Short blocks.** A source whose block has fewer than three words pads the
  front with `nop_end`. A block of zero words is still a legal turn.
- **Missing sources.** A source that is not there leaves the bus to the
  keepers. The keepers hold `nop_last`-like values, so the first command of
  the turn carries `_last`. All devices then count the source as missing and
  move on together.
- **Stalls.** A destination whose FIFO is almost full makes sources send
  `nop` until it drains. DX_WriteData words wait in the same way.
- **Timeouts.** The stall timer counts D×I microseconds (the DXFI_Timeout
  register). If a source stays silent that long, every device times out in
  the same cycle. The jam phase then fills each destination with
  JamCount[Q] copies of JamData[Q]. This way the destination DSPs still
  receive the word counts they expect.

`dx_front_tracker` implements this bookkeeping. The same module runs inside
the DXF and inside every DXD. All devices therefore agree on the instruction,
the current source, the remaining words and the timeout without exchanging
any extra signals.

### Unlocking the subordinates

After reset, no DXD may drive the bus. `dx_unlock` watches for the sequence
that an idle bus followed by a DX_WriteReg instruction produces:
`nop` → `write_inst_first` → `write_inst`. It enables the drivers only after
that sequence. Any other command after `write_inst_first` sets
FAULT_UNLOCKED. Software therefore pulses DX_RESET_N and then sends a
register write.

### Serial status

Each DXD returns a 6-bit serial word `0 1 F B d d` on its own line:
- F = fault;
- B = busy;
- d = two status bits (destination almost-full flags).

`dx_serial_tx` sends it and `dx_serial_rx` receives it. A framing error is
reported; a line that stays high reads as "no DPU".

## DXF FPGA (`dxf_fpga`)

- **Front supervisor.** It pops instructions from the Instruction FIFO and
  drives them on the bus. It issues DX_WriteData parameters, keeps the
  instruction-access registers (`dx_iregs`), and runs the microsecond
  timebase (`dx_timebase`, divisor M in DXFI_Control).
- **Output FIFO.** It receives every instruction word and every front-bus
  data word marked for the back end. Each word carries an 8-bit tag:
  - WR, FIRST, LAST;
  - the Host FIFO bit;
  - the trace type (instruction, parameter, count, data).
- **Back sequencer (`dxf_back_seq`).** It moves whole instructions onto the
  DX Internal Bus. It stops while the DXB Input FIFO or the Host FIFO is
  almost full. Words tagged for the host also go to the external Host FIFO.

## DPU interface FPGA (`dxd_fpga`)

Each DXD sits on the DSP's external memory bus (EMIF).

- **Source FIFOs (`dxd_srce_fifo`, two per DPU).** The DSP writes user words
  at any address of 3 or above, and closes a block with a write to address 2
  (Discard 2). Writes to addresses 1 and 0 are ignored. A block is complete
  once Discard 2 has arrived. A small length FIFO records each block's
  length, because the source sequencer must know the length before the
  turn starts.
- **Source sequencer (`dxd_src_seq`).** It drives one block per turn with
  the command codes above. It pauses with `nop` while a destination is
  almost full.
- **Destination FIFOs (`dxd_dest_fifo`, two per DPU).** The DSP reads them
  in DMA frames of F words (DXD_DSP_Control). A frame counter raises the DMA
  request only when a whole frame is present. The sticky faults are read
  overrun, write overrun, frame overflow and frame underrun.
- **Interrupts (`dxd_int_prio`).** One DMA interrupt per FIFO is chosen by
  fixed priority. Destinations with a complete frame come first, then
  sources with room. All interrupts are held off while an extra-clock request
  is pending.
- **EMIF clocking (`dxd_eioclk`).** The FIFO logic is clocked by EIOCLK.
  Sometimes extra EIOCLK pulses are needed to move data through, so an EP
  engine waits for an idle EMIF and holds ARDY. It then forces N pulses and
  returns the clock.
- **Small peripherals.** `dxd_led` drives the red LED with a minimum flash
  time. `dxd_tinp0` makes a periodic timer pulse to the DSP, in clocks or
  microseconds.

## DXB FPGA (`dxb_fpga`)

- **Input sequencer (`dxb_input_seq`).** It parses the instruction stream
  from the Input FIFO. It writes data to the ROL FIFO with the K bit of its
  instruction. It also selects words for the trace under the trace mode:
  - 4 bits choose instruction, parameter, data and count words;
  - the mode can be changed for the next instruction only.
- **Trace framer (`dxb_trace_framer`).** It packs the trace into 15-word
  frames. Padding uses `DX_Pad` (E000_0000), and an instruction never
  straddles a frame unless it is longer than one. It has two timeouts:
  - *Frame timeout*: an incomplete frame is released after its interval.
  - *FIFO timeout*: the Trace FIFO has stayed almost full (12 or more
    frames) for its interval. The current frame is then replaced by a
    `DX_TraceTimeout` frame, and trace input stops until
    DXBI_ResumeTraceFIFO is written.
- **Return stream (`dxb_return_arb`).** It merges three streams into
  16-word frames, each a type word plus 15 data words: TIS and TMTS from the
  transition module, and the DX trace (DXTS). Priority uses reload counters
  from DXBR_Control; a smaller reload value gives higher priority.

## Where this design makes its own choices

- **Single clock.** DX_CLK, the internal bus clock and the DSP clock are the
  same clock. The EIOCLK mux is logic that selects a clock-enable-like
  signal, not a real clock mux.
- **Bus model.** The tri-state bus is modelled as the OR of the enabled
  drivers plus keeper registers. Two devices driving at once is caught by
  each driver's readback check.
- **Almost-full wiring.** The destination almost-full flags reach the DXF as
  a wired signal, not only through the serial status.
- **Discard 2 storage.** Discard 2 is not stored in the data FIFO; the block
  length FIFO stands in for it.
- **FIFO thresholds.** The almost-full thresholds are:
  - Instruction FIFO: DEPTH−16, so one 16-word DMA frame always fits;
  - Output FIFO: 64 words of room;
  - DXB Input FIFO: 32 words of room;
  - destination FIFOs: 32 words of room.
- **DPU identity.** The DPU identity comes from a DSP-written register. The
  sequencer needs a block to be complete before its turn, so a block is at
  most 255 words. Longer parcels are sent as several blocks.
- **Not built:**
  - parcel header removal and RoundingMask rounding;
  - FIFO loopback;
  - the per-parcel DMA frame size check;
  - continuation frames (M flag);
  - the second DX side and its DONE/ICOUNT hand-over;
  - the DLL resets;
  - temperature and serial-number registers;
  - the transition-module logic that produces TIS/TMTS (those frames enter
    through ports).

Each file's opening comment says in detail which behaviour is taken from the
DX description and which is this design's choice.

## Files

- `rtl/dx_pkg.sv`: command codes, opcodes, tag layout and helper functions.
- `rtl/dx_top.sv`: one DX side, with the bus resolution and the almost-full
  wiring.
- `rtl/dxf_*`, `rtl/dxd_*`, `rtl/dxb_*`: the three FPGAs and their parts.
- `rtl/dx_*`: shared parts: FIFO, tracker, unlock, registers, timebase and
  serial link.
- `tb/tb_<module>.sv`: a self-checking test per part. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/tb_dx_env.svh`: the system environment used by the two top-level
  tests. It contains the HPU, DSP, ROL, Host FIFO and transition-module
  models, plus the mechanism counters.
- `tb/tb_dx_top.sv`: makes every mechanism happen at least once. A mechanism
  that never occurs counts as a failure. The mechanisms are unlock,
  transfers, DX_WriteData, a missing source, a timeout with jam, destination
  and back-end stalls, register reads, trace frame and FIFO timeouts, and
  the return stream.
- `tb/tb_dx_top_full.sv`: about 23,000 words of random traffic through all
  six DPUs at the default sizes. It checks every destination word and the
  ROL stream.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -Itb --top-module tb_dx_top \
    rtl/dx_pkg.sv $(ls rtl/*.sv | grep -v dx_pkg) tb/tb_dx_top.sv -o sim
./obj_dir/sim
```

Replace `tb_dx_top` with any testbench name. The system tests take about
10 seconds each; the unit tests take a few seconds. Every testbench has a
watchdog that counts a failure if the test hangs.
