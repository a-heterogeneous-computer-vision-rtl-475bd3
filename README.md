# APA module: a content-addressable SIMD array for low-level vision

This is the image-processing engine of a heterogeneous vision computer.
A network of transputers (MIMD) handles the high-level, symbolic part of vision.
Beneath it, the associative processor array (APA) module runs the pixel-level part in SIMD fashion.
It does this on one video line at a time, using 256 one-bit processing elements (PEs).
Each PE owns a word of ternary content-addressable memory (CAM).
A computation is a sequence of broadcast patterns: *match* tags every PE whose word fits a pattern, and *write* stores a pattern into the tagged PEs.
The tags can be combined, shifted along the PE chain, reduced to the first responder, or tested.
A microprogrammed VLIW controller issues one 96-bit microinstruction per clock.
It drives every unit of the module in parallel: the sequencer, the data store, the scalar unit, the routing network, the chip RAMs, the GLiTCH chips and the tag router.
The host transputer downloads microprograms, starts them and exchanges data through the data store.

## Organisation

```
 host transputer bus ──► host_if ──► micromemory (32K x 96) ──► sequencer ◄── flags
                                          │ microinstruction
                     ┌────────────────────┼──────────────── per-unit pipeline registers (E0/E1/E2)
                     ▼                    ▼
   data_store ◄──► 32-bit data routing bus ◄──► scalar_unit
                          │
                         drn  (data routing network)
             ┌──────┬─────┴┬──────┐
           RAM 0  RAM 1  RAM 2  RAM 3      one RAM on each chip's link
             │      │      │      │
          chip 0 ─ chip 1 ─ chip 2 ─ chip 3   GLiTCH: 64 PEs + PBL + VSR each
             └──────┴──tag_router─┴─────┘   (tag chain, ring, responder flag)
 video_in ─► VSR chain chip 0 → chip 3 ─► video_out
```

| File | Unit |
|---|---|
| `rtl/apa_pkg.sv` | sizes, ternary digit code, microinstruction layout, opcode enums |
| `rtl/glitch_pe.sv` | one PE: 64-digit data CAM, 4-digit subset CAM, tag and R registers |
| `rtl/pbl.sv` | pattern broadcast logic: 16 pin digits ↔ 64 CAM digits at an offset |
| `rtl/vsr.sv` | 64×8 video shift register with parallel load |
| `rtl/glitch_chip.sv` | GLiTCH chip: 64 PEs, PBL, VSR, first-responder logic, read port |
| `rtl/tag_router.sv` | joins the four chips' tag chains; ring mode; global "some" flag |
| `rtl/chip_ram.sv` | 1K×32 RAM on each chip's routing link |
| `rtl/drn.sv` | data routing network: bus, RAM and neighbour routes to each chip |
| `rtl/data_store.sv` | 4K×32 pattern store, host port, four address registers |
| `rtl/scalar_unit.sv` | 32-bit shift/rotate/test register with flags |
| `rtl/micromemory.sv` | writable control store |
| `rtl/sequencer.sv` | next-address logic: jumps, calls, counted loops, CASE, WAIT, HALT |
| `rtl/host_if.sv` | host register map, download, run/step/breakpoint, attention, mailboxes |
| `rtl/apa_controller.sv` | micromemory + sequencer + host interface + pipeline registers |
| `rtl/apa_module.sv` | top level |
| `rtl/emu_clock_sync.sv` | clock synchroniser of the chip emulators (test rig, beside the top) |

## Ternary CAM and pattern broadcast

This is the part that most differs from ordinary datapaths.

**Digits.**
A ternary digit is two bits, `{care, value}`:

| Code | Digit |
|---|---|
| `10` | `0` |
| `11` | `1` |
| `00` or `01` | `x` |

A stored digit and a pattern digit match unless both care and their values differ.
So an `x` on either side masks the position.
A PE *matches* when all 64 data digits and all 4 subset digits match.
A data word is therefore 128 bits, and a pin pattern of 16 digits is 32 bits, the width of the routing bus.

**Writes.**
A write only changes the digits the pattern cares about.
An `x` in the pattern leaves the stored digit alone.
This lets several fields of one CAM word be updated independently.
After reset every digit is `x`, and an `x` stored digit matches anything.

**PBL.**
The chip pins carry only 16 digits.
The pattern broadcast logic places them at digit offset `off`, wrapping modulo 64, and fills the other 48 digits with `x`.
Several 16-digit fields of the 64-digit word can therefore be addressed in turn, e.g. a pixel at digits 0..7 and a result flag at digit 20.
Reading works the other way: `G_READ` takes the 16 digits at `off` from the first tagged PE of the array and drives them on the chip's read port.

**Tag operations.** Each PE has a tag bit and a second bit R. The operations are:

- **Match:** `MATCH`, `MATCH_AND`, `MATCH_OR`.
- **Write:** `WRITE` writes the tagged PEs; `WRITE_ALL` writes every PE.
- **Shift:** `SHIFT_UP` and `SHIFT_DN` move the tags along the 1-D chain of 256 PEs. With the tag router's `tr_rot` set, the chain closes into a ring (barrel shift).
- **First responder:** `FIRST` keeps only the lowest-numbered tagged PE. It works across chips through the `lower_some` chain.
- **Tag logic:** `SET_ALL`, `CLR_ALL`, `NOT`, and the R operations (`R_LD`, `TAG_LD_R`, `TAG_AND_R`, `TAG_OR_R`, `TAG_XOR_R`).
- **Video exchange:** `VSR_XFER` swaps, in every PE, CAM digits `off..off+7` with the PE's VSR byte. Pixels are written as cared digits, and `x` digits read as 0.

Whether any PE is tagged ("some responder") is a condition flag of the sequencer.
A DO WHILE loop of `FIRST`/`READ`/clear therefore lists all responders.

**Video.**
The four VSRs are chained, chip 0 first.
A line of 256 pixels shifted in at `video_in` leaves pixel *p* in PE 255−*p*.
Results leave at `video_out` while the next line shifts in.
Shifting is an enable on the system clock.

## Microinstruction and pipeline

The 96-bit word (`uinstr_t` in `apa_pkg.sv`), MSB first:

| Field | Bits | Use |
|---|---|---|
| `seq_op` | 4 | CONT, JUMP, CALL, RET, LOOP, ENDLOOP, CASE, WAIT, HALT |
| `seq_addr` | 15 | target, loop count (body runs count+1 times) or CASE base |
| `cc`, `cc_inv` | 3+1 | condition: ALWAYS, SU_ZERO, SU_NEG, SU_TEST, SOME, HOST, NEVER |
| `ds_op`, `ds_ar`, `ds_addr` | 4+2+12 | data store: direct or address-register access, `AR++`/`--AR`, load AR |
| `sutr_sel`, `sutr_op`, `sutr_arg` | 1+4+5 | shared field: scalar unit op (LOAD, SHL, SHR, ASR, ROL, TEST) or host op (ATTN, PUT) |
| `bus_src` | 3 | driver of the routing bus: none, data store, scalar unit, host mailbox, chip read ports |
| `drn_op` | 3 | routing: hold, broadcast, own RAM, up/down chain (bus at the end), rotate up/down |
| `ram_op`, `ram_addr` | 2+10 | chip RAM read, write of read-port data, write of the routed pattern |
| `g_op`, `g_off`, `g_sub` | 5+6+8 | GLiTCH operation, PBL/VSR offset, subset pattern |
| `tr_rot` | 1 | tag router ring mode |
| spare | 7 | |

The fields are not decoded centrally.
Each one is delayed to the cycle in which its unit acts, so that one microinstruction can hold a whole operation.
For example: read a pattern, route it to the chips and match it.

| Stage | Cycle | Units |
|---|---|---|
| E0 | issue | sequencer and condition test; data store address, AR update and read; chip RAM read |
| E1 | +1 | bus source; data store write; scalar unit or host op; routing network (registers the chip patterns); chip RAM write |
| E2 | +2 | GLiTCH operation; tag router |

There are no interlocks.
A branch in E0 sees flags from operations issued earlier.
A match issued in cycle *n* sets the "some" flag at the end of cycle *n+2*.
So a branch on it must issue at *n+3* or later.
Likewise the scalar unit's flags are seen by the instruction issued two cycles after the op.
The microcode has to respect these delays.
Branches take effect on the next fetch, with no delay slot.
While the controller is stopped, NOPs enter the pipeline, so operations already issued still complete.

## Host interface

The host sees a 19-bit word address space. `h_addr[18:17]` selects the region:

- **0, micromemory download.** The word is `h_addr[16:2]` and the part is `h_addr[1:0]`. Parts 0 and 1 (bits 31:0 and 63:32) are staged. Writing part 2 (bits 95:64) commits the word.
- **1, data store.** Word `h_addr[11:0]`, read/write through its second port.
- **2, control registers.** Listed below.

| Reg | Name | Function |
|---|---|---|
| 0 | CTRL | bit0 run, bit1 single step, bit2 breakpoint enable, bit3 host flag (condition `CC_HOST`) |
| 1 | START | write: set the microprogram pointer |
| 2 | BREAK | breakpoint address |
| 3 | STATUS | `{err, attn, halted, run}` in bits 19:16, pc in 14:0 |
| 4 | ATTN | write: clear the attention request |
| 5 | MBOX_IN | word the microprogram can put on the bus (`bus_src` = host) |
| 6 | MBOX_OUT | last word sent by the microprogram (`PUT`) |

Reads answer one clock later with `h_rvalid`.
HALT clears run.
A breakpoint stops the controller before the instruction at BREAK issues.
The next run or step continues from there.
The microprogram raises `attn` with the host op ATTN.

The chip emulators used to test the software ran on an irregular clock.
`emu_clock_sync` regenerates it: each emulator toggles its `ready` line when its cycle is done.
One `emu_clk` pulse follows once all four have toggled, so the pulse tracks the slowest emulator.
It sits beside the module in the top and shares only the clock.

## Sizes

| Item | Value | Origin |
|---|---|---|
| chips × PEs | 4 × 64 | published design |
| data CAM / subset CAM digits | 64 / 4 | published design |
| pin pattern | 16 digits (32 bits) | published design |
| VSR | 64 × 8 | published design |
| micromemory | 32768 × 96 | published design |
| routing bus | 32 bits | published design |
| data store | 4096 × 32 | this design's choice |
| chip RAM | 1024 × 32 per chip | this design's choice |
| call and loop stacks | 16 entries each | this design's choice |

At the published 50 ns microinstruction cycle, a 40 ms video frame allows 800,000 microinstructions.
The controller issues one per clock with no stalls, so that budget needs a 20 MHz clock.

## How far to trust it; departures

The published design gives the unit list, the connections, the sizes, the VLIW organisation with per-unit pipeline registers, the control structures of the sequencer and the host's role.
It gives no instruction encodings, no timing and no insides of the units.

Everything below is this design's own:

- the digit code;
- all opcode sets and field widths;
- the three-stage split;
- the register map;
- the breakpoint rule;
- the depths of the data store and RAM.

Specific departures:

- **Chip RAM.** There is one RAM per chip on the routing link, holding 32-bit link words. It is not a bit-per-PE memory.
- **Routing bus.** A multiplexer picks the driver (`bus_src`), not a shared tri-state bus. The chip read ports are ORed, and only the first responder's chip drives a non-zero field.
- **Single clock.** The VSR shifts on an enable in the system clock domain, not on a separate video clock.
- **Bus request.** The host cannot request the routing bus while a microprogram runs, and it cannot read the micromemory back.
- **Not included:** the sequencer's mnemonic-level behaviour of the original bought-in part, the frame store, the host transputer and its links, the video bus interface, the clock generator, and the emulator boards themselves. Only the emulators' clock synchroniser is included.

Each file's opening comment says what in it follows the published design and what is a local choice.

## Simulating

Every testbench is self-checking.
Each prints `TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.
With plain verilator (5.x), for example for the whole module:

```
verilator --binary --timing -Wno-fatal -Irtl \
  rtl/apa_pkg.sv rtl/glitch_pe.sv rtl/pbl.sv rtl/vsr.sv rtl/glitch_chip.sv \
  rtl/tag_router.sv rtl/chip_ram.sv rtl/drn.sv rtl/data_store.sv \
  rtl/scalar_unit.sv rtl/micromemory.sv rtl/sequencer.sv rtl/host_if.sv \
  rtl/apa_controller.sv rtl/emu_clock_sync.sv rtl/apa_module.sv \
  tb/tb_apa_module.sv --top-module tb_apa_module -o sim
./obj_dir/sim
```

For a unit, list `apa_pkg.sv`, the unit's file and those it instantiates, plus its testbench.

`tb_apa_module` runs the full-size module with no parameter overrides. It:

1. downloads a microprogram through the host port;
2. shifts a pseudo-random 256-pixel line in;
3. lets the microprogram:
   - threshold the line in a nested subroutine;
   - list the responders into the data store with a DO WHILE loop and `AR++`;
   - stop at a breakpoint and single-step;
   - ring-shift the tags in a counted loop;
   - match a pattern parked in a chip RAM;
   - branch with CASE on the scalar unit;
   - exchange results into the VSRs;
   - send a mailbox word and raise attention;
4. shifts the result line out;
5. compares everything with a reference model written in the testbench.

It counts how often each mechanism fired and fails any that never did.
`tb_apa_controller` uses a 1K micromemory to stay short.
The other testbenches run their units at the published sizes.
