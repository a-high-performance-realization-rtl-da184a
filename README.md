# Reversible-LFSR image cipher, 8-bit pixels

This design scrambles an image by pushing every pixel through small linear
feedback shift registers (LFSRs), and recovers it with the same kind of
register. The trick is that an LFSR of maximal length walks through all of its
non-zero states in a fixed cycle. Load a value, step the register *k* times
and you get a scrambled value. Load the scrambled value, step it another
*P − k* times (where *P* is the cycle length) and you are back at the start.
The 4-bit register used here has *P* = 15. Encryption takes 7 steps and
decryption 8.

Each 8-bit pixel is split into two nibbles, and each nibble gets its own 4-bit
register. The 4-bit register is drawn as a reversible circuit:

- a Fredkin (controlled-swap) gate selects the register input;
- four D flip-flops form the shift chain;
- a Feynman (controlled-NOT) gate forms the feedback bit.

The complete system does the following in one run:

1. It reads a 64-pixel image from a ROM.
2. It encrypts the image into a RAM.
3. It decrypts that RAM into a second RAM.

The RTL follows the published architecture "A High Performance Realization of
8 Bit Reversible LFSR Encryption And Decryption". The control sequencing is
this design's own; the original does not describe it. Both RAMs match the
memory contents published for that design, word for word.

## What the transform really is

The cipher should be judged for what it is. It has no key. Each nibble goes
through a fixed substitution, the same for every pixel and every image:

| nibble in  | 0 | 1  | 2  | 3 | 4  | 5 | 6 | 7  | 8 | 9  | 10 | 11 | 12 | 13 | 14 | 15 |
|------------|---|----|----|---|----|---|---|----|---|----|----|----|----|----|----|----|
| encrypted  | 0 | 11 | 13 | 6 | 10 | 1 | 7 | 12 | 5 | 14 | 8  | 3  | 15 | 4  | 2  | 9  |

A zero nibble stays zero, because the all-zero state is the fixed point of
any XOR-feedback LFSR. For example, pixel 16 (`0x10`) becomes `0xB0`. The
design is a faithful hardware exercise in reversible-gate structure. It is
not a secure cipher.

## The 4-bit reversible LFSR (`rev_lfsr4`)

```
            ctrl
             |
 din ----> [Fredkin] --d1--> D1 --Q1--> D2 --Q2--> D3 --Q3--> D4 --Q4
              ^                                     |          |
              |                                     +--[Feynman]+
              +------------------ Q11 = Q3 ^ Q4 ------------+
 dout = {Q1, Q2, Q3, Q4}
```

- **Fredkin gate.** Its control input is `ctrl`. The data inputs are the
  feedback `Q11` and the serial input `din`. The output that feeds D1 equals
  `din` when `ctrl = 1` and `Q11` when `ctrl = 0`. The gate's other two
  outputs are the "garbage" outputs that reversible logic leaves over. They
  are not connected.
- **Feynman gate.** It takes Q3 and Q4 and produces `Q3 ^ Q4`. Its
  pass-through output is not connected.
- **Flip-flops.** They shift on every rising clock edge. There is no enable
  and no reset. Their complementary outputs are not connected.
- **Bit order.** `dout = {Q1,Q2,Q3,Q4}`, so one step is
  `dout ← {dout[1]^dout[0], dout[3:1]}`. The feedback polynomial is
  x⁴ + x³ + 1, which is maximal.
- **Reference sequence.** Starting from 15, the register produces
  15, 7, 3, 1, 8, 4, 2, 9, 12, 6, 11, 5, 10, 13, 14, 15, … This is the
  sequence of the reference simulation, and the testbench checks it.
- **Loading.** Hold `ctrl = 1` for four clocks and present bits 0, 1, 2, 3 of
  the nibble on `din` in that order. After the fourth edge the nibble sits
  unchanged on `dout`. Every later clock with `ctrl = 0` is one LFSR step.

## The 8-bit unit (`rev_lfsr8`)

This unit is two `rev_lfsr4` side by side:

- `din[0]` and `dout[3:0]` are the low nibble;
- `din[1]` and `dout[7:4]` are the high nibble;
- the two registers share the clock and `ctrl`.

The system has two of these units:

- the encryption unit runs 7 steps after loading;
- the decryption unit runs 8 steps after loading.

## System and sequencing (`lfsr_crypt_top`, `crypt_controller`)

```
 image_rom --q--> rev_lfsr8 (enc) --Data_in1--> image_ram #1 --Data_out1--> rev_lfsr8 (dec) --Data_in2--> image_ram #2
     ^                ^                            ^    ^                        ^                           ^
     +---------------- crypt_controller: addresses, load control, serial bits, write enables ---------------+
```

After a one-cycle `start` pulse the controller makes two passes over the 64
pixels. Each pixel takes these states:

| state   | cycles | what happens |
|---------|--------|--------------|
| `S_ADDR`  | 1 | The pixel address goes to the source memory (ROM in pass 1, RAM #1 in pass 2). The memory registers the word. |
| `S_READ`  | 1 | The registered word is latched into the controller. |
| `S_LOAD`  | 4 | `ctrl = 1` for the active LFSR pair. Bit *i* of each nibble goes out in cycle *i*, LSB first. |
| `S_SHIFT` | 7 / 8 | `ctrl = 0`. The pair runs free: 7 steps when encrypting, 8 when decrypting. |
| `S_WRITE` | 1 | The pair's output is written to the destination RAM at the pixel address. |

Timing:

- An encrypted pixel takes 14 cycles and a decrypted pixel 15.
- `done` rises 64·14 + 64·15 = **1856** cycles after the `start` edge. It
  stays high until the next `start`.
- The LFSRs keep stepping in every state. That does no harm, because each
  load overwrites all four bits.

While the controller is idle or done, `host_rdaddr` drives the read address
of both RAMs. `Data_out1` (encrypted image) and `Data_out2` (decrypted image)
show the addressed word one clock later.

Interface of `lfsr_crypt_top`:

- **Clock and reset.** Everything runs on `clk`. `rst` is synchronous and
  active high.
- **Control.** `start` is an input; `done` is an output.
- **Observation outputs.** The controller state, pass (`phase`) and counter
  (`cnt`) are brought out. So are the ROM bus (`addrs`, `q`), each LFSR
  pair's load control and serial bits, and both RAMs' write and read buses
  (`Data_in1`, `wradrs1`, `wren1`, `rdadrs1`, `Data_out1`, and the same with
  suffix 2).

## Memories (`image_rom`, `image_ram`)

Both memories are 64 × 8 and read synchronously with a latency of one clock,
like FPGA block RAM.

`image_rom` holds the test image: word *i* is *i* + 1. The `INIT_FILE`
parameter loads another image with `$readmemh` instead.

`image_ram` has:

- one write port (`wren`, `wraddr`, `wdata`);
- one read port (`rdaddr`, `rdata`);
- contents of zero at start-up;
- the old word returned when a read hits the word being written.

The three memories total 1,536 bits.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `lfsr_crypt_top`, `crypt_controller` | `NUM_PIXELS` | 64 | image size (memory depth) |
| `crypt_controller` | `ENC_SHIFTS` | 7 | LFSR steps after loading, encryption |
| `crypt_controller` | `DEC_SHIFTS` | 8 | LFSR steps after loading, decryption |
| `image_rom`, `image_ram` | `DEPTH`, `WIDTH` | 64, 8 | memory geometry |

For the decryption to invert the encryption, `ENC_SHIFTS + DEC_SHIFTS` must
be a multiple of 15. Both must be at least 1 and at most 15. The shared
constants and the controller's state type live in `lfsr_crypt_pkg`.

## Where this RTL departs from, or goes beyond, the original

- **Step counts.** The original text speaks of "eight iterations" for both
  encryption and decryption. Its worked example (12 → 15) and its memory
  contents, however, need 7 steps to encrypt and 8 to decrypt. This design
  uses 7 and 8.
- **Flip-flops.** The original builds its flip-flops as reversible cells.
  Those cells take clock copies passed from stage to stage, plus constant
  and garbage pins. Here each is an ordinary edge-triggered flip-flop with a
  complementary output, and all stages share one clock.
- **Unit count.** The original block diagram shows separate encryption and
  decryption units. Its simulation names per-nibble load controls. This
  design has two 8-bit units, each with one shared load control.
- **Design-specific choices.** The controller's states and cycle counts, the
  `start`/`done` handshake, the reset, the RAM read-out port and the memory
  latency are all choices made here. The original publication gives none of
  them.
- **Not built.** The original's abstract also names reversible
  pulse-triggered SISO/SIPO registers, a sequence-pulse generator and a
  parallel signature analyser. It gives no structure for any of them, so
  they are not built.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `fredkin_gate_tb`, `feynman_gate_tb` | Full truth tables, that all outputs are distinct (reversibility), and that each gate is its own inverse. |
| `rev_dff_tb` | Capture on the rising edge, hold between edges, complement output. |
| `rev_lfsr4_tb` | The 15-state free-running sequence; 12 → 15 in 7 steps and back in 8; all 16 nibbles through the table above and back; the zero lock-up. |
| `rev_lfsr8_tb` | All 256 bytes encrypted and decrypted. |
| `image_rom_tb`, `image_ram_tb` | Contents, one-cycle latency, write enable, read-during-write. |
| `crypt_controller_tb` | Serial bit order, write addresses and data, cycles per pixel, total latency, read-out, and a second run. The memories and LFSR pairs are modelled in the testbench. |
| `lfsr_crypt_top_tb` | One full run at default size. Both RAMs are compared with the published encrypted image (written as signed bytes, as published) and with the input image. `done` must arrive at cycle 1856. It also counts the load and run cycles of both units, the RAM writes, the pass switch and the zero-nibble pixels. |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lfsr_crypt_pkg.sv \
          tb/lfsr_crypt_top_tb.sv --top-module lfsr_crypt_top_tb
./obj_dir/Vlfsr_crypt_top_tb
```

Replace the testbench name to run any other one. The full-system run takes
well under a second.
