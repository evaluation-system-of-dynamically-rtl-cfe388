# SEBSW-1: a PCI cipher board that changes its algorithm by reloading its FPGA

Most secure links fix their cipher and only rotate keys. This board changes the
cipher too. It is a PCI add-in card with one FPGA that holds exactly one block
cipher at a time. A small on-board SRAM holds a library of FPGA configuration
images, one per algorithm. To switch algorithm, the host tells the board to
reload the FPGA from another image. A few milliseconds later the FPGA raises
DONE with the new cipher in place. Blocks, keys and results then go back and
forth over the board's 8-bit local bus.

This repository holds synthesizable SystemVerilog for the board's own logic:

* the **local bus controller**, which decodes host accesses, drives the SRAM
  and IO-controller strobes and sequences FPGA configuration;
* the **FPGA cipher slot**, with its configuration port and register window;
* the two library entries: **DES** and **two-key Triple-DES**, both built in
  the *loop architecture* (one round in hardware, reused every clock).

The catalogue parts on the board stay outside the RTL. These are the PCI
bridge, the 512K x 8 SRAM and the 8255-type parallel IO chip. Their pins are
ports of the top module, and the testbenches use behavioural models of them.

## Board structure

```
 PCI bus                                     8-bit local bus, 16 MHz
 ───────┐    hs_* (req/ack/ready)   ┌──────────────┐   sram_*   ┌────────────┐
 PCI    ├──────────────────────────►│              ├───────────►│ SRAM 512Kx8│
 bridge │◄──────────────────────────┤  lbus_ctrl   │   io_*     ├────────────┤
 (port) │                           │ (bus control ├───────────►│ IO (8255)  │
        │                           │  + config    │◄─ cfg_req ─┤ port C bit0│
        │                           │  sequencer)  │            └─────▲──────┘
        │                           │              │ window (fpga_*)  │ DONE
        │                           │              ├──────────┐       │ (port B)
        │                           │              │ SelectMAP│       │
        │                           └──────────────┘ PROGRAM_n│       │
        │                                          INIT_n,D,..▼       │
        │                                        ┌─────────────────────┴──┐
        │                                        │ crypto_fpga            │
        │                                        │  config port, window,  │
        │                                        │  des_core / tdes_core  │
        │                                        └────────────────────────┘
```

`sebsw1` (the top) instantiates `lbus_ctrl` and `crypto_fpga` and wires them
together. A single 16 MHz local-bus clock runs everything, and `rst_n` is an
asynchronous active-low reset.

## Switching algorithm: the configuration path

The switch takes these steps:

1. The host writes the SRAM address of the wanted image to the configuration
   base register (0x08-0x0A).
2. It sets bit 0 of the IO controller's port C (a bit-set control word to IO
   register 3). That pin is the configuration signal, `cfg_req_i`.
3. `lbus_ctrl` synchronises the signal and starts on its rising edge:
   * it drives PROGRAM_n low for `PROG_CYCLES` clocks;
   * it waits until the FPGA releases INIT_n;
   * it reads the image from SRAM, one byte per clock, and presents each byte
     on the SelectMAP data lines with CS_n and WRITE_n low. CCLK is the
     local-bus clock.
4. The sequencer stops on the first of three events:
   * DONE rises: the load succeeded;
   * INIT_n falls: the load failed;
   * the whole SRAM has been read without DONE: the load failed.
5. The host polls DONE. It can read it on the IO controller's port B, where
   the board wires `fpga_done_o`, or in status register 0x0B.

While the sequencer owns the SRAM, host accesses to the SRAM data port wait.
They drop `hs_ready_o` and complete afterwards. All other registers stay
accessible, so the host can poll during the load.

At the default image size of 218,976 bytes (one XCV300 bitstream), a load
takes 219,022 clocks, or 13.7 ms at 16 MHz. The reference board measured
15.3 ms for the same step.

### The FPGA slot is a stand-in for reconfiguration

An FPGA that rewrites its own logic cannot be described in RTL. `crypto_fpga`
therefore models the behaviour visible at the board level, with every library
entry present at once:

* PROGRAM_n low clears the slot. It pulls INIT_n low and holds every cipher
  register in reset.
* INIT_n is released `INIT_CYCLES` clocks after PROGRAM_n returns high.
* Then one byte is accepted on each clock with CS_n and WRITE_n low. The first
  byte of the image names the algorithm: 1 = DES, 2 = Triple-DES.
* After `CFG_BYTES` bytes, DONE rises and that core becomes the active one. An
  unknown identifier pulls INIT_n low and leaves DONE low.

Only the active core can be started. A reload wipes keys, blocks and results,
as a real reconfiguration would. Apart from the first byte, the body of an
image is ignored. The bit-swapped SelectMAP byte order of Virtex devices is not
modelled.

## Host register map (`lbus_ctrl`)

| address   | access | meaning |
|-----------|--------|---------|
| 0x00-0x02 | R/W | SRAM address pointer, bits 7:0, 15:8, 18:16 |
| 0x03      | R/W | SRAM data port; every access increments the pointer |
| 0x04-0x07 | R/W | IO controller registers 0-3 (A1:A0) |
| 0x08-0x0A | R/W | configuration image base address |
| 0x0B      | R   | bit 0 configuring, bit 1 loaded (DONE seen), bit 2 failed |
| 0x0C-0x0E | R   | bytes sent to the FPGA by the last load |
| 0x20-0x3F | R/W | FPGA register window (below) |

**Host protocol.** A request is a one-clock pulse on `hs_req_i`, with
`hs_wr_i`, `hs_addr_i` and `hs_wdata_i`. It is allowed in any clock in which
`hs_ready_o` is high. `hs_ack_o` pulses one clock after the access completes.
Read data is on `hs_rdata_o` and stays there until the next ack.

* **One-clock accesses.** Registers, the FPGA window and the SRAM data port
  complete in the request clock and keep `hs_ready_o` high. A burst therefore
  moves one byte per clock, 16 MB/s. The measured host-to-board rates on the
  reference board were 10 and 16 MB/s.
* **Longer accesses.** An IO controller access strobes CS_n with RD_n or WR_n
  for `IO_CYCLES` clocks. The SRAM takes more than one clock when
  `SRAM_CYCLES` > 1. Both drop `hs_ready_o` until they finish.

**FPGA register window** (offsets from 0x20):

| offset    | meaning |
|-----------|---------|
| 0x00-0x07 | write: input block; read: result (byte 0 = most significant) |
| 0x08-0x0F | key 1, 64 bits with parity |
| 0x10-0x17 | key 2 (Triple-DES) |
| 0x18      | write: bit 0 start, bit 1 decrypt |
| 0x19      | read: bit 0 busy, bit 1 result valid, bits 5:4 active algorithm |

Writes to the window are ignored while the core is busy.

## The loop architecture

Both ciphers keep one Feistel round and one key generator in hardware, plus a
64-bit register that feeds the round's output back to its input. A multiplexer
in front of the round chooses between two inputs:

* the initial permutation of a new block, in the start clock;
* the fed-back state, in every later clock.

One round is computed per clock, so the latency equals the number of rounds.
In exchange, the area stays close to that of a single round.

* **`des_round`** computes `{R, L ^ f(R, K)}`. Here `f` is expansion E, XOR
  with the 48-bit round key, the eight S-boxes and permutation P. In the last
  round of a 16-round pass (`last_i`) the halves are not exchanged, so the
  register ends up holding the pre-output `{R16, L16}` directly.
* **`des_keygen`** makes one round key per clock and never stores the 16 keys.
  * Load: the first round of a pass takes the key through PC-1 into `{C, D}`.
  * Encryption: each round rotates C and D left by the standard's schedule
    (1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1) and feeds the rotated
    value to PC-2.
  * Decryption: the first key is PC-2 of the unrotated value. This works
    because the 16 left rotations add up to 28 places, a full turn, so
    K16 = PC-2(C0, D0). After that, each round rotates right by the amount of
    the round being undone, walking back through K15 to K1.
* **`des_core`** runs 16 rounds. Its result is the final permutation of the
  register. `done_o` pulses 16 clocks after the start clock.
* **`tdes_core`** runs 48 rounds as three DES passes:
  * it encrypts as E(K1) D(K2) E(K1) and decrypts as D(K1) E(K2) D(K1);
  * the final permutation of one pass and the initial permutation of the next
    cancel, so they are left out; the pre-output of one pass, already
    unexchanged, is the next pass's input as it stands;
  * at each pass boundary the key generator is reloaded with that pass's key
    and direction;
  * `done_o` pulses 48 clocks after the start clock.

Both cores latch their operands only in the start clock, accept a start only
while `busy_o` is low, and hold the result until the next start. The cores'
throughput is 64 bits per 16 clocks for DES and per 48 clocks for Triple-DES.
At the FPGA clocks reported for the reference implementation (31.42 and
35.91 MHz), that is 125.7 and 47.9 Mbit/s. At the 16 MHz board clock used
here it is 64 and 21.3 Mbit/s.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `sebsw1`, `lbus_ctrl` | `SRAM_AW` | 19 | SRAM address width (512K x 8) |
| `sebsw1`, `crypto_fpga` | `CFG_BYTES` | 218,976 | image length that completes a load (XCV300 bitstream) |
| `sebsw1`, `crypto_fpga` | `INIT_CYCLES` | 32 | configuration clear time |
| `lbus_ctrl` | `SRAM_CYCLES` | 1 | host SRAM strobe length |
| `lbus_ctrl` | `IO_CYCLES` | 4 | IO controller strobe length |
| `lbus_ctrl` | `PROG_CYCLES` | 8 | PROGRAM_n low time |

The round counts (16, 48) and the DES tables are in `rtl/des_pkg.sv`.

## How far it follows the reference design, and where it departs

**Taken from the reference design:**
* the board structure (PCI controller, local bus controller, IO controller,
  SRAM and FPGA on an 8-bit, 16 MHz local bus);
* the configuration path (SRAM to FPGA in SelectMAP mode, started by a
  configuration signal from the IO controller, ended by DONE);
* the loop architecture with its input multiplexer;
* DES with 16 rounds and Triple-DES with a 112-bit key and 48 rounds, each
  with a latency equal to its round count.

The DES tables and the key schedule are those of the DES standard (FIPS 46-3).

**This design's own choices.** The reference design does not give these:
* the host protocol, the register map and the FPGA register window;
* the configuration base, status and count registers, and the failure rules;
* the image header byte that selects the cipher;
* the start/busy/done handshake of the cores;
* on-the-fly key generation with right rotation for decryption;
* the keying option and order of Triple-DES (K1 K2 K1, encrypt-decrypt-encrypt),
  chosen to match the 112-bit key;
* all strobe lengths;
* reading the 70 ns SRAM in one 62.5 ns clock, which the measured 16 MB/s
  implies.

**Left out:**
* the PCI bridge, SRAM, IO chip, EEPROM and voltage converter, which are
  catalogue parts;
* the network controller drawn next to the FPGA, whose interface is not
  defined;
* the USB variant of the board;
* the host software.

Both cipher cores exist side by side in the slot, so the slot's area is not
that of either FPGA image. The reference board's host-transfer rates were
reported as 16 MB/s one way and 10 MB/s the other, with the direction given
both ways round. The data port here supports one byte per clock in both
directions, which covers either case.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_des_round`, `tb_des_keygen`, `tb_des_core`: published DES worked-example
  values (round keys K1, K2, K16; round outputs) and known-answer vectors, in
  both directions. They also check random blocks against the software model
  `tb/des_ref_pkg.sv`, which is itself first checked on the known-answer
  vectors, and that DES takes exactly 16 clocks.
* `tb_tdes_core`: K1 = K2 must reduce to single DES on known vectors. Random
  keys and blocks must match the model, and decryption must invert encryption
  in exactly 48 clocks.
* `tb_crypto_fpga`: PROGRAM_n/INIT_n/DONE behaviour, the byte count that
  completes a load, DES then Triple-DES operation, wiping on reload, and
  failure on an unknown image.
* `tb_lbus_ctrl`: register and SRAM accesses, the 16-byte one-per-clock burst,
  IO strobes and port C, the FPGA window, and the configuration stream. The
  stream must match SRAM byte for byte with no gaps, PROGRAM_n must last
  `PROG_CYCLES`, and the byte count must be right. It also checks the SRAM
  wait during a load, the INIT_n failure and the run-off-the-end failure.
* `tb_sebsw1`: the whole board at default sizes, and the full-size test. It
  stores both images, loads DES through the IO controller (13.7 ms), runs DES
  vectors, switches to Triple-DES, tries a bad image, switches back, makes
  256-byte bursts in 256 clocks, and checks that each block moves through the
  local bus at over 10 Mbit/s. Each mechanism is counted and must occur. It
  takes under a second of simulation.

Behavioural models used only by testbenches: `tb/sram_model.sv` (512K x 8
asynchronous SRAM) and `tb/ppi_model.sv` (8255-type IO, mode 0 and bit
set/reset).

## Simulating

Each testbench builds with plain Verilator 5, for example the full board:

```
verilator --binary --timing --assert -Irtl \
  rtl/des_pkg.sv tb/des_ref_pkg.sv rtl/des_round.sv rtl/des_keygen.sv \
  rtl/des_core.sv rtl/tdes_core.sv rtl/crypto_fpga.sv rtl/lbus_ctrl.sv \
  rtl/sebsw1.sv tb/sram_model.sv tb/ppi_model.sv tb/tb_sebsw1.sv \
  --top-module tb_sebsw1 -o sim && ./obj_dir/sim
```

For a single block, list `rtl/des_pkg.sv`, the block's file and the files it
instantiates, then its testbench (plus `tb/des_ref_pkg.sv` for the cipher
tests). Lint with `verilator --lint-only -Wall`. The remaining warnings are
style notes: `rst_n` is both an asynchronous reset and the `disable iff` of the
assertions.

## Files

* `rtl/des_pkg.sv`: DES tables, permutation and f functions, round counts,
  algorithm identifiers.
* `rtl/des_round.sv`, `rtl/des_keygen.sv`, `rtl/des_core.sv`,
  `rtl/tdes_core.sv`: the cipher library.
* `rtl/crypto_fpga.sv`: the FPGA slot.
* `rtl/lbus_ctrl.sv`: the local bus controller.
* `rtl/sebsw1.sv`: the top.
* `tb/`: the testbenches, the DES reference model and the SRAM/IO models.
