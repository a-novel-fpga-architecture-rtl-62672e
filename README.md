# SACHa static partition: self-attestation of an FPGA's configuration

An FPGA that has been deployed in the field can hold any configuration. The
party that owns it, the *verifier*, wants proof that the device runs exactly
the configuration it was sent, and nothing left behind by an attacker. SACHa
gets that proof from the configuration memory itself. The FPGA is split into
two parts:

* a small **static partition** that is loaded at power-on and never changes;
* a **dynamic partition** that holds the application.

An attestation round has three steps:

1. The verifier overwrites every frame of the dynamic partition. The last
   frame it sends holds a fresh 64-bit nonce.
2. The verifier has the device read back *every* frame of the FPGA, static
   and dynamic, in an order it picks (a random start frame, wrapping around).
3. The device returns each frame. It also feeds the frame words into an
   AES-CMAC under a key that only the device holds. At the end it returns the
   MAC.

The verifier recomputes the MAC over the frames it received. It also compares
those frames, with the bits that change at run time masked out, against the
image it expects. An attacker cannot hide from this:

* Logic that would fake the answers must sit in the configuration memory,
  where the read-back shows it.
* The nonce and the random order stop replays of old answers.
* The MAC proves that the answers came from the device and not from a
  man-in-the-middle.

This repository holds synthesizable SystemVerilog for the static partition,
plus testbenches that play the verifier and model the FPGA's configuration
port.

## Block structure and clock domains

The static partition runs in three clock domains:

```
            RX domain, 125 MHz             ICAP domain, 100 MHz           TX domain, 125 MHz
 Ethernet ─► sacha_rx_fsm ─► sacha_frame_bram ─► sacha_icap_ctrl ─► sacha_async_fifo ─► sacha_tx_fsm ─► sacha_sync_fifo ─► Ethernet
  bytes      (drop counter)  (dual-clock RAM)    ◄─► ICAP port      (read-back FIFO)    │  ▲   ▲          (outgoing bytes)
                                                                                        ▼  │   │
                                                                          sacha_aes_cmac ◄─┘  sacha_hdr_rom
                                                                          (sacha_aes128, sacha_key_reg)
```

| File | Role |
|---|---|
| `sacha_statpart` | Top level: wires the blocks and the domain crossings together |
| `sacha_rx_fsm` | Parses a received packet, stores it in the RAM, starts the command, drops packets while busy |
| `sacha_frame_bram` | Byte-write, word-read dual-clock RAM that holds one command with its frame |
| `sacha_icap_ctrl` | The "ICAP program": configuration and read-back word sequences on the ICAP port |
| `sacha_async_fifo` | Gray-pointer dual-clock FIFO from the ICAP domain to the TX domain |
| `sacha_tx_fsm` | Builds the response packets, packs frame words into MAC blocks, drives INIT/UPDATE/FINAL |
| `sacha_aes_cmac` | AES-CMAC (RFC 4493) engine with separate init, update and finalize steps |
| `sacha_aes128` | Iterative AES-128 encryption, one round per clock |
| `sacha_key_reg` | Holds the MAC key; has a load port for a key-generating PUF |
| `sacha_hdr_rom` | The 14-byte Ethernet II header of every response |
| `sacha_sync_fifo` | Outgoing byte FIFO in front of the Ethernet core |
| `sacha_pulse_sync` | Toggle synchroniser for single-cycle triggers between domains |
| `sacha_pkg`, `sacha_aes_pkg` | Shared constants, ICAP words and AES round functions |

Control triggers cross the domains through `sacha_pulse_sync`:

* RX → ICAP: start the ICAP program.
* ICAP → RX: configuration done.
* ICAP → TX: read-back frame ready.
* RX → TX: checksum requested.
* TX → RX: response packet queued.

Data cross the domains only through the dual-clock RAM and the dual-clock
FIFO.

The following parts are outside the RTL. Their signals are ports of
`sacha_statpart`:

* the Ethernet MAC/PHY;
* the ICAP primitive;
* the clock manager that makes the 125 MHz and 100 MHz clocks;
* the PUF.

## Packets

All words are sent most significant byte first. Every packet starts with a
14-byte Ethernet II header. The receiver skips that header. Responses carry:

* destination 02:00:00:00:00:01;
* source 02:00:00:00:00:02;
* EtherType 0x88B5.

All three are parameters of `sacha_hdr_rom`.

| Packet from verifier | Payload after the header |
|---|---|
| ICAP_config | command word `01 xx xx xx`, frame address (32 bits), 81 frame words |
| ICAP_readback | command word `02 xx xx xx`, frame address |
| MAC_checksum | command word `03 xx xx xx` |

| Response | Payload after the header | Total |
|---|---|---|
| Frame | type byte `02`, frame address (32 bits), 81 read-back words | 343 bytes |
| Checksum | type byte `03`, 16-byte MAC | 31 bytes |

ICAP_config sends no response. The next command may be sent once the
configuration is finished. The Ethernet core cannot be stalled, so the RX FSM
drops a packet that starts while a command is still executing. It also drops
a packet that is too short for its command. `rx_drop_count` counts the drops,
and the verifier must resend. A command counts as finished when:

* for ICAP_config, the ICAP has finished writing;
* for ICAP_readback and MAC_checksum, the response is complete in the
  outgoing FIFO.

## Driving the ICAP

`sacha_icap_ctrl` writes the usual Virtex-style packet sequence on the 32-bit
ICAP port.

**Configuration:**
1. Dummy word, sync word `AA995566`, NOOP.
2. `CMD = WCFG`, then `FAR = address`.
3. An FDRI write of the frame followed by one frame of zeros. The zero frame
   pushes the real frame out of the device's frame buffer.
4. `CMD = DESYNC`, then NOOPs.

**Read-back:**
1. Sync, `CMD = RCFG`, `FAR = address`.
2. An FDRO read of two frames.
3. The port turns around and the controller reads the two frames. The first
   frame is the pipeline's pad frame and is discarded. The second frame goes
   into the read-back FIFO, behind one word that holds its address.
4. The port turns back and the controller desynchronises.

The frame address is the linear frame number. A real device would need its
FAR encoding (block, row, column, minor) here, and that mapping lives in the
verifier.

Timing at 81 words per frame:

* A configuration takes 2·81+16 = 178 ICAP cycles (1.78 µs).
* A read-back takes 2·81+23 = 185 ICAP cycles with a read latency of one
  cycle. The latency `ICAP_RD_LAT` is a parameter.

## The MAC over the read-back stream

The MAC covers the read-back frame words in the order they were sent. Frame
addresses and headers are not included. `sacha_tx_fsm` works as follows:

* It packs four 32-bit words into each 128-bit block, in big-endian order.
  The packing carries on across frame boundaries.
* It issues **INIT** before the first read-back after reset or after a
  checksum.
* It issues **UPDATE** for every full block.
* It issues **FINAL** on MAC_checksum, together with the 0, 4, 8 or 12 bytes
  that did not fill a block.

CMAC treats its last block specially, so `sacha_aes_cmac` always holds the
newest full block back and chains only the one before it. At FINAL there are
two cases:

* If no bytes are left over, the held block is the last block and is XORed
  with subkey K1.
* Otherwise the held block is chained, and the tail is padded with `10…0`
  and XORed with K2.

A MAC over no data at all also takes the K2 path, as RFC 4493 requires.

One iterative AES core does every encryption:

* INIT encrypts the zero block to get L, then derives K1 and K2.
* Each chaining step costs 11 clock cycles at 125 MHz.
* A frame brings 20.25 blocks, about 223 cycles of AES work. Its 343-byte
  packet takes 343 cycles to leave, so the MAC never slows the byte stream.

At device size, a full read-back is 28,488 × 81 words = 576,882 whole blocks,
so that MAC ends on the K1 path.

## Flow control inside the partition

* **Outgoing FIFO (512 bytes).** The TX FSM starts a packet only when the
  whole packet fits. While it waits, `tx_stall` is high. This happens when
  the Ethernet core is slower than the verifier's commands. Because of this
  rule, the FIFO never overflows, and an assertion in the top checks that.
* **Read-back FIFO (129 words).** It holds one address word plus one frame.
  The RX FSM accepts no new command until the previous response is queued,
  so this FIFO cannot overflow.
* **Frame RAM (512 bytes).** It holds one command with its frame
  (332 bytes).

## Timing against the published proof-of-concept

The published measurements were taken on a Virtex-6 at the same clock
frequencies.

| Action | Published | This RTL |
|---|---|---|
| Configure one frame through the ICAP | 1,834 ns | 1,780 ns (178 cycles at 100 MHz) |
| Read back one frame through the ICAP | 24,044 ns | 1,850 ns (185 cycles) |
| MAC init / update / finalize | 120 / 128 / 136 ns | 96 / 88 / 96–192 ns |
| Send back a frame / the MAC | 2,928 / 472 ns | 2,744 / 248 ns leave the partition; preamble, FCS and padding are added by the Ethernet core |

The full-size simulation uses a verifier with no network delay. It
configures 26,400 frames, reads back 28,488 frames and requests the checksum
in about 0.26 s of simulated time. The published sum of the low-level actions
is about 1.5 s. The read-back in this RTL is much faster than the published
one, whose internal structure is not known.

## What is this design's own

These parts follow the published architecture:

* the three commands;
* the split of work into an RX FSM, an ICAP program and a TX FSM, with their
  clock domains and bus widths;
* a BRAM for the received command and a FIFO for read-back frames;
* a header followed by either a frame or the checksum;
* AES-128 CMAC with one init, updates per frame and one finalize;
* a key register in place of a PUF;
* 81-word frames, 28,488 frames in total and 26,400 in the dynamic
  partition;
* a 64-bit nonce.

These parts are choices made here:

* packet layouts, command and response codes, header addresses and
  EtherType;
* the drop-while-busy policy;
* the ICAP word sequence and the linear frame numbering;
* the crossing circuits and the FIFO depths;
* the byte order of MAC blocks;
* the iterative AES microarchitecture;
* the reset value of the key register (the RFC 4493 example key, for tests
  only).

The key is loaded through `key_load`/`key_in`, which a PUF would drive. A
production device must not keep a known key.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>`:

* AES and CMAC are checked against FIPS-197 and RFC 4493 vectors. They are
  also checked against an independent reference model (`sacha_ref_pkg`),
  whose S-box is computed by inversion in GF(2^8).
* The FIFOs and synchronisers run random traffic against a scoreboard.
* The ICAP controller is checked word by word against the expected ICAP
  sequences and cycle counts.

`sacha_icap_cfgmem_model` is a behavioural ICAP with configuration memory.
It reads and writes frames, returns the pad frame first, and changes the low
byte of word 7 of every frame on each read-back. That byte stands in for
configuration bits that change at run time, so it must be masked.

`tb_sacha_statpart` runs whole attestation rounds on 10 frames, 6 of them
dynamic. The dynamic frames start out holding wrong content. Round 1 is a
clean attestation. In round 2, an adversary flips bits in a static frame, and
the verifier must detect the change while the MAC still matches. The
testbench counts each mechanism and fails if one never happens:

* configurations and read-backs;
* MAC init;
* finalize on the K1 path and on the K2 path;
* a dropped packet;
* a TX stall.

`tb_sacha_full` runs the same verifier at device size with all top-level
parameters at their defaults:

* It configures 26,399 application frames plus the nonce frame.
* It reads back all 28,488 frames from a random start frame.
* It checks every frame and the MAC.

The run takes about a minute in Verilator.

## Simulating

The testbenches use Verilator 5 with timing support. Run from the repository
root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/sacha_pkg.sv rtl/sacha_aes_pkg.sv tb/sacha_ref_pkg.sv \
  tb/tb_sacha_statpart.sv --top tb_sacha_statpart -o sim
./obj_dir/sim
```

For a block testbench, replace the last file and the top with that
testbench, for example `tb/tb_sacha_aes_cmac.sv`. Every testbench prints
`TB_RESULT checks=N failures=M` at the end. Each also has a watchdog that
ends the run with a failure if the design hangs.

The top-level parameters are:

* `FRAME_WORDS` (81);
* `KEY_RESET`;
* `ICAP_RD_LAT` (1).

The end-to-end testbench takes these parameters:

* `NF`, the number of frames;
* `NDYN`, the number of dynamic frames;
* `ROUND2`, which enables the tamper round.

## Not included

* The Ethernet MAC/PHY, the ICAP primitive and the clock manager. These are
  device or vendor blocks.
* The PUF. It is replaced by the key register, which has a load port.
* The boot flash that loads the static partition.
* The nonce register in the dynamic partition. It is configuration data that
  the verifier writes.
* The verifier. It exists only as the testbench model.
