# SecureComm FPGA side: encrypted, authenticated CPU–FPGA transfers through shared DDR

On a CPU–FPGA SoC the two sides usually exchange bulk data through DDR: the
CPU writes a buffer, tells the accelerator where it is, and the accelerator
fetches it over AXI. Anything that can read or write that DDR region, or
watch the AXI bus, then sees and can alter the data. SecureComm keeps that
data path but makes every byte in DDR ciphertext and every transfer
verifiable:

* Data moves in **frames**. A frame is SM4-encrypted with a key sealed into
  the hardware and carries a MAC over its plaintext and a fresh random nonce.
* The **nonce pair** defeats replay. The full 128-bit nonce N is inside the
  frame, encrypted. Its low 29 bits go separately over a direct 32-bit
  register channel (a "LITE" channel), which never touches DDR. A frame copied
  from an earlier transfer carries the wrong nonce and is rejected.
* **Queues.** Two regions of DDR act as circular queues of frames: bufferA
  for CPU→FPGA and bufferB for FPGA→CPU. Their front/rear indices are
  exchanged over the LITE channels, so frames may have any size and any
  address.

This repository is the RTL of the FPGA side: the communication controller,
the SM4 crypto core, the MAC verifier and the two FIFOs between them and a
user kernel. The CPU side is software and is represented here only by
testbench models.

## Data flow

```
            LITE ch1..ch4 (32 bit)                    kin_* (plaintext, last)
 CPU  <-------------------------->  comm_fpga          ^
                                   |  lite_channels    |  FIFO1 (frame_fifo)
 DDR  <====== AXI4, 128 bit ======>|  fdma             |   commit / drop
 bufferA / bufferB                 |  queue control    |
                                   +--- rx blocks ---> secure_fpga
                                   <--- FIFO2 <------  |  sm4_crypto (one pipeline)
                                      (sync_fifo)      |  mac_verifier
                                                       v
                                                      kout_* (results)
```

**Receive (CPU → kernel).**
1. The CPU writes a frame into bufferA.
2. It sends four channel-1 words: address high, address low, length and
   nonce_lite. Then it advances bufferA_rear on channel 3.
3. `comm_fpga` sees `front != rear`, takes the descriptor, and streams the
   frame out of DDR through the FDMA into `secure_fpga`.
4. `secure_fpga` decrypts every block in the shared SM4 pipeline. The
   plaintext goes into FIFO1, but stays invisible to the kernel for now.
5. It recovers N and compares N[28:0] with nonce_lite, then computes the MAC.
6. Pass: FIFO1 *commits* the frame, the kernel can read it, channel 2 reports
   "passed", and bufferA_front advances.
7. Fail: FIFO1 *drops* the frame, channel 2 reports "failed", and `fail_flag`
   and `alarm` are raised. The FPGA waits for `alarm_clear` before it
   advances past the frame.

**Transmit (kernel → CPU).**
1. Kernel results enter `secure_fpga`. Each block goes into the SM4 pipeline
   (encrypt) and into the MAC accumulation in the same cycle.
2. The result frame is assembled in FIFO2: E(N), a zero reserved block, the
   ciphertext blocks and the MAC. It uses the nonce of the last frame that
   passed; no new nonce is generated on the FPGA.
3. `comm_fpga` finds room in bufferB and writes the frame with the FDMA.
4. It advances bufferB_rear and sends the frame's address and length on
   channel 2. The CPU releases the space by advancing bufferB_front on
   channel 3.

## Frame format

All units are 128-bit blocks, stored little-address-first in DDR:

| block | content |
|---|---|
| 0 | nonce_full = E(N) |
| 1 | reserved, zero |
| 2 .. n+1 | E(M0) .. E(Mn-1) |
| n+2 | MAC |

`data_len` on the LITE channels is n, the number of data blocks. A frame
occupies n + 3 blocks. E is SM4 encryption with the sealed key (ECB, block
by block).

## The MAC

For plaintext blocks M0..Mn-1 and nonce N:

```
T   = M0 ^ M1 ^ ... ^ Mn-1
C   = E(T ^ N)
C0  = ASCII hex of C[127:64]     (16 nibbles -> 16 characters, 0-9 A-F upper case)
C1  = ASCII hex of C[63:0]
MAC = E(C0 ^ C1)
```

The hex expansion maps each nibble v to the byte `v <= 9 ? 8'h30+v :
8'h37+v`, so 4'hA becomes 8'h41 ('A').

`mac_verifier` keeps the running XOR T. After the last block it needs two
encryptions, which it does not compute itself. It requests them from the
shared crypto pipeline, and those requests have priority over stream blocks.
A MAC therefore takes about 2 × 34 cycles after the last data block, whatever the
frame length. With no data blocks, T = 0.

Against the CPU side, the check vector is: key = 0123456789abcdeffedcba9876543210,
N equal to the key, data blocks 1, 2 and 3. This gives MAC
801228fa24c1d80ef5d975ef3982eae9.

## The SM4 core

`sm4_crypto` contains **one** SM4 datapath that serves encryption,
decryption and the MAC computations. Each block carries a mode and a 2-bit
tag through the pipeline.

* `sm4_encrypt` has an input register, then 32 round stages with one
  `sm4_round` between each pair of registers, then the final word reversal.
  It accepts one block per clock and has a latency of 33 cycles. With the
  crypto input register, the latency is 34 cycles from `in_valid` to
  `out_valid`.
* **Fixed key.** `KEY` is a parameter. Its 32 round keys are computed at
  elaboration (`expand_key`), so no key material exists as state. The default
  is the SM4 standard test key. Replace it for real use; how keys are
  installed and protected is outside this design.
* **Decryption** reuses the same rounds with the round keys reversed.
  `sm4_key_inv` reverses them with a triangle of registers: lane i has i+1
  stages and delivers rk[31-i], i cycles after loading. So every pipeline
  stage receives its key in step with the block that is in it. With a fixed
  key, the inversion runs once after reset, and `in_ready` stays low for
  about the 32 cycles this takes.
* **Rolling-key mode** (`CM_ROLL`) lets each block bring its own key.
  `sm4_key_exp` is a pipelined key expansion, skewed like the data pipeline,
  so that stage i produces round key i of the key that entered i cycles
  earlier. SecureComm itself uses only the fixed key. Rolling-key mode is
  built and tested, but its input (`in_key`) is tied off in `secure_fpga`.
* Each stage picks its round key from the mode travelling with its block:
  fixed forward, inverted, or expanded. Encryption, decryption and
  rolling-key blocks may follow each other cycle by cycle without a flush.

## Queues in DDR and the LITE channels

Channels 1 and 2 carry an opcode in bits [31:29] and a 29-bit payload:

| ch | opcode | payload |
|---|---|---|
| 1 CPU→FPGA | 001 | base address bits [39:29] |
| | 010 | base address bits [28:0] |
| | 011 | data_len |
| | 100 | nonce_lite = N[28:0] |
| 2 FPGA→CPU | 001 | result frame address [39:29] |
| | 010 | result frame address [28:0] |
| | 011 | result data_len |
| | 111 | 0 = integrity passed, 1 = integrity failed |

* Channel 3 is `{bufferA_rear, bufferB_front}`. Only the CPU writes it.
* Channel 4 is `{bufferA_front, bufferB_rear}`. Only the FPGA writes it.

Indices advance as `(i + 1) % MAX_SIZE`. A queue is full when advancing rear
would make it equal to front, so at most MAX_SIZE − 1 frames are outstanding.

`lite_channels` handles the channel words:
* It collects the four channel-1 words into a descriptor. The nonce word
  completes the descriptor and pushes it into a small parameter FIFO.
* It sends status words and result-frame parameters on channel 2 with a
  valid/ready handshake.

The CPU chooses where each bufferA frame goes. The FPGA chooses where each
bufferB frame goes, by first fit in a ring over [BUFB_BASE, BUFB_BASE +
BUFB_BYTES):
* The new frame goes right after the newest frame if it fits before the end.
* Otherwise it goes at the base, if that leaves the oldest unreleased frame
  untouched.
* Otherwise the FPGA waits until the CPU releases frames.

Each frame's address is remembered per slot, so releasing frames reclaims
their space.

## FIFOs and flow control

* **FIFO1** (`frame_fifo`, 1024 × 129 bits: plaintext plus a last flag) has
  three pointers: write, committed and read. The kernel sees only committed
  words. A failed frame is removed by moving the write pointer back.
  * A frame must fit in FIFO1 whole, so `secure_fpga` starts a frame only
    when FIFO1 has room for all of it.
  * A frame longer than FIFO1 (more than 1024 data blocks, 16 KB) is still
    read, to keep the stream aligned, but it is failed. Senders split larger
    data into several frames.
* **FIFO2** (`sync_fifo`, 1024 × 128) holds one complete result frame before
  it is handed to `comm_fpga`. A result frame therefore has at most
  FIFO2_DEPTH − 3 = 1021 data blocks. If the kernel produces more, the frame
  is closed there (`tx_cut` pulse), and the remaining results go into
  following frames.
* `secure_fpga` handles one frame at a time, receive or transmit, because
  both use the same crypto pipeline and MAC verifier. The bufferA reads and
  bufferB writes of `comm_fpga` are independent and may overlap on AXI.
* **FDMA** is an AXI4 master with separate read and write engines. Transfers
  are split into INCR bursts of up to 256 beats, never across a 4 KB
  boundary, with one burst outstanding per direction. A non-OKAY response
  sets the sticky `axi_err`.

## Where this design goes beyond or departs from the published description

* **Clocking.** Everything runs on one clock, with single-clock FIFOs. In the
  original system the FIFOs also cross between clock domains, and the crypto
  runs at 150 MHz.
* **LITE channels.** These are plain ports with strobes. On the board they
  are AXI GPIO registers written by a CPU driver.
* **Nonce check.** The nonce block is *decrypted* to recover N. The original
  description says the received nonce is "encrypted and extracted". Since
  nonce_full = E(N), decryption is the step that recovers N.
* **Failed frames.** The FPGA advances bufferA_front after a failed frame
  only once the user has answered the alarm. Front advancement is specified
  only for frames that pass.
* **Design choices of this implementation:** the bufferB placement policy,
  the oversize rule, the result-frame cut, the channel-1 descriptor
  completion, the key default, all widths (40-bit addresses, 20-bit lengths)
  and all depths.
* **Length field.** Channel 1 carries a 29-bit length. CommFPGA keeps only
  its low LEN_W bits, so a sender must not post a frame of 2^LEN_W blocks
  or more. At the default width that is 16 MB. Such a frame would be read
  as a shorter frame and then rejected.

## Parameters of `securecomm_top`

| name | default | meaning |
|---|---|---|
| KEY | 0123…3210 | sealed SM4 key |
| ADDR_W | 40 | AXI address width |
| LEN_W | 20 | frame length width (data blocks) |
| MAX_SIZE | 16 | slots in each DDR queue |
| FIFO1_DEPTH | 1024 | FIFO1 blocks, also the longest accepted frame (power of two) |
| FIFO2_DEPTH | 1024 | FIFO2 blocks; result frames carry up to DEPTH − 3 (power of two) |
| BUFB_BASE | 0x70000000 | start of bufferB |
| BUFB_BYTES | 16 MB | size of bufferB |

At the defaults, the design maps to about 4,400 cells, 2,750 flip-flop
bits, and 830 kbit of memory for the two FIFOs (generic yosys synthesis).
Most of the logic is in the SM4 pipeline.

## Files

`rtl/`
- `securecomm_pkg.sv`: types, S-box, SM4 and MAC functions, opcodes.
- `sm4_round.sv`, `sm4_encrypt.sv`, `sm4_key_inv.sv`, `sm4_key_exp.sv`,
  `sm4_crypto.sv`: the crypto core.
- `mac_verifier.sv`: the MAC computation.
- `sync_fifo.sv`, `frame_fifo.sv`: the FIFOs.
- `fdma.sv`, `lite_channels.sv`, `comm_fpga.sv`: communication.
- `secure_fpga.sv`: the security controller.
- `securecomm_top.sv`: the top level.

`tb/`
- One self-checking testbench `tb_<module>.sv` per module.
- `sm4_ref_pkg.sv`: an independent SM4/MAC reference.
- `axi_mem_model.sv`: DDR with random stalls, checking the 4 KB and WLAST
  rules.
- `securecomm_env.svh`: the end-to-end environment. It contains:
  - a CPU model with an attacker that tampers with frames and replays them;
  - a kernel model;
  - the user answering alarms.
- `tb_securecomm_top.sv`: runs that environment at small sizes, so that every
  mechanism happens many times. Each mechanism is counted, and the test fails
  if one never happens:
  - FIFO1 waits, an empty bufferA, a full bufferB queue, bufferB wrap-around;
  - cut result frames, burst splitting, overlapping reads and writes;
  - every kind of verdict.
- `tb_securecomm_full.sv`: runs the top at its defaults:
  - a 1024-block frame in each direction;
  - a tampered, a replayed and an oversize frame;
  - 2048 result blocks split at 1021.
- `tb_securecomm_image.sv`: also runs the top at its defaults. It sends one
  224 × 224 × 3 network input, one byte per element, through the design:
  - the 150,528 bytes go as nine 1024-block frames and one 192-block frame,
    back to back through the 16-slot queue;
  - all 12,480 result blocks are checked on their way back.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 (a two-state simulator; all state that is read is reset):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_securecomm_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/securecomm_pkg.sv tb/sm4_ref_pkg.sv tb/tb_securecomm_top.sv
./obj_dir/Vtb_securecomm_top
```

Replace the top module and file for any other testbench. The full-size run
takes under a second of simulation time on a desktop machine.
