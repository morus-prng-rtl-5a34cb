# MORUS-PRNG accelerator

A pseudo-random number generator built as an integrated accelerator for a
multi-core RISC-V system. It gets its randomness from a cipher: the
authenticated cipher MORUS-1280-128 encrypts a running 128-bit counter, and
each 128-bit block of ciphertext gives four 32-bit random numbers. The key
acts as the seed. Software controls the accelerator directly from the cores
with IXIAM instructions: a small ISA extension whose instructions travel to
the accelerator as packets over the SoC interconnect. It does not go through
a device driver.

A typical session on one core:

1. `RESERVE`, then `CHECK` until the reply says the process owns the accelerator.
2. Write the four key words (`TRL` from a CPU register, or `TGL` from memory).
3. `EXEC` with op_id 0 (**Initialize**).
4. Write N, the amount of numbers wanted, and `EXEC` with op_id 1 (**Generate**).
5. `ISBUSY` until the status reads FREE (or ERROR).
6. `TGS` copies the numbers from the output buffer to main memory. `TRS`
   returns a single number. `AFENCE` waits for the copies to finish.
7. `RELEASE`.

All RTL is SystemVerilog (IEEE 1800-2017) in `rtl/`. Self-checking
testbenches are in `tb/`.

## How the numbers are produced

**Initialize** loads the MORUS-1280 state from the key and a fixed IV. It
runs the cipher's 16 initialization steps and clears the 128-bit counter:

| block | 256-bit initial value |
|---|---|
| S0 | IV in words 0–1, zero in words 2–3 |
| S1 | K ‖ K, where K = {K3,K2,K1,K0} and K0 is least significant |
| S2 | all ones |
| S3 | zero |
| S4 | the MORUS constants const0 ‖ const1 (Fibonacci numbers mod 256, then their continuation) |

It then runs 16 StateUpdates with a zero message. On the last one, K ‖ K is
XORed into S1. Associated data is not supported. The IV is the parameter
`IV`, zero by default. Initialize takes 16 cycles.

**Generate** reads N from the register file and works as follows:

* N larger than the buffer (262,144) is an error. So is a Generate before
  any Initialize. The status register shows ERROR and nothing is written.
* Otherwise the counter's current value is saved. Each cycle the counter is
  encrypted as one MORUS plaintext block:
  * The ciphertext's low 128 bits are written to buffer line
    `counter − saved value`, so numbers always start at buffer word 0.
  * The counter is mixed into the state by a StateUpdate and incremented.
* It stops once `counter − saved value` reaches ⌈N/4⌉. So N numbers take
  ⌈N/4⌉ cycles at 128 bits per cycle.

Only Initialize clears the counter and the state. Successive Generates
therefore continue one long sequence. The four numbers of a step are used
together: if N is not a multiple of 4, the last line holds 1–3 extra numbers,
which the next Generate does not repeat. So "m numbers, then n" equals "m+n
in one call" only when m is a multiple of 4. No finalization or tag is
computed.

**Plaintext and ciphertext layout.** MORUS-1280 encrypts 256-bit blocks. The
counter fills words 0–1 of the block (bits [127:0]) and words 2–3 are zero.
Only ciphertext words 0–1 are kept:

    C[127:0] = ctr ^ (S0 ^ (S1 <<< 192) ^ (S2 & S3))[127:0]

Number j of a step is `C[32j+31:32j]`. It lands in buffer word `4·line + j`.

## The MORUS-1280 datapath

The state is five 256-bit blocks. Each block is four 64-bit words, with word
0 in bits [63:0]. StateUpdate (`morus_state_update`) is five rounds. Round r
rewrites one block from three others and the message m (m is not used in
round 0), then rotates a fourth block as a whole:

| round | rewritten block | word rotation b | whole-block rotation |
|---|---|---|---|
| 0 | S0 = Rotl64(S0 ^ (S1 & S2) ^ S3, 13) | 13 | S3 <<< 64 |
| 1 | S1 = Rotl64(S1 ^ (S2 & S3) ^ S4 ^ m, 46) | 46 | S4 <<< 128 |
| 2 | S2 = Rotl64(S2 ^ (S3 & S4) ^ S0 ^ m, 38) | 38 | S0 <<< 192 |
| 3 | S3 = Rotl64(S3 ^ (S4 & S0) ^ S1 ^ m, 7) | 7 | S1 <<< 128 |
| 4 | S4 = Rotl64(S4 ^ (S0 & S1) ^ S2 ^ m, 4) | 4 | S2 <<< 64 |

`Rotl64(x, b)` rotates each 64-bit word left by b. `<<< w` rotates the
256-bit block left by w bits. Because w is a multiple of 64, it only moves
words.

Each round uses the blocks already rewritten by the rounds before it. The
five rounds form a chain of five AND/XOR stages, and the engine evaluates
all of them in one clock cycle. Rotations are wiring. The 256-bit XOR/AND
chain is the engine's critical path. The `morus_pkg` package holds the
constants and the rotation and keystream functions.

## Talking to the accelerator

### Packets

One packet stream comes in and one goes out (`noc_pkt_t`, valid/ready). Each
packet has a kind, a node id and a payload (`ixiam_pkg`):

| kind | direction | payload |
|---|---|---|
| `NOC_CMD` | core → accelerator | `ixiam_cmd_t`: op, pid, op_id, source/destination resource and word offset, memory address, length, data word |
| `NOC_RESP` | accelerator → core | `ixiam_resp_t`: op, core, pid, ok, 32-bit data |
| `NOC_MEM_RD` / `NOC_MEM_WR` | accelerator → memory node (`MEM_NODE` = 15) | `mem_req_t`: byte address, write data |
| `NOC_MEM_RDATA` | memory → accelerator | 32-bit read data |

A process is identified by the command's source node plus its 8-bit pid.

### Local address map

* Resource `RES_REGFILE`: word 0 is N, words 1–4 are K0–K3.
* Resource `RES_OUTBUF`: word i is the i-th number of the last Generate.

Transfers may read either resource but write only the register file. Only
the engine writes the buffer.

### Instructions

| instruction | effect | reply |
|---|---|---|
| RESERVE | queue the process (ignored if already queued or the queue is full) | – |
| CHECK | – | data bit 0 = owns the accelerator, bit 1 = queued |
| RELEASE | the owner leaves the queue; the status returns to FREE | – |
| TRL | write the packet's data word to a register | – |
| TRS | read one local word | data, ok = 0 if not the owner or out of range |
| TGL | read `len` words from memory at `mem_addr` into registers | – |
| TGS | write `len` local words to memory from `mem_addr` on (4 bytes per word) | – |
| TL | copy `len` local words into registers | – |
| EXEC | op_id 0 = Initialize, 1 = Generate; waits if the engine is busy | – |
| ISBUSY | – | data = status: 0 FREE, 1 BUSY, 2 ERROR |
| AFENCE | – | sent once earlier transfers are done |
| RUISR | ignored; it concerns only the cores | – |

Only the process at the head of the reservation queue (the owner) may use
the accelerator. Transfers and EXECs from other processes are dropped. A
bad transfer from the owner sets ERROR and does nothing. Bad transfers are:
outside a local memory, or writing the buffer. An unknown op_id also sets
ERROR. ERROR is left at the next started operation or at RELEASE.

### Timing

| step | cycles |
|---|---|
| decode and execute of a command | 1, or 3 for RESERVE, CHECK, RELEASE (after the command is taken) |
| reply packet | offered the cycle after decode, leaves through the output register one cycle later |
| register read | 1 |
| output-buffer read | 2 |
| Initialize | 16 |
| Generate of N numbers | ⌈N/4⌉ (32 Gbit/s at 250 MHz) |
| TGS / TL word | one local read, plus one memory-write handshake for TGS |
| TGL word | one memory request plus its reply |

The controller runs commands one at a time and in order. EXEC only starts
the engine, so ISBUSY and transfers keep working while it runs. The software
must wait for FREE before reading the buffer. Transfers are not pipelined:
with a stall-free link, a TGS takes about 4 cycles per word.

## Blocks

| module | role |
|---|---|
| `morus_prng_accel` | top: wires the blocks below |
| `accel_noc_interface` | sorts incoming packets; 4-entry command FIFO; merges replies and memory requests, alternating, into one output register |
| `ixiam_controller` | decodes and executes the IXIAM commands (FSM) |
| `prng_register_file` | N and K0–K3, 1-cycle read; all five also wired to the engine |
| `output_buffer` | 1 MiB as four 65,536 × 32 banks; writes a 128-bit line per cycle, reads one word in 2 cycles |
| `morus_prng_engine` | Initialize / Generate control, 128-bit counter, capacity check |
| `morus_state_update` | one combinational MORUS-1280 StateUpdate |
| `status_register` | FREE / BUSY / ERROR |
| `reservation_queue` | FIFO of process ids (depth 8); the head owns the accelerator |
| `morus_pkg`, `ixiam_pkg` | constants, types, packet formats |

Top-level parameters:

* `BUF_WORDS` = 262144 (1 MiB)
* `QUEUE_DEPTH` = 8
* `CMD_FIFO_DEPTH` = 4
* `IV` = 0

The reset is asynchronous and active low. Every register resets; the buffer
contents do not.

## Relation to the original MORUS-PRNG architecture

These points follow the published architecture:

* the block set
* the 1 MiB output buffer with 2-cycle reads
* the five 32-bit registers with 1-cycle access
* the 1- and 3-cycle command decode latencies
* the Initialize and Generate operations with EXEC op_ids 0 and 1
* the hard-coded IV
* the 128-bit counter that only Initialize clears
* the ⌈N/4⌉ stop rule and the capacity check
* four 32-bit numbers per step

That architecture was only modelled at system level. Everything below is
this implementation's own choice:

* **Cipher internals.** The StateUpdate rounds, rotation constants,
  initialization and keystream are those of MORUS-1280. The encoding into
  words and the key word order are this design's. **The datapath has not
  been checked against the official MORUS test vectors.** It matches an
  independent software-style model written from the same specification,
  so a shared misreading of the specification would go unnoticed. Check
  against a reference implementation before relying on bit compatibility.
* **128-bit steps with a 256-bit block cipher.** MORUS-1280 works on 256-bit
  blocks, but the architecture takes 128 bits (four numbers) per step. The
  counter is zero-extended into the block and half of the ciphertext is
  dropped.
* **Stop rule.** The architecture also describes the test as "difference ≥
  N without its two low bits". That is ⌊N/4⌋ and would give too few numbers
  when N is not a multiple of 4. ⌈N/4⌉ is used.
* **Buffer size.** 1 MiB (262,144 numbers). Elsewhere the architecture
  mentions 256 numbers; that figure is not used.
* **Throughput.** The architecture assumes an engine with 2.54–250 Gbit/s
  taken from an external ASIC. This engine delivers 128 bits per cycle,
  32 Gbit/s at 250 MHz. MORUS is sequential, since each block depends on the
  previous state, so the 250 Gbit/s end (1000 bits per cycle) is out of reach
  for a single stream.
* **Invented details.** These are not specified by the architecture: the
  packet formats, the address map, the CHECK reply code, ownership and error
  rules, the queue and FIFO depths, the single ERROR code, and the error on
  a Generate before Initialize.
* **Out of scope.** The cores' side of IXIAM is not part of this RTL: the
  core-interconnect interface, the user-space interrupt module and the ISA
  extension. Neither are the ring interconnect, the caches or the DRAM. The
  top's packet ports are where the interconnect attaches.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M`, and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_morus_state_update` | 500 random states against the reference model |
| `tb_morus_prng_engine` | 64-word buffer: cycle counts, numbers, sequence continuation, errors, re-initialization |
| `tb_output_buffer`, `tb_prng_register_file`, `tb_status_register`, `tb_reservation_queue` | storage and control blocks against models |
| `tb_accel_noc_interface` | random traffic with stalls, ordering, arbitration, back-pressure |
| `tb_ixiam_controller` | every instruction, latencies, ownership, error cases, with the real register file, buffer, engine, queue and status register |
| `tb_morus_prng_accel` | end to end at full size; see below |
| `tb_workloads` | the three software patterns; see below |

The end-to-end test `tb_morus_prng_accel` runs at the default parameters. It
plays two cores and the memory:

* key load by TRL and TGL
* Initialize, then a Generate that fills the whole 1 MiB buffer (65,536
  engine cycles, checked)
* TGS and TRS readback compared with the model
* an N above capacity
* a continued sequence and TL
* ownership hand-over
* a command burst that fills the command FIFO

`tb_workloads` runs the three ways software uses the generator:

* one Generate per request, for sizes 1, 11, 24, 36, 196 and 4096
* naïve, one number per call
* buffered, refills of 32

It prints the accelerator-side cycle count of each. The counts cover the
accelerator only; the CPU-side cost of issuing the instructions is not
modelled. With a 20-cycle memory model, a 4096-number request takes about
17,500 cycles, mostly the word-by-word TGS.

The reference model for all of these is the package `tb/tb_morus_ref_pkg.sv`.

To run a testbench with Verilator 5 from the repository root:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/morus_pkg.sv rtl/ixiam_pkg.sv tb/tb_morus_ref_pkg.sv \
        tb/tb_morus_prng_accel.sv --top-module tb_morus_prng_accel
    ./obj_dir/Vtb_morus_prng_accel

Replace the testbench file and top-module name to run another one. Every
testbench takes under a second of simulation.
