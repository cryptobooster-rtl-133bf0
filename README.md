# CryptoBooster: a looped-pipeline IDEA coprocessor

CryptoBooster is a coprocessor that encrypts and decrypts a stream of 64-bit blocks
with the IDEA block cipher. It can also switch quickly between independent
*sessions*, where each session has its own key, chaining mode and chaining state.
The architecture has three separable parts:

- a cipher core, which is the only algorithm-specific part besides its session
  adapter;
- a session layer, which loads and saves per-session parameters from an external
  memory;
- a host register interface.

A core for another algorithm can replace the IDEA core without changing the rest.

The IDEA core is a deep pipeline, and the same RTL can be built with one of four
amounts of hardware. One parameter, `N_ROUNDS` (1, 2, 4 or 8), sets how many IDEA
rounds are physically present:

- With fewer rounds, each block circulates through the round hardware several
  times. This saves area at the cost of throughput.
- With all eight rounds present (the default), one block enters and one leaves on
  every clock.

In every build a block spends exactly 59 clock cycles inside the core.

## The IDEA datapath

IDEA works on four 16-bit words. Each of its 8 rounds mixes them with six 16-bit
subkeys using three operations:

- XOR;
- addition modulo 2^16;
- multiplication modulo 2^16+1, where an all-zero word stands for 2^16.

A final *output transformation* applies four more subkeys. The key schedule derives
52 subkeys from the 128-bit key.

- `idea_mulmod` is the modular multiplier, spread over two clock cycles:
  1. a plain 16x16 product is registered;
  2. the next cycle reduces the product with the low-high method, computing
     `lo - hi`, adding 1 if that borrows, and handling the zero operands.
- `idea_round` is one regular round. It is split into **7 register stages**, and the
  subkeys are consumed where the data needs them:

  | Stage | Subkeys consumed |
  |---|---|
  | 1 | Z1 |
  | 2 | Z3 and Z4 |
  | 3 | Z2 and Z5 |
  | 5 | Z6 |

  Each multiplication occupies two stages. The round ends with the output XORs and
  the swap of the two middle words.
- `idea_output_round` holds the first three stages of a regular round with only the
  Z1 to Z4 operations. The previous round swapped the two middle words, and the IDEA
  output transformation does not expect that swap, so this round swaps them back as
  it takes its input. It has no output register: its last stage feeds the core
  output directly.

Total: 8 rounds × 7 stages + 3 stages = **59 cycles**.

## The looped pipeline

`idea_pipeline` chains `N_ROUNDS` copies of `idea_round`, then one
`idea_output_round`. The last regular round's output is also fed back to the input
of the first. Each block carries a small control word through the pipeline:

- `valid`: whether this slot holds a block or is a bubble;
- `pass`: how many times the block has already gone through the regular rounds;
- `tag`: the chain number used by the block-chaining logic.

When a block leaves the last regular round, one of two things happens:

- If `pass + 1 < 8 / N_ROUNDS`, the block goes back to round 0 with `pass`
  incremented.
- Otherwise it continues into the output round.

At the entry to round 0, a returning block always has priority. A new block is
accepted (`in_ready`) only when the entry slot is free. If nothing is offered, the
slot is filled with a bubble (`valid = 0`). The pipeline therefore never stalls, and
every slot moves forward on every clock. A full 1-round pipeline accepts a new block
on one clock in eight, a 2-round pipeline on one in four, and so on.

### Key memories

A block at physical round `j`, on pass `p`, is in IDEA round `p·N_ROUNDS + j + 1`.
Each subkey therefore sits in a small memory (`idea_key_mem`) attached to the stage
that uses it:

- the memory has `8 / N_ROUNDS` entries;
- it is read asynchronously, with the block's `pass` value as the address.

In the 8-round build each memory has a single entry. The output round's memories
hold the four round-9 subkeys. All memories are written through one write port that
carries `key_wr_t {we, round, idx, data}`. Each stage decodes the `round` field to
decide whether the write is its own. Changing keys is therefore only a matter of
writing the memories while the pipeline is empty.

## Block chaining without stalls

In CBC, CFB and OFB modes, the next block of a chain cannot enter until the previous
block of that chain has come out, which is 59 cycles later. A single chain would
leave the pipeline almost empty. `block_chaining` keeps `NCHAIN` independent chains
instead:

- Incoming blocks are dealt to the chains in turn (block *i* goes to chain
  *i* mod `NCHAIN`).
- Each chain has its own chaining register, initialised from its own IV.
- While one chain waits for its block, the other chains fill the pipeline.

The default is `NCHAIN = ceil(60·N_ROUNDS/8)`, which gives 8, 15, 30 or 60 chains.
Sixty chains cover the 59-cycle trip plus one cycle for the chaining register update.
With them, CBC, CFB and OFB run at one block per clock in the 8-round build. A block
that arrives while its chain is still busy is held, and `chain_wait` is raised.

What enters the pipeline, and what is XORed onto its result, depends on the mode
(`P` is the input block, `C` the chaining value):

| mode | enc: pipeline input | enc: XOR at exit | dec: pipeline input | dec: XOR at exit | new chaining value |
|---|---|---|---|---|---|
| ECB | P | – | P | – | – |
| CBC | P⊕C | – | P | C | enc: output; dec: input |
| CFB | C | P | C | P | ciphertext |
| OFB | C | P | C | P | pipeline output |

CFB and OFB always run the cipher forward, so they use the encryption subkeys in
both directions. Blocks leave the pipeline in the order they entered. The value to
XOR at the exit therefore travels beside the pipeline in a FIFO (`u_xorq`), rather
than through it.

The pipeline cannot be told to wait, so the output side must never refuse a result.
Blocks are admitted only while the number of blocks in flight plus those in the
output queue is below `OUTQ_DEPTH` (64). A slow consumer therefore throttles the
input, and nothing in the pipeline is ever lost.

Each chain's current chaining value can be read back (`iv_idx` / `iv_rdata`). This
is how a session is saved and resumed later.

## Sessions

A session is a record of 64 × 64-bit words in external memory, at `sid × 64`:

| word | contents |
|---|---|
| 0 | `[7:0]` algorithm id (1 = IDEA), `[9:8]` mode (0 ECB, 1 CBC, 2 CFB, 3 OFB), `[10]` decrypt |
| 1, 2 | key bits 127:64, 63:0 |
| 3 … 3+NCHAIN-1 | one IV / chaining value per chain |

The session path has three modules:

- **`session_adapter`** (IDEA-specific) executes four commands from the controller,
  which arrive on a link:
  - LOAD reads the record, runs `idea_key_schedule` in hardware, writes the IVs,
    and sets the mode and direction;
  - SAVE writes every chain's current chaining value back into the record;
  - MEMWR and MEMRD give the host raw access to the record memory.

  The key schedule produces the 52 encryption subkeys in 54 cycles, using 25-bit key
  rotations. For decryption it also inverts and reorders them. Each multiplicative
  inverse is computed as x^(2^16−1) by square-and-multiply, so decryption keys take
  about 350 cycles.
- **`session_mem`** splits each 64-bit record word into two accesses (low half first)
  to a 32-bit synchronous memory. That memory has a read latency of `MEM_RD_LAT`
  cycles.
- **`session_control`** is the central controller. After reset it reads the feature
  words of the core and of the adapter. A host command to start session *n* then
  goes through these steps:
  1. block new input;
  2. wait until the core is empty;
  3. save the active session;
  4. load session *n*;
  5. re-open the data path.

  If the algorithm in the record, the core's algorithm and the adapter's algorithm do
  not all match, the load is refused and the error flag is set.

The modules exchange commands and data over point-to-point valid/ready links. Each
link carries a `cl_flit_t {kind, last, data[63:0]}`, and `corelink_fifo` buffers a
link where one is needed.

## Host registers

`host_interface` is a 32-bit register bus with byte addresses. Read data is
combinational. `bus_re` marks a read that pops a FIFO.

| addr | name | meaning |
|---|---|---|
| 0x00 | CMD | write: `[3:0]` op, `[31:16]` argument (session id or memory address) — op 1 = start session, 2 = save, 3 = memory write, 4 = memory read |
| 0x04 | STATUS | `[0]` busy, `[1]` session active, `[2]` error, `[3]` input has room, `[4]` output available, `[31:16]` active session |
| 0x08/0x0C | DIN lo/hi | writing hi pushes the 64-bit block |
| 0x10/0x14 | DOUT lo/hi | reading hi (with `bus_re`) pops |
| 0x18/0x1C | MEMW lo/hi | data for a memory-write command |
| 0x20/0x24 | MEMR lo/hi | result of the last memory-read command |
| 0x28 | IRQ_STAT | `[0]` command done, `[1]` error, `[2]` output available; write 1 to clear |
| 0x2C | IRQ_EN | interrupt enables |
| 0x30 | CORE_FEAT | core feature word `{modes, rounds, key bytes, block bytes, alg id}` |
| 0x34 | ADPT_FEAT | adapter feature word `{0, words per session, chains, alg id}` |

A block written while STATUS[3] is low is dropped, so the host must poll STATUS or
use the interrupt.

## Files

| file | role |
|---|---|
| `rtl/cb_pkg.sv` | shared constants, types and the `chains_needed` and `mulmod` functions |
| `rtl/cryptobooster.sv` | top level: host interface, session control, session adapter, session memory, IDEA core |
| `rtl/ideacore.sv` | block chaining and pipeline, plus the feature word |
| `rtl/idea_pipeline.sv`, `idea_round.sv`, `idea_output_round.sv`, `idea_mulmod.sv`, `idea_key_mem.sv` | the cipher datapath |
| `rtl/block_chaining.sv`, `corelink_fifo.sv` | chaining modes, link buffers |
| `rtl/idea_key_schedule.sv`, `session_adapter.sv`, `session_control.sv`, `session_mem.sv`, `host_interface.sv` | session layer and host side |
| `tb/idea_ref_pkg.sv` | independent IDEA and chaining-mode model (extended-Euclid inverses) used by the testbenches |
| `tb/ext_session_memory.sv` | behavioural 32-bit external memory |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It also has
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cb_pkg.sv tb/idea_ref_pkg.sv rtl/*.sv tb/ext_session_memory.sv \
    tb/tb_cryptobooster.sv --top-module tb_cryptobooster -o sim
./obj_dir/sim
```

Replace the last file and the top-module name to run another testbench.

- `tb_cryptobooster` runs the top with all parameters at their defaults. It covers:
  - reading the feature words;
  - writing session records through the registers;
  - every mode in both directions, checked against the reference model;
  - a session switch, after which the saved chaining values are checked;
  - resuming the saved session;
  - refusing a record for a foreign algorithm;
  - interrupts;
  - bubbles and the output credit limit.
- `tb_idea_pipeline` builds the 1-, 2-, 4- and 8-round pipelines. For each it checks
  the 59-cycle latency and the accepted-block rate, and it checks the standard IDEA
  test vector (key 0001…0008, plaintext 0000 0001 0002 0003, ciphertext
  11FB ED2B 0198 6DE5).
- `tb_ideacore` checks that CBC with 60 chains sustains one block per clock. It also
  runs a 1+1 core (8 chains) through every mode in both directions at one block per
  8 clocks.

## Departures and own choices

- **Latency and throughput.** Latency is 59 cycles in every build. The number of
  rounds changes only how often a new block can enter.
- **Added parts.** These parts are this design's own:
  - the register map;
  - the session record layout;
  - the feature-word encoding;
  - the algorithm-mismatch check;
  - the automatic save on a session switch;
  - the link flit format;
  - FIFO depths;
  - the chaining-value readback;
  - the decryption key derivation in hardware.
- **Configuration path.** The session adapter writes subkeys and IVs into the core
  over a dedicated configuration port, and reads the chaining values back the same
  way. The original block diagram shows the core and the adapter talking only
  through the session controller. Only the data stream and the drain handshake pass
  through `session_control` here.
- **Host bus.** No specific host bus (PCI, VME, …) is built. The generic register
  bus stands in its place and would sit behind such an adapter.
- **Session memory.** It is modelled as a 32-bit synchronous SRAM. Other memory types
  would need another `session_mem`.
- **Chaining modes.** CFB and OFB use full 64-bit feedback.
- **Key changes.** Keys and IVs change only between sessions, with the pipeline
  drained. Changing the key on the fly, per block, is not supported.
- **Reset.** Reset is synchronous and active low. It clears valid bits, counters and
  state machines; datapath registers and key memories are not reset.
- **Clock speed.** No clock frequency is claimed. The 8-round build processes 64 bits
  per clock, so it reaches a given Mbit/s figure at that figure ÷ 64 MHz; for
  example, 1500 Mbit/s needs about 23.4 MHz.
