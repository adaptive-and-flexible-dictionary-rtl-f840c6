# Dictionary code compression front end

Embedded programs spend most of their time in a few hundred distinct
instructions. This design stores those instructions once, in a 256-entry
dictionary inside the processor, and lets the program in memory refer to them
with 8-, 16- or 24-bit code words instead of 32-bit instructions. Less code has
to be fetched from the instruction cache, so the cache is accessed less often
and can be smaller. All other instructions stay 32 bits wide and mix freely with
the code words.

The RTL here is the instruction front end of a single-issue, in-order 32-bit
RISC pipeline that runs such code. It fetches 32-bit *fetch units* from the
instruction cache. A fetch unit holds one uncompressed instruction or up to four
code words. One extra pipeline stage, the decompression stage, turns each code
word back into the original 32-bit instruction. Decode, execute, memory and
write-back behind it are an ordinary pipeline and are not part of this RTL.

```
 I-cache ──► fetch_stage ──► fetch_buffer ──► decompress_stage ──► instr_queue ──► decode
   ▲            │  (2 units, 8 bytes)          │         ▲
   └── ic_req ──┘                              ▼         │
                                          dictionary (256 x 32) ◄── LDE writes from write-back
 redirect (taken branch / misprediction) flushes fetch, buffer and queue
```

## Code words

The first byte of every code word tells the decompression stage the class of
the code word and how many bytes it has. Code words are read from memory in
big-endian order: the first byte of a fetch unit is its bits 31:24.

| first byte              | class | bytes | contents after the first byte        | instruction rebuilt              |
|-------------------------|-------|-------|--------------------------------------|----------------------------------|
| `1xxxxxxx`              | U     | 4     | rest of the instruction              | the 4 bytes themselves           |
| `0iiiiiii`, i < 125     | G1    | 1     | –                                    | `dict[i]`                        |
| `0iiiiiii`, i < 125, entry marked branch | R1 | 2 | 8-bit branch offset        | template + offset                |
| `0x7D`                  | G2    | 2     | 8-bit index                          | `dict[idx]`                      |
| `0x7E`                  | G3    | 3     | 8-bit index, 1 padding byte          | `dict[idx]`                      |
| `0x7F`                  | R2    | 3     | 8-bit index, 8-bit branch offset     | template + offset                 |

Some points need care:

* **Uncompressed instructions have bit 31 set.** The instruction set is
  re-encoded so that every 32-bit instruction has bit 31 = 1. A first byte below
  0x80 therefore always starts a code word.
* **G1 and R1 share the one-byte index space.** The first byte alone does not
  say whether the code word is one byte (G1) or two (R1). The dictionary says
  it. An entry whose bit 31 is *clear* is a relative-branch template: it holds
  the opcode and registers of a branch, and its 16-bit offset field is filled
  in from the code word. Since no real instruction has bit 31 clear, the branch
  mark costs no extra storage, and the table stays 32 bits wide. The
  decompression stage reads the dictionary in the same cycle it decodes the
  first byte, and only then knows the code word's length.
* **Branch offsets.** The 8-bit offset of an R1/R2 code word is sign-extended
  into bits 15:0 of the template, and bit 31 is set. The offset is already
  correct for the compressed address space: the compiler computes it, so the
  hardware does no address arithmetic.
* **G3 and R2 exist for alignment.** The compiler aligns each basic block to
  start and end on a fetch-unit boundary. It does this by lengthening a code
  word (G1 → G2 → G3, R1 → R2) instead of inserting padding instructions. The
  extra byte of a G3 is ignored. An R2 can also reach dictionary entries 125
  to 255.
* **G-class never points at a branch template.** An assertion in
  `decompress_stage` checks this.

The first-byte values 0x7D/0x7E/0x7F, the branch mark in bit 31 and the
offset position are choices of this implementation. The class sizes are part
of the scheme: 125 one-byte codes, 256 entries, 8/16/24/32-bit code words and
8-bit branch offsets.

## Fetch and the two-unit buffer

`fetch_buffer` holds up to two fetch units (8 bytes) as a window of bytes,
oldest first. When the decompression stage uses a code word, its bytes are
shifted out, so `win[0]` is always the first byte of the next code word. A code
word can cross a fetch-unit boundary. Because no code word is longer than one
unit, two units always hold a whole code word. `head_pc` is the
compressed-space byte address of `win[0]`, and it goes with each instruction
to decode.

`fetch_stage` asks the cache for the next unit only when that unit is sure to
fit. The test is: after this cycle's consumption and arrival, at least 4 bytes
of the buffer must be free. This makes a dropped fetch impossible, even if
decode stalls the cycle the unit comes back. It also gives the energy saving:
while the decompression stage works through a unit full of code words, the
cache is idle. In the end-to-end test, with a mix of 25 % uncompressed
instructions, there are 0.64 cache requests per instruction delivered.

The cost of this rule is an occasional one-cycle bubble. It happens when the
buffer was full, and a cycle later holds fewer bytes than the next code word
needs. With all cache hits the test delivers 1858 instructions in 2000 cycles,
counting the redirect penalties.

The cache interface allows one request outstanding at a time. `ic_req` and
`ic_addr` (word aligned) issue a request. `ic_rvalid`/`ic_rdata` answer it one
cycle later on a hit, or any number of cycles later on a miss. A new request
may be issued in the cycle the previous data returns.

## Redirects

A redirect (`redirect`, `redirect_pc`) comes from branch resolution or from the
branch predictor of the surrounding processor. It does the following:

* It empties the buffer and the queue.
* It sets `head_pc` to the target.
* It sends the target to the cache in the same cycle, if no request is pending.

A response that is still in flight belongs to the old path and is discarded
when it arrives. Branch targets must be aligned to fetch units, which the
compiler guarantees. An assertion checks this.

Latency with cache hits, for a redirect in cycle *t*:

| cycle | event                                               |
|-------|-----------------------------------------------------|
| t     | target address goes to the cache                    |
| t+1   | the unit returns and enters the buffer              |
| t+2   | the decompression stage rebuilds the first instruction |
| t+3   | the first instruction is offered to decode          |

That is one cycle more than a pipeline without decompression, which is the
extra branch-misprediction penalty of the scheme.

## Dictionary and context switches

`dictionary` works like a register file: 256 × 32 bits, with one combinational
read port and one clocked 32-bit write port. The write port is driven by the
write-back stage for the instruction `LDE entry, offset(rs)` ("load dictionary
entry"). That instruction loads a word from memory into the entry named by its
8-bit immediate.

Because the contents can be rewritten, the dictionary can belong to a process.
The operating system reloads it on a context switch with 256 LDE instructions.
These must be uncompressed, because the dictionary is changing while they run.
A dictionary that never changes is the same hardware, loaded once at start-up.
The contents are not reset.

A read of an entry in the same cycle it is written returns the old word. The
reload routine ends with a jump, which flushes anything decompressed with a
half-loaded table.

## Instruction queue

`instr_queue` is a 4-entry FIFO. It is the output register of the
decompression stage. When decode stalls, the queue fills, `decompress_stage`
stops consuming bytes, and then `fetch_stage` stops requesting units.

Each entry is a `cw_pkg::dec_instr_t` with these fields:

* `instr`: the rebuilt 32-bit instruction.
* `pc`: the byte address of the code word in the compressed address space.
* `len`: the code word's length in bytes, so `pc + len` is the fall-through
  address, for example for a return address.
* `cls`: the code word's class.

## Fetch bandwidth

If a fraction *c* of the executed instructions are covered by one-byte code
words, the bytes fetched drop to (1 − c) + c/4 of the uncompressed amount.
At c = 2/3 the fetch traffic is halved.

`dcc_bandwidth_tb` runs a loop on the front end at three coverages: 0, 2/3 and
8/9. The loop body has one-byte code words mixed at random with 32-bit
instructions. The back edge is taken as a redirect when the last instruction
of the body reaches decode.

The bodies occupy the number of fetch units the formula predicts:

| coverage | body size | share of uncompressed |
|----------|-----------|-----------------------|
| 0        | 48 units  | 1                     |
| 2/3      | 24 units  | 1/2                   |
| 8/9      | 12 units  | 1/3                   |

The front end makes 3 more cache requests per iteration than the body holds.
These are the units fetched past the back edge before the redirect takes
effect. Measured against the uncompressed loop, the cache requests fall to
0.53 at c = 2/3 and to 0.39 at c = 8/9.

## Files

| file | contents |
|------|----------|
| `rtl/cw_pkg.sv` | constants, code-word class enum, `dec_instr_t` |
| `rtl/dictionary.sv` | 256 × 32 dictionary, LDE write port |
| `rtl/fetch_buffer.sv` | two-unit byte window |
| `rtl/fetch_stage.sv` | fetch address, cache requests, redirect handling |
| `rtl/decompress_stage.sv` | code-word decode and instruction rebuild |
| `rtl/instr_queue.sv` | queue to decode (generic FIFO, type parameter) |
| `rtl/dcc_frontend.sv` | top: the front end wired together |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/dcc_bandwidth_tb.sv` | loop workload at three dictionary coverages |

Top parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `FETCH_UNITS` | 2 | buffer size in 32-bit fetch units |
| `QUEUE_DEPTH` | 4 | queue entries |
| `DICT_SIZE` | 256 | dictionary entries |

The code-word format assumes a 256-entry dictionary, so `DICT_SIZE` should stay
at 256.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/cw_pkg.sv rtl/*.sv \
          tb/dcc_frontend_tb.sv --top-module dcc_frontend_tb
./obj_dir/Vdcc_frontend_tb
```

The other testbenches build the same way, with their own module in place of
`dcc_frontend_tb`.

`dcc_frontend_tb` runs the top at its default sizes. It builds two program
images with their own dictionaries, plus an uncompressed context-switch loop.
It models the cache with random misses, and decode with random stalls. It
redirects at random, and reloads the whole dictionary twice through the LDE
port. It then does the following:

* It compares every delivered instruction, its address, length and class with
  what was encoded.
* It checks the redirect latency.
* It checks that the decompression stage never starves while fetch could have
  fetched.
* It counts each mechanism: all six classes, code words crossing a fetch-unit
  boundary, fetch held back by a full buffer, cache misses, decode stalls, a
  full queue, redirects, discarded stale responses and dictionary reloads. A
  mechanism that never happens counts as a failure.

Its tests reach into `dut.u_dp` and `dut.u_q` for two internal signals.

## What is not here

* **Instruction cache, data cache, TLB and main memory.** The cache connects
  through the `ic_*` ports. The design assumes the baseline 16 kB, 2-way cache
  with 32-byte lines and a 1-cycle hit, but any cache that follows the
  one-outstanding-request handshake works.
* **Branch prediction.** A 1024-entry bimodal predictor, a 128-entry BTB and an
  8-entry return stack drive `redirect` from outside. How the predictor would
  be indexed with variable-length code words is left open.
* **The rest of the pipeline, and the write-back path that executes LDE.** The
  encoding of LDE in the instruction word is not defined here; write-back only
  has to drive `dict_we`/`dict_waddr`/`dict_wdata`.
* **The profiler and the compressing compiler.** They choose the dictionary
  contents and produce the code words. The testbench contains a small encoder
  that follows the table above.
