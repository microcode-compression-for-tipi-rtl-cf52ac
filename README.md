# Trace-cache microcode decompressor

Horizontal microcode is very wide and is produced automatically from a datapath description, so it
is bulky but highly repetitive: the same control-word slices come back again and again. This design
stores such microcode compressed and rebuilds it on the fly, one full control word per clock, for
the datapath it drives (the "main architecture").

The idea is to treat decompression as a small program. The compressed stream is code for a
specialised processor. That code does four things:

* fills small **trace caches** with slices of microcode (`WRITE`, or `COPY` to derive a line from
  another by flipping a few bits);
* tells each cache in which order its lines are to be read (`SEQUENCE`);
* releases the prepared orders all at once (`START`);
* handles some housekeeping (`SEQLENGTH`, `JUMP`, `STOP`, `NOP`).

Each output word is the concatenation of one line from every cache. A slice that recurs costs only
a line index in a `SEQUENCE` instead of the slice itself. The compiler (the encoder) that produces
these programs is software and is not part of this RTL. The top-level testbench contains a small
encoder that shows what the hardware expects of one.

Default configuration:

* 2 decode pipelines;
* 4 trace caches of 64 lines × 32 bits, so each microcode word is 128 bits;
* sequences of up to 20 indices, length 7 after reset;
* a 4096 × 64-bit program memory.

## Block structure

```
             +--------+   Request/Data   +-------+  window  +--------+   bus p   +-----------------+
  load ----->| memory |<---------------->| fetch |--------->| decode |---------->| seq manager k   |
             |        |     (per pipe)   | (2    |<---------|        |  (to all  |   + trace cache |--> slice k
             +--------+                  | streams) size   +--------+   caches)  +-----------------+
                          ... one fetch/decode pipeline per issue slot ...           ... one per cache ...
                                                                                  slices 0..N-1 -> uc_data
```

| module | role |
|---|---|
| `mtc_decoder_top` | Wires everything together. Holds the lockstep issue logic, the `SEQLENGTH` register, `STOP`, and the output register and handshake. |
| `mtc_prog_mem` | Program memory. One synchronous read port per fetch unit, plus a load port. |
| `mtc_fetch` | Per pipeline. Two instruction streams, each with a program counter and a bit buffer. Produces the instruction window, drops decoded bits and flushes on `JUMP`. |
| `mtc_decode` | Per pipeline, combinational. Finds the instruction size and the bus fields. |
| `mtc_bus_xbar` | Turns each pipeline's cache number into per-cache write enables and routes each `SEQUENCE` to the manager it names. |
| `mtc_trace_cache` | 64 × 32-bit lines. One write/copy port per pipeline and one registered read port. |
| `mtc_seq_manager` | Per cache. A temporary index buffer and a working index buffer, plus the read pointer. |
| `mtc_pkg` | Default sizes, opcodes and instruction-length functions. |

## Instruction set and bit layout

A program is a bit stream read least-significant bit first. Bit 0 of word *w* follows bit 63 of
word *w−1*. Every instruction starts with a 3-bit opcode, and its operands follow in the order
listed. Field widths below are for the default configuration; `mtc_pkg` computes them from the
parameters.

| opcode | instruction | operands (bits) | size | effect |
|---|---|---|---|---|
| 0 | `NOP` | – | 3 | nothing |
| 1 | `WRITE C,I,D` | C(2) I(6) D(32) | 43 | cache C line I ← D |
| 2 | `SEQUENCE C,S` | C(2), then SL indices of 6 bits | 5+6·SL | load S into manager C's temporary buffer |
| 3 | `START` | – | 3 | every manager holding a loaded sequence moves it to its working buffer and starts reading |
| 4 | `JUMP A,O` | A(12) word address, O(6) bit offset | 21 | this stream continues at bit O of word A |
| 5 | `SEQLENGTH SL` | SL(5) | 8 | later `SEQUENCE`s carry SL indices |
| 6 | `STOP` | – | 3 | freeze fetch and decode until reset |
| 7 | `COPY C,DI,SI,BC` | C(2) DI(6) SI(6) NF(2), then NF bit positions of 5 bits | 19+5·NF | cache C line DI ← line SI with NF bits inverted |

`SEQUENCE` has no length field. Its length is whatever the last `SEQLENGTH` set, or 7 after reset.
A decoder therefore knows the size of a `SEQUENCE` only by knowing that register. The longest
instruction is a 20-index `SEQUENCE` (125 bits), and that length sets the fetch window
(`MAX_INSTR`).

## Sequences: what makes the output flow

This is the heart of the design and the part that needs the most care when writing programs for
it.

Each cache has a sequence manager with two buffers:

* **temporary buffer**, filled by `SEQUENCE`. It also records the sequence length in force at that
  moment.
* **working buffer**, filled from the temporary buffer by `START`.

While a sequence plays out of the working buffer, the decoder is already writing cache lines and
loading the temporary buffers for the next sequence. A sequence of length SL yields SL microcode
words. In every cycle where all managers are active and the output register is free or being
taken, each manager presents its next index. Its cache reads that line into a register, and the
concatenated lines appear on `uc_data` the next cycle.

Two stall rules connect the two sides:

1. **The decoder waits for the output.** A `START` can only execute once every manager is idle or
   is reading its last index in that very cycle. Until then, the packet holding the `START` stays
   in the decode stage (`start_wait` is high), and fetch stops.
2. **The output waits for the decoder.** When a sequence ends and no `START` has executed,
   `uc_valid` drops. The main architecture must hold its state until `uc_valid` returns.

Because a `START` may execute in the cycle of the previous sequence's last read, back-to-back
sequences produce words without a gap. From a `START` executing in cycle *t*, the first word of
the new sequence is on `uc_data` in cycle *t+2*.

Same-edge rules (all instructions of a packet act at one clock edge):

* A cache read and a cache write at the same edge: the read sees the old line.
* `COPY` reads its source as it was before the edge.
* A `SEQUENCE` loaded in the same cycle as a `START` is not the one started. It stays pending for
  the next `START`.

## Fetching variable-length instructions: interleaved streams

Memory words have a fixed width, but instructions do not. An instruction's size is only known in
decode, one cycle after fetch. A single stream could therefore issue only every other cycle.

Each pipeline instead carries **two independent streams**. Each stream has its own program counter
and bit buffer, and packets alternate between stream 0 and stream 1. While one stream's
instruction is being decoded and its size returned, the other stream issues. Across both streams
this gives one instruction per pipeline per cycle. `tb_mtc_fetch` checks this rate with a steady
supply of short instructions.

A stream's window counts as ready when it holds 125 bits, enough for any instruction. The single
memory port (64 bits per cycle) refills the stream with fewer buffered bits first. A `JUMP` clears
that stream's buffer, discards a word still in flight for it, loads the program counter and drops
the first O bits of the next word. After reset, stream *k* of pipeline *p* starts at word *2p+k*.
The program must place there a `JUMP` to that stream's real code.

## Lockstep issue and what a program must respect

All pipelines issue together. In a cycle where every pipeline's window for the current stream is
ready, one **packet** is issued: one instruction per pipeline. The instruction for pipeline *p* of
packet *n* therefore comes from stream *n mod 2* of pipeline *p*. Packets execute in order, and no
hardware checks dependencies inside a packet. A correct program obeys these rules (the testbench
encoder pads with `NOP`s to do so):

* `START` is the first instruction of its packet. An earlier `WRITE`, `COPY` or `SEQUENCE` in the
  same packet would be taken as belonging to the next sequence.
* A `COPY` does not read a line written earlier in its packet.
* A `SEQUENCE` does not share a packet with an earlier `SEQLENGTH`. Decode would size it with the
  old length.
* Within a packet, a later write to the same line wins (the higher pipeline number).
* No line used by the running sequence, or by the one being prepared, is overwritten before the
  next `START`.
* Every cache receives a `SEQUENCE` before each `START`. A word is produced only when all managers
  are active.
* The program ends with `START` for the last sequence and then `STOP`.

To turn a linear instruction list into memory contents:

1. Cut the list into packets of `NPIPE` instructions.
2. Give packet *n*'s slot *p* to stream *(p, n mod 2)*.
3. Prepend the two packets of initial `JUMP`s.
4. Concatenate each stream's instructions.
5. Place each stream anywhere in memory, at any bit offset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NPIPE` | 2 | fetch/decode pipelines (issue width) |
| `NCACHE` | 4 | trace caches, i.e. slices of the microcode word |
| `LINES` | 64 | lines per cache |
| `LINE_W` | 32 | bits per line; `uc_data` is `NCACHE*LINE_W` bits |
| `SEQ_MAX` | 20 | depth of the sequence buffers, i.e. the largest `SEQLENGTH` |
| `SEQ_INIT` | 7 | sequence length after reset |
| `MEM_W` | 64 | memory word and bus width |
| `MEM_DEPTH` | 4096 | program memory words |
| `MAX_FLIPS` | 3 | most bits one `COPY` can flip |

The issue width, the number of caches and the 64-line cache size come from the published
evaluation, which found 64 lines enough and two pipelines free of stalls at sequence length 7.
The maximum length of 20 is the largest sequence length evaluated, and 7 is the length used for
the stall measurements. Line width, memory width and depth, and the flip limit are not given there
and were chosen here.

When changing a parameter, remember that instruction field widths follow from it. For example,
`LINES=128` makes every index 7 bits wide, and `SEQUENCE` grows by SL bits. Any program must be
encoded for the same parameters. The testbench encoder (`tb/mtc_tb_enc_pkg.sv`, with instruction builders in `tb/mtc_tb_pkg.sv`) hard-codes the default
field widths.

## Interfaces and timing

* **Clock and reset.** One clock. `rst_n` is an asynchronous, active-low reset. It clears the fetch
  buffers, decode, the sequence managers and all cache lines. It does not clear the program memory.
* **Loading.** Write the program through `ld_en`, `ld_addr` and `ld_data` while `rst_n` is low,
  then release reset.
* **Output.** `uc_valid`, `uc_data` and `uc_ready` form a valid/ready pair. `uc_data` holds while
  `uc_valid && !uc_ready`.
* **Status.** `start_wait` is high while a `START` waits for the sequence managers. `halted` stays
  high after `STOP`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_mtc_prog_mem` | random loads and two-port reads against a reference array |
| `tb_mtc_fetch` | every window against the memory bits at the expected stream address under random sizes and jumps (word address and bit offset); one issue per cycle in steady state |
| `tb_mtc_decode` | size and every field of random instructions of all eight kinds, built by an independent encoder |
| `tb_mtc_bus_xbar` | per-cache enables and sequence routing |
| `tb_mtc_trace_cache` | `WRITE`/`COPY` on both ports, including same-line collisions, against a reference array |
| `tb_mtc_seq_manager` | buffers, `can_start`, gap-free restart, load during `START`, against a reference model |
| `tb_mtc_decoder_top` | end to end at the default parameters, described below |
| `tb_mtc_workloads` | eight end-to-end runs at issue widths 1 to 3 and sequence lengths 1 to 20, described below |

`tb_mtc_decoder_top` compresses a 1500-word synthetic trace. Each cache slice comes from a drifting
set of hot values, with near-copies and fresh values mixed in. The testbench packs and places the
program, with two mid-program `JUMP`s to relocated code, and checks that every word comes back in
order while the consumer randomly withholds `uc_ready`. It also checks:

* the instruction sizes of every executed packet;
* the two-cycle latency from `START` to the first word;
* that `STOP` halts the decoder.

It counts these events and fails if one never happens: `START` stalls, consumer starvation, fetch
waiting for bits, `JUMP`, `COPY`, `WRITE`, cache hits, replacement, `SEQLENGTH`, `NOP` padding,
back-pressure, and gap-free sequence changes.

`tb_mtc_workloads` repeats the parameter studies of the published evaluation on a synthetic trace of
1500 words. It instantiates eight copies of `tb/mtc_tb_run.sv`. Each copy has its own decoder,
pipeline count and sequence length. Every run checks every word. The consumer is always ready,
so every cycle without a word is a cycle the main architecture would wait. The results:

| pipelines | sequence length | program size / trace size | cycles without a word | memory bits per cycle (average / peak over 64 cycles) |
|---|---|---|---|---|
| 1 | 7 | 52.1 % | 45.3 % | 35.9 / 44.0 |
| 2 | 7 | 52.3 % | 4.3 % | 63.1 / 83.0 |
| 3 | 7 | 52.5 % | 0.1 % | 66.8 / 112.0 |
| 2 | 1 | 68.7 % | 69.8 % | 26.7 / 60.0 |
| 2 | 3 | 56.0 % | 32.6 % | 48.1 / 75.0 |
| 2 | 12 | 51.2 % | 1.9 % | 63.0 / 86.0 |
| 2 | 20 | 50.5 % | 0.2 % | 62.7 / 83.0 |

The trace size counts 128 bits per word. The stall column leaves out the 20 to 50 cycles before the
first word. The trends match the published ones: longer sequences give smaller programs, and more
pipelines stall less. The testbench checks both trends. The absolute numbers do not match, because
the trace is synthetic and changes far more often than real microcode. Each 32-bit slice repeats a
recent value only about 72 % of the time, so the program is about half the trace, not a fifth. For
the same reason, one pipeline stalls 45 % of the time here, against about 7 % in the published
evaluation, and two pipelines still stall about 4 %, where the published evaluation found none at
sequence length 7. The memory traffic is also much higher than the published figures. The mix of the
program shows the same cause. At two pipelines and length 7, `SEQUENCE` instructions take 40 % of
the bits, `COPY` 22 % and `WRITE` 37 %. The published mix is about 66 %, 20 % and 12 %.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mtc_pkg.sv tb/mtc_tb_pkg.sv tb/mtc_tb_enc_pkg.sv tb/tb_mtc_decoder_top.sv --top-module tb_mtc_decoder_top
./obj_dir/Vtb_mtc_decoder_top
```

Replace the last file and the top-module name to run another testbench. The synthetic traces are
not the benchmark programs of the published evaluation. The test shows the hardware decodes
correctly; it does not reproduce the published compression ratios.

## Where this RTL goes beyond, or departs from, the published scheme

* **Lockstep pipelines.** The scheme calls the pipelines independent. Here they issue as one
  packet per cycle. This gives the encoder an exact notion of "same cycle", which the `START`
  padding rule and the fetch stall on `START` both assume.
* **Instruction encoding.** The scheme lists the operations but not their encoding. The opcodes,
  field order and widths above are this design's own, and so is encoding `COPY`'s flipped bits as a
  count plus bit positions.
* **`STOP`.** It stops fetch and decode. The sequence managers finish the sequence already
  started.
* **Start addresses and loading.** Stream start addresses after reset, the load port, the
  output handshake, the registered cache read, cache reset to zero and the tie-break between
  pipelines are choices made here.
* **Not in hardware.** The encoder's mapping of don't-care bits is software and has no
  hardware counterpart. The testbench encoder has no don't-care bits. The branch mechanism
  sketched as future work (filling caches for both outcomes and letting the datapath choose) is
  not built.
