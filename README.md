# A programmable channel decoder with one datapath for Viterbi and LDPC decoding

Receivers that support many standards must decode convolutional codes and LDPC
codes. The usual answer is to build one datapath per code family. This design
uses a single datapath for both. It rests on one observation: the two
algorithms are built from almost the same operations.

| algorithm step               | operations               |
|------------------------------|--------------------------|
| LDPC check-node update       | compare, subtract, XOR   |
| LDPC variable-node update    | add, subtract            |
| Viterbi branch metrics       | add                      |
| Viterbi add-compare-select   | add, compare             |
| Viterbi traceback            | shift, memory            |

A small two-stage ALU can serve every row except the last. So the decoder has
64 such ALUs working in SIMD fashion, plus one unit that is specific to Viterbi:
the traceback unit (TBU). The machine is an application-specific processor (ASIP).
It runs a VLIW program, which holds the decoding schedule, code structure,
trellis size and iteration count. You change codes by changing the program,
not the hardware.

The architecture follows the decoder published by Kunze, Matuš and Fettweis
("ASIP Decoder Architecture for Convolutional and LDPC Codes"). This RTL is an
independent implementation. The block structure, the operations of each ALU
stage and the published sizes come from that description. The instruction
set, the pipeline timing, the number formats and the host interface are this
implementation's own. They are marked as such below and in each file's header.

## Block structure

```
           host port (program, data, start/done)
                 |
   IMEM --> program control --> AGU --(addresses, systematic info)--+
                                 |                                 |
   DMEM (1024 x 64 x 5 bit) --> Shuffle (rotate / broadcast)       |
                                 |                                 |
            +---> 64 x ALU stage 1 (accumulate, min search, buffers) <-+
            |                    |
            |          trellis interconnect (straight / 8..64 states)
            |                    |
            +---- 64 x ALU stage 2 (subtract, compare-select, offset, out mux)
   metric feedback               |                 |
                            Shuffle^-1         decision bits --> TBU
                                 |                                  |
                               DMEM  <------- decoded bits ---------+
```

| file | block |
|---|---|
| `rtl/dec_pkg.sv` | sizes, opcodes, instruction and pipeline types |
| `rtl/asip_decoder.sv` | top level: pipeline, write-port merge, host interface |
| `rtl/alu_stage1.sv`, `rtl/alu_stage2.sv` | the two stages of one ALU lane |
| `rtl/trellis_connect.sv` | programmable interconnect between the stages |
| `rtl/vector_alu.sv` | 64 lanes plus the interconnect |
| `rtl/shuffle.sv` | barrel shifter. It serves as Shuffle and, with `INVERSE=1`, as Shuffle^-1 |
| `rtl/tbu.sv` | traceback unit |
| `rtl/agu.sv` | address registers, configuration, systematic info |
| `rtl/program_control.sv` | fetch, zero-overhead loops, halt |
| `rtl/dmem.sv`, `rtl/imem.sv` | data and instruction memories |
| `rtl/host_if.sv` | host or core ownership of the memories |

## How one ALU lane runs both algorithms

Every lane handles one node at a time and takes **one operand per clock**.
The lane is the central idea of the design, so here it is step by step.

**Stage 1** (`alu_stage1`) holds:
- an accumulator;
- a min-search unit: the smallest and second-smallest magnitude, and the XOR
  of the signs;
- a *hold* copy of the accumulator and of the minima, taken on the last
  operand of a node;
- a 16-entry *LLR buffer* per lane.

**Stage 2** (`alu_stage2`) finishes the node. An out mux selects the result,
which is registered.

### LDPC check node (offset Min-Sum)
1. The `dc` incoming edge messages arrive one per clock, already rotated by the
   shuffle. Each one updates min1, min2 and the sign parity (`S1_MIN_FIRST`,
   `S1_MIN`) and is stored in the LLR buffer. The last one copies the result
   to the hold registers.
2. Then stage 2 emits one answer per clock (`S2_CN`). It reads edge *k* back
   from the buffer. If its magnitude equals min1, it takes min2 instead,
   because that edge must not see its own value. It then subtracts the offset
   beta and clips at zero. The sign is the total parity XOR the edge's own
   sign. Comparing by value gives the exact result even with ties, since then
   min2 = min1.

### LDPC variable node
The channel value is loaded (`S1_ACC_LD`). The incoming check messages are
added (`S1_ACC_ADD`) and buffered. Stage 2 then answers each edge with
`sum - own message`, saturated to 5 bits (`S2_VN`). `S2_DEC` writes the full
sum, whose sign is the hard decision.

### Viterbi state k (one lane per trellis state)
Stage 1 of lane *j* forms both outgoing candidates of state *j*. Each takes
two clocks: fed-back metric plus branch term of symbol 1 (`S1_ACC_FBSYS`),
then plus branch term of symbol 2 (`S1_ACC_SYS`). The branch term is the
received soft value *y* when the expected code bit is 0, and its bitwise
negation (31 − y) when it is 1. The AGU supplies the expected bit as
*systematic info*. The candidate for input bit *u* is stored in LLR-buffer
entry *u*.

In the fifth clock the interconnect brings each state's two incoming
candidates together. Stage 2 keeps the smaller one (`S2_ACS`) and outputs the
new metric and a decision bit. The new metric feeds back to stage 1 for the
next trellis step.

Metrics are 10-bit and allowed to wrap around. Candidates are compared by the
sign of their difference, so no normalisation step is needed. This holds as
long as the metric spread stays below 512, which is comfortably true for
K ≤ 7 with 5-bit inputs.

## Trellis interconnect and state numbering

States are numbered as shift registers. The new state is
`k = ((j << 1) | u) mod N`, with the newest input bit *u* at bit 0. So state
*k* is reached from `j0 = k >> 1` and `j1 = (k >> 1) + N/2` with input bit
`u = k & 1`. Stage-2 lane *k* sees:
- `ta` = buffer entry `k & 1` of lane j0;
- `tb` = the same entry of lane j1.

The decision bit is 1 when `tb` wins. N can be 8, 16, 32 or 64. With fewer
than 64 states the lanes split into 64/N independent trellises. Only the
first one is traced back by the TBU.

Systematic info for state *j*, input *u* and symbol *b* is the parity of
`{j, u} & G_b`, where G1 and G2 are programmable 8-bit generator masks. Bit
*i* of a mask is the tap on the input bit from *i* steps ago. The tested code
uses G1 = 171 and G2 = 133 (octal), with K = 7.

## Traceback unit

The path memory holds the last `TB_LEN = 35` decision vectors (5K for K = 7).
On each step, a combinational chain walks back 35 steps from state 0 using
`prev = (d[s] << (log2 N − 1)) | (s >> 1)`. The decoded bit of the oldest
step is bit 0 of the state reached. So after the first 36 steps one bit
leaves per trellis step.

A `flush` at the end of a block walks the stored vectors one per clock. It
starts from state 0, which is right for a zero-terminated block, and emits the
last 35 bits.

Decoded bit *n* is written to DMEM word `obase + n/64`, lane `n mod 64`, as
value 0 or 1. The datapath has priority on the write port. A decoded bit waits
in a one-entry register while the datapath writes.

The traceback always starts at state 0 instead of the best state. This is a
simplification. It costs a little error-rate performance in the middle of a
block.

## Instructions and pipeline timing

An instruction is 80 bits. The top bit selects between two formats:

- **Control word** (`ctrl_t`). It takes one issue slot.
  - `LOOP a,b` repeats the following words up to address *b*, *a* times, with
    no cycle overhead. Loops nest two deep. Nested loops must not end on the
    same address.
  - `SETAR i,a,b` loads address register *i* with pointer *a* and stride *b*.
  - `SETCFG` loads:
    - log2 of the state count, in the `idx` field;
    - the generator masks G1 and G2, in `a[15:8]` and `a[7:0]`;
    - beta, in `b`;
    - the TBU output base word, in `c`.

    `SETCFG` also clears the TBU.
  - `HALT` stops issue.
- **VLIW word** (`vliw_t`). It has one field group per pipeline step, all
  describing the same operand as it flows down:

| step | clock | fields |
|---|---|---|
| issue | t | `rd_en rd_ar rd_off rd_inc`: DMEM read at `ar[15:6] + rd_off`. Pointer bits [5:0] select the broadcast lane |
| stage 1 | t+1 | `shuf_mode shuf_amt`, `s1_op s1_buf_we s1_buf_src s1_buf_idx s1_hold sys_u sys_b` |
| stage 2 | t+2 | `s2_op s2_buf_idx ic_trellis`. Result registered at the end of t+2 |
| write | t+3 | `wr_en wr_ar wr_off wr_inc unshuf_amt`, `tbu_push tbu_flush` |

There are **no interlocks**. The program must keep these distances:
- A stage-2 result is visible to stage 1 (metric feedback) for words issued
  at least 2 clocks after the producing word. The Viterbi loop therefore has
  one empty slot.
- A word written to DMEM can be read back by a word issued at least 4 clocks
  later. The LDPC program puts 3 empty words between the check-node and
  variable-node phases.
- A node's stage-2 outputs read the hold registers. They may start in the
  same word as the node's last operand, the one that sets `hold`. Meanwhile
  stage 1 already takes the next node's operands. The next node's *last*
  operand must issue after the previous node's last output word. Consecutive
  nodes use different LLR-buffer entries.

The shuffle rotates the read word so that lane *l* receives lane
`(l + shuf_amt) mod 64`. The write side rotates back by `unshuf_amt`. For a
quasi-cyclic LDPC code, a circulant with shift *s* therefore uses `s` on both
sides. Edge messages stay in variable-node order in memory. Broadcast mode
copies one lane to all lanes. The Viterbi program uses it to give every state
the same received symbol.

### Example schedules (as run by the end-to-end testbench)

Viterbi takes 6 clocks per trellis step. The pointers `ar0` and `ar1` both
walk the symbol stream with stride 1.
```
FBSYS u=0 b=0  (read sym via ar0++ , broadcast)
SYS   u=0 b=1  (read sym via ar0++ , buffer[0] = new acc)
FBSYS u=1 b=0  (read sym via ar1++)
SYS   u=1 b=1  (read sym via ar1++ , buffer[1] = new acc)
ACS  trellis, tbu_push
nop
```
LDPC, one flooding iteration, software-pipelined:
- **Check rows.** Each row has `dc` words of read/rotate/`MIN`. Its `dc`
  output words (`S2_CN`, rotate back, write) start in the slot of its last
  operand, so they share slots with the next row's operands. A row costs `dc`
  clocks. Even rows use buffer entries 0..7 and odd rows entries 8..15.
- Three empty words.
- **Columns.** Each column has one `ACC_LD` word and `dv` `ACC_ADD` words.
  Its `dv` `S2_VN` writes and one `S2_DEC` write start in the slot of its
  last `ACC_ADD`. A column costs `dv + 1` clocks.
- Three empty words.

For the test code (`dc` = 5, `dv` = 3) one iteration is 363 words.

The edge messages start as the channel values. A copy pass (`ACC_LD` +
`S2_ACC` + write) sets this up.

## Data formats and sizes

| item | value | origin |
|---|---|---|
| lanes (ALU FUs) | 64 | published |
| soft value in memory | 5 bit; LDPC two's complement, saturated to ±15; Viterbi unsigned 0..31 | width published, format own |
| internal lane width | 10 bit signed | own |
| LLR buffer | 16 entries per lane (node degree ≤ 16) | published |
| trellis sizes | 8, 16, 32, 64 states | published |
| data memory | 1024 words × 64 lanes × 5 bit = 40 kByte, 1 read + 1 masked write port | size published, organisation own |
| instruction memory | 1024 × 80 bit | own |
| traceback depth | 35 = 5K (K = 7) | published rule |

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dec_pkg.sv tb/tb_asip_decoder.sv \
          --top-module tb_asip_decoder -Mdir obj
./obj/Vtb_asip_decoder
```

`tb_asip_decoder` runs the top level at its default size. It acts as host and
assembler and runs two programs back to back:
- **LDPC**: a quasi-cyclic code of 50 × 30 circulants of size 64 (N = 3200,
  rate 0.4, column weight 3, row weight 5), with 10 offset Min-Sum iterations
  and beta = 1. Every edge message and decision word must match a reference
  model exactly. It takes 3790 clocks. At 200 MHz that is 68 Mbit/s
  counted in information bits (1280 per block), or 169 Mbit/s counted in code
  bits.
- **Viterbi**: the (171,133), K = 7 code with 1024 steps. The decoded bits must
  match a reference decoder exactly, and the bit errors must be far fewer than
  the channel errors. It takes 6 clocks per step, or 33 Mbit/s at 200 MHz.

The testbench also counts each mechanism and fails if one never happened:
rotation, broadcast, both decision values, minimum exchange, offset clipping,
hold, loop jumps, streamed and flushed traceback bits, and a decoded bit
waiting for the write port.

Unit testbenches: `tb_alu_stage1`, `tb_alu_stage2`, `tb_trellis_connect` (all
four trellis sizes), `tb_vector_alu`, `tb_shuffle`, `tb_tbu` (64 and 8 states,
with write back-pressure), `tb_dmem` (full size), `tb_imem`, `tb_agu`,
`tb_program_control` (nested loops, exact issue trace and cycle count) and
`tb_host_if`.

## Where this implementation departs from the published decoder

- **Throughput.** The published decoder reaches 30 Mbit/s Viterbi and
  53 Mbit/s LDPC at 200 MHz. The schedules here give about 33 Mbit/s
  Viterbi and 68 Mbit/s LDPC (information bits):
  - The published Viterbi schedule is not known.
  - The published LDPC figure comes from a different code of the same length
    and rate, and the figure does not say which bits it counts. So the
    two LDPC numbers cannot be compared exactly.
- **LDPC test code.** The published LDPC result uses a tail-biting LDPC
  convolutional code of the same length and rate. Its parity-check structure
  is not available, so a quasi-cyclic block code is used instead.
- **Larger trellises.** The published decoder can handle trellises with more
  than 64 states by keeping state metrics in memory. That is not supported
  here: metrics are 10 bits and memory lanes 5 bits, and no schedule for it is
  defined.
- **Long blocks.** The published memory holds 16K-bit LDPC and 64K-bit Viterbi
  blocks. With the layouts used here, a 16K-bit LDPC code of column weight 3
  fills the data memory before decisions are stored. Viterbi holds about
  16K steps, because one 5-bit symbol goes in each lane.
- **Own additions and choices:**
  - broadcast mode in the shuffle;
  - hold copy of the accumulator;
  - decisions 1 = second predecessor, with ties going to the first;
  - traceback from state 0;
  - modulo metrics;
  - the host port and its arbitration;
  - the instruction set and loop hardware.
- **Not reproduced.** Area, power and the 130 nm implementation figures are
  outside the scope of RTL. Turbo decoding, mentioned as future work, is not
  included.
