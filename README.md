# Turbo Layered BP decoder for QC-IRA LDPC codes

This is a low-density parity-check (LDPC) encoder and decoder, written in SystemVerilog, for
quasi-cyclic irregular repeat-accumulate (QC-IRA) codes. Its main idea is that the code and the
decoder are designed together. The parity part of the code's parity-check matrix is an
accumulator, which is a two-state convolutional code. The decoder therefore does not treat that
part as ordinary check nodes. It runs a forward-backward (BCJR-like) pass along the accumulator
chain and exchanges messages with the rest of the code in a layered way. This schedule is called
Turbo Layered BP (TLBP). It converges in fewer iterations than flooding or plain layered belief
propagation: about 10–20 iterations are enough.

The default configuration is a rate-1/2 code with 768-bit frames. Channel values are 4-bit LLRs,
the decoder runs 10 iterations, and two decoding processors work side by side. Each processor
uses the pipelined schedule, in which one window's backward pass overlaps the next window's
forward pass. A processor with the plain schedule, one pass at a time, is available through a
parameter.

## The code

A codeword is `x = [c p]`: K information bits `c` followed by M parity bits `p`. The parity-check
matrix is `H = [Hs Hp]`.

* `Hs` is an `MB x KB` array of `Z x Z` circulants. A circulant `I_d` is the identity matrix
  shifted right by `d`, so row `l` of `I_d` has its one in column `(l + d) mod Z`.
* `Hp` is dual-diagonal. Parity check `c` involves parity bits `p_c` and `p_(c-1)`. This makes
  encoding a running XOR: `p_c = p_(c-1) xor (Hs·c)_c`.

In block form the parity part is not drawn as a plain bidiagonal. Block column `j` of `Hp` holds
`I_0` in block rows `j` and `j+1`, and the last block column wraps round to block row 0 with a
one-position shift (called `I'_1` here). This is a single bit-level accumulator chain once checks
are numbered in **accumulator order**: `c = l*MB + i`, where `i` is the block row and `l` the
row inside the circulant. The whole design uses this order. Parity bit `p_c`, the parity channel
values and the encoder's `parity[c]` output are all indexed by `c`.

The shift table (`ldpc_pkg::delta`) is a 3 x 3 example code for `Z = 8` that was built by a
cycle-avoiding construction:

| block row \ block column | 0 | 1 | 2 |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 1 | 6 | 7 | 3 |
| 2 | 3 | 1 | 6 |

The default size is `Z = 128`. No coefficients are available for the 768-bit code, so the table
is scaled by `Z/8`. The scaled table keeps the cycle structure of the `Z = 8` code, but it is
not an optimised 768-bit code. Bases larger than 3 x 3 repeat the table. To use another code,
replace the `delta` function. The encoder, the decoder and the testbench model
(`tb/ldpc_model_pkg.sv`) each carry their own copy of the table, so change all of them together.

## How TLBP decoding works

Each parity check is split into `S = KB/J0` **trellis sections** of `J0` systematic edges each.
With the default `J0 = KB = 3`, each check is exactly one section. With a smaller `J0`, the
check is chained through extra parity bits that are never sent (channel value 0). This keeps the
datapath width at `J0` edges whatever the row weight of the code. The trellis has
`T = M*S` sections. It is cut into **windows** of `WIN` sections, `T/WIN` windows per frame.

State kept per frame:

| store | size | contents |
|---|---|---|
| a-posteriori banks | KB banks x Z words x 8 bit | `A_v`: channel value plus all check messages of variable `v` |
| edge memory | T words x J0 x 6 bit | `m_cv`: last check-to-variable message on each edge |
| m_vc buffer | WIN words x J0 x 6 bit | variable-to-check messages of the current window |
| FBA buffer | WIN words x 18 bit | forward metric, `m_IO` and parity channel value per section |
| boundary memory | T/WIN x 6 bit | backward metric at each window edge, from the last iteration |
| double input memory | 2 x N x 4 bit | channel values of the frame being decoded and of the next one |

The pipelined processor keeps two of each window buffer, and a second copy of the a-posteriori
banks (see below).

Each window is processed in two passes, one section per clock cycle in each.

**Forward pass** (sections rising), in `fwd_spc` and `fba_processor`:

```
m_vc(q) = sat(A_v(q) - m_cv(q))                  q = 0..J0-1
m_IO    = minsum over q of m_vc(q)               (sign product, smallest magnitude)
store (f, m_IO, y) in the FBA buffer;  f <- sat( f [+] m_IO + y )
```

Here `[+]` is the min-sum box-plus and `y` is the channel value of the section's parity bit.
`f` starts at +max in each iteration, because `p_(-1) = 0` is known. It then runs on from
window to window.

**Backward pass** (sections falling), in `fba_processor` and `bwd_spc`:

```
g      = sat(y + b)                   b: message about p_s from the right
m_OI   = f [+] g                      what the parity chain tells the check
b      <- g [+] m_IO
m_cv'(q) = minsum of m_OI and every m_vc(r), r != q
A_v(q)   <- sat(A_v(q) - m_cv(q) + m_cv'(q))
```

`b` starts at 0 at the end of the frame. At any other window edge it starts from the value saved
there in the previous iteration (0 in the first iteration).

In the plain schedule, each window's updates are written back before the next window reads the
memory banks, so the decoder is layered at window granularity. The pipelined schedule keeps
that property; see below. The banks are split by block column, so the `J0`
edges of one section always read and write different banks. A section can touch a variable that
the previous section has just written. The memories handle this with write-first
read-during-write, so no stall is needed.

After the last iteration the hard decision on bit `v` is the sign of `A_v`: negative means 1.

### The pipelined schedule

The forward pass and the backward pass use different hardware: the forward SPC with the
forward half of the FBA processor, and the backward half with the backward SPC. The pipelined
processor (`tlbp_pipe_core`) therefore runs the backward pass of window `w` in the same cycles
as the forward pass of window `w+1`. This covers the step from the last window of an iteration
to window 0 of the next one as well. Time is cut into **slots** of `WIN+1` cycles, and each
slot carries one backward pass, one forward pass or both.

Overlapping two windows is only safe when the second window does not read an `A_v` that the
first is still updating. The processor checks every slot whether the window it is forwarding
shares a variable (same bank, same row) with the window after it. If it does, the next slot
runs the backward pass alone (a **stall**), and the forward pass follows one slot later. With
this rule the pipelined processor gives the same hard decisions as the plain one, bit for bit,
for any code. Only the cycle count differs. A code can be designed so that consecutive windows
never share a variable. The default scaled code is such a code: all its circulant shifts are
multiples of 16. The `Z = 8` example code is not; there, with `WIN = 2`, 4 of every 12 window
pairs stall.

Running the two passes together needs a few more memories:

* a second read port on each a-posteriori bank. It is built as two copies that take the same
  writes: one copy serves forward reads, the other serves backward reads and the read-out;
* two halves for the m_vc buffer and for the FBA buffer. The forward pass fills one half while
  the backward pass empties the other;
* a wider m_vc buffer that also holds the old `m_cv` read in the forward pass. The edge memory
  thus keeps a single read port and a single write port.

### Timing

Every phase issues one read per cycle and computes one cycle later, so it takes one cycle more
than it has items. `NWIN = T/WIN` is the number of windows. Per frame and processor:

```
plain:      cycles = (Z+1) [load A_v] + ITER*NWIN * 2*(WIN+1)          + (Z+1) [read-out]
pipelined:  cycles = (Z+1)            + (ITER*NWIN + 1 + stalls)*(WIN+1) + (Z+1)
```

For the default configuration the pipelined processor takes 129 + 1281·4 + 129 = 5382 cycles,
with no stalls. The plain processor takes 129 + 10·128·8 + 129 = 10498 cycles. With two
processors the throughput is `2*K/5383 ≈ 0.143` information bits per clock cycle pipelined and
`2*K/10499 ≈ 0.073` plain. The plain figure matches the usual model for serial check
processors, `D = p·R·N / (M·(2·d + ε)·it)·f_clk`. Here `d` is the number of sections per check
(1 with the defaults) and `ε` (2 per window) is the pipeline fill. Pipelining roughly halves the
`2·d + ε` term.

## Blocks

| module | role |
|---|---|
| `ldpc_fpga_top` | PRBS source, encoder, frame distribution to `P` processors |
| `prbs20` | information source, LFSR `x^20 + x^3 + 1`, period 2^20-1 |
| `qc_ira_encoder` | accumulator encoder, one parity bit per cycle (M cycles per codeword) |
| `tlbp_pipe_core` | pipelined decoding processor: memories, doubled buffers, conflict check |
| `tlbp_pipe_controller` | its slot sequencer: INIT → FWD → (PIPE or BWD, FWD) ... → BWD → OUT |
| `tlbp_core` | decoding processor with the plain schedule |
| `tlbp_controller` | its phase sequencer: INIT → (FWD, BWD) per window and iteration → OUT |
| `dual_input_mem` | ping-pong input memory; the parity part plays the role of the y_p FIFO |
| `fwd_spc` | forward single-parity-check unit (m_vc, m_IO) |
| `fba_processor` | forward-backward processor on the accumulator, with its window buffer |
| `bwd_spc` | backward single-parity-check unit (new m_cv, A_v update) |
| `msg_ram` | simple dual-port synchronous memory, write-first |
| `ldpc_pkg` | widths, message types, saturation and min-sum helpers, shift table, phase enum |

## Interfaces

`ldpc_fpga_top` parameters: `Z=128, MB=3, KB=3, J0=3, WIN=MB*(KB/J0), ITER=10, P=2, PIPE=1`.
`J0` must divide `KB`, `WIN` must divide `T`, and `T/WIN` must be at least 2. `PIPE=0` selects
the plain processors.

* **Transmit side.** A pulse on `src_start` draws K bits from the PRBS, which takes K cycles.
  The encoder then runs for M cycles. `tx_valid` pulses with the codeword on
  `tx_info[K-1:0]` and `tx_parity[M-1:0]`. `tx_info[j*Z+r]` is bit `r` of block column `j`, and
  `tx_parity[c]` is in accumulator order. The modulation and the noisy channel are not part of
  the RTL.
* **Receive side.** `rx_valid/rx_llr/rx_ready` is a valid/ready stream of signed 4-bit LLRs in
  the range ±7, where a positive value means bit 0. The stream carries the K systematic values
  in `tx_info` order, then the M parity values in accumulator order. Frame `f` goes to processor
  `f mod P`. `rx_ready` drops while that processor's two input halves are both full.
* **Results.** Processor `p` presents `Z` words on `dec_valid[p]`, `dec_pos[p]` and
  `dec_bits[p]`, where `dec_bits[p][j]` is bit `j*Z + dec_pos[p]`. `dec_done[p]` marks the last
  word, and `dec_busy[p]` is high while it decodes. `dec_stall[p]` pulses once for every slot in
  which a pipelined processor holds back a forward pass (it is always low when `PIPE=0`).
  Frames leave each processor in the order they entered it.

Reset is asynchronous and active low, and it clears only the control state. Every memory word is
written before it is read.

## Quantisation

* Channel values: 4 bits (±7).
* Messages and trellis metrics: 6 bits (±31).
* A-posteriori sums: 8 bits (±127).

All arithmetic saturates symmetrically, and the check rule is plain min-sum. The widths are in
`ldpc_pkg`. If you change them, change the model constants in `tb/ldpc_model_pkg.sv` as well.

## Where this RTL departs from or goes beyond its source

* Both window schedules are built, plain and pipelined. The conflict check and the one-slot
  stall are this design's way of honouring the rule that a window may start only when the
  values it reads are up to date. The original instead relies on the code being designed to
  avoid such conflicts.
* **One code** is fixed at elaboration. The reference FPGA decoder held four selectable codes,
  but their tables are not available.
* The shift table for `Z = 128` is the `Z = 8` design example scaled up (see above).
* Several details have no published value and are this design's choices:
  * the window length (one check per block row, `WIN = MB`);
  * the internal widths;
  * plain min-sum;
  * sharing whole frames between the two processors;
  * all handshakes;
  * the exact form of the forward-backward equations.
* The document writes the a-posteriori update as `A_v = m_vc + m_cv`. The RTL uses
  `A_v - m_cv(old) + m_cv(new)`. The two agree when a window touches a variable once, and the
  second stays correct when a window touches it twice.
* The two processors decode different frames, and each has its own memories. Two processors
  working on windows of one frame and sharing the memory banks would give the same throughput
  with less memory. That arrangement would also need bank arbitration between the processors,
  and it is not built.
* There is no early stopping; each frame gets exactly `ITER` iterations.
* The Gaussian-noise generator (Box-Muller) and the measurement host of the original test
  bench are not included.

## Simulation

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv tb/ldpc_model_pkg.sv \
          tb/tb_ldpc_fpga_top.sv --top-module tb_ldpc_fpga_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_ldpc_fpga_top_full` | default size (768-bit frames, 10 iterations, 2 pipelined processors), 6 frames end to end |
| `tb_ldpc_fpga_top` | the same at `Z = 8` with `WIN = 2`, 12 frames, including stalls |
| `tb_ldpc_fpga_top_serial` | the top with the plain processors (`PIPE = 0`) at `Z = 8` |
| `tb_ldpc_fpga_top_broadcast` | the top at broadcast block size: `Z = 2688` (16128-bit frames), 15 iterations, 6 frames (about a second) |
| `tb_tlbp_pipe_core`, `tb_tlbp_pipe_core_split` | one pipelined processor at `Z = 8`: `J0 = 3, WIN = 2`, and `J0 = 1, WIN = 6` |
| `tb_tlbp_core`, `tb_tlbp_core_split` | one plain processor at `Z = 8`, with `J0 = 3` and `J0 = 1` (three sections per check, 12 windows) |
| `tb_fwd_spc`, `tb_bwd_spc`, `tb_fba_processor` | datapath units against integer arithmetic |
| `tb_qc_ira_encoder` | every parity-check equation on random codewords |
| `tb_prbs20` | period and balance of the sequence |
| `tb_dual_input_mem`, `tb_msg_ram`, `tb_tlbp_controller` | storage and sequencing |
| `tb_tlbp_pipe_controller` | slot sequence of the pipelined schedule for random conflict patterns |

The decoder testbenches compare every hard decision, bit for bit, with `tlbp_decode` in
`tb/ldpc_model_pkg.sv`. That is an integer model of the plain schedule, written independently of
the RTL. The pipelined processor must give the same decisions as the model. The testbenches also check:

* that clean frames decode to the transmitted word;
* the per-frame cycle count given above, and for the pipelined processor, the number of stalls
  against an independent count of consecutive windows that share a variable;
* that frames with channel hard errors are corrected.

At the top level they also check that both processors work, that loading overlaps decoding, and
that the input is held off when both input halves are full. Every testbench except the
broadcast-size one finishes in well under a second.
