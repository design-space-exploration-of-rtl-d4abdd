# LDPC decoders: a 360-lane dataflow min-sum decoder, a GF(2^m) FFT-SPA decoder and a thread-per-node min-sum decoder

This repository holds three low-density parity-check (LDPC) decoders in
synthesizable SystemVerilog. They share a top level but are otherwise
independent:

* **A binary, partially parallel min-sum decoder for quasi-cyclic codes.**
  Its default size fits the 64800-bit DVB-S2 normal frame: 360 functional
  units (FUs), 180 block columns of 360 bits, and up to 630 nonzero
  360 x 360 circulants. It streams frames in as LLRs (log-likelihood ratios)
  and streams the decoded bits out. Input, decoding and output of
  consecutive frames overlap through double buffering.
* **A non-binary decoder running the FFT-based sum-product algorithm
  (FFT-SPA) over GF(2^m).** Its default is GF(16) with 384 symbols (1536
  bits) on a (2,3)-regular code. It works through all edges at one edge per
  clock, with all 2^m field values processed in parallel.
* **A thread-per-node, multi-kernel min-sum decoder for arbitrary binary
  codes.** Its default size fits the 1944-bit WiFi (802.11n) code: up to
  7776 edges, check-node degree 8 and variable-node degree 11. It keeps an
  explicit edge list, so the code does not have to be quasi-cyclic.

All three are hardware versions of architectures that were originally
produced with high-level synthesis tools:

* a dataflow "M-FU" decoder in which each FU owns a memory bank;
* a loop-nest decoder whose inner loop over the field elements is fully
  unrolled;
* a multi-kernel decoder whose check-node kernel and variable-node kernel
  each run over all nodes and are flushed before the other starts.
 The RTL here is written by
hand and keeps the structure of those designs. The sections below say which
parts are the original architecture and which are choices made here.

## The binary decoder (`df_decoder`)

### Data layout: one bank per lane, one circulant per address

The parity-check matrix is a base matrix of circulants. Each nonzero entry
has a block row, a block column `col` and a shift `s`. The decoder has
`LANES` FUs, and `LANES` equals the circulant size z, so one circulant is
handled in one clock.

Entry `k` of the base matrix, counted in row-major order, is stored at
address `k` of every lane's message bank (`df_bank`). Lane `d` holds the
message on the edge between:

* check node (CN) `row*z + d`, and
* variable node (VN) `col*z + ((d - s) mod z)`.

With this layout the two phases access memory as follows:

* **CN phase.** The banks are read in address order, with no rotation. Lane
  `d` sees every edge of CN `row*z+d` one after the other. `row_last` in the
  entry table marks the end of each block row, which is where the CN
  finishes.
* **VN phase.** The banks are read in column order, using a second table
  (the column list) that holds the entry indices column by column. Each read
  vector is rotated by `s` in a cyclic shifter, so lane `d` sees every edge
  of VN `col*z+d`. The results are rotated back by `z-s` before they are
  written to the same address. The channel LLR of VN `col*z+d` sits in lane
  `d`'s LLR buffer at address `col`.

Both tables are loaded through the `cfg_*` ports, so the code can be changed
without resynthesis.

### Schedule

Decoding uses two-phase message passing:

1. A VN phase with all CN-to-VN messages forced to zero (`fu_zero`). This
   writes the channel LLRs into the edge memory.
2. `num_iter` times: a CN phase, then a VN phase.

Every VN phase also produces the hard decisions (the sign of the
a-posteriori LLR), which are written to the decision buffer. The last VN
phase therefore leaves the final decisions.

Each phase drains completely before the next one starts. The original
architecture's FUs can hold a CN group and a VN group at the same time.
Draining gives up that overlap in exchange for simpler control. The cost is
a drain of a few tens of cycles per phase, while a phase of e entries takes
e cycles. A frame takes about `(2*num_iter + 1) * (e + drain)` cycles; the
testbenches bound it by `(2I+1)*e` and `(2I+1)*(e+22)+4`.

### Functional unit (`df_fu`, `cn_unit`, `vn_unit`)

Every FU takes one message per clock and has two serial datapaths. Each is
built around FIFOs, so that nodes of any degree stream through at one
message per clock.

* **`cn_unit` (min-sum).** While a node's messages go by, it keeps min1,
  min2, the index of min1 and the sign product. The messages also wait in a
  FIFO. When the last message arrives, the node's summary is pushed to a
  second FIFO. Each output is `sign * (min2 if it was the minimum, else
  min1)`. Output starts one cycle after the last input. The input value -128
  is saturated to -127.
* **`vn_unit`.** It accumulates the channel LLR plus all incoming messages in
  a 12-bit saturating sum, then outputs `sum - own message` saturated to 8
  bits, together with the sum itself for the hard decision.

### Streaming and double buffering (`df_manager`)

Input is a valid/ready stream carrying one block column (`LANES` LLRs) per
beat. Output is a valid/ready stream carrying `LANES` decoded bits per beat,
with `out_last` on the last beat of a frame.

There are two LLR buffers and two decision buffers. The manager tracks
which of each are full. Decoding of frame n+1 starts as soon as its LLRs are
complete and a decision buffer is free, so frame n+2 can be loading and
frame n unloading at the same time.

### Sizes and formats

| Parameter | Default | Meaning |
|---|---|---|
| LANES | 360 | FUs = circulant size |
| NB | 180 | block columns (64800 / 360) |
| EB | 630 | base-matrix entries (90 rows x d_c 7) |
| DC_MAX, DV_MAX | 7, 8 | largest CN / VN degree (FIFO depths) |
| MSG_W, SUM_W | 8, 12 | message and VN-sum widths (two's complement) |

The message width is a choice made here. The original architecture leaves
the arithmetic format open.

### Known difference from DVB-S2

DVB-S2's parity part is an accumulator chain. Written as circulants, it is
a staircase of identity and shift-1 circulants with exactly one edge
missing. The decoder has no way to delete a single edge from a circulant.
Such a code is therefore decoded with the wrap-around edge present. The
original architecture uses dedicated links between neighbouring FUs for
this chain; they are not built here. The testbenches use codes with a
proper dual-diagonal parity part, which the decoder represents exactly.

## The non-binary decoder (`nb_decoder`)

### Algorithm

Each edge carries a probability mass function (pmf) over the 2^m field
elements. Probabilities are unsigned fixed point with 15 fractional bits
(1.0 = 32768), carried in 18-bit words. One memory word holds a whole pmf.

* **VN update (`nb_vn_unit`).** The message to check c is the channel pmf
  times the product of the other incoming pmfs, normalized to sum to one.
  The a-posteriori pmf (the product over all edges) gives the decided
  symbol; ties go to the lowest symbol.
* **Edge transform on the way to the check node.**
  1. Permute by the edge coefficient: `out[h*x] = in[x]` (`gf_perm`).
  2. Apply the Walsh-Hadamard transform (`fwht`), which is the Fourier
     transform over GF(2^m).
  3. Store the result in the edge memory.
* **CN update (`nb_cn_unit`).** For each edge, take the point-wise product
  of the other edges' transforms, divided by its own z = 0 term so that the
  pmf it stands for sums to one. Values saturate at +-1.0.
* **Edge transform on the way back.**
  1. Apply the Walsh-Hadamard transform again.
  2. Divide by 2^m.
  3. Clear negative values (rounding noise).
  4. Depermute: `out[x] = in[h*x]`.
  5. Store the result in the edge memory.

### Schedule and memory

Edges are numbered in VN order: the `DV` edges of symbol 0, then those of
symbol 1, and so on. The CN order is a list loaded through `cfg_cn_*`. The
coefficients are loaded through `cfg_h_*`, and the channel pmfs are written
through `mv_*`.

Decoding has the same shape as the binary decoder's:

1. A VN pass with uniform incoming pmfs.
2. `num_iter` times: a CN pass, then a VN pass.

Each pass streams all E edges through the unit at one per clock and writes
every result back in place. A small tag FIFO carries each result's edge
address. The VN and CN units each alternate between two register sets, so
one node is loaded while the previous one is output. Decisions are written
on the last VN pass and read back through `dec_addr`/`dec_data`.

### Field arithmetic

The primitive polynomials are x^2+x+1, x^3+x+1 and x^4+x+1 (`nb_pkg`).
`gf_perm` builds each output lane as a multiplexer whose select is a
field product. The multiplier tables are never stored.

## The thread-per-node decoder (`tpn_decoder`)

This decoder runs the same min-sum arithmetic as the binary dataflow
decoder. It reuses the serial `cn_unit` and `vn_unit`. What differs is the
organization: one node at a time, over an arbitrary edge list, in two
separate kernels.

### Edge memory and order tables

* Edges are numbered in VN order: the edges of VN 0 first, then those of
  VN 1, and so on. One message per edge is kept in the edge memory.
* The **VN kernel** reads the edge memory in address order. A one-bit table,
  `vn_last`, marks the last edge of each VN.
* The **CN kernel** reads the edge memory through a table of edge numbers
  listed in CN order. Each entry carries a last-of-CN flag.
* Both tables are loaded through `cfg_cn_*` and `cfg_vn_*`. They are
  synchronous-read memories, so the default size (7776 edges) maps to
  RAM.

### Pipeline

Each pass issues one edge per clock through three stages:

1. The order tables are read.
2. The edge memory and the LLR memory are read.
3. The message enters the kernel's unit.

Each result is written back in place. A tag queue supplies its edge number
and its VN.

### Schedule

The schedule matches the other decoders:

1. A VN pass with zero check messages.
2. `num_iter` times: a CN pass, then a VN pass.

Each pass is flushed before the next starts, which is the "launch a grid,
then wait for all work-items" behaviour of the original multi-kernel
design. A decode of E edges takes about `(2I+1)(E + drain)` cycles.

### Differences from the original multi-kernel design

* Only one work-item is in flight per kernel at a time.
* The original loads all of a node's messages at once from DRAM. Here they
  stream one per clock from on-chip memory.
* Compute-unit replication and SIMD width are not modelled.

## Top level (`ldpc_hls_top`)

The top level instantiates all three decoders. Their ports are prefixed
`df_`, `nb_` and `tpn_`, and the decoders share only `clk` and `rst_n`. Every
flip-flop resets asynchronously on `rst_n` low. The parameter defaults are
the sizes listed above.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* **`tb_df_decoder`, `tb_ldpc_hls_top`: bit-exact reference.** They build a
  random quasi-cyclic code with a dual-diagonal parity part (`qc_code_pkg`)
  and encode random frames. Each frame gets one weak channel error. They
  stream the frames with random gaps and random output back-pressure, then
  compare every decoded bit with a bit-exact software model of the same
  fixed-point schedule and with the transmitted codeword.
* **Non-binary tests.** These build a (2,3)-regular code around a random
  codeword by solving the third coefficient of every check, then corrupt
  one symbol's channel pmf.
* **Mechanism counts.** `tb_ldpc_hls_top` counts:
  - frames decoded;
  - frames accepted while another one decodes;
  - CN and VN phases;
  - rotated circulants;
  - output stalls;
  - non-binary passes;
  - thread-per-node kernel launches.

  Any mechanism that never happened counts as a failure.
* **`tb_ldpc_hls_top_full`: full size.** It runs the top with no parameter
  overrides, with every decoder at 10 iterations:
  - two 64800-bit frames on the dataflow decoder;
  - one 384-symbol GF(16) frame on the non-binary decoder;
  - one 1944-bit frame on the thread-per-node decoder. That code has a
    12 x 24 base matrix of 81 x 81 circulants, the WiFi geometry, with a
    dual-diagonal parity part. It takes a few seconds of simulation after about a
  minute of verilator compilation.
* **Unit tests.** They compare against independent models: min-sum and VN
  arithmetic with saturation, FIFO against a queue, the shifter
  exhaustively, the Walsh-Hadamard transform against the direct sum, the GF
  permutation against its own field multiplier, and the non-binary node
  units against integer models of the same arithmetic.

To run one test with verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/ldpc_pkg.sv rtl/nb_pkg.sv tb/qc_code_pkg.sv tb/tb_ldpc_hls_top.sv \
  --top-module tb_ldpc_hls_top
./obj_dir/Vtb_ldpc_hls_top
```

## Not included

* **The parallel parts of the thread-per-node decoder.** This covers
  several compute units and several work-items in flight at once.
* **The links between neighbouring FUs for the DVB-S2 accumulator chain.**
  See "Known difference from DVB-S2" above.
* **Host, PCIe, DRAM and memory-controller logic.** The decoders expose
  plain streams and memory ports instead.
* **The overlapped CN/VN operation of the dual-mode FU.** The datapaths
  exist, but the control drains each phase before starting the next.
