# Wide-bus programmable CRC with stride-by-5 tables

This is SystemVerilog for two CRC engines that compute a CRC over a very wide bus
(4096 bits by default) at one word per clock. Both are built from small 5-input
lookup tables, which match the 6-input (dual 5-input) LUTs of modern FPGAs. All of
their contents can be rewritten at run time, so the CRC polynomial is not fixed by the
hardware.

* **`crc_nonseg`**: the non-segmented engine. Each word carries data of at most one
  frame.
* **`crc_seg`**: the segmented engine. The bus is cut into 64-bit segments and a
  single word can finish up to eight frames, so short frames do not waste the bus.
* **`crc_top`**: both engines side by side, each with its own ports.

After power-up both compute IEEE 802.3 CRC-32. A different polynomial is loaded by
writing new table contents over AXI4-Lite.

## The idea in three steps

### 1. A CRC over n bits is one matrix product

A serial CRC is an l-bit LFSR (l = 32 here) that takes one bit per step. Write one
step with a zero input as the l×l matrix **T**, and the effect of a 1 input on a zero
state as the vector **S** (the polynomial). After an n-bit word B = [b0 … b(n−1)] the
state is

    C' = T^n · C  +  W · B,        W = [T^(n−1) S, T^(n−2) S, …, T S, S]

Addition is XOR. Column j of W is the effect of data bit j on the state at the end
of the word.

### 2. Stride-by-5: every product is a set of 5-input tables

A matrix–vector product over GF(2) is the XOR of the columns picked out by the
vector's 1 bits. Cut the vector into 5-bit keys. Key t then addresses a 32-entry table
whose entry k is the XOR of columns 5t…5t+4 chosen by the bits of k. Each of the l
output bits is one 5-input function, i.e. half of a 6-input LUT. A stride of 5 is the
widest key that still fits a single LUT. Wider keys need cascaded LUTs whose count
doubles with each extra bit, and narrower keys need more tables for the same work.
`crc_lut5` is one such table. The engines use tables for:

| where | product | tables at 4096 bits |
|---|---|---|
| region 1 | W · B, one table per 5 data bits (plus a remainder table) | 820 (non-seg.), 64 × 13 (seg.) |
| region 3 | T^n · C | 7 |
| region 4 | T^(−8·2^i) · C, one set per go-back stage | 7 per stage, 9 stages |
| seg. region 3 | T^(4096−64a) · INIT for a frame starting in segment a | 2 (64 entries) |

Region 2 is a pipelined XOR tree (`crc_xor_tree`, radix 6, one register per level).
It adds up the region-1 outputs.

### 3. Go back: removing the padding of the last word

The last word of a frame has p valid bits followed by q zero bits of padding. Running
the whole word through the engine gives T^q times the wanted state. T is invertible
because every CRC polynomial has its x^0 term. So the wanted state is T^(−q) times
the result. Keeping one matrix per possible q would cost O(n) tables. Instead q/8 is
written in binary, q/8 = Σ x_i 2^i, and a pipeline of h = log2(n/8) stages follows.
Stage i holds the single matrix T^(−8·2^i) and applies it only when x_i = 1
(`crc_go_back`). The stage with the largest power comes first. The cost grows with
log2(n): 9 stages at 4096 bits. The final XOR (XOROUT) is applied after the last
stage.

## Conventions

* **Bit order**: byte k of a word is `data[8k+7:8k]` and is the k-th byte in time.
  Each byte is taken LSB first, so data bit j is the j-th bit in time.
* **LFSR**: the reflected form used by Ethernet,
  `step(c,b) = (c >> 1) ^ ((c[0]^b) ? POLY : 0)`, with `POLY = 0xEDB88320`. For
  CRC-32, `INIT = XOROUT = 0xFFFFFFFF`. The CRC of the ASCII string "123456789" is
  `CBF43926`.
* **Padding**: the padding bytes of a frame's last word (last segment) are the
  highest bytes and must be zero. An assertion checks this; the engine does not mask
  them.
* **Reset**: `rst_n` is synchronous and active low. It clears the valid and frame
  flags in every pipeline stage within one clock, and the open-frame state. The CRC
  datapath registers and the table contents are not reset.
* **Matrices** in `crc_pkg` are stored as arrays of columns: `m[i]` is the image of
  basis vector e_i.

`INIT` and `XOROUT` are parameters. The polynomial is set by the table contents, and
its default comes from the `POLY` parameter. Any 32-bit CRC with reflected input and
output can be loaded at run time, provided it keeps the parameters' INIT and XOROUT.
A CRC that takes each byte MSB first (non-reflected) would also need the bits of each
data byte and of the result reversed outside the engine.

## Non-segmented engine (`crc_nonseg`)

```
in_data ─► region 1: 820 tables ─► region 2: XOR tree ─► region 3: C ← T^n·C + W·B ─► region 4: 9 go-back stages ─► out_crc
            (1 clock)                (4 levels)             (state register, 1 clock)      (9 clocks, ^XOROUT)
                                                       AXI4-Lite ─► crc_lut_cfg ─► cfg bus to every table
```

Interface:

| signal | meaning |
|---|---|
| `in_valid` | word is taken this clock; there is no back-pressure |
| `in_sop`, `in_eop` | first and last word of a frame (both set for a one-word frame) |
| `in_empty[8:0]` | padding bytes in the last word (q/8) |
| `in_data[4095:0]` | data; a frame always starts at byte 0 |
| `out_valid`, `out_crc[31:0]` | one result per frame, in order |

Timing: the result appears **15 clocks** after the clock that takes the last word
(1 + 4 XOR-tree levels + 1 + 9). In general the delay is
`LATENCY = ceil(log6(ceil(n/5))) + log2(n/8) + 2`. A new frame may start in the word
right after an end of frame. On `in_sop` the state register is replaced by INIT
before the T^n product.

## Segmented engine (`crc_seg`)

This engine is the harder one to follow. A 4096-bit word has S = 64 segments of
8 bytes. Each segment is idle or belongs to one frame, and the per-segment inputs say
which:

| signal | meaning |
|---|---|
| `in_valid` | the word is taken |
| `seg_valid[s]` | segment s holds frame bytes |
| `seg_sop[s]`, `seg_eop[s]` | first and last segment of a frame |
| `seg_empty[s][2:0]` | padding bytes at the top of an end segment |
| `out_valid[7:0]`, `out_crc[8][31:0]` | results; slot f is the f-th frame that ended in a word |
| `frame_err` | a word ended more frames than there are slots |

Rules:

* Frames start on a segment boundary and have no idle segments inside them.
* A frame still open at the end of a word continues at segment 0 of the next valid
  word. Words with `in_valid` low may come in between.
* Frames are at least `MIN_FRAME_B` = 64 bytes long. So at most K = 4096/512 = 8
  frames end in one word, and that is the number of region-4 copies.

How one word is processed:

1. **Slot decode** (`crc_seg_ctrl`, combinational). Walking the segments in bus order,
   the valid segments after the f-th end of frame form *piece* f, which goes to
   *slot* f. For each slot the decoder gives:
   * its segment mask;
   * whether the piece ends a frame in this word;
   * whether it continues a frame from the previous word (only slot 0 can);
   * its start segment a;
   * `qb`, the number of bytes from its last valid byte to the end of the word.

   There are K + 1 = 9 slots, because after eight ends a ninth frame may start and
   stay open.
2. **Region 1** (`crc_stride5_lut` with `SEG_W = 64`). Each segment has 12 five-bit
   tables and one four-bit table. The columns are those of the whole word, so every
   segment's share is already weighted to the **end of the word**.
3. **Merge** (`crc_seg_merge`, region 2). First it XORs each segment's 13 tables
   (2 levels, shared by all slots). Then, per slot, it XORs the segment sums in that
   slot's mask (3 levels for 64 segments). The result M_f is W·B of the piece, as if
   zeros followed it up to the end of the word.
4. **Region 3 per slot** (`crc_seg_state`). The state of piece f at the end of the
   word is
   * `T^n · C_carry ⊕ M_f` if the piece continues the open frame, or
   * `IA[a] ⊕ M_f` if it starts in segment a. Here `IA[a] = T^(4096−64a) · INIT` is
     a 64-entry table, one copy per slot.

   T^n · C_carry is computed once. The piece that does not end becomes the new carry.
5. **Region 4 per slot** (8 × `crc_go_back`). Each ending piece was computed as if
   followed by q = 8·qb zero bits, so the go-back pipeline of the non-segmented engine
   removes them unchanged. This is why that pipeline is duplicated per frame instead
   of redesigned.

Timing: the results come **16 clocks** after the word that ends the frame
(1 + 2 + 3 + 1 + 9). All frames that end in the same word come out together.

With back-to-back 65-byte frames, each frame takes 9 segments (72 bytes). The bus then
carries 65/72 = 90.3 % payload, the worst case for frame lengths of 64 to 256 bytes.
At a clock f_clk the throughput is f_clk × 3698 bit/s; about 523 MHz gives 1.93 Tbit/s.

## Reprogramming (`crc_lut_cfg`)

Every table has an identifier, and every copy of a table listens to the same `cfg`
write bus. Copies share their identifier (the go-back and initial-value tables of the
eight slots, for example), so one write updates all of them. The AXI4-Lite register map:

| address | register | |
|---|---|---|
| 0x0 | TBL | table identifier of the next write (R/W) |
| 0x4 | ENTRY | entry 0..31 of the next write (R/W) |
| 0x8 | DATA | write only: stores the 32-bit value at (TBL, ENTRY), then ENTRY+1, wrapping into TBL+1 |
| 0xC | INFO | read only: number of tables |

Because of the auto-increment, a whole engine is loaded by setting TBL = ENTRY = 0
and then writing all entries of all tables in identifier order:

| engine | identifiers in order | content of table t, entry k |
|---|---|---|
| non-seg. (890 tables) | 0..819: region 1 | XOR of W columns 5t+b (b = 0..4, column < n) for the set bits b of k |
| | 820..826: T^n | same with columns of T^n (state bits 5t..5t+4) |
| | 827..889: stage s = 0..8 | columns of T^(−8·2^(8−s)) |
| seg. (904 tables) | 0..831: segment s, table u (id 13s+u) | W columns 64s+5u+b, only those inside the segment |
| | 832..838: T^n | as above |
| | 839..840: IA | entry k of table j: T^(4096−64(32j+k)) · INIT |
| | 841..903: stage s = 0..8 | columns of T^(−8·2^(8−s)) |

Column j of W for polynomial P is the state reached from zero by a 1 bit at position j
followed by n−1−j zero bits. The columns of T^k are the basis vectors stepped k times,
and the steps are taken backwards for negative k. `crc_pkg` shows the same formulas as
elaboration-time functions, and `tb/crc_ref_pkg.sv` computes them bit by bit.

The engine should be idle while its tables are rewritten. A word in flight during the
update sees a mix of old and new contents.

**How this departs from an FPGA flow.** On the FPGA, the tables would be the LUTs
themselves. Their INIT bits would be rewritten in place through the vendor's internal
configuration port, which costs a fixed, small amount of logic. That port and the
bitstream frame format are device specific, so `crc_lut5` here is a small writable
memory with a power-up value instead. This is portable and simulates the same
behaviour. The cost is a write decoder per table, which grows with the bus width.

## Files

| file | contents |
|---|---|
| `rtl/crc_pkg.sv` | types, constants, LFSR step and inverse, matrix helpers for the default contents |
| `rtl/crc_lut5.sv` | one 32-entry rewritable table |
| `rtl/crc_stride5_lut.sv` | region 1 (plain and per segment) |
| `rtl/crc_xor_tree.sv` | region 2, pipelined XOR tree with sideband |
| `rtl/crc_mat_lut.sv` | l×l matrix times state with 7 tables (regions 3, 4) |
| `rtl/crc_state_update.sv` | region 3 of the non-segmented engine |
| `rtl/crc_go_back.sv` | region 4 |
| `rtl/crc_lut_cfg.sv` | AXI4-Lite table port |
| `rtl/crc_nonseg.sv` | non-segmented engine |
| `rtl/crc_seg_ctrl.sv`, `crc_seg_merge.sv`, `crc_seg_state.sv`, `crc_seg.sv` | segmented engine |
| `rtl/crc_top.sv` | both engines |
| `tb/crc_ref_pkg.sv` | bit-serial reference CRC and table contents |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog. For example, to run the end-to-end test at full size (the build takes a few
minutes, the run a second):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_crc_top \
  rtl/crc_pkg.sv tb/crc_ref_pkg.sv rtl/crc_lut5.sv rtl/crc_mat_lut.sv \
  rtl/crc_xor_tree.sv rtl/crc_stride5_lut.sv rtl/crc_state_update.sv \
  rtl/crc_go_back.sv rtl/crc_lut_cfg.sv rtl/crc_nonseg.sv rtl/crc_seg_ctrl.sv \
  rtl/crc_seg_merge.sv rtl/crc_seg_state.sv rtl/crc_seg.sv rtl/crc_top.sv \
  tb/tb_crc_top.sv
./obj_dir/Vtb_crc_top
```

For the other testbenches, swap the last file and the top module and keep the
packages first.

| testbench | what it shows |
|---|---|
| `tb_crc_top` | both engines at 4096 bits, defaults untouched. Random frames against a serial CRC-32 with exact latency; 8 frames ending in one word, frames across words, idle words inside frames, all 9 go-back stages used; the 65/72 efficiency of 65-byte frames; then all tables of both engines rewritten for CRC-32C and checked again |
| `tb_crc_nonseg` | 128-bit bus, 1..80-byte frames, the CRC-32 check value, reprogramming to CRC-32C and back |
| `tb_crc_seg` | 1024-bit bus (2 slots), segment width `SEG` (default 64), 64..256-byte frames, reprogramming, 65-byte efficiency |
| `tb_crc_lut5`, `tb_crc_stride5_lut`, `tb_crc_xor_tree`, `tb_crc_state_update`, `tb_crc_go_back`, `tb_crc_lut_cfg`, `tb_crc_seg_merge`, `tb_crc_seg_state` | each block against a bit-serial or direct XOR model, with cycle timing |

`crc_seg_ctrl` and `crc_mat_lut` are tested through the engines.

## Limits and choices to know about

* Several details are this design's own choices, because the method fixes only the
  regions and the algorithms. These include where the pipeline registers sit, the XOR
  tree radix (6), the frame and segment signalling, the slot assignment, how INIT
  enters, the merge structure and the register map. The clock-cycle latencies above
  follow from these choices.
* The segmented engine relies on frames of at least 64 bytes to fit eight frame ends
  per 4096-bit word (`frame_err` and an assertion flag a violation). Other segment
  widths are a parameter. `tb_crc_seg` has been run with 64-, 128- and 512-bit segments
  on a 1024-bit bus (parameter `SEG`), but the 4096-bit bus only with 64-bit segments.
* `n/8` must be a power of two (go-back stages). `CRC_W` is 32 and is fixed in
  `crc_pkg`.
* The tables are initialised by declaration (`crc_t mem[32] = INIT`), as LUT contents
  are. Verilator notes that the same variable is also written in an `always_ff`. That
  is intended: the initial value is the power-up content. An ASIC flow without memory
  initialisation would need a load sequence or a reset.
* Resource use, clock rate and power depend on FPGA implementation and are not
  reproduced here. The reprogramming port is portable logic, not an in-place LUT
  rewrite, and so it grows with the table count.
* The segmented engine has one more region-3 copy than there are frames that can end
  in one word: eight copies for the frames that end, and a ninth for a frame that
  starts in the word and stays open. The published structure counts the copies by
  the number of frames per word. The open frame's state is kept as the carry for the
  next word.
* Region 1 of the segmented engine uses the columns of the whole word for every
  segment. So a segment's partial result is already shifted to the end of the word,
  and one go-back pipeline per frame removes the trailing part of the word. This is
  one way to build the "slightly more complex" region 1 and 2 of that engine. The
  exact structure is this design's choice.
