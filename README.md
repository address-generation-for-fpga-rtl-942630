# Packed line buffers on FPGA Block RAMs: base pointer vs. distributed pointers

A neighbourhood operator on a video stream (a 3x3 or 5x5 filter, a median,
a morphological operation) needs the last few lines of the image. The usual
way is one line buffer per line. This design instead packs all line buffers
of one operator side by side into a single wide word, a *global memory
object* (GMO): for a 5x5 window on 12-bit pixels, four 640 x 12 line buffers
become one 640 x 48 GMO, and one pointer serves all four lines.

A 48-bit word does not fit a Spartan-3 Block RAM port (widths 1, 2, 4, 8,
16, 32; 16 kbit per RAM). The GMO is therefore cut into *segments* of legal
widths, and a segment too long for one RAM is cut into *partitions*, each
living in one port of one RAM, at some start address. The RTL here is the
address generation for such a split GMO, in two styles, plus the line
buffer and window logic around it, for the 640 x 48 example:

| partition | segment (GMO bits) | RAM, port | port shape | GMO elements | port addresses |
|-----------|--------------------|-----------|------------|--------------|----------------|
| 0         | 1 (31:0)           | BR1, A    | 512 x 32   | 0 .. 511     | 0 .. 511       |
| 1         | 1 (31:0)           | BR2, B    | 512 x 32   | 512 .. 639   | 320 .. 447     |
| 2         | 2 (47:32)          | BR2, A    | 1024 x 16  | 0 .. 639     | 0 .. 639       |

Partition 2 uses 16-bit words 0..639 of BR2, which are its 32-bit words
0..319, so partition 1 starts at 32-bit address 320 (the *offset*). BR2's
32-bit words 448..511 (2 kbit) stay unused. This table is the result of a
design-time allocation step; it is a constant in `gmo_pkg`, not computed in
hardware.

## The two address schemes

Both schemes produce, for every valid pixel, one enable and one address per
partition. They produce exactly the same accesses; they differ in where the
logic sits.

**Base pointer** (`base_ptr_addr_gen`). One pointer `bp` per GMO counts
0 .. L-1 (ceil(log2 L) bits) and wraps. An address table holds, per
partition, the first element it holds (START), its length and its OFFSET.
Every cycle each partition compares `bp` with its span and computes
`OFFSET + bp - START`:

    BR1 A: enabled for 0 <= bp <= 511,   address bp
    BR2 B: enabled for 512 <= bp <= 639, address 320 + bp - 512
    BR2 A: enabled for 0 <= bp <= 639,   address bp

The logic is small (one counter per GMO) but comparators and a subtractor
sit between the pointer register and every RAM port, and one pointer fans
out to all of them.

**Distributed pointers** (`dist_ptr_addr_gen`, `dist_partition_ptr`). Each
partition owns an enable flag and an address register wired straight to
its RAM port. While its flag is set, each valid pixel steps the address
from OFFSET to OFFSET+LEN-1. On the pixel that uses the last word the
partition clears its flag, resets its address to OFFSET, and sets the flag
of the next partition of the same segment; the last partition of a segment
passes control back to the first. A partition alone in its segment (BR2 A
here) keeps its flag and just wraps. After reset the first partition of
each segment is enabled. For the example:

    BR1 A: 0,1,..,511 then hand over to BR2 B
    BR2 B: 320,..,447 then hand back to BR1 A
    BR2 A: 0,1,..,639,0,.. always enabled

This costs a counter and a comparator per partition instead of per GMO,
but every RAM input comes directly from a flip-flop. The published
synthesis results for this approach on Spartan-3 (timing not reproduced
here, see below) report 53-90 % higher clock rates than
the base pointer scheme for 7-52 % more LUTs. `SCHEME` on the top and on
`gmo_line_buffer` selects the scheme; the default is distributed.

In both, the RAM enable of a partition is its enable ANDed with the pixel
valid, so nothing moves and nothing is written while the stream stalls.
Assertions check that no two partitions of a segment are enabled together.

## Line buffers inside one word

`gmo_line_buffer` keeps line k+1 above the current one in field k of the
GMO word (bits `k*12 +: 12`). For each valid pixel it reads the word at the
current element and, in the same access, writes back the previous word
shifted up by one field with the new pixel in field 0, so every field
cascades into the next like chained line buffers. The Block RAMs run in
read-first mode, so the read returns the old contents.

The read arrives one clock after its address, so the word written for pixel
n is built from the read made for pixel n-1. Counting valid pixels only,
field k-1 (tap k) therefore carries the pixel k*(L+1) samples before the
current one, not k*L. `nbhd_window` removes this: row k goes through
N-1-k extra registers before its N window taps. After pixel n has entered,

    win[i][j] = pixel  n - 4 - (4-i)*640 - (4-j)

with row 0 the oldest line and column 0 the oldest pixel; the window
centre lags the input by 4 + 2*641 pixels. `win_valid_o` pulses one clock
after each accepted pixel; the window contents are meaningful once
4*641+4 pixels have entered. There is no border handling and no frame
synchronisation: the window simply runs over the raster.

## Blocks

| module | role |
|--------|------|
| `gmo_pkg` | scheme enum, example sizes, the partition table |
| `rtvps_gmo_top` | 5x5 window generator: `gmo_line_buffer` + `nbhd_window` |
| `gmo_line_buffer` | packed line buffers of one or more GMOs (default one GMO of four 12-bit lines), address generators by `SCHEME`, `gmo_storage` |
| `gmo_storage` | GMOs on Block RAM ports as given by an allocation table: data steering, per-segment read select |
| `base_ptr_addr_gen` | base pointer scheme, table as parameters |
| `dist_ptr_addr_gen` | distributed scheme: ring of partition pointers per segment |
| `dist_partition_ptr` | one partition's enable flag and address register |
| `bram_dp` | 16 kbit true dual-port RAM, independent port widths, read-first |
| `nbhd_window` | N x N tap registers with per-row alignment |

Top interface (`rtvps_gmo_top`): `clk`, synchronous active-high `rst`,
`pix_valid_i`, `pix_i[11:0]`, `win_o[5][5][12]`, `win_valid_o`, and
`part_en_o[2:0]`, the partition enables of the current access (index 0 BR1
A, 1 BR2 B, 2 BR2 A).

The allocation is a set of parameters rather than something built into
the logic, so the same modules serve any GMO. Per partition `p`:
`P_SEG[p]` (segment, from 1), `P_START[p]` (first GMO element held),
`P_LEN[p]`, `P_OFFSET[p]` (first address in the port), `P_RAM[p]` and
`P_PORT[p]` (0 = A, 1 = B), `P_GMO[p]` (GMO, from 0). Per RAM: port
widths `R_WA`, `R_WB`. Per segment: lowest bit `S_LO` and width `S_W`
within the word of GMO `S_GMO`. Per GMO (in `gmo_line_buffer`): pixel
width `G_PIX`, number of lines `G_LINES`, line length `G_L`.
`gmo_line_buffer` builds one address generator per GMO (each generator
serves the partitions of its GMO and drives zero on the rest) and passes
the table to `gmo_storage`, which instantiates the RAMs, connects each
partition to its port and, per segment, selects the word of the partition
that was used. Rules the table must obey: within a segment the partitions
cover elements 0..L-1 in table order without overlap; a segment is no
wider than its ports; two partitions sharing a RAM do not overlap in it;
each port holds at most one partition. These rules are not checked in
hardware. The defaults everywhere are the 640 x 48 example with one GMO;
`rtvps_gmo_top` and `nbhd_window` (5x5) are written for it.

### Several GMOs in the same RAMs

With `NG` > 1, `gmo_line_buffer` holds several GMOs, each with its own
`valid_i[g]` and `pix_i[g]`, so several operators can run on separate
streams. The two ports of one RAM may belong to different GMOs. That is
how small buffers fill the space a large one leaves: seven 708 x 16 GMOs
fit in six RAMs when the seventh is split across the B ports of the first
three. A port is enabled by the valid of the GMO its partition belongs to,
so one GMO can stall while another keeps moving. `lines_o[g]` is the raw
GMO word: line k in bits `(k-1)*G_PIX[g] +: G_PIX[g]`, zero above the
GMO's width.

`bram_dp` stands in for the vendor Block RAM primitive. A wider port sees
address a as the narrow words a*R .. a*R+R-1 (R = width ratio), lowest in
the low bits, which matches the offset arithmetic above. Parity bits are
not modelled; `rst` clears only the output registers.

## Where this RTL departs from the original description, or fills gaps

- After its last word a distributed partition returns to its OFFSET. The
  original pseudo-code says "reset to 0"; its worked example for the
  offset partition uses the offset, which is what is needed.
- Segment bit assignment (bits 31:0 vs 47:32), the read-first mode, the
  shift-by-one-field update, the window alignment registers, a single valid
  flag as the pixel interface, and synchronous reset are choices of this
  design; the original leaves them open.
- The original generates VHDL per allocation with a software tool that
  also performs the allocation. Neither tool is reproduced; the allocation
  is a fixed table.
- The larger evaluated applications (a 7-frame spatio-temporal median on
  VGA RGB or PAL, a machine-vision chain on VGA or 1.3 Mpixel video) are
  not built as operators: only their memory objects are known. Those memory
  objects are exercised as GMO line buffers in `tb_design_cases` (below)
  with allocations worked out here. With one set of RAMs per GMO they take
  14, 7, 7 and 16 Block RAMs; the original allocator reached 14, 6, 5 and
  13. Sharing RAMs between GMOs brings the last three to 6, 5 and 13,
  and they are simulated that way too.
- No place-and-route for a Spartan-3 part has been done, so the
  frequency figures quoted above are not confirmed by this RTL. A plain
  logic mapping of the two address generators for the example allocation
  (yosys `synth_xilinx -family xc3s`) gives 21 LUTs and 10 flip-flops for
  the base pointer and 25 LUTs and 33 flip-flops for the distributed
  scheme. That is the same direction as the published LUT counts, which
  cover whole designs and are not comparable one to one. In the same flow
  the mixed-width RAM is not inferred as a Block RAM, so whole-design
  numbers from it mean nothing.

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
      rtl/gmo_pkg.sv tb/tb_rtvps_gmo_top.sv --top-module tb_rtvps_gmo_top
    ./obj_dir/Vtb_rtvps_gmo_top

`tb_rtvps_gmo_top_full` streams a whole 640 x 480 frame (with random
stalls) through the top exactly as delivered and checks all 25 taps of
every window, the one-clock window-valid timing and one BR1 -> BR2 port B
hand-over and return per line. `tb_rtvps_gmo_top` runs the default top and
a base-pointer copy side by side on 12 lines and checks that both give the
same windows and partition enables.

`tb_design_cases` builds the line-buffer memories of four larger
applications as GMOs and runs each under both schemes, checking every tap
against the input stream and that every partition is used:

| memory object | GMO | allocation used |
|---------------|-----|-----------------|
| 7 frames x 2 lines of 24-bit RGB, 640 wide | 7 x 640 x 48 | as the example, 2 RAMs each |
| 7 frames x 2 lines of 8-bit gray, 708 wide | 7 x 708 x 16 | one 1024 x 16 port each |
| 4 lines of 8 bit, 640 wide | 640 x 32 | 512 + 128 words on two 32-bit ports |
| 16 lines of 1 bit, 640 wide (x3) | 640 x 16 | one 1024 x 16 port |
| one 256-entry buffer of 19 bits | 256 x 19 | 16 + 2 + 1 bit segments, the 2-bit one in port B above the 16-bit one (address 2048) |
| 4 lines of 12 bit, 1300 wide | 1300 x 48 | 32-bit segment in 3 partitions, 16-bit segment in 2, one RAM shared |
| one 4096-entry buffer of 21 bits | 4096 x 21 | 16-bit segment in 4 RAMs, then 4-bit and 1-bit segments |
| 16 lines of 1 bit, 1300 wide (x3) | 1300 x 16 | 1024 + 276 words |

Three further checks (`gmo_shared_check`) put several GMOs, each with its
own stream and stalls, on shared RAMs. These reach the RAM counts of the
original allocator:

| memory objects | RAMs | allocation used |
|----------------|------|-----------------|
| 7 x 708 x 16 | 6 | GMO g in port A of RAM g (g = 0..5); GMO 6 in port B of RAM 0, 1, 2 (316 + 316 + 76 words from 16-bit address 708) |
| 640 x 32, 256 x 19, 3 x 640 x 16 | 5 | 640 x 32 in RAM0 A + RAM1 A; each 640 x 16 in port A of RAM 2, 3, 4; the 256 x 19 as 16 bits in RAM1 B (16-bit address 256), 2 bits in RAM2 B (2-bit address 5120), 1 bit in RAM3 B (1-bit address 10240) |
| 1300 x 48, 4096 x 21, 3 x 1300 x 16 | 13 | 16 bits of the 4096 x 21 in RAM 0..3, its 4 bits in RAM4; the other segments packed in order through RAM 5..12, each piece in the next free port from the next free address, the 1-bit slice last (RAM12 B from 1-bit address 10112) |

The last one leaves only 2176 of its 212992 bits unused.

The block testbenches check the RAM against a reference array (mixed
widths, read-first), the address generators against the example's
partition table, the GMO storage by writing and reading back whole passes,
the line buffer taps against the k*(L+1) lag, and the window formula for
N = 3 and 5. Every testbench runs in well under a minute.

To use another allocation, pass its table to `gmo_line_buffer` as in
`tb_design_cases` (`gmo_lb_check` for one GMO, `gmo_shared_check` for
several). Note that Verilator wants an overriding array parameter
as a typed `localparam` (`localparam int unsigned T [2] = '{0, 512};`),
not as a literal `'{...}` in the instance. To change the window size or
line length of the top, edit `gmo_pkg` together with the allocation there.
