# Defect-tolerant CMOL crossbar memory

A nanowire crossbar memory stores one bit in a two-terminal device at every crossing of
two nanowire layers. Its cells are tiny, but at a few nanometres a sizeable fraction of
them will not work. This design tolerates defect fractions of about 1 % and above by
combining two mechanisms:

* **Error correction inside a fragment.** Data are stored in fragments of several
  thousand bits. Each fragment is a run of binary BCH codewords, and a fully parallel
  decoder corrects up to `t` bad bits per codeword on every read.
* **Exclusion of whole fragments.** A fragment with more errors than the code can fix is
  never used. A per-superblock mapping table sends every logical fragment address to a
  physical location that passed a self-test. Spare locations take the place of bad ones.

The size of an excluded unit (the granularity) does not depend on the array geometry. So
the code length, the fragment size and the number of spares can be tuned to the defect
rate. The RTL is set to one operating point of the published architecture
("Defect-Tolerant Architectures for Nanoelectronic Crossbar Memories"): a CMOS-to-nanowire pitch ratio of 10, a 10 ns access-time budget, 1 % bad devices and the
BCH(255,179) code that corrects 10 errors. The sizes are parameters. The nanowire crossbar
itself is analogue, so it is a behavioural model. Everything else is synthesizable
SystemVerilog.

## Organisation: blocks, segments, fragments, superblocks

| level | what it is | default size |
|---|---|---|
| relay cell | CMOS cell under the crossbar with one "red" pin (bottom nanowire layer) and one "blue" pin (top layer) | - |
| block | W x W relay cells and the crossbar above them | W = 256 |
| segment | piece of a bottom-layer nanowire between two blue pins; touches r^2 devices | r = 16, 256 bits |
| fragment | one segment at the same address in each of G adjacent blocks | G = 128, 32768 bits |
| codeword | BCH(n, k, t) word; a fragment holds floor(G r^2 / n) of them | (255,179,10), 128 words |
| superblock | the G blocks that share one mapping table | 58766 useful fragments |

A block has W^2 = 65536 segment positions. Each fragment spans a whole superblock, so a
superblock stores 58766 x 128 x 179 bits (about 1.35 Gbit) of user data. A fragment
holds 128 codewords (32640 bits), so 128 bits of it are left unused. They are written
as 0.

`cmol_memory` (the top) holds `NSB` superblocks. A cell decoder selects one of them for
each command; this is the block address decoder.

## Addressing a segment inside a block (`cmol_block`)

The crossbar is rotated slightly against the relay-cell grid. This is what lets every
nanowire be reached from exactly one pin without precise alignment. A segment is named by
the relay cell whose red pin touches it: column `A_col1` and row `A_row1`. An access uses
four CMOS decoders (`cell_decoder`):

1. the **column decoder** raises data-pin column `A_col1`;
2. the **row decoder** raises select row `A_row1`. Together they bias the segment through
   its red pin;
3. the **top-layer row decoder** raises rows `A_row1 + r/2` and `A_row1 - r/2` together.
   Their blue pins join the r^2 top-layer nanowires that cross the segment to the CMOS
   data lines. The two rows come from the two small adders of `address_control`. Near
   the top and bottom edges one of the rows does not exist. The segment is then reached
   through the other row, and `border` reports the case;
4. the **data-line selector** (`barrel_shifter`) has its own decoder, driven by `A_col2`.
   It joins the r^2 data lines that carry the segment to the r^2-bit block port. Port
   bit j is data line `(A_col2 + j) mod W`. `A_col2` equals `A_col1`.

When W = r^2 (the default), every data line is used and the selector only fixes the bit
order. With W > r^2 (the reduced test uses W = 32, r = 4) it picks a moving window of
lines.

All G blocks of a superblock get the same address at the same time. Together they read
or write the whole fragment in one array operation.

## The crossbar model (`crossbar_array`)

This is the only behavioural file. It stores W^2 segments of r^2 bits. At the CMOS lines
it behaves as follows:

* **Read.** All r^2 devices of the selected segment are sensed at once. The sense
  amplifiers latch at the clock edge, so the data lines are valid in the cycle after
  `rd`.
* **Write in two steps.** Switching a device to 0 and switching it to 1 need biases of
  opposite polarity. So a write is two cycles: step 0 clears every device whose line is
  driven with 0, and step 1 sets every device whose line is driven with 1.
* **Defects.** A fraction `Q_PPM`/10^6 of the devices is stuck open: it never conducts
  and always reads 0. A fixed hash of (block, column, row, bit) chooses them, so the
  same memory always has the same defects. The default is 1 %.
* **Invalid selects.** An access without a valid one-hot column and row, or without any
  top-layer row, reads zero and writes nothing.

The model keeps every cell: about 2 MB of simulator memory per block at the default size.

## Writing and reading a fragment (`cmol_memory`)

The controller runs one command at a time. `cmd_valid`/`cmd_ready` accept a command with
a superblock `cmd_sb` and a logical fragment address `cmd_addr`.

**Write** (`cmd_write = 1`):

1. The controller takes NCW = 128 information words of K bits on `wr_data`
   (`wr_valid`/`wr_ready`).
2. `bch_encoder` encodes each word into its codeword slot of the fragment buffer.
3. The mapping table is read (one cycle, then one cycle to use the result).
4. All G blocks write the segment: zeros in one cycle, then ones in the next.
5. `op_done` pulses.

**Read** (`cmd_write = 0`):

1. The mapping table is read as for a write.
2. All blocks sense the segment for one cycle, and the next cycle captures the fragment.
3. The 128 codewords pass one after another through the single `bch_decoder`.
4. Each result appears for one cycle on `rd_valid`, with `rd_data` (K bits),
   `rd_nerr` (bits corrected) and `rd_fail` (uncorrectable). `rd_last` marks the last
   word, and `op_done` follows it.

Successive words come T + 4 = 14 cycles apart. At the default size a read takes 1797
cycles from command to `op_done`. An address with no entry in the table ends the command
at once with `op_miss`. `op_border` reports that the last access used a border segment.

Filling the mapping table is left to the host, through `map_we`/`map_sb`/`map_addr`/
`map_col1`/`map_row1`. The test procedure used in `tb/cmol_memory_tb.sv` shows the
intended use:

1. Write all-ones words to a candidate segment.
2. Read them back. All-ones is a codeword of the code, and every stuck-open device in
   the segment shows up as an error.
3. Enter the segment in the table only if no word is flagged or wrong.

## The BCH decoder (`bch_decoder`)

The decoder is fully bit-parallel. It is built from three circuits, one per decoding
step. All arithmetic is in GF(2^8) with field polynomial x^8+x^4+x^3+x^2+1; `gf_pkg`
holds the field functions and tables.

**Step 1 - syndromes (`bch_syndrome`).** S_j = r(alpha^j) for j = 1..2t. Every one of
the 2tm = 160 syndrome bits is an XOR tree over the received bits whose parity-check
column has a 1 in that bit. The tree inputs are computed at elaboration from the power
table of the field. The step is combinational.

**Step 2 - error-location polynomial (`bch_berlekamp`).** This is the binary form of the
Berlekamp-Massey iteration. For a binary code only t iterations mu = 0..t-1 are needed.
Each iteration does

    sigma^(mu+1) = sigma^(mu) + d_mu * d_rho^-1 * X^(2(mu-rho)) * sigma^(rho)
    d_(mu+1)     = S_(2mu+3) + sigma_1 S_(2mu+2) + ... + sigma_t S_(2mu+3-t)

Row rho is the earlier row with d_rho != 0 and the largest 2 rho - l_rho. The control
unit keeps that row (its sigma, d, degree and 2 rho) in registers. It replaces the row
when the row just processed qualifies better. The start row rho = -1/2 has sigma = 1,
d = 1 and degree 0. One iteration takes one clock. The same hardware serves every
iteration and is sized for degree t:

* t multipliers form d_mu * sigma^(rho);
* a shifter multiplies by X^(2(mu-rho));
* t multipliers apply d_rho^-1, which comes from a 256-entry inversion ROM (`gf_inv`);
* XOR trees add the result to sigma^(mu);
* t more multipliers and an XOR tree produce the next discrepancy.

Multiplication is the bit-parallel `gf_mult`.

**Step 3 - root search and correction (`bch_chien`).** Each of the 255 code positions i
has its own test circuit. The circuit evaluates sigma at alpha^(-i) with t constant
multipliers and an XOR tree, then checks the sum for zero. Because every position tests
the inverse element directly, no inversion of roots is needed. The bit of every position
whose test fires is flipped. The circuit also counts the roots. If the count differs from
the degree of sigma, or the degree exceeds t, the word is flagged `fail`. This flag is
what the self-test and the `rd_fail` output rely on.

**Timing.** In the cycle after `in_valid` the decoder loads the syndromes into step 2.
Step 2 then runs t cycles. Steps 3 and the output register follow. So `out_valid` comes
exactly t + 2 = 12 cycles after the input is accepted. The decoder is not pipelined:
`in_ready` is low while a word is in flight.

`bch_encoder` is the matching systematic encoder: parity in bits 0..n-k-1 and
information in bits n-k..n-1. It computes the generator polynomial at elaboration as the
product of (x + alpha^e) over the cyclotomic cosets of alpha, alpha^3, ..., alpha^(2t-1).

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `W` | 256 | relay cells on a block side | published value |
| `R` | 16 | CMOL topology parameter r, r^2 bits per segment | published value |
| `G` | 128 | blocks per superblock (fragment = G r^2 bits) | published optimum for q = 1 % |
| `NSB` | 2 | superblocks | reduced: a 1 Tbit memory needs about 470 |
| `M_FRAG` | 58766 | mapping-table entries (useful fragments) | published optimum for q = 1 % |
| `M`, `POLY` | 8, 0x11D | field GF(2^M), field polynomial | M published, polynomial chosen here |
| `T`, `K` | 10, 179 | correctable errors, information bits | published optimum for q = 1 % |
| `Q_PPM` | 10000 | stuck-open fraction in the crossbar model | the q = 1 % operating point |

For other operating points of the same study, change `M`, `T`, `K`, `G` and `M_FRAG`
together:

* q = 0.001 % to 0.32 %: BCH(255,239..199) with t = 2..7, and G = 256 or 512;
* q = 3.2 %: BCH(127,57,t=11) with G = 32;
* q = 10 %: BCH(63,16,t=11) with G = 4.

`K` must equal n minus the degree of the generator polynomial. The GF tables support
M <= 9.

## Departures and limits

* **Size of the memory.** A 1 Tbit memory needs about 470 superblocks; the default is 2,
  because the behavioural crossbar keeps every cell in simulator memory.
* **One decoder per memory.** There is a single, non-pipelined decoder per memory, so
  a fragment read takes about 128 x 14 cycles. For full bandwidth the published
  architecture replicates the decoder for each column of blocks.
* **Fragments below one segment (g < 1) are not supported.** That case needs a
  displacement field in the mapping table and an extra adder on `A_col2`. No published
  operating point needs it.
* **Design choices of this RTL.** The following are not given by the source: the
  encoder, the `fail` check, the clocking (one Berlekamp-Massey iteration per cycle,
  registered sense amplifiers and table), the command and data handshakes, the mapping
  of segment bits to data lines, and the defect hash.
* **What the crossbar model leaves out.** It has only stuck-open defects. It has no
  stuck-closed defects, broken nanowires or analogue effects (noise, leakage, delay).
  The cells lost at the array edges are not modelled: the mapping table is simply never
  pointed at them.
* **Decoding beyond t errors.** Words with more than t errors are usually flagged, but a
  BCH decoder can also miscorrect them silently. The self-test therefore compares the
  data as well as the flag.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` at the end. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/gf_pkg.sv tb/tb_gf_pkg.sv \
        tb/bch_decoder_tb.sv --top-module bch_decoder_tb
    ./obj_dir/Vbch_decoder_tb

The other testbenches build the same way. `tb_gf_pkg.sv` is needed only by the GF and
BCH testbenches.

* `tb/cmol_memory_tb.sv` is the end-to-end test at reduced size: W = 32, r = 4, 8
  blocks, BCH(31,21,t=2). Two memories, with 0.5 % and 4 % defects, run the self-test,
  fill the tables, and write and read every mapped fragment of both superblocks. The
  testbench counts every mechanism: two-step writes, reads, corrected words, flagged
  words, excluded segments, table misses, border segments and both superblocks.
* `tb/cmol_memory_full_tb.sv` runs the top at its default size. It writes and reads two
  full fragments (256 codewords), one of them on a border segment. It takes about
  1 minute to build and 1.5 minutes to run, and needs about 0.6 GB.
