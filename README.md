# DIN: data-encoded insulation against write disturbance in dense PCM

Below about 20 nm, programming a phase-change memory (PCM) cell heats its
neighbours. A RESET pulse (melting a cell into the amorphous, high-resistance
state, bit `0`) can partly crystallise a neighbouring cell that is *idle* in
the same write and holds `0`. That cell then reads as `1`. This is write
disturbance. Keeping a thermal band between cells along the word-line avoids
it, but costs area: going from 60 nm to 40 nm cell spacing along the
word-line saves a third of the cell area.

This RTL implements the memory-side datapath that makes the dense array
usable. It rests on three ideas:

1. **Make vulnerable patterns rare.** A disturbance needs a RESET cell next
   to an idle `0` cell. So, in SLC, only the bit pair `00` is at risk. Each
   64-byte line is compressed first. If the compressed line fits in 369 bits,
   every 3 data bits are stored as a 4-bit code word chosen from the 8 four-bit
   patterns that contain no `00`.
2. **Absorb what is left.** A 20-bit BCH code over the encoded bits corrects
   up to two disturbed cells. An encoded write may therefore leave two errors
   behind.
3. **Verify and restore.** After programming, the line is read back. Cells
   that were disturbed are programmed again, and the line is verified again.
   After five failed verifies the whole line is programmed at once. When every
   cell is written, no cell is idle, so the line is disturbance-free.

A line that does not compress enough is stored raw. Its writes must then
verify with zero errors. One extra flag cell per line records which of the
two forms was used.

## Stored line format

A line occupies 513 cells:

| cells     | encoded line (flag = 1)          | raw line (flag = 0) |
|-----------|----------------------------------|---------------------|
| 512       | flag `1`                         | flag `0`            |
| 511 … 20  | 123 code words of 4 bits (492)   | data bits 511 … 0   |
| 19 … 0    | BCH parity (20)                  |                     |

The sizes fit together exactly: 369 / 3 × 4 = 492, and 492 + 20 = 512.
Sixteen 32-bit words compress to at most 560 bits, so a line is encoded only
when its compressed stream is 369 bits or shorter (72 %). Address width is
27 bits, which covers 8 GB of 64-byte lines.

## The (3,4) code books (`din_pkg.sv`, `din_encoder`, `din_decoder`)

The vulnerable pattern depends on the cell technology, so there are two code
books. Group *g* of the compressed stream (`cdata[3g+2:3g]`) becomes
`edata[4g+3:4g]`. Code bit 0 goes into the lowest-numbered cell.

| data | SLC and SSMR MLC (no `00`) | SRMS MLC (no cell `01`) |
|------|----------------------------|-------------------------|
| 000  | 0101 | 1110 |
| 001  | 0110 | 1100 |
| 010  | 0111 | 1011 |
| 011  | 1010 | 1010 |
| 100  | 1011 | 1000 |
| 101  | 1101 | 0011 |
| 110  | 1110 | 0010 |
| 111  | 1111 | 0000 |

- **SLC.** Only a `0` next to a RESET cell is at risk. No code word contains
  `00`.
- **2-bit MLC with single-SET-multiple-RESET (SSMR) programming.** The cell
  value `00` (full RESET) is the only one whose RESET pulse is strong enough
  to disturb. The SLC book also works here, because none of its code words
  has a `00` cell. (Cells are bit pairs `{2k+1, 2k}`.)
- **2-bit MLC with single-RESET-multiple-SET (SRMS) programming.** Every
  programmed cell is RESET first, so disturbance cannot be encoded away. The
  book instead drops the value `01`. That value needs the most SET
  iterations, so restores of disturbed cells hide behind the SET iterations
  of the other cells.

The parameter `CELL_TYPE` (or `MODE` on the codec modules) selects the book.

Two limits of the encoding are worth knowing:

- Code words are only free of the pattern *inside* themselves. In the SLC
  book, a word ending in `0` can sit next to a word starting with `0`, which
  forms a `00` across the group boundary.
- The 20 parity cells and the flag cell are not encoded.

Both of these leave the residual errors that BCH and verify-and-restore
handle. The decoder flags any 4-bit group that is not a code word
(`bad_group`). That can only happen when a line holds more errors than the
BCH code can correct.

## BCH code (`bch_encoder`, `bch_decoder`)

The code is a binary BCH code with t = 2 over GF(2^10):

- primitive polynomial x^10 + x^3 + 1;
- generator g(x) = m1(x)·m3(x) = `0x101877`, of degree 20;
- shortened to 512 bits.

Encoding is systematic: the parity is (data(x)·x^20) mod g(x), written into
cells 19…0. This leaves the code words untouched. The encoder is one
unrolled XOR network.

The decoder avoids both GF division and a sequential Chien search:

- It computes the syndromes S1 = r(α) and S3 = r(α³). Both are XOR sums of
  constants.
- For error locations X1 and X2, S3 + S1³ = S1·X1·X2. So every error location
  z is a root of S1·z² + S1²·z + (S3 + S1³).
- This polynomial is evaluated at all 512 positions in parallel, each
  evaluation being a constant multiply. The roots found are the bits to flip.

It reports one of these outcomes:

- no error;
- one or two corrected errors (when the number of roots matches the
  syndromes);
- uncorrectable.

Three errors are not always detected. A 20-bit, distance-5 code cannot
guarantee that while also correcting two. In simulation, 87 % of random
3-error patterns were flagged and the rest were miscorrected. Guaranteed
triple-error detection would need one more overall-parity cell.

## Verify-and-restore writes (`vnr_write_ctrl`)

A write is given the old cells, the new cells and a tolerance: 2 for an
encoded line, 0 for a raw line. It then runs:

1. **Program.** Program only the cells that change (a differential write).
2. **Verify.** Read the line back. If at most `tol` data cells differ and
   the flag cell is correct, the write is done.
3. **Restore.** Otherwise program exactly the differing cells and go back
   to step 2.
4. **Full write.** If the fifth verify still fails, program all 513 cells
   with no verify after it. A full write draws much more programming current
   than a differential one, so it first raises `full_req` and waits for
   `full_grant` from the chip's power budget.

The controller reports the number of verifies and restores, whether a full
write happened, and the residual error count.

## Request queues (`mem_sched`)

Reads and writes wait in two 24-entry queues:

- **Reads first.** A write is issued only when no read waits.
- **Write burst.** When the write queue fills, a burst starts. Only writes
  are issued until the write queue is empty, and reads wait.
- **Read-after-write ordering.** A read whose line address matches a queued
  write is held until that write has issued, so it never returns stale data.

During a burst, a write accepted *after* a read of the same line can still
overtake that read. That is inherent in the burst policy; a client that needs
strict ordering must not issue such pairs.

## Compression (`fpc_compress`, `fpc_decompress`)

The compressor uses Frequent Pattern Compression on sixteen 32-bit words.
Each word becomes a 3-bit prefix plus a payload:

| prefix | word pattern                            | payload bits |
|--------|-----------------------------------------|--------------|
| 000    | run of 1–8 zero words (length − 1)      | 3  |
| 001    | 4-bit sign-extended                     | 4  |
| 010    | 8-bit sign-extended                     | 8  |
| 110    | one byte repeated 4 times               | 8  |
| 011    | 16-bit sign-extended                    | 16 |
| 100    | low halfword zero                       | 16 |
| 101    | two halfwords, each a sign-extended byte | 16 |
| 111    | uncompressed                            | 32 |

- The first matching row in the table above wins.
- Tokens are packed from bit 0 upwards.
- A zero run is emitted where it ends.

Both directions are combinational. The decompressor parses at most 16 tokens
and flags a malformed stream.

## din_top: interface and timing

`din_top` chains the blocks: `mem_sched`, then a single line engine using the
codecs and `vnr_write_ctrl`, then the PCM port.

| group   | signals |
|---------|---------|
| requests | `req_valid/req_ready`, `req_write`, `req_addr[26:0]`, `req_wdata[511:0]`. `req_ready` reflects space in the queue the request targets. |
| read responses | One-cycle `resp_valid` pulse with `resp_addr`, `resp_data`, `resp_encoded`, `resp_nerr` (cells corrected by BCH) and `resp_err` (line not recoverable). |
| write completions | One-cycle `wr_done` pulse with `wr_addr`, `wr_encoded`, `wr_verifies`, `wr_restores`, `wr_full`. |
| status | `burst` |
| power budget | `pwr_full_req` (a full-line write is waiting) and `pwr_full_grant` (the power budget allows it). The budget policy itself is outside this design. |
| PCM port | `pcm_req_valid/ready`, `pcm_req_write` (1 = program, 0 = read), `pcm_req_addr`, `pcm_req_mask[512:0]`, `pcm_req_data[512:0]`. A read answers later with one `pcm_rsp_valid` cycle carrying `pcm_rsp_data[512:0]`. |

Reset (`rst_n`) is asynchronous and active low.

Each codec stage takes one clock cycle. The line engine handles one request
at a time:

| request | steps, one clock each |
|---------|-----------------------|
| write | issue, compress, encode + parity, old-line read, verify-and-restore loop, done |
| read | issue, PCM request, PCM answer, BCH correct, decode + decompress + respond |

A read of an idle memory takes 7 cycles from `req_valid` to `resp_valid`
when the PCM read latency is 2 cycles.

Parameters, with their defaults:

- `CELL_TYPE`: `CELL_SLC`; the alternatives are `CELL_SSMR` and `CELL_SRMS`.
- `RQ_DEPTH`, `WQ_DEPTH`: 24.
- `vnr_write_ctrl.MAX_ROUNDS`: 5.

The shared sizes (line width, 369/492/20 split, address width) are in
`din_pkg.sv`.

## Where this design departs from, or adds to, the scheme it implements

- **Compression format.** The scheme only names FPC. The token format above
  is the classic FPC pattern set.
- **BCH details.** The scheme fixes a 20-bit, 2-error-correcting BCH code
  that also detects 3 errors. The field, polynomial and decoder are this
  design's choice, and triple-error detection is only partial (see above).
- **Encoder count.** The (3,4) stage has 123 encoders, not one per 4 cells
  of the line (128): the parity cells are not encoded.
- **Flip-N-Write.** Writes are differential (changed cells only). Flip-N-Write
  inversion is not used, because it would invert code words into vulnerable
  patterns.
- **Not built:**
  - disabling the encoding after a cascade of restores in SSMR MLC;
  - the relaxed (4,5) and (7,8) encodings and the (2,3) code book, which are
    alternatives.
- **The PCM chip itself is not part of the RTL.** This covers the cells,
  SET/RESET pulse circuits, MLC iteration control and the separator cells
  between 64-byte sections of a row. The testbenches use a behavioural model,
  `tb/pcm_model.sv`, which has:
  - per-technology disturbance rules: an SLC RESET disturbs idle neighbours
    holding `0`; an SSMR `00` program, or any SRMS program, moves an idle
    neighbour one resistance level towards crystalline;
  - a random hit rate that is a test knob, not a physical model.

## Simulation

All testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_din_top \
    -y rtl -y tb +libext+.sv rtl/din_pkg.sv tb/tb_ref_pkg.sv tb/tb_din_top.sv
./obj_dir/Vtb_din_top
```

| testbench | checks |
|-----------|--------|
| `tb_din_top` | Whole design at default parameters (SLC). It runs about 230 writes and 260 reads, including exact 369/370-bit threshold lines, write bursts and disturbance rates of 5–100 %. It requires every mechanism to occur: encoded and raw writes, restores, full writes, BCH-corrected reads, bursts, reads ahead of older writes, back-pressure, and full writes waiting for the power grant. About 15 s. |
| `tb_din_top_mlc` | The same traffic on SSMR and SRMS instances. |
| `tb_mem_sched` | Read priority, read-after-write hold, write burst, full queues, FIFO order. |
| `tb_vnr_write_ctrl` | Residual errors, PCM command counts, the 5-verify limit, and the cycle count of a clean write. |
| `tb_fpc_compress`, `tb_fpc_decompress` | Against an independent reference encoder (`tb/tb_ref_pkg.sv`). |
| `tb_din_encoder`, `tb_din_decoder` | Against the code book tables and the no-`00` / no-`01` properties. |
| `tb_bch_encoder`, `tb_bch_decoder` | Against long division and Horner-rule syndromes, with 0–3 injected errors. |
| `tb_din_wd_eval` | Counts disturbance-vulnerable cells per SLC write for plain storage, inversion and the DIN write path, on an integer-like and a floating-point-like line stream. |

`din_env.sv` is the traffic generator and scoreboard shared by the two
top-level testbenches. `pcm_model.sv` is the chip model.

### What the disturbance count shows

A cell is counted as vulnerable when it is idle, holds `0`, and sits next to
a RESET cell. This counts exposure, not actual errors. `tb_din_wd_eval`
printed these averages per write:

| stream | plain | inverted when 0s dominate | DIN, all writes | DIN, encoded line over encoded line |
|--------|-------|---------------------------|-----------------|-------------------------------------|
| integer-like | 43.3 | 18.9 | 7.4 | 7.5 (plain on the same writes: 43.6) |
| float-like   | 36.1 | 21.5 | 28.6 | 7.4 (plain on the same writes: 31.3) |

Encoding cuts exposure by about five times whenever both the old and the new
contents of a line are encoded. The remaining exposure comes from group
boundaries and parity cells. A write that switches a line between raw and
encoded form rewrites most cells, so it exposes more than a plain write
would. How much DIN gains overall therefore depends on how many lines
compress to 369 bits.

