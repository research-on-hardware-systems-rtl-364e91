# Bitmap-index hardware for data analytics

A bitmap index (BI) replaces a table column with one bit vector per value or
value range: bit *n* of the vector is 1 when record *n* satisfies the
condition. Once the vectors exist, a query over several columns reduces
to wide bitwise AND/OR/XOR/NOT operations, and the answer is itself a bit
vector. Its set bits can be listed as record numbers.

This RTL implements the three pieces of such a system, all sized for
32,768-record batches and a 256-bit memory bus:

| Part | Module | Does |
|---|---|---|
| BI creator (BIC) | `bic` | turns batches of 32,768 16-bit values into 32,768-bit BI vectors, one vector per clock once a batch is loaded |
| BI query processor (BIQP) | `biqp` | combines stored BI vectors with a program of bitwise operations, one 32,768-bit operation per clock |
| BI encoder (BIE) | `bie` inside `biqp` | converts a result vector into the list of its set-bit positions, one position per clock |

`bi_analytics_top` puts the creator and the query processor side by side.
Each has its own memory port. In a complete system, BI vectors written by
the creator are copied by software into the query processor's memory.

## The central trick: a CAM is a transposed bitmap index

A content-addressable memory (CAM) answers "which addresses hold key *k*?"
with a match vector. That vector is exactly the BI vector for `value == k`.
So indexing a batch means loading it into a CAM and then presenting one
key per clock. Each key returns a full 32,768-bit BI vector.

The CAM is built from ordinary RAM instead of match-line cells.

* **CAM unit (`cam_unit`)**: a 256 × 32-bit RAM covering 32 stored words
  and one 8-bit slice of the key.
  * Storing 8-bit value *v* at word slot *a* sets bit *a* of row *v*.
  * Reading row *k* returns, in one access, which of the 32 words equal *k*.
  * Port A writes single bits (load and clear). Port B reads the match
    row, and is also used to zero whole rows.
* **16-bit words**: two units, for the high and low bytes. Their match rows
  are ANDed.
* **Full CAM (`ram_cam`, "CAM32K16")**: 64 CAM blocks × 16 lanes × 2
  units = 2,048 units.
  * One 256-bit memory beat carries 16 words and writes all 16 lanes of one
    block in a single cycle. Loading 32,768 words therefore takes 2,048
    beats.
  * Word *n* (beat *n*/16, lane *n*%16) lands in block (*n*/16)/32, slot
    (*n*/16)%32, lane *n*%16. The read vector is wired so that its bit *n*
    is record *n*.
  * The RAM holds 32 bits per stored bit: 16 Mbit for 64 KB of data. That
    is the price of a one-cycle lookup over 32K words.
* **Clearing**: a RAM CAM only ever sets bits, so old data must be removed
  before the next batch.
  * Between batches, the previous batch is replayed with the write value
    0 (the `set` input). This costs as long as a load.
  * At the start of each job, all 256 rows are instead zeroed through
    port B. This 256-cycle sweep overlaps the loading of the operation
    list.

## BI creator (`bic`)

A job is described by six inputs:

| Input | Meaning |
|---|---|
| `ops_base` | memory address of the operation list |
| `ops_count` | number of operations |
| `data_base` | address of the first batch |
| `batches` | number of batches |
| `out_base` | where the results go |
| `start` | begins the job (a pulse) |

Addresses count 256-bit words.

**Operation word (32 bits):** `{key[31:16], 0…, EQ[2], NO[1], OR[0]}`.

| Bits set | Effect |
|---|---|
| OR | result register RR ← RR OR CAM(key) |
| NO | RR ← NOT RR (applied after OR when both are set) |
| EQ | RR goes to the output, and RR is cleared |

A range query `10 ≤ x ≤ 13` is therefore OR 10, OR 11, OR 12, OR 13, EQ. A
"not equal" is OR k with NO.

Flow for each job:

1. A 3-channel DMA (`bi_dma`) loads the operations, 8 per beat, into the
   operation memory (OPM, `bic_opm`, 2,048 entries). At the same time the
   CAM is swept clean.
2. For each batch:
   * clear the CAM by replaying the previous batch (from batch 2 on);
   * load the batch (2,048 beats);
   * run all operations through a 3-stage pipeline, one per clock:
     OPM read → CAM read → query logic array (`bic_qla`).
3. Each EQ copies RR into a one-vector output buffer. From there the
   vector is written to memory as 128 beats at consecutive addresses from
   `out_base`, overlapping later work.
   * An EQ that finds the buffer still busy stalls the pipeline.
   * Results of batch *b* follow those of batch *b*−1.

Batch *b* is read from `data_base + b*2048`. Inside a beat, word *l*
occupies bits `[16l+15:16l]`.

## BI query processor (`biqp`)

The query processor keeps up to 512 BI vectors in the bitmap index memory
(BIM, `bim`).

* The BIM is 128 dual-port units (`bimu`) of 512 × 256 bits.
* Row *r* of every unit together forms vector *r*, so one read returns a
  whole 32,768-bit vector.
* Loading writes one 256-bit beat per clock at address `{row, unit}`. A
  vector therefore arrives as 128 beats, and vector *r* of a batch starts
  at beat *r*·128.

**Operation word (16 bits):** `{row[15:7], 0[6:4], code[3:0]}`.

| code | name | effect |
|---|---|---|
| 0000 / 0001 / 0010 | AN / OR / XO | RR ← RR and/or/xor BIM[row] |
| 0100 / 0101 / 0110 | same with NI | the BIM row is inverted first |
| 1000 | CR | RR ← 0 |
| 1001 | NO | RR ← NOT RR |
| 1010 | LD | BIM[row] ← RR (keeps an intermediate result) |
| 1100 | EQ | RR goes to the output |

Unlike the creator, EQ does not clear RR, so a query program begins with
CR. Write the program with the `bi_pkg::biqp_op(row, code)` helper.

A job loads the operations (16 per beat, 4,096 entries). Then, for each of
`batches` batches, it loads `nb` vectors and runs the operations through a
3-stage pipeline: OPM → BIM row read → QLA (`biqp_qla`). Batch *b*'s
vectors start at `bim_base + b*nb*128`.

**Read-after-LD bypass.** An operation that reads the row written by the LD
just before it would see the old BIM contents, because the BIM read
happened a cycle earlier. The QLA detects this and uses RR instead.

**Output.** EQ copies RR into an output buffer, and `enc_en` chooses the
format for the whole job:

* **Raw** (`enc_en=0`): 128 beats holding the 32,768-bit result.
* **Encoded** (`enc_en=1`): the encoder lists the set bits in ascending
  order.
  * Positions are packed sixteen 16-bit slots per beat.
  * Each result list ends with at least one `0xFFFF` slot and is padded
    with `0xFFFF` to a whole beat.
  * An empty result is a single beat of `0xFFFF`.
  * `n_matches` (`biqp_matches` on the top) counts the positions written
    by the job.

## BI encoder and the multi-match priority encoder

`bie` cuts a 32,768-bit vector into 16 segments of 2,048 bits. Each segment
is loaded into a multi-match priority encoder (`mpe`). The MPE:

* holds the segment in a register;
* finds one set bit per clock with a priority encoder;
* clears that bit through a decoder;
* raises `last` with the final match, so no clock is spent discovering
  that the register is empty.

An empty segment costs one clock. Between segments there is a 2-clock
gap. The encoding time is therefore

    t = sum over segments of (1 + matches in the segment) + (segments − 1) × 2

which comes to:

* **46 cycles** for an all-zero vector;
* **32,814 cycles** for an all-ones vector.

The test bench reproduces both numbers exactly.

**2-D priority encoder.** The 2,048-bit priority encoder (`pe_2d`) is
recursive:

* OR the input in groups of 4;
* find the winning group with a priority encoder a quarter the size;
* select that group's 4 bits with an AND-OR multiplexer;
* encode those with a 4-bit leaf.

The result is `{group, bit}`. The recursion stops at 4-, 8- or 16-bit leaf
encoders (`pe_leaf`), written as sum-of-products equations. 2,048 → 512 →
128 → 32 → 8, so the path depth grows with log₄ of the width.

The leaf encoders favour the highest index. The MPE feeds them the
bit-reversed register and inverts the result, so positions come out in
ascending order.

## Timing against the analytic model

The usual model for a job is

* creator: T = t_OPM + (t_CAM + t_QLA + t_OUT) × B;
* query processor: the same with t_BIM in place of t_CAM.

The terms are:

* t_OPM: operations / 8 (creator) or operations / 16 (query processor);
* t_CAM = 2 × 2,048, for clear plus load;
* t_BIM = `nb` × 128;
* t_QLA: the number of operations;
* t_OUT = 128 beats per result, or the encoder time.

Two differences from that model:

* This design overlaps output with later work.
* The first batch of a job needs no replay clear.

So the creator is faster than the model for many batches. It is slightly
slower for tiny jobs, because of pipeline fill and DMA latency.

Counts from the full-size end-to-end test:

| Job | Cycles | Model |
|---|---|---|
| 4 batches, 5 operations (creator) | 14,802 | 16,917 |
| 4 vectors, 6 operations, raw (query processor) | 665 | 647 |
| same, encoded, 626 matches | 1,250 | 1,191 |

With no memory stalls these are exact; memory back-pressure adds to them.
`cycles` outputs on both parts count from `start` to `done`.

## Interfaces

Each part has one memory port, described from the side of the memory
controller:

* **Read:** `mem_rd_req/addr` are accepted when `mem_rd_ready` is high.
  Data returns in order on `mem_rd_valid/mem_rd_data` after any latency.
* **Write:** `mem_wr_req/addr/data` are accepted when `mem_wr_ready` is
  high.

`bi_dma` has two read channels and one write channel.

* Channel 0 has priority.
* One transfer is active at a time.
* An assertion flags read data that arrives with no outstanding request.

A job may start when `ready` is high. `done` pulses once for a clock.

## Parameters (defaults)

| Parameter | Default | |
|---|---|---|
| `NWORDS` / `NBITS` | 32768 | records per batch = BI vector length |
| `WORD_W` | 16 | indexed value width (two 8-bit CAM units) |
| `CU_DEPTH` | 32 | words per CAM unit |
| `BUS_W` | 256 | memory bus width |
| `BIC_OPS` | 2048 | creator operation memory entries |
| `BIM_ROWS` | 512 | vectors held by the BIM |
| `BIQP_OPS` | 4096 | query operation memory entries |
| `SEG_W` | 2048 | encoder segment / MPE width |

The test benches shrink these to keep simulation short. The only exceptions
are `tb_top_full`, `tb_bie` and `tb_pe_2d`/`tb_mpe`, which also run the
full widths.

## Where this design makes its own choices

* **BIM size.** The BIM is 128 units of 512 × 256 bits. That is the count
  a 32,768-bit row on a 256-bit port requires.
* **CAM clearing at job start.** The initial sweep and the overlapped
  output buffering are additions. The replay-with-zero clear between
  batches is the method of the original architecture.
* **Output format and mode switch.** The encoded output layout (16-bit
  slots, `0xFFFF` terminator) is this design's own. So is the run-time
  raw/encoded switch.
* **Output buffer depth.** The output buffer holds one vector in both
  parts. Back-to-back EQs therefore stall until the previous result has
  left.
* **Encoder segment size.** Segments are 2,048 bits (16 per vector). A
  4,096-bit MPE with 8 segments is a parameter setting (`SEG_W=4096`). It
  would give 22 cycles for an empty vector and 32,790 for a full one.
* **Read-after-LD bypass.** It exists only because this pipeline reads
  the BIM a stage ahead of the QLA.
* **Memory and host are outside the RTL.** The DDR3 memory, its
  controller and the host interface are not included. Test benches use a
  behavioural memory model (`tb/ddr_model.sv`) with fixed latency and
  optional random back-pressure.

## Verification

Every module has a self-checking test bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| Test bench | What it checks |
|---|---|
| `tb_pe_2d` | leaf and 2-D priority encoders, exhaustive and random |
| `tb_mpe` | one match per clock, `last` |
| `tb_bie` | every position and the 46 / 348 / 32,814-cycle encode times |
| `tb_ram_cam` | load, clear by replay, row sweep, vector bit mapping |
| `tb_bic_opm`, `tb_biqp_opm`, `tb_bim` | memories |
| `tb_bic_qla`, `tb_biqp_qla` | every operation against a software model, with stalls and the LD bypass |
| `tb_bi_dma` | channel priority, counts, writes under back-pressure |
| `tb_bic`, `tb_biqp` | multi-batch jobs under random memory stalls, raw and encoded output |
| `tb_bi_analytics_top` | end to end at reduced size (see below) |
| `tb_top_full` | end to end at the default sizes |

End-to-end flow: the top-level tests index four 16-bit attributes with
range queries, move the vectors into the query memory, and run a
six-operation query both raw and encoded. They compare against a model
computed in the test bench.

`tb_bi_analytics_top` also counts each mechanism and fails if one never
happens:

* replay clear;
* output-buffer stall;
* EQ stall;
* LD bypass;
* encoder back-pressure;
* mode switch;
* memory back-pressure.

To simulate one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/bi_pkg.sv tb/tb_bic.sv \
              --top-module tb_bic -o sim
    obj_dir/sim +verilator+rand+reset+2

`tb_top_full` takes about 3 minutes to build and under a second to run.

## Not included

* A creator whose results pass through an encoder. The encoder sits only
  behind the query processor, so the creator always writes raw vectors.
  Attaching `bie` to `bic` the way `biqp` does it would give that variant.
* DDR3 memory, memory controller, and the host/processor link that moves
  data between boards. These are standard parts and are modelled only in
  the test benches.
* Silicon-specific results:
  * frequency;
  * area;
  * power;
  * the body-bias behaviour of the test chips.

  RTL simulation cannot reproduce them. The test chips' small BIM/OPM sizes
  are available through the parameters, but their 8- and 16-bit external
  buses are not.
