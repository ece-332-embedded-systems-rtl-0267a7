# Run-length encoder for captured black-and-white pictures

A processor captures a picture, reduces it to one bit per pixel and wants it
smaller. Pictures of this kind are mostly long stretches of equal pixels, so
run-length encoding (RLE) suits them: every stretch of equal bits becomes one
word that says which bit it is and how many times it repeats. This design is
the FPGA half of that split. The processor streams the packed picture into
the fabric 8 bits at a time, the fabric encodes it, and the processor reads
back 24-bit run words and decodes them in software ("write bit *b*, *n*
times").

The design follows the block structure of the ECE 332 (Embedded Systems Lab)
exercise "HW/SW Compression and Decompression of Captured Image" for a DE1-SoC
board. That exercise names the blocks, their signals, the widths and the word
format. It leaves the insides of the encoder and buffers to the implementer.
Everything below that is not named there is a choice made in this RTL, and
the section "What is specified and what is chosen" lists those choices.

## Data path

```
             processor PIO ports                                processor PIO ports
 odata_pio[7:0] ─┐  fifo_in_full_pio ▲      rle_reset_pio  rle_flush_pio      idata_pio[23:0] ▲  result_ready_pio ▲
 write_req ──────┤                   │             │          │                              │                   │
                 ▼                   │             ▼          ▼                              │     read_req ─────┤
          ┌──────────────┐  FIFO_IN_ODATA[7:0]  ┌───────────────┐  RLE_OUT[23:0]  ┌──────────────┐
          │  FIFO_send   │ ───────────────────► │    rle_enc    │ ──────────────► │  FIFO_recv   │
          │  8 x 16      │ ◄─ FIFO_IN_READ_REQ  │  (RLE unit)   │ ── RLE_DONE ──► │  24 x 16     │
          │  (rle_fifo)  │ ── FIFO_IN_EMPTY ──► │               │ ◄ FIFO_OUT_FULL │  (rle_fifo)  │
          └──────────────┘                      └───────────────┘                 └──────────────┘
```

`rle_hw_top` contains this chain and nothing else. Every signal that the
processor reaches through a parallel I/O (PIO) register is a port of the top.
The bridge, the PIO registers, the processor and the camera and display paths
are outside it.

## The encoded word

```
 bit 23     bits 22..0
 bit ID     run length (1 .. 8,388,607)
```

`24'b1_000_0000_0000_0000_0000_0111` means "seven 1 pixels". Inside an input
segment, the first pixel is the most significant bit. The picture's pixels
are packed in order, so pixels 1, 0, 1, ... become the segment `8'b101xxxxx`.
Runs continue across segment boundaries. A run longer than 2^23−1 bits is sent
as a word with the maximum count, followed by a new run of the same bit. A
640 × 480 picture has only 307,200 pixels, so at the default width this split
never happens.

The output length depends on the picture. A one-pixel checkerboard turns every
pixel into a 24-bit word, 24 times the input. The software must therefore not
assume that the compressed picture is smaller than the original.

## How the encoder works (`rtl/rle_enc.sv`)

The encoder has three pieces of state:

* **Segment register.** This is an 8-bit shift register plus a count of the bits
  still unused. Each clock, the top bit is examined and the register shifts left.
* **Run counter.** This holds the bit value of the open run and its length. A
  length of 0 means no run is open, which is the state after reset and after a flush.
* **Output register.** This holds one finished word that waits to be written
  into FIFO_recv.

On each clock where the segment register holds a bit, one of three cases applies:

1. No run is open. Open one with this bit and length 1.
2. The bit equals the run's bit and the count is below its maximum. Increment
   the count.
3. Otherwise the run is finished. Move `{bit, count}` into the output register
   and open a new run of length 1 with this bit. This can only happen if the
   output register is free, or is being emptied on this same clock. If not,
   the encoder stalls: it neither consumes the bit nor counts.

The output register drains by itself. `out_done` (RLE_DONE) is high for one
clock whenever a word is waiting and FIFO_recv is not full. That strobe is
FIFO_recv's write enable. A full FIFO_recv does not stop the encoder right away:
it keeps counting the next run until that run also ends.

**Input timing.** FIFO_send has a registered read port. A segment appears on
`in_data` the clock after `in_rd_req`, and it stays there until the next read.
The encoder requests the next segment while it uses the last bit but one of
the current segment. It loads the new segment on the same clock that it uses
the last bit. As long as FIFO_send has data and FIFO_recv has room, the encoder
therefore takes in one bit per clock, which is 8 clocks per segment. A
finished word appears on `out_data` one clock after the bit that ended its run.
Requests are only raised while FIFO_send is not empty. `out_done` is only raised
while FIFO_recv is not full. Two assertions in the module enforce both rules.

**Flush.** `flush` (RLE_FLUSH) is a level. The software raises it after it has
written the last segment. The encoder emits its open run once all of the
following hold:

* FIFO_send is empty.
* No segment is waiting or partly used.
* The output register is free.

It then closes the run, setting the count to 0. Holding `flush` high any
longer does nothing, and no run is open, so a picture always ends with exactly
one flushed word. Waiting for FIFO_send to drain means a flush can never cut
off segments that were written before it.

## Talking to the processor (`rtl/rle_hw_top.sv`, `rtl/pio_strobe.sv`)

Software sets a PIO request bit and clears it again. Between the two, the bit
stays high for many fabric clocks. The buffers store or hand out one entry on
every clock on which their request is high. For that reason both request
levels pass through `pio_strobe`, which issues one pulse, one clock after the
rising edge. Each step of the protocol works as follows:

| Step | Software does | Hardware timing |
|---|---|---|
| Write a segment | Waits while `fifo_in_full_pio` is high. Puts the segment on `odata_pio`. Raises `fifo_in_write_req_pio` and then drops it. | The segment is stored on the second clock after the rise. `fifo_in_full_pio` is valid from the third clock. |
| Read a word | Waits while `result_ready_pio` is high. Raises `fifo_out_read_req_pio` and then drops it. Reads `idata_pio`. | `result_ready_pio` is FIFO_recv's *empty* flag, so "ready" is active low. `idata_pio` holds the word from the third clock after the rise until the next read. |
| End of picture | Raises `rle_flush_pio`. Keeps reading until the decoded run lengths add up to the number of pixels. Then drops `rle_flush_pio`. | |
| Start | Pulses `rle_reset_pio`. | This clears the encoder, both buffers and the edge detectors. `rst` (board reset) does the same. |

Each request level must stay low for at least one clock between two requests.
Software through a bus bridge is far slower than that.

## Buffers (`rtl/rle_fifo.sv`)

`rle_fifo` is one parameterised synchronous FIFO. It is used twice: 8 bits wide
as FIFO_send and 24 bits wide as FIFO_recv. Storage is a register array with a
write pointer and a read pointer. An occupancy counter produces `full` and
`empty`. The buffer ignores a write while it is full and a read while it is
empty, so misuse cannot corrupt its contents. A write and a read may happen on
the same clock.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `rle_pkg` | `SEG_W` | 8 | segment width of the exercise |
| `rle_pkg` | `COUNT_W` | 23 | run-length field of the exercise (1 + 23 = 24-bit word) |
| `rle_hw_top` | `FIFO_IN_DEPTH`, `FIFO_OUT_DEPTH` | 16 | chosen; the exercise gives no depth |
| `rle_hw_top` | `COUNT_W` | 23 | as above; smaller values make testing over-long runs cheap |
| `rle_fifo` | `WIDTH`, `DEPTH` | 8, 16 | set per instance by the top |
| `rle_enc` | `SEG_W`, `COUNT_W` | 8, 23 | from `rle_pkg` |

With the defaults, synthesis gives 92 flip-flop bits and 512 memory bits
(16 × 8 plus 16 × 24).

## What is specified and what is chosen

Specified by the exercise and followed here:

* The three-block chain and all signal names.
* The 8-bit segments.
* The 24-bit word with the bit ID on top and a 23-bit count.
* The active-low result-ready flag tied to FIFO_recv's empty output.
* RLE_DONE used as FIFO_recv's write strobe.
* The encoder waits on an empty FIFO_send and on a full FIFO_recv.
* Flush emits the last run.
* Reset initialises the encoder.

Chosen here, where the exercise says nothing:

* The MSB-first bit order inside a segment. This is read from the exercise's
  pixel-packing example.
* The one-bit-per-clock datapath.
* Splitting runs that exceed the count field.
* Flush waiting for FIFO_send to drain.
* The buffer depth of 16.
* The registered FIFO read port, and ignoring a write while full or a read while empty.
* Edge detection of the PIO request levels.
* `rle_reset_pio` also clearing the buffers.
* Synchronous active-high resets.

The exercise ships its own FIFO source and expects the encoder from an earlier
lab. Neither is reproduced here: both modules are independent implementations
of the described behaviour.

Not included: the ARM processor and its software (picture packing, RLE
decoding), the lightweight HPS-to-FPGA bridge and the PIO components generated
by the system integration tool, the camera, the SDRAM and the VGA display
path.

## Verification

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops itself through a watchdog if it hangs.

* `tb/tb_rle_fifo.sv`: tests the 8-bit and the 24-bit FIFO against a queue
  model on every clock. It drives random traffic and directed overfill and
  underflow.
* `tb/tb_rle_enc.sv`: tests the encoder between models of the two buffers,
  with a 4-bit count field so that runs are split often. The results are
  compared with a software encoder. This is done under random empty and full
  back-pressure, and again without it. The run without back-pressure also
  checks that segment reads come exactly 8 clocks apart. A second encoder at
  the default width checks the exact word format: the segment `8'b1111_1110`
  followed by a flush must give `24'h800007` (seven 1 bits), then
  `24'h000001` (one 0 bit).
* `tb/tb_rle_hw_top.sv`: tests the whole chain at reduced sizes (6-bit count,
  4-entry buffers, 64 × 24 pictures). `tb/rle_host_model.sv` is a behavioural
  model of the processor program. It writes three pictures through the PIO
  protocol, reads and decodes the words, and compares pixel by pixel. The
  testbench fails unless each of the following happened at least once:
  * FIFO_send full
  * the encoder waiting on an empty FIFO_send
  * the encoder stalled on a full FIFO_recv
  * one flushed run per picture
  * a run split at the count maximum
  * output larger than input
  * an encoder reset
* `tb/tb_rle_hw_top_full.sv`: runs the top at its default parameters on three
  full 640 × 480 pictures (307,200 pixels, 38,400 segments each). It checks
  each picture end to end and prints its compression ratio (input bits over
  output bits). The pictures are:
  * a scene of large shapes. This one must compress; the ratio is about 17.7.
  * a stress picture with a solid band, a one-pixel checkerboard, a disc and
    a random-noise band. This one must expand; the ratio is about 0.17.
  * a single colour. This one must come back as one word with a count of
    307,200.

  All three together take about a second on a desktop machine.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rle_pkg.sv tb/tb_rle_hw_top_full.sv --top-module tb_rle_hw_top_full
./obj_dir/Vtb_rle_hw_top_full
```

Substitute the other testbench names the same way. The testbenches initialise
everything they read, so they also run on two-state simulators with random
initial values.
