// rle_enc: run-length encoder for a 1-bit-per-pixel image bit-stream.
//
// The encoder pulls 8-bit bit-stream segments from FIFO_send, walks through
// each segment one bit per clock, first the most significant bit, and counts
// how many equal bits follow each other. When the bit value changes it emits
// one encoded word {bit ID, run length} into FIFO_recv; a run longer than the
// count field can hold is split into a full-length word and a new run of the
// same bit. When the processor raises flush at the end of the bit-stream, the
// encoder emits the run it is still counting once every segment already
// written has been consumed, and starts again from an empty run.
//
// Interface (signal names of the lab's block diagram in brackets):
//   in_data  [FIFO_IN_ODATA]    segment from FIFO_send, valid the cycle after
//                               in_rd_req and held until the next read
//   in_empty [FIFO_IN_EMPTY]    no segment is waiting in FIFO_send
//   in_rd_req[FIFO_IN_READ_REQ] pops one segment; only raised when !in_empty
//   out_data [RLE_OUT]          encoded word, bit COUNT_W is the bit ID
//   out_done [RLE_DONE]         one-cycle write strobe into FIFO_recv; only
//                               raised while out_full is low
//   out_full [FIFO_OUT_FULL]    FIFO_recv cannot take a word; the encoder
//                               holds its prepared word and stops counting
//                               once a second word would be needed
//   flush    [RLE_FLUSH]        level: end of bit-stream, emit the last run
//   rst      [RLE_RESET]        synchronous, active high
//
// Timing: a segment read is requested while the last bit but one of the
// current segment is processed, so a steady stream is encoded at one bit per
// clock (8 cycles per segment). An encoded word reaches out_data one clock
// after the bit that ends its run and is written on the next clock on which
// FIFO_recv is not full.
//
// The handout gives the ports, the 8-bit segments, the 24-bit word format
// (1 bit ID, 23 bits of count) and the flush and handshake roles. The bit
// order, the one-bit-per-clock datapath, the splitting of over-long runs and
// the rule that flush waits for FIFO_send to drain are this design's choices.
module rle_enc #(
  parameter int unsigned SEG_W   = rle_pkg::SEG_W,
  parameter int unsigned COUNT_W = rle_pkg::COUNT_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               flush,
  // FIFO_send side
  input  logic [SEG_W-1:0]   in_data,
  input  logic               in_empty,
  output logic               in_rd_req,
  // FIFO_recv side
  output logic [COUNT_W:0]   out_data,
  output logic               out_done,
  input  logic               out_full
);

  localparam int unsigned BW = $clog2(SEG_W + 1);
  localparam logic [COUNT_W-1:0] COUNT_MAX = '1;

  // Segment being encoded, shifted left as bits are used.
  logic [SEG_W-1:0]   shreg;
  logic [BW-1:0]      bits_left;
  // A segment requested from FIFO_send is waiting on in_data.
  logic               seg_ready;
  // Run being counted; count == 0 means no run is open.
  logic               cur_bit;
  logic [COUNT_W-1:0] count;
  // Prepared word waiting to be written into FIFO_recv.
  logic               out_valid;
  logic [COUNT_W:0]   out_word;

  logic               bit_in;
  logic               slot_free;
  logic               consume;
  logic               emit_run;
  logic               emit_flush;
  logic [BW-1:0]      bits_after;
  logic               load;

  assign bit_in    = shreg[SEG_W-1];
  assign out_done  = out_valid && !out_full;
  // The output register can take a new word if it is empty or drains now.
  assign slot_free = !out_valid || !out_full;

  always_comb begin
    consume  = 1'b0;
    emit_run = 1'b0;
    if (bits_left != '0) begin
      if (count == '0 || (bit_in == cur_bit && count != COUNT_MAX)) begin
        consume = 1'b1;
      end else if (slot_free) begin
        consume  = 1'b1;
        emit_run = 1'b1;
      end
    end
  end

  assign bits_after = bits_left - BW'(consume);
  assign load       = seg_ready && (bits_after == '0);
  assign in_rd_req  = !in_empty && !seg_ready && (bits_after <= BW'(1));
  // Flush only once everything written before it has been encoded.
  assign emit_flush = flush && in_empty && !seg_ready && (bits_left == '0)
                      && (count != '0) && slot_free;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_left <= '0;
      seg_ready <= 1'b0;
      cur_bit   <= 1'b0;
      count     <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      seg_ready <= in_rd_req || (seg_ready && !load);

      if (load) begin
        shreg     <= in_data;
        bits_left <= BW'(SEG_W);
      end else if (consume) begin
        shreg     <= shreg << 1;
        bits_left <= bits_after;
      end

      if (consume) begin
        if (emit_run || count == '0) begin
          cur_bit <= bit_in;
          count   <= COUNT_W'(1);
        end else begin
          count   <= count + 1'b1;
        end
      end else if (emit_flush) begin
        count <= '0;
      end

      if (emit_run || emit_flush) begin
        out_word  <= {cur_bit, count};
        out_valid <= 1'b1;
      end else if (out_done) begin
        out_valid <= 1'b0;
      end
    end
  end

  assign out_data = out_word;

  // Handshake rules towards the two buffers.
  a_no_read_when_empty : assert property (@(posedge clk) disable iff (rst)
    in_rd_req |-> !in_empty);
  a_no_write_when_full : assert property (@(posedge clk) disable iff (rst)
    out_done |-> !out_full);

endmodule
