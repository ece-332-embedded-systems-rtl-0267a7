// rle_hw_top: FPGA half of a hardware/software image compressor.
//
// A processor converts a captured picture to one bit per pixel and streams it
// into the fabric in 8-bit segments; the fabric run-length encodes it and the
// processor reads back 24-bit {bit ID, run length} words, which it decodes in
// software. This module is the fabric side: three blocks in a chain,
//
//   PIO  -> FIFO_send (8 bit) -> rle_enc -> FIFO_recv (24 bit) -> PIO
//
// with every signal that the processor reaches through a parallel I/O port
// (PIO) brought out as a port, named after the lab's block diagram. The
// processor-side protocol is:
//   write: wait while fifo_in_full_pio is high, put a segment on
//          odata_pio, raise and then drop fifo_in_write_req_pio;
//   read:  wait while result_ready_pio is high (it is FIFO_recv's empty flag,
//          so "ready" is active low), raise and then drop
//          fifo_out_read_req_pio, then read idata_pio;
//   end:   raise rle_flush_pio once the whole picture is written and keep
//          reading until the last run has come out;
//   start: pulse rle_reset_pio.
// Timing: a request level is seen by the buffer one clock after it rises
// (pio_strobe); idata_pio holds the word read from the clock after that
// until the next read. Both PIO request levels must stay low for at least one
// clock between requests.
//
// The chain, the signal names and the active-low ready flag follow the lab
// handout. The edge detection of the two PIO request levels, the buffer
// depths and the use of rle_reset_pio to clear the buffers as well as the
// encoder are this design's choices.
module rle_hw_top #(
  parameter int unsigned FIFO_IN_DEPTH  = 16,
  parameter int unsigned FIFO_OUT_DEPTH = 16,
  parameter int unsigned COUNT_W        = rle_pkg::COUNT_W
) (
  input  logic                      clk,
  input  logic                      rst,                    // board reset, active high
  // Processor -> fabric PIOs
  input  logic [rle_pkg::SEG_W-1:0] odata_pio,              // ODATA_PIO[7:0]
  input  logic                      fifo_in_write_req_pio,  // FIFO_IN_WRITE_REQ_PIO
  input  logic                      rle_reset_pio,          // RLE_RESET
  input  logic                      rle_flush_pio,          // RLE_FLUSH_PIO
  input  logic                      fifo_out_read_req_pio,  // FIFO_OUT_READ_REQ_PIO
  // Fabric -> processor PIOs
  output logic                      fifo_in_full_pio,       // FIFO_IN_FULL_PIO
  output logic [COUNT_W:0]          idata_pio,              // IDATA_PIO[23:0]
  output logic                      result_ready_pio        // RESULT_READY_PIO, active low
);

  localparam int unsigned SEG_W = rle_pkg::SEG_W;

  logic               sys_rst;
  logic               wr_pulse, rd_pulse;
  // Fabric-internal signals of the block diagram
  logic [SEG_W-1:0]   fifo_in_odata;    // FIFO_IN_ODATA[7:0]
  logic               fifo_in_read_req; // FIFO_IN_READ_REQ
  logic               fifo_in_empty;    // FIFO_IN_EMPTY
  logic [COUNT_W:0]   rle_out;          // RLE_OUT[23:0]
  logic               rle_done;         // RLE_DONE
  logic               fifo_out_full;    // FIFO_OUT_FULL

  assign sys_rst = rst || rle_reset_pio;

  pio_strobe u_wr_strobe (
    .clk   (clk),
    .rst   (sys_rst),
    .level (fifo_in_write_req_pio),
    .pulse (wr_pulse)
  );

  pio_strobe u_rd_strobe (
    .clk   (clk),
    .rst   (sys_rst),
    .level (fifo_out_read_req_pio),
    .pulse (rd_pulse)
  );

  rle_fifo #(.WIDTH(SEG_W), .DEPTH(FIFO_IN_DEPTH)) u_fifo_send (
    .clk    (clk),
    .rst    (sys_rst),
    .wr_req (wr_pulse),
    .data   (odata_pio),
    .rd_req (fifo_in_read_req),
    .q      (fifo_in_odata),
    .empty  (fifo_in_empty),
    .full   (fifo_in_full_pio)
  );

  rle_enc #(.SEG_W(SEG_W), .COUNT_W(COUNT_W)) u_rle (
    .clk       (clk),
    .rst       (sys_rst),
    .flush     (rle_flush_pio),
    .in_data   (fifo_in_odata),
    .in_empty  (fifo_in_empty),
    .in_rd_req (fifo_in_read_req),
    .out_data  (rle_out),
    .out_done  (rle_done),
    .out_full  (fifo_out_full)
  );

  rle_fifo #(.WIDTH(COUNT_W + 1), .DEPTH(FIFO_OUT_DEPTH)) u_fifo_recv (
    .clk    (clk),
    .rst    (sys_rst),
    .wr_req (rle_done),
    .data   (rle_out),
    .rd_req (rd_pulse),
    .q      (idata_pio),
    .empty  (result_ready_pio),
    .full   (fifo_out_full)
  );

endmodule
