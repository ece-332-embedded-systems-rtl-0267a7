// rle_fifo: synchronous first-in first-out buffer between the processor's
// parallel I/O ports and the run-length encoder.
//
// The accelerator uses two of them: FIFO_send, 8 bits wide, holds bit-stream
// segments written by the processor until the encoder asks for them, and
// FIFO_recv, 24 bits wide, holds encoded words until the processor reads them.
// As the lab handout describes, the buffer stores data on the clock edge at
// which the write request is high, hands data out in arrival order, and
// produces the next entry only when the read request is high.
//
// Storage is a register array of DEPTH entries addressed by a write and a
// read pointer; an occupancy counter gives full and empty. The read port is
// registered: the entry is loaded into q on the clock edge at which rd_req is
// high and is valid from the following cycle until the next read. A write
// while full and a read while empty are ignored, so the stored data can never
// be corrupted; both are legal in the same cycle (a write when full is still
// ignored even if a read frees a slot in that cycle).
//
// Widths follow the handout (8 and 24 bits). The depth, the registered read
// port, the ignore-on-full/empty behaviour and the active-high synchronous
// reset are this design's choices: the handout leaves them open.
module rle_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic             wr_req,
  input  logic [WIDTH-1:0] data,
  input  logic             rd_req,
  output logic [WIDTH-1:0] q,
  output logic             empty,
  output logic             full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      used;
  logic             do_wr, do_rd;

  assign full  = (used == (AW+1)'(DEPTH));
  assign empty = (used == '0);
  assign do_wr = wr_req && !full;
  assign do_rd = rd_req && !empty;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      used   <= '0;
      q      <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) begin
        rd_ptr <= next_ptr(rd_ptr);
        q      <= mem[rd_ptr];
      end
      case ({do_wr, do_rd})
        2'b10:   used <= used + 1'b1;
        2'b01:   used <= used - 1'b1;
        default: used <= used;
      endcase
    end
  end

endmodule
