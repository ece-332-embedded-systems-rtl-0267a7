// rle_host_model: behavioural model of the processor software that drives the
// compression accelerator (not synthesizable, testbench use only).
//
// It plays the part of the program on the processor: it builds a
// black-and-white picture of W x H pixels, packs it one bit per pixel into
// 8-bit segments (first pixel in the MSB), and runs one polling loop that
// writes a segment whenever FIFO_send is not full and reads a word whenever
// FIFO_recv has one, pulsing each PIO request level high and low with a few
// clocks between PIO accesses. After the last segment it raises flush and
// keeps reading until the decoded run lengths add up to the whole picture,
// then drops flush. Each word is decoded as software would: write the bit ID
// count times. The decoded picture is compared with the original.
//
// Three picture styles are built in: a stress picture with a solid area
// (long runs), a one-pixel checkerboard (every pixel its own run, so the
// compressed data is larger than the input), a disc and a noise band; a
// simple scene of large shapes that compresses well; and a single colour. With hold_reads set the loop sometimes stops reading for a
// while so that FIFO_recv fills up; with hold_writes it sometimes stops
// writing so that FIFO_send runs dry.
module rle_host_model #(
  parameter int unsigned COUNT_W = 23,
  parameter int unsigned W       = 640,
  parameter int unsigned H       = 480
) (
  input  logic             clk,
  output logic [7:0]       odata_pio,
  output logic             fifo_in_write_req_pio,
  output logic             rle_reset_pio,
  output logic             rle_flush_pio,
  output logic             fifo_out_read_req_pio,
  input  logic             fifo_in_full_pio,
  input  logic [COUNT_W:0] idata_pio,
  input  logic             result_ready_pio
);

  localparam int unsigned NPIX  = W * H;
  localparam int unsigned NSEG  = (NPIX + 7) / 8;

  logic [7:0]  segs [NSEG];
  bit          pix  [NPIX];

  // Results of the last run_picture call
  int unsigned words;
  int unsigned mismatches;
  int unsigned decoded;
  int unsigned full_seen;     // loop wanted to write but FIFO_send was full
  int unsigned max_words;     // words whose count is the field maximum
  bit          bad_length;    // decoded more pixels than the picture has

  initial begin
    odata_pio             = '0;
    fifo_in_write_req_pio = 1'b0;
    rle_reset_pio         = 1'b0;
    rle_flush_pio         = 1'b0;
    fifo_out_read_req_pio = 1'b0;
  end

  // Picture content, a function of position, picture style and a seed.
  //   style 0: stress picture (solid band, checkerboard, disc, noise band)
  //   style 1: scene (sky, ground line, two blocks and a disc; compresses)
  //   style 2: a single colour (the whole picture is one run)
  function automatic bit pixel(int unsigned x, int unsigned y, int unsigned style,
                               int unsigned seed);
    int unsigned cx, cy, r;
    if (style == 2) return bit'(seed & 1);
    if (style == 1) begin
      cx = (3 * W) / 4; cy = H / 4; r = H / 8 + 1;
      if (((x - cx) * (x - cx) + (y - cy) * (y - cy)) < r * r) return 1'b1; // disc
      if (y >= (2 * H) / 3) return 1'b1;                                 // ground
      if (x >= W / 8 && x < W / 4 && y >= H / 3) return 1'b1;            // block 1
      if (x >= W / 3 && x < W / 2 && y >= H / 2) return 1'b1;            // block 2
      return 1'b0;                                                       // sky
    end
    if (y < H / 4)                  return bit'(seed & 1);            // solid band
    if (y < H / 2 && x < W / 2)     return bit'((x ^ y) & 1);          // checkerboard
    if (y >= (3 * H) / 4)           return bit'($urandom_range(0, 1)); // noise
    cx = W / 2; cy = (5 * H) / 8; r = H / 6 + 1;
    return bit'(((x - cx) * (x - cx) + (y - cy) * (y - cy)) < r * r);  // disc
  endfunction

  task automatic build(input int unsigned style, input int unsigned seed);
    for (int unsigned i = 0; i < NSEG; i++) segs[i] = '0;
    for (int unsigned y = 0; y < H; y++)
      for (int unsigned x = 0; x < W; x++) begin
        pix[y * W + x] = pixel(x, y, style, seed);
        segs[(y * W + x) / 8][7 - ((y * W + x) % 8)] = pix[y * W + x];
      end
  endtask

  task automatic gap();
    repeat ($urandom_range(3, 5)) @(posedge clk);
  endtask

  task automatic pulse_reset();
    rle_reset_pio <= 1'b1;
    repeat (2) @(posedge clk);
    rle_reset_pio <= 1'b0;
    gap();
  endtask

  task automatic read_word();
    logic [COUNT_W:0] w;
    fifo_out_read_req_pio <= 1'b1;
    gap();
    fifo_out_read_req_pio <= 1'b0;
    w = idata_pio;
    words++;
    if (w[COUNT_W-1:0] == '1) max_words++;
    for (int unsigned k = 0; k < int'(w[COUNT_W-1:0]); k++) begin
      if (decoded < NPIX) begin
        if (pix[decoded] != w[COUNT_W]) mismatches++;
      end else begin
        bad_length = 1'b1;
      end
      decoded++;
    end
    gap();
  endtask

  task automatic run_picture(input int unsigned style, input int unsigned seed,
                             input bit hold_reads, input bit hold_writes);
    int unsigned sent;
    int unsigned idle;
    int unsigned read_pause;
    int unsigned write_pause;
    build(style, seed);
    words = 0; mismatches = 0; decoded = 0; full_seen = 0; max_words = 0;
    bad_length = 1'b0;
    sent = 0; idle = 0; read_pause = 0; write_pause = 0;
    while (decoded < NPIX && idle < 100000) begin
      bit acted;
      acted = 1'b0;
      if (sent < NSEG && write_pause == 0) begin
        if (fifo_in_full_pio) begin
          full_seen++;
        end else begin
          odata_pio <= segs[sent];
          @(posedge clk);
          fifo_in_write_req_pio <= 1'b1;
          gap();
          fifo_in_write_req_pio <= 1'b0;
          gap();
          sent++;
          acted = 1'b1;
          if (hold_writes && $urandom_range(0, 199) == 0) write_pause = $urandom_range(20, 200);
        end
      end else if (write_pause > 0) begin
        write_pause--;
      end
      if (sent == NSEG) rle_flush_pio <= 1'b1;
      if (read_pause > 0) begin
        read_pause--;
      end else if (!result_ready_pio) begin
        read_word();
        acted = 1'b1;
        if (hold_reads && $urandom_range(0, 99) == 0) read_pause = $urandom_range(50, 400);
      end
      if (!acted) begin
        idle++;
        @(posedge clk);
      end else begin
        idle = 0;
      end
    end
    rle_flush_pio <= 1'b0;
    gap();
  endtask

endmodule
