// tb_rle_hw_top_full: the compression accelerator at its default sizes
// (23-bit run length, 16-entry buffers) compressing full 640 x 480
// black-and-white pictures.
//
// For each of three pictures the processor model sends its 38,400 segments
// through the PIO ports, flushes, reads every compressed word back and
// decodes it; the decoded picture must equal the original pixel for pixel
// and account for exactly 307,200 pixels. The pictures are a scene of large
// shapes, which must compress; the stress picture with checkerboard and
// noise, which must expand; and a single colour, which must come back as one
// word of count 307,200. The compression ratio (input bits over output bits)
// is printed for each.
module tb_rle_hw_top_full;

  localparam int unsigned W  = 640;
  localparam int unsigned H  = 480;
  localparam int unsigned CW = rle_pkg::COUNT_W;

  logic          clk = 1'b0;
  logic          rst;
  logic [7:0]    odata_pio;
  logic          fifo_in_write_req_pio, rle_reset_pio, rle_flush_pio;
  logic          fifo_out_read_req_pio;
  logic          fifo_in_full_pio;
  logic [CW:0]   idata_pio;
  logic          result_ready_pio;

  int unsigned checks = 0;
  int unsigned failures = 0;

  always #5 clk = ~clk;

  rle_hw_top dut (
    .clk, .rst, .odata_pio, .fifo_in_write_req_pio, .rle_reset_pio,
    .rle_flush_pio, .fifo_out_read_req_pio, .fifo_in_full_pio, .idata_pio,
    .result_ready_pio
  );

  rle_host_model #(.COUNT_W(CW), .W(W), .H(H)) host (
    .clk, .odata_pio, .fifo_in_write_req_pio, .rle_reset_pio, .rle_flush_pio,
    .fifo_out_read_req_pio, .fifo_in_full_pio, .idata_pio, .result_ready_pio
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic report(input string tag);
    check(host.mismatches == 0, $sformatf("%s: %0d decoded pixels differ", tag, host.mismatches));
    check(host.decoded == W * H && !host.bad_length,
          $sformatf("%s: decoded %0d pixels, expected %0d", tag, host.decoded, W * H));
    check(result_ready_pio, $sformatf("%s: words left in FIFO_recv", tag));
    $display("%s: %0d bits in, %0d words (%0d bits) out, compression ratio %0.3f",
             tag, W * H, host.words, host.words * (CW + 1),
             real'(W * H) / real'(host.words * (CW + 1)));
  endtask

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    host.pulse_reset();
    host.run_picture(1, 0, 1'b0, 1'b0);
    report("scene");
    check(host.words * (CW + 1) < W * H, "scene did not compress");

    host.pulse_reset();
    host.run_picture(0, 0, 1'b0, 1'b0);
    report("stress picture");
    check(host.words * (CW + 1) > W * H, "stress picture did not expand");

    host.pulse_reset();
    host.run_picture(2, 0, 1'b0, 1'b0);
    report("single colour");
    check(host.words == 1, $sformatf("single colour: %0d words, expected 1", host.words));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
