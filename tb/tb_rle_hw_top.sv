// tb_rle_hw_top: end-to-end testbench of the compression accelerator at
// reduced sizes (6-bit count field, 4-entry buffers, 64 x 24 pictures).
//
// A behavioural model of the processor software writes a picture through the
// PIO ports, reads the compressed words back, decodes them and compares the
// result with the picture. Three pictures are sent, each after an
// RLE_RESET pulse: one with bursty reads so that FIFO_recv fills up and the
// encoder stalls, one with write pauses so that FIFO_send runs dry, and a
// simple scene with neither. The testbench counts how often each mechanism of the design
// occurred and fails if one never did: FIFO_send full, FIFO_send empty while
// the encoder waits, FIFO_recv full while the encoder holds a word, a flush
// emitting the last run, a run split at the count maximum, compressed output
// larger than the picture, and an encoder reset.
module tb_rle_hw_top;

  localparam int unsigned CW   = 6;
  localparam int unsigned W    = 64;
  localparam int unsigned H    = 24;

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

  rle_hw_top #(.FIFO_IN_DEPTH(4), .FIFO_OUT_DEPTH(4), .COUNT_W(CW)) dut (
    .clk, .rst, .odata_pio, .fifo_in_write_req_pio, .rle_reset_pio,
    .rle_flush_pio, .fifo_out_read_req_pio, .fifo_in_full_pio, .idata_pio,
    .result_ready_pio
  );

  rle_host_model #(.COUNT_W(CW), .W(W), .H(H)) host (
    .clk, .odata_pio, .fifo_in_write_req_pio, .rle_reset_pio, .rle_flush_pio,
    .fifo_out_read_req_pio, .fifo_in_full_pio, .idata_pio, .result_ready_pio
  );

  // Mechanism counters, sampled on every clock.
  int unsigned n_in_full = 0, n_in_empty_wait = 0, n_out_full_stall = 0;
  int unsigned n_flush = 0, n_resets = 0;
  logic        reset_q = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (fifo_in_full_pio) n_in_full++;
      if (dut.fifo_in_empty && dut.u_rle.bits_left == 0 && !dut.u_rle.seg_ready
          && dut.u_rle.count != 0 && !rle_flush_pio && !rle_reset_pio)
        n_in_empty_wait++;
      if (dut.fifo_out_full && dut.u_rle.out_valid) n_out_full_stall++;
      if (dut.u_rle.emit_flush) n_flush++;
      if (rle_reset_pio && !reset_q) n_resets++;
      reset_q <= rle_reset_pio;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic check_picture(input string tag);
    check(host.mismatches == 0, $sformatf("%s: %0d decoded pixels differ", tag, host.mismatches));
    check(host.decoded == W * H && !host.bad_length,
          $sformatf("%s: decoded %0d pixels, expected %0d", tag, host.decoded, W * H));
    check(result_ready_pio, $sformatf("%s: words left in FIFO_recv", tag));
    $display("%s: %0d bits in, %0d words (%0d bits) out, %0d at count maximum",
             tag, W * H, host.words, host.words * (CW + 1), host.max_words);
  endtask

  int unsigned total_max = 0;
  bit          expanded = 0;

  initial begin
    rst = 1'b1;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);

    host.pulse_reset();
    host.run_picture(0, 0, 1'b1, 1'b0);
    check_picture("picture 1 (bursty reads)");
    total_max += host.max_words;
    if (host.words * (CW + 1) > W * H) expanded = 1;

    host.pulse_reset();
    host.run_picture(0, 1, 1'b0, 1'b1);
    check_picture("picture 2 (write pauses)");
    total_max += host.max_words;

    host.pulse_reset();
    host.run_picture(1, 0, 1'b0, 1'b0);
    check_picture("picture 3 (scene)");
    total_max += host.max_words;

    $display("mechanisms: in_full=%0d in_empty_wait=%0d out_full_stall=%0d flush=%0d count_max=%0d expanded=%0d resets=%0d",
             n_in_full, n_in_empty_wait, n_out_full_stall, n_flush, total_max, expanded, n_resets);
    check(n_in_full > 0, "FIFO_send never full");
    check(n_in_empty_wait > 0, "encoder never waited on an empty FIFO_send");
    check(n_out_full_stall > 0, "encoder never stalled on a full FIFO_recv");
    check(n_flush == 3, "flush did not emit exactly one last run per picture");
    check(total_max > 0, "no run reached the count maximum");
    check(expanded, "compressed output never larger than the picture");
    check(n_resets == 3, "encoder reset not seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
