// tb_rle_enc: self-checking testbench for the run-length encoder.
//
// Around the encoder sit two small models of the buffers: a source that hands
// out pre-generated 8-bit segments with a registered read port (the segment
// appears the clock after the read request) and can pretend to be empty, and
// a sink that stores every word written with out_done and can pretend to be
// full. The expected words are computed from the same bit-stream by a
// straightforward software run-length encoder (first bit of a segment is its
// MSB, runs split at the count maximum, the last run emitted on flush).
//
// Stream 1 uses random empty/full back-pressure and runs long enough to hit
// the count maximum of the reduced 4-bit count field. Then the encoder is
// reset and stream 2 runs without back-pressure: its segment reads must come
// exactly 8 clocks apart (one bit per clock). Flush is held high for a while
// after each stream to check that it emits the last run once and only once.
// A second encoder at the default 23-bit count encodes the segment
// 8'b1111_1110 and must produce exactly 24'b1000_0000_0000_0000_0000_0111
// (seven 1 bits) followed by 24'h000001 (one 0 bit) on flush.
module tb_rle_enc;

  localparam int unsigned CW   = 4;
  localparam int unsigned MAXC = (1 << CW) - 1;
  localparam int unsigned N1   = 200;
  localparam int unsigned N2   = 64;

  logic          clk = 1'b0;
  logic          rst;
  logic          flush;
  logic [7:0]    in_data;
  logic          in_empty;
  logic          in_rd_req;
  logic [CW:0]   out_data;
  logic          out_done;
  logic          out_full;

  int unsigned   checks = 0;
  int unsigned   failures = 0;

  rle_enc #(.SEG_W(8), .COUNT_W(CW)) dut (
    .clk, .rst, .flush, .in_data, .in_empty, .in_rd_req,
    .out_data, .out_done, .out_full
  );

  always #5 clk = ~clk;

  // Default-width encoder for the directed word-format test.
  logic        d_flush, d_empty, d_rd, d_done;
  logic [7:0]  d_data;
  logic [23:0] d_out;
  logic [23:0] d_got [$];
  rle_enc dut23 (
    .clk, .rst, .flush(d_flush), .in_data(d_data), .in_empty(d_empty),
    .in_rd_req(d_rd), .out_data(d_out), .out_done(d_done), .out_full(1'b0)
  );
  always @(posedge clk) begin
    if (rst) begin
      d_empty <= 1'b1;
      d_data  <= '0;
    end else begin
      if (d_rd) begin
        d_data  <= 8'b1111_1110;
        d_empty <= 1'b1;
      end
      if (d_done) d_got.push_back(d_out);
    end
  end

  // Source model
  logic [7:0]  segs [];
  int unsigned n_segs;
  int unsigned rd_idx;
  logic        src_gate;   // 1: pretend FIFO_send is empty
  logic        sink_gate;  // 1: pretend FIFO_recv is full
  bit          backpressure;

  assign in_empty = (rd_idx >= n_segs) || src_gate;
  assign out_full = sink_gate;

  // Sink model
  logic [CW:0] got [$];

  // Read-interval measurement
  longint unsigned cyc = 0;
  longint unsigned last_rd_cyc;
  bit              seen_rd;
  int unsigned     rate_bad;
  int unsigned     rate_seen;
  int unsigned     n_empty_waits;
  int unsigned     n_full_waits;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      rd_idx    <= 0;
      src_gate  <= 1'b0;
      sink_gate <= 1'b0;
      in_data   <= '0;
    end else begin
      if (in_rd_req) begin
        in_data <= segs[rd_idx];
        rd_idx  <= rd_idx + 1;
        if (seen_rd && (cyc - last_rd_cyc) != 8) rate_bad <= rate_bad + 1;
        if (seen_rd) rate_seen <= rate_seen + 1;
        seen_rd     <= 1'b1;
        last_rd_cyc <= cyc;
      end
      if (out_done) got.push_back(out_data);
      if (backpressure) begin
        src_gate  <= ($urandom_range(0, 3) == 0);
        sink_gate <= ($urandom_range(0, 2) == 0);
      end else begin
        src_gate  <= 1'b0;
        sink_gate <= 1'b0;
      end
      if (src_gate && rd_idx < n_segs) n_empty_waits <= n_empty_waits + 1;
      if (sink_gate && dut.out_valid) n_full_waits <= n_full_waits + 1;
    end
  end

  // Bit-stream with runs of mixed length, some beyond the count maximum.
  task automatic make_stream(input int unsigned n);
    int unsigned  pos;
    int unsigned  run;
    logic         b;
    segs   = new[n];
    n_segs = n;
    b      = 1'($urandom_range(0, 1));
    pos    = 0;
    while (pos < 8 * n) begin
      case ($urandom_range(0, 3))
        0:       run = $urandom_range(1, 2);
        1:       run = $urandom_range(1, 8);
        2:       run = $urandom_range(8, 20);
        default: run = $urandom_range(14, 40);
      endcase
      for (int unsigned k = 0; k < run && pos < 8 * n; k++) begin
        segs[pos / 8][7 - (pos % 8)] = b;
        pos++;
      end
      b = ~b;
    end
  endtask

  // Independent software encoder.
  task automatic expected(output logic [CW:0] exp_q [$]);
    logic        cur;
    int unsigned cnt;
    logic        b;
    exp_q.delete();
    cnt = 0;
    cur = 1'b0;
    for (int unsigned i = 0; i < 8 * n_segs; i++) begin
      b = segs[i / 8][7 - (i % 8)];
      if (cnt == 0) begin
        cur = b; cnt = 1;
      end else if (b == cur && cnt < MAXC) begin
        cnt++;
      end else begin
        exp_q.push_back({cur, CW'(cnt)});
        cur = b; cnt = 1;
      end
    end
    if (cnt != 0) exp_q.push_back({cur, CW'(cnt)});
  endtask

  task automatic check_stream(input string tag);
    logic [CW:0] exp_q [$];
    expected(exp_q);
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++;
      $display("FAIL %s: %0d words, expected %0d", tag, got.size(), exp_q.size());
    end
    for (int unsigned i = 0; i < exp_q.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp_q[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s word %0d: got bit %0d count %0d, expected bit %0d count %0d",
                   tag, i, got[i][CW], got[i][CW-1:0], exp_q[i][CW], exp_q[i][CW-1:0]);
      end
    end
  endtask

  task automatic run_stream(input string tag);
    wait (rd_idx == n_segs);
    repeat (20) @(posedge clk);
    // Nothing may be emitted for the last run before flush.
    checks++;
    if (dut.count == '0) begin
      failures++;
      $display("FAIL %s: no open run before flush", tag);
    end
    flush <= 1'b1;
    repeat (60) @(posedge clk);
    flush <= 1'b0;
    repeat (5) @(posedge clk);
    check_stream(tag);
  endtask

  int unsigned n_sat;

  initial begin
    rst = 1'b1; flush = 1'b0; backpressure = 1'b1; d_flush = 1'b0;
    seen_rd = 0; rate_bad = 0; rate_seen = 0; n_empty_waits = 0; n_full_waits = 0;
    make_stream(N1);
    begin
      logic [CW:0] e [$];
      expected(e);
      n_sat = 0;
      foreach (e[i]) if (e[i][CW-1:0] == CW'(MAXC)) n_sat++;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run_stream("stream1");
    checks++;
    if (n_sat == 0 || n_empty_waits == 0 || n_full_waits == 0) begin
      failures++;
      $display("FAIL coverage: saturated=%0d empty_waits=%0d full_waits=%0d",
               n_sat, n_empty_waits, n_full_waits);
    end

    // Stream 2: reset, no back-pressure, check one bit per clock.
    rst <= 1'b1;
    backpressure = 1'b0;
    got.delete();
    make_stream(N2);
    @(posedge clk);
    seen_rd = 0; rate_bad = 0; rate_seen = 0;
    @(posedge clk);
    rst <= 1'b0;
    run_stream("stream2");
    checks++;
    if (rate_bad != 0 || rate_seen != N2 - 1) begin
      failures++;
      $display("FAIL rate: %0d of %0d read intervals not 8 clocks", rate_bad, rate_seen);
    end

    // Directed word-format test at the default width.
    rst <= 1'b1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    d_empty <= 1'b0;
    repeat (20) @(posedge clk);
    d_flush <= 1'b1;
    repeat (10) @(posedge clk);
    d_flush <= 1'b0;
    @(posedge clk);
    checks++;
    if (d_got.size() != 2 || d_got[0] !== 24'b1000_0000_0000_0000_0000_0111
        || d_got[1] !== 24'h000001) begin
      failures++;
      $display("FAIL word format: %0d words, first %h", d_got.size(),
               d_got.size() > 0 ? d_got[0] : 24'h0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
