// tb_rle_fifo: self-checking testbench for the synchronous FIFO.
//
// Two instances are tested side by side at the widths the accelerator uses,
// 8 bits (FIFO_send) and 24 bits (FIFO_recv), both at the default depth of
// 16. Each is driven with random writes and reads, including writes while
// full and reads while empty, and compared on every clock with a queue
// model: full and empty flags against the model's fill level, and q, the
// clock after each accepted read, against the entry popped from the model.
// A directed phase fills each FIFO to the top, checks that a write while
// full is dropped, then drains it and checks that a read while empty leaves
// q unchanged.
module tb_rle_fifo;

  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int unsigned checks = 0;
  int unsigned failures = 0;

  // 8-bit instance
  logic        wr8, rd8, empty8, full8;
  logic [7:0]  d8, q8;
  // 24-bit instance
  logic        wr24, rd24, empty24, full24;
  logic [23:0] d24, q24;

  rle_fifo #(.WIDTH(8)) dut8 (
    .clk, .rst, .wr_req(wr8), .data(d8), .rd_req(rd8), .q(q8),
    .empty(empty8), .full(full8)
  );
  rle_fifo #(.WIDTH(24)) dut24 (
    .clk, .rst, .wr_req(wr24), .data(d24), .rd_req(rd24), .q(q24),
    .empty(empty24), .full(full24)
  );

  logic [7:0]  m8  [$];
  logic [23:0] m24 [$];
  logic [7:0]  exp_q8;
  logic [23:0] exp_q24;
  int unsigned n_full_writes = 0;
  int unsigned n_empty_reads = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One clock: drive inputs, update the model, then check outputs.
  task automatic step(input bit w8, input bit r8, input bit w24, input bit r24);
    logic [7:0]  v8;
    logic [23:0] v24;
    v8  = 8'($urandom);
    v24 = 24'($urandom);
    wr8 <= w8; rd8 <= r8; d8 <= v8;
    wr24 <= w24; rd24 <= r24; d24 <= v24;
    @(negedge clk);
    // Model update, order matches the hardware: flags seen before the edge.
    if (r8 && m8.size() > 0) exp_q8 = m8.pop_front();
    else if (r8) n_empty_reads++;
    if (w8 && !full8_before) m8.push_back(v8);
    else if (w8) n_full_writes++;
    if (r24 && m24.size() > 0) exp_q24 = m24.pop_front();
    if (w24 && !full24_before) m24.push_back(v24);
    check(q8 == exp_q8, "q8");
    check(q24 == exp_q24, "q24");
    check(empty8 == (m8.size() == 0), "empty8");
    check(full8 == (m8.size() == DEPTH), "full8");
    check(empty24 == (m24.size() == 0), "empty24");
    check(full24 == (m24.size() == DEPTH), "full24");
  endtask

  // Flags as they were before the clock edge of the current step.
  logic full8_before, full24_before;
  always @(posedge clk) begin
    full8_before  = full8;
    full24_before = full24;
  end

  initial begin
    rst = 1'b1;
    wr8 = 0; rd8 = 0; wr24 = 0; rd24 = 0; d8 = 0; d24 = 0;
    exp_q8 = '0; exp_q24 = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(empty8 && !full8 && empty24 && !full24, "flags after reset");

    // Directed: fill beyond the top, then drain beyond the bottom.
    for (int i = 0; i < DEPTH + 3; i++) step(1, 0, 1, 0);
    for (int i = 0; i < DEPTH + 3; i++) step(0, 1, 0, 1);
    // Simultaneous write and read on an empty FIFO: the write lands, the
    // read is ignored.
    step(1, 1, 1, 1);
    check(m8.size() == 1 && m24.size() == 1, "write+read on empty");

    // Random traffic with different read/write mixes.
    for (int phase = 0; phase < 3; phase++) begin
      for (int i = 0; i < 600; i++) begin
        int unsigned pw, pr;
        pw = (phase == 0) ? 70 : (phase == 1) ? 30 : 50;
        pr = 100 - pw;
        step($urandom_range(0, 99) < pw, $urandom_range(0, 99) < pr,
             $urandom_range(0, 99) < pw, $urandom_range(0, 99) < pr);
      end
    end

    check(n_full_writes > 0 && n_empty_reads > 0, "overflow and underflow attempts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
