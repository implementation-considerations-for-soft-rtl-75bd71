// tb_tam_buffer_ctrl: the buffer controller with a buffer memory as a 16-word dual-clock
// FIFO; write clock 10 ns, read clock 14 ns. First, with the reader stopped, 20 pushes
// into the empty FIFO must be accepted exactly 16 times and leave it full. Then random
// push and pop requests in bursts that fill and drain it. A scoreboard checks that every accepted word comes out once and in
// order, that the FIFO never holds more than 16 words, that full is shown only when it is
// (nearly) full, and that a word written is visible to the reader at most 3 read
// clocks later (two-stage synchronizer). Both full and empty must be seen.
module tb_tam_buffer_ctrl;
  localparam int AW = 4, DEPTH = 16, DW = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic push = 0, pop = 0, full, empty, wr_en;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0;
  logic [DW-1:0] q[$];
  int written = 0, read_n = 0;

  tam_buffer_ctrl #(.AW(AW)) dut (
    .wclk, .wrst_n, .push, .full, .wr_en, .waddr, .rclk, .rrst_n, .pop, .empty, .raddr
  );
  tam_buffer_mem #(.DW(DW), .DEPTH(DEPTH)) mem (
    .wclk, .we(wr_en), .waddr, .wdata, .raddr, .rdata
  );

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endfunction

  int phase = 0;   // 0: push-heavy, 1: pop-heavy, 2: directed, 3: drain

  // writer
  always @(posedge wclk) if (wrst_n) begin
    if (push && !full) begin
      q.push_back(wdata);
      written++;
    end
    if (full) begin
      n_full++;
      // the read pointer reaches the write side two write clocks late, so up to a few
      // words may already have left when full is still shown
      check("full only when (nearly) 16 words stored", (q.size() >= DEPTH - 4) ? 1 : 0, 1);
    end
    check("never more than 16 words", (q.size() <= DEPTH) ? 1 : 0, 1);
    #1;
    if (phase < 2) push  = (phase == 0) ? ($urandom_range(9) < 8) : ($urandom_range(9) < 2);
    if (phase == 3) push = 0;
    wdata = DW'($urandom);
  end

  // reader
  always @(posedge rclk) if (rrst_n) begin
    if (pop && !empty) begin
      check("data in order", int'(rdata), (q.size() > 0) ? int'(q[0]) : -1);
      if (q.size() > 0) void'(q.pop_front());
      read_n++;
    end
    if (empty) n_empty++;
    #1;
    if (phase < 2) pop = (phase == 0) ? ($urandom_range(9) < 2) : ($urandom_range(9) < 8);
    if (phase == 3) pop = 1;
  end

  // latency: with the reader idle and the FIFO empty, one word must appear within 3 rclk
  task automatic latency_test();
    int lat;
    phase = 2;           // no random traffic
    push = 0; pop = 0;
    wait (q.size() == 0);
    repeat (4) @(posedge rclk);
    @(posedge wclk); #1 push = 1; wdata = 16'hBEEF;
    @(posedge wclk); #1 push = 0;
    lat = 0;
    while (empty && lat < 10) begin @(posedge rclk); lat++; end
    check("write-to-read latency within 3 read clocks", (lat <= 3) ? 1 : 0, 1);
    check("latency word", int'(rdata), 16'hBEEF);
    @(posedge rclk); #1 pop = 1;
    @(posedge rclk); #1 pop = 0;
  endtask

  initial begin
    int w0;
    #20 wrst_n = 1; rrst_n = 1;
    // deterministic fill from empty
    phase = 2;
    repeat (3) @(posedge wclk);
    w0 = written;
    for (int i = 0; i < 20; i++) begin
      @(posedge wclk); #1 push = 1; wdata = DW'(i);
    end
    @(posedge wclk); #1 push = 0;
    check("words accepted into an empty FIFO with the reader stopped", written - w0, DEPTH);
    check("full after 16 words", full, 1);
    for (int k = 0; k < 8; k++) begin
      phase = k % 2;
      #3000;
    end
    // drain
    phase = 3;
    wait (q.size() == 0);
    #100;
    latency_test();
    checks++;
    if (n_full == 0 || n_empty == 0) begin
      failures++;
      $display("FAIL full seen %0d times, empty seen %0d times", n_full, n_empty);
    end
    $display("words written %0d read %0d, full cycles %0d, empty cycles %0d", written, read_n, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
