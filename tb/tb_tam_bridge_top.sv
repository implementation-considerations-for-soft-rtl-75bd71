// tb_tam_bridge_top: end-to-end test of the programmable TAM-to-IP-core bridge at its
// default sizes (16-word buffer, 8 x 8 soft-PLC core).
//
// Sequence:
//   1. load the address-filtering packet machine into the soft-PLC through
//      shift_in/config_clk (rst_n low; exactly one bit per config_clk edge);
//   2. buffered mode: TAM on its own 14 ns clock, core on a 20 ns clock, random packets
//      for this core and for other cores, zero-length packets and stray non-header words,
//      IP core randomly not ready; the TAM is sometimes held off by a full buffer;
//   3. bypass mode: TAM driven on the core clock, buffer skipped; one packet is timed: a
//      packet of LEN words takes LEN+2 core cycles with the core always ready;
//   4. reprogram the core with the broadcast machine and check that packets for other
//      cores are now delivered too.
// A scoreboard checks every word written to the IP core (data and order) and the number
// of packet-done pulses. Each mechanism (buffering, full buffer, bypass, core stall,
// skipped packet, zero-length packet, discarded stray word, reprogramming) is counted
// and must occur.
module tb_tam_bridge_top;
  import plc_pkg::*;
  import tam_pkg::*;
  import tb_plc_bits_pkg::*;
  import tb_asm_fsm_pkg::*;

  localparam logic [IDW-1:0] MY_ID = 7'h15;

  logic sys_clk = 0, tam_clk_free = 0, tam_clk;
  logic rst_n = 0, tam_rst_n = 0;
  logic tam_valid = 0, tam_ready;
  logic [DW-1:0] tam_data = '0;
  logic buf_en = 1, core_rdy = 0;
  logic [DW-1:0] core_data;
  logic core_we, pkt_done;
  logic [NCTRL-6:0] ctrl_spare;
  logic [NSTATE-1:0] ctrl_state;
  logic config_clk = 0, shift_in = 0, shift_out;
  logic [0:0] chain_sel = '0;
  bit bypass = 0;

  tam_bridge_top dut (
    .tam_clk, .tam_rst_n, .tam_valid, .tam_data, .tam_ready,
    .sys_clk, .rst_n, .buf_en, .core_id(MY_ID), .core_rdy, .core_data, .core_we, .pkt_done,
    .ctrl_spare, .ctrl_state, .config_clk, .shift_in, .chain_sel, .shift_out
  );

  always #10 sys_clk = ~sys_clk;
  always #7  tam_clk_free = ~tam_clk_free;
  assign tam_clk = bypass ? sys_clk : tam_clk_free;

  int checks = 0, failures = 0;
  logic [DW-1:0] tx_q[$];       // words still to be sent by the TAM
  logic [DW-1:0] exp_q[$];      // words the IP core must receive
  int exp_done = 0, got_done = 0;
  int n_buffered = 0, n_full = 0, n_bypass = 0, n_stall = 0, n_skip_pkt = 0;
  int n_zero_pkt = 0, n_stray = 0, n_reprog = 0;
  int rdy_pct = 60, valid_pct = 90;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h exp %0h (t=%0t)", what, got, exp, $time);
    end
  endfunction

  // ---- packet generator ----
  function automatic void add_packet(logic [IDW-1:0] id, int len, bit broadcast);
    tx_q.push_back({1'b1, id, LENW'(len)});
    if (len == 0) n_zero_pkt++;
    else begin
      exp_done++;
      if (id != MY_ID && !broadcast) n_skip_pkt++;
    end
    for (int i = 0; i < len; i++) begin
      logic [DW-1:0] w = DW'($urandom);
      tx_q.push_back(w);
      if (id == MY_ID || broadcast) exp_q.push_back(w);
    end
  endfunction

  function automatic void add_traffic(int npkt, bit broadcast);
    for (int k = 0; k < npkt; k++) begin
      logic [IDW-1:0] id = ($urandom_range(1) == 0) ? MY_ID : IDW'($urandom);
      int len = ($urandom_range(5) == 0) ? 0 : $urandom_range(1, 9);
      if ($urandom_range(7) == 0) begin
        tx_q.push_back(DW'($urandom) & 16'h7FFF);  // stray word, no header flag
        n_stray++;
      end
      add_packet(id, len, broadcast);
    end
  endfunction

  // ---- TAM driver: a word is taken on a rising tam_clk edge with tam_ready = 1 ----
  always @(posedge tam_clk) begin
    if (tam_valid && tam_ready) begin
      void'(tx_q.pop_front());
      if (bypass) n_bypass++; else n_buffered++;
    end
    if (tam_valid && !tam_ready && !bypass) n_full++;
    #1;
    tam_valid = (tx_q.size() > 0) && ($urandom_range(99) < valid_pct);
    tam_data  = (tx_q.size() > 0) ? tx_q[0] : '0;
  end

  // ---- IP core model and scoreboard ----
  always @(posedge sys_clk) if (rst_n) begin
    if (core_we) begin
      check("core write while ready", int'(core_rdy), 1);
      check("core word", int'(core_data), (exp_q.size() > 0) ? int'(exp_q[0]) : -1);
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (pkt_done) got_done++;
    if (ctrl_state == NSTATE'(DATA) && !core_rdy) n_stall++;
    check("spare controller outputs idle", int'(ctrl_spare), 0);
    #1 core_rdy = ($urandom_range(99) < rdy_pct);
  end

  task automatic program_core(bit broadcast);
    PlcBits b = new(8, 3, NSTATE + NSTAT, NSTATE + NCTRL);
    int edges = 0;
    map_fsm(b, broadcast);
    for (int i = b.n - 1; i >= 0; i--) begin
      shift_in = b.bits[i];
      #2 config_clk = 1;
      #2 config_clk = 0;
      edges++;
    end
    check("configuration edges = bitstream length", edges, cfg_bits(8, 3, 10, 13));
    // the chain now presents the first bit that was sent at shift_out
    check("first configuration bit at shift_out", int'(shift_out), int'(b.bits[b.n - 1]));
  endtask

  task automatic wait_drained();
    int guard = 0, idle = 0;
    // done when nothing is left to send or to receive and the controller has sat in IDLE
    // with no word waiting for several cycles
    while (idle < 4 && guard < 100000) begin
      @(posedge sys_clk);
      guard++;
      if (tx_q.size() == 0 && exp_q.size() == 0 && ctrl_state == 0 && !dut.asm_vld) idle++;
      else idle = 0;
    end
    repeat (5) @(posedge sys_clk);
    check("all traffic delivered", exp_q.size() + tx_q.size(), 0);
  endtask

  initial begin
    // 1. configure
    program_core(0);
    @(negedge sys_clk);
    rst_n = 1; tam_rst_n = 1;

    // 2. buffered mode, with a phase of a mostly stalled core to fill the buffer
    buf_en = 1;
    rdy_pct = 5;
    add_traffic(12, 0);
    repeat (400) @(posedge sys_clk);
    rdy_pct = 60;
    add_traffic(60, 0);
    wait_drained();
    check("packet-done pulses (buffered)", got_done, exp_done);

    // 3. bypass mode
    @(negedge sys_clk);
    buf_en = 0; bypass = 1;
    add_traffic(40, 0);
    wait_drained();
    check("packet-done pulses (bypass)", got_done, exp_done);
    begin : timed_packet
      int t0, t1;
      rdy_pct = 100; valid_pct = 100;
      repeat (3) @(posedge sys_clk);
      @(negedge sys_clk);
      add_packet(MY_ID, 6, 0);
      @(posedge sys_clk);               // header word presented from here on
      t0 = int'($time);
      wait (pkt_done === 1'b1);
      @(posedge sys_clk);
      t1 = int'($time);
      check("bypass packet of 6 words takes 8 core cycles", (t1 - t0) / 20, 8);
      wait_drained();
      rdy_pct = 60; valid_pct = 90;
    end

    // 4. reprogram with the broadcast machine
    @(negedge sys_clk);
    bypass = 0; buf_en = 1;
    rst_n = 0; tam_rst_n = 0;
    program_core(1);
    n_reprog++;
    @(negedge sys_clk);
    rst_n = 1; tam_rst_n = 1;
    n_skip_pkt_before_b = n_skip_pkt;
    add_traffic(40, 1);
    wait_drained();
    check("packet-done pulses (broadcast)", got_done, exp_done);
    check("broadcast mode skips nothing", n_skip_pkt, n_skip_pkt_before_b);

    $display("words buffered %0d, TAM held by full buffer %0d, bypassed %0d, core stalls %0d",
             n_buffered, n_full, n_bypass, n_stall);
    $display("skipped packets %0d, zero-length %0d, stray words %0d, reprogrammings %0d, done %0d",
             n_skip_pkt, n_zero_pkt, n_stray, n_reprog, got_done);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_skip_pkt_before_b = 0;
  int mech[8];
  always_comb mech = '{n_buffered, n_full, n_bypass, n_stall, n_skip_pkt, n_zero_pkt, n_stray, n_reprog};
endmodule
