// tb_plc_config_chain: tests the configuration chain in both forms.
//   * single chain (PARTS = 1, 100 bits): after exactly N config_clk edges the parallel
//     outputs hold the bitstream (first bit sent at the far end); shift_out then returns
//     the stream first bit first.
//   * partitioned (PARTS = 4, 103 bits, so the last chain has padding): each chain is
//     loaded in turn through chain_sel; loading one chain must leave the others intact,
//     and only L = 26 edges are needed per chain.
module tb_plc_config_chain;
  localparam int N1 = 100;
  localparam int N4 = 103, P = 4, L = (N4 + P - 1) / P;

  logic config_clk = 0, shift_in = 0;
  logic so1, so4;
  logic [0:0] sel1 = '0;
  logic [1:0] sel4 = '0;
  logic [N1-1:0] cfg1;
  logic [N4-1:0] cfg4;
  int checks = 0, failures = 0;

  plc_config_chain #(.N(N1), .PARTS(1)) dut1 (
    .config_clk, .shift_in, .chain_sel(sel1), .shift_out(so1), .cfg(cfg1)
  );
  plc_config_chain #(.N(N4), .PARTS(P)) dut4 (
    .config_clk, .shift_in, .chain_sel(sel4), .shift_out(so4), .cfg(cfg4)
  );

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse();
    #1 config_clk = 1;
    #1 config_clk = 0;
  endtask

  function automatic void check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endfunction

  logic [N1-1:0] s1;
  logic [P*L-1:0] s4;

  initial begin
    // single chain: exactly N1 edges
    s1 = {$urandom, $urandom, $urandom, $urandom};
    for (int i = N1 - 1; i >= 0; i--) begin
      shift_in = s1[i];
      pulse();
    end
    check("single chain after N edges", 128'(cfg1), 128'(s1));
    for (int i = N1 - 1; i >= 0; i--) begin
      check("single chain read-back", 128'(so1), 128'(s1[i]));
      pulse();
    end

    // partitioned chain: load parts in the order 2,0,3,1
    s4 = {$urandom, $urandom, $urandom, $urandom};
    foreach (s4[i]) if (i >= N4) s4[i] = 1'b0;
    for (int n = 0; n < P; n++) begin
      int p;
      logic [N4-1:0] prev_cfg;
      p = (2 + 2 * n + (n >= 2 ? 1 : 0)) % P;
      prev_cfg = cfg4;
      sel4 = 2'(p);
      for (int i = L - 1; i >= 0; i--) begin
        shift_in = s4[p*L + i];
        pulse();
      end
      for (int q = 0; q < P; q++)
        for (int i = 0; i < L; i++)
          if (q*L + i < N4)
            check($sformatf("part %0d loaded, bit of part %0d", p, q), 128'(cfg4[q*L+i]),
                  128'((q == p) ? s4[q*L+i] : prev_cfg[q*L+i]));
      check("selected part shift_out", 128'(so4), 128'(s4[p*L + L - 1]));
    end
    check("partitioned chain complete", 128'(cfg4), 128'(s4[N4-1:0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
