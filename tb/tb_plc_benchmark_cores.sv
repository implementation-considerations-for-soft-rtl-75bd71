// tb_plc_benchmark_cores: the soft-PLC fabric built at the core sizes needed by several
// MCNC benchmark circuits, checked against the reference evaluator.
//
// Each core has its own parameters (D x D LUTs, W input tracks per track row, NI inputs,
// NO outputs). The sizes are D=2, W=1 (cm82a, 5 in / 3 out), D=4, W=1 (con1, 7 / 2),
// D=5, W=1 (cm138a, 6 / 8), D=5, W=2 (cm42a, 4 / 10), D=11, W=2 (5xp1, 7 / 10) and
// D=10, W=4 (count, with its outputs cut to 8 to keep the run short). The benchmark
// netlists themselves are not mapped; this shows that the fabric, its bitstream layout
// and the evaluator agree at sizes other than the default.
//
// Per core, in parallel:
//   1. directed: a 3-input parity of pi0..pi2 in column 0, row 0, buffered along row 0
//      to output 0, checked for every input pattern;
//   2. read-back of a random bitstream through shift_out;
//   3. random bitstreams and random inputs against PlcBits::eval.
module tb_plc_benchmark_cores;
  import plc_pkg::*;
  import tb_plc_bits_pkg::*;

  localparam int NC = 6;
  localparam int DS  [NC] = '{2, 4, 5, 5, 11, 10};
  localparam int WS  [NC] = '{1, 1, 1, 2, 2, 4};
  localparam int NIS [NC] = '{5, 7, 6, 4, 7, 35};
  localparam int NOS [NC] = '{3, 2, 8, 10, 10, 8};

  int checks = 0, failures = 0;
  bit done [NC];

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endfunction

  for (genvar g = 0; g < NC; g++) begin : core
    localparam int D = DS[g], W = WS[g], NI = NIS[g], NO = NOS[g];
    localparam int N = cfg_bits(D, W, NI, NO);

    logic          config_clk = 0, shift_in = 0, shift_out;
    logic [0:0]    chain_sel = '0;
    logic [NI-1:0] pi = '0;
    logic [NO-1:0] po;

    plc_gradual_fabric #(.D(D), .W(W), .NI(NI), .NO(NO)) dut (
      .config_clk, .shift_in, .chain_sel, .shift_out, .pi, .po
    );

    task automatic cfg_pulse();
      #1 config_clk = 1;
      #1 config_clk = 0;
    endtask

    task automatic load(PlcBits b);
      for (int i = N - 1; i >= 0; i--) begin
        shift_in = b.bits[i];
        cfg_pulse();
      end
      shift_in = 0;
    endtask

    initial begin
      PlcBits b;
      bit pib[], pob[];
      string tag;
      tag = $sformatf("D=%0d W=%0d NI=%0d NO=%0d", D, W, NI, NO);
      b = new(D, W, NI, NO);

      // 1. directed parity along row 0
      b.lut_from_pi(0, 8'h96, 0, 1, 2);
      for (int c = 1; c < D; c++) b.lut_from_prev(c, 0, 8'hAA, 0, 0, 0);
      b.set_out(0, b.cand_prev(D, 0));
      load(b);
      for (int v = 0; v < (1 << (NI < 8 ? NI : 8)); v++) begin
        pi = NI'(v);
        #1;
        check({tag, " parity"}, po[0], pi[0] ^ pi[1] ^ pi[2]);
        for (int o = 1; o < NO; o++) check({tag, " parked output"}, po[o], 1'b0);
      end

      // 2. read-back
      b.randomize_all();
      load(b);
      for (int i = N - 1; i >= 0; i--) begin
        check({tag, " read-back"}, shift_out, b.bits[i]);
        cfg_pulse();
      end

      // 3. random bitstreams against the evaluator
      for (int k = 0; k < 8; k++) begin
        b.randomize_all();
        load(b);
        for (int v = 0; v < 40; v++) begin
          for (int i = 0; i < NI; i++) pi[i] = 1'($urandom);
          #1;
          pib = new[NI];
          foreach (pib[i]) pib[i] = pi[i];
          b.eval(pib, pob);
          for (int o = 0; o < NO; o++) check({tag, " random"}, po[o], pob[o]);
        end
      end
      $display("%s: %0d configuration bits", tag, N);
      done[g] = 1;
    end
  end

  initial begin
    bit all;
    do begin
      #100;
      all = 1;
      foreach (done[g]) all &= done[g];
    end while (!all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
