// tb_plc_gradual_fabric: self-checking test of the soft-PLC fabric at its default size
// (8 x 8 3-LUTs, W = 3, 10 inputs, 13 outputs).
//
//  1. Directed mapping: a majority function in a column-0 LUT, carried to the outputs
//     three ways (through a chain of buffer LUTs, through a route-mux track, and a
//     primary input straight through an input-mux track); checked against the function
//     computed here from the inputs for all input patterns.
//  2. Read-back: after exactly N config_clk edges the bitstream is in place; N further
//     edges bring it out of shift_out bit for bit, first bit first.
//  3. Random bitstreams: outputs compared with the reference evaluator for random inputs.
module tb_plc_gradual_fabric;
  import plc_pkg::*;
  import tb_plc_bits_pkg::*;

  localparam int D = 8, W = 3, NI = 10, NO = 13;
  localparam int N = cfg_bits(D, W, NI, NO);

  logic          config_clk = 0, shift_in = 0, shift_out;
  logic [0:0]    chain_sel = '0;
  logic [NI-1:0] pi = '0;
  logic [NO-1:0] po;
  int checks = 0, failures = 0;

  plc_gradual_fabric #(.D(D), .W(W), .NI(NI), .NO(NO)) dut (
    .config_clk, .shift_in, .chain_sel, .shift_out, .pi, .po
  );

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  function automatic void check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endfunction

  PlcBits b;
  bit pib[], pob[];

  initial begin
    // ---------- 1. directed mapping ----------
    b = new(D, W, NI, NO);
    b.lut_from_pi(2, 8'hE8, 1, 4, 9);                    // majority(pi1, pi4, pi9)
    for (int c = 1; c < D; c++) b.lut_from_prev(c, 2, 8'hAA, 2, 2, 2); // buffer LUTs
    b.set_out(2, b.cand_prev(D, 2));                     // out 2 <- last-column row 2
    b.set_route(1, 4, 2);                                // track row 4 <- column-0 row 2
    b.set_out(4, b.cand_below(D, W + 0));                // out 4 <- that route track
    b.set_in_mux(0, 1, 7);                               // track row 0, track 1 <- pi7
    b.set_out(0, b.cand_below(D, 1));                    // out 0 <- that input track
    b.set_in_mux(9 - 1, 2, 3);                           // track row 8 (top), track 2 <- pi3
    b.set_out(7, b.cand_above(D, 2));                    // out 7 (row 7) <- track above
    b.set_lut(0, 5, 8'h96);                              // 3-input parity, row 5
    b.set_lut_mux(0, 5, 0, 0); b.set_lut_mux(0, 5, 1, 5); b.set_lut_mux(0, 5, 2, 8);
    b.set_lut_mux(1, 5, 0, b.cand_prev(1, 5));           // column 1 row 5: inverter of it
    b.set_lut(1, 5, 8'h55);
    for (int c = 2; c < D; c++) b.lut_from_prev(c, 5, 8'hAA, 5, 5, 5);
    b.set_out(5, b.cand_prev(D, 5));
    load(b);
    for (int v = 0; v < 1024; v += 3) begin
      logic maj;
      pi = NI'(v);
      #1;
      maj = (pi[1] & pi[4]) | (pi[1] & pi[9]) | (pi[4] & pi[9]);
      check("majority via buffer chain", po[2], maj);
      check("majority via route track", po[4], maj);
      check("input track to output", po[0], pi[7]);
      check("top input track to output", po[7], pi[3]);
      check("inverted parity", po[5], ~(pi[0] ^ pi[5] ^ pi[8]));
      check("parked output", po[12], 1'b0);
    end

    // ---------- 2. read-back through shift_out ----------
    b.randomize_all();
    load(b);
    for (int i = N - 1; i >= 0; i--) begin
      check("read-back", shift_out, b.bits[i]);
      cfg_pulse();
    end

    // ---------- 3. random bitstreams against the reference ----------
    for (int k = 0; k < 12; k++) begin
      b.randomize_all();
      load(b);
      for (int v = 0; v < 60; v++) begin
        pi = NI'($urandom);
        #1;
        pib = new[NI];
        foreach (pib[i]) pib[i] = pi[i];
        b.eval(pib, pob);
        for (int o = 0; o < NO; o++) check($sformatf("random cfg %0d out %0d", k, o), po[o], pob[o]);
      end
    end

    $display("configuration length %0d bits", N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
