// tb_assembly_ctrl: the assembly controller programmed with the packet state machine.
//
// The soft-PLC is loaded through config_clk/shift_in while rst_n is low (the bitstream
// length is checked against plc_pkg). Then random status words are applied just after
// each rising edge of clk. Checks, every cycle:
//   * before the falling edge the controls still follow the previous status sample (the
//     core's inputs are registered on the falling edge);
//   * after the falling edge the controls equal the golden model's for (state, status);
//   * after the rising edge the state equals the golden next state.
// The controller is then reprogrammed with the broadcast variant and run again.
// Every state of the machine and both variants must be exercised.
module tb_assembly_ctrl;
  import plc_pkg::*;
  import tam_pkg::*;
  import tb_plc_bits_pkg::*;
  import tb_asm_fsm_pkg::*;

  localparam int D = 8, W = 3;
  localparam int NCFG = cfg_bits(D, W, NSTATE + NSTAT, NSTATE + NCTRL);

  logic clk = 0, rst_n = 0;
  logic config_clk = 0, shift_in = 0, shift_out;
  logic [0:0] chain_sel = '0;
  logic [NSTAT-1:0] stat = '0;
  logic [NCTRL-1:0] ctrl;
  logic [NSTATE-1:0] state;
  int checks = 0, failures = 0;
  int visits[4];

  assembly_ctrl #(.D(D), .W(W)) dut (
    .clk, .rst_n, .stat, .ctrl, .state, .config_clk, .shift_in, .chain_sel, .shift_out
  );

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h exp %h (t=%0t)", what, got, exp, $time);
    end
  endfunction

  task automatic configure(bit broadcast);
    PlcBits b = new(D, W, NSTATE + NSTAT, NSTATE + NCTRL);
    bit pib[], pob[];
    map_fsm(b, broadcast);
    // the mapping must implement the machine for every input in every used state
    for (int v = 0; v < 256; v++) begin
      logic [NSTATE-1:0] ns; logic [NCTRL-1:0] c;
      pib = new[10];
      for (int i = 0; i < 10; i++) pib[i] = (i < 2) ? v[i] : (i < 4) ? 1'b0 : v[i-2];
      b.eval(pib, pob);
      golden_step({2'b00, 2'(v)}, NSTAT'(v >> 2), broadcast, ns, c);
      for (int o = 0; o < 13; o++)
        if (pob[o] !== ((o < 4) ? ns[o] : c[o-4])) begin
          failures++;
          $display("mapping error: input %0d output %0d", v, o);
        end
    end
    check("bitstream length", 16'(b.n), 16'(NCFG));
    for (int i = b.n - 1; i >= 0; i--) begin
      shift_in = b.bits[i];
      #1 config_clk = 1;
      #1 config_clk = 0;
    end
  endtask

  task automatic run(bit broadcast, int cycles);
    logic [NSTATE-1:0] st_m, ns; logic [NCTRL-1:0] c, c_old;
    logic [NSTAT-1:0] s_smp;
    st_m = '0;
    s_smp = '0;
    for (int k = 0; k < cycles; k++) begin
      // clk is low here; the status sampled at the last falling edge is s_smp
      @(posedge clk);
      golden_step(st_m, s_smp, broadcast, ns, c_old);
      #1;
      check("state after rising edge", 16'(state), 16'(ns));
      st_m = ns;
      visits[st_m[1:0]]++;
      stat = NSTAT'($urandom);
      if ($urandom_range(3) == 0) stat[ST_VLD] = 1'b0;
      #3;
      check("controls hold until falling edge", 16'(ctrl), 16'(c_old));
      @(negedge clk);
      s_smp = stat;
      #1;
      golden_step(st_m, s_smp, broadcast, ns, c);
      check("controls after falling edge", 16'(ctrl), 16'(c));
    end
  endtask

  always #10 clk = ~clk;

  initial begin
    configure(0);
    @(negedge clk);
    rst_n = 1;
    run(0, 2000);
    rst_n = 0;
    configure(1);
    @(negedge clk);
    rst_n = 1;
    run(1, 1000);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (visits[s] == 0) begin
        failures++;
        $display("FAIL state %0d never reached", s);
      end
    end
    $display("state visits: idle %0d hdr %0d data %0d skip %0d", visits[0], visits[1], visits[2], visits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
