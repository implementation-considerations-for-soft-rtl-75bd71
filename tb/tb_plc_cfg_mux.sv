// tb_plc_cfg_mux: tests the configurable routing mux at the width of the widest LUT mux
// of the default core (26 inputs, 5-bit select): every select value, including the
// out-of-range ones that must give 0, against random candidate vectors.
module tb_plc_cfg_mux;
  localparam int N = 26, SW = 5;
  logic [N-1:0]  d;
  logic [SW-1:0] sel;
  logic          y;
  int checks = 0, failures = 0;

  plc_cfg_mux #(.N(N)) dut (.d, .sel, .y);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 40; k++) begin
      d = N'($urandom);
      for (int s = 0; s < (1 << SW); s++) begin
        logic exp;
        sel = SW'(s);
        #1;
        exp = (s < N) ? d[s] : 1'b0;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL d=%h sel=%0d y=%0b exp=%0b", d, s, y, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
