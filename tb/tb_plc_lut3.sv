// tb_plc_lut3: exhaustive test of the 3-LUT: 300 random truth tables, all 8 input
// patterns each, output compared with the addressed truth-table bit.
module tb_plc_lut3;
  logic [7:0] tt;
  logic [2:0] in;
  logic       y;
  int checks = 0, failures = 0;

  plc_lut3 dut (.tt, .in, .y);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      tt = (k < 256) ? 8'(k) : 8'($urandom);
      for (int v = 0; v < 8; v++) begin
        in = 3'(v);
        #1;
        checks++;
        if (y !== ((tt >> v) & 1'b1)) begin
          failures++;
          $display("FAIL tt=%02h in=%0d y=%0b", tt, v, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
