// tb_tam_buffer_mem: fills all 16 words of the buffer memory, reads every address back
// combinationally, then overwrites random addresses and checks that a write takes effect
// exactly at the write-clock edge and that we = 0 leaves the memory unchanged.
module tb_tam_buffer_mem;
  localparam int DW = 16, DEPTH = 16, AW = 4;
  logic wclk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  tam_buffer_mem #(.DW(DW), .DEPTH(DEPTH)) dut (.wclk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endfunction

  task automatic write(int a, logic [DW-1:0] v, bit en);
    waddr = AW'(a); wdata = v; we = en;
    #1 wclk = 1;
    #1 wclk = 0; we = 0;
    if (en) ref_mem[a] = v;
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, DW'($urandom), 1);
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a); #1;
      check("read after fill", rdata, ref_mem[a]);
    end
    for (int k = 0; k < 400; k++) begin
      automatic int a = $urandom_range(DEPTH - 1);
      automatic logic [DW-1:0] v = DW'($urandom);
      automatic bit en = 1'($urandom);
      raddr = AW'(a);
      waddr = AW'(a); wdata = v; we = en;
      #1;
      check("no write before the edge", rdata, ref_mem[a]);
      write(a, v, en);
      #1;
      check("read after write", rdata, ref_mem[a]);
      raddr = AW'($urandom_range(DEPTH - 1)); #1;
      check("random read", rdata, ref_mem[raddr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
