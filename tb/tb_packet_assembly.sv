// tb_packet_assembly: drives the packet assembly datapath with random words and random
// controller commands and compares, every cycle, its status bits and IP-core outputs with
// a model kept here: count loaded from the header's LEN, match flag from the header's ID,
// decrement on CT_DEC, last/zero flags from the count, word passed through to the core,
// write strobe from CT_WE.
module tb_packet_assembly;
  import tam_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [IDW-1:0] core_id = 7'h2A;
  logic in_vld = 0, core_rdy = 0;
  logic [DW-1:0] in_word = '0;
  logic [NCTRL-1:0] ctrl = '0;
  logic [NSTAT-1:0] stat;
  logic [DW-1:0] core_data;
  logic core_we;
  int checks = 0, failures = 0;
  int m_cnt = 0; bit m_match = 0;
  int n_match = 0, n_last = 0, n_zero = 0;

  packet_assembly dut (.clk, .rst_n, .core_id, .in_vld, .in_word, .ctrl, .stat,
                       .core_rdy, .core_data, .core_we);

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endfunction

  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_vld = 1'($urandom); core_rdy = 1'($urandom);
      in_word = DW'($urandom);
      if ($urandom_range(3) == 0) in_word[HDR_B-1 -: IDW] = core_id;
      if ($urandom_range(3) == 0) in_word[LENW-1:0] = LENW'($urandom_range(2));
      ctrl = '0;
      case ($urandom_range(3))
        0: ctrl[CT_LOAD] = 1;
        1, 2: ctrl[CT_DEC] = 1;
        default: ;
      endcase
      ctrl[CT_WE] = 1'($urandom);
      #1;
      check("vld", stat[ST_VLD], in_vld);
      check("is_hdr", stat[ST_IS_HDR], in_word[HDR_B]);
      check("rdy", stat[ST_RDY], core_rdy);
      check("match", stat[ST_MATCH], m_match);
      check("last", stat[ST_LAST], m_cnt == 1);
      check("zero", stat[ST_ZERO], m_cnt == 0);
      check("core data", core_data, in_word);
      check("core we", core_we, ctrl[CT_WE]);
      n_match += m_match; n_last += (m_cnt == 1); n_zero += (m_cnt == 0);
      @(posedge clk);
      if (ctrl[CT_LOAD]) begin
        m_cnt = in_word[LENW-1:0];
        m_match = (in_word[HDR_B-1 -: IDW] == core_id);
      end else if (ctrl[CT_DEC]) m_cnt = (m_cnt - 1) & 8'hFF;
    end
    checks++;
    if (n_match == 0 || n_last == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
