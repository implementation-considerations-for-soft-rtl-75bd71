// tam_bridge_top: programmable bridge between a packet-based test access mechanism (TAM)
// and the test structures of one IP core.
//
// Words arrive from the TAM on tam_clk. With buf_en = 1 they are written into a buffer
// memory managed as a dual-clock FIFO, so TAM and IP core may run at different clocks;
// with buf_en = 0 a bypass multiplexer feeds the TAM word straight to packet assembly
// (the TAM must then run on sys_clk, and tam_ready is the assembler's pop). Packet
// assembly reads each header and passes the following data words to the IP core when the
// header carries this core's ID. The assembly controller's next-state logic is a soft
// programmable logic core: before use it must be loaded through shift_in/config_clk
// (while sys_clk is held or rst_n is low), after which it decides, every sys_clk cycle,
// what the datapath does. Loading another bitstream changes the packet handling without
// changing the silicon.
//
// Handshakes: the TAM presents tam_data with tam_valid and the word is taken on a rising
// tam_clk edge where tam_ready is 1. The IP core sees core_data with core_we for one
// sys_clk cycle and must keep core_rdy high to accept. pkt_done pulses when a packet's
// last data word is consumed. ctrl_spare brings out the controller's unused outputs.
module tam_bridge_top
  import tam_pkg::*;
#(
  parameter int FIFO_AW   = 4,   // buffer depth 2**FIFO_AW words
  parameter int D         = 8,   // soft-PLC: 8 x 8 3-LUTs
  parameter int W         = 3,
  parameter int CFG_PARTS = 1,
  localparam int CSW      = (CFG_PARTS <= 2) ? 1 : $clog2(CFG_PARTS)
) (
  // TAM side
  input  logic            tam_clk,
  input  logic            tam_rst_n,
  input  logic            tam_valid,
  input  logic [DW-1:0]   tam_data,
  output logic            tam_ready,
  // IP core side
  input  logic            sys_clk,
  input  logic            rst_n,
  input  logic            buf_en,
  input  logic [IDW-1:0]  core_id,
  input  logic            core_rdy,
  output logic [DW-1:0]   core_data,
  output logic            core_we,
  output logic            pkt_done,
  output logic [NCTRL-6:0] ctrl_spare,
  output logic [NSTATE-1:0] ctrl_state,
  // soft-PLC configuration
  input  logic            config_clk,
  input  logic            shift_in,
  input  logic [CSW-1:0]  chain_sel,
  output logic            shift_out
);
  logic              full, empty, wr_en;
  logic [FIFO_AW-1:0] waddr, raddr;
  logic [DW-1:0]     buf_word, asm_word;
  logic              asm_vld;
  logic [NCTRL-1:0]  ctrl;
  logic [NSTAT-1:0]  stat;

  // ---- buffer management ----
  tam_buffer_ctrl #(.AW(FIFO_AW)) u_bctl (
    .wclk(tam_clk), .wrst_n(tam_rst_n), .push(tam_valid && buf_en), .full, .wr_en, .waddr,
    .rclk(sys_clk), .rrst_n(rst_n), .pop(ctrl[CT_POP] && buf_en), .empty, .raddr
  );

  tam_buffer_mem #(.DW(DW), .DEPTH(1 << FIFO_AW)) u_bmem (
    .wclk(tam_clk), .we(wr_en), .waddr, .wdata(tam_data), .raddr, .rdata(buf_word)
  );

  // ---- bypass multiplexer ----
  always_comb begin
    if (buf_en) begin
      asm_word  = buf_word;
      asm_vld   = !empty;
      tam_ready = !full;
    end else begin
      asm_word  = tam_data;
      asm_vld   = tam_valid;
      tam_ready = ctrl[CT_POP];
    end
  end

  // ---- assembly management ----
  packet_assembly u_pa (
    .clk(sys_clk), .rst_n, .core_id, .in_vld(asm_vld), .in_word(asm_word),
    .ctrl, .stat, .core_rdy, .core_data, .core_we
  );

  assembly_ctrl #(.D(D), .W(W), .CFG_PARTS(CFG_PARTS)) u_actl (
    .clk(sys_clk), .rst_n, .stat, .ctrl, .state(ctrl_state),
    .config_clk, .shift_in, .chain_sel, .shift_out
  );

  assign pkt_done   = ctrl[CT_DONE];
  assign ctrl_spare = ctrl[NCTRL-1:5];
endmodule
