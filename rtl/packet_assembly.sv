// packet_assembly: packet assembly datapath between the buffer and the IP core test
// structures.
//
// It looks at the word presented by the buffer (or by the TAM directly in bypass mode),
// reports status bits to the assembly controller, and carries out the controller's
// commands:
//   CT_LOAD  latch LEN of the header into the remaining-data counter and latch whether
//            the header's core ID equals core_id (the match flag)
//   CT_DEC   decrement the counter
//   CT_WE    present the word to the IP core (core_we = 1 for that cycle)
// The word itself always goes out on core_data; core_we qualifies it. Status is
// combinational from the input word and the registers (ST_VLD, ST_RDY are passed
// through). Registers update on the rising edge of clk; active-low asynchronous reset.
// The whole control vector comes in, but CT_POP (used by the buffer side in the top) and
// the spare controls are not read here.
// How the datapath reacts to each command is this design's choice; the header layout is
// in tam_pkg.
module packet_assembly
  import tam_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDW-1:0]   core_id,
  // word stream
  input  logic             in_vld,
  input  logic [DW-1:0]    in_word,
  // controller
  input  logic [NCTRL-1:0] ctrl,
  output logic [NSTAT-1:0] stat,
  // IP core test structures
  input  logic             core_rdy,
  output logic [DW-1:0]    core_data,
  output logic             core_we
);
  logic [LENW-1:0] cnt;
  logic            match_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      match_q <= 1'b0;
    end else if (ctrl[CT_LOAD]) begin
      cnt     <= in_word[LENW-1:0];
      match_q <= (in_word[HDR_B-1 -: IDW] == core_id);
    end else if (ctrl[CT_DEC]) begin
      cnt     <= cnt - 1'b1;
    end

  always_comb begin
    stat            = '0;
    stat[ST_VLD]    = in_vld;
    stat[ST_IS_HDR] = in_word[HDR_B];
    stat[ST_MATCH]  = match_q;
    stat[ST_LAST]   = (cnt == LENW'(1));
    stat[ST_RDY]    = core_rdy;
    stat[ST_ZERO]   = (cnt == '0);
  end

  assign core_data = in_word;
  assign core_we   = ctrl[CT_WE];
endmodule
