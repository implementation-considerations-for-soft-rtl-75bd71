// plc_config_chain: configuration memory of the soft-PLC.
//
// The configuration bits of a synthesized programmable core are ordinary flip-flops,
// daisy-chained into a shift register: on every rising edge of config_clk one bit enters
// at shift_in and every stored bit moves one place along; after N edges the first bit
// sent sits in cfg[N-1] and the last in cfg[0]. shift_out is the end of the chain so that
// a loaded bitstream can be read back.
//
// With PARTS > 1 the chain is split into PARTS chains of L = ceil(N/PARTS) flip-flops
// that lie side by side; chain_sel picks the one that receives shift_in and config_clk,
// and only that chain's flip-flops toggle while it is loaded. Chain p holds
// cfg[p*L .. p*L+L-1] (bits past N in the last chain are padding). Here the clock of the
// chains that are not selected is suppressed with a clock enable rather than a gated
// clock, which is equivalent at the register-transfer level. PARTS defaults to 1, the
// single chain used in the fabricated core. The configuration flip-flops have no reset:
// the core is meaningless until it has been loaded.
module plc_config_chain #(
  parameter int N     = 64,
  parameter int PARTS = 1,               // each chain needs at least 2 flip-flops
  localparam int L    = (N + PARTS - 1) / PARTS,
  localparam int CSW  = (PARTS <= 2) ? 1 : $clog2(PARTS)
) (
  input  logic           config_clk,
  input  logic           shift_in,
  input  logic [CSW-1:0] chain_sel,
  output logic           shift_out,
  output logic [N-1:0]   cfg
);
  logic [PARTS*L-1:0] ff;

  for (genvar p = 0; p < PARTS; p++) begin : g_chain
    logic en;
    assign en = (PARTS == 1) || (chain_sel == CSW'(p));
    always_ff @(posedge config_clk)
      if (en) ff[p*L +: L] <= {ff[p*L +: L-1], shift_in};
  end

  assign cfg = ff[N-1:0];
  always_comb begin
    shift_out = ff[L-1];
    for (int p = 0; p < PARTS; p++)
      if (PARTS == 1 || chain_sel == CSW'(p)) shift_out = ff[p*L + L-1];
  end
endmodule
