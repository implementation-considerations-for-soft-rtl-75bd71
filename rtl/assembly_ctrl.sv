// assembly_ctrl: the assembly-control state machine of the bridge, with its next-state
// logic implemented in the soft programmable logic core.
//
// A 4-bit state register (16 possible states; the fixed controller needed only 3 bits
// for its seven states, the fourth bit leaves room for new packet formats) and the 6
// status bits are captured on the falling edge of clk and form the 10 core inputs
// {status, state}. The core's 13 outputs are {control, next_state}: the control bits go
// straight to the datapath, which acts on the next rising edge, and the next state is
// loaded into the state register on that rising edge. The core thus has half a clock
// period to settle, and the machine behaves as an ordinary rising-edge Mealy machine whose
// status inputs are sampled half a cycle earlier. What the machine does is whatever the
// core is programmed to do (config_clk / shift_in); state and input register reset to 0.
module assembly_ctrl
  import tam_pkg::*;
#(
  parameter int D         = 8,
  parameter int W         = 3,
  parameter int CFG_PARTS = 1,
  localparam int CSW      = (CFG_PARTS <= 2) ? 1 : $clog2(CFG_PARTS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NSTAT-1:0] stat,
  output logic [NCTRL-1:0] ctrl,
  output logic [NSTATE-1:0] state,
  // configuration port of the soft-PLC
  input  logic             config_clk,
  input  logic             shift_in,
  input  logic [CSW-1:0]   chain_sel,
  output logic             shift_out
);
  localparam int NI = NSTATE + NSTAT;
  localparam int NO = NSTATE + NCTRL;

  logic [NI-1:0] pi_q;
  logic [NO-1:0] po;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) pi_q <= '0;
    else        pi_q <= {stat, state};

  plc_gradual_fabric #(.D(D), .W(W), .NI(NI), .NO(NO), .CFG_PARTS(CFG_PARTS)) u_plc (
    .config_clk, .shift_in, .chain_sel, .shift_out, .pi(pi_q), .po
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= '0;
    else        state <= po[NSTATE-1:0];

  assign ctrl = po[NO-1:NSTATE];
endmodule
