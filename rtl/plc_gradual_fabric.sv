// plc_gradual_fabric: synthesizable programmable logic core (soft-PLC) in the Gradual
// Architecture, a purely combinational LUT fabric meant for small functions such as the
// next-state logic of a state machine.
//
// Structure (see plc_pkg for the candidate lists and the bit layout):
//   * D columns x D rows of 3-LUTs, each a single LUT with no flip-flop.
//   * D+1 track rows; LUT row r lies between track row r (below) and r+1 (above).
//   * Column 0: every track row has W input muxes, each choosing one of the NI primary
//     inputs; each column-0 LUT chooses its three inputs directly from the primary inputs.
//   * Column c >= 1: each of the three inputs of a LUT chooses, through its LUT mux, among
//     the tracks of the two neighbouring track rows and all D LUT outputs of column c-1
//     (the vertical channel); one route mux per track row copies one LUT output of column
//     c-1 onto a new horizontal track, usable from column c+1 on and by the output muxes.
//     The LUT muxes therefore widen from left to right: with D=8, W=3 the widest has 26
//     inputs.
//   * NO output muxes; output o sits in LUT row o mod D and chooses among the last-column
//     LUT outputs and the tracks of its two neighbouring track rows.
//   * All select values and truth tables live in one configuration shift chain
//     (plc_config_chain), loaded serially through shift_in on config_clk.
//
// Timing: po is a combinational function of pi once the chain is loaded; config_clk only
// loads configuration. Defaults D=8, W=3, NI=10, NO=13 are the test-chip core (64 LUTs,
// 10 inputs, 13 outputs); W=3 is the value drawn in the architecture diagram and the one
// that makes the widest LUT mux 26 inputs wide. CFG_PARTS=1 is the single chain that was
// built; larger values split it as proposed for lower configuration power.
module plc_gradual_fabric
  import plc_pkg::*;
#(
  parameter int D         = 8,   // columns = rows of 3-LUTs
  parameter int W         = 3,   // input tracks per track row in the first column
  parameter int NI        = 10,  // primary inputs
  parameter int NO        = 13,  // primary outputs
  parameter int CFG_PARTS = 1,   // configuration chains
  localparam int NCFG     = cfg_bits(D, W, NI, NO),
  localparam int CSW      = (CFG_PARTS <= 2) ? 1 : $clog2(CFG_PARTS)
) (
  // configuration port
  input  logic           config_clk,
  input  logic           shift_in,
  input  logic [CSW-1:0] chain_sel,
  output logic           shift_out,
  // user-logic port
  input  logic [NI-1:0]  pi,
  output logic [NO-1:0]  po
);
  localparam int TMAX = W + D - 1;        // tracks per track row after the last column

  logic [NCFG-1:0] cfg;
  logic [D-1:0]    lut_o [D];             // lut_o[c][r]
  logic [TMAX-1:0] trk   [D+1];           // trk[t][k]

  plc_config_chain #(.N(NCFG), .PARTS(CFG_PARTS)) u_cfg (
    .config_clk, .shift_in, .chain_sel, .shift_out, .cfg
  );

  // ---- column 0: input muxes onto the first W tracks of every track row ----
  for (genvar t = 0; t <= D; t++) begin : g_in_row
    for (genvar k = 0; k < W; k++) begin : g_in
      localparam int O = off_in_mux(W, NI, t, k);
      plc_cfg_mux #(.N(NI)) u_mux (
        .d(pi), .sel(cfg[O +: selw(NI)]), .y(trk[t][k])
      );
    end
  end

  // ---- LUTs and their LUT muxes, column by column ----
  for (genvar c = 0; c < D; c++) begin : g_col
    localparam int NL = lut_mux_n(D, W, NI, c);
    localparam int T  = (c == 0) ? 1 : tracks_at(W, c);
    for (genvar r = 0; r < D; r++) begin : g_row
      logic [NL-1:0] cand;
      logic [2:0]    lin;
      if (c == 0) begin : g_first
        assign cand = pi;
      end else begin : g_later
        assign cand = {lut_o[c-1], trk[r+1][T-1:0], trk[r][T-1:0]};
      end
      for (genvar i = 0; i < 3; i++) begin : g_in
        localparam int O = off_lut_mux(D, W, NI, c, r, i);
        plc_cfg_mux #(.N(NL)) u_mux (.d(cand), .sel(cfg[O +: selw(NL)]), .y(lin[i]));
      end
      plc_lut3 u_lut (.tt(cfg[off_lut(D, W, NI, c, r) +: 8]), .in(lin), .y(lut_o[c][r]));
    end

    // route muxes of column c: one new track per track row, fed by column c-1
    if (c >= 1) begin : g_route
      for (genvar t = 0; t <= D; t++) begin : g_rt
        localparam int O = off_route_mux(D, W, NI, c, t);
        plc_cfg_mux #(.N(D)) u_mux (
          .d(lut_o[c-1]), .sel(cfg[O +: selw(D)]), .y(trk[t][W+c-1])
        );
      end
    end
  end

  // ---- output muxes ----
  for (genvar o = 0; o < NO; o++) begin : g_out
    localparam int R  = o % D;
    localparam int NM = out_mux_n(D, W);
    localparam int O  = off_out_mux(D, W, NI, o);
    plc_cfg_mux #(.N(NM)) u_mux (
      .d({lut_o[D-1], trk[R+1], trk[R]}), .sel(cfg[O +: selw(NM)]), .y(po[o])
    );
  end
endmodule
