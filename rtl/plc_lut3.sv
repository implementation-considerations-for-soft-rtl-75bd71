// plc_lut3: 3-input lookup table of the soft-PLC, built only from standard cells.
//
// Eight configuration flip-flops (outside this module) hold the truth table; a tree of
// 2:1 multiplexers steered by the three LUT inputs picks one of them, as a synthesized
// LUT does when no custom SRAM/pass-transistor cell is available. in[0] steers the
// first (widest) mux level, in[2] the last. Purely combinational.
//
// Interface: tt[i] is the output for {in[2],in[1],in[0]} == i.
module plc_lut3 (
  input  logic [7:0] tt,
  input  logic [2:0] in,
  output logic       y
);
  logic [3:0] l1;
  logic [1:0] l2;

  always_comb begin
    for (int i = 0; i < 4; i++) l1[i] = in[0] ? tt[2*i+1] : tt[2*i];
    for (int i = 0; i < 2; i++) l2[i] = in[1] ? l1[2*i+1] : l1[2*i];
    y = in[2] ? l2[1] : l2[0];
  end
endmodule
