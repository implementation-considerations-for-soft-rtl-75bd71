// plc_cfg_mux: configurable routing multiplexer of the soft-PLC (input mux, LUT mux,
// route mux and output mux are all instances of it).
//
// The select is a binary number held in configuration flip-flops, so an N-input mux
// costs ceil(log2 N) of them. A select value of N or more (possible when N is not a power
// of two) drives 0, which is how an unused mux is parked. Purely combinational.
module plc_cfg_mux #(
  parameter int N  = 8,                       // number of candidate inputs
  parameter int SW = (N <= 2) ? 1 : $clog2(N) // select width
) (
  input  logic [N-1:0]  d,
  input  logic [SW-1:0] sel,
  output logic          y
);
  always_comb begin
    y = 1'b0;
    for (int i = 0; i < N; i++)
      if (sel == SW'(i)) y = d[i];
  end
endmodule
