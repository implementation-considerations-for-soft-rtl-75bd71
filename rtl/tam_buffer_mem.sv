// tam_buffer_mem: buffer memory of the bridge, a simple dual-port RAM of DEPTH words.
//
// The write port is synchronous to the TAM clock (wclk); the read port is asynchronous
// (combinational from raddr) so the FIFO built around it shows its head word without a
// read latency. Word width and depth are this design's choice; the memory holds whole
// packet words as they arrive from the TAM. No reset: the controller never reads an
// entry before it has been written.
module tam_buffer_mem #(
  parameter int DW    = 16,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
