// tam_buffer_ctrl: buffer control, turning tam_buffer_mem into a FIFO between the TAM
// clock domain (wclk) and the IP-core clock domain (rclk), so that the two may run at
// different frequencies.
//
// Classic dual-clock FIFO: binary read and write pointers one bit wider than the address,
// each also kept in Gray code and passed to the other domain through a two-flip-flop
// synchronizer. full is computed in the write domain, empty in the read domain, both
// conservatively (a pointer seen across the boundary is at most two cycles old).
// push/pop are requests; a push while full or a pop while empty is ignored. wr_en is the
// accepted push, to be used as the memory write enable.
module tam_buffer_ctrl #(
  parameter int AW = 4        // address bits; DEPTH = 2**AW
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          push,
  output logic          full,
  output logic          wr_en,
  output logic [AW-1:0] waddr,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          pop,
  output logic          empty,
  output logic [AW-1:0] raddr
);
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wr_en   = push && !full;
  assign wbin_nx = wbin + (AW+1)'(wr_en);
  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  assign full  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign waddr = wbin[AW-1:0];

  // read domain
  assign rbin_nx = rbin + (AW+1)'(pop && !empty);
  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  assign empty = (rgray == wgray_r2);
  assign raddr = rbin[AW-1:0];
endmodule
