// plc_pkg: shared sizing and configuration-bit layout of the Gradual-Architecture
// soft programmable logic core (soft-PLC).
//
// The core is a D x D array of 3-input lookup tables. Signals flow only from the
// primary inputs on the left to the primary outputs on the right. Between and around
// the D rows of LUTs run D+1 "track rows" of horizontal wires. In the first column every
// track row receives W tracks, each driven by an input multiplexer that picks one of the
// NI primary inputs. In every later column c (1..D-1) each track row gains one more track,
// driven by a route multiplexer that picks one of the D LUT outputs of column c-1, so the
// number of horizontal tracks grows from left to right.
//
// Candidate lists (index = value of the binary select):
//   input mux          : primary input 0..NI-1
//   LUT mux, column 0  : primary input 0..NI-1
//   LUT mux, column c>0: tracks of the track row below the LUT (0..T-1),
//                        tracks of the track row above (T..2T-1),
//                        LUT outputs of column c-1 (2T..2T+D-1),  T = W+c-1
//   route mux, col c>0 : LUT outputs of column c-1 (0..D-1)
//   output mux o       : sits in LUT row o mod D; tracks below (0..T-1), tracks above
//                        (T..2T-1) with T = W+D-1, last-column LUT outputs (2T..2T+D-1)
// A select value beyond the last candidate gives 0.
//
// Configuration-bit order (bit 0 is the first flip-flop after shift_in):
//   input-mux selects, column-0 LUT-mux selects, LUT-mux selects of columns 1..D-1,
//   route-mux selects of columns 1..D-1, LUT truth tables, output-mux selects.
// Every select is stored LSB first. The LUT truth table bit i is the output for
// inputs {in2,in1,in0} = i.
package plc_pkg;

  // Width of a binary select for an n-input multiplexer.
  function automatic int selw(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Tracks per track row seen by a LUT mux in column c (c >= 1), or by the output
  // muxes when c == D.
  function automatic int tracks_at(input int w, input int c);
    return w + c - 1;
  endfunction

  function automatic int lut_mux_n(input int d, input int w, input int ni, input int c);
    return (c == 0) ? ni : 2 * tracks_at(w, c) + d;
  endfunction

  function automatic int out_mux_n(input int d, input int w);
    return 2 * tracks_at(w, d) + d;
  endfunction

  // ---- configuration-bit offsets ----
  function automatic int off_in_mux(input int w, input int ni, input int t, input int k);
    return (t * w + k) * selw(ni);
  endfunction

  function automatic int off_lut_mux(input int d, input int w, input int ni,
                                     input int c, input int r, input int i);
    int base;
    base = (d + 1) * w * selw(ni);
    for (int cc = 0; cc < c; cc++) base += d * 3 * selw(lut_mux_n(d, w, ni, cc));
    return base + (r * 3 + i) * selw(lut_mux_n(d, w, ni, c));
  endfunction

  function automatic int off_route_mux(input int d, input int w, input int ni,
                                       input int c, input int t);
    // c in 1..d-1
    return off_lut_mux(d, w, ni, d, 0, 0) + ((c - 1) * (d + 1) + t) * selw(d);
  endfunction

  function automatic int off_lut(input int d, input int w, input int ni, input int c, input int r);
    return off_route_mux(d, w, ni, d, 0) + (c * d + r) * 8;
  endfunction

  function automatic int off_out_mux(input int d, input int w, input int ni, input int o);
    return off_lut(d, w, ni, d, 0) + o * selw(out_mux_n(d, w));
  endfunction

  function automatic int cfg_bits(input int d, input int w, input int ni, input int no);
    return off_out_mux(d, w, ni, no);
  endfunction

endpackage
