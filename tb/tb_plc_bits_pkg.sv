// tb_plc_bits_pkg: testbench helpers for the soft-PLC.
//
// PlcBits holds one configuration bitstream of a D x D Gradual-Architecture core and
// offers setters for each configurable element (input mux, LUT mux, route mux, LUT
// truth table, output mux), plus a reference evaluator that computes the core outputs
// for given inputs straight from the bitstream, walking the architecture as described in
// plc_pkg. It plays the part of the place-and-route tool that produces the bitstream.
package tb_plc_bits_pkg;
  import plc_pkg::*;

  class PlcBits;
    int d, w, ni, no, n;
    bit bits[];

    function new(int d, int w, int ni, int no);
      this.d = d; this.w = w; this.ni = ni; this.no = no;
      n = cfg_bits(d, w, ni, no);
      bits = new[n];
      park();
    endfunction

    // every mux select all-ones (parks muxes whose width is not a power of two at 0),
    // every truth table 0
    function void park();
      foreach (bits[i]) bits[i] = 1'b1;
      for (int c = 0; c < d; c++)
        for (int r = 0; r < d; r++) set_lut(c, r, 8'h00);
    endfunction

    function void randomize_all();
      foreach (bits[i]) bits[i] = 1'($urandom);
    endfunction

    function void set_field(int off, int width, int val);
      for (int i = 0; i < width; i++) bits[off + i] = 1'((val >> i) & 1);
    endfunction

    function int get_field(int off, int width);
      int v = 0;
      for (int i = 0; i < width; i++) v |= int'(bits[off + i]) << i;
      return v;
    endfunction

    function void set_in_mux(int t, int k, int pi_idx);
      set_field(off_in_mux(w, ni, t, k), selw(ni), pi_idx);
    endfunction
    function void set_lut_mux(int c, int r, int i, int sel);
      set_field(off_lut_mux(d, w, ni, c, r, i), selw(lut_mux_n(d, w, ni, c)), sel);
    endfunction
    function void set_route(int c, int t, int src_row);
      set_field(off_route_mux(d, w, ni, c, t), selw(d), src_row);
    endfunction
    function void set_lut(int c, int r, logic [7:0] tt);
      set_field(off_lut(d, w, ni, c, r), 8, int'(tt));
    endfunction
    function void set_out(int o, int sel);
      set_field(off_out_mux(d, w, ni, o), selw(out_mux_n(d, w)), sel);
    endfunction

    // candidate index helpers for LUT muxes of column c >= 1 and for output muxes (c = d)
    function int cand_below(int c, int k); return k;                         endfunction
    function int cand_above(int c, int k); return tracks_at(w, c) + k;       endfunction
    function int cand_prev (int c, int r); return 2 * tracks_at(w, c) + r;   endfunction

    // LUT whose three inputs come from LUT outputs of the previous column (c >= 1)
    function void lut_from_prev(int c, int r, logic [7:0] tt, int s0, int s1, int s2);
      set_lut_mux(c, r, 0, cand_prev(c, s0));
      set_lut_mux(c, r, 1, cand_prev(c, s1));
      set_lut_mux(c, r, 2, cand_prev(c, s2));
      set_lut(c, r, tt);
    endfunction
    // column-0 LUT on three primary inputs
    function void lut_from_pi(int r, logic [7:0] tt, int p0, int p1, int p2);
      set_lut_mux(0, r, 0, p0);
      set_lut_mux(0, r, 1, p1);
      set_lut_mux(0, r, 2, p2);
      set_lut(0, r, tt);
    endfunction

    // ---- reference evaluation ----
    static function bit pick(bit cand[$], int sel);
      return (sel < cand.size()) ? cand[sel] : 1'b0;
    endfunction

    function void eval(input bit pi[], output bit po[]);
      bit trk[][$];      // trk[t] = list of track values, index k
      bit lo[][];        // lo[c][r]
      trk = new[d + 1];
      lo  = new[d];
      for (int t = 0; t <= d; t++) begin
        bit pis[$];
        foreach (pi[i]) pis.push_back(pi[i]);
        for (int k = 0; k < w; k++) trk[t].push_back(pick(pis, get_field(off_in_mux(w, ni, t, k), selw(ni))));
      end
      for (int c = 0; c < d; c++) begin
        lo[c] = new[d];
        for (int r = 0; r < d; r++) begin
          bit cand[$];
          int idx;
          if (c == 0) foreach (pi[i]) cand.push_back(pi[i]);
          else begin
            for (int k = 0; k < tracks_at(w, c); k++) cand.push_back(trk[r][k]);
            for (int k = 0; k < tracks_at(w, c); k++) cand.push_back(trk[r+1][k]);
            for (int j = 0; j < d; j++) cand.push_back(lo[c-1][j]);
          end
          idx = 0;
          for (int i = 0; i < 3; i++)
            idx |= int'(pick(cand, get_field(off_lut_mux(d, w, ni, c, r, i),
                                             selw(lut_mux_n(d, w, ni, c))))) << i;
          lo[c][r] = bits[off_lut(d, w, ni, c, r) + idx];
        end
        if (c >= 1)
          for (int t = 0; t <= d; t++) begin
            bit cand[$];
            for (int j = 0; j < d; j++) cand.push_back(lo[c-1][j]);
            trk[t].push_back(pick(cand, get_field(off_route_mux(d, w, ni, c, t), selw(d))));
          end
      end
      po = new[no];
      for (int o = 0; o < no; o++) begin
        bit cand[$];
        int r = o % d;
        for (int k = 0; k < tracks_at(w, d); k++) cand.push_back(trk[r][k]);
        for (int k = 0; k < tracks_at(w, d); k++) cand.push_back(trk[r+1][k]);
        for (int j = 0; j < d; j++) cand.push_back(lo[d-1][j]);
        po[o] = pick(cand, get_field(off_out_mux(d, w, ni, o), selw(out_mux_n(d, w))));
      end
    endfunction
  endclass
endpackage
