// tb_asm_fsm_pkg: the packet-handling state machine that the testbenches program into
// the assembly controller's soft-PLC, in two forms:
//   * golden_step(): the machine written directly from its description, used as the
//     reference;
//   * map_fsm(): the same machine hand-mapped onto 3-LUTs of the Gradual-Architecture
//     core (the job a place-and-route tool would do), producing a bitstream.
//
// The machine (states in bits s1 s0; s2 s3 stay 0):
//   IDLE (0): a valid word is consumed; a header is latched and leads to HDR.
//   HDR  (1): zero-length packet -> IDLE; header for this core -> DATA; else -> SKIP.
//             With broadcast = 1 (the second user function) every packet goes to DATA.
//   DATA (2): when a word is valid and the core is ready it is consumed, written to the
//             core and counted; the last word pulses done and returns to IDLE.
//   SKIP (3): every valid word is consumed and counted; the last returns to IDLE.
// Core inputs: pi[3:0] = state, pi[4+ST_*] = status. Outputs: po[3:0] = next state,
// po[4+CT_*] = controls.
package tb_asm_fsm_pkg;
  import tam_pkg::*;
  import tb_plc_bits_pkg::*;

  typedef enum logic [NSTATE-1:0] {IDLE = NSTATE'(0), HDR = NSTATE'(1), DATA = NSTATE'(2), SKIP = NSTATE'(3)} fsm_e;

  function automatic void golden_step(input logic [NSTATE-1:0] st, input logic [NSTAT-1:0] s,
                                      input bit broadcast,
                                      output logic [NSTATE-1:0] ns, output logic [NCTRL-1:0] c);
    logic vld, hdr, match, last, rdy, zero;
    vld = s[ST_VLD]; hdr = s[ST_IS_HDR]; match = s[ST_MATCH];
    last = s[ST_LAST]; rdy = s[ST_RDY]; zero = s[ST_ZERO];
    c  = '0;
    ns = st;
    case (fsm_e'(st[1:0]))
      IDLE: begin
        ns = IDLE;
        if (vld) begin
          c[CT_POP] = 1;
          if (hdr) begin c[CT_LOAD] = 1; ns = HDR; end
        end
      end
      HDR:  ns = zero ? IDLE : (match || broadcast) ? DATA : SKIP;
      DATA: if (vld && rdy) begin
              c[CT_POP] = 1; c[CT_WE] = 1; c[CT_DEC] = 1;
              if (last) begin c[CT_DONE] = 1; ns = IDLE; end
            end
      SKIP: if (vld) begin
              c[CT_POP] = 1; c[CT_DEC] = 1;
              if (last) begin c[CT_DONE] = 1; ns = IDLE; end
            end
    endcase
    ns[3:2] = 2'b00;
  endfunction

  // truth tables, inputs a = in0, b = in1, c = in2
  typedef enum {T_ZERO, T_BUF, T_AND2, T_A_NB, T_NAND2, T_OR2, T_OR3,
                T_NA_NB_C, T_NA_B_C, T_AND3, T_A_NB_NC, T_OR2_AND_C, T_A_OR_B_NC} tt_e;

  function automatic logic [7:0] tt(tt_e f);
    logic [7:0] t;
    for (int v = 0; v < 8; v++) begin
      bit a = v[0], b = v[1], c = v[2];
      case (f)
        T_ZERO:      t[v] = 0;
        T_BUF:       t[v] = a;
        T_AND2:      t[v] = a & b;
        T_A_NB:      t[v] = a & ~b;
        T_NAND2:     t[v] = ~(a & b);
        T_OR2:       t[v] = a | b;
        T_OR3:       t[v] = a | b | c;
        T_NA_NB_C:   t[v] = ~a & ~b & c;
        T_NA_B_C:    t[v] = ~a & b & c;
        T_AND3:      t[v] = a & b & c;
        T_A_NB_NC:   t[v] = a & ~b & ~c;
        T_OR2_AND_C: t[v] = (a | b) & c;
        T_A_OR_B_NC: t[v] = a | (b & ~c);
        default:     t[v] = 0;
      endcase
    end
    return t;
  endfunction

  // Maps the machine onto a core with d >= 7 (rows 0..6 carry results) and w >= 2;
  // needs the 10-input/13-output wiring of assembly_ctrl.
  function automatic void map_fsm(PlcBits b, bit broadcast);
    localparam int S0 = 0, S1 = 1;
    localparam int VLD = 4 + ST_VLD, ISH = 4 + ST_IS_HDR, MAT = 4 + ST_MATCH,
                   LST = 4 + ST_LAST, RDY = 4 + ST_RDY, ZER = 4 + ST_ZERO;
    b.park();
    // column 0, straight from the primary inputs
    b.lut_from_pi(0, tt(T_NA_NB_C), S0, S1, VLD);   // idle & vld
    b.lut_from_pi(1, tt(T_NA_B_C),  S0, S1, VLD);   // data & vld
    b.lut_from_pi(2, tt(T_AND3),    S0, S1, VLD);   // skip & vld
    b.lut_from_pi(3, tt(T_A_NB_NC), S0, S1, ZER);   // hdr & ~zero
    b.lut_from_pi(4, tt(T_AND2),    S0, S1, S0);    // skip state
    b.lut_from_pi(5, tt(T_NAND2),   VLD, LST, VLD); // ~(vld & last)
    b.lut_from_pi(6, tt(T_BUF),     S1, S1, S1);    // s1
    b.lut_from_pi(7, tt(T_BUF),     LST, LST, LST); // last (spare copy)
    // primary inputs needed later, placed on input tracks
    b.set_in_mux(0, 0, RDY);
    b.set_in_mux(1, 0, ISH);
    b.set_in_mux(3, 0, MAT);
    b.set_in_mux(3, 1, LST);
    // column 1
    b.set_lut_mux(1, 0, 0, b.cand_prev(1, 1)); b.set_lut_mux(1, 0, 1, b.cand_below(1, 0));
    b.set_lut_mux(1, 0, 2, b.cand_prev(1, 1)); b.set_lut(1, 0, tt(T_AND2));          // go_data
    b.set_lut_mux(1, 1, 0, b.cand_prev(1, 0)); b.set_lut_mux(1, 1, 1, b.cand_below(1, 0));
    b.set_lut_mux(1, 1, 2, b.cand_prev(1, 0)); b.set_lut(1, 1, tt(T_AND2));          // load
    b.lut_from_prev(1, 2, tt(T_BUF), 2, 2, 2);                                         // go_skip
    b.set_lut_mux(1, 3, 0, b.cand_prev(1, 3)); b.set_lut_mux(1, 3, 1, b.cand_below(1, 0));
    b.set_lut_mux(1, 3, 2, b.cand_prev(1, 3));
    b.set_lut(1, 3, broadcast ? tt(T_ZERO) : tt(T_A_NB));                              // hdr->skip
    b.lut_from_prev(1, 4, tt(T_BUF), 0, 0, 0);                                         // idle & vld
    b.lut_from_prev(1, 5, tt(T_BUF), 3, 3, 3);                                         // hdr & ~zero
    b.lut_from_prev(1, 6, tt(T_AND2), 4, 5, 4);                                        // skip stays
    b.lut_from_prev(1, 7, tt(T_BUF), 6, 6, 6);                                         // s1
    // column 2
    b.lut_from_prev(2, 0, tt(T_OR3), 4, 0, 2);                                         // pop
    b.lut_from_prev(2, 1, tt(T_OR2), 0, 2, 0);                                         // dec
    b.lut_from_prev(2, 2, tt(T_BUF), 0, 0, 0);                                         // we
    b.set_lut_mux(2, 3, 0, b.cand_prev(2, 0)); b.set_lut_mux(2, 3, 1, b.cand_prev(2, 2));
    b.set_lut_mux(2, 3, 2, b.cand_below(2, 1)); b.set_lut(2, 3, tt(T_OR2_AND_C));    // done
    b.lut_from_prev(2, 4, tt(T_BUF), 1, 1, 1);                                         // load
    b.lut_from_prev(2, 5, tt(T_OR3), 1, 3, 6);                                         // next s0
    b.lut_from_prev(2, 6, tt(T_BUF), 7, 7, 7);                                         // s1
    b.lut_from_prev(2, 7, tt(T_BUF), 5, 5, 5);                                         // hdr & ~zero
    // column 3
    b.lut_from_prev(3, 0, tt(T_A_OR_B_NC), 7, 6, 3);                                   // next s1
    for (int r = 1; r <= 6; r++) b.lut_from_prev(3, r, tt(T_BUF), r - 1, r - 1, r - 1);
    // columns 4.. : carry every row straight across
    for (int c = 4; c < b.d; c++)
      for (int r = 0; r <= 6; r++) b.lut_from_prev(c, r, tt(T_BUF), r, r, r);
    // output muxes from the last column: row 0 next s1, 1 pop, 2 dec, 3 we, 4 done,
    // 5 load, 6 next s0
    b.set_out(0, b.cand_prev(b.d, 6));
    b.set_out(1, b.cand_prev(b.d, 0));
    b.set_out(4 + CT_POP,  b.cand_prev(b.d, 1));
    b.set_out(4 + CT_LOAD, b.cand_prev(b.d, 5));
    b.set_out(4 + CT_DEC,  b.cand_prev(b.d, 2));
    b.set_out(4 + CT_WE,   b.cand_prev(b.d, 3));
    b.set_out(4 + CT_DONE, b.cand_prev(b.d, 4));
  endfunction
endpackage
