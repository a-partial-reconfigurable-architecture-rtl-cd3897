// elev_ref_pkg -- flat reference model of the elevator Temporal Petri Net.
//
// One call of ref_step() is one firing step of the whole, unpartitioned net
// (all 23 places, both flags, the delayed transition t16), written
// transition by transition from the net's guards, input/output places and
// actions. The testbenches compare the partitioned hardware with it: one
// step here equals one operation cycle of the controller. All enabled
// transitions are evaluated on the old marking; marks are first removed,
// then placed; actions are applied in transition order.
package elev_ref_pkg;
  import rlc_pkg::*;

  typedef struct {
    bit [23:1]   m;
    bit          fmd, fms;
    bit          t16s, t16d;
    int unsigned cnt;
  } ref_state_t;

  function automatic ref_state_t ref_init();
    ref_state_t s;
    s.m = '0;
    s.m[11] = 1'b1;
    s.fmd = 0; s.fms = 0; s.t16s = 0; s.t16d = 0; s.cnt = 0;
    return s;
  endfunction

  typedef struct {
    bit [23:1] rm;   // marks removed
    bit [23:1] pl;   // marks placed
  } delta_t;

  function automatic void arc(ref delta_t d, input int i, input int o);
    d.rm[i] = 1'b1;
    d.pl[o] = 1'b1;
  endfunction

  function automatic ref_state_t ref_step(ref_state_t s, x_t x, int unsigned dly);
    ref_state_t n = s;
    delta_t     d;
    bit [23:1]  m = s.m;
    bit         sa0 = x.sa[0], sa1 = x.sa[1], sa2 = x.sa[2], sa3 = x.sa[3];
    bit         closed_all = x.sp[0] && x.sp[1] && x.sp[2] && x.sp[3] && x.pf;
    bit         g9, g23, g25;
    bit         f23 = 0, f24 = 0, f11 = 0, f13 = 0, f14 = 0;
    d.rm = '0;
    d.pl = '0;

    // call memories, one per floor
    for (int i = 0; i < 4; i++) begin
      if (m[1+i] && (x.bi[i] || x.be[i])) arc(d, 1+i, 6+i);
      if (m[6+i] && x.sa[i])              arc(d, 6+i, 1+i);
    end
    // alarm watch
    g9 = x.ba;
    for (int i = 0; i < 4; i++) if (!x.sp[i] && !x.sa[i]) g9 = 1;
    if (m[5]  &&  g9) arc(d, 5, 10);
    if (m[10] && !g9) arc(d, 10, 5);
    // start-up
    if (m[11])                  begin arc(d, 11, 12); f11 = 1; end
    if (m[12] && x.start)       arc(d, 12, 13);
    if (m[13] && closed_all)    begin arc(d, 13, 14); f13 = 1; end
    if (m[14] && sa0) begin
      d.rm[14] = 1;
      d.pl[15] = 1; d.pl[1] = 1; d.pl[2] = 1; d.pl[3] = 1; d.pl[4] = 1; d.pl[5] = 1;
      f14 = 1;
    end
    // door
    if (m[15] && x.pa) arc(d, 15, 16);
    if (m[16]) d.rm[16] = 1;                       // t16 starts
    if (s.t16d) d.pl[17] = 1;                      // t16 finishes
    if (m[17] && ((m[6] && !sa0) || (m[7] && !sa1) || (m[8] && !sa2) || (m[9] && !sa3)))
      arc(d, 17, 18);
    if (m[18]) begin
      if (x.pf && !x.bp && !x.ep)  arc(d, 18, 21);
      if (x.bp && !x.ep)           arc(d, 18, 15);
      if (x.ep)                    arc(d, 18, 19);
    end
    if (m[19] && x.pa)  arc(d, 19, 20);
    if (m[20] && !x.ep) arc(d, 20, 16);
    // direction choice
    g23 = 0;
    if (s.fmd) begin
      if (sa1 && m[6])            g23 = 1;
      if (sa2 && (m[6] || m[7]))  g23 = 1;
      if (sa3)                    g23 = 1;
    end
    if (s.fms) begin
      if (sa1 && !m[8] && !m[9])  g23 = 1;
      if (sa2 && !m[9])           g23 = 1;
      if (sa3)                    g23 = 1;
    end
    if (m[21]) begin
      if (g23) begin arc(d, 21, 22); f23 = 1; end
      else     begin arc(d, 21, 22); f24 = 1; end
    end
    // travel
    g25 = (m[6] && sa0) || (m[7] && sa1) || (m[8] && sa2) || (m[9] && sa3);
    if (m[22] && g25)                 arc(d, 22, 15);
    if (m[22] && !g25 && !closed_all) arc(d, 22, 23);
    if (m[23] && closed_all)          arc(d, 23, 22);

    n.m = (m & ~d.rm) | d.pl;

    // delayed transition t16 timer
    n.t16d = 0;
    if (m[16]) begin n.t16s = 1; n.cnt = dly; end
    if (s.t16s) begin
      if (s.cnt == 0) begin n.t16s = 0; n.t16d = 1; end
      else n.cnt = s.cnt - 1;
    end

    // actions in transition order
    if (f11) begin n.fmd = 0; n.fms = 0; end
    if (f13) n.fmd = 1;
    if (f14) n.fmd = 0;
    if (f23) begin n.fmd = 1; n.fms = 0; end
    if (f24) begin n.fms = 1; n.fmd = 0; end
    return n;
  endfunction

  function automatic y_t ref_outputs(ref_state_t s);
    y_t y;
    y.ic  = s.m[9:6];
    y.apf = s.m[13] | s.m[18];
    y.mon = s.m[14] | s.m[22];
    y.apa = s.m[15] | s.m[19];
    y.al  = s.m[10] | s.m[19] | s.m[20] | s.m[23];
    y.fmd = s.fmd;
    y.fms = s.fms;
    return y;
  endfunction

endpackage
