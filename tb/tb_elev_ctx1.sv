// tb_elev_ctx1 -- self-checking testbench of context C1.
//
// Drives random C1 states (places, t16 start/finish flags, a small delay
// counter), inputs, snapshot marks of C0 (p6..p9, p14) and flag values into
// the combinational context and compares with one step of the flat
// reference net (elev_ref_pkg). Place and timer results are compared with a
// step in which p14 carries its snapshot value; flag results with a step in
// which p14 is empty, because the action of t14 belongs to C0. The delay of
// t16 is set to 5 here.
module tb_elev_ctx1;
  import rlc_pkg::*;
  import elev_ref_pkg::*;

  localparam int unsigned N = 20000;
  localparam int unsigned D = 5;

  logic [C1_SW-1:0] st, st_next, st_init;
  x_t               x;
  args_t            snap;
  flags_t           f_run, f_next;
  logic [23:1]      marks;
  int               checks = 0, failures = 0;
  int               t16_done = 0, t23 = 0, t24 = 0, t14 = 0;

  elev_ctx1 #(.D_T16(D)) dut (.st, .x, .snap, .f_run, .st_next, .st_init, .f_next, .marks);

  int own[11] = '{5, 10, 15, 16, 17, 18, 19, 20, 21, 22, 23};

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(N * 20 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t s, n, sb, nb;
    #1;
    check(st_init == '0, "initial marking is empty");
    for (int k = 0; k < N; k++) begin
      logic [10:0] pl;
      logic        ts, td;
      logic [2:0]  c;
      pl = 11'($urandom);
      ts = 1'($urandom);
      td = 1'($urandom);
      c  = 3'($urandom_range(0, 6));
      st = {DLY_W'(c), td, ts, pl};
      x  = x_t'($urandom);
      if ($urandom_range(0, 3) == 0) begin x.sp = 4'hf; x.pf = 1'b1; end
      snap = args_t'({$urandom, $urandom});
      f_run = snap.f;
      s = ref_init();
      s.m = '0;
      for (int i = 0; i < 11; i++) s.m[own[i]] = pl[i];
      s.m[9:6] = snap.p[9:6];
      s.m[14]  = snap.p[14];
      s.fmd = snap.f.fmd;
      s.fms = snap.f.fms;
      s.t16s = ts; s.t16d = td; s.cnt = c;
      n = ref_step(s, x, D);
      sb = s;
      sb.m[14] = 1'b0;
      nb = ref_step(sb, x, D);
      #1;
      for (int i = 0; i < 11; i++) begin
        check(st_next[i] == n.m[own[i]], $sformatf("case %0d: p%0d next", k, own[i]));
        check(marks[own[i]] == pl[i], $sformatf("case %0d: mark p%0d", k, own[i]));
      end
      check(st_next[11] == n.t16s && st_next[12] == n.t16d, $sformatf("case %0d: t16 flags", k));
      check(st_next[13 +: DLY_W] == DLY_W'(n.cnt), $sformatf("case %0d: t16 counter", k));
      check(f_next.fmd == nb.fmd && f_next.fms == nb.fms, $sformatf("case %0d: flags", k));
      check((marks & ~P_MASK_C1) == '0, "no foreign marks exported");
      if (td) t16_done++;
      if (s.m[21]) begin if (f_next.fmd && !f_next.fms) t23++; else t24++; end
      if (snap.p[14] && x.sa[0]) t14++;
      #9;
    end
    check(t16_done > 0 && t23 > 0 && t24 > 0 && t14 > 0, "transitions exercised");
    $display("t16 finished %0d, t23 %0d, t24 %0d, t14 %0d", t16_done, t23, t24, t14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
