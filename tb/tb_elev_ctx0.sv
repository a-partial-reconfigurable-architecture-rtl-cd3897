// tb_elev_ctx0 -- self-checking testbench of context C0.
//
// Drives random C0 states, inputs and flag values into the combinational
// context and compares its next state, flag results, exported marks and
// initial marking with one step of the flat reference net (elev_ref_pkg), in
// which all places outside C0 are empty. Each case is also checked for
// which transitions it exercised, so the run fails if one never fired.
module tb_elev_ctx0;
  import rlc_pkg::*;
  import elev_ref_pkg::*;

  localparam int unsigned N = 20000;

  logic [C0_SW-1:0] st, st_next, st_init;
  x_t               x;
  flags_t           f_run, f_next;
  logic [23:1]      marks;
  int               checks = 0, failures = 0;
  int               fired_t14 = 0, fired_t13 = 0, fired_call = 0;

  elev_ctx0 dut (.st, .x, .f_run, .st_next, .st_init, .f_next, .marks);

  // Own places of C0 in state-bit order.
  int own[12] = '{1, 2, 3, 4, 6, 7, 8, 9, 11, 12, 13, 14};

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
    ref_state_t s, n;
    #1;
    check(st_init == C0_SW'(12'b0001_0000_0000), "initial marking is {p11}");
    for (int k = 0; k < N; k++) begin
      st = C0_SW'($urandom);
      x  = x_t'($urandom);
      // make the "all doors closed" guard true now and then
      if ($urandom_range(0, 3) == 0) begin x.sp = 4'hf; x.pf = 1'b1; end
      f_run = flags_t'($urandom);
      s = ref_init();
      s.m = '0;
      for (int i = 0; i < 12; i++) s.m[own[i]] = st[i];
      s.fmd = f_run.fmd;
      s.fms = f_run.fms;
      n = ref_step(s, x, 1);
      #1;
      for (int i = 0; i < 12; i++) begin
        check(st_next[i] == n.m[own[i]], $sformatf("case %0d: p%0d next", k, own[i]));
        check(marks[own[i]] == st[i], $sformatf("case %0d: mark p%0d", k, own[i]));
      end
      check((marks & ~P_MASK_C0) == '0, "no foreign marks exported");
      check(f_next.fmd == n.fmd && f_next.fms == n.fms, $sformatf("case %0d: flags", k));
      if (s.m[14] && x.sa[0]) fired_t14++;
      if (s.m[13] && (&x.sp) && x.pf) fired_t13++;
      if (s.m[1] && (x.bi[0] || x.be[0])) fired_call++;
      #9;
    end
    check(fired_t14 > 0 && fired_t13 > 0 && fired_call > 0, "transitions exercised");
    $display("t13 fired %0d, t14 fired %0d, t1 fired %0d", fired_t13, fired_t14, fired_call);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
