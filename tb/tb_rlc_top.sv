// tb_rlc_top -- end-to-end testbench of the reconfigurable controller.
//
// Runs the whole controller (scheduler, state RAM, reconfigurable area with
// both contexts, OAR, Sy register) against a behavioural configuration port
// and a random elevator environment, at reduced sizes: 16 clocks per
// reconfiguration, a 2,300-clock operation cycle and a t16 delay of 4 cycles.
// After every system clock pulse it compares the state E and the outputs Y
// with one step of the flat reference net, which proves that running the net
// as two time-multiplexed contexts gives the same behaviour as the whole net.
// It also checks the clocks per context switch and per operation cycle, and
// counts each mechanism (reconfiguration, restore, inputs X through the scan
// path, execution, save, OAR load,
// system clock, cycle pacing, initialisation, a transition crossing the two
// contexts, data passed between contexts, the delayed transition, flag
// actions in both contexts): one that never happens is a failure.
module tb_rlc_top;
  import rlc_pkg::*;
  import elev_ref_pkg::*;

  localparam int unsigned REC    = 16;
  localparam int unsigned CYCLE  = 2300;
  localparam int unsigned D      = 4;
  localparam int unsigned NCYC   = 1500;
  // clocks from the cycle start (x_load) to clk_s for two contexts: the
  // x_load clock, then per context REC+1 (handshake), FFS+1 (restore), 1
  // (execute), and FFS (save) between the two contexts
  localparam int unsigned SWEEP  = 1 + 2 * (REC + 1 + (RLA_FFS + 1) + 1) + RLA_FFS;

  logic    clk = 1'b0, rst_n = 1'b0;
  x_t      x;
  y_t      y;
  logic    cfg_req, cfg_done, clk_s, init_done, overrun;
  ctx_id_t cfg_ctx, last_ctx;
  args_t   state_e;
  int      loads;

  rlc_top #(.CYCLE_CLKS(CYCLE), .D_T16(D)) dut (
    .clk, .rst_n, .x, .y, .cfg_req, .cfg_ctx, .cfg_done,
    .state_e, .clk_s, .init_done, .overrun
  );

  selectmap_cfg_model #(.REC_CLKS(REC)) u_cfg (
    .clk, .rst_n, .cfg_req, .cfg_ctx, .cfg_done, .loads, .last_ctx
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters
  int n_restore = 0, n_save = 0, n_exec = 0, n_init = 0, n_oar = 0, n_clk_s = 0;
  int n_pace = 0, n_t14 = 0, n_feedback = 0, n_t16 = 0, n_flag_c0 = 0, n_flag_c1 = 0;
  int n_x_load = 0, n_x_scan = 0, n_x_bad = 0;
  logic restore_q = 1'b0, save_q = 1'b0, x_load_q = 1'b0;
  x_t   x_cap = '0;
  always @(posedge clk) begin
    // the inputs sampled at the cycle start must reach every context through
    // the scan path: compare the RLA's input flip-flops at each execution
    x_load_q <= dut.x_load;
    if (x_load_q) x_cap = dut.x_img;
    if (dut.exec_en) begin
      if (x_t'(dut.u_rla.ff[RLA_FFS-1 -: X_W]) == x_cap) n_x_scan++;
      else n_x_bad++;
    end
    restore_q <= dut.scan_from_ram;
    save_q    <= dut.u_fsm.ram_we;
    if (dut.scan_from_ram && !restore_q) n_restore++;
    if (dut.u_fsm.ram_we && !save_q)     n_save++;
    if (dut.exec_en) n_exec++;
    if (dut.init_en) n_init++;
    if (dut.oar_ld)  n_oar++;
    if (dut.x_load)  n_x_load++;
    if (init_done && dut.u_fsm.state == 3'd6 && !dut.x_load) n_pace++;
  end

  function automatic x_t env();
    x_t v;
    int f;
    v = '0;
    for (int i = 0; i < 4; i++) begin
      v.bi[i] = ($urandom_range(0, 19) == 0);
      v.be[i] = ($urandom_range(0, 19) == 0);
      v.sp[i] = ($urandom_range(0, 29) != 0);
    end
    f = $urandom_range(0, 7);
    if (f < 4) v.sa[f] = 1'b1;
    v.pf    = ($urandom_range(0, 9) != 0);
    v.pa    = ($urandom_range(0, 1) != 0);
    v.start = ($urandom_range(0, 3) != 0);
    v.ep    = ($urandom_range(0, 14) == 0);
    v.bp    = ($urandom_range(0, 14) == 0);
    v.ba    = ($urandom_range(0, 49) == 0);
    return v;
  endfunction

  initial begin
    #(10 * (CYCLE * (NCYC + 3) + 100000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t s, n;
    x_t         xa;
    longint     t_cs_prev, t_xl, t_now;
    int         cyc;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // initialisation sweep
    @(posedge clk iff clk_s);
    @(posedge clk);
    n_clk_s++;
    s = ref_init();
    check(state_e.p == s.m, "state after initialisation is M0");
    check(state_e.f == '0, "flags after initialisation");
    check(init_done == 1'b0, "init_done rises only after the last save");
    t_cs_prev = $time / 10;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      xa = env();
      x  = xa;
      @(posedge clk iff dut.x_load);
      t_xl = $time / 10;
      @(posedge clk iff clk_s);
      t_now = $time / 10;
      if (cyc > 0) check(t_now - t_cs_prev == CYCLE, $sformatf("cycle %0d: period %0d", cyc, t_now - t_cs_prev));
      check(t_now - t_xl == SWEEP, $sformatf("cycle %0d: sweep %0d clocks", cyc, t_now - t_xl));
      t_cs_prev = t_now;
      @(posedge clk);
      n_clk_s++;
      if (s.m[14] && xa.sa[0]) n_t14++;
      if ((s.m[17] && |(s.m[9:6] & ~xa.sa)) || (s.m[22] && |(s.m[9:6] & xa.sa))) n_feedback++;
      if (s.t16d) n_t16++;
      if (s.m[11] || s.m[13] || (s.m[14] && xa.sa[0])) n_flag_c0++;
      if (s.m[21]) n_flag_c1++;
      n = ref_step(s, xa, D);
      check(state_e.p == n.m, $sformatf("cycle %0d: marking %h expected %h", cyc, state_e.p, n.m));
      check(state_e.f.fmd == n.fmd && state_e.f.fms == n.fms, $sformatf("cycle %0d: flags", cyc));
      check(y == ref_outputs(n), $sformatf("cycle %0d: outputs", cyc));
      s = n;
    end
    check(!overrun, "no overrun");
    check(loads == 2 * (NCYC + 1), $sformatf("reconfigurations %0d", loads));
    $display("reconfig=%0d restore=%0d exec=%0d init=%0d save=%0d oar=%0d clk_s=%0d pace=%0d x_load=%0d",
             loads, n_restore, n_exec, n_init, n_save, n_oar, n_clk_s, n_pace, n_x_load);
    $display("inputs scanned in correctly=%0d wrongly=%0d", n_x_scan, n_x_bad);
    $display("cross-context t14=%0d feedback=%0d t16_done=%0d flagC0=%0d flagC1=%0d",
             n_t14, n_feedback, n_t16, n_flag_c0, n_flag_c1);
    check(n_restore > 0, "restore happened");
    check(n_x_scan == 2 * NCYC && n_x_bad == 0, "inputs reach every context through the scan path");
    check(n_save > 0, "save happened");
    check(n_exec == 2 * NCYC, "one execution per context and cycle");
    check(n_init == 2, "initialisation of both contexts");
    check(n_oar > 0, "OAR loaded");
    check(n_pace > 0, "cycle pacing waited");
    check(n_t14 > 0, "cross-context transition t14 fired");
    check(n_feedback > 0, "C1 used marks of C0");
    check(n_t16 > 0, "delayed transition completed");
    check(n_flag_c0 > 0 && n_flag_c1 > 0, "flag actions in both contexts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
