// tb_rlc_top_full -- the controller at its full default sizes.
//
// rlc_top with no parameter changes: 512-flip-flop reconfigurable area,
// 20,480-bit state RAM, 10 ms operation cycle (1,000,000 clocks at 100 MHz),
// t16 delay of 12,000 cycles, and a configuration port model that takes
// 24,000 clocks (0.24 ms) per context. It runs the power-on initialisation
// and six operation cycles of the elevator, compares state E and outputs Y
// with the flat reference net after each, and checks the timing: the
// context sweep must take 2 x (24,001 + 513 + 1) + 512 + 1 clocks, about
// 0.5 ms, i.e. about 0.25 ms per context as the paper computes, and the
// operation cycle exactly 1,000,000 clocks.
module tb_rlc_top_full;
  import rlc_pkg::*;
  import elev_ref_pkg::*;

  localparam int unsigned REC   = 24000;
  localparam int unsigned CYCLE = 1_000_000;
  localparam int unsigned D     = 12000;
  localparam int unsigned NCYC  = 6;
  localparam int unsigned SWEEP = 1 + 2 * (REC + 1 + (RLA_FFS + 1) + 1) + RLA_FFS;

  logic    clk = 1'b0, rst_n = 1'b0;
  x_t      x;
  y_t      y;
  logic    cfg_req, cfg_done, clk_s, init_done, overrun;
  ctx_id_t cfg_ctx, last_ctx;
  args_t   state_e;
  int      loads;

  rlc_top dut (
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

  initial begin
    repeat (CYCLE * (NCYC + 2)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint clk_no = 0;
  always @(posedge clk) clk_no <= clk_no + 1;

  // A short elevator run: start, doors closed, cabin reaches floor 0, calls.
  function automatic x_t stimulus(int n);
    x_t v;
    v = '0;
    v.sp = 4'hf;
    v.pf = 1'b1;
    v.start = 1'b1;
    v.sa[0] = (n >= 2);
    v.be[2] = (n == 4);
    v.pa = (n >= 4);
    return v;
  endfunction

  initial begin
    ref_state_t s, n;
    x_t         xa;
    longint     t_prev, t_x, t_now;
    x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk iff clk_s);
    @(posedge clk);
    s = ref_init();
    check(state_e.p == s.m && state_e.f == '0, "state after initialisation is M0");
    t_prev = 0;
    for (int c = 0; c < NCYC; c++) begin
      xa = stimulus(c);
      x  = xa;
      @(posedge clk iff dut.x_load);
      t_x = clk_no;
      if (c > 0) check(t_x - t_prev == CYCLE, $sformatf("operation cycle %0d clocks", t_x - t_prev));
      t_prev = t_x;
      @(posedge clk iff clk_s);
      t_now = clk_no;
      check(t_now - t_x == SWEEP, $sformatf("sweep %0d clocks", t_now - t_x));
      @(posedge clk);
      n = ref_step(s, xa, D);
      check(state_e.p == n.m, $sformatf("cycle %0d: marking %h expected %h", c, state_e.p, n.m));
      check(state_e.f.fmd == n.fmd && state_e.f.fms == n.fms, $sformatf("cycle %0d: flags", c));
      check(y == ref_outputs(n), $sformatf("cycle %0d: outputs", c));
      s = n;
    end
    check(s.t16s && s.m[8] && s.m[1], "the run reached the door timer with a call pending");
    check(!overrun, "sweep fits in the 10 ms cycle");
    $display("sweep = %0d clocks (%0.3f ms at 100 MHz)", SWEEP, SWEEP / 100000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
