// tb_elevator_ride -- the elevator controller driving a model of the lift.
//
// The reconfigurable controller (two contexts, reduced sizes: 16-clock
// reconfiguration, back-to-back operation cycles, t16 delay of 3 cycles)
// is closed in a loop with a simple plant, updated once per operation cycle:
//   cabin  position 0..3*STEPS; moves one step per cycle while MON is on,
//          up with FMS and down with FMD; SAi is set while it stands at
//          floor i
//   door   PA follows APA and PF follows APF after 2 cycles
//   landing doors always closed, no obstacle, no alarm button
// Ride: power-on with the cabin at floor 2; START; the controller must home
// the cabin to floor 0 and open the door; a landing call at floor 3 must
// take it up to floor 3, open the door and clear the indicator; a cabin
// call to floor 1 must take it down to floor 1. No alarm may ever sound,
// the motor must never run with the door open, and after every cycle state
// and outputs must equal the flat reference net.
module tb_elevator_ride;
  import rlc_pkg::*;
  import elev_ref_pkg::*;

  localparam int unsigned REC   = 16;
  localparam int unsigned D     = 3;
  localparam int          STEPS = 4;

  logic    clk = 1'b0, rst_n = 1'b0;
  x_t      x;
  y_t      y;
  logic    cfg_req, cfg_done, clk_s, init_done, overrun;
  ctx_id_t cfg_ctx, last_ctx;
  args_t   state_e;
  int      loads;

  rlc_top #(.CYCLE_CLKS(0), .D_T16(D)) dut (
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
    repeat (2000 * 1600) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // plant state
  int pos = 2 * STEPS, open_cnt = 0, close_cnt = 0;
  bit pa = 0, pf = 1;
  bit call3 = 0, call1 = 0;

  function automatic x_t sense();
    x_t v;
    v = '0;
    v.sp = 4'hf;
    v.pf = pf;
    v.pa = pa;
    v.start = 1'b1;
    for (int i = 0; i < 4; i++) v.sa[i] = (pos == i * STEPS);
    v.be[3] = call3;
    v.bi[1] = call1;
    return v;
  endfunction

  // one operation cycle of the controller and the reference
  ref_state_t s;
  int         ncyc = 0, up_moves = 0, down_moves = 0;
  task automatic cycle();
    x_t xa;
    ref_state_t n;
    xa = sense();
    x  = xa;
    @(posedge clk iff dut.x_load);
    @(posedge clk iff clk_s);
    @(posedge clk);
    ncyc++;
    n = ref_step(s, xa, D);
    check(state_e.p == n.m && state_e.f.fmd == n.fmd && state_e.f.fms == n.fms,
          $sformatf("cycle %0d: state equals the reference", ncyc));
    check(y == ref_outputs(n), $sformatf("cycle %0d: outputs", ncyc));
    s = n;
    check(!y.al, $sformatf("cycle %0d: no alarm", ncyc));
    check(!(y.mon && pa), $sformatf("cycle %0d: motor never runs with the door open", ncyc));
    // plant reacts to the outputs
    if (y.mon) begin
      if (y.fms && pos < 3 * STEPS) begin pos++; up_moves++; end
      else if (y.fmd && pos > 0)    begin pos--; down_moves++; end
    end
    if (y.apa) begin close_cnt = 0; if (open_cnt < 2) open_cnt++; if (open_cnt == 2) begin pa = 1; pf = 0; end end
    if (y.apf) begin open_cnt = 0;  if (close_cnt < 2) close_cnt++; if (close_cnt == 2) begin pa = 0; pf = 1; end end
    // a button is released once the controller has registered the call
    if (call3 && y.ic[3]) call3 = 0;
    if (call1 && y.ic[1]) call1 = 0;
  endtask

  initial begin
    int t;
    x = sense();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk iff clk_s);
    @(posedge clk);
    s = ref_init();

    // homing to floor 0 with the door opened
    t = 0;
    while (!(pos == 0 && pa) && t < 200) begin cycle(); t++; end
    check(pos == 0 && pa, "homed to floor 0 and opened the door");
    check(down_moves == 2 * STEPS, "homing drove down two floors");
    $display("homed after %0d cycles", ncyc);

    // landing call at floor 3
    call3 = 1;
    t = 0;
    while (!(pos == 3 * STEPS && pa) && t < 300) begin cycle(); t++; end
    check(pos == 3 * STEPS && pa, "reached floor 3 and opened the door");
    check(up_moves == 3 * STEPS, "travelled up three floors");
    cycle();
    check(!y.ic[3], "call indicator of floor 3 cleared");
    $display("at floor 3 after %0d cycles", ncyc);

    // cabin call to floor 1
    call1 = 1;
    t = 0;
    while (!(pos == STEPS && pa) && t < 300) begin cycle(); t++; end
    check(pos == STEPS && pa, "reached floor 1 and opened the door");
    check(down_moves == 2 * STEPS + 2 * STEPS, "travelled down two floors");
    cycle();
    check(!y.ic[1], "call indicator of floor 1 cleared");
    $display("at floor 1 after %0d cycles, %0d reconfigurations", ncyc, loads);
    check(!overrun, "no overrun with back-to-back cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
