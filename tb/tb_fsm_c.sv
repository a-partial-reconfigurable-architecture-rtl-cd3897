// tb_fsm_c -- self-checking testbench of the context scheduler FSM_C.
//
// Runs the scheduler with 3 contexts, an 8-bit scan path (3 input bits), a 5-clock
// configuration port model and a 200-clock operation cycle, and follows it
// clock by clock (sampled at the falling edge): for every context the
// configuration request with the right context number, then in the
// initialisation sweep one init clock, in normal cycles FFS+1 restore clocks
// (XW shifts from the input image, then the context's RAM words in order,
// read one clock ahead of their shift), one execution clock; the OAR load in the following clock (with the
// flags only after an execution); one clk_s clock after the last context;
// FFS save clocks writing the context's words in order, except the XW
// input bits. It also checks the
// x_load pulse, the cycle period and init_done. A second scheduler with a
// 50-clock cycle, shorter than a sweep, must report an overrun.
module tb_fsm_c;
  import rlc_pkg::*;

  localparam int unsigned NC = 3, FFS = 8, XW = 3, REC = 5, CYC = 200, AW = 6, NCYC = 40;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          cfg_req, cfg_done, ram_en, ram_we, scan_en, scan_from_x, scan_from_ram;
  logic          init_en, exec_en, oar_ld, oar_ld_flags, clk_s, x_load, init_done, overrun;
  ctx_id_t       cfg_ctx, last_ctx;
  logic [AW-1:0] ram_addr;
  int            loads;

  fsm_c #(.NCTX(NC), .FFS(FFS), .XW(XW), .CYCLE_CLKS(CYC), .AW(AW)) dut (
    .clk, .rst_n, .cfg_req, .cfg_ctx, .cfg_done, .ram_en, .ram_we, .ram_addr,
    .scan_en, .scan_from_x, .scan_from_ram, .init_en, .exec_en, .oar_ld, .oar_ld_flags,
    .clk_s, .x_load, .init_done, .overrun
  );
  selectmap_cfg_model #(.REC_CLKS(REC)) u_cfg (
    .clk, .rst_n, .cfg_req, .cfg_ctx, .cfg_done, .loads, .last_ctx
  );

  // second scheduler whose cycle is too short
  logic          o_req, o_done, o_init_done, o_overrun;
  ctx_id_t       o_ctx, o_last;
  int            o_loads;
  logic          o_ram_en, o_ram_we, o_scan_en, o_sfx, o_sfr, o_init_en, o_exec_en;
  logic          o_oar_ld, o_oar_ldf, o_clk_s, o_x_load;
  logic [AW-1:0] o_addr;
  fsm_c #(.NCTX(NC), .FFS(FFS), .XW(XW), .CYCLE_CLKS(50), .AW(AW)) dut_short (
    .clk, .rst_n, .cfg_req(o_req), .cfg_ctx(o_ctx), .cfg_done(o_done),
    .ram_en(o_ram_en), .ram_we(o_ram_we), .ram_addr(o_addr),
    .scan_en(o_scan_en), .scan_from_x(o_sfx), .scan_from_ram(o_sfr), .init_en(o_init_en), .exec_en(o_exec_en),
    .oar_ld(o_oar_ld), .oar_ld_flags(o_oar_ldf), .clk_s(o_clk_s), .x_load(o_x_load),
    .init_done(o_init_done), .overrun(o_overrun)
  );
  selectmap_cfg_model #(.REC_CLKS(REC)) u_cfg_short (
    .clk, .rst_n, .cfg_req(o_req), .cfg_ctx(o_ctx), .cfg_done(o_done), .loads(o_loads), .last_ctx(o_last)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (CYC * (NCYC + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc_no = 0;
  always @(posedge clk) cyc_no <= cyc_no + 1;

  // Follow one context from its configuration request to its last save clock.
  task automatic follow(int c, bit init);
    bit last = (c == NC - 1);
    int base = c * FFS;
    @(negedge clk);
    check(cfg_req && cfg_ctx == CTX_W'(c), $sformatf("configuration request for context %0d", c));
    while (!cfg_done) begin
      check(cfg_req && !scan_en && !exec_en && !init_en, "waiting for the configuration");
      @(negedge clk);
    end
    @(negedge clk);
    if (init) begin
      check(init_en && !exec_en && !scan_en, "init clock");
    end else begin
      for (int k = 0; k <= FFS; k++) begin
        check(!ram_we && ram_en == (k >= XW && k < FFS) && scan_en == (k != 0) &&
              scan_from_x == (k >= 1 && k <= XW) && scan_from_ram == (k > XW),
              $sformatf("restore clock %0d", k));
        if (ram_en) check(ram_addr == AW'(base + k), $sformatf("restore address %0d", k));
        @(negedge clk);
      end
      check(exec_en && !init_en && !scan_en, "execution clock");
    end
    @(negedge clk);
    check(oar_ld && oar_ld_flags == !init, "OAR load after the execution");
    if (last) begin
      check(clk_s && !scan_en, "system clock after the last context");
      @(negedge clk);
    end
    for (int k = 0; k < FFS; k++) begin
      check(ram_en == (k >= XW) && ram_we == (k >= XW) && scan_en && !scan_from_ram &&
            !scan_from_x && ram_addr == AW'(base + k), $sformatf("save clock %0d", k));
      check(!clk_s && !exec_en, "nothing else while saving");
      if (k > 0 || last) check(!oar_ld, "single OAR load");
      @(negedge clk);
    end
  endtask

  initial begin
    longint t_prev, t_x;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) follow(c, 1);
    check(init_done, "init_done after the initialisation sweep");
    // the first cycle starts at once
    check(x_load, "x_load right after initialisation");
    t_prev = cyc_no;
    for (int n = 0; n < NCYC; n++) begin
      if (n > 0) begin
        while (!x_load) begin
          check(!cfg_req && !ram_en && !scan_en && !exec_en, "idle while pacing");
          @(negedge clk);
        end
        t_x = cyc_no;
        check(t_x - t_prev == CYC, $sformatf("cycle period %0d", t_x - t_prev));
        t_prev = t_x;
      end
      for (int c = 0; c < NC; c++) follow(c, 0);
    end
    check(!overrun, "no overrun with a long enough cycle");
    check(o_overrun, "overrun reported when the cycle is too short");
    check(loads == NC * (NCYC + 1), "one configuration per context and cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
