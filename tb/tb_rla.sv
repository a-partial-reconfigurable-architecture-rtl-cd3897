// tb_rla -- self-checking testbench of the reconfigurable logic area.
//
// Checks that a configuration selects the context and clears the area's
// flip-flops; that FFS shifts of the scan path return a state bit for bit in
// the order it went in; that the contexts read the inputs X from the top X_W
// flip-flops of the scanned-in word; that init loads the context's initial marking; that
// an execution of C0 matches the flat reference net; that the delayed
// transition of C1 marks p17 exactly D+2 executions after the one that
// starts it (D = 3 here); that
// the owned-place mask follows the loaded context; and that an unused
// context number leaves the area idle.
module tb_rla;
  import rlc_pkg::*;
  import elev_ref_pkg::*;

  localparam int unsigned D = 3;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        cfg_load = 0, scan_en = 0, scan_in = 0, scan_out, init_en = 0, exec_en = 0;
  ctx_id_t     cfg_ctx = '0, ctx;
  logic        ctx_valid;
  x_t          x;
  args_t       snap = '0, oar_d;
  flags_t      f_run = '0;
  logic [23:1] oar_pmask;

  rla #(.FFS(RLA_FFS), .D_T16(D)) dut (
    .clk, .rst_n, .cfg_load, .cfg_ctx, .scan_en, .scan_in, .scan_out,
    .init_en, .exec_en, .snap, .f_run, .oar_d, .oar_pmask, .ctx, .ctx_valid
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(ctx_id_t c);
    @(negedge clk); cfg_load = 1; cfg_ctx = c;
    @(negedge clk); cfg_load = 0;
  endtask

  // Shift a full state in (most significant bit first, so that flip-flop j
  // ends up holding v[j]) and collect the previous state the same way.
  task automatic scan(input logic [RLA_FFS-1:0] v, output logic [RLA_FFS-1:0] o);
    for (int i = 0; i < RLA_FFS; i++) begin
      @(negedge clk);
      scan_en = 1; scan_in = v[RLA_FFS-1-i];
      o[RLA_FFS-1-i] = scan_out;
    end
    @(negedge clk); scan_en = 0;
  endtask

  task automatic step(input bit init);
    @(negedge clk);
    if (init) init_en = 1; else exec_en = 1;
    @(negedge clk);
    init_en = 0; exec_en = 0;
  endtask

  initial begin
    logic [RLA_FFS-1:0] pat, got, zero;
    ref_state_t s, n;
    int own0[12] = '{1, 2, 3, 4, 6, 7, 8, 9, 11, 12, 13, 14};
    zero = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // context 0: configure, initial marking
    configure(CTX0);
    check(ctx == CTX0 && ctx_valid, "context 0 loaded");
    check(oar_pmask == P_MASK_C0, "mask of C0");
    step(1);
    check(oar_d.p == 23'(1 << 10), "C0 initial marking exports p11 only");

    // scan path round trip
    for (int i = 0; i < RLA_FFS; i += 32) pat[i +: 32] = $urandom;
    scan(pat, got);
    scan(zero, got);
    check(got == pat, "scan path returns the state in order");

    // one execution of C0 against the reference
    for (int k = 0; k < 200; k++) begin
      logic [RLA_FFS-1:0] st;
      st = '0;
      st[C0_SW-1:0] = C0_SW'($urandom);
      x = x_t'($urandom);
      if (k % 3 == 0) begin x.sp = 4'hf; x.pf = 1; end
      st[RLA_FFS-1 -: X_W] = x;
      f_run = flags_t'($urandom);
      scan(st, got);
      s = ref_init();
      s.m = '0;
      for (int i = 0; i < 12; i++) s.m[own0[i]] = st[i];
      s.fmd = f_run.fmd; s.fms = f_run.fms;
      n = ref_step(s, x, D);
      step(0);
      check((oar_d.p & P_MASK_C0) == (n.m & P_MASK_C0), $sformatf("C0 execution %0d", k));
      check(oar_d.f.fmd == n.fmd && oar_d.f.fms == n.fms, $sformatf("C0 flags %0d", k));
    end

    // context 1: configuration clears the flip-flops
    configure(CTX1);
    check(ctx == CTX1 && ctx_valid && oar_pmask == P_MASK_C1, "context 1 loaded");
    check(oar_d.p == '0, "flip-flops cleared by the configuration");
    scan(zero, got);
    check(got == '0, "all flip-flops cleared");

    // delayed transition: the execution that starts t16, then D+2 more until p17
    x = '0; x.sp = 4'hf; x.pf = 1;
    pat = '0; pat[3] = 1'b1;  // p16
    pat[RLA_FFS-1 -: X_W] = x;
    scan(pat, got);
    for (int e = 1; e <= D + 3; e++) begin
      step(0);
      check(oar_d.p[16] == 1'b0, "p16 emptied when t16 starts");
      check(oar_d.p[17] == (e == D + 3), $sformatf("p17 after %0d executions", e));
    end

    // scan has priority over execution
    @(negedge clk); scan_en = 1; exec_en = 1; scan_in = 0;
    @(negedge clk); scan_en = 0; exec_en = 0;
    check(oar_d.p[17] == 1'b0 && oar_d.p[18] == 1'b1, "scan shift (p17 moves to the next bit) wins over execution");

    // unused context number: area idle
    configure(CTX_W'(7));
    check(!ctx_valid && oar_pmask == '0, "unused context is not valid");
    step(1);
    check(oar_d.p == '0, "no initialisation in an unused context");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
