// tb_oar -- self-checking testbench of the Output Arguments Register.
//
// Random loads with random place masks and flag loads, checked against a
// model register. Also checks that the register changes on the falling clock
// edge and not on the rising one, and that reset clears it.
module tb_oar;
  import rlc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, ld = 0, ld_flags = 0;
  args_t       d = '0, q, expq, held;
  logic [23:1] pmask = '0;

  oar dut (.clk, .rst_n, .ld, .ld_flags, .d, .pmask, .q);

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
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(q == '0, "reset clears the register");
    rst_n = 1;
    expq = '0;
    for (int k = 0; k < 2000; k++) begin
      // change the controls just after the falling edge
      @(negedge clk); #1;
      check(q == expq, $sformatf("value %0d", k));
      held     = expq;
      ld       = 1'($urandom);
      ld_flags = 1'($urandom);
      d        = args_t'({$urandom, $urandom});
      pmask    = ($urandom_range(0, 1) == 0) ? P_MASK_C0 : 23'($urandom);
      if (ld)       expq.p = (expq.p & ~pmask) | (d.p & pmask);
      if (ld_flags) expq.f = d.f;
      @(posedge clk); #1;
      check(q == held, "no change on the rising edge");
    end
    // explicit edge test
    @(negedge clk); #1;
    ld = 1; ld_flags = 1; pmask = '1; d = args_t'(~25'(q));
    @(posedge clk); #1;
    check(q == ~d, "rising edge does not load");
    @(negedge clk); #1;
    check(q == d, "falling edge loads");
    ld = 0; ld_flags = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
