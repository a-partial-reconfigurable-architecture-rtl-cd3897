// tb_sy_out -- self-checking testbench of the Sy register and output functions.
//
// Random OAR contents; the register must take them only when clk_s is set,
// and every output must equal the OR of the places labelled with it (or the
// flag), computed here place by place.
module tb_sy_out;
  import rlc_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, clk_s = 0;
  args_t oar_q = '0, args_q, held;
  y_t    y;

  sy_out dut (.clk, .rst_n, .clk_s, .oar_q, .args_q, .y);

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
    check(args_q == '0 && y == '0, "reset");
    rst_n = 1;
    held = '0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      oar_q = args_t'({$urandom, $urandom});
      clk_s = ($urandom_range(0, 2) == 0);
      if (clk_s) held = oar_q;
      @(posedge clk); #1;
      check(args_q == held, $sformatf("register %0d", k));
      for (int i = 0; i < 4; i++) check(y.ic[i] == held.p[6+i], "IC");
      check(y.apf == (held.p[13] || held.p[18]), "APF");
      check(y.mon == (held.p[14] || held.p[22]), "MON");
      check(y.apa == (held.p[15] || held.p[19]), "APA");
      check(y.al  == (held.p[10] || held.p[19] || held.p[20] || held.p[23]), "AL");
      check(y.fmd == held.f.fmd && y.fms == held.f.fms, "direction flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
