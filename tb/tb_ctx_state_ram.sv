// tb_ctx_state_ram -- self-checking testbench of the context state RAM.
//
// Fills all 20,480 bits through the single port, then reads them back in a
// different order, checking the one-clock read latency and that a disabled
// port neither writes nor changes its read data.
module tb_ctx_state_ram;
  import rlc_pkg::*;

  localparam int unsigned DEPTH = MAX_CTX * RLA_FFS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0, en = 0, we = 0, wdata = 0, rdata;
  logic [AW-1:0] addr = '0;
  bit            model [DEPTH];

  ctx_state_ram dut (.clk, .en, .we, .addr, .wdata, .rdata);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic keep;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = AW'(a); wdata = 1'($urandom); model[a] = wdata;
    end
    // disabled port: no write
    @(negedge clk);
    en = 0; we = 1; addr = '0; wdata = ~model[0];
    @(negedge clk);
    we = 0;
    for (int k = 0; k < DEPTH; k++) begin
      int a;
      a = (k * 7919) % DEPTH;
      @(negedge clk);
      en = 1; addr = AW'(a);
      @(negedge clk);
      en = 0;
      check(rdata == model[a], $sformatf("read %0d", a));
      keep = rdata;
      @(negedge clk);
      check(rdata == keep, "read data held while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
