// rlc_top -- Reconfigurable Logic Controller (RLC) for the elevator example.
//
// A Temporal Petri Net controller too large for the FPGA is cut into
// contexts that share one Reconfigurable Logic Area (RLA) in time. The Fixed
// Logic Area (FLA), never reconfigured, holds:
//   fsm_c          the scheduler: reconfigure, restore, execute, save, and
//                  the system clock pulse after the last context
//   ctx_state_ram  the saved context states (block RAM)
//   oar            the Output Arguments Register (falling edge of CLK_C)
//   sy_out         the Sy register (CLK_S) and the output functions Y
//   x image        a register that samples the inputs X at the start of each
//                  operation cycle, so all contexts of a cycle see the same X;
//                  it rotates by one bit per restore shift that carries X, so
//                  it is whole again after each context's X_W input shifts
// The RLA (rla) holds the 512 flip-flops of the reconfigurable columns, the
// scan path and the currently configured context circuit. The signals
// between FLA and RLA are the ones that cross the bus macros.
//
// Clocking: one clock `clk` (100 MHz in the paper) is the context clock
// CLK_C. The OAR uses its falling edge. The system clock CLK_S is the
// one-cycle enable `clk_s`, one per operation cycle (also brought out).
//
// The configuration port (SelectMap with an external configuration memory)
// is outside this RTL: cfg_req/cfg_ctx ask for context cfg_ctx to be loaded
// into the RLA and stay asserted until the port pulses cfg_done for one
// clock; the RLA switches to the new context on that pulse. In the
// paper a context load takes 0.24 ms, 24,000 clocks at 100 MHz.
//
// Timing per context: reconfiguration + 513 (restore) + 1 (execute) +
// 512 (save) clocks, plus 1 clock for clk_s after the last context. Outputs
// Y and the state E (`state_e`) change one clock after clk_s.
module rlc_top
  import rlc_pkg::*;
#(
  parameter int unsigned CYCLE_CLKS = 1_000_000,  // operation cycle, clocks (10 ms at 100 MHz)
  parameter int unsigned D_T16      = 12000       // t16 delay, operation cycles (2 min)
)(
  input  logic    clk,
  input  logic    rst_n,
  input  x_t      x,
  output y_t      y,
  // configuration port
  output logic    cfg_req,
  output ctx_id_t cfg_ctx,
  input  logic    cfg_done,
  // status
  output args_t   state_e,    // controller state E = (M(P), F) after the last cycle
  output logic    clk_s,      // system clock pulse: end of an operation cycle
  output logic    init_done,
  output logic    overrun
);

  localparam int unsigned AW = $clog2(MAX_CTX * RLA_FFS);

  logic          ram_en, ram_we, ram_rdata;
  logic [AW-1:0] ram_addr;
  logic          scan_en, scan_from_x, scan_from_ram, scan_in, scan_out;
  logic          init_en, exec_en, oar_ld, oar_ld_flags, x_load;
  x_t            x_img;
  args_t         oar_q, oar_d, snap;
  logic [23:1]   oar_pmask;
  ctx_id_t       rla_ctx;
  logic          rla_valid;

  fsm_c #(.NCTX(N_CTX), .FFS(RLA_FFS), .XW(X_W), .CYCLE_CLKS(CYCLE_CLKS), .AW(AW)) u_fsm (
    .clk, .rst_n,
    .cfg_req, .cfg_ctx, .cfg_done,
    .ram_en, .ram_we, .ram_addr,
    .scan_en, .scan_from_x, .scan_from_ram, .init_en, .exec_en,
    .oar_ld, .oar_ld_flags, .clk_s, .x_load,
    .init_done, .overrun
  );

  ctx_state_ram #(.DEPTH(MAX_CTX * RLA_FFS), .AW(AW)) u_ram (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .wdata(scan_out), .rdata(ram_rdata)
  );

  // Input image, sampled once per operation cycle and sent into the RLA
  // through the scan path, most significant bit first.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           x_img <= '0;
    else if (x_load)      x_img <= x;
    else if (scan_from_x) x_img <= x_t'({x_img[X_W-2:0], x_img[X_W-1]});
  end

  assign scan_in = scan_from_x ? x_img[X_W-1] : (scan_from_ram & ram_rdata);

  rla #(.FFS(RLA_FFS), .D_T16(D_T16)) u_rla (
    .clk, .rst_n,
    .cfg_load(cfg_done), .cfg_ctx,
    .scan_en, .scan_in, .scan_out,
    .init_en, .exec_en,
    .snap, .f_run(oar_q.f),
    .oar_d, .oar_pmask, .ctx(rla_ctx), .ctx_valid(rla_valid)
  );

  oar u_oar (
    .clk, .rst_n, .ld(oar_ld), .ld_flags(oar_ld_flags),
    .d(oar_d), .pmask(oar_pmask), .q(oar_q)
  );

  sy_out u_sy (
    .clk, .rst_n, .clk_s, .oar_q, .args_q(snap), .y
  );

  assign state_e = snap;

  // The scheduler and the area must agree on the loaded context when it runs.
  a_ctx_loaded: assert property (@(posedge clk) disable iff (!rst_n)
    (exec_en || init_en) |-> (rla_valid && rla_ctx == cfg_ctx));

endmodule
