// rla -- Reconfigurable Logic Area (RLA).
//
// The RLA is the part of the FPGA that is partially reconfigured: at any time
// it holds the circuit of exactly one context. Here it is modelled as its
// FFS flip-flops (512 in the paper's 4-column area), the serial scan path
// through them, and the combinational logic of the context that is currently
// configured, chosen by `ctx`. A configuration (cfg_load, one cycle, when the
// external configuration port reports completion) selects the new context
// and clears all flip-flops, as loading a new partial bitstream does; the
// context's state must therefore be restored through the scan path.
//
// The inputs X also arrive through the scan path, as the paper's context
// circuits do: the top X_W flip-flops (ff[FFS-1 -: X_W]) hold the input image
// shifted in at the start of each restore, MSB first, and the context reads X
// from there. The context state occupies the bottom flip-flops (ff[0] up).
//
// Operations, one per clock, in priority order (all on the rising clock edge,
// the context clock CLK_C):
//   cfg_load  switch to context cfg_ctx, clear the flip-flops
//   scan_en   shift the whole chain by one: ff <= {ff, scan_in}; scan_out is
//             the last flip-flop (ff[FFS-1]). FFS shifts restore or save a state.
//   init_en   load the context's initial marking M0
//   exec_en   one firing step of the context; the flag results are held in
//             f_q for the Output Arguments Register
// The outputs towards the fixed area (oar_d: own marks and flag results,
// oar_pmask: which place bits the loaded context owns) cross the bus macros.
// The context circuits come from the paper's elevator example; modelling
// reconfiguration as a selection among compiled-in contexts is this design's
// own choice, since the bitstream itself is outside RTL.
module rla
  import rlc_pkg::*;
#(
  parameter int unsigned FFS   = RLA_FFS,
  parameter int unsigned D_T16 = 12000
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_load,
  input  ctx_id_t     cfg_ctx,
  input  logic        scan_en,
  input  logic        scan_in,
  output logic        scan_out,
  input  logic        init_en,
  input  logic        exec_en,
  input  args_t       snap,
  input  flags_t      f_run,
  output args_t       oar_d,
  output logic [23:1] oar_pmask,
  output ctx_id_t     ctx,
  output logic        ctx_valid
);

  logic [FFS-1:0] ff;
  flags_t         f_q;
  x_t             x;

  assign x = x_t'(ff[FFS-1 -: X_W]);

  logic [C0_SW-1:0] c0_next, c0_init;
  logic [C1_SW-1:0] c1_next, c1_init;
  flags_t           c0_f, c1_f;
  logic [23:1]      c0_m, c1_m;

  elev_ctx0 u_c0 (
    .st(ff[C0_SW-1:0]), .x(x), .f_run(f_run),
    .st_next(c0_next), .st_init(c0_init), .f_next(c0_f), .marks(c0_m)
  );

  elev_ctx1 #(.D_T16(D_T16)) u_c1 (
    .st(ff[C1_SW-1:0]), .x(x), .snap(snap), .f_run(f_run),
    .st_next(c1_next), .st_init(c1_init), .f_next(c1_f), .marks(c1_m)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff        <= '0;
      f_q       <= '0;
      ctx       <= '0;
      ctx_valid <= 1'b0;
    end else if (cfg_load) begin
      ff        <= '0;
      ctx       <= cfg_ctx;
      ctx_valid <= (cfg_ctx < CTX_W'(N_CTX));
    end else if (scan_en) begin
      ff <= {ff[FFS-2:0], scan_in};
    end else if (init_en && ctx_valid) begin
      case (ctx)
        CTX0:    ff[C0_SW-1:0] <= c0_init;
        default: ff[C1_SW-1:0] <= c1_init;
      endcase
    end else if (exec_en && ctx_valid) begin
      case (ctx)
        CTX0: begin ff[C0_SW-1:0] <= c0_next; f_q <= c0_f; end
        default: begin ff[C1_SW-1:0] <= c1_next; f_q <= c1_f; end
      endcase
    end
  end

  assign scan_out    = ff[FFS-1];
  assign oar_d.p     = (ctx == CTX0) ? c0_m : c1_m;
  assign oar_d.f     = f_q;
  assign oar_pmask   = ctx_valid ? place_mask(ctx) : '0;

  initial begin
    if (FFS < C1_SW + X_W || FFS < C0_SW + X_W)
      $error("RLA has fewer flip-flops than a context and the inputs need");
  end

endmodule
