// fsm_c -- context scheduler FSM_C, in the fixed logic area.
//
// Runs the contexts C0 .. C(NCTX-1) in turn, forever. For each context:
//   CFG      request a partial reconfiguration of the RLA with the context
//            (cfg_req held with cfg_ctx until the configuration port
//            answers with a one-cycle cfg_done)
//   RESTORE  FFS+1 clocks: shift FFS bits into the RLA. The first XW shifts
//            carry the input image X (scan_from_x), the rest the saved state,
//            read bit by bit from the state RAM with one clock of latency
//   EXEC     one clock: the RLA fires the context once (rising CLK_C edge);
//            the OAR loads the results on the next falling edge
//   SYS      only after the last context: one clk_s pulse, the system clock
//            CLK_S, loads the Sy register and updates the outputs Y
//   SAVE     FFS clocks: shift the state out of the RLA into the state RAM
//            (the first XW bits out are the inputs and are not written)
// Before the first operation cycle, after reset, an initialisation sweep
// configures each context, loads its initial marking (INIT instead of
// RESTORE/EXEC), stores it and ends with a clk_s pulse. Each operation cycle
// starts with x_load, which samples the inputs X for the whole cycle.
//
// Cycle pacing (this design's choice): when CYCLE_CLKS > 0 a new operation
// cycle starts CYCLE_CLKS clocks after the previous one (1,000,000 clocks =
// 10 ms at 100 MHz), so that delays counted in operation cycles are times.
// If a sweep takes longer the next one starts at once and `overrun` is set.
// With CYCLE_CLKS = 0 cycles follow back to back. The four steps per
// context, the save/restore at one bit per clock and the single execution
// clock follow the paper.
module fsm_c
  import rlc_pkg::*;
#(
  parameter int unsigned NCTX       = N_CTX,
  parameter int unsigned FFS        = RLA_FFS,
  parameter int unsigned XW         = X_W,
  parameter int unsigned CYCLE_CLKS = 1_000_000,
  parameter int unsigned AW         = $clog2(MAX_CTX * RLA_FFS)
)(
  input  logic          clk,
  input  logic          rst_n,
  // configuration port
  output logic          cfg_req,
  output ctx_id_t       cfg_ctx,
  input  logic          cfg_done,
  // state RAM
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  // reconfigurable area
  output logic          scan_en,
  output logic          scan_from_x,    // restore: scan input is the next input bit
  output logic          scan_from_ram,  // restore: scan input is the RAM data
  output logic          init_en,
  output logic          exec_en,
  // fixed area registers
  output logic          oar_ld,
  output logic          oar_ld_flags,
  output logic          clk_s,
  output logic          x_load,
  // status
  output logic          init_done,
  output logic          overrun
);

  typedef enum logic [2:0] {S_CFG, S_RESTORE, S_INIT, S_EXEC, S_SYS, S_SAVE, S_PACE} state_t;

  localparam int unsigned CW = $clog2(FFS + 1);

  state_t        state;
  ctx_id_t       ctx;
  logic [CW-1:0] cnt;
  logic [31:0]   cyc_cnt;
  logic          init_phase;
  logic          oar_pend, oar_pend_f;
  logic          last_ctx;
  logic [AW-1:0] base;

  assign last_ctx = (ctx == CTX_W'(NCTX - 1));
  assign base     = AW'(ctx) * AW'(FFS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_CFG;
      ctx        <= '0;
      cnt        <= '0;
      cyc_cnt    <= '0;
      init_phase <= 1'b1;
      init_done  <= 1'b0;
      overrun    <= 1'b0;
      oar_pend   <= 1'b0;
      oar_pend_f <= 1'b0;
    end else begin
      oar_pend   <= 1'b0;
      oar_pend_f <= 1'b0;
      if (cyc_cnt != '1) cyc_cnt <= cyc_cnt + 1'b1;
      unique case (state)
        S_CFG: begin
          if (cfg_done) begin
            cnt   <= '0;
            state <= init_phase ? S_INIT : S_RESTORE;
          end
        end
        S_RESTORE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(FFS)) state <= S_EXEC;
        end
        S_INIT: begin
          oar_pend <= 1'b1;
          cnt      <= '0;
          state    <= last_ctx ? S_SYS : S_SAVE;
        end
        S_EXEC: begin
          oar_pend   <= 1'b1;
          oar_pend_f <= 1'b1;
          cnt        <= '0;
          state      <= last_ctx ? S_SYS : S_SAVE;
        end
        S_SYS: begin
          state <= S_SAVE;
        end
        S_SAVE: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(FFS - 1)) begin
            if (last_ctx) begin
              state <= S_PACE;
              if (init_phase) begin
                init_phase <= 1'b0;
                init_done  <= 1'b1;
                cyc_cnt    <= '1;  // first operation cycle starts at once
              end else if (CYCLE_CLKS != 0 && cyc_cnt >= 32'(CYCLE_CLKS) - 1) begin
                overrun <= 1'b1;
              end
            end else begin
              ctx   <= ctx + 1'b1;
              state <= S_CFG;
            end
          end
        end
        S_PACE: begin
          if (CYCLE_CLKS == 0 || cyc_cnt >= 32'(CYCLE_CLKS) - 1) begin
            ctx     <= '0;
            cyc_cnt <= '0;
            state   <= S_CFG;
          end
        end
        default: state <= S_CFG;
      endcase
    end
  end

  // The OAR is loaded on the falling edge that follows an execution, i.e.
  // in the first half of the cycle after EXEC or INIT.
  assign oar_ld       = oar_pend;
  assign oar_ld_flags = oar_pend_f;

  always_comb begin
    cfg_req       = (state == S_CFG);
    cfg_ctx       = ctx;
    ram_en        = 1'b0;
    ram_we        = 1'b0;
    ram_addr      = base;
    scan_en       = 1'b0;
    scan_from_x   = 1'b0;
    scan_from_ram = 1'b0;
    init_en       = (state == S_INIT);
    exec_en       = (state == S_EXEC);
    clk_s         = (state == S_SYS);
    x_load        = (state == S_PACE) &&
                    (CYCLE_CLKS == 0 || cyc_cnt >= 32'(CYCLE_CLKS) - 1);
    case (state)
      S_RESTORE: begin
        ram_en        = (cnt >= CW'(XW)) && (cnt < CW'(FFS));
        ram_addr      = base + AW'(cnt);
        scan_en       = (cnt != '0);
        scan_from_x   = (cnt != '0) && (cnt <= CW'(XW));
        scan_from_ram = (cnt > CW'(XW));
      end
      S_SAVE: begin
        ram_en   = (cnt >= CW'(XW));
        ram_we   = (cnt >= CW'(XW));
        ram_addr = base + AW'(cnt);
        scan_en  = 1'b1;
      end
      default: ;
    endcase
  end

  initial begin
    if (XW >= FFS) $error("the scan path is too short for the inputs");
  end

  // Handshake rule of the configuration port.
  a_cfg_done_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_done |-> cfg_req);

endmodule
