// selectmap_cfg_model -- behavioural model of the configuration port.
//
// Stands in for the FPGA's parallel SelectMap configuration interface fed by
// an external configuration memory, which loads a context's partial
// bitstream into the reconfigurable area. It is not synthesizable logic of
// the controller; it only reproduces the port's timing: when cfg_req is
// seen while idle, it waits REC_CLKS clocks (24,000 = 0.24 ms at 100 MHz for
// the 4-column area) and pulses cfg_done for one clock. It counts the loads
// and remembers the last context loaded.
module selectmap_cfg_model
  import rlc_pkg::*;
#(
  parameter int unsigned REC_CLKS = 24000
)(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cfg_req,
  input  ctx_id_t cfg_ctx,
  output logic    cfg_done,
  output int      loads,
  output ctx_id_t last_ctx
);
  int  cnt;
  logic busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      cnt      <= 0;
      cfg_done <= 1'b0;
      loads    <= 0;
      last_ctx <= '0;
    end else begin
      cfg_done <= 1'b0;
      if (!busy && cfg_req && !cfg_done) begin
        busy     <= 1'b1;
        cnt      <= 1;
        last_ctx <= cfg_ctx;
      end else if (busy) begin
        if (cnt >= int'(REC_CLKS) - 1) begin
          busy     <= 1'b0;
          cfg_done <= 1'b1;
          loads    <= loads + 1;
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end
endmodule
