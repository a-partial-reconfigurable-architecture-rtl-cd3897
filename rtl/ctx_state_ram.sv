// ctx_state_ram -- context state memory (Block SelectRAM) in the fixed area.
//
// Holds the saved internal state of every context between its executions:
// one bit per word, because the state travels through the serial scan path
// at one bit per clock. Context c uses words c*FFS .. c*FFS+FFS-1. The
// default depth, 40 contexts x 512 bits = 20480 bits, fits the two 18-kbit
// block RAMs the paper reports for the fixed area; the 1-bit organisation
// is this design's choice. Single port, synchronous: a read returns its data
// on the clock after `en`; a write stores wdata on the clock edge. The
// content is not reset: the scheduler writes every used context's initial
// state before reading it.
module ctx_state_ram
  import rlc_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_CTX * RLA_FFS,
  parameter int unsigned AW    = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic          wdata,
  output logic          rdata
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
