// oar -- Output Arguments Register (OAR), in the fixed logic area.
//
// Collects, context by context, the arguments of the output functions: the
// marks of every place and the internal flags. It is clocked on the falling
// edge of the context clock CLK_C, half a cycle after the rising edge on
// which the reconfigurable area executed (or initialised) a context, so it
// captures that context's new marks. Only the place bits owned by the loaded
// context (pmask) are written; the other contexts' bits keep their values.
// The flags are written from the area's flag results when ld_flags is set
// (after an execution, not after an initialisation). After the last context
// of an operation cycle the OAR holds the complete new state E = (M(P), F).
// The running flag values are fed back to the area so that the next context
// applies its actions on top of the earlier ones. Falling-edge clocking and
// the role follow the paper; the masking and the flag path are this
// design's choices. Reset clears everything (flags start at 0).
module oar
  import rlc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld,
  input  logic        ld_flags,
  input  args_t       d,
  input  logic [23:1] pmask,
  output args_t       q
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      if (ld)       q.p <= (q.p & ~pmask) | (d.p & pmask);
      if (ld_flags) q.f <= d.f;
    end
  end

endmodule
