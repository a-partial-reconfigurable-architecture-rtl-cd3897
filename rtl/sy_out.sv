// sy_out -- Sy register and output functions S, in the fixed logic area.
//
// On the system clock CLK_S (here a one-cycle enable `clk_s` of the common
// clock, given once per operation cycle after the last context has run) the
// register copies the complete state held in the Output Arguments Register.
// The outputs Y are Boolean functions of that registered state, so Y changes
// only once per operation cycle, like the outputs of a PLC scan. The
// registered state is also the start-of-cycle snapshot that the contexts of
// the next operation cycle read for places and flags of other contexts.
//
// Output functions of the elevator (each output is the OR of the places
// labelled with it, or an external flag):
//   ICi = p(6+i)   APF = p13 | p18   MON = p14 | p22
//   APA = p15 | p19   AL = p10 | p19 | p20 | p23   FMD, FMS = flags
// None of them reads the inputs X directly, so X is not an input here.
module sy_out
  import rlc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clk_s,
  input  args_t oar_q,
  output args_t args_q,
  output y_t    y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     args_q <= '0;
    else if (clk_s) args_q <= oar_q;
  end

  always_comb begin
    y.ic  = args_q.p[9:6];
    y.apf = args_q.p[13] | args_q.p[18];
    y.mon = args_q.p[14] | args_q.p[22];
    y.apa = args_q.p[15] | args_q.p[19];
    y.al  = args_q.p[10] | args_q.p[19] | args_q.p[20] | args_q.p[23];
    y.fmd = args_q.f.fmd;
    y.fms = args_q.f.fms;
  end

endmodule
