// elev_ctx0 -- context C0 of the elevator Temporal Petri Net.
//
// C0 holds the places p1..p4, p6..p9 (one call memory per floor: pi idle,
// p(i+5) call pending and indicator ICi lit) and p11..p14 (start-up: reset
// the direction flags, wait for START, close the doors, drive the cabin down
// to floor 0). Its transitions are t1..t8, t11..t14. t14 also marks p5 and
// p15, which belong to C1; C1 places those marks itself.
//
// The block is purely combinational: it is the logic that a partial
// reconfiguration loads into the reconfigurable area. It reads its 12 state
// bits from the area's flip-flops and returns the next state, which the area
// stores on the executing clock edge. Every enabled transition fires in the
// same step, as in a synchronous one-flip-flop-per-place translation:
//   next = (marks & ~consumed) | produced.
// Guards read the sampled inputs X. The action of t14 (Reset FMD) is done
// here, by the context that owns its input place; actions are applied in
// transition order to the running flag values f_run.
//
// State bit layout (this design's choice): bits 0..11 = p1 p2 p3 p4 p6 p7 p8
// p9 p11 p12 p13 p14. Initial marking M0 = {p11}.
module elev_ctx0
  import rlc_pkg::*;
(
  input  logic [C0_SW-1:0] st,       // current state from the area's flip-flops
  input  x_t               x,        // sampled inputs of this operation cycle
  input  flags_t           f_run,    // flag values before this context's actions
  output logic [C0_SW-1:0] st_next,  // state after one firing step
  output logic [C0_SW-1:0] st_init,  // initial marking M0
  output flags_t           f_next,   // flag values after this context's actions
  output logic [23:1]      marks     // own place marks at their global positions
);

  // Unpack the state into global place positions.
  logic [23:1] m;
  always_comb begin
    m = '0;
    m[1]  = st[0];  m[2]  = st[1];  m[3]  = st[2];  m[4]  = st[3];
    m[6]  = st[4];  m[7]  = st[5];  m[8]  = st[6];  m[9]  = st[7];
    m[11] = st[8];  m[12] = st[9];  m[13] = st[10]; m[14] = st[11];
  end
  assign marks = m;

  // Fire enables H_t = G_t and all input places marked.
  logic [3:0] h_call, h_serve;  // t1,t3,t5,t7 and t2,t4,t6,t8
  logic       h11, h12, h13, h14;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      h_call[i]  = m[1+i] & (x.bi[i] | x.be[i]);
      h_serve[i] = m[6+i] & x.sa[i];
    end
    h11 = m[11];
    h12 = m[12] & x.start;
    h13 = m[13] & (&x.sp) & x.pf;
    h14 = m[14] & x.sa[0];
  end

  logic [23:1] cons, prod, nm;
  always_comb begin
    cons = '0;
    prod = '0;
    for (int i = 0; i < 4; i++) begin
      if (h_call[i])  begin cons[1+i] = 1'b1; prod[6+i] = 1'b1; end
      if (h_serve[i]) begin cons[6+i] = 1'b1; prod[1+i] = 1'b1; end
    end
    if (h11) begin cons[11] = 1'b1; prod[12] = 1'b1; end
    if (h12) begin cons[12] = 1'b1; prod[13] = 1'b1; end
    if (h13) begin cons[13] = 1'b1; prod[14] = 1'b1; end
    if (h14) begin cons[14] = 1'b1; prod[4:1] = 4'hf; end
    nm = (m & ~cons) | prod;

    f_next = f_run;
    if (h11) begin f_next.fmd = 1'b0; f_next.fms = 1'b0; end  // t11: Reset(FMD,FMS)
    if (h13) f_next.fmd = 1'b1;                              // t13: Set(FMD)
    if (h14) f_next.fmd = 1'b0;                              // t14: Reset(FMD)
  end

  assign st_next = {nm[14], nm[13], nm[12], nm[11], nm[9], nm[8], nm[7], nm[6],
                    nm[4], nm[3], nm[2], nm[1]};
  assign st_init = C0_SW'(1) << 8;  // p11 marked

endmodule
