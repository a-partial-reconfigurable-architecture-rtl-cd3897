// elev_ctx1 -- context C1 of the elevator Temporal Petri Net.
//
// C1 holds the places p5, p10 (alarm watch on the landing doors), p15..p21
// (open the door, hold it open for the delay of t16, close it, react to the
// door button and to obstacles) and p22, p23 (travel, with an alarm stop when
// a door safety switch opens). Its transitions are t9, t10, t14 (placing only
// its own output marks p5 and p15) and t15..t27.
//
// The block is purely combinational, loaded into the reconfigurable area by a
// partial reconfiguration. Places of C0 that its guards or t14 read (p6..p9,
// p14) and the flag values its guards read come from the start-of-cycle
// snapshot `snap`, so that every context of one operation cycle sees the same
// state. Actions (Set/Reset of FMD, FMS by t23, t24) are applied to the
// running flag values f_run.
//
// t16 is a delayed transition, built as in the one-flip-flop-per-place
// translation: starting to fire removes the mark of p16, sets t16s and loads
// the counter with D_T16; while t16s is set the counter counts down once per
// execution and at zero t16s is cleared and t16d set; the execution after
// that clears t16d and marks p17. p17 is therefore marked D_T16+2 executions
// after t16 starts. One execution happens per operation cycle.
//
// State bit layout (this design's choice): bits 0..10 = p5 p10 p15 .. p23,
// bit 11 = t16s, bit 12 = t16d, bits 13.. = counter. M0 = no mark.
module elev_ctx1
  import rlc_pkg::*;
#(
  parameter int unsigned D_T16 = 12000  // delay of t16 in operation cycles (2 min / 10 ms)
)(
  input  logic [C1_SW-1:0] st,
  input  x_t               x,
  input  args_t            snap,     // start-of-cycle marks and flags
  input  flags_t           f_run,
  output logic [C1_SW-1:0] st_next,
  output logic [C1_SW-1:0] st_init,
  output flags_t           f_next,
  output logic [23:1]      marks
);

  logic [23:1]      m;
  logic             t16s, t16d;
  logic [DLY_W-1:0] cnt;
  always_comb begin
    m      = '0;
    m[5]   = st[0];
    m[10]  = st[1];
    m[23:15] = st[10:2];
    t16s   = st[11];
    t16d   = st[12];
    cnt    = st[13 +: DLY_W];
  end
  assign marks = m;

  // Places of C0 read by C1 guards, from the snapshot.
  logic [3:0] call;  // p6..p9: a call is pending at floor i
  logic       p14s;
  assign call = snap.p[9:6];
  assign p14s = snap.p[14];

  logic g9, g17, g23, g25, doors_ok;
  always_comb begin
    g9  = x.ba | (|(~x.sp & ~x.sa));
    g17 = |(call & ~x.sa);
    g25 = |(call & x.sa);
    g23 = (snap.f.fmd & ((x.sa[1] & call[0]) | (x.sa[2] & (call[0] | call[1])) | x.sa[3])) |
          (snap.f.fms & ((x.sa[1] & ~call[2] & ~call[3]) | (x.sa[2] & ~call[3]) | x.sa[3]));
    doors_ok = (&x.sp) & x.pf;
  end

  logic h9, h10, h14, h15, h16, h17, h18, h19, h20, h21, h22, h23, h24, h25, h26, h27;
  always_comb begin
    h9  = m[5]  & g9;
    h10 = m[10] & ~g9;
    h14 = p14s  & x.sa[0];
    h15 = m[15] & x.pa;
    h16 = m[16];
    h17 = m[17] & g17;
    h18 = m[18] & x.pf & ~x.bp & ~x.ep;
    h19 = m[18] & x.bp & ~x.ep;
    h20 = m[18] & x.ep;
    h21 = m[19] & x.pa;
    h22 = m[20] & ~x.ep;
    h23 = m[21] & g23;
    h24 = m[21] & ~g23;
    h25 = m[22] & g25;
    h26 = m[22] & ~g25 & ~doors_ok;
    h27 = m[23] & doors_ok;
  end

  logic [23:1]      cons, prod, nm;
  logic             n16s, n16d;
  logic [DLY_W-1:0] ncnt;
  always_comb begin
    cons = '0;
    prod = '0;
    if (h9)  begin cons[5]  = 1'b1; prod[10] = 1'b1; end
    if (h10) begin cons[10] = 1'b1; prod[5]  = 1'b1; end
    if (h14) begin prod[15] = 1'b1; prod[5]  = 1'b1; end
    if (h15) begin cons[15] = 1'b1; prod[16] = 1'b1; end
    if (h16) begin cons[16] = 1'b1; end
    if (t16d) begin prod[17] = 1'b1; end
    if (h17) begin cons[17] = 1'b1; prod[18] = 1'b1; end
    if (h18) begin cons[18] = 1'b1; prod[21] = 1'b1; end
    if (h19) begin cons[18] = 1'b1; prod[15] = 1'b1; end
    if (h20) begin cons[18] = 1'b1; prod[19] = 1'b1; end
    if (h21) begin cons[19] = 1'b1; prod[20] = 1'b1; end
    if (h22) begin cons[20] = 1'b1; prod[16] = 1'b1; end
    if (h23) begin cons[21] = 1'b1; prod[22] = 1'b1; end
    if (h24) begin cons[21] = 1'b1; prod[22] = 1'b1; end
    if (h25) begin cons[22] = 1'b1; prod[15] = 1'b1; end
    if (h26) begin cons[22] = 1'b1; prod[23] = 1'b1; end
    if (h27) begin cons[23] = 1'b1; prod[22] = 1'b1; end
    nm = (m & ~cons) | prod;

    // Delayed transition t16.
    n16s = t16s;
    n16d = 1'b0;
    ncnt = cnt;
    if (h16) begin
      n16s = 1'b1;
      ncnt = DLY_W'(D_T16);
    end
    if (t16s) begin
      if (cnt == '0) begin
        n16s = 1'b0;
        n16d = 1'b1;
      end else begin
        ncnt = cnt - 1'b1;
      end
    end

    f_next = f_run;
    if (h23) begin f_next.fmd = 1'b1; f_next.fms = 1'b0; end  // t23: Set(FMD) Reset(FMS)
    if (h24) begin f_next.fms = 1'b1; f_next.fmd = 1'b0; end  // t24: Set(FMS) Reset(FMD)
  end

  assign st_next = {ncnt, n16d, n16s, nm[23:15], nm[10], nm[5]};
  assign st_init = '0;

  initial begin
    if (D_T16 >= (1 << DLY_W)) $error("D_T16 does not fit the %0d-bit delay counter", DLY_W);
  end

endmodule
