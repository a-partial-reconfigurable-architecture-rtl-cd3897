// rlc_pkg -- types and constants shared by the Reconfigurable Logic Controller.
//
// The controller runs a safe Temporal Petri Net (TPN): every place holds 0 or 1
// token and is stored in one flip-flop (one-hot style state encoding). The
// example net is an elevator controller with 23 places p1..p23, two internal
// flags (FMD: motor direction down, FMS: motor direction up), 22 binary inputs
// X and 10 outputs Y. The net is split into two contexts that take turns in
// the single reconfigurable area:
//   C0 = {p1..p4, p6..p9, p11..p14}  (floor-call memories and start-up homing)
//   C1 = {p5, p10, p15..p23}         (door, travel and alarm control)
// Place and signal names, the partition and the sizes 512 (flip-flops of the
// reconfigurable area) and 40 (largest number of contexts in a 10 ms cycle)
// follow the paper; the bit layout of the structs is this design's own.
package rlc_pkg;

  // Flip-flops available in the reconfigurable area (4 columns x 16 CLBs x 8).
  localparam int unsigned RLA_FFS = 512;
  // Largest number of contexts the fixed logic is sized for.
  localparam int unsigned MAX_CTX = 40;
  localparam int unsigned CTX_W   = $clog2(MAX_CTX);
  // Number of contexts of the elevator application.
  localparam int unsigned N_CTX   = 2;

  typedef logic [CTX_W-1:0] ctx_id_t;

  // State bits used by each context inside the reconfigurable area.
  // C0: its 12 places. C1: its 11 places, the start/finish flags of the
  // delayed transition t16 and its DLY_W-bit delay counter.
  localparam int unsigned DLY_W  = 16;
  localparam int unsigned C0_SW  = 12;
  localparam int unsigned C1_SW  = 11 + 2 + DLY_W;

  // Context numbers.
  localparam ctx_id_t CTX0 = CTX_W'(0);
  localparam ctx_id_t CTX1 = CTX_W'(1);

  // Internal flags F.
  typedef struct packed {
    logic fms;  // motor direction up
    logic fmd;  // motor direction down
  } flags_t;

  // Arguments of the output functions and of cross-context guards:
  // all place marks (p[k] is place pk) and the flags.
  typedef struct packed {
    flags_t      f;
    logic [23:1] p;
  } args_t;

  // Sensor inputs X of the elevator.
  typedef struct packed {
    logic [3:0] bi;     // cabin (internal) call buttons, floors 0..3
    logic [3:0] be;     // landing (external) call buttons, floors 0..3
    logic [3:0] sa;     // cabin at floor i
    logic [3:0] sp;     // landing door i closed (safety switch)
    logic       pf;     // cabin door closed
    logic       pa;     // cabin door open
    logic       start;  // start command
    logic       ep;     // obstacle in the door
    logic       bp;     // door-open button
    logic       ba;     // alarm button
  } x_t;

  // Input bits carried by the scan path into the reconfigurable area.
  localparam int unsigned X_W = $bits(x_t);

  // Actuator outputs Y.
  typedef struct packed {
    logic [3:0] ic;   // call indicator of floor i
    logic       apf;  // close the door
    logic       mon;  // motor on
    logic       apa;  // open the door
    logic       al;   // alarm
    logic       fmd;  // direction down (external flag)
    logic       fms;  // direction up (external flag)
  } y_t;

  // Places owned by each context (bit k set: place pk belongs to it).
  localparam logic [23:1] P_MASK_C0 = 23'b000_0000_0011_1101_1110_1111;
  localparam logic [23:1] P_MASK_C1 = 23'b111_1111_1100_0010_0001_0000;

  function automatic logic [23:1] place_mask(ctx_id_t c);
    case (c)
      CTX0:    return P_MASK_C0;
      CTX1:    return P_MASK_C1;
      default: return '0;
    endcase
  endfunction

endpackage
