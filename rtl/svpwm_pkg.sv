// svpwm_pkg: number formats, types and constants shared by the space vector
// PWM (SVPWM) datapath.
//
// Fixed point: reference components, fractions and on-times use Q14, so 1.0
// (one lattice step, or one full modulation period ts) is 2**14 = 16384.
// This matches the sine table, whose codes decode to 2*sin(x) in Q14.
// Angles are unsigned 16-bit binary angles: 65536 is one electrical turn.
// Mapping times handed to the PWM stage are 16-bit, 0 .. 65535, where 65535
// stands for the whole period ts (Q14 value times four, saturated).
// Lattice coordinates and phase levels are small signed/unsigned integers.
package svpwm_pkg;

  localparam int FRAC    = 14;
  localparam int ONE     = 1 << FRAC;          // 1.0 in Q14
  localparam int ANGLE_W = 16;
  localparam int FIX_W   = 24;                 // signed Q14 with 9 integer bits
  localparam int CRD_W   = 8;                  // lattice coordinate width
  localparam int LVL_W   = 8;                  // phase level width
  localparam int TMAP_W  = 16;                 // mapping time width
  localparam int TMAP_MAX = (1 << TMAP_W) - 1; // 65535 = ts

  // pi/3 as a binary angle, rounded (65536/6 = 10922.67)
  localparam logic [ANGLE_W-1:0] ANG_60 = 16'd10923;
  // pi/2 as a binary angle
  localparam logic [ANGLE_W-1:0] ANG_90 = 16'd16384;
  // sqrt(3)/2, 1/sqrt(3) and 2/sqrt(3) in Q14 (g-h path)
  localparam int SQRT3_2_Q14       = 14189;
  localparam int INV_SQRT3_Q14     = 9459;
  localparam int TWO_INV_SQRT3_Q14 = 18919;

  typedef logic signed [FIX_W-1:0]  fix_t;   // signed Q14 value
  typedef logic        [FRAC:0]     ton_t;   // on-time / boundary, 0 .. ONE
  typedef logic signed [CRD_W-1:0]  crd_t;   // integer lattice coordinate
  typedef logic        [LVL_W-1:0]  lvl_t;   // phase level 0 .. LEVELS-1
  typedef logic        [TMAP_W-1:0] tmap_t;  // IGBT mapping time

  typedef struct packed {
    crd_t x;
    crd_t y;
  } pt_t;

  // switching state (S_A, S_B, S_C): level of each phase leg
  typedef struct packed {
    lvl_t a;
    lvl_t b;
    lvl_t c;
  } state_t;

  // coordinate frame in which lattice points are expressed
  typedef enum logic {
    FRAME_AB = 1'b0,   // 45-degree rotated orthogonal alpha'-beta' frame
    FRAME_GH = 1'b1    // 60-degree g-h frame
  } frame_e;

  // first binary angle of sector s (ceil(s*65536/6)), so that
  // theta - sector_start(s) is never negative
  function automatic logic [ANGLE_W-1:0] sector_start(input logic [2:0] s);
    case (s)
      3'd0:    return 16'd0;
      3'd1:    return 16'd10923;
      3'd2:    return 16'd21846;
      3'd3:    return 16'd32768;
      3'd4:    return 16'd43691;
      default: return 16'd54614;
    endcase
  endfunction

endpackage
