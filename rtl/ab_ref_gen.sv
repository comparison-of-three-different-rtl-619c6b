// ab_ref_gen: reference vector in the alpha'-beta' frame.
//
// The alpha'-beta' frame is the alpha-beta plane scaled and turned by 45
// degrees so that every switching vector of the inverter lands on an integer
// point of an orthogonal grid (one step = one DC-link level). In this frame
// the reference vector needs only two sine look-ups and two products:
//   Va' = (LEVELS-1) * m * sin(theta + pi/3)
//   Vb' = (LEVELS-1) * m * sin(theta - pi/3)
// For three levels this is the published 2*m*sin(theta +/- pi/3); scaling by
// (LEVELS-1) so that the hexagon edge lies at LEVELS-1 grid steps for any
// level count is this design's generalisation. pi/3 is rounded to 10923/65536
// of a turn.
//
// Interface: m is the modulation depth in unsigned Q14 (1.0 = 16384),
// theta a 16-bit binary angle; va, vb are signed Q14. Combinational.
module ab_ref_gen
  import svpwm_pkg::*;
#(
  parameter int LEVELS = 3
) (
  input  logic [15:0]        m,
  input  logic [ANGLE_W-1:0] theta,
  output fix_t               va,
  output fix_t               vb
);

  logic [ANGLE_W-1:0] ang_p, ang_m;
  logic signed [16:0] sin_p, sin_m;

  assign ang_p = theta + ANG_60;
  assign ang_m = theta - ANG_60;

  sin_lut u_sin_p (.angle(ang_p), .two_sin(sin_p));
  sin_lut u_sin_m (.angle(ang_m), .two_sin(sin_m));

  // (LEVELS-1) * m * (2 sin) / 2, Q14 * Q14 -> Q14 by shifting 15
  function automatic fix_t scale(input logic [15:0] mm, input logic signed [16:0] s2);
    logic signed [47:0] p;
    p = $signed({32'd0, mm}) * 48'(s2) * 48'(LEVELS - 1);
    return fix_t'(p >>> (FRAC + 1));
  endfunction

  assign va = scale(m, sin_p);
  assign vb = scale(m, sin_m);

endmodule
