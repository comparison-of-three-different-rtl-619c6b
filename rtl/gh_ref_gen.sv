// gh_ref_gen: angle preprocessing and reference vector in the g-h frame.
//
// The g-h frame uses two axes 60 degrees apart, on which every switching
// vector has integer coordinates. All work is done in the first sector
// (0 .. 60 degrees): theta is split into the sector s = fix(theta/(pi/3)) and
// the remainder phi = theta - s*pi/3. Then
//   Valpha = k * cos(phi),  Vbeta = k * sin(phi),  k = (LEVELS-1)*(sqrt(3)/2)*m
//   Vg = Valpha - Vbeta/sqrt(3),                   Vh = 2*Vbeta/sqrt(3)
// cos(phi) is read from the same sine table at phi + pi/2. The sector start
// angles are ceil(s*65536/6), so phi is never negative. sqrt(3)/2,
// 1/sqrt(3) and 2/sqrt(3) are Q14 constants.
// Scale: k is chosen so that m means the same as in the alpha'-beta' path
// (line-to-line amplitude (LEVELS-1)*m levels, m = 1 reaching the circle
// inscribed in the hexagon). The published g-h equations state the length
// as 2*m for three levels, which is sqrt(3)/2 of the alpha'-beta' value for
// the same m; this design follows the alpha'-beta' scale for both paths.
//
// Interface: m unsigned Q14, theta 16-bit binary angle; s in 0..5, vg and vh
// signed Q14 in the first-sector frame. Combinational.
module gh_ref_gen
  import svpwm_pkg::*;
#(
  parameter int LEVELS = 3
) (
  input  logic [15:0]        m,
  input  logic [ANGLE_W-1:0] theta,
  output logic [2:0]         s,
  output fix_t               vg,
  output fix_t               vh
);

  logic [18:0]        theta6;
  logic [ANGLE_W-1:0] phi, phi_c;
  logic signed [16:0] sin_phi, cos_phi;
  fix_t               valpha, vbeta;
  logic signed [47:0] t_g, t_h;

  // quotient of theta / (pi/3): theta*6 / 65536
  assign theta6 = 19'(theta) * 19'd6;
  assign s      = theta6[18:16];
  assign phi    = theta - sector_start(s);
  assign phi_c  = phi + ANG_90;

  sin_lut u_sin (.angle(phi),   .two_sin(sin_phi));
  sin_lut u_cos (.angle(phi_c), .two_sin(cos_phi));

  function automatic fix_t scale(input logic [15:0] mm, input logic signed [16:0] s2);
    logic signed [47:0] p;
    p = $signed({32'd0, mm}) * 48'(s2) * 48'(LEVELS - 1);
    return fix_t'(p >>> (FRAC + 1));
  endfunction

  fix_t               ua, ub;
  logic signed [47:0] t_a, t_b;

  assign ua     = scale(m, cos_phi);
  assign ub     = scale(m, sin_phi);
  assign t_a    = 48'(ua) * 48'(SQRT3_2_Q14);
  assign t_b    = 48'(ub) * 48'(SQRT3_2_Q14);
  assign valpha = fix_t'(t_a >>> FRAC);
  assign vbeta  = fix_t'(t_b >>> FRAC);

  assign t_g = 48'(vbeta) * 48'(INV_SQRT3_Q14);
  assign t_h = 48'(vbeta) * 48'(TWO_INV_SQRT3_Q14);
  assign vg  = valpha - fix_t'(t_g >>> FRAC);
  assign vh  = fix_t'(t_h >>> FRAC);

endmodule
