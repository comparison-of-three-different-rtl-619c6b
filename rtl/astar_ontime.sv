// astar_ontime: front end of the alpha*-beta* frame modulator, three levels.
//
// The alpha*-beta* method treats a three-level space as six overlapping
// two-level hexagons, one around each small vector V1..V6 (length 1,
// at 0, 60, ..., 300 degrees). This block:
//   1. forms the reference in the ordinary alpha-beta frame,
//      Va = sqrt(3) m cos(theta), Vb = sqrt(3) m sin(theta)
//      (two levels above zero: sqrt(3)/2 * (L-1) * m, the same length as in
//      the g-h path, so m = 1 touches the inscribed circle of the hexagon);
//   2. picks the centre Vo of the small hexagon (Table 5 of the method: a
//      band test on Vb and an angle window, tried in the order V1..V6);
//   3. moves the reference to that centre, V* = V - Vo;
//   4. finds the two-level sector s of V* (Table 6: sign of Vb*, and
//      |Vb*| against sqrt(3)|Va*|);
//   5. computes the two-level on-times with ts = 1:
//      ta = 2/sqrt(3) (Va* sin((s+1)pi/3) - Vb* cos((s+1)pi/3))
//      tb = 2/sqrt(3) (Vb* cos(s pi/3)     - Va* sin(s pi/3))
//      to = 1 - ta - tb
//      where ta belongs to the active vector at angle s*60 deg and tb to the
//      one at (s+1)*60 deg, measured from Vo.
// The sin/cos factors of step 5 are constants per sector (0, +-1,
// +-1/sqrt(3), +-2/sqrt(3)), so only constant multiplies are needed there.
//
// What follows the published method: Tables 5 and 6 and the on-time
// formulas. The printed ta formula uses Vb* in both terms; the Va* form
// above is the one that balances the volt-seconds. Own choices: Q14
// numbers, the angle windows tested on the table-grid angle (theta with its
// low 8 bits cleared, the angle the reference really has), the order in
// which overlapping Table 5 windows are tried, and
// clamping of rounding overshoot of the times to 0..1.
// Not included: the switching sequence, redundant-state choice and IGBT
// time mapping of this method, which are not described in enough detail to
// build; this block therefore does not drive a PWM stage.
//
// Interface: m (unsigned Q14), theta (16-bit binary angle) -> vo (1..6,
// index of the centre vector), s (0..5), ta, tb, to (Q14, sum = ONE),
// ref_a, ref_b (reference, signed Q14). Purely combinational.
module astar_ontime
  import svpwm_pkg::*;
(
  input  logic [15:0]        m,
  input  logic [ANGLE_W-1:0] theta,
  output logic [2:0]         vo,
  output logic [2:0]         s,
  output ton_t               ta,
  output ton_t               tb,
  output ton_t               to,
  output fix_t               ref_a,
  output fix_t               ref_b
);

  localparam int SQRT3_Q14 = 28378;          // sqrt(3)
  localparam logic [ANGLE_W-1:0] A60  = 16'd10923, A120 = 16'd21846, A180 = 16'd32768,
                                 A240 = 16'd43691, A300 = 16'd54614;

  logic signed [16:0] two_cos, two_sin;
  sin_lut u_cos (.angle(theta + 16'(ANG_90)), .two_sin(two_cos));
  sin_lut u_sin (.angle(theta),               .two_sin(two_sin));

  // Q14 x Q14 -> Q14 product
  function automatic fix_t mulq(input fix_t a, input fix_t b);
    logic signed [47:0] p;
    p = 48'(a) * 48'(b);
    return fix_t'(p >>> FRAC);
  endfunction

  // clamp a signed Q14 time to 0..ONE
  function automatic ton_t clampt(input fix_t t);
    if (t < 0)        return '0;
    else if (t > fix_t'(ONE)) return ton_t'(ONE);
    else              return ton_t'(t);
  endfunction

  fix_t va, vb, k, sq_lo, sq_hi, sq_nlo, sq_nhi, oa, ob, xa, xb, ax, bx, sq_ax;
  fix_t ta_f, tb_f, to_f;
  logic w1, w2, w3, w4, w5, w6, band1, band2, band3;
  logic [ANGLE_W-1:0] thq;
  logic [2:0] sn;

  // (2/sqrt(3)) sin(k pi/3) and (2/sqrt(3)) cos(k pi/3), Q14
  function automatic fix_t s2(input logic [2:0] i);
    case (i)
      3'd1, 3'd2: return fix_t'(ONE);
      3'd4, 3'd5: return -fix_t'(ONE);
      default:    return '0;
    endcase
  endfunction
  function automatic fix_t c2(input logic [2:0] i);
    case (i)
      3'd0, 3'd6: return fix_t'(TWO_INV_SQRT3_Q14);
      3'd1, 3'd5: return fix_t'(INV_SQRT3_Q14);
      3'd2, 3'd4: return -fix_t'(INV_SQRT3_Q14);
      default:    return -fix_t'(TWO_INV_SQRT3_Q14);
    endcase
  endfunction

  always_comb begin
    // 1. reference, length sqrt(3) m
    k  = mulq(fix_t'({8'd0, m}), fix_t'(SQRT3_Q14));
    va = fix_t'((48'(k) * 48'(two_cos)) >>> (FRAC + 1));
    vb = fix_t'((48'(k) * 48'(two_sin)) >>> (FRAC + 1));

    // 2. Table 5: band on Vb and angle window
    sq_lo  = mulq(va - fix_t'(ONE), fix_t'(SQRT3_Q14));   // sqrt(3)(Va-1)
    sq_hi  = mulq(va + fix_t'(ONE), fix_t'(SQRT3_Q14));   // sqrt(3)(Va+1)
    sq_nlo = -sq_hi;                                     // -sqrt(3)(Va+1)
    sq_nhi = -sq_lo;                                     // -sqrt(3)(Va-1)
    band1  = (vb < fix_t'(SQRT3_2_Q14)) && (vb > -fix_t'(SQRT3_2_Q14));
    band2  = (vb > sq_lo)  && (vb < sq_hi);
    band3  = (vb > sq_nlo) && (vb < sq_nhi);
    // windows use the grid angle the table actually produced
    thq = {theta[15:8], 8'h00};
    w1 = (thq < A60) || (thq >= A300);
    w2 = (thq != 16'd0) && (thq < A120);
    w3 = (thq >= A60) && (thq < A180);
    w4 = (thq >= A120) && (thq < A240);
    w5 = (thq > A180) && (thq < A300);
    w6 = (thq >= A240);
    if      (band1 && w1) begin vo = 3'd1; oa =  fix_t'(ONE);     ob = '0; end
    else if (band2 && w2) begin vo = 3'd2; oa =  fix_t'(ONE / 2); ob =  fix_t'(SQRT3_2_Q14); end
    else if (band3 && w3) begin vo = 3'd3; oa = -fix_t'(ONE / 2); ob =  fix_t'(SQRT3_2_Q14); end
    else if (band1 && w4) begin vo = 3'd4; oa = -fix_t'(ONE);     ob = '0; end
    else if (band2 && w5) begin vo = 3'd5; oa = -fix_t'(ONE / 2); ob = -fix_t'(SQRT3_2_Q14); end
    else if (band3 && w6) begin vo = 3'd6; oa =  fix_t'(ONE / 2); ob = -fix_t'(SQRT3_2_Q14); end
    else                  begin vo = 3'd1; oa =  fix_t'(ONE);     ob = '0; end  // outside the linear range

    // 3. reference seen from the new centre
    xa = va - oa;
    xb = vb - ob;

    // 4. Table 6
    ax    = (xa < 0) ? -xa : xa;
    bx    = (xb < 0) ? -xb : xb;
    sq_ax = mulq(ax, fix_t'(SQRT3_Q14));
    if (xb > 0) begin
      if (bx > sq_ax)  sn = 3'd1;
      else if (xa > 0) sn = 3'd0;
      else             sn = 3'd2;
    end else begin
      if (bx > sq_ax)  sn = 3'd4;
      else if (xa > 0) sn = 3'd5;
      else             sn = 3'd3;
    end
    s = sn;

    // 5. two-level on-times
    ta_f = mulq(xa, s2(sn + 3'd1)) - mulq(xb, c2(sn + 3'd1));
    tb_f = mulq(xb, c2(sn)) - mulq(xa, s2(sn));
    ta   = clampt(ta_f);
    tb   = clampt(tb_f);
    to_f = fix_t'(ONE) - fix_t'({9'd0, ta}) - fix_t'({9'd0, tb});
    to   = clampt(to_f);

    ref_a = va;
    ref_b = vb;
  end

endmodule
