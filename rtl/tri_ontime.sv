// tri_ontime: locate the reference in the lattice and compute on-times.
//
// Works the same in both integer frames (alpha'-beta' or g-h). The reference
// (vx, vy) lies in the unit cell whose lower-left corner is the origin point
// (floor(vx), floor(vy)). The cell's diagonal splits it into two triangles:
// with fractions fx, fy, the reference is in triangle I when fx + fy <= 1 and
// in triangle II otherwise. With ts = 1 the on-times need only adds:
//   I : Va=(ox,oy)     ta = 1-fx-fy   Vb=(ox+1,oy) tb = fx    Vc=(ox,oy+1) tc = fy
//   II: Vb=(ox+1,oy)   tb = 1-fy      Vc=(ox,oy+1) tc = 1-fx  Vd=(ox+1,oy+1) td = fx+fy-1
// The three on-times always add up to exactly ONE. These are the published
// general-level equations; nothing here is this design's own choice except
// the Q14 format.
//
// Interface: vx, vy signed Q14 -> origin, upper (1 = triangle II), the three
// vertices vtx[0..2] and their on-times ton[0..2] in Q14. Combinational.
module tri_ontime
  import svpwm_pkg::*;
(
  input  fix_t vx,
  input  fix_t vy,
  output pt_t  origin,
  output logic upper,
  output pt_t  vtx [3],
  output ton_t ton [3]
);

  crd_t            ox, oy;
  logic [FRAC-1:0] fx, fy;
  logic [FRAC+1:0] fsum;

  always_comb begin
    ox   = crd_t'(vx >>> FRAC);   // floor
    oy   = crd_t'(vy >>> FRAC);
    fx   = vx[FRAC-1:0];
    fy   = vy[FRAC-1:0];
    fsum = {2'b00, fx} + {2'b00, fy};
    upper = fsum > (FRAC+2)'(ONE);
    origin = '{x: ox, y: oy};
    if (!upper) begin
      vtx[0] = '{x: ox,      y: oy};
      vtx[1] = '{x: ox + 8'sd1, y: oy};
      vtx[2] = '{x: ox,      y: oy + 8'sd1};
      ton[0] = ton_t'((FRAC+2)'(ONE) - fsum);
      ton[1] = ton_t'(fx);
      ton[2] = ton_t'(fy);
    end else begin
      vtx[0] = '{x: ox + 8'sd1, y: oy};
      vtx[1] = '{x: ox,      y: oy + 8'sd1};
      vtx[2] = '{x: ox + 8'sd1, y: oy + 8'sd1};
      ton[0] = ton_t'(ONE) - ton_t'(fy);
      ton[1] = ton_t'(ONE) - ton_t'(fx);
      ton[2] = ton_t'(fsum - (FRAC+2)'(ONE));
    end
  end

endmodule
