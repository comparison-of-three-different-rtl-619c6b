// svpwm_gh: SVPWM modulator in the 60-degree g-h frame.
//
// Same job and same interface timing as svpwm_ab, reached the other way:
//   stage 1  sector s = fix(theta/(pi/3)), remainder phi, and the reference
//            in the first sector, Vg = Va - Vb/sqrt(3), Vh = 2 Vb/sqrt(3)
//            with Va = (L-1) m cos(phi), Vb = (L-1) m sin(phi) (gh_ref_gen)
//   stage 2  triangle location and on-times in the first sector
//            (tri_ontime), switching states turned into sector s (vec_seq)
//   stage 3  mapping times                                     (time_map)
// 'start' captures m and theta, 'valid' pulses three clocks later; a new
// start may be given every clock. The pipeline is this design's choice. All
// outputs (times, reference, sector, triangle data) change together, with
// 'valid'.
//
// For three levels it also reports the triangle number n (1..24) in the
// published numbering: n = 4s+1 for the inner triangle I of the sector,
// 4s+2 for the inner triangle II, 4s+3 for the outer triangle at g = 1 and
// 4s+4 for the one at h = 1. For other level counts n reads 0.
module svpwm_gh
  import svpwm_pkg::*;
#(
  parameter int LEVELS = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [15:0]        m,
  input  logic [ANGLE_W-1:0] theta,
  output logic               valid,
  output tmap_t              tmap [3][LEVELS-1],
  output fix_t               ref_g,
  output fix_t               ref_h,
  output logic [2:0]         sector,
  output pt_t                origin,
  output logic               upper,
  output logic [4:0]         tri_n
);

  // stage 1
  fix_t       vg_c, vh_c;
  logic [2:0] s_c;
  logic       v1;
  gh_ref_gen #(.LEVELS(LEVELS)) u_ref (.m(m), .theta(theta), .s(s_c),
                                       .vg(vg_c), .vh(vh_c));

  // stage 2
  fix_t       rg1, rh1, rg2, rh2;
  pt_t        org2;
  logic       up2;
  pt_t        org_c;
  logic       up_c;
  pt_t        vtx_c [3];
  ton_t       ton_c [3];
  state_t     seq_c [4];
  ton_t       bnd_c [3];
  state_t     seq_q [4];
  ton_t       bnd_q [3];
  logic       v2;
  logic [4:0] n_c, n2;
  logic [2:0] s1, s2;
  tri_ontime u_tri (.vx(rg1), .vy(rh1), .origin(org_c), .upper(up_c),
                    .vtx(vtx_c), .ton(ton_c));
  vec_seq #(.LEVELS(LEVELS), .FRAME(FRAME_GH)) u_seq (
    .vtx(vtx_c), .ton(ton_c), .s(s1), .seq(seq_c), .bnd(bnd_c),
    .start_idx());

  always_comb begin
    n_c = 5'd0;
    if (LEVELS == 3) begin
      if (org_c.x != 0)      n_c = 5'd3;
      else if (org_c.y != 0) n_c = 5'd4;
      else                   n_c = up_c ? 5'd2 : 5'd1;
      n_c = n_c + {s1, 2'b00};
    end
  end

  // stage 3
  tmap_t tmap_c [3][LEVELS-1];
  time_map #(.LEVELS(LEVELS)) u_map (.seq(seq_q), .bnd(bnd_q), .tmap(tmap_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; valid <= 1'b0;
      ref_g <= '0; ref_h <= '0;
      rg1 <= '0; rh1 <= '0; rg2 <= '0; rh2 <= '0;
      org2 <= '0; up2 <= 1'b0; sector <= '0;
      s1 <= '0; s2 <= '0; n2 <= '0;
      origin <= '0; upper <= 1'b0; tri_n <= '0;
      for (int k = 0; k < 4; k++) seq_q[k] <= '0;
      for (int k = 0; k < 3; k++) bnd_q[k] <= '0;
      for (int p = 0; p < 3; p++)
        for (int j = 0; j < LEVELS - 1; j++) tmap[p][j] <= '0;
    end else begin
      v1 <= start;
      v2 <= v1;
      valid <= v2;
      if (start) begin
        rg1    <= vg_c;
        rh1    <= vh_c;
        s1     <= s_c;
      end
      if (v1) begin
        rg2    <= rg1;
        rh2    <= rh1;
        org2   <= org_c;
        up2    <= up_c;
        n2     <= n_c;
        s2     <= s1;
        seq_q  <= seq_c;
        bnd_q  <= bnd_c;
      end
      if (v2) begin
        tmap   <= tmap_c;
        ref_g  <= rg2;
        ref_h  <= rh2;
        origin <= org2;
        upper  <= up2;
        sector <= s2;
        tri_n  <= n2;
      end
    end
  end

endmodule
