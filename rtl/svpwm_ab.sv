// svpwm_ab: SVPWM modulator in the alpha'-beta' frame (the main design).
//
// From the modulation depth m and the angle theta alone it produces the
// mapping time of every upper IGBT of a LEVELS-level diode-clamped inverter:
//   stage 1  reference vector, Va' = (L-1) m sin(theta+pi/3),
//            Vb' = (L-1) m sin(theta-pi/3)                     (ab_ref_gen)
//   stage 2  triangle location and on-times                   (tri_ontime),
//            switching states and their order                 (vec_seq)
//   stage 3  mapping times                                    (time_map)
// No sector search, no angle preprocessing and no irrational constants are
// needed in this frame. Each stage ends in a register; 'start' captures m
// and theta and 'valid' pulses three clocks later with the results. A new
// start may be given every clock. The three-register pipeline is this
// design's choice; the published design does not give its timing.
//
// Besides the times it outputs, for observation, the reference components
// (Q14), the origin point of the triangle and which half of the cell holds
// the reference (upper = triangle II); all outputs change together, with
// 'valid'.
module svpwm_ab
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
  output fix_t               ref_a,
  output fix_t               ref_b,
  output pt_t                origin,
  output logic               upper
);

  // stage 1
  fix_t va_c, vb_c;
  logic v1;
  ab_ref_gen #(.LEVELS(LEVELS)) u_ref (.m(m), .theta(theta), .va(va_c), .vb(vb_c));

  // stage 2
  fix_t       ra1, rb1, ra2, rb2;
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
  tri_ontime u_tri (.vx(ra1), .vy(rb1), .origin(org_c), .upper(up_c),
                    .vtx(vtx_c), .ton(ton_c));
  vec_seq #(.LEVELS(LEVELS), .FRAME(FRAME_AB)) u_seq (
    .vtx(vtx_c), .ton(ton_c), .s(3'd0), .seq(seq_c), .bnd(bnd_c),
    .start_idx());

  // stage 3
  tmap_t tmap_c [3][LEVELS-1];
  time_map #(.LEVELS(LEVELS)) u_map (.seq(seq_q), .bnd(bnd_q), .tmap(tmap_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; valid <= 1'b0;
      ref_a <= '0; ref_b <= '0;
      ra1 <= '0; rb1 <= '0; ra2 <= '0; rb2 <= '0;
      org2 <= '0; up2 <= 1'b0;
      origin <= '0; upper <= 1'b0;
      for (int k = 0; k < 4; k++) seq_q[k] <= '0;
      for (int k = 0; k < 3; k++) bnd_q[k] <= '0;
      for (int p = 0; p < 3; p++)
        for (int j = 0; j < LEVELS - 1; j++) tmap[p][j] <= '0;
    end else begin
      v1 <= start;
      v2 <= v1;
      valid <= v2;
      if (start) begin
        ra1 <= va_c;
        rb1 <= vb_c;
      end
      if (v1) begin
        ra2    <= ra1;
        rb2    <= rb1;
        org2   <= org_c;
        up2    <= up_c;
        seq_q  <= seq_c;
        bnd_q  <= bnd_c;
      end
      if (v2) begin
        tmap   <= tmap_c;
        ref_a  <= ra2;
        ref_b  <= rb2;
        origin <= org2;
        upper  <= up2;
      end
    end
  end

endmodule
