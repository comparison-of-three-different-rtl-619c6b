// svpwm_top: multilevel space vector PWM generator, alpha'-beta' and g-h
// modulators side by side.
//
// The host supplies the modulation depth m (unsigned Q14, 1.0 = 16384; the
// line-to-line amplitude is (LEVELS-1)*m levels and the linear range ends at
// m = 1.0) and the electrical angle theta
// (16-bit binary angle). Once per carrier period, at the start of the period
// (sample_req), both modulators capture m and theta; three clocks later
// their mapping times enter the shadow registers of their PWM stages and
// drive the gates from the next period on.
//
// The alpha'-beta' path (svpwm_ab -> pwm_gen) is the recommended one: it
// needs neither sector search nor irrational constants. The g-h path
// (svpwm_gh -> pwm_gen) implements the other general-level method; for the
// same m and theta both produce the same volt-seconds. Each path has its
// own gate outputs, gate_*[phase][j] with phase 0..2 = A, B, C and j = 0
// the outermost upper switch (X1). Lower switches are the complements of
// the upper ones; dead time is left to the gate drivers.
//
// A third method, the alpha*-beta* frame (astar_ontime), is included up to
// its on-times for three levels: centre vector, two-level sector and the
// three times, registered one clock after sample_req (valid_st). Its
// switching sequence and gate mapping are not part of this design, so it
// drives no PWM stage; for other LEVELS its outputs stay at zero.
//
// Ports beyond the gates (mapping times, reference components in Q14,
// triangle data) are for observation.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int LEVELS       = 3,
  parameter int CARRIER_STEP = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        m,
  input  logic [ANGLE_W-1:0] theta,
  output logic               sample_req,
  output tmap_t              carrier,
  output logic               gate_ab [3][LEVELS-1],
  output logic               gate_gh [3][LEVELS-1],
  output tmap_t              tmap_ab [3][LEVELS-1],
  output tmap_t              tmap_gh [3][LEVELS-1],
  output logic               valid_ab,
  output fix_t               ref_ab [2],
  output fix_t               ref_gh [2],
  output logic               valid_gh,
  output pt_t                origin_ab,
  output logic               upper_ab,
  output logic [2:0]         sector_gh,
  output pt_t                origin_gh,
  output logic               upper_gh,
  output logic [4:0]         tri_n_gh,
  output logic               valid_st,
  output logic [2:0]         centre_st,
  output logic [2:0]         sector_st,
  output ton_t               ton_st [3],
  output fix_t               ref_st [2]
);

  logic  sample_gh, up_ab, up_gh;
  tmap_t carrier_gh;

  svpwm_ab #(.LEVELS(LEVELS)) u_ab (
    .clk, .rst_n, .start(sample_req), .m, .theta,
    .valid(valid_ab), .tmap(tmap_ab), .ref_a(ref_ab[0]), .ref_b(ref_ab[1]),
    .origin(origin_ab), .upper(upper_ab));

  pwm_gen #(.LEVELS(LEVELS), .CARRIER_STEP(CARRIER_STEP)) u_pwm_ab (
    .clk, .rst_n, .load(valid_ab), .tmap_in(tmap_ab),
    .sample(sample_req), .carrier_up(up_ab), .carrier, .gate(gate_ab));

  svpwm_gh #(.LEVELS(LEVELS)) u_gh (
    .clk, .rst_n, .start(sample_req), .m, .theta,
    .valid(valid_gh), .tmap(tmap_gh), .ref_g(ref_gh[0]), .ref_h(ref_gh[1]), .sector(sector_gh),
    .origin(origin_gh), .upper(upper_gh), .tri_n(tri_n_gh));

  pwm_gen #(.LEVELS(LEVELS), .CARRIER_STEP(CARRIER_STEP)) u_pwm_gh (
    .clk, .rst_n, .load(valid_gh), .tmap_in(tmap_gh),
    .sample(sample_gh), .carrier_up(up_gh), .carrier(carrier_gh),
    .gate(gate_gh));

  if (LEVELS == 3) begin : g_star
    logic [2:0] vo_c, s_c;
    ton_t       ta_c, tb_c, to_c;
    fix_t       ra_c, rb_c;

    astar_ontime u_star (
      .m, .theta, .vo(vo_c), .s(s_c), .ta(ta_c), .tb(tb_c), .to(to_c), .ref_a(ra_c), .ref_b(rb_c));

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        valid_st  <= 1'b0;
        centre_st <= 3'd1;
        sector_st <= '0;
        ton_st    <= '{default: '0};
        ref_st    <= '{default: '0};
      end else begin
        valid_st <= sample_req;
        if (sample_req) begin
          centre_st <= vo_c;
          sector_st <= s_c;
          ton_st    <= '{ta_c, tb_c, to_c};
          ref_st    <= '{ra_c, rb_c};
        end
      end
  end else begin : g_no_star
    assign valid_st  = 1'b0;
    assign centre_st = '0;
    assign sector_st = '0;
    assign ton_st    = '{default: '0};
    assign ref_st    = '{default: '0};
  end

  // both carriers run in lock step (they are reset together); not checked
  // while reset is applied, when the registers may not yet be cleared
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    carrier_gh == carrier && up_gh == up_ab && sample_gh == sample_req)
    else $error("carriers of the two PWM stages out of step");

endmodule
