// tb_svpwm_top_l5: end-to-end test of the SVPWM generator built for five
// levels (LEVELS = 5, four upper switches per phase, default carrier).
//
// Same procedure and checks as the three-level test: each carrier period a
// new (m, theta) is presented on sample_req; the mapping times of both
// paths must reproduce the reference volt-seconds (alpha'-beta': A-C and
// B-A; g-h: A-B and B-C, against the floating-point model), the two paths
// must give the same line voltages, every gate must be on for
// 2*(N - ceil(T/STEP)) clocks in the following period, the times must come
// three clocks after the request and the period must be 2*N clocks.
// The three-level-only outputs (triangle number, alpha*-beta* front end)
// must stay idle. Points: m = 0.3 and 0.8 over a full turn, then random.
// Mechanisms counted: all six sectors, both triangle halves, zero-vector
// and short-vector splits, period reloads, and every one of the four switch
// positions switching inside a period (so all five levels are used).
module tb_svpwm_top_l5;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  localparam int L    = 5;
  localparam int STEP = 16;
  localparam int N    = 65536 / STEP;
  localparam int NPTS = 150;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] m = '0;
  logic [15:0] theta = '0;
  logic        sample_req, valid_ab, valid_gh, upper_ab;
  tmap_t       carrier;
  logic        gate_ab [3][L-1];
  logic        gate_gh [3][L-1];
  tmap_t       tmap_ab [3][L-1];
  tmap_t       tmap_gh [3][L-1];
  fix_t        ref_ab [2];
  fix_t        ref_gh [2];
  pt_t         origin_ab;
  logic [2:0]  sector_gh;
  logic [4:0]  tri_n_gh;
  pt_t         origin_gh;
  logic        upper_gh, valid_st;
  logic [2:0]  centre_st, sector_st;
  ton_t        ton_st [3];
  fix_t        ref_st [2];

  svpwm_top #(.LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen_sector [6];
  int seen_upper [2];
  int seen_mid [L-1];
  int seen_zero_split = 0, seen_short_split = 0, seen_reload = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 400) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // watchdog
  initial begin
    repeat ((NPTS + 4) * 2 * N + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real lvl(input tmap_t t [3][L-1], input int p);
    real r = 0.0;
    for (int j = 0; j < L - 1; j++) r += duty(t[p][j]);
    return r;
  endfunction

  function automatic void pick_point(input int k, output logic [15:0] mm, output logic [15:0] th);
    if (k < 48)       begin mm = 16'd4915;  th = 16'(k * 1365 + 97); end    // m = 0.3
    else if (k < 120) begin mm = 16'd13107; th = 16'((k - 48) * 910 + 45); end // m = 0.8
    else begin
      mm = 16'($urandom_range(0, 16300));
      th = 16'($urandom);
    end
  endfunction

  tmap_t exp_ab [3][L-1];
  tmap_t exp_gh [3][L-1];
  bit    have_exp = 0;

  initial begin
    logic [15:0] mm, th;
    real va, vb, vg, vh, rm;
    real la [3], lg [3];
    real sa, sb, ua, ub;
    int  s_ref, cyc, cyc_st, on_ab [3][L-1], on_gh [3][L-1], expect_on;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k <= NPTS; k++) begin
      // wait for the first period start; later ones end the counting loop
      if (k == 0) do @(negedge clk); while (!sample_req);
      seen_reload++;
      if (k < NPTS) begin
        pick_point(k, mm, th);
        m = mm;
        theta = th;
      end
      // count gates over this whole period while the new times are computed
      foreach (on_ab[p, j]) begin on_ab[p][j] = 0; on_gh[p][j] = 0; end
      cyc = 0;
      cyc_st = 0;
      for (int c = 1; c <= 2 * N; c++) begin
        @(negedge clk);
        if (k < NPTS && c <= 4) begin
          if (valid_ab && cyc == 0) cyc = c;
          if (valid_st && cyc_st == 0) cyc_st = c;
        end
        foreach (on_ab[p, j]) begin
          on_ab[p][j] += int'(gate_ab[p][j]);
          on_gh[p][j] += int'(gate_gh[p][j]);
        end
        if (k < NPTS && c == 4) begin
          // new times of this point
          check(cyc == 3, "latency of three clocks");
          rm = real'(mm) / 16384.0;
          model_ab(rm, int'(th), L, va, vb);
          model_gh(rm, int'(th), L, vg, vh, s_ref);
          for (int p = 0; p < 3; p++) begin
            la[p] = lvl(tmap_ab, p);
            lg[p] = lvl(tmap_gh, p);
          end
          check(near(la[0] - la[2], va, 0.003), $sformatf("ab Va' m=%0d th=%0d got %f exp %f", mm, th, la[0]-la[2], va));
          check(near(la[1] - la[0], vb, 0.003), $sformatf("ab Vb' m=%0d th=%0d got %f exp %f", mm, th, la[1]-la[0], vb));
          check(near(lg[0] - lg[1], vg, 0.004), $sformatf("gh g m=%0d th=%0d got %f exp %f", mm, th, lg[0]-lg[1], vg));
          check(near(lg[1] - lg[2], vh, 0.004), $sformatf("gh h m=%0d th=%0d got %f exp %f", mm, th, lg[1]-lg[2], vh));
          check(int'(sector_gh) == s_ref, "sector");
          // the two paths sample the sine table at different angles, so they
          // may differ by up to one table step (2*pi/256) of the reference
          check(near(la[0] - la[1], lg[0] - lg[1], real'(L - 1) * rm * 0.025 + 0.004) &&
                near(la[1] - la[2], lg[1] - lg[2], real'(L - 1) * rm * 0.025 + 0.004),
                "both paths give the same line voltages");
          // no alpha*-beta* results and no triangle numbers above three levels
          check(cyc_st == 0 && tri_n_gh == 0, "three-level-only outputs stay idle");
          for (int p = 0; p < 3; p++)
            for (int j = 0; j < L - 1; j++)
              if (tmap_ab[p][j] != 0 && tmap_ab[p][j] != TMAP_MAX) seen_mid[j]++;
          seen_sector[sector_gh]++;
          seen_upper[upper_ab]++;
          // redundant vertex split: zero vector (some time at level 0 on all
          // phases) or a short vector
          if (tmap_ab[0][L-2] != 0 && tmap_ab[1][L-2] != 0 && tmap_ab[2][L-2] != 0) seen_zero_split++;
          else seen_short_split++;
        end
      end
      check(sample_req === 1'b1, "carrier period of 2*N clocks");
      if (have_exp) begin
        foreach (on_ab[p, j]) begin
          expect_on = 2 * (N - (int'(exp_ab[p][j]) + STEP - 1) / STEP);
          check(on_ab[p][j] == expect_on, $sformatf("ab gate %0d.%0d on %0d exp %0d", p, j, on_ab[p][j], expect_on));
          expect_on = 2 * (N - (int'(exp_gh[p][j]) + STEP - 1) / STEP);
          check(on_gh[p][j] == expect_on, $sformatf("gh gate %0d.%0d on %0d exp %0d", p, j, on_gh[p][j], expect_on));
        end
      end
      exp_ab = tmap_ab;
      exp_gh = tmap_gh;
      have_exp = (k < NPTS);
    end
    for (int s = 0; s < 6; s++) check(seen_sector[s] > 0, $sformatf("sector %0d never seen", s));
    check(seen_upper[0] > 0 && seen_upper[1] > 0, "both triangle halves");
    for (int j = 0; j < L - 1; j++) check(seen_mid[j] > 0, $sformatf("switch %0d never switched inside a period", j));
    check(seen_zero_split > 0, "zero-vector split never seen");
    check(seen_short_split > 0, "short-vector split never seen");
    check(seen_reload > NPTS, "period reloads");
    $display("mechanisms: sectors %p switching-per-level %p halves %p zero-split %0d short-split %0d reloads %0d",
             seen_sector, seen_mid, seen_upper, seen_zero_split, seen_short_split, seen_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
