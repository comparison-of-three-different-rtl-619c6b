// tb_astar_ontime: self-checking test of the alpha*-beta* front end.
//
// Drives m and theta over whole turns (a 1024-point grid at several depths,
// then random points with m up to 0.995) and checks against a real-number
// model:
//   - the alpha-beta reference (length sqrt(3) m, table-grid angle);
//   - the centre vector Vo against Table 5 evaluated in real numbers, and
//     the sector s against Table 6, wherever the point is not within a
//     rounding distance of a table boundary;
//   - volt-second balance: Vo + ta*u(s) + tb*u(s+1) equals the reference
//     (u(k) = unit vector at k*60 deg), to within 0.002;
//   - ta + tb + to = 1 exactly.
// Every centre V1..V6 and every sector 0..5 must be visited.
// A watchdog ends the run if it hangs.
module tb_astar_ontime;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  logic [15:0] m, theta;
  logic [2:0]  vo, s;
  ton_t        ta, tb, to;
  fix_t        ref_a, ref_b;

  astar_ontime dut (.*);

  int checks = 0, failures = 0;
  int vo_hits [1:6];
  int s_hits  [0:5];

  localparam real SQ3 = 1.7320508075688772;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: m=%0d theta=%0d vo=%0d s=%0d ta=%0d tb=%0d to=%0d", what, m, theta, vo, s, ta, tb, to);
    end
  endtask

  task automatic one(input int unsigned mi, input int unsigned th);
    real mr, va, vb, oa, ob, xa, xb, ra, rb, ang, mdeg, marg;
    int  vo_m, s_m;
    bit  sure;
    m = 16'(mi);
    theta = 16'(th);
    #1;
    mr = real'(mi) / 16384.0;
    va = SQ3 * mr * ref_twosin((th + 16384) % 65536) / 2.0;
    vb = SQ3 * mr * ref_twosin(th) / 2.0;
    check(near(real'(ref_a) / 16384.0, va, 0.0015) && near(real'(ref_b) / 16384.0, vb, 0.0015), "reference");

    // Table 5 in real numbers (angle in degrees, same windows and order)
    mdeg = real'(th & 32'hFF00) * 360.0 / 65536.0;
    sure = 1;
    marg = 0.003;
    if      ((vb < SQ3/2 && vb > -SQ3/2) && (mdeg < 60.0 || mdeg > 300.0))                vo_m = 1;
    else if ((vb > SQ3*(va-1.0) && vb < SQ3*(va+1.0)) && (mdeg > 0.0 && mdeg < 120.0))    vo_m = 2;
    else if ((vb > -SQ3*(va+1.0) && vb < -SQ3*(va-1.0)) && (mdeg > 60.0 && mdeg < 180.0)) vo_m = 3;
    else if ((vb < SQ3/2 && vb > -SQ3/2) && (mdeg > 120.0 && mdeg < 240.0))               vo_m = 4;
    else if ((vb > SQ3*(va-1.0) && vb < SQ3*(va+1.0)) && (mdeg > 180.0 && mdeg < 300.0))  vo_m = 5;
    else                                                                                  vo_m = 6;
    // near a band edge or an angle window edge either answer can be right
    if (near(vb, SQ3/2, marg) || near(vb, -SQ3/2, marg) ||
        near(vb, SQ3*(va-1.0), marg) || near(vb, SQ3*(va+1.0), marg) ||
        near(vb, -SQ3*(va+1.0), marg) || near(vb, -SQ3*(va-1.0), marg))
      sure = 0;
    for (int w = 0; w <= 6; w++)
      if (near(mdeg, 60.0 * w, 0.1)) sure = 0;
    if (sure) check(int'(vo) == vo_m, "centre Vo (Table 5)");

    // Table 6 with the design's centre
    oa = $cos(real'(int'(vo) - 1) * PI / 3.0);
    ob = $sin(real'(int'(vo) - 1) * PI / 3.0);
    xa = va - oa;
    xb = vb - ob;
    ang = $atan2(xb, xa) * 180.0 / PI;
    if (ang < 0.0) ang += 360.0;
    s_m = int'($floor(ang / 60.0)) % 6;
    sure = (xa * xa + xb * xb > 1.0e-4);
    for (int w = 0; w <= 6; w++)
      if (near(ang, 60.0 * w, 0.2)) sure = 0;
    if (sure) check(int'(s) == s_m, "sector s (Table 6)");

    // volt-second balance
    ra = oa + real'(ta) / 16384.0 * $cos(real'(s) * PI / 3.0) + real'(tb) / 16384.0 * $cos(real'(s + 1) * PI / 3.0);
    rb = ob + real'(ta) / 16384.0 * $sin(real'(s) * PI / 3.0) + real'(tb) / 16384.0 * $sin(real'(s + 1) * PI / 3.0);
    check(near(ra, real'(ref_a) / 16384.0, 0.002) && near(rb, real'(ref_b) / 16384.0, 0.002), "volt-second balance");
    check(int'(ta) + int'(tb) + int'(to) == ONE, "times add to ts");

    vo_hits[vo]++;
    if (s <= 5) s_hits[s]++;
  endtask

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    int unsigned depths [5] = '{1638, 4915, 8192, 13107, 16300};
    foreach (vo_hits[i]) vo_hits[i] = 0;
    foreach (s_hits[i])  s_hits[i] = 0;
    foreach (depths[d])
      for (int unsigned t = 0; t < 65536; t += 64) one(depths[d], t);
    for (int i = 0; i < 4000; i++) one($urandom_range(16300, 0), $urandom_range(65535, 0));
    one(0, 0);
    foreach (vo_hits[i]) check(vo_hits[i] > 0, $sformatf("centre V%0d visited", i));
    foreach (s_hits[i])  check(s_hits[i] > 0, $sformatf("sector %0d visited", i));
    $display("centres visited: %p  sectors visited: %p", vo_hits, s_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
