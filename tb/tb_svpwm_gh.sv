// tb_svpwm_gh: the g-h modulator, three and five levels.
// New (m, theta) every clock (full throughput) with random gaps. Each result
// must come out exactly three clocks after its start, in order, and:
//   - its mapping times give average phase levels whose differences A-B and
//     B-C equal the model's g, h of the vector turned into its real sector
//     (within 0.004 of a level);
//   - the sector is floor(6*theta/65536), the reported first-sector
//     reference matches the model within 3 LSB;
//   - for three levels the triangle number follows the published location
//     rules (n = 4s+1: Vg<=1, Vh<=1, Vg+Vh<=1; 4s+2: Vg<=1, Vh<=1,
//     Vg+Vh>1; 4s+3: Vg>1; 4s+4: Vh>1), skipped within 4 LSB of an edge.
module tb_svpwm_gh;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] m = '0, theta = '0;
  logic        valid3, valid5, upper3, upper5;
  tmap_t       tm3 [3][2];
  tmap_t       tm5 [3][4];
  fix_t        ra3, rb3, ra5, rb5;
  pt_t         org3, org5;
  logic [2:0]  sec3, sec5;
  logic [4:0]  n3, n5;
  int checks = 0, failures = 0;

  svpwm_gh #(.LEVELS(3)) dut3 (.clk, .rst_n, .start, .m, .theta, .valid(valid3), .tmap(tm3),
                               .ref_g(ra3), .ref_h(rb3), .sector(sec3), .origin(org3),
                               .upper(upper3), .tri_n(n3));
  svpwm_gh #(.LEVELS(5)) dut5 (.clk, .rst_n, .start, .m, .theta, .valid(valid5), .tmap(tm5),
                               .ref_g(ra5), .ref_h(rb5), .sector(sec5), .origin(org5),
                               .upper(upper5), .tri_n(n5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  typedef struct { logic [15:0] m; logic [15:0] th; int t0; } job_t;
  job_t q [$];
  int   cyc = 0;
  int   n_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // driver
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      start = ($urandom_range(0, 3) != 0);
      m = 16'($urandom_range(0, 16384));
      if (k % 3 == 0) m = 16'($urandom_range(0, 6000));  // inner triangles
      theta = 16'($urandom);
      if (start) q.push_back('{m: m, th: theta, t0: cyc});
    end
    @(negedge clk);
    start = 1'b0;
    repeat (6) @(negedge clk);
    chk(q.size() == 0 && n_done > 2000, "every start answered");
    for (int n = 1; n <= 24; n++) chk(seen_n[n] > 0, $sformatf("triangle %0d never seen", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ifloor(input real v);
    int r = int'(v);
    if (real'(r) > v) r--;
    return r;
  endfunction

  int seen_n [25];

  task automatic check_one(input job_t j, input int lv, input tmap_t t3 [3][2], input tmap_t t5 [3][4],
                           input fix_t rg, input fix_t rh, input logic [2:0] sec, input logic [4:0] tn);
    int unsigned starts [6] = '{0, 10923, 21846, 32768, 43691, 54614};
    real vg, vh, l [3], k, a, b, g0, h0;
    int  s_exp, n_exp;
    int unsigned phi;
    model_gh(real'(j.m) / 16384.0, int'(j.th), lv, vg, vh, s_exp);
    for (int p = 0; p < 3; p++) begin
      l[p] = 0.0;
      for (int s = 0; s < lv - 1; s++) l[p] += duty(lv == 3 ? t3[p][s] : t5[p][s]);
    end
    chk(near(l[0] - l[1], vg, 0.004) && near(l[1] - l[2], vh, 0.004),
        $sformatf("L=%0d volt-seconds m=%0d th=%0d: (%f,%f) exp (%f,%f)", lv, j.m, j.th,
                  l[0] - l[1], l[1] - l[2], vg, vh));
    chk(int'(sec) == s_exp, "sector");
    phi = int'(j.th) - starts[s_exp];
    k  = real'(lv - 1) * (real'(j.m) / 16384.0) * $sqrt(3.0) / 2.0;
    a  = k * ref_twosin(phi + 16384) / 2.0;
    b  = k * ref_twosin(phi) / 2.0;
    g0 = a - b / $sqrt(3.0);
    h0 = 2.0 * b / $sqrt(3.0);
    chk(near(real'(rg) / 16384.0, g0, 3.0 / 16384.0) && near(real'(rh) / 16384.0, h0, 3.0 / 16384.0),
        "first-sector reference");
    if (lv == 3) begin
      if (g0 > 1.0)                 n_exp = 3;
      else if (h0 > 1.0)            n_exp = 4;
      else if (g0 + h0 <= 1.0)      n_exp = 1;
      else                          n_exp = 2;
      n_exp += 4 * s_exp;
      if ((g0 - 1.0 > 3e-4 || 1.0 - g0 > 3e-4) && (h0 - 1.0 > 3e-4 || 1.0 - h0 > 3e-4) &&
          (g0 + h0 - 1.0 > 3e-4 || 1.0 - g0 - h0 > 3e-4)) begin
        chk(int'(tn) == n_exp, $sformatf("triangle number %0d exp %0d", tn, n_exp));
        seen_n[n_exp]++;
      end
    end
  endtask

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (valid3 || valid5) begin
      job_t j;
      chk(valid3 && valid5 && q.size() > 0, "valid with a pending start");
      if (q.size() > 0) begin
        j = q.pop_front();
        chk(cyc - j.t0 == 3, $sformatf("latency %0d", cyc - j.t0));
        check_one(j, 3, tm3, tm5, ra3, rb3, sec3, n3);
        check_one(j, 5, tm3, tm5, ra5, rb5, sec5, n5);
        n_done++;
      end
    end
  end
endmodule
