// tb_svpwm_ab: the alpha'-beta' modulator, three and five levels.
// New (m, theta) every clock (full throughput) with random gaps. Each result
// must come out exactly three clocks after its start, in order, and:
//   - its mapping times give average phase levels whose differences A-C and
//     B-A equal the model's Va', Vb' (within 0.003 of a level);
//   - the reported reference components match the model within 2 LSB;
//   - the origin and triangle half match floor() and the diagonal test on
//     the model values (skipped within 4 LSB of a cell edge).
module tb_svpwm_ab;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] m = '0, theta = '0;
  logic        valid3, valid5, upper3, upper5;
  tmap_t       tm3 [3][2];
  tmap_t       tm5 [3][4];
  fix_t        ra3, rb3, ra5, rb5;
  pt_t         org3, org5;
  int checks = 0, failures = 0;

  svpwm_ab #(.LEVELS(3)) dut3 (.clk, .rst_n, .start, .m, .theta, .valid(valid3), .tmap(tm3),
                               .ref_a(ra3), .ref_b(rb3), .origin(org3), .upper(upper3));
  svpwm_ab #(.LEVELS(5)) dut5 (.clk, .rst_n, .start, .m, .theta, .valid(valid5), .tmap(tm5),
                               .ref_a(ra5), .ref_b(rb5), .origin(org5), .upper(upper5));

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
      theta = 16'($urandom);
      if (start) q.push_back('{m: m, th: theta, t0: cyc});
    end
    @(negedge clk);
    start = 1'b0;
    repeat (6) @(negedge clk);
    chk(q.size() == 0 && n_done > 2000, "every start answered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ifloor(input real v);
    int r = int'(v);
    if (real'(r) > v) r--;
    return r;
  endfunction

  task automatic check_one(input job_t j, input int lv, input tmap_t t3 [3][2], input tmap_t t5 [3][4],
                           input fix_t ra, input fix_t rb, input pt_t org, input logic up);
    real va, vb, l [3], fa, fb;
    model_ab(real'(j.m) / 16384.0, int'(j.th), lv, va, vb);
    for (int p = 0; p < 3; p++) begin
      l[p] = 0.0;
      for (int s = 0; s < lv - 1; s++) l[p] += duty(lv == 3 ? t3[p][s] : t5[p][s]);
    end
    chk(near(l[0] - l[2], va, 0.003) && near(l[1] - l[0], vb, 0.003),
        $sformatf("L=%0d volt-seconds m=%0d th=%0d: (%f,%f) exp (%f,%f)", lv, j.m, j.th,
                  l[0] - l[2], l[1] - l[0], va, vb));
    chk(near(real'(ra) / 16384.0, va, 2.0 / 16384.0) && near(real'(rb) / 16384.0, vb, 2.0 / 16384.0),
        "reference components");
    fa = va - ifloor(va);
    fb = vb - ifloor(vb);
    if (fa > 4e-4 && fa < 1.0 - 4e-4 && fb > 4e-4 && fb < 1.0 - 4e-4 &&
        (fa + fb - 1.0 > 4e-4 || 1.0 - fa - fb > 4e-4))
      chk(int'(org.x) == ifloor(va) && int'(org.y) == ifloor(vb) && up == (fa + fb > 1.0),
          "origin and triangle half");
  endtask

  // monitor
  always @(negedge clk) if (rst_n) begin
    if (valid3 || valid5) begin
      job_t j;
      chk(valid3 && valid5 && q.size() > 0, "valid with a pending start");
      if (q.size() > 0) begin
        j = q.pop_front();
        chk(cyc - j.t0 == 3, $sformatf("latency %0d", cyc - j.t0));
        check_one(j, 3, tm3, tm5, ra3, rb3, org3, upper3);
        check_one(j, 5, tm3, tm5, ra5, rb5, org5, upper5);
        n_done++;
      end
    end
  end
endmodule
