// tb_gh_ref_gen: angle preprocessing and g-h reference vector.
// Random (m, theta): the sector must be floor(6*theta/65536) and (Vg, Vh)
// must equal Va - Vb/sqrt(3), 2*Vb/sqrt(3) of the in-sector angle
// (truncated to the table grid) within 3 LSB of Q14, for three and five
// levels.
module tb_gh_ref_gen;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  logic [15:0] m = '0, theta = '0;
  logic [2:0]  s3, s5;
  fix_t vg3, vh3, vg5, vh5;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  gh_ref_gen #(.LEVELS(3)) dut3 (.m, .theta, .s(s3), .vg(vg3), .vh(vh3));
  gh_ref_gen #(.LEVELS(5)) dut5 (.m, .theta, .s(s5), .vg(vg5), .vh(vh5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input fix_t got, input real expv, input string what);
    checks++;
    if (!near(real'(got) / 16384.0, expv, 3.0 / 16384.0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s m=%0d th=%0d got %f exp %f", what, m, theta,
                                  real'(got) / 16384.0, expv);
    end
  endtask

  initial begin
    int unsigned starts [6] = '{0, 10923, 21846, 32768, 43691, 54614};
    int  s_exp;
    int unsigned phi;
    real k3, a, b;
    for (int k = 0; k < 2000; k++) begin
      m = (k < 12) ? 16'd16384 : 16'($urandom_range(0, 16384));
      theta = (k < 12) ? 16'(k * 5461 + (k % 2) * 5460) : 16'($urandom);
      #1;
      s_exp = (int'(theta) * 6) / 65536;
      phi   = int'(theta) - starts[s_exp];
      checks++;
      if (int'(s3) != s_exp || int'(s5) != s_exp) begin
        failures++;
        $display("FAIL sector th=%0d got %0d exp %0d", theta, s3, s_exp);
      end
      for (int lv = 3; lv <= 5; lv += 2) begin
        k3 = real'(lv - 1) * (real'(m) / 16384.0) * $sqrt(3.0) / 2.0;
        a  = k3 * ref_twosin(phi + 16384) / 2.0;
        b  = k3 * ref_twosin(phi) / 2.0;
        cmp(lv == 3 ? vg3 : vg5, a - b / $sqrt(3.0), $sformatf("Vg L=%0d", lv));
        cmp(lv == 3 ? vh3 : vh5, 2.0 * b / $sqrt(3.0), $sformatf("Vh L=%0d", lv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
