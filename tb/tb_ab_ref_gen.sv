// tb_ab_ref_gen: reference vector in the alpha'-beta' frame.
// Random (m, theta) for a three-level and a five-level instance; the outputs
// must match (L-1)*m*sin(theta +/- pi/3) of the floating-point model (table
// values at the grid) within 2 LSB of Q14.
module tb_ab_ref_gen;
  import svpwm_pkg::*;
  import svpwm_ref_pkg::*;

  logic [15:0] m = '0, theta = '0;
  fix_t va3, vb3, va5, vb5;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  ab_ref_gen #(.LEVELS(3)) dut3 (.m, .theta, .va(va3), .vb(vb3));
  ab_ref_gen #(.LEVELS(5)) dut5 (.m, .theta, .va(va5), .vb(vb5));

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
    if (!near(real'(got) / 16384.0, expv, 2.0 / 16384.0)) begin
      failures++;
      if (failures < 10) $display("FAIL %s m=%0d th=%0d got %f exp %f", what, m, theta,
                                  real'(got) / 16384.0, expv);
    end
  endtask

  initial begin
    real ea, eb;
    for (int k = 0; k < 2000; k++) begin
      m = (k < 8) ? 16'd16384 : 16'($urandom_range(0, 16384));
      theta = (k < 8) ? 16'(k * 8192) : 16'($urandom);
      #1;
      model_ab(real'(m) / 16384.0, int'(theta), 3, ea, eb);
      cmp(va3, ea, "Va' L=3");
      cmp(vb3, eb, "Vb' L=3");
      model_ab(real'(m) / 16384.0, int'(theta), 5, ea, eb);
      cmp(va5, ea, "Va' L=5");
      cmp(vb5, eb, "Vb' L=5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
