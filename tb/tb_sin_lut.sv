// tb_sin_lut: checks the quarter-wave sine table over the whole turn.
// Every table grid point of all four quadrants, plus angles between grid
// points, is compared exactly with round(32767*|sin|) (sign restored) of the
// truncated angle, computed in floating point.
module tb_sin_lut;
  import svpwm_ref_pkg::*;

  logic [15:0]        angle = '0;
  logic signed [16:0] two_sin;
  logic               clk = 1'b0;
  int checks = 0, failures = 0;

  sin_lut dut (.angle, .two_sin);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int a = 0; a < 65536; a += 61) begin
      angle = 16'(a);
      #1;
      exp_v = $rtoi(ref_twosin(a) * 16384.0 + (ref_twosin(a) >= 0.0 ? 0.5 : -0.5));
      checks++;
      if (int'(two_sin) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL angle %0d: got %0d exp %0d", a, two_sin, exp_v);
      end
    end
    for (int i = 0; i < 256; i++) begin
      angle = 16'(i * 256);
      #1;
      exp_v = $rtoi(ref_twosin(i * 256) * 16384.0 + (ref_twosin(i * 256) >= 0.0 ? 0.5 : -0.5));
      checks++;
      if (int'(two_sin) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL grid %0d: got %0d exp %0d", i, two_sin, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
