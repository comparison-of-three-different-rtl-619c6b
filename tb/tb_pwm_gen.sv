// tb_pwm_gen: triangular carrier, double buffering and gate widths.
// Runs with a coarse carrier step (1024, so 128 clocks per period). Checks:
// gates stay off in the period after reset; 'sample' pulses exactly once per
// period, 2*N clocks apart; the carrier climbs and falls by one step per
// clock between 0 and its top; times loaded in the middle of a period do not
// touch that period; in the next period each gate is on for
// 2*(N - ceil(T/STEP)) clocks (T = 0: whole period, T = 65535: never), with
// the on-time centred in the period (symmetric).
module tb_pwm_gen;
  import svpwm_pkg::*;

  localparam int L    = 3;
  localparam int STEP = 1024;
  localparam int N    = 65536 / STEP;

  logic  clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  tmap_t tmap_in [3][L-1];
  logic  sample, carrier_up;
  tmap_t carrier;
  logic  gate [3][L-1];
  int checks = 0, failures = 0;

  pwm_gen #(.LEVELS(L), .CARRIER_STEP(STEP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200 * 2 * N) @(posedge clk);
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

  tmap_t cur [3][L-1];   // times that apply to the period being counted
  tmap_t nxt [3][L-1];

  initial begin
    int on_cnt [3][L-1], first_on [3][L-1], last_on [3][L-1], expv, prev_c;
    bit   prev_up;
    foreach (tmap_in[p, j]) tmap_in[p][j] = '0;
    foreach (cur[p, j]) cur[p][j] = 16'hFFFF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // period 0 starts at reset release; then the loop runs period by period
    for (int per = 0; per < 150; per++) begin
      foreach (on_cnt[p, j]) begin on_cnt[p][j] = 0; first_on[p][j] = -1; last_on[p][j] = -1; end
      prev_c = -1;
      for (int c = 1; c <= 2 * N; c++) begin
        @(negedge clk);
        foreach (on_cnt[p, j]) if (gate[p][j]) begin
          on_cnt[p][j]++;
          if (first_on[p][j] < 0) first_on[p][j] = c;
          last_on[p][j] = c;
        end
        // carrier shape
        if (prev_c >= 0)
          chk(int'(carrier) == prev_c ||
              (prev_up && int'(carrier) == prev_c + STEP) ||
              (!prev_up && int'(carrier) == prev_c - STEP), "carrier step");
        prev_c  = int'(carrier);
        prev_up = carrier_up;
        chk(sample == (c == 2 * N), "one sample pulse at the end of each period");
        // load new times in the middle of the period
        if (c == N / 2) begin
          foreach (nxt[p, j]) begin
            case ($urandom_range(0, 7))
              0: nxt[p][j] = 16'd0;
              1: nxt[p][j] = 16'd65535;
              2: nxt[p][j] = 16'(STEP * $urandom_range(0, N - 1));
              default: nxt[p][j] = 16'($urandom);
            endcase
          end
          tmap_in = nxt;
          load = 1'b1;
          @(negedge clk);
          load = 1'b0;
          c++;
          chk(sample == 1'b0, "no sample while loading");
          foreach (on_cnt[p, j]) if (gate[p][j]) begin
            on_cnt[p][j]++;
            if (first_on[p][j] < 0) first_on[p][j] = c;
            last_on[p][j] = c;
          end
          prev_c = int'(carrier);
          prev_up = carrier_up;
        end
      end
      // in period 0 (after reset) cur holds 65535: all gates must stay off
      foreach (on_cnt[p, j]) begin
        expv = 2 * (N - (int'(cur[p][j]) + STEP - 1) / STEP);
        chk(on_cnt[p][j] == expv, $sformatf("gate %0d.%0d on %0d clocks, exp %0d (T=%0d)",
                                            p, j, on_cnt[p][j], expv, cur[p][j]));
        if (expv > 0 && expv < 2 * N)
          chk(first_on[p][j] + last_on[p][j] == 2 * N + 1, "on-time centred");
      end
      cur = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
