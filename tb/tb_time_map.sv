// tb_time_map: mapping times from a four-segment sequence.
// Random valid sequences (start state with one level of headroom, each step
// raising a random phase) and random ordered boundaries, for three and five
// levels. For every switch the testbench adds up the time the switch is on
// segment by segment; the mapping time must equal (ts - that time) in the
// 16-bit scale (times four, 65535 for a switch that is never on).
// Also the published three-level example: sequence (1,0,0) (2,0,0) (2,1,0)
// (2,1,1) gives A1 = tI, A2 = 0, B1 = ts (never on), B2 = tII, C1 = ts,
// C2 = tIII.
module tb_time_map;
  import svpwm_pkg::*;

  state_t seq [4];
  ton_t   bnd [3];
  tmap_t  tm3 [3][2];
  tmap_t  tm5 [3][4];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  time_map #(.LEVELS(3)) dut3 (.seq, .bnd, .tmap(tm3));
  time_map #(.LEVELS(5)) dut5 (.seq, .bnd, .tmap(tm5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl_of(input state_t v, input int p);
    return p == 0 ? int'(v.a) : p == 1 ? int'(v.b) : int'(v.c);
  endfunction

  task automatic check_all(input int lv);
    int seg [4], on_t, expv, got;
    seg[0] = int'(bnd[0]);
    seg[1] = int'(bnd[1]) - int'(bnd[0]);
    seg[2] = int'(bnd[2]) - int'(bnd[1]);
    seg[3] = 16384 - int'(bnd[2]);
    for (int p = 0; p < 3; p++)
      for (int j = 0; j < lv - 1; j++) begin
        on_t = 0;
        for (int k = 0; k < 4; k++)
          if (lvl_of(seq[k], p) >= lv - 1 - j) on_t += seg[k];
        expv = (16384 - on_t) * 4;
        if (expv > 65535) expv = 65535;
        got = (lv == 3) ? int'(tm3[p][j]) : int'(tm5[p][j]);
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10) $display("FAIL L=%0d phase %0d switch %0d got %0d exp %0d", lv, p, j, got, expv);
        end
      end
  endtask

  initial begin
    int lv, b0, b1, b2, ph;
    // published example
    seq[0] = '{a: 1, b: 0, c: 0};
    seq[1] = '{a: 2, b: 0, c: 0};
    seq[2] = '{a: 2, b: 1, c: 0};
    seq[3] = '{a: 2, b: 1, c: 1};
    bnd[0] = 15'd1000; bnd[1] = 15'd5000; bnd[2] = 15'd12000;
    #1;
    checks++;
    if (!(tm3[0][0] == 16'd4000 && tm3[0][1] == 16'd0 && tm3[1][0] == 16'd65535 &&
          tm3[1][1] == 16'd20000 && tm3[2][0] == 16'd65535 && tm3[2][1] == 16'd48000)) begin
      failures++;
      $display("FAIL published example: %p", tm3);
    end
    check_all(3);
    for (int k = 0; k < 3000; k++) begin
      lv = (k % 2) ? 5 : 3;
      seq[0] = '{a: 8'($urandom_range(0, lv - 2)), b: 8'($urandom_range(0, lv - 2)),
                 c: 8'($urandom_range(0, lv - 2))};
      ph = $urandom_range(0, 5);   // order in which phases rise
      for (int st = 1; st <= 3; st++) begin
        seq[st] = seq[st-1];
        case ((ph + (st - 1) * (1 + ph % 2)) % 3)
          0: seq[st].a = seq[st].a + 1'b1;
          1: seq[st].b = seq[st].b + 1'b1;
          default: seq[st].c = seq[st].c + 1'b1;
        endcase
      end
      b0 = $urandom_range(0, 16384);
      b1 = $urandom_range(b0, 16384);
      b2 = $urandom_range(b1, 16384);
      bnd[0] = ton_t'(b0); bnd[1] = ton_t'(b1); bnd[2] = ton_t'(b2);
      #1;
      check_all(lv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
