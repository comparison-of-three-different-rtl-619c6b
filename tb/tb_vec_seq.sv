// tb_vec_seq: switching states and their order, both frames, 3 and 5 levels.
// Random references inside the hexagon are placed in a triangle by the
// testbench itself (floor and diagonal test) with random on-times. The
// sequence must: stay within 0..L-1; raise exactly one phase by one level at
// each step; end with the start state plus (1,1,1); keep the boundaries in
// order; and reproduce the volt-seconds of the three vertices exactly, in
// the frame's own coordinates (alpha'-beta': A-C, B-A; g-h: A-B, B-C, after
// turning the first-sector vertices by s*60 degrees).
module tb_vec_seq;
  import svpwm_pkg::*;

  pt_t        vtx [3];
  ton_t       ton [3];
  logic [2:0] s = '0;
  state_t     seq_a3 [4], seq_g3 [4], seq_a5 [4], seq_g5 [4];
  ton_t       bnd_a3 [3], bnd_g3 [3], bnd_a5 [3], bnd_g5 [3];
  logic [1:0] si_a3, si_g3, si_a5, si_g5;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int seen_odd = 0, seen_even = 0;

  vec_seq #(.LEVELS(3), .FRAME(FRAME_AB)) da3 (.vtx, .ton, .s, .seq(seq_a3), .bnd(bnd_a3), .start_idx(si_a3));
  vec_seq #(.LEVELS(3), .FRAME(FRAME_GH)) dg3 (.vtx, .ton, .s, .seq(seq_g3), .bnd(bnd_g3), .start_idx(si_g3));
  vec_seq #(.LEVELS(5), .FRAME(FRAME_AB)) da5 (.vtx, .ton, .s, .seq(seq_a5), .bnd(bnd_a5), .start_idx(si_a5));
  vec_seq #(.LEVELS(5), .FRAME(FRAME_GH)) dg5 (.vtx, .ton, .s, .seq(seq_g5), .bnd(bnd_g5), .start_idx(si_g5));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: vtx (%0d,%0d) (%0d,%0d) (%0d,%0d) s=%0d", what,
        vtx[0].x, vtx[0].y, vtx[1].x, vtx[1].y, vtx[2].x, vtx[2].y, s);
    end
  endtask

  function automatic bit inside_hex(input int x, input int y, input int lv);
    return x <= lv - 1 && -x <= lv - 1 && y <= lv - 1 && -y <= lv - 1 &&
           x + y <= lv - 1 && -(x + y) <= lv - 1;
  endfunction

  // check one sequence; frame coordinates expected: ex, ey (times ONE)
  task automatic check_seq(input state_t q [4], input ton_t b [3], input int lv,
                           input bit gh, input longint ex, input longint ey, input string tag);
    int d [4];
    int diff, ones, mx;
    longint cx, cy;
    d[0] = int'(b[0]);
    d[1] = int'(b[1]) - int'(b[0]);
    d[2] = int'(b[2]) - int'(b[1]);
    d[3] = 16384 - int'(b[2]);
    chk(d[0] >= 0 && d[1] >= 0 && d[2] >= 0 && d[3] >= 0, {tag, " boundaries in order"});
    mx = 0;
    for (int k = 0; k < 4; k++) begin
      if (int'(q[k].a) > mx) mx = int'(q[k].a);
      if (int'(q[k].b) > mx) mx = int'(q[k].b);
      if (int'(q[k].c) > mx) mx = int'(q[k].c);
    end
    chk(mx <= lv - 1, {tag, " levels within range"});
    for (int k = 0; k < 3; k++) begin
      ones = 0; diff = 0;
      diff += int'(q[k+1].a) - int'(q[k].a);
      diff += int'(q[k+1].b) - int'(q[k].b);
      diff += int'(q[k+1].c) - int'(q[k].c);
      ones += int'(q[k+1].a == q[k].a + 1'b1) + int'(q[k+1].b == q[k].b + 1'b1) +
              int'(q[k+1].c == q[k].c + 1'b1);
      chk(diff == 1 && ones == 1, {tag, " one phase up per step"});
    end
    chk(q[3].a == q[0].a + 1'b1 && q[3].b == q[0].b + 1'b1 && q[3].c == q[0].c + 1'b1,
        {tag, " ends at start + (1,1,1)"});
    cx = 0; cy = 0;
    for (int k = 0; k < 4; k++) begin
      if (!gh) begin
        cx += longint'(d[k]) * (longint'(q[k].a) - longint'(q[k].c));
        cy += longint'(d[k]) * (longint'(q[k].b) - longint'(q[k].a));
      end else begin
        cx += longint'(d[k]) * (longint'(q[k].a) - longint'(q[k].b));
        cy += longint'(d[k]) * (longint'(q[k].b) - longint'(q[k].c));
      end
    end
    chk(cx == ex && cy == ey, $sformatf("%s volt-seconds (%0d,%0d) exp (%0d,%0d)", tag, cx, cy, ex, ey));
  endtask

  initial begin
    real rx, ry;
    int ox, oy, up, lv, t0, t1, gx, gy, tmp;
    longint ex, ey, rx2, ry2;
    bit ok;
    for (int k = 0; k < 4000; k++) begin
      lv = (k % 2) ? 5 : 3;
      // a random triangle inside the hexagon
      do begin
        rx = ($urandom_range(0, 100000) / 100000.0 - 0.5) * 2.0 * (lv - 1);
        ry = ($urandom_range(0, 100000) / 100000.0 - 0.5) * 2.0 * (lv - 1);
        ox = int'($floor(rx));
        oy = int'($floor(ry));
        up = (rx - ox + ry - oy > 1.0);
        if (!up) begin
          vtx[0] = '{x: 8'(ox), y: 8'(oy)}; vtx[1] = '{x: 8'(ox + 1), y: 8'(oy)}; vtx[2] = '{x: 8'(ox), y: 8'(oy + 1)};
        end else begin
          vtx[0] = '{x: 8'(ox + 1), y: 8'(oy)}; vtx[1] = '{x: 8'(ox), y: 8'(oy + 1)}; vtx[2] = '{x: 8'(ox + 1), y: 8'(oy + 1)};
        end
        ok = 1;
        for (int i = 0; i < 3; i++) ok &= inside_hex(int'(vtx[i].x), int'(vtx[i].y), lv);
      end while (!ok);
      t0 = $urandom_range(0, 16384);
      t1 = $urandom_range(0, 16384 - t0);
      ton[0] = ton_t'(t0); ton[1] = ton_t'(t1); ton[2] = ton_t'(16384 - t0 - t1);
      s = 3'($urandom_range(0, 5));
      #1;
      ex = 0; ey = 0;
      for (int i = 0; i < 3; i++) begin
        ex += longint'(ton[i]) * longint'(vtx[i].x);
        ey += longint'(ton[i]) * longint'(vtx[i].y);
      end
      if (lv == 3) check_seq(seq_a3, bnd_a3, 3, 0, ex, ey, "ab3");
      else         check_seq(seq_a5, bnd_a5, 5, 0, ex, ey, "ab5");
      // g-h: the same triangle is taken as a first-sector one only if it lies
      // in 0..60 degrees (x, y >= 0)
      if (ox >= 0 && oy >= 0) begin
        rx2 = ex; ry2 = ey;
        for (int r = 0; r < int'(s); r++) begin   // turn by 60 degrees: (g,h) -> (-h, g+h)
          tmp = 0;
          {rx2, ry2} = {-ry2, rx2 + ry2};
        end
        if (s[0]) seen_odd++; else seen_even++;
        if (lv == 3) check_seq(seq_g3, bnd_g3, 3, 1, rx2, ry2, "gh3");
        else         check_seq(seq_g5, bnd_g5, 5, 1, rx2, ry2, "gh5");
      end
    end
    chk(seen_odd > 0 && seen_even > 0, "odd and even sectors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
