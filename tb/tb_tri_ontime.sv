// tb_tri_ontime: triangle location and on-times.
// Random references in both signs: the origin must be the floor of each
// component, the triangle half must follow fx+fy > 1, the on-times must be
// non-negative and add to ONE, and the volt-second balance
// sum(t_i * v_i) = V must hold exactly in Q14 integers.
module tb_tri_ontime;
  import svpwm_pkg::*;

  fix_t vx = '0, vy = '0;
  pt_t  origin;
  logic upper;
  pt_t  vtx [3];
  ton_t ton [3];
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  tri_ontime dut (.*);

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
      if (failures < 10) $display("FAIL %s vx=%0d vy=%0d", what, vx, vy);
    end
  endtask

  function automatic int ifloor(input int v);
    return (v >= 0) ? v / 16384 : -((-v + 16383) / 16384);
  endfunction

  initial begin
    longint sx, sy, st;
    int fx, fy, rvx, rvy, flx, fly;
    for (int k = 0; k < 3000; k++) begin
      rvx = int'($urandom_range(0, 6 * 16384)) - 3 * 16384;
      rvy = int'($urandom_range(0, 6 * 16384)) - 3 * 16384;
      vx = fix_t'(rvx);
      vy = fix_t'(rvy);
      if (k == 0) begin vx = 16384; vy = 0; end          // on a lattice point
      if (k == 1) begin vx = 8192;  vy = 8192; end       // on the diagonal
      #1;
      flx = ifloor(int'(vx));
      fly = ifloor(int'(vy));
      fx = int'(vx) - 16384 * flx;
      fy = int'(vy) - 16384 * fly;
      chk(int'(origin.x) == flx && int'(origin.y) == fly, "origin = floor");
      chk(upper == (fx + fy > 16384), "triangle half");
      sx = 0; sy = 0; st = 0;
      for (int i = 0; i < 3; i++) begin
        sx += longint'(ton[i]) * longint'(vtx[i].x);
        sy += longint'(ton[i]) * longint'(vtx[i].y);
        st += longint'(ton[i]);
        chk(int'(ton[i]) <= 16384, "on-time within ts");
        chk(vtx[i].x - origin.x inside {0, 1} && vtx[i].y - origin.y inside {0, 1}, "vertex in cell");
      end
      chk(st == 16384, "on-times add to ts");
      chk(sx == longint'(vx) && sy == longint'(vy), "volt-second balance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
