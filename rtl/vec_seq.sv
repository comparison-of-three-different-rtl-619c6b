// vec_seq: switching states of the three nearest vectors and their order.
//
// Input: the three vertices of the triangle holding the reference (integer
// lattice points) and their on-times. Output: a four-segment switching
// sequence seq[0..3] and the three segment boundaries bnd[0..2] = tI, tII,
// tIII within one ts (Q14), as used for the time mapping.
//
// 1. Each vertex (x, y) is turned into its lowest switching state (the one
//    with a phase at level 0). In the alpha'-beta' frame x = SA-SC and
//    y = SB-SA, giving (a, a+y, a-x) with a = max(0, -y, x); this equals the
//    published rules (0, y, -x) for x<=0, y>=0 and (k, k+y, k-x) with
//    k = max(|x|,|y|) everywhere inside the three-level hexagon, and stays
//    correct for more levels. In the g-h frame x = SA-SB and y = SB-SC,
//    giving (a+x+y, a+y, a) with a = max(0, -y, -x-y), i.e. (x+y, y, 0) in
//    the first sector as published.
// 2. The vertex nearest the hexagon centre (smallest highest level; ties go
//    to the smaller level sum) is the redundant (short) vector: its time is
//    split into two halves, at the start with its low state and at the end
//    with (1,1,1) added. The other two vertices take the redundant state
//    whose level sum lies one or two above the start's, and are ordered by
//    level sum ("from small to large"), so each step raises one phase by one.
//    The tie rule is this design's choice.
// 3. g-h frame only: the work is done in the first sector and the sequence
//    is turned into sector s. An odd sector first takes the 60-degree turn
//    (SA,SB,SC) -> (K-SB, K-SC, K-SA), K = LEVELS-1, which reverses the order
//    of the sequence (the boundaries become ts - tIII, ts - tII, ts - tI);
//    then every state is rotated right by floor(s/2) phases, as in the
//    published sector pattern (s = 2, 4 from s = 0, s = 3, 5 from s = 1).
//
// Combinational. The sector input is ignored in the alpha'-beta' frame.
module vec_seq
  import svpwm_pkg::*;
#(
  parameter int     LEVELS = 3,
  parameter frame_e FRAME  = FRAME_AB
) (
  input  pt_t        vtx [3],
  input  ton_t       ton [3],
  input  logic [2:0] s,
  output state_t     seq [4],
  output ton_t       bnd [3],
  output logic [1:0] start_idx
);

  localparam int K = LEVELS - 1;

  function automatic state_t low_state(input pt_t p);
    int x, y, a0, a;
    state_t r;
    x = int'(p.x);
    y = int'(p.y);
    a0 = (-y > 0) ? -y : 0;
    if (FRAME == FRAME_AB) begin
      a   = (x > a0) ? x : a0;
      r.a = lvl_t'(a);
      r.b = lvl_t'(a + y);
      r.c = lvl_t'(a - x);
    end else begin
      a   = (-x - y > a0) ? -x - y : a0;
      r.a = lvl_t'(a + x + y);
      r.b = lvl_t'(a + y);
      r.c = lvl_t'(a);
    end
    return r;
  endfunction

  function automatic int lvl_max(input state_t v);
    int r;
    r = int'(v.a);
    if (int'(v.b) > r) r = int'(v.b);
    if (int'(v.c) > r) r = int'(v.c);
    return r;
  endfunction

  function automatic int lvl_sum(input state_t v);
    return int'(v.a) + int'(v.b) + int'(v.c);
  endfunction

  function automatic state_t plus1(input state_t v);
    return '{a: v.a + 1'b1, b: v.b + 1'b1, c: v.c + 1'b1};
  endfunction

  // 60-degree turn in the g-h frame
  function automatic state_t turn60(input state_t v);
    return '{a: lvl_t'(K) - v.b, b: lvl_t'(K) - v.c, c: lvl_t'(K) - v.a};
  endfunction

  // rotate (SA,SB,SC) right by one phase: (SC, SA, SB)
  function automatic state_t rotr(input state_t v);
    return '{a: v.c, b: v.a, c: v.b};
  endfunction

  state_t     low  [3];
  logic [15:0] mx  [3];
  logic [15:0] sm  [3];
  logic [1:0] j0, j1, j2;
  logic [1:0] jf, jl;
  state_t     st1, st2;
  state_t     q    [4];
  ton_t       qb   [3];
  ton_t       half;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      low[i] = low_state(vtx[i]);
      mx[i]  = 16'(lvl_max(low[i]));
      sm[i]  = 16'(lvl_sum(low[i]));
    end
    // the redundant vertex
    j0 = 2'd0;
    for (int i = 1; i < 3; i++)
      if (mx[i] < mx[j0] || (mx[i] == mx[j0] && sm[i] < sm[j0])) j0 = 2'(i);
    j1 = (j0 == 2'd0) ? 2'd1 : 2'd0;
    j2 = (j0 == 2'd2) ? 2'd1 : 2'd2;
    // redundant states one or two level steps above the start state
    st1 = (sm[j1] > sm[j0]) ? low[j1] : plus1(low[j1]);
    st2 = (sm[j2] > sm[j0]) ? low[j2] : plus1(low[j2]);
    if (lvl_sum(st1) <= lvl_sum(st2)) begin
      q[1] = st1; q[2] = st2; jf = j1; jl = j2;
    end else begin
      q[1] = st2; q[2] = st1; jf = j2; jl = j1;
    end
    q[0] = low[j0];
    q[3] = plus1(low[j0]);
    half  = ton[j0] >> 1;
    qb[0] = half;
    qb[1] = half + ton[jf];
    qb[2] = half + ton[jf] + ton[jl];

    // sector turn (g-h frame)
    if (FRAME == FRAME_GH && s[0]) begin
      for (int k = 0; k < 4; k++) seq[k] = turn60(q[3-k]);
      for (int k = 0; k < 3; k++) bnd[k] = ton_t'(ONE) - qb[2-k];
    end else begin
      seq = q;
      bnd = qb;
    end
    if (FRAME == FRAME_GH) begin
      for (int r = 0; r < 2; r++)
        if (int'(s[2:1]) > r)
          for (int k = 0; k < 4; k++) seq[k] = rotr(seq[k]);
    end
    start_idx = j0;
  end

endmodule
