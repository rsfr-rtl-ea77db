// tb_rsfr_port_select: the routing decision.
// Directed cases: the scheme's worked example (forwarding to a straight-
// faulty neighbour on a turn path; then dropping once it is known stuck),
// backtracking, TTL expiry, delivery and risky avoidance. Random cases on a
// 4x4 mesh compare with a model that re-derives every condition from
// coordinates.
module tb_rsfr_port_select;
  import rsfr_pkg::*;

  localparam int NX = 4, NY = 4;
  int checks = 0, failures = 0;
  addr_t cur, dest;
  logic [TTL_W-1:0] ttl;
  logic in_local, bt_in, prev_mis, owner_vld, risky_vld;
  dir_e in_dir, pid, owner_dir, risky_dir, out_dir, top_dir;
  logic [3:0] faulty;
  tof_e ftype;
  logic deliver, fwd, bt, drop, ttl_drop, frc, top_faulty, took_risky, pred_cut;

  rsfr_port_select #(.NX(NX), .NY(NY)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  // ---- model ----
  function automatic void m_list(int cx, int cy, int dx, int dy, output int l[$]);
    int ex = dx - cx, ey = dy - cy;
    l = {};
    if (ex > 0 && ey < 0) l = {2, 0};
    else if (ex > 0 && ey > 0) l = {1, 3, 2, 0};
    else if (ex > 0) l = {1, 2, 0};
    else if (ex < 0) l = {0, 2};
    else if (ey < 0) l = {2, 0};
    else if (ey > 0) l = {3, 0, 2};
  endfunction
  function automatic void step_xy(int x, int y, int d, output int nx, output int ny);
    nx = x + (d == 1) - (d == 0);
    ny = y + (d == 3) - (d == 2);
  endfunction
  function automatic bit inside_mesh(int x, int y);
    return x >= 0 && x < NX && y >= 0 && y < NY;
  endfunction
  function automatic bit forb(int i, int o);
    return (i == 2 && o == 0) || (i == 0 && o == 2);
  endfunction

  // returns 0 deliver, 1 fwd, 2 bt, 3 drop; d = port
  function automatic int model(output int d, output bit mfrc);
    int cx = int'(cur.x), cy = int'(cur.y), tx = int'(dest.x), ty = int'(dest.y);
    int l[$];
    int safe = -1, any = -1;
    mfrc = 0; d = 0;
    m_list(cx, cy, tx, ty, l);
    if (l.size() == 0) return 0;
    if (ttl == 0) return 3;
    foreach (l[k]) begin
      int c = l[k], nx, ny, nin;
      int nl[$];
      bit ok = 1, cont = 0;
      step_xy(cx, cy, c, nx, ny);
      nin = c ^ 1;
      if (!inside_mesh(nx, ny)) ok = 0;
      if (!in_local && c == int'(in_dir) && !prev_mis) ok = 0;
      if (!in_local && forb(int'(in_dir), c)) ok = 0;
      if (bt_in && (forb(int'(pid), c) || c == (int'(pid) ^ 1))) ok = 0;
      if (ok) begin
        m_list(nx, ny, tx, ty, nl);
        if (nl.size() == 0) cont = 1;
        foreach (nl[j]) begin
          int mx, my;
          step_xy(nx, ny, nl[j], mx, my);
          if (nl[j] != nin && !forb(nin, nl[j]) && inside_mesh(mx, my)) cont = 1;
        end
        if (c == 3 && !(ty > cy && tx >= cx)) cont = 0;
        if (c == 1 && !(tx > cx && ty >= cy)) cont = 0;
        if (!cont) ok = 0;
        if (faulty[c]) begin
          if (owner_vld && int'(owner_dir) == c && (ftype == TOF_TURN || ftype == TOF_STRAIGHT)) begin
            bit str = (nl.size() != 0) && nl[0] == c;
            if (nl.size() != 0 && (ftype == TOF_TURN) != str) ok = 0;
          end else ok = 0;
        end
      end
      if (ok && any < 0) any = c;
      if (ok && safe < 0 && !(risky_vld && int'(risky_dir) == c)) safe = c;
    end
    if (safe >= 0) begin d = safe; mfrc = (safe != l[0]); return 1; end
    if (any >= 0)  begin d = any;  mfrc = (any != l[0]);  return 1; end
    if (!in_local && !faulty[in_dir]) begin d = int'(in_dir); return 2; end
    return 3;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fwd = 0, n_bt = 0, n_drop = 0, n_risky = 0, n_cut = 0, n_ffwd = 0;
    // worked example (a): router (2,2) got the packet from straight-faulty
    // (2,1) below it; destination (3,1)
    cur = '{x: 2, y: 2}; dest = '{x: 3, y: 1}; ttl = 10; in_local = 0; in_dir = DIR_S;
    bt_in = 0; prev_mis = 1; pid = DIR_W; faulty = 4'b0100; ftype = TOF_STRAIGHT;
    owner_vld = 1; owner_dir = DIR_S; risky_vld = 0; risky_dir = DIR_W;
    #1;
    check(fwd && out_dir == DIR_S && !frc, "example a: back to straight-faulty router on a turn path");
    // example (b): the same router is now known as generally faulty
    ftype = TOF_GEN; #1;
    check(drop && !fwd && !bt, "example b: dropped");
    // backtrack: no way on, previous router healthy
    cur = '{x: 3, y: 3}; dest = '{x: 3, y: 0}; in_dir = DIR_W; prev_mis = 0;
    faulty = 4'b0100; owner_dir = DIR_S; #1;
    check(bt && out_dir == DIR_W, "backtrack");
    // TTL
    ttl = 0; faulty = 0; #1;
    check(drop && ttl_drop, "ttl expiry");
    ttl = 5;
    // delivery
    dest = cur; #1;
    check(deliver && !fwd, "deliver");
    // risky: from (1,1) to (3,3), east neighbour risky
    cur = '{x: 1, y: 1}; dest = '{x: 3, y: 3}; in_local = 1; faulty = 0;
    risky_vld = 1; risky_dir = DIR_E; #1;
    check(fwd && out_dir == DIR_N && frc && !took_risky, "avoid risky");
    faulty = 4'b1101; owner_vld = 1; owner_dir = DIR_W; ftype = TOF_GEN; #1;
    check(fwd && out_dir == DIR_E && took_risky, "risky as last resort");
    // backtracked packet may not continue opposite to PID (long U-turn)
    cur = '{x: 1, y: 1}; dest = '{x: 0, y: 0}; in_local = 0; in_dir = DIR_N;
    faulty = 4'b1000; owner_dir = DIR_N; risky_vld = 0; bt_in = 1; pid = DIR_E; #1;
    check(fwd && out_dir == DIR_S, "bt: west excluded, south taken");
    bt_in = 0; #1;
    check(fwd && out_dir == DIR_W, "not bt: west first");

    for (int n = 0; n < 20000; n++) begin
      int md, r;
      bit mf;
      cur  = '{x: 4'($urandom_range(0, 3)), y: 4'($urandom_range(0, 3))};
      dest = '{x: 4'($urandom_range(0, 3)), y: 4'($urandom_range(0, 3))};
      ttl  = ($urandom_range(0, 15) == 0) ? 0 : 8'($urandom_range(1, 40));
      in_local = ($urandom_range(0, 4) == 0);
      in_dir = dir_e'($urandom_range(0, 3));
      bt_in = ($urandom_range(0, 3) == 0);
      prev_mis = ($urandom_range(0, 3) == 0);
      pid = dir_e'($urandom_range(0, 3));
      faulty = ($urandom_range(0, 1) == 0) ? 4'b0 : 4'($urandom_range(0, 15));
      ftype = tof_e'($urandom_range(0, 3));
      owner_vld = (faulty != 0);
      owner_dir = DIR_W;
      for (int i = 3; i >= 0; i--) if (faulty[i]) owner_dir = dir_e'(i);
      risky_vld = $urandom_range(0, 1);
      risky_dir = dir_e'($urandom_range(0, 3));
      #1;
      r = model(md, mf);
      case (r)
        0: check(deliver && !fwd && !bt && !drop, "random deliver");
        1: begin
             check(fwd && !bt && !drop && !deliver && int'(out_dir) == md && frc == mf,
                   $sformatf("random fwd cur=(%0d,%0d) dest=(%0d,%0d) got %0d exp %0d", cur.x, cur.y, dest.x, dest.y, out_dir, md));
             n_fwd++;
             if (took_risky) n_risky++;
             if (faulty[out_dir]) n_ffwd++;
           end
        2: begin check(bt && int'(out_dir) == md && !fwd && !drop, "random bt"); n_bt++; end
        default: begin check(drop && !fwd && !bt, "random drop"); n_drop++; end
      endcase
      if (pred_cut) n_cut++;
    end
    $display("random: fwd=%0d bt=%0d drop=%0d risky=%0d pred_cut=%0d to_faulty=%0d", n_fwd, n_bt, n_drop, n_risky, n_cut, n_ffwd);
    check(n_bt > 0 && n_risky > 0 && n_cut > 0 && n_ffwd > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
