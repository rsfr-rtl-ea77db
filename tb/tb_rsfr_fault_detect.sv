// tb_rsfr_fault_detect: the previous-router test and header decoding.
// Directed cases reproduce the two worked examples of the scheme on a 4x4
// mesh (straight-faulty router, then the same router stuck at north); random
// cases compare with a model that recomputes the previous router's
// permitted ports from distances.
module tb_rsfr_fault_detect;
  import rsfr_pkg::*;

  int checks = 0, failures = 0;
  addr_t cur, prev_addr, nb_addr;
  logic  in_local, misroute, self_drop, self_bt, self_clear, nb_rep;
  dir_e  in_dir, nb_dir;
  hdr_t  hdr;
  tof_e  mis_tof, nb_tof;

  rsfr_fault_detect #(.NX(4), .NY(4)) dut (.*);

  // model: permitted ports of a router at p for destination d, as a bitmask
  // over W,E,S,N, plus its first choice
  function automatic void model_ports(int px, int py, int dx, int dy, output bit [3:0] allowed, output int first);
    int ex, ey;
    ex = dx - px; ey = dy - py;
    allowed = '0; first = -1;
    if (ex > 0 && ey > 0) begin allowed = 4'b1111; first = 1; end
    else if (ex > 0 && ey == 0) begin allowed = 4'b0111; first = 1; end
    else if (ex > 0) begin allowed = 4'b0101; first = 2; end
    else if (ex < 0) begin allowed = 4'b0101; first = 0; end
    else if (ey < 0) begin allowed = 4'b0101; first = 2; end
    else if (ey > 0) begin allowed = 4'b1101; first = 3; end
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // example (a): router 10 = (2,2) gets from its south neighbour 11 = (2,1)
    // a packet for 15 = (3,1) that 11 received from its west (7 = (1,1))
    cur = '{x: 2, y: 2}; in_local = 0; in_dir = DIR_S;
    hdr = '0; hdr.dest = '{x: 3, y: 1}; hdr.pid = DIR_W; hdr.frc = 0;
    hdr.faulty = '{x: 1, y: 1}; hdr.tof = SELF_NONE;
    #1;
    check(prev_addr == '{x: 2, y: 1}, "prev address");
    check(misroute && mis_tof == TOF_STRAIGHT, "example a: straight fault");
    check(!self_drop && !self_bt && !self_clear, "example a: no self announcement");
    check(nb_rep == 0, "example a: (1,1) is no neighbour of (2,2)");
    // example (b): 11 sent it back north; its input was north
    hdr.pid = DIR_N; hdr.faulty = '{x: 2, y: 2}; hdr.tof = TOF_STRAIGHT;
    #1;
    check(misroute && mis_tof == TOF_TURN, "example b: turn fault");
    // 11 forwarding east legally towards 15, as seen by 15
    cur = '{x: 3, y: 1}; in_dir = DIR_W; hdr.pid = DIR_N; hdr.dest = '{x: 3, y: 1};
    #1;
    check(!misroute, "legal hop");
    // forced hop: 11 sends south (2nd priority) with force set
    cur = '{x: 2, y: 0}; in_dir = DIR_N; hdr.frc = 1; hdr.dest = '{x: 3, y: 1};
    #1;
    check(!misroute, "forced hop in list");
    hdr.frc = 0;
    #1;
    check(misroute, "unforced second-priority hop");
    // self announcements
    hdr.faulty = '{x: 2, y: 1};
    hdr.tof = SELF_DROPPER; #1; check(self_drop && !self_bt && !self_clear, "dropper");
    hdr.tof = SELF_BT;      #1; check(self_bt && !misroute, "backtrack is not a misroute");
    hdr.tof = SELF_CLEAR;   #1; check(self_clear, "clear");
    // report of another neighbour: (1,0) is west of (2,0)
    hdr.faulty = '{x: 1, y: 0}; hdr.tof = TOF_TURN; #1;
    check(nb_rep && nb_dir == DIR_W && nb_tof == TOF_TURN, "neighbour report");
    in_local = 1; #1;
    check(!nb_rep && !misroute, "local input ignored");

    // random
    for (int n = 0; n < 4000; n++) begin
      int cx, cy, px, py, first;
      bit [3:0] allowed;
      bit exp_mis;
      dir_e pout;
      cx = $urandom_range(0, 3); cy = $urandom_range(0, 3);
      in_dir = dir_e'($urandom_range(0, 3));
      px = cx; py = cy;
      case (in_dir)
        DIR_W: px = cx - 1;
        DIR_E: px = cx + 1;
        DIR_S: py = cy - 1;
        DIR_N: py = cy + 1;
      endcase
      if (px < 0 || px > 3 || py < 0 || py > 3) continue;
      cur = '{x: 4'(cx), y: 4'(cy)};
      in_local = 0;
      hdr = '0;
      hdr.dest = '{x: 4'($urandom_range(0, 3)), y: 4'($urandom_range(0, 3))};
      hdr.frc = $urandom_range(0, 1);
      hdr.pid = dir_e'($urandom_range(0, 3));
      hdr.faulty = '{x: 4'($urandom_range(0, 3)), y: 4'($urandom_range(0, 3))};
      hdr.tof = tof_e'($urandom_range(0, 3));
      #1;
      model_ports(px, py, int'(hdr.dest.x), int'(hdr.dest.y), allowed, first);
      case (in_dir)
        DIR_W: pout = DIR_E;
        DIR_E: pout = DIR_W;
        DIR_S: pout = DIR_N;
        default: pout = DIR_S;
      endcase
      if (hdr.faulty == '{x: 4'(px), y: 4'(py)} && hdr.tof == SELF_BT) exp_mis = 0;
      else if (first < 0) exp_mis = 1;
      else if (!hdr.frc) exp_mis = (int'(pout) != first);
      else exp_mis = !allowed[pout];
      check(misroute == exp_mis, $sformatf("random misroute cur=(%0d,%0d) in=%0d", cx, cy, in_dir));
      check(prev_addr == '{x: 4'(px), y: 4'(py)}, "random prev addr");
      if (exp_mis && first >= 0) begin
        bit straight;
        straight = (first ^ 1) == int'(hdr.pid);
        check(mis_tof == (straight ? TOF_STRAIGHT : TOF_TURN), "random fault type");
      end
      begin
        int fx, fy, ad;
        bit is_nb;
        fx = int'(hdr.faulty.x); fy = int'(hdr.faulty.y);
        ad = (fx > cx ? fx - cx : cx - fx) + (fy > cy ? fy - cy : cy - fy);
        is_nb = (ad == 1) && !(fx == px && fy == py);
        check(nb_rep == is_nb, "random neighbour report");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
