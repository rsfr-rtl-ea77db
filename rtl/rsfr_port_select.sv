// rsfr_port_select: the RSFR routing decision for one packet.
//
// Walks the priority list of this router (rsfr_prio) and takes the first
// port that satisfies every condition of the algorithm:
//   - the neighbour exists (mesh edge) and is not the input port (no U-turn),
//     unless the previous router misrouted the packet: then returning it to
//     that router is allowed, as the scheme's worked example does;
//   - the turn from the input port is not one negative-first forbids;
//   - for a backtracked packet, the port forms no forbidden turn with the
//     PID field (the third-last input) and is not opposite to PID, which
//     rules out the "long U-turn";
//   - path prediction: from the next router the packet must still have a
//     legal continuation (its own priority list, minus U-turn, forbidden
//     turns and mesh edges), and a north or east hop must not overshoot the
//     destination, after which only forbidden turns would lead back;
//   - the neighbour is not faulty, except a neighbour known to be only
//     turn-faulty or only straight-faulty (the type bits of the requisite
//     register) when the path the packet will take through it, predicted
//     from its own first-priority port, is of the other kind;
//   - the neighbour is not risky, if any non-risky port qualifies; otherwise
//     the highest-priority risky port that qualifies is taken.
// If no port qualifies the packet is backtracked through its input port when
// the previous router is not faulty (and the packet did not come from the
// local port), else dropped. A packet whose TTL is 0 is dropped; one at its
// destination is delivered. force is set when the chosen port is not the
// first-priority one. top_faulty says the first-priority neighbour is marked
// faulty, which the header update reports.
//
// The register inputs must be the register with this packet's own updates
// applied. Purely combinational. The lookahead of path prediction is one hop
// deep: this design's reading of the scheme's prediction rule.
module rsfr_port_select
  import rsfr_pkg::*;
#(
  parameter int unsigned NX = 8,
  parameter int unsigned NY = 8
) (
  input  addr_t      cur,
  input  addr_t      dest,
  input  logic [TTL_W-1:0] ttl,
  input  logic       in_local,
  input  dir_e       in_dir,
  input  logic       bt_in,       // packet is a backtracked one
  input  logic       prev_mis,    // the previous router misrouted it
  input  dir_e       pid,
  input  logic [3:0] faulty,      // requisite register, updated view
  input  tof_e       ftype,
  input  logic       owner_vld,
  input  dir_e       owner_dir,
  input  logic       risky_vld,
  input  dir_e       risky_dir,
  output logic       deliver,     // eject to the local port
  output logic       fwd,         // forward through out_dir
  output logic       bt,          // backtrack through out_dir (== in_dir)
  output dir_e       out_dir,
  output logic       drop,        // algorithmic drop
  output logic       ttl_drop,    // drop caused by TTL expiry
  output logic       frc,
  output dir_e       top_dir,
  output logic       top_faulty,
  output logic       took_risky,
  output logic       pred_cut     // path prediction removed a port
);

  logic       c_at_dest;
  logic [2:0] c_cnt;
  dir_e       c_list [4];

  addr_t      n_addr    [4];
  logic       n_at_dest [4];
  logic [2:0] n_cnt     [4];
  dir_e       n_list    [4][4];

  logic [3:0] exists, ok_base, ok_pred, ok_fault, ok, risky;

  rsfr_prio u_cur_prio (.cur(cur), .dest(dest), .at_dest(c_at_dest), .cnt(c_cnt), .list(c_list));

  for (genvar d = 0; d < 4; d++) begin : g_next
    always_comb begin
      n_addr[d] = cur;
      unique case (dir_e'(d))
        DIR_W: n_addr[d].x = cur.x - 1'b1;
        DIR_E: n_addr[d].x = cur.x + 1'b1;
        DIR_S: n_addr[d].y = cur.y - 1'b1;
        DIR_N: n_addr[d].y = cur.y + 1'b1;
      endcase
    end
    rsfr_prio u_next_prio (
      .cur(n_addr[d]), .dest(dest), .at_dest(n_at_dest[d]), .cnt(n_cnt[d]), .list(n_list[d])
    );
  end

  function automatic logic has_nb(addr_t a, dir_e d);
    unique case (d)
      DIR_W:   return a.x != '0;
      DIR_E:   return 32'(a.x) < NX-1;
      DIR_S:   return a.y != '0;
      default: return 32'(a.y) < NY-1;
    endcase
  endfunction

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      dir_e  dd;
      dir_e  nin;
      logic  cont, straight;
      dd        = dir_e'(d);
      nin       = opp(dd);
      exists[d] = has_nb(cur, dd);

      ok_base[d] = exists[d];
      if (!in_local && ((dd == in_dir && !prev_mis) || prohibited(in_dir, dd))) ok_base[d] = 1'b0;
      if (bt_in && (prohibited(pid, dd) || dd == opp(pid)))      ok_base[d] = 1'b0;

      // path prediction, one hop ahead
      cont = n_at_dest[d];
      for (int k = 0; k < 4; k++)
        if (3'(k) < n_cnt[d] && n_list[d][k] != nin && !prohibited(nin, n_list[d][k]) &&
            has_nb(n_addr[d], n_list[d][k]))
          cont = 1'b1;
      ok_pred[d] = cont;
      if (dd == DIR_N && !(dest.y > cur.y && dest.x >= cur.x)) ok_pred[d] = 1'b0;
      if (dd == DIR_E && !(dest.x > cur.x && dest.y >= cur.y)) ok_pred[d] = 1'b0;

      // faulty neighbour: usable only if its single path-kind fault is avoided
      straight = (n_list[d][0] == dd);
      if (!faulty[d])
        ok_fault[d] = 1'b1;
      else if (owner_vld && owner_dir == dd && (ftype == TOF_TURN || ftype == TOF_STRAIGHT))
        ok_fault[d] = n_at_dest[d] || (ftype == TOF_TURN ? straight : !straight);
      else
        ok_fault[d] = 1'b0;

      ok[d]    = ok_base[d] && ok_pred[d] && ok_fault[d];
      risky[d] = risky_vld && risky_dir == dd;
    end
  end

  always_comb begin
    logic found_safe, found_risky;
    dir_e safe_dir, risky_pick;
    found_safe  = 1'b0;
    found_risky = 1'b0;
    safe_dir    = DIR_W;
    risky_pick  = DIR_W;
    pred_cut    = 1'b0;
    for (int k = 3; k >= 0; k--) begin
      if (3'(k) < c_cnt) begin
        if (ok[c_list[k]] && !risky[c_list[k]]) begin found_safe = 1'b1; safe_dir = c_list[k]; end
        if (ok[c_list[k]]) begin found_risky = 1'b1; risky_pick = c_list[k]; end
        if (ok_base[c_list[k]] && ok_fault[c_list[k]] && !ok_pred[c_list[k]]) pred_cut = 1'b1;
      end
    end

    deliver    = 1'b0;
    fwd        = 1'b0;
    bt         = 1'b0;
    drop       = 1'b0;
    ttl_drop   = 1'b0;
    took_risky = 1'b0;
    out_dir    = safe_dir;
    top_dir    = c_list[0];
    top_faulty = (c_cnt != '0) && faulty[c_list[0]];

    if (c_at_dest) begin
      deliver = 1'b1;
    end else if (ttl == '0) begin
      drop     = 1'b1;
      ttl_drop = 1'b1;
    end else if (found_safe) begin
      fwd = 1'b1;
    end else if (found_risky) begin
      fwd        = 1'b1;
      out_dir    = risky_pick;
      took_risky = 1'b1;
    end else if (!in_local && !faulty[in_dir]) begin
      bt      = 1'b1;
      out_dir = in_dir;
    end else begin
      drop = 1'b1;
    end
    frc = fwd && (out_dir != c_list[0]);
  end

endmodule
