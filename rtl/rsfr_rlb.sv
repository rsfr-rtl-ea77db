// rsfr_rlb: routing logic block of an RSFR router.
//
// One routing logic block serves the five input buffers (W, E, S, N, local)
// of a router, one packet per cycle, chosen round-robin among non-empty
// buffers. For the chosen packet it performs, in one combinational pass, the
// steps the scheme lists for a router receiving a packet:
//   1. test the previous router (rsfr_fault_detect) and read the fault
//      report of the header;
//   2. apply both to the requisite register (rsfr_req_reg);
//   3. choose the output (rsfr_port_select) using the updated register;
//   4. rewrite the header: TTL-1; PID = the input side (for a packet
//      injected here: the side opposite the output, i.e. "straight", this
//      design's choice); force; risky = own risky status; and the
//      faulty-router/TOF report, in this order of precedence:
//        backtrack signature (own address, 01)
//        own dropper announcement (own address, 00)
//        own clearing announcement (own address, 11)
//        a newly detected faulty previous router (its address, its type)
//        a faulty first-priority neighbour that was bypassed (its address,
//          its type if the type bits are its own, else 00), unless it is
//          only marked because it backtracked a packet here
//        nothing new: keep the incoming report, except that a backtrack
//          signature or a "nothing" report from the previous router and
//          anything from the local port become (own address, 10).
// The chosen ports (want, one-hot: W, E, S, N, local) go to the router,
// which may alter them through fault injection (act) and grants the packet
// with go once every port in act can take it. Register, drop monitor and
// arbitration state change only on that commit; the drop monitor sees the
// packet as having left when act is non-empty or the algorithm dropped it.
module rsfr_rlb
  import rsfr_pkg::*;
#(
  parameter int unsigned NX              = 8,
  parameter int unsigned NY              = 8,
  parameter int unsigned X               = 0,
  parameter int unsigned Y               = 0,
  parameter int unsigned CLEARING_PERIOD = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] in_valid,
  input  pkt_t       in_pkt [5],
  output logic [4:0] in_pop,
  output logic       sel_valid,   // a packet is being decided
  output logic       sel_local,
  output dir_e       sel_dir,
  output logic [4:0] want,
  output pkt_t       out_pkt,
  input  logic       go,          // commit this packet
  input  logic [4:0] act,         // ports it actually goes to
  output reqreg_t    reg_q,       // requisite register
  output logic       dropper,
  output stat_t      stat
);

  localparam addr_t CUR = '{x: COORD_W'(X), y: COORD_W'(Y)};

  logic [2:0] rr_q, sel;
  logic       commit;
  pkt_t       ip;
  hdr_t       h, oh;

  // ---------------- arbitration ----------------
  always_comb begin
    sel_valid = 1'b0;
    sel       = 3'd0;
    for (int k = 4; k >= 0; k--) begin
      int unsigned i;
      i = (32'(rr_q) + 32'(k)) % 5;
      if (in_valid[i]) begin sel_valid = 1'b1; sel = 3'(i); end
    end
  end

  assign sel_local = (sel == 3'd4);
  assign sel_dir   = dir_e'(sel[1:0]);
  assign ip        = in_pkt[sel];
  assign h         = ip.hdr;
  assign commit    = sel_valid && go;

  always_comb begin
    in_pop = '0;
    if (commit) in_pop[sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rr_q <= '0;
    else if (sel_valid)  rr_q <= (sel == 3'd4) ? 3'd0 : sel + 3'd1;
  end

  // ---------------- step 1: test of the previous router ----------------
  addr_t prev_addr;
  logic  misroute, self_drop, self_bt, self_clear, nb_rep;
  tof_e  mis_tof, nb_tof;
  dir_e  nb_dir;

  rsfr_fault_detect #(.NX(NX), .NY(NY)) u_det (
    .cur(CUR), .in_local(sel_local), .in_dir(sel_dir), .hdr(h),
    .prev_addr(prev_addr), .misroute(misroute), .mis_tof(mis_tof),
    .self_drop(self_drop), .self_bt(self_bt), .self_clear(self_clear),
    .nb_rep(nb_rep), .nb_dir(nb_dir), .nb_tof(nb_tof)
  );

  // ---------------- step 2: requisite register ----------------
  logic    ev0_en, ev0_set, ev0_local, ev1_en, ev1_set;
  logic [3:0] lo_n;
  tof_e    ev0_tof;
  reqreg_t rq, rn;
  logic    rv_q, rv_n, own_vld, own_risky;
  dir_e    own_dir;

  always_comb begin
    ev0_en  = 1'b0;
    ev0_set = 1'b1;
    ev0_tof = TOF_GEN;
    ev0_local = self_bt;
    if (!sel_local) begin
      if (self_bt || self_drop)  begin ev0_en = 1'b1; end
      else if (self_clear)       begin ev0_en = 1'b1; ev0_set = 1'b0; end
      else if (misroute)         begin ev0_en = 1'b1; ev0_tof = mis_tof; end
    end
    ev1_en  = nb_rep;
    ev1_set = (nb_tof != TOF_OK);
  end

  rsfr_req_reg u_reg (
    .clk(clk), .rst_n(rst_n), .upd(commit),
    .ev0_en(ev0_en), .ev0_set(ev0_set), .ev0_dir(sel_dir), .ev0_tof(ev0_tof), .ev0_local(ev0_local),
    .ev1_en(ev1_en), .ev1_set(ev1_set), .ev1_dir(nb_dir), .ev1_tof(nb_tof),
    .risky_en(!sel_local), .risky_dir(sel_dir), .risky_val(h.risky),
    .q(rq), .risky_vld_q(rv_q), .nxt(rn), .nxt_risky_vld(rv_n),
    .owner_vld(own_vld), .owner_dir(own_dir), .own_risky(own_risky),
    .nxt_local_only(lo_n)
  );

  // ---------------- step 3: output selection ----------------
  logic deliver, fwd, bt, drop, ttl_drop, frc, top_faulty, took_risky, pred_cut;
  dir_e out_dir, top_dir;

  rsfr_port_select #(.NX(NX), .NY(NY)) u_sel (
    .cur(CUR), .dest(h.dest), .ttl(h.ttl), .in_local(sel_local), .in_dir(sel_dir),
    .bt_in(self_bt), .prev_mis(misroute && !rq.faulty[sel_dir]), .pid(h.pid), .faulty(rn.faulty), .ftype(rn.tof),
    .owner_vld(own_vld), .owner_dir(own_dir), .risky_vld(rv_n), .risky_dir(rn.risky_dir),
    .deliver(deliver), .fwd(fwd), .bt(bt), .out_dir(out_dir), .drop(drop),
    .ttl_drop(ttl_drop), .frc(frc), .top_dir(top_dir), .top_faulty(top_faulty),
    .took_risky(took_risky), .pred_cut(pred_cut)
  );

  // ---------------- drop monitor ----------------
  logic ann_drop, ann_clear, lost_detect, carried_drop, carried_clear;

  rsfr_drop_monitor #(.CLEARING_PERIOD(CLEARING_PERIOD)) u_dm (
    .clk(clk), .rst_n(rst_n), .accept(commit), .leave((act != '0) || drop),
    .fwd_ok(fwd && (act[3:0] != '0)), .carried_drop(carried_drop),
    .carried_clear(carried_clear), .announce_drop(ann_drop),
    .announce_clear(ann_clear), .dropper(dropper), .detect(lost_detect)
  );

  // ---------------- step 4: header rewrite ----------------
  addr_t top_addr;

  always_comb begin
    top_addr = CUR;
    unique case (top_dir)
      DIR_W: top_addr.x = CUR.x - 1'b1;
      DIR_E: top_addr.x = CUR.x + 1'b1;
      DIR_S: top_addr.y = CUR.y - 1'b1;
      DIR_N: top_addr.y = CUR.y + 1'b1;
    endcase
  end

  always_comb begin
    carried_drop  = 1'b0;
    carried_clear = 1'b0;
    oh            = h;
    oh.ttl        = (h.ttl != '0) ? h.ttl - 1'b1 : '0;
    oh.risky      = own_risky;
    if (bt) begin
      oh.frc    = 1'b0;
      oh.faulty = CUR;
      oh.tof    = SELF_BT;
    end else begin
      oh.frc = frc;
      oh.pid = sel_local ? opp(out_dir) : sel_dir;
      if (fwd && ann_drop) begin
        oh.faulty    = CUR;
        oh.tof       = SELF_DROPPER;
        carried_drop = 1'b1;
      end else if (fwd && ann_clear) begin
        oh.faulty     = CUR;
        oh.tof        = SELF_CLEAR;
        carried_clear = 1'b1;
      end else if (misroute && !rq.faulty[sel_dir]) begin
        oh.faulty = prev_addr;
        oh.tof    = mis_tof;
      end else if (fwd && top_faulty && !lo_n[top_dir] && out_dir != top_dir) begin
        oh.faulty = top_addr;
        oh.tof    = (own_vld && own_dir == top_dir) ? rn.tof : TOF_GEN;
      end else if (sel_local || self_bt || (h.faulty == prev_addr && h.tof == SELF_NONE)) begin
        oh.faulty = CUR;
        oh.tof    = SELF_NONE;
      end
    end
    out_pkt.hdr  = oh;
    out_pkt.data = ip.data;
  end

  always_comb begin
    want = '0;
    if (deliver)       want[4]       = 1'b1;
    else if (fwd || bt) want[{1'b0, out_dir}] = 1'b1;
  end

  // ---------------- observation ----------------
  assign reg_q = rq;

  always_comb begin
    stat             = '0;
    stat.accept      = commit;
    stat.deliver     = commit && deliver;
    stat.fwd         = commit && fwd;
    stat.drop        = commit && drop;
    stat.ttl_drop    = commit && ttl_drop;
    stat.bt          = commit && bt;
    stat.bt_recv     = commit && self_bt;
    stat.misroute    = commit && misroute;
    stat.frc         = commit && fwd && frc;
    stat.took_risky  = commit && took_risky;
    stat.pred_cut    = commit && pred_cut;
    stat.faulty_fwd  = commit && fwd && rn.faulty[out_dir];
    stat.lost_detect = commit && lost_detect;
    stat.clear_sent  = commit && carried_clear;
  end

endmodule
