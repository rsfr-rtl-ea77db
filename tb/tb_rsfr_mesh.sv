// tb_rsfr_mesh: end-to-end test of the default 8x8 RSFR mesh.
//
// Phase 1, fault-free: isolated packets between random pairs must arrive at
// their destination after exactly 2*(hops+1) cycles (two cycles per router,
// minimal route), then random all-to-all traffic must be delivered completely
// while the ejection ports apply random back-pressure.
// Phase 2, faulty: six routers (about 10 %) are forced into the fault models
// (straight, turn, stuck-at-port, multiple copies, transient dropping for a
// limited time) and random traffic runs; every ejected packet must be at its
// destination, the network must drain (no deadlock), and at least a quarter
// of the packets must
// still arrive. Phase 1c sends packets whose TTL is too small.
// Every mechanism of the scheme is counted from the routers' event flags and
// each must have happened at least once: misroute detection, forced choice,
// forwarding to a turn/straight-faulty neighbour, backtracking and its
// reception, path-prediction cuts, risky announcement and risky choice,
// algorithmic drop, TTL drop, lost-packet detection, clearing, stalls.
module tb_rsfr_mesh;
  import rsfr_pkg::*;

  localparam int NX = 8, NY = 8, N = NX * NY;
  localparam int MAXP = 4096;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic    inj_valid [N], inj_ready [N], ej_valid [N], ej_ready [N], dropper [N];
  pkt_t    inj_pkt [N], ej_pkt [N];
  fcfg_t   fcfg [N];
  reqreg_t req_reg [N];
  stat_t   stat [N];
  logic [TTL_W-1:0] ttl_init;

  rsfr_mesh dut (.*);

  always #5 clk = ~clk;

  // bookkeeping
  int cyc = 0;
  int p_dest [MAXP];
  int p_t0 [MAXP];
  int p_got [MAXP];
  int p_lat [MAXP];
  int n_ids = 0;
  int ej_prob = 100;
  int n_ej_total = 0;
  // mechanism counters
  int m_deliver, m_drop, m_ttl, m_bt, m_btrecv, m_mis, m_frc, m_risky, m_cut, m_ffwd, m_lost, m_clear, m_stall, m_riskyhdr;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        m_deliver += stat[i].deliver;
        m_drop    += stat[i].drop;
        m_ttl     += stat[i].ttl_drop;
        m_bt      += stat[i].bt;
        m_btrecv  += stat[i].bt_recv;
        m_mis     += stat[i].misroute;
        m_frc     += stat[i].frc;
        m_risky   += stat[i].took_risky;
        m_cut     += stat[i].pred_cut;
        m_ffwd    += stat[i].faulty_fwd;
        m_lost    += stat[i].lost_detect;
        m_clear   += stat[i].clear_sent;
        if (ej_valid[i] && !ej_ready[i]) m_stall++;
        if (ej_valid[i] && ej_ready[i]) begin
          int id;
          id = int'(ej_pkt[i].data);
          n_ej_total++;
          if (ej_pkt[i].hdr.risky) m_riskyhdr++;
          checks++;
          if (id >= n_ids || p_dest[id] != i) begin
            failures++;
            if (failures < 20) $display("FAIL packet %0d ejected at %0d, destination %0d", id, i, p_dest[id]);
          end else begin
            if (p_got[id] == 0) p_lat[id] = cyc - p_t0[id];
            p_got[id]++;
          end
        end
      end
    end
  end

  always @(negedge clk)
    for (int i = 0; i < N; i++) ej_ready[i] = ($urandom_range(0, 99) < ej_prob);

  // injection handshakes, sampled at the clock edge
  bit acc [N];
  always @(posedge clk)
    for (int i = 0; i < N; i++) if (inj_valid[i] && inj_ready[i]) acc[i] = 1;

  function automatic pkt_t mk(int dst, int id, int ttl);
    pkt_t p = '0;
    p.hdr.sop = 1; p.hdr.eop = 1; p.hdr.ttl = TTL_W'(ttl);
    p.hdr.dest = '{x: COORD_W'(dst % NX), y: COORD_W'(dst / NX)};
    p.data = 32'(id);
    return p;
  endfunction

  // inject one packet at src; blocks until accepted
  task automatic inject(int src, int dst, int ttl);
    int id = n_ids++;
    p_dest[id] = dst; p_got[id] = 0;
    @(negedge clk);
    acc[src] = 0;
    inj_valid[src] = 1; inj_pkt[src] = mk(dst, id, ttl);
    do @(negedge clk); while (!acc[src]);
    p_t0[id] = cyc - 1;
    inj_valid[src] = 0;
    acc[src] = 0;
  endtask

  // random traffic: every source offers `per_src` packets
  task automatic traffic(int per_src, int ttl);
    int left [N];
    int busy;
    foreach (left[i]) left[i] = per_src;
    do begin
      @(negedge clk);
      busy = 0;
      for (int s = 0; s < N; s++) begin
        if (inj_valid[s] && acc[s]) begin
          inj_valid[s] = 0;            // accepted at the previous edge
          acc[s] = 0;
        end
        if (!inj_valid[s] && left[s] > 0 && $urandom_range(0, 99) < 8) begin
          int d, id;
          do d = $urandom_range(0, N - 1); while (d == s);
          id = n_ids++;
          p_dest[id] = d; p_got[id] = 0; p_t0[id] = cyc;
          inj_pkt[s] = mk(d, id, ttl);
          inj_valid[s] = 1;
          left[s]--;
        end
        if (left[s] > 0 || inj_valid[s]) busy = 1;
      end
    end while (busy);
  endtask

  task automatic wait_idle(int max_cycles, output bit idle);
    int q = 0;
    idle = 0;
    for (int c = 0; c < max_cycles; c++) begin
      bit act = 0;
      @(posedge clk);
      for (int i = 0; i < N; i++) if (stat[i].accept || ej_valid[i]) act = 1;
      q = act ? 0 : q + 1;
      if (q >= 40) begin idle = 1; return; end
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog at cycle %0d: routers holding packets:", cyc);
    for (int i = 0; i < N; i++)
      if (dut.r_out_valid[i] != 0 || !inj_ready[i])
        $display("  (%0d,%0d) out_valid=%b inj_ready=%b fcfg=%p", i % NX, i / NX, dut.r_out_valid[i], inj_ready[i], fcfg[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit idle;
    int first_id, delivered, lost;
    {m_deliver, m_drop, m_ttl, m_bt, m_btrecv, m_mis, m_frc, m_risky, m_cut, m_ffwd, m_lost, m_clear, m_stall, m_riskyhdr} = '0;
    for (int i = 0; i < N; i++) begin
      inj_valid[i] = 0; inj_pkt[i] = '0; fcfg[i] = '{mode: FM_NONE, dir: DIR_W};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(ttl_init == 8'(2 * (NX + NY)), "TTL default");

    // ---- phase 1a: isolated packets, exact latency ----
    for (int k = 0; k < 20; k++) begin
      int s, d, hops, id;
      s = $urandom_range(0, N - 1);
      do d = $urandom_range(0, N - 1); while (d == s);
      hops = ((s % NX) > (d % NX) ? (s % NX) - (d % NX) : (d % NX) - (s % NX)) +
             ((s / NX) > (d / NX) ? (s / NX) - (d / NX) : (d / NX) - (s / NX));
      id = n_ids;
      ej_prob = 100;
      inject(s, d, int'(ttl_init));
      wait_idle(200, idle);
      check(p_got[id] == 1, $sformatf("isolated packet %0d delivered", id));
      check(p_lat[id] == 2 * (hops + 1), $sformatf("latency %0d for %0d hops", p_lat[id], hops));
    end

    $display("phase 1a done at cycle %0d", cyc);
    // ---- phase 1b: fault-free random traffic with back-pressure ----
    ej_prob = 70;
    first_id = n_ids;
    traffic(12, int'(ttl_init));
    wait_idle(5000, idle);
    check(idle, "fault-free traffic drains");
    delivered = 0;
    for (int id = first_id; id < n_ids; id++) if (p_got[id] == 1) delivered++;
    check(delivered == n_ids - first_id, $sformatf("fault-free: %0d of %0d delivered once", delivered, n_ids - first_id));
    check(m_mis == 0 && m_drop == 0 && m_bt == 0, "no fault activity without faults");

    $display("phase 1b done at cycle %0d", cyc);
    // ---- phase 1c: TTL too small for the distance ----
    ej_prob = 100;
    first_id = n_ids;
    begin
      int ttl0 = m_ttl;
      for (int k = 0; k < 4; k++) inject(0, N - 1 - k, 3);
      wait_idle(500, idle);
      check(m_ttl - ttl0 == 4, "four packets dropped on TTL expiry");
      for (int id = first_id; id < n_ids; id++) check(p_got[id] == 0, "expired packet not delivered");
    end

    // ---- phase 2: faults ----
    fcfg[3*NX+3] = '{mode: FM_STRAIGHT, dir: DIR_N};
    fcfg[3*NX+5] = '{mode: FM_SAP,      dir: DIR_S};
    fcfg[5*NX+2] = '{mode: FM_TURN,     dir: DIR_W};
    fcfg[6*NX+6] = '{mode: FM_MULTI,    dir: DIR_S};
    fcfg[1*NX+1] = '{mode: FM_SAP,      dir: DIR_N};
    fcfg[4*NX+4] = '{mode: FM_DROP,     dir: DIR_W};
    first_id = n_ids;
    fork
      traffic(20, int'(ttl_init));
      begin
        repeat (40) @(posedge clk);
        fcfg[4*NX+4] = '{mode: FM_NONE, dir: DIR_W};   // the drop was transient
      end
    join
    wait_idle(10000, idle);
    check(idle, "faulty traffic drains (no deadlock)");
    delivered = 0;
    for (int id = first_id; id < n_ids; id++) if (p_got[id] > 0) delivered++;
    lost = (n_ids - first_id) - delivered;
    $display("faulty phase: %0d packets, %0d delivered, %0d not delivered", n_ids - first_id, delivered, lost);
    check(delivered * 4 > (n_ids - first_id), "at least 25% delivered with six faulty routers");

    $display("phase 2 done at cycle %0d", cyc);

    $display("deliver=%0d drop=%0d ttl_drop=%0d bt=%0d bt_recv=%0d misroute=%0d force=%0d risky_pick=%0d risky_hdr=%0d pred_cut=%0d faulty_fwd=%0d lost=%0d clear=%0d stall=%0d",
             m_deliver, m_drop, m_ttl, m_bt, m_btrecv, m_mis, m_frc, m_risky, m_riskyhdr, m_cut, m_ffwd, m_lost, m_clear, m_stall);
    check(m_mis > 0,     "misroute detection happened");
    check(m_frc > 0,     "forced choice happened");
    check(m_ffwd > 0,    "forwarding to a turn/straight-faulty neighbour happened");
    check(m_bt > 0,      "backtrack happened");
    check(m_btrecv > 0,  "backtracked packet received");
    check(m_cut > 0,     "path prediction cut happened");
    check(m_riskyhdr > 0, "risky announcement happened");
    check(m_risky > 0,   "risky last-resort choice happened");
    check(m_drop > 0,    "algorithmic drop happened");
    check(m_ttl > 0,     "TTL drop happened");
    check(m_lost > 0,    "lost packet detected");
    check(m_clear > 0,   "clearing announced");
    check(m_stall > 0,   "back-pressure stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
