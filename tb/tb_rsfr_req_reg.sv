// tb_rsfr_req_reg: directed and random checks of the requisite register.
// A behavioural model in the testbench keeps the four faulty flags, the
// type of fault and its owner (first faulty neighbour in W, E, S, N order),
// and the risky neighbour, and is compared with q, nxt and own_risky.
module tb_rsfr_req_reg;
  import rsfr_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ev0_local;
  logic [3:0] nxt_local_only;
  logic upd, ev0_en, ev0_set, ev1_en, ev1_set, risky_en, risky_val;
  dir_e ev0_dir, ev1_dir, risky_dir;
  tof_e ev0_tof, ev1_tof;
  reqreg_t q, nxt;
  logic risky_vld_q, nxt_risky_vld, owner_vld, own_risky;
  dir_e owner_dir;

  rsfr_req_reg dut (.*);

  always #5 clk = ~clk;

  // model state
  bit   m_f [4];
  tof_e m_t;
  int   m_owner;     // -1: none
  dir_e m_rd;
  bit   m_rv;

  function automatic int first_faulty();
    foreach (m_f[i]) if (m_f[i]) return i;
    return -1;
  endfunction

  task automatic m_event(bit en, bit set, dir_e d, tof_e t);
    int old_owner;
    bit was;
    if (!en) return;
    old_owner = first_faulty();
    was       = m_f[d];
    m_f[d]    = set;
    if (set) begin
      if (first_faulty() == int'(d)) begin
        if (was && old_owner == int'(d)) begin
          if (m_t != t) m_t = TOF_GEN;
        end else m_t = t;
      end
    end else begin
      if (first_faulty() < 0) m_t = TOF_OK;
      else if (old_owner == int'(d)) m_t = TOF_GEN;
    end
  endtask

  task automatic compare(string what);
    reqreg_t e;
    e.risky_dir = m_rd;
    e.tof       = m_t;
    e.faulty    = {m_f[3], m_f[2], m_f[1], m_f[0]};
    checks++;
    if (q != e || risky_vld_q != m_rv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b exp=%b rv=%b/%b", what, q, e, risky_vld_q, m_rv);
    end
  endtask

  task automatic step(bit e0, bit s0, dir_e d0, tof_e t0, bit e1, bit s1, dir_e d1, tof_e t1,
                      bit re, dir_e rd, bit rv, bit commit);
    @(negedge clk);
    ev0_en = e0; ev0_set = s0; ev0_dir = d0; ev0_tof = t0;
    ev1_en = e1; ev1_set = s1; ev1_dir = d1; ev1_tof = t1;
    risky_en = re; risky_dir = rd; risky_val = rv; upd = commit;
    #1;
    if (commit) begin
      m_event(e0, s0, d0, t0);
      m_event(e1, s1, d1, t1);
      if (re) begin
        if (rv) begin m_rd = rd; m_rv = 1; end
        else if (m_rv && m_rd == rd) m_rv = 0;
      end
      // the combinational view must already show the update
      checks++;
      if (nxt.faulty != {m_f[3], m_f[2], m_f[1], m_f[0]} || nxt.tof != m_t ||
          own_risky != ((m_f[0] + m_f[1] + m_f[2] + m_f[3]) > 1) ||
          owner_vld != (first_faulty() >= 0) ||
          (owner_vld && int'(owner_dir) != first_faulty())) begin
        failures++;
        if (failures < 10) $display("FAIL nxt view: nxt=%b", nxt);
      end
    end
    @(posedge clk); #1;
    compare("after step");
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd = 0; ev0_en = 0; ev1_en = 0; risky_en = 0; ev0_local = 0;
    ev0_set = 0; ev1_set = 0; risky_val = 0;
    ev0_dir = DIR_W; ev1_dir = DIR_W; risky_dir = DIR_W; ev0_tof = TOF_GEN; ev1_tof = TOF_GEN;
    m_f = '{0, 0, 0, 0}; m_t = TOF_OK; m_rd = DIR_W; m_rv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare("reset");
    // directed: the scenarios of the ownership rule
    checks++; if (q != 8'b0000_0011) failures++;
    step(1, 1, DIR_E, TOF_STRAIGHT, 0, 0, DIR_W, TOF_GEN, 0, DIR_W, 0, 1);
    checks++; if (q != 8'b00_0010_01) failures++;           // E faulty, straight
    step(1, 1, DIR_W, TOF_TURN, 0, 0, DIR_W, TOF_GEN, 0, DIR_W, 0, 1);
    checks++; if (q != 8'b00_0011_10) failures++;           // W owns, turn
    step(1, 1, DIR_E, TOF_STRAIGHT, 0, 0, DIR_W, TOF_GEN, 0, DIR_W, 0, 1);
    checks++; if (q != 8'b00_0011_10) failures++;           // E not owner: unchanged
    step(1, 1, DIR_W, TOF_STRAIGHT, 0, 0, DIR_W, TOF_GEN, 0, DIR_W, 0, 1);
    checks++; if (q != 8'b00_0011_00) failures++;           // W seen with other kind -> 00
    checks++; if (!own_risky) failures++;
    step(1, 0, DIR_W, TOF_OK, 0, 0, DIR_W, TOF_GEN, 1, DIR_S, 1, 1);
    checks++; if (q != 8'b10_0010_00 || !risky_vld_q) failures++; // W cleared, S risky
    step(0, 0, DIR_W, TOF_OK, 1, 0, DIR_E, TOF_OK, 1, DIR_N, 0, 1);
    checks++; if (q != 8'b10_0000_11 || !risky_vld_q) failures++;
    step(0, 0, DIR_W, TOF_OK, 0, 0, DIR_E, TOF_OK, 1, DIR_S, 0, 1);
    checks++; if (risky_vld_q) failures++;
    step(1, 1, DIR_N, TOF_TURN, 0, 0, DIR_W, TOF_OK, 0, DIR_S, 0, 0);  // no commit
    checks++; if (q.faulty != 4'b0000) failures++;
    // a mark from a backtracked packet is local only, until a real report
    ev0_local = 1;
    step(1, 1, DIR_E, TOF_GEN, 0, 0, DIR_W, TOF_OK, 0, DIR_S, 0, 1);
    ev0_local = 0;
    @(negedge clk); upd = 0; ev0_en = 0; ev1_en = 0; #1;
    checks++; if (nxt_local_only != 4'b0010) failures++;
    step(0, 0, DIR_W, TOF_GEN, 1, 1, DIR_E, TOF_TURN, 0, DIR_S, 0, 1);
    @(negedge clk); upd = 0; ev0_en = 0; ev1_en = 0; #1;
    checks++; if (nxt_local_only != 4'b0000) failures++;
    // random
    for (int n = 0; n < 3000; n++)
      step($urandom_range(0, 1), $urandom_range(0, 2) != 0, dir_e'($urandom_range(0, 3)), tof_e'($urandom_range(0, 3)),
           $urandom_range(0, 1), $urandom_range(0, 2) != 0, dir_e'($urandom_range(0, 3)), tof_e'($urandom_range(0, 3)),
           $urandom_range(0, 1), dir_e'($urandom_range(0, 3)), $urandom_range(0, 1), $urandom_range(0, 3) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
