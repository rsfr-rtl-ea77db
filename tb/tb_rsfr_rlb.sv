// tb_rsfr_rlb: routing logic block of router (2,2) in a 4x4 mesh, driven
// directly at its buffer-head interface. Replays the scheme's worked example
// (detection of a straight-faulty neighbour, return of the packet on a turn
// path, reclassification and drop), then a backtracked packet, a lost packet
// announcement, a neighbour report and round-robin service of two inputs.
// Header rewriting and register contents are checked after every packet.
module tb_rsfr_rlb;
  import rsfr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid, in_pop, want, act;
  pkt_t in_pkt [5];
  logic sel_valid, sel_local, go, dropper;
  dir_e sel_dir;
  pkt_t out_pkt;
  reqreg_t reg_q;
  stat_t stat;
  bit force_drop = 0;

  rsfr_rlb #(.NX(4), .NY(4), .X(2), .Y(2), .CLEARING_PERIOD(5)) dut (.*);

  always #5 clk = ~clk;
  assign act = force_drop ? 5'b0 : want;
  assign go  = sel_valid;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (want=%b hdr=%p reg=%b)", what, want, out_pkt.hdr, reg_q);
    end
  endtask

  function automatic pkt_t mk(int dx, int dy, dir_e pid, bit frc, int fx, int fy, tof_e tof, int data);
    pkt_t p = '0;
    p.hdr.sop = 1; p.hdr.eop = 1; p.hdr.ttl = 20;
    p.hdr.dest = '{x: 4'(dx), y: 4'(dy)}; p.hdr.pid = pid; p.hdr.frc = frc;
    p.hdr.faulty = '{x: 4'(fx), y: 4'(fy)}; p.hdr.tof = tof;
    p.data = 32'(data);
    return p;
  endfunction

  // present one packet at port p, sample decision, let it commit
  task automatic one(int p, pkt_t pk);
    @(negedge clk);
    in_valid = '0; in_valid[p] = 1'b1; in_pkt[p] = pk;
    #1;
    checks++;
    if (!(sel_valid && in_pop[p])) begin failures++; $display("FAIL not served"); end
  endtask
  task automatic finish_one();
    @(posedge clk); #1;
    in_valid = '0;
  endtask

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0;
    for (int i = 0; i < 5; i++) in_pkt[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(reg_q == 8'b00_0000_11, "register after reset");

    // local packet for (3,1): first priority south
    one(4, mk(3, 1, DIR_W, 0, 0, 0, TOF_GEN, 1));
    check(want == 5'b00100 && out_pkt.hdr.pid == DIR_N && out_pkt.hdr.ttl == 19 &&
          out_pkt.hdr.faulty == '{x: 2, y: 2} && out_pkt.hdr.tof == SELF_NONE && !out_pkt.hdr.frc &&
          out_pkt.data == 1, "local injection");
    finish_one();

    // (2,1) straight-faulty sent a packet for (3,1) north to us
    one(2, mk(3, 1, DIR_W, 0, 1, 1, SELF_NONE, 2));
    check(want == 5'b00100, "example a: back south on a turn path");
    check(out_pkt.hdr.faulty == '{x: 2, y: 1} && out_pkt.hdr.tof == TOF_STRAIGHT && out_pkt.hdr.pid == DIR_S,
          "example a: report straight-faulty (2,1)");
    check(stat.misroute && stat.faulty_fwd, "example a: events");
    finish_one();
    check(reg_q == 8'b00_0100_01, "example a: register S faulty, straight");

    // it comes back again: (2,1) is stuck at north
    one(2, mk(3, 1, DIR_N, 0, 2, 1, SELF_NONE, 3));
    check(want == 5'b00000 && stat.drop, "example b: dropped");
    finish_one();
    check(reg_q == 8'b00_0100_00, "example b: type now general");

    // backtracked packet from (1,2) (west), PID east: west excluded
    one(0, mk(0, 0, DIR_E, 0, 1, 2, SELF_BT, 4));
    check(stat.bt_recv, "bt received");
    check(want == 5'b00000 || want == 5'b00100, "bt: south faulty, west is the sender");
    finish_one();
    check(reg_q.faulty[DIR_W], "bt sender marked faulty");

    // a packet lost inside the router (act forced empty), then the next one
    // must carry the dropper announcement
    force_drop = 1;
    one(4, mk(2, 3, DIR_W, 0, 0, 0, TOF_GEN, 5));
    check(want == 5'b01000, "north to (2,3)");
    finish_one();
    force_drop = 0;
    one(4, mk(2, 3, DIR_W, 0, 0, 0, TOF_GEN, 6));
    check(stat.lost_detect && out_pkt.hdr.faulty == '{x: 2, y: 2} && out_pkt.hdr.tof == SELF_DROPPER,
          "dropper announcement");
    finish_one();
    check(dropper, "dropper state");

    // report from the east about our north neighbour (2,3): turn-faulty;
    // the previous router (3,2) is healthy, its report is forwarded
    one(1, mk(0, 2, DIR_E, 0, 2, 3, TOF_TURN, 7));
    finish_one();
    check(reg_q.faulty[DIR_N], "neighbour report applied");
    check(reg_q.tof == TOF_GEN, "type bits stay with the west owner");

    // round robin: two inputs at once
    @(negedge clk);
    in_valid = 5'b10010;
    in_pkt[1] = mk(0, 2, DIR_E, 0, 3, 2, SELF_NONE, 8);
    in_pkt[4] = mk(1, 2, DIR_W, 0, 0, 0, TOF_GEN, 9);
    begin
      int served = 0;
      for (int c = 0; c < 4 && in_valid != 0; c++) begin
        #1;
        if (in_pop[1]) begin in_valid[1] = 0; served++; end
        if (in_pop[4]) begin in_valid[4] = 0; served++; end
        @(negedge clk);
      end
      check(served == 2, "both inputs served");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
